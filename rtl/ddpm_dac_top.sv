// ddpm_dac_top: 8-bit DDPM D/A converter with its reconstruction filter.
//
// The digital converter (ddpm_dac_core) drives a pin with a dyadic digital
// pulse modulated bitstream whose density is the code being converted; a
// first-order RC filter (ddpm_rc_filter_model, a behavioural model of the
// discrete R = 100 kOhm, C = 1 nF network on a 3.3 V pin) recovers the
// analog level, reported on v_out_uv in microvolts. The filter is the only
// non-synthesizable part and sits beside the digital core, as it sits beside
// the chip on a board.
//
// Ports: `en` runs the slot timer; `mode` selects a static code or the 25 Hz
// test sine; `comp_en` and `alpha` control the double-slope predistortion;
// `sample_load` pulses at the start of every 2^N-slot pattern, when
// `mod_code` takes the code now being converted. See ddpm_dac_core for the
// timing.
module ddpm_dac_top #(
  parameter int unsigned N            = ddpm_pkg::DDPM_BITS,
  parameter int unsigned TICK_DIV     = ddpm_pkg::TICK_DIV,
  parameter int unsigned SYS_CLK_HZ   = ddpm_pkg::SYS_CLK_HZ,
  parameter int unsigned ALPHA_FRAC   = 16,
  parameter int unsigned SINE_HZ      = 25,
  parameter int unsigned AMP_PERMILLE = 900
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  input  ddpm_pkg::pattern_mode_e     mode,
  input  logic [N-1:0]                static_code,
  input  logic                        comp_en,
  input  logic signed [ALPHA_FRAC+1:0] alpha,
  output logic                        ddpm_out,
  output logic                        sample_load,
  output logic [N-1:0]                mod_code,
  output logic [N-1:0]                slot_count,
  output logic [N-1:0]                raw_code,
  output logic                        upper_region,
  output logic [31:0]                 v_out_uv
);

  ddpm_dac_core #(
    .N           (N),
    .TICK_DIV    (TICK_DIV),
    .SYS_CLK_HZ  (SYS_CLK_HZ),
    .ALPHA_FRAC  (ALPHA_FRAC),
    .SINE_HZ     (SINE_HZ),
    .AMP_PERMILLE(AMP_PERMILLE)
  ) u_core (
    .clk         (clk),
    .rst_n       (rst_n),
    .en          (en),
    .mode        (mode),
    .static_code (static_code),
    .comp_en     (comp_en),
    .alpha       (alpha),
    .ddpm_out    (ddpm_out),
    .sample_load (sample_load),
    .mod_code    (mod_code),
    .slot_count  (slot_count),
    .raw_code    (raw_code),
    .upper_region(upper_region)
  );

  ddpm_rc_filter_model #(.CLK_HZ(SYS_CLK_HZ)) u_filter (
    .clk     (clk),
    .vin     (ddpm_out),
    .v_out_uv(v_out_uv)
  );

endmodule
