// ddpm_dac_core: digital part of the DDPM D/A converter.
//
// Chains the blocks that a microcontroller runs in software into one clocked
// pipeline:
//
//   ddpm_test_pattern -> ddpm_predistort -> next-code register
//        ^                                         |
//        | load (start of each pattern)            v
//   ddpm_tick_gen --tick--> ddpm_opt_modulator --> ddpm_out (pin)
//
// The timer ticks once per DDPM slot (TICK_DIV system clocks). The
// modulator spends 2^N slots on each code; when it starts a pattern it takes
// the code waiting in the next-code register and pulses `sample_load`. That
// pulse also asks the pattern source for the following sample, which is
// predistorted (or passed through when comp_en is low) and parked in the
// next-code register well before the next pattern starts, since the divider
// needs only N+FRAC+4 cycles out of the TICK_DIV * 2^N of a pattern. Each
// sample is therefore output one pattern after it was generated, and the
// first pattern after reset converts code 0. The sample rate is
// SYS_CLK_HZ / TICK_DIV / 2^N, 7812.5 S/s with the defaults. The blocks and
// numbers follow the document; the pipelining is this design's own.
module ddpm_dac_core #(
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
  output logic                        upper_region
);
  // A division must end within one pattern.
  initial assert (N + ALPHA_FRAC + 4 < TICK_DIV * (1 << N))
    else $error("pattern too short for the predistortion divider");

  logic         tick;
  logic         pat_valid;
  logic         pd_done;
  logic         pd_busy;
  logic [N-1:0] pd_code;
  logic [N-1:0] next_code;

  ddpm_tick_gen #(.DIV(TICK_DIV)) u_tick (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .tick (tick)
  );

  ddpm_opt_modulator #(.N(N)) u_mod (
    .clk     (clk),
    .rst_n   (rst_n),
    .tick    (tick),
    .din     (next_code),
    .load    (sample_load),
    .count   (slot_count),
    .ddpm_out(ddpm_out)
  );

  ddpm_test_pattern #(
    .N           (N),
    .SYS_CLK_HZ  (SYS_CLK_HZ),
    .TICK_DIV    (TICK_DIV),
    .SINE_HZ     (SINE_HZ),
    .AMP_PERMILLE(AMP_PERMILLE)
  ) u_pattern (
    .clk        (clk),
    .rst_n      (rst_n),
    .next       (sample_load),
    .mode       (mode),
    .static_code(static_code),
    .valid      (pat_valid),
    .code       (raw_code)
  );

  ddpm_predistort #(.N(N), .FRAC(ALPHA_FRAC)) u_predist (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (pat_valid),
    .bypass  (!comp_en),
    .code_in (raw_code),
    .alpha   (alpha),
    .busy    (pd_busy),
    .done    (pd_done),
    .code_out(pd_code),
    .upper   (upper_region)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      next_code <= '0;
      mod_code  <= '0;
    end else begin
      if (pd_done)     next_code <= pd_code;
      if (sample_load) mod_code  <= next_code;
    end
  end

  // The divider is always idle again when the next pattern starts.
  assert property (@(posedge clk) disable iff (!rst_n) sample_load |-> !pd_busy)
    else $error("predistortion still busy at pattern start");

endmodule
