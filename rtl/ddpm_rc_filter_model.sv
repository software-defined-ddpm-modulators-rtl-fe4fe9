// ddpm_rc_filter_model: behavioural model of the RC reconstruction filter.
//
// This is a behavioural model, not synthesizable logic: it stands for the
// discrete first-order low-pass filter (R = 100 kOhm, C = 1 nF, so a time
// constant of 100 us and a corner near 1.6 kHz) that turns the 3.3 V DDPM
// pin into the DAC's analog output. The component values and supply are the
// document's; the discretisation is this model's own. Blocking assignments
// to the real state are deliberate: it is a model evaluated once per edge.
//
// Once per `clk` period it applies the exact step response of the RC
// network to the pin level held over that period:
//   v <- vin_level + (v - vin_level) * exp(-T_clk / (R C)),
// with vin_level = VDD when `vin` is high and 0 otherwise, and reports the
// capacitor voltage on `v_out_uv` in microvolts. The capacitor starts
// discharged. The pin is taken as ideal (no edge-rate imbalance).
module ddpm_rc_filter_model #(
  parameter int unsigned R_OHM  = 100_000,      // resistance, ohm
  parameter int unsigned C_PF   = 1_000,        // capacitance, pF
  parameter int unsigned VDD_MV = 3_300,        // pin high level, mV
  parameter int unsigned CLK_HZ = 150_000_000   // model update rate, Hz
) (
  input  logic        clk,
  input  logic        vin,
  output logic [31:0] v_out_uv
);
  real decay;   // exp(-T_clk / RC)
  real vdd;     // pin high level, V
  real v;       // capacitor voltage, V
  real vin_v;

  initial begin
    decay    = $exp(-1.0 / (real'(CLK_HZ) * real'(R_OHM) * real'(C_PF) * 1.0e-12));
    vdd      = real'(VDD_MV) * 1.0e-3;
    v        = 0.0;
    v_out_uv = '0;
  end

  always @(posedge clk) begin
    vin_v     = vin ? vdd : 0.0;
    v         = vin_v + (v - vin_v) * decay;
    v_out_uv <= 32'(longint'(v * 1.0e6));
  end

endmodule
