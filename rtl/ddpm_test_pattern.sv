// ddpm_test_pattern: source of DAC input codes.
//
// In static mode every request returns `static_code` (the static transfer
// test steps this code through the range). In sine mode it returns the
// samples of
//
//   x[k] = 2^(N-1) + AMP_PERMILLE/1000 * 2^(N-1) * sin(2 pi k f_o / f_s),
//
// a 25 Hz sine at 90 % of full swing at the default 7812.5 S/s sample rate.
// The sine and its numbers are the document's; the way it is generated is
// this design's own: a 32-bit phase accumulator advanced by PHASE_INC =
// round(2^32 f_o / f_s) per sample, whose top LUT_BITS bits, rounded to the
// nearest step, select one of 2^LUT_BITS points of the period. The sine is
// read from a quarter-wave table of 2^(LUT_BITS-2)+1 magnitudes
// round(amp 2^(N-1) sin(pi/2 i / 2^(LUT_BITS-2))), computed at elaboration,
// and mirrored into the other three quarters. With 4096 points per period
// the phase step adds at most about 0.2 LSB to the rounding error.
//
// Timing: on a cycle with `next` high the output register `code` takes the
// next sample (the sine starts at phase 0, code 2^(N-1)) and `valid` pulses
// in the following cycle, together with the new code. `mode` is sampled with
// `next`; switching to sine resumes the phase where it stopped.
module ddpm_test_pattern #(
  parameter int unsigned N            = ddpm_pkg::DDPM_BITS,
  parameter int unsigned SYS_CLK_HZ   = ddpm_pkg::SYS_CLK_HZ,
  parameter int unsigned TICK_DIV     = ddpm_pkg::TICK_DIV,
  parameter int unsigned SINE_HZ      = 25,
  parameter int unsigned AMP_PERMILLE = 900,
  parameter int unsigned LUT_BITS     = 12,
  // Phase step per sample: 2^32 * f_o / f_s with f_s = SYS_CLK_HZ / TICK_DIV / 2^N.
  parameter longint unsigned PHASE_INC =
      ((longint'(SINE_HZ) * longint'(TICK_DIV) * (longint'(1) << N) << 32)
       + longint'(SYS_CLK_HZ) / 2) / longint'(SYS_CLK_HZ)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   next,
  input  ddpm_pkg::pattern_mode_e mode,
  input  logic [N-1:0]           static_code,
  output logic                   valid,
  output logic [N-1:0]           code
);
  // Quarter-wave table: Q+1 entries covering 0 .. pi/2 inclusive.
  localparam int unsigned Q = 1 << (LUT_BITS - 2);
  typedef logic [N-1:0] lut_t [Q+1];

  function automatic lut_t make_quarter_sine();
    lut_t t;
    real  amp;
    amp = real'(AMP_PERMILLE) / 1000.0 * real'(1 << (N - 1));
    for (int i = 0; i <= int'(Q); i++)
      t[i] = N'(int'($floor(amp * $sin(3.141592653589793 / 2.0 * real'(i) / real'(Q)) + 0.5)));
    return t;
  endfunction

  localparam lut_t QSINE = make_quarter_sine();
  localparam logic [N-1:0] MID = N'(1 << (N - 1));

  logic [31:0]         phase;
  logic [LUT_BITS-1:0] idx;       // phase rounded to LUT_BITS bits
  logic [LUT_BITS-2:0] r;         // position inside the quarter (0 .. Q-1)
  logic [LUT_BITS-2:0] ridx;      // table index (0 .. Q)
  logic [N-1:0]        mag;       // |amp * sin|, rounded
  logic [N-1:0]        sine_code;

  always_comb begin
    idx = LUT_BITS'((phase + (32'd1 << (31 - LUT_BITS))) >> (32 - LUT_BITS));
    r   = {1'b0, idx[LUT_BITS-3:0]};
    // Odd quarters run the table backwards (index Q - r, r = 0 gives Q).
    ridx = idx[LUT_BITS-2] ? ((LUT_BITS-1)'(Q) - r) : r;
    mag  = QSINE[ridx];
    // The second half of the period is negative.
    sine_code = idx[LUT_BITS-1] ? (MID - mag) : (MID + mag);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0;
      code  <= N'(1 << (N - 1));
      valid <= 1'b0;
    end else begin
      valid <= next;
      if (next) begin
        if (mode == ddpm_pkg::PAT_SINE) begin
          code  <= sine_code;
          phase <= phase + 32'(PHASE_INC);
        end else begin
          code <= static_code;
        end
      end
    end
  end

  initial assert (LUT_BITS >= 2 && LUT_BITS <= 16) else $error("LUT_BITS out of range");

endmodule
