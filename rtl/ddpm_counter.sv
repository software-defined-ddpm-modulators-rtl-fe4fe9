// ddpm_counter: binary counter of the optimized DDPM modulator.
//
// An N-bit free-running counter that keeps, next to its present value, the
// value it held before the last increment and the carry out of that
// increment. The modulator XORs previous and present values to find the
// first '1' of the count; the carry lets it see the wrap 2^N-1 -> 0 as a
// change in bit N, so the count 0 closes the pattern with a '0' slot.
//
// Interface: on a cycle with `step` high, count_prev <= count,
// count <= count + 1 and wrap <= carry out; all three are registers.
// Reset puts the counter in the state just after a wrap (count = 0,
// count_prev = 2^N-1, wrap = 1), i.e. in the last slot of a pattern, so the
// first step starts a fresh pattern at count = 1. The present/previous pair
// follows the document's architecture; the wrap flag and the reset state are
// this design's own.
module ddpm_counter #(
  parameter int unsigned N = ddpm_pkg::DDPM_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  output logic [N-1:0] count,
  output logic [N-1:0] count_prev,
  output logic         wrap
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count      <= '0;
      count_prev <= '1;
      wrap       <= 1'b1;
    end else if (step) begin
      count_prev    <= count;
      {wrap, count} <= {1'b0, count} + 1'b1;
    end
  end

endmodule
