// ddpm_input_reg: input data register of the optimized DDPM modulator.
//
// Holds the code being modulated, stored bit-reversed (din[N-1] lands in
// din_rev[0]) so that bit k of the one-hot counter word selects input bit
// N-1-k: the counter's LSB, set in every other slot, selects the input MSB.
// As in the document, the reversal is done once per 2^N-slot pattern, when
// `load` takes a new code, and not on every slot. Loads on a cycle with
// `load` high; reset clears it to code 0.
module ddpm_input_reg #(
  parameter int unsigned N = ddpm_pkg::DDPM_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] din,
  output logic [N-1:0] din_rev
);

  logic [N-1:0] rev;

  always_comb begin
    for (int i = 0; i < int'(N); i++) rev[i] = din[N-1-i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    din_rev <= '0;
    else if (load) din_rev <= rev;
  end

endmodule
