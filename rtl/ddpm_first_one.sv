// ddpm_first_one: lowest-set-bit finder of the optimized DDPM modulator.
//
// Combinational. The XOR of the previous and present counter values is a
// thermometer word: ones from bit 0 up to and including the lowest '1' of
// the present value. Shifting it right by one and adding one leaves a single
// '1' exactly at the position of that lowest '1'. This XOR / shift / +1
// chain is the document's; it needs no priority logic, so its cost does not
// grow with the number of tests.
//
// The words are N+1 bits wide: bit N of count_pres carries the counter's
// carry out, so when the count wraps to 0 the result is bit N, which matches
// no input bit and gives the '0' slot that ends every DDPM pattern.
module ddpm_first_one #(
  parameter int unsigned N = ddpm_pkg::DDPM_BITS
) (
  input  logic [N:0] count_prev,
  input  logic [N:0] count_pres,
  output logic [N:0] onehot
);

  logic [N:0] thermo;

  always_comb begin
    thermo = count_prev ^ count_pres;
    onehot = (thermo >> 1) + 1'b1;
  end

endmodule
