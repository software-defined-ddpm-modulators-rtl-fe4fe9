// ddpm_opt_modulator: the optimized (priority-free) DDPM modulator.
//
// Dyadic digital pulse modulation turns an N-bit code n into a pattern of
// 2^N one-clock slots holding exactly n ones, arranged so that input bit i
// is output in 2^i slots spread evenly over the pattern: the MSB every other
// slot, the next bit every other one of the remaining slots, and so on, with
// the last slot of the pattern always '0'. Slot c of the pattern (c = 1 ..
// 2^N, counted modulo 2^N) outputs input bit N-1-k, where k is the position
// of the lowest '1' of c.
//
// This block finds k without any priority logic, as the document proposes:
// the XOR of the present and previous counter values, shifted right by one
// and incremented, is a one-hot word at position k (ddpm_first_one). It is
// ANDed with the bit-reversed input register and the bits are ORed into the
// output. Every slot therefore costs the same, whatever N.
//
// Timing: each `tick` is one slot. On a tick the counter steps; if it was
// at 0 (the last slot of a pattern) the tick also starts a new pattern,
// `load` pulses in that cycle and `din` is taken into the input register.
// The output register is written in the cycle after the tick, so ddpm_out
// changes two clock edges after the tick edge and holds for the slot. Ticks
// must be at least two cycles apart. Reset leaves the modulator in the last
// ('0') slot of a pattern of code 0, so the first tick loads din. Taking the
// code once per pattern follows the document; the register placement and
// reset state are this design's own.
module ddpm_opt_modulator #(
  parameter int unsigned N = ddpm_pkg::DDPM_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,
  input  logic [N-1:0] din,
  output logic         load,
  output logic [N-1:0] count,
  output logic         ddpm_out
);

  logic [N-1:0] count_prev;
  logic         wrap;
  logic [N-1:0] din_rev;
  logic [N:0]   onehot;
  logic         eval;

  assign load = tick && (count == '0);

  ddpm_counter #(.N(N)) u_counter (
    .clk       (clk),
    .rst_n     (rst_n),
    .step      (tick),
    .count     (count),
    .count_prev(count_prev),
    .wrap      (wrap)
  );

  ddpm_input_reg #(.N(N)) u_input_reg (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (load),
    .din    (din),
    .din_rev(din_rev)
  );

  ddpm_first_one #(.N(N)) u_first_one (
    .count_prev({1'b0, count_prev}),
    .count_pres({wrap, count}),
    .onehot    (onehot)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      eval     <= 1'b0;
      ddpm_out <= 1'b0;
    end else begin
      eval <= tick;
      if (eval) ddpm_out <= |(onehot[N-1:0] & din_rev);
    end
  end

  // A slot is evaluated in the cycle after its tick; a second tick in that
  // cycle would step the counter before the evaluation.
  assert property (@(posedge clk) disable iff (!rst_n) tick |=> !tick)
    else $error("ticks closer than two cycles");

  // The first-one word is one-hot in every evaluated slot.
  assert property (@(posedge clk) disable iff (!rst_n) eval |-> $onehot(onehot))
    else $error("first-one word not one-hot");

endmodule
