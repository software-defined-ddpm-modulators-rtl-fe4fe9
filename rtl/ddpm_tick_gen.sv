// ddpm_tick_gen: modulation-slot timer.
//
// Produces a one-cycle pulse on `tick` every DIV cycles of `clk` while `en`
// is high; it stands for the periodic timer interrupt that starts one DDPM
// evaluation per slot. With the defaults (DIV = 75 at 150 MHz) the slot is
// 500 ns, the 2 MHz DDPM clock of the reference DAC. A down-counter is
// reloaded with DIV-1 on each tick; dropping `en` freezes it, and reset
// restarts the period, so the first tick comes DIV cycles after `en` rises
// out of reset. The counter structure is this design's own choice.
module ddpm_tick_gen #(
  parameter int unsigned DIV = ddpm_pkg::TICK_DIV
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic tick
);
  localparam int unsigned W = (DIV > 1) ? $clog2(DIV) : 1;

  logic [W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= W'(DIV - 1);
      tick <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (en) begin
        if (cnt == '0) begin
          cnt  <= W'(DIV - 1);
          tick <= 1'b1;
        end else begin
          cnt <= cnt - 1'b1;
        end
      end
    end
  end

  initial assert (DIV >= 1) else $error("DIV must be at least 1");

endmodule
