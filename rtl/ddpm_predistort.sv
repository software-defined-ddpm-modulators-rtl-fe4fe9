// ddpm_predistort: double-slope predistortion of the DAC input code.
//
// A pin driver whose rising and falling edges differ in speed adds to every
// pulse a fixed error, so the DAC's transfer curve bends into two straight
// segments. The compensation maps the code n to be converted into
//
//   n' = round( n / (1 + alpha) )                    if n <  2^(N-1) (1+alpha)
//   n' = round( (n - (2^N - 1) alpha) / (1 - alpha) ) if n >= 2^(N-1) (1+alpha)
//
// where alpha comes from a one-time calibration and "round" is to the
// nearest integer. This formula is the document's; the fixed-point format
// and the divider are this design's own. alpha is a signed number with FRAC
// fractional bits (A = alpha * 2^FRAC) and must satisfy |alpha| < 1/2.
// Results are clamped to 0 .. 2^N-1, and halves round up.
//
// Both branches become one division num2 / den2 with integer operands:
//   lower: num = n 2^FRAC,                  den = 2^FRAC + A
//   upper: num = n 2^FRAC - (2^N - 1) A,    den = 2^FRAC - A
//   n' = floor((2 num + den) / (2 den)),
// done by a restoring divider that produces one quotient bit per cycle.
//
// Timing: a `start` pulse takes code_in and alpha; `busy` is high for
// W = N + FRAC + 3 cycles, then `done` pulses for one cycle with code_out
// and `upper` updated (latency W + 1 cycles). With `bypass` high, code_out
// takes code_in unchanged and `done` pulses in the next cycle. A start while
// busy is ignored. At the document's sample rate (one code per 19200 system
// clocks) the divider is idle almost all of the time.
module ddpm_predistort #(
  parameter int unsigned N    = ddpm_pkg::DDPM_BITS,
  parameter int unsigned FRAC = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                bypass,
  input  logic [N-1:0]        code_in,
  input  logic signed [FRAC+1:0] alpha,
  output logic                busy,
  output logic                done,
  output logic [N-1:0]        code_out,
  output logic                upper
);
  // Dividend and divisor widths.
  localparam int unsigned W  = N + FRAC + 3;   // 2*num + den
  localparam int unsigned DW = FRAC + 3;       // 2*den
  localparam int unsigned CW = $clog2(W + 1);

  typedef enum logic [0:0] {S_IDLE, S_DIV} state_e;
  state_e state;

  logic [W-1:0]  dividend;     // shifts out MSB first, quotient shifts in
  logic [DW-1:0] divisor;
  logic [DW:0]   rem;
  logic [CW-1:0] iter;

  // Set-up arithmetic, in signed arithmetic wide enough for every operand.
  localparam int unsigned SW = N + FRAC + 5;
  logic signed [SW-1:0] a_s, one_s, n_s, thr_s, num_s, den_s, num2_s, den2_s;
  logic                 up_s;

  always_comb begin
    a_s    = SW'(alpha);                       // sign-extended
    one_s  = SW'(1) <<< FRAC;
    n_s    = SW'(code_in) <<< FRAC;
    thr_s  = (one_s + a_s) <<< (N - 1);
    up_s   = (n_s >= thr_s);
    if (up_s) begin
      num_s = n_s - (SW'((1 << N) - 1) * a_s);
      den_s = one_s - a_s;
    end else begin
      num_s = n_s;
      den_s = one_s + a_s;
    end
    num2_s = (num_s <<< 1) + den_s;
    den2_s = den_s <<< 1;
  end

  // One restoring step.
  logic [DW:0] rem_sh;
  logic        fits;
  always_comb begin
    rem_sh = {rem[DW-1:0], dividend[W-1]};
    fits   = (rem_sh >= {1'b0, divisor});
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      dividend <= '0;
      divisor  <= '0;
      rem      <= '0;
      iter     <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      code_out <= '0;
      upper    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            if (bypass) begin
              code_out <= code_in;
              upper    <= 1'b0;
              done     <= 1'b1;
            end else begin
              dividend <= W'(num2_s);
              divisor  <= DW'(den2_s);
              rem      <= '0;
              iter     <= CW'(W);
              upper    <= up_s;
              busy     <= 1'b1;
              state    <= S_DIV;
            end
          end
        end
        S_DIV: begin
          rem      <= fits ? (rem_sh - {1'b0, divisor}) : rem_sh;
          dividend <= {dividend[W-2:0], fits};
          iter     <= iter - 1'b1;
          if (iter == CW'(1)) begin
            // dividend now holds the quotient (its last bit is `fits`).
            if ({dividend[W-2:0], fits} > W'((1 << N) - 1)) code_out <= '1;
            else code_out <= N'({dividend[W-2:0], fits});
            busy  <= 1'b0;
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The divisor must stay positive and the result non-negative: |alpha| < 1/2.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (start && !bypass && state == S_IDLE) |-> (alpha < (1 <<< (FRAC - 1)))
                                                          && (alpha > -(1 <<< (FRAC - 1))))
    else $error("alpha out of range");

endmodule
