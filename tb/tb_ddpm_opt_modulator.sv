// tb_ddpm_opt_modulator: runs the 8-bit modulator over whole patterns for a
// list of codes (edge cases and random ones) with one tick every 4 clocks.
// The expected bit of every slot comes from the recursive definition of a
// DDPM pattern, independent of the counter trick:
//   T_0 = empty,  T_i = [T_(i-1), b_(N-i), T_(i-1)],  pattern = [T_N, 0].
// Also checks that each pattern holds exactly n ones, that `load` pulses
// only on the first tick of a pattern, and the output latency: the slot's
// bit appears two clock edges after the tick edge, not one. A 4-bit
// instance converts the worked example n = 10 (1010b), whose 16-slot pattern
// is the superposition of the MSB basis (odd slots) and the bit-1 basis
// (slots 4 and 12): 1011101010111010.
module tb_ddpm_opt_modulator;
  localparam int N = 8;
  localparam int P = 1 << N;
  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0;
  logic [N-1:0] din = '0, count;
  logic load, ddpm_out;
  int checks = 0, failures = 0;

  ddpm_opt_modulator dut (.clk(clk), .rst_n(rst_n), .tick(tick), .din(din),
                          .load(load), .count(count), .ddpm_out(ddpm_out));

  // 4-bit instance, ticked every 4 clocks in step with the 8-bit one.
  logic [3:0] count4;
  logic load4, out4;
  ddpm_opt_modulator #(.N(4)) dut4 (.clk(clk), .rst_n(rst_n), .tick(tick), .din(4'd10),
                                    .load(load4), .count(count4), .ddpm_out(out4));
  localparam logic [15:0] EX10 = 16'b1011101010111010;   // slot 1 first (MSB)
  int slot4 = 0;
  logic tick_d = 1'b0;
  always @(posedge clk) begin
    // The slot's bit is on the pin two edges after its tick edge.
    tick_d <= tick;
    if (rst_n && tick_d) begin
      #1;
      if (slot4 < 48) begin
        checks++;
        if (out4 != EX10[15 - (slot4 % 16)]) begin
          failures++;
          $display("FAIL: 4-bit n=10 slot %0d: %0d", slot4 % 16 + 1, out4);
        end
      end
      slot4++;
    end
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Pattern of code n by the recursive definition.
  function automatic void ref_pattern(input int n, output bit pat [P]);
    bit t [$];
    bit nt [$];
    for (int i = 1; i <= N; i++) begin
      nt = t;
      nt.push_back(1'((n >> (N - i)) & 1));
      foreach (t[j]) nt.push_back(t[j]);
      t = nt;
    end
    t.push_back(1'b0);
    foreach (t[j]) pat[j] = t[j];
  endfunction

  int codes [$] = '{10, 127, 0, 255, 1, 128, 170, 85};

  initial begin
    bit pat [P];
    bit prev_bit;
    repeat (8) codes.push_back(int'($urandom_range(0, P - 1)));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    check(ddpm_out == 1'b0 && count == '0, "reset state");
    prev_bit = 1'b0;
    foreach (codes[k]) begin
      int ones;
      ones = 0;
      din = N'(codes[k]);
      ref_pattern(codes[k], pat);
      for (int s = 0; s < P; s++) begin
        tick = 1'b1;
        #0 check(load == (s == 0), $sformatf("load=%0d in slot %0d", load, s));
        @(posedge clk); #1 tick = 1'b0;
        if (s == 0) din = N'($urandom);   // must not affect the running pattern
        check(ddpm_out == prev_bit, $sformatf("code %0d slot %0d: output changed one edge after tick", codes[k], s));
        @(posedge clk); #1;
        check(ddpm_out == pat[s], $sformatf("code %0d slot %0d: out=%0d expected %0d", codes[k], s, ddpm_out, pat[s]));
        ones += int'(ddpm_out);
        prev_bit = ddpm_out;
        @(posedge clk); #1;
        @(posedge clk); #1;
      end
      check(ones == codes[k], $sformatf("code %0d: %0d ones in the pattern", codes[k], ones));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * P * 4 + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
