// tb_ddpm_tick_gen: checks the slot timer at its default period (75 clocks,
// 500 ns at 150 MHz): the first tick comes 75 cycles after enable, every
// later tick exactly 75 cycles after the previous one, ticks are one cycle
// long, and none come while the timer is disabled.
module tb_ddpm_tick_gen;
  localparam int DIV = 75;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, tick;
  int checks = 0, failures = 0;
  int cyc = 0, last = 0, nticks = 0;

  ddpm_tick_gen dut (.clk(clk), .rst_n(rst_n), .en(en), .tick(tick));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // Disabled: no tick in 200 cycles.
    repeat (200) begin @(posedge clk); #1 check(!tick, "tick while disabled"); end
    en <= 1'b1; last = cyc;
    // Enabled: 20 ticks spaced DIV apart, each one cycle wide.
    while (nticks < 20) begin
      @(posedge clk); #1;
      if (tick) begin
        check(cyc - last == DIV, $sformatf("tick interval %0d, expected %0d", cyc - last, DIV));
        last = cyc; nticks++;
        @(posedge clk); #1 check(!tick, "tick longer than one cycle");
      end
    end
    // Pause mid-period: the period resumes where it stopped. The timer ran
    // for 31 enabled edges after the last tick, so 44 more complete it.
    repeat (30) @(posedge clk);
    en <= 1'b0;
    repeat (100) begin @(posedge clk); #1 check(!tick, "tick while paused"); end
    en <= 1'b1;
    begin
      int start;
      start = cyc;
      do begin @(posedge clk); #1; end while (!tick);
      check(cyc - start == DIV - 31, $sformatf("resume took %0d cycles, expected %0d", cyc - start, DIV - 31));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
