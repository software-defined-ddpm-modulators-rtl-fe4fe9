// tb_ddpm_counter: steps the 8-bit counter at random and compares present
// value, previous value and wrap flag with a reference count, over several
// wraps, and checks the reset state (the last slot of a pattern).
module tb_ddpm_counter;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0, step = 1'b0;
  logic [N-1:0] count, count_prev;
  logic wrap;
  int checks = 0, failures = 0;
  int ref_cnt = 0, ref_prev = (1 << N) - 1, ref_wrap = 1, nwraps = 0;

  ddpm_counter dut (.clk(clk), .rst_n(rst_n), .step(step), .count(count),
                    .count_prev(count_prev), .wrap(wrap));

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    for (int i = 0; i < 2000; i++) begin
      checks++;
      if (count != N'(ref_cnt) || count_prev != N'(ref_prev) || wrap != 1'(ref_wrap)) begin
        failures++;
        $display("FAIL: step %0d count=%0d prev=%0d wrap=%0d, expected %0d %0d %0d",
                 i, count, count_prev, wrap, ref_cnt, ref_prev, ref_wrap);
      end
      step = 1'($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (step) begin
        ref_prev = ref_cnt;
        ref_wrap = (ref_cnt == (1 << N) - 1);
        ref_cnt  = (ref_cnt + 1) % (1 << N);
        if (ref_wrap != 0) nwraps++;
      end
    end
    checks++;
    if (nwraps < 3) begin failures++; $display("FAIL: only %0d wraps", nwraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
