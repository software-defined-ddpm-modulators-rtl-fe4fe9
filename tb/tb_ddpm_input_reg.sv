// tb_ddpm_input_reg: loads random codes at random times and checks that the
// register holds the bit-reversed code, changes only on load, and resets
// to 0.
module tb_ddpm_input_reg;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [N-1:0] din = '0, din_rev, held = '0;
  int checks = 0, failures = 0;

  ddpm_input_reg dut (.clk(clk), .rst_n(rst_n), .load(load), .din(din), .din_rev(din_rev));

  always #5 clk = ~clk;

  function automatic logic [N-1:0] reverse(input logic [N-1:0] x);
    logic [N-1:0] r = '0;
    for (int i = 0; i < N; i++) if (x[i]) r = r | (N'(1) << (N - 1 - i));
    return r;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    #1 checks++;
    if (din_rev !== '0) begin failures++; $display("FAIL: reset value %b", din_rev); end
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      din  = N'($urandom);
      load = 1'($urandom_range(0, 2) == 0);
      @(posedge clk); #1;
      if (load) held = reverse(din);
      checks++;
      if (din_rev !== held) begin
        failures++;
        $display("FAIL: din=%b load=%0d held %b expected %b", din, load, din_rev, held);
      end
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
