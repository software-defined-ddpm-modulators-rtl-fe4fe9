// tb_ddpm_test_pattern: checks the static mode (the code follows
// static_code) and the sine mode against
//   x[k] = 128 + 0.9 * 128 * sin(2 pi k * 25 / 7812.5)
// evaluated in floating point, over more than two sine periods (the output
// must stay within 0.75 LSB of the exact value: 0.5 for rounding plus the
// phase step of the table), with the valid pulse one cycle after a request.
module tb_ddpm_test_pattern;
  localparam int N = 8;
  localparam real FO_FS = 25.0 / (150.0e6 / 75.0 / 256.0);
  logic clk = 1'b0, rst_n = 1'b0, next = 1'b0;
  ddpm_pkg::pattern_mode_e mode = ddpm_pkg::PAT_STATIC;
  logic [N-1:0] static_code = '0, code;
  logic valid;
  int checks = 0, failures = 0;
  real worst = 0.0;

  ddpm_test_pattern dut (.clk(clk), .rst_n(rst_n), .next(next), .mode(mode),
                         .static_code(static_code), .valid(valid), .code(code));

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic request();
    next = 1'b1;
    @(posedge clk); #1 next = 1'b0;
    check(valid, "valid one cycle after request");
    @(posedge clk); #1 check(!valid, "valid longer than one cycle");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int i = 0; i < 50; i++) begin
      static_code = N'($urandom);
      request();
      check(code == static_code, $sformatf("static: %0d, expected %0d", code, static_code));
    end
    mode = ddpm_pkg::PAT_SINE;
    for (int k = 0; k < 700; k++) begin
      real x, e;
      request();
      x = 128.0 + 0.9 * 128.0 * $sin(2.0 * 3.141592653589793 * FO_FS * real'(k));
      e = fabs(real'(code) - x);
      if (e > worst) worst = e;
      check(e <= 0.75, $sformatf("sine k=%0d: %0d, exact %f", k, code, x));
      // A static interlude in the middle must not disturb the sine phase.
      if (k == 350) begin
        mode = ddpm_pkg::PAT_STATIC; static_code = 8'd3;
        request();
        check(code == 8'd3, "static interlude");
        mode = ddpm_pkg::PAT_SINE;
      end
    end
    $display("largest sine error %f LSB", worst);
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
