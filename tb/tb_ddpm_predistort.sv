// tb_ddpm_predistort: compares the predistorted code with the two-branch
// formula evaluated in floating point,
//   n' = round(n / (1+a))                   for n <  2^(N-1)(1+a)
//   n' = round((n - (2^N-1) a) / (1-a))     otherwise,
// clamped to 0 .. 2^N-1, for every code at several fixed alphas and for
// random code/alpha pairs. Also checks the branch flag, the latency
// (done exactly N+FRAC+4 cycles after start), busy, and bypass.
module tb_ddpm_predistort;
  localparam int N = 8, FRAC = 16;
  localparam int W = N + FRAC + 3;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, bypass = 1'b0;
  logic [N-1:0] code_in = '0, code_out;
  logic signed [FRAC+1:0] alpha = '0;
  logic busy, done, upper;
  int checks = 0, failures = 0, n_upper = 0, n_lower = 0;

  ddpm_predistort dut (.clk(clk), .rst_n(rst_n), .start(start), .bypass(bypass),
                       .code_in(code_in), .alpha(alpha), .busy(busy), .done(done),
                       .code_out(code_out), .upper(upper));

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic convert(input int n, input int a_q, input bit byp);
    real a, x, lim;
    int  exp_q, lat;
    bit  exp_up, tie;
    a   = real'(a_q) / real'(1 << FRAC);
    lim = real'(1 << (N - 1)) * (1.0 + a);
    exp_up = !byp && (real'(n) >= lim);
    if (byp)         x = real'(n);
    else if (exp_up) x = (real'(n) - real'((1 << N) - 1) * a) / (1.0 - a);
    else             x = real'(n) / (1.0 + a);
    exp_q = int'($floor(x + 0.5));
    tie   = (fabs(x - $floor(x) - 0.5) < 1.0e-9);
    if (exp_q < 0) exp_q = 0;
    if (exp_q > (1 << N) - 1) exp_q = (1 << N) - 1;
    code_in = N'(n); alpha = (FRAC+2)'(a_q); bypass = byp; start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    code_in = N'($urandom); alpha = (FRAC+2)'($urandom);   // inputs are taken at start
    lat = 1;
    if (!byp) check(busy, "busy after start");
    while (!done && lat < 100) begin @(posedge clk); #1 lat++; end
    check(lat == (byp ? 1 : W + 1), $sformatf("latency %0d", lat));
    check(int'(code_out) == exp_q || (tie && int'(code_out) == exp_q - 1),
          $sformatf("n=%0d alpha=%0d/2^%0d bypass=%0d: got %0d expected %0d (x=%f)",
                    n, a_q, FRAC, byp, code_out, exp_q, x));
    check(upper == exp_up, $sformatf("n=%0d alpha=%0d: branch flag %0d", n, a_q, upper));
    if (exp_up) n_upper++; else if (!byp) n_lower++;
    @(posedge clk); #1 check(!done && !busy, "done longer than one cycle");
  endtask

  int alphas [5] = '{0, 3277, -3277, 16384, -20000};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    foreach (alphas[k])
      for (int n = 0; n < (1 << N); n++) convert(n, alphas[k], 1'b0);
    for (int i = 0; i < 500; i++)
      convert(int'($urandom_range(0, (1 << N) - 1)), int'($urandom_range(0, 60000)) - 30000, 1'b0);
    for (int i = 0; i < 20; i++) convert(int'($urandom_range(0, (1 << N) - 1)), 5000, 1'b1);
    check(n_upper > 100 && n_lower > 100, "both branches exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000 * (W + 4) + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
