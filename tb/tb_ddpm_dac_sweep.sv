// tb_ddpm_dac_sweep: static transfer test of the DAC at default sizes.
//
// Steps the static code through all 256 values, one pattern each, and
// measures for every pattern how many clocks the pin is high. For an ideal
// pin that count, divided by the 75 * 256 clocks of a pattern, is the
// average output over full scale, so the digital transfer curve must be
// exactly 75 * code clocks for every code (zero INL and DNL before the
// analog pin). A second sweep with predistortion on (alpha = +0.05) checks
// that the compensated transfer stays monotonic, keeps both end points, and
// bends at the branch point 128 * 1.05 = 134.4.
module tb_ddpm_dac_sweep;
  localparam int N = 8, DIV = 75;
  localparam int PAT = DIV << N;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, comp_en = 1'b0;
  ddpm_pkg::pattern_mode_e mode = ddpm_pkg::PAT_STATIC;
  logic [N-1:0] static_code = '0;
  logic signed [17:0] alpha = '0;
  logic ddpm_out, sample_load, upper_region;
  logic [N-1:0] mod_code, slot_count, raw_code;
  logic [31:0] v_out_uv;
  int checks = 0, failures = 0;

  ddpm_dac_top dut (
    .clk(clk), .rst_n(rst_n), .en(en), .mode(mode), .static_code(static_code),
    .comp_en(comp_en), .alpha(alpha), .ddpm_out(ddpm_out), .sample_load(sample_load),
    .mod_code(mod_code), .slot_count(slot_count), .raw_code(raw_code),
    .upper_region(upper_region), .v_out_uv(v_out_uv));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int high, prev, n_bend;
    repeat (4) @(posedge clk);
    rst_n = 1'b1; en = 1'b1;
    // Pattern 1 after reset converts code 0; the code requested at the start
    // of pattern k is converted in pattern k+1.
    static_code = 8'd1;
    @(posedge clk iff sample_load);
    @(posedge clk); #1;
    // Windows of exactly one pattern, starting when its first slot reaches
    // the pin (two clocks after the pattern start), back to back.
    for (int n = 0; n < (1 << N); n++) begin
      check(int'(mod_code) == n, $sformatf("sweep: pattern converts %0d, expected %0d", mod_code, n));
      static_code = N'(n + 2);
      high = 0;
      for (int i = 0; i < PAT; i++) begin
        high += int'(ddpm_out);
        @(posedge clk); #1;
      end
      check(high == DIV * n, $sformatf("code %0d: pin high %0d clocks, expected %0d", n, high, DIV * n));
    end
    // Compensated sweep, codes 0..255 in steps of 5.
    comp_en = 1'b1; alpha = 18'sd3277;
    prev = -1; n_bend = 0;
    for (int n = 0; n <= 255; n += 5) begin
      int got;
      static_code = N'(n);
      repeat (2) @(posedge clk iff sample_load);
      repeat (3) @(posedge clk);
      got = int'(mod_code);
      check(got >= prev, $sformatf("compensated transfer not monotonic at %0d (%0d < %0d)", n, got, prev));
      if (n == 0)   check(got == 0, "compensated code 0");
      if (n == 255) check(got == 255, "compensated code 255");
      if (upper_region) n_bend++;
      prev = got;
    end
    check(n_bend > 0 && n_bend < 52, "both branches used in the compensated sweep");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((256 + 3 * 52 + 8) * PAT) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
