// tb_ddpm_dac_top: end-to-end run of the DDPM DAC at its default sizes
// (8 bits, 75 clocks per slot, 150 MHz, so 19200 clocks per sample).
//
// A monitor checks every pattern on its own:
//  - sample_load pulses exactly 19200 clocks apart (7812.5 S/s);
//  - the pin is high for exactly 75 * code clocks in the pattern;
//  - the code converted equals the reference for the sample requested one
//    pattern earlier: the static code or the 25 Hz / 90 % sine evaluated in
//    floating point, passed through the two-branch predistortion formula
//    when compensation is on;
//  - the sine samples stay within 0.75 LSB of the exact sine;
//  - after settling, the RC output averaged over a pattern equals
//    3.3 V * code / 256 within 2 mV.
// The sequence goes through static codes, compensation in both branches
// with both signs of alpha, a switch to the sine and back, and full scale.
// Each of these mechanisms is counted and must occur at least once.
module tb_ddpm_dac_top;
  localparam int N = 8, FRAC = 16, DIV = 75;
  localparam int PAT = DIV << N;
  localparam real FO_FS = 25.0 / (150.0e6 / 75.0 / 256.0);

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, comp_en = 1'b0;
  ddpm_pkg::pattern_mode_e mode = ddpm_pkg::PAT_STATIC;
  logic [N-1:0] static_code = '0;
  logic signed [FRAC+1:0] alpha = '0;
  logic ddpm_out, sample_load, upper_region;
  logic [N-1:0] mod_code, slot_count, raw_code;
  logic [31:0] v_out_uv;

  int checks = 0, failures = 0;
  // Mechanism counters.
  int n_patterns = 0, n_static = 0, n_sine = 0, n_mode_switch = 0;
  int n_comp_lower = 0, n_comp_upper = 0, n_bypass = 0, n_rc = 0, n_full_scale = 0;

  ddpm_dac_top dut (
    .clk(clk), .rst_n(rst_n), .en(en), .mode(mode), .static_code(static_code),
    .comp_en(comp_en), .alpha(alpha), .ddpm_out(ddpm_out), .sample_load(sample_load),
    .mod_code(mod_code), .slot_count(slot_count), .raw_code(raw_code),
    .upper_region(upper_region), .v_out_uv(v_out_uv));

  always #5 clk = ~clk;

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (time %0t)", what, $time); end
  endtask

  // Reference predistortion (floating point).
  function automatic int ref_predistort(input int n, input int a_q, output bit up);
    real a, x;
    int q;
    a  = real'(a_q) / real'(1 << FRAC);
    up = real'(n) >= real'(1 << (N - 1)) * (1.0 + a);
    if (up) x = (real'(n) - real'((1 << N) - 1) * a) / (1.0 - a);
    else    x = real'(n) / (1.0 + a);
    q = int'($floor(x + 0.5));
    if (q < 0) q = 0;
    if (q > (1 << N) - 1) q = (1 << N) - 1;
    return q;
  endfunction

  // ---------------- monitor ----------------
  bit  h0 = 0, h1 = 0;          // sample_load one and two cycles ago
  bit  started = 0;
  int  cyc = 0, last_load = -1, high = 0, win_code = 0;
  int  exp_next = 0, exp_prev = 0, sine_k = 0;
  bit  rc_arm = 0, rc_now = 0;
  real rc_sum = 0.0;
  ddpm_pkg::pattern_mode_e req_mode = ddpm_pkg::PAT_STATIC, last_mode = ddpm_pkg::PAT_STATIC;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      // Cycle L (sample_load high): a pattern starts and a sample is requested.
      if (sample_load) begin
        if (last_load >= 0)
          check(cyc - last_load == PAT, $sformatf("pattern length %0d clocks", cyc - last_load));
        last_load = cyc;
        req_mode = mode;
        if (mode != last_mode) n_mode_switch++;
        last_mode = mode;
      end
      // Cycle L+1: the new raw sample is visible; work out what it becomes.
      if (h0) begin
        if (req_mode == ddpm_pkg::PAT_SINE) begin
          real x;
          x = 128.0 + 0.9 * 128.0 * $sin(2.0 * 3.141592653589793 * FO_FS * real'(sine_k));
          check(fabs(real'(raw_code) - x) <= 0.75,
                $sformatf("sine sample %0d: %0d, exact %f", sine_k, raw_code, x));
          sine_k++; n_sine++;
        end else begin
          check(raw_code == static_code, "static sample");
          n_static++;
        end
        if (comp_en) begin
          bit up;
          exp_next = ref_predistort(int'(raw_code), int'(alpha), up);
          if (up) n_comp_upper++; else n_comp_lower++;
        end else begin
          exp_next = int'(raw_code);
          n_bypass++;
        end
      end
      // Cycle L+2: the first slot of the new pattern is on the pin.
      if (h1) begin
        if (started) begin
          check(high == DIV * win_code,
                $sformatf("pattern of code %0d: pin high %0d clocks, expected %0d", win_code, high, DIV * win_code));
          if (win_code == (1 << N) - 1) n_full_scale++;
          n_patterns++;
          if (rc_now) begin
            real avg, exp_v;
            avg   = rc_sum / real'(PAT) * 1.0e-6;
            exp_v = 3.3 * real'(win_code) / 256.0;
            check(fabs(avg - exp_v) < 2.0e-3,
                  $sformatf("RC average %f V, expected %f V", avg, exp_v));
            n_rc++;
          end
        end
        started = 1;
        win_code = int'(mod_code);
        check(win_code == exp_prev, $sformatf("converted code %0d, expected %0d", win_code, exp_prev));
        exp_prev = exp_next;
        high = 0;
        rc_sum = 0.0;
        rc_now = rc_arm;
        rc_arm = 0;
      end
      high += int'(ddpm_out);
      rc_sum += real'(v_out_uv);
      h1 = h0;
      h0 = sample_load;
    end
  end

  // ---------------- stimulus ----------------
  // Wait for k more pattern starts, then change inputs a few cycles later
  // (they are sampled when the next sample is requested).
  task automatic patterns(input int k);
    repeat (k) @(posedge sample_load);
    repeat (5) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1; en = 1'b1;
    static_code = 8'd10;
    patterns(9);  rc_arm = 1;            // settled at code 10: check RC level
    patterns(1);  static_code = 8'd200;
    patterns(9);  rc_arm = 1;
    patterns(1);
    comp_en = 1'b1; alpha = 18'sd3277;   // alpha = +0.05
    static_code = 8'd60;  patterns(2);
    static_code = 8'd200; patterns(2);
    alpha = -18'sd3277;                  // alpha = -0.05
    static_code = 8'd100; patterns(2);
    static_code = 8'd250; patterns(2);
    comp_en = 1'b0; alpha = '0;
    mode = ddpm_pkg::PAT_SINE; patterns(40);
    mode = ddpm_pkg::PAT_STATIC; static_code = 8'd255; patterns(4);
    check(n_patterns > 60, "number of patterns");
    check(n_static > 0, "static mode used");
    check(n_sine > 0, "sine mode used");
    check(n_mode_switch >= 2, "mode switched both ways");
    check(n_comp_lower > 0, "lower predistortion branch used");
    check(n_comp_upper > 0, "upper predistortion branch used");
    check(n_bypass > 0, "predistortion bypass used");
    check(n_rc >= 2, "RC level checked");
    check(n_full_scale > 0, "full-scale pattern (last slot forced low)");
    $display("patterns %0d static %0d sine %0d switches %0d lower %0d upper %0d bypass %0d rc %0d full %0d",
             n_patterns, n_static, n_sine, n_mode_switch, n_comp_lower, n_comp_upper, n_bypass, n_rc, n_full_scale);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80 * PAT) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
