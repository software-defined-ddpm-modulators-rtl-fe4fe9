// tb_ddpm_rc_filter_model: checks the RC model against the analytic step
// response of a 100 kOhm / 1 nF network (tau = 100 us = 15000 clocks at
// 150 MHz): charge for one and for three time constants, discharge for one,
// and the average of a 25 % duty square wave after settling (0.825 V).
module tb_ddpm_rc_filter_model;
  localparam real TAU_CYC = 15000.0;
  logic clk = 1'b0, vin = 1'b0;
  logic [31:0] v_out_uv;
  int checks = 0, failures = 0;

  ddpm_rc_filter_model dut (.clk(clk), .vin(vin), .v_out_uv(v_out_uv));

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  always #5 clk = ~clk;

  task automatic check_v(input real exp_v, input real tol, input string what);
    real v;
    v = real'(v_out_uv) * 1.0e-6;
    checks++;
    if (fabs(v - exp_v) > tol) begin
      failures++;
      $display("FAIL: %s: %f V, expected %f V", what, v, exp_v);
    end
  endtask

  initial begin
    real v1, sum;
    @(posedge clk); #1;
    check_v(0.0, 1.0e-6, "starts discharged");
    vin = 1'b1;
    repeat (15000) @(posedge clk);
    #1 check_v(3.3 * (1.0 - $exp(-1.0)), 1.0e-3, "charge for 1 tau");
    repeat (30000) @(posedge clk);
    #1 check_v(3.3 * (1.0 - $exp(-3.0)), 1.0e-3, "charge for 3 tau");
    v1 = real'(v_out_uv) * 1.0e-6;
    vin = 1'b0;
    repeat (15000) @(posedge clk);
    #1 check_v(v1 * $exp(-1.0), 1.0e-3, "discharge for 1 tau");
    // 25 % duty square wave, period 100 clocks, for 12 tau, then average.
    for (int i = 0; i < 1800; i++) begin
      vin = 1'b1; repeat (25) @(posedge clk);
      #1 vin = 1'b0; repeat (75) @(posedge clk);
      #1;
    end
    sum = 0.0;
    for (int i = 0; i < 100; i++) begin
      vin = (i < 25);
      @(posedge clk); #1 sum += real'(v_out_uv) * 1.0e-6;
    end
    vin = 1'b0;
    begin
      checks++;
      if (fabs(sum / 100.0 - 0.825) > 2.0e-3) begin
        failures++; $display("FAIL: square-wave average %f V", sum / 100.0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
