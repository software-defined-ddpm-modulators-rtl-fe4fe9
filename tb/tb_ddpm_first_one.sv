// tb_ddpm_first_one: exhaustive check of the lowest-set-bit finder for every
// step of an 8-bit counter (previous = c-1, present = c with the carry out
// as bit 8). The expected word is found by scanning c for its lowest '1'
// and is bit 8 when c wrapped to 0. Also checks a 4-bit instance against the
// worked example of the architecture: 1001 -> 1010 gives 0010.
module tb_ddpm_first_one;
  localparam int N = 8;
  logic [N:0] prev, pres, onehot;
  logic [4:0] p4, q4, o4;
  int checks = 0, failures = 0;

  ddpm_first_one dut (.count_prev(prev), .count_pres(pres), .onehot(onehot));
  ddpm_first_one #(.N(4)) dut4 (.count_prev(p4), .count_pres(q4), .onehot(o4));

  initial begin
    for (int c = 0; c < (1 << N); c++) begin
      logic [N:0] exp;
      int k;
      prev = {1'b0, N'((c + (1 << N) - 1) % (1 << N))};
      pres = {1'(c == 0), N'(c)};
      k = N;
      for (int b = N - 1; b >= 0; b--) if (((c >> b) & 1) == 1) k = b;
      exp = (N+1)'(1) << k;
      #1;
      checks++;
      if (onehot !== exp) begin
        failures++;
        $display("FAIL: count %0d onehot=%b expected %b", c, onehot, exp);
      end
    end
    p4 = 5'b01001; q4 = 5'b01010; #1;
    checks++;
    if (o4 !== 5'b00010) begin failures++; $display("FAIL: 4-bit example gave %b", o4); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
