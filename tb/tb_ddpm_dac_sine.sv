// tb_ddpm_dac_sine: dynamic test of the DAC at default sizes.
//
// Converts two full periods of the 25 Hz, 90 % full-swing test sine
// (625 samples at 7812.5 S/s) and measures, for each 19200-clock pattern,
// the fraction of time the pin is high, which is the output sample the RC
// filter averages. From these samples it computes the fundamental by a DFT
// at exactly two cycles per record and the SNDR as fundamental power over
// the power of everything else except DC, then ENOB = (SNDR - 1.76) / 6.02.
// An ideal 8-bit converter at 90 % amplitude reaches about 49 dB; the test
// asks for at least 47 dB and the right amplitude (0.9 * 128 codes).
module tb_ddpm_dac_sine;
  localparam int N = 8, DIV = 75;
  localparam int PAT = DIV << N;
  localparam int S = 625;
  localparam real PI = 3.141592653589793;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, comp_en = 1'b0;
  ddpm_pkg::pattern_mode_e mode = ddpm_pkg::PAT_SINE;
  logic [N-1:0] static_code = '0;
  logic signed [17:0] alpha = '0;
  logic ddpm_out, sample_load, upper_region;
  logic [N-1:0] mod_code, slot_count, raw_code;
  logic [31:0] v_out_uv;
  int checks = 0, failures = 0;
  real y [S];

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
    real re, im, mean, p_tot, p_fund, amp, sndr, enob;
    repeat (4) @(posedge clk);
    rst_n = 1'b1; en = 1'b1;
    // The first pattern converts code 0; sine samples start with the
    // second. Windows of exactly one pattern, back to back, each starting
    // when the pattern's first slot reaches the pin.
    @(posedge clk iff sample_load);
    @(posedge clk iff sample_load);
    @(posedge clk); #1;
    for (int k = 0; k < S; k++) begin
      int high;
      high = 0;
      for (int i = 0; i < PAT; i++) begin
        high += int'(ddpm_out);
        @(posedge clk); #1;
      end
      y[k] = real'(high) / real'(DIV);   // output in LSB
    end
    mean = 0.0;
    foreach (y[k]) mean += y[k];
    mean /= real'(S);
    re = 0.0; im = 0.0; p_tot = 0.0;
    foreach (y[k]) begin
      re += (y[k] - mean) * $cos(2.0 * PI * 2.0 * real'(k) / real'(S));
      im += (y[k] - mean) * $sin(2.0 * PI * 2.0 * real'(k) / real'(S));
      p_tot += (y[k] - mean) * (y[k] - mean);
    end
    amp    = 2.0 * $sqrt(re * re + im * im) / real'(S);
    p_fund = amp * amp / 2.0 * real'(S);
    sndr   = 10.0 * $log10(p_fund / (p_tot - p_fund));
    enob   = (sndr - 1.76) / 6.02;
    $display("mean %f LSB, amplitude %f LSB, SNDR %f dB, ENOB %f bit", mean, amp, sndr, enob);
    check(mean > 127.0 && mean < 129.0, "mid-scale offset");
    check(amp > 114.2 && amp < 116.2, "sine amplitude 0.9 * 128");
    check(sndr > 47.0, "SNDR of an 8-bit converter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((S + 3) * PAT) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
