// tb_cic_interp: self-checking test of the CIC interpolator.
//
// Feeds one sample every 50 clocks. The reference is the textbook equivalent
// of an N=3, R=50 CIC interpolator: the zero-stuffed input convolved with
// three length-50 boxcars, divided by 2500 (rounded multiply by 26844/2^26).
// Every output clock is compared, at the latency the header states
// (5 clocks from nd). Also checks that a constant input comes out unchanged.
//
// The rate change (x50) follows the reader description; the reference
// model, the stimulus and the tolerances are this test's own.
module tb_cic_interp;
  logic clk = 1'b0, rst_n = 1'b0, nd = 1'b0;
  logic signed [15:0] din = '0, dout;
  int checks = 0, failures = 0;
  longint h [148];
  longint u [$];   // zero-stuffed input, one entry per clock
  int cyc = 0, errs = 0;

  cic_interp dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (errs++ < 10) $display("FAIL %s @%0d: got %0d expected %0d", what, cyc, got, exp);
    end
  endtask

  function automatic longint ref_at(int n);
    longint s = 0;
    for (int k = 0; k < 148; k++) if (n - k >= 0 && n - k < u.size()) s += h[k] * u[n-k];
    s = (s * 26844) >>> 26;
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    return s;
  endfunction

  // stimulus: one value every 50 clocks, recorded zero-stuffed at its nd clock
  int val [$];
  initial begin
    longint b [50];
    longint t [99];
    foreach (b[i]) b[i] = 1;
    foreach (t[i]) t[i] = 0;
    foreach (h[i]) h[i] = 0;
    for (int i = 0; i < 50; i++) for (int j = 0; j < 50; j++) t[i+j] += 1;
    for (int i = 0; i < 99; i++) for (int j = 0; j < 50; j++) h[i+j] += t[i];
    for (int i = 0; i < 20; i++) val.push_back(1000);
    for (int i = 0; i < 60; i++) val.push_back($urandom_range(0, 40000) - 20000);
    for (int i = 0; i < 20; i++) val.push_back(-3000);
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < val.size(); i++) begin
      for (int c = 0; c < 50; c++) begin
        @(negedge clk);
        nd  = (c == 0);
        din = 16'(val[i]);
        u.push_back((c == 0) ? val[i] : 0);
        cyc++;
        // output for the sample entered 5 clocks ago
        if (u.size() > 5) check("cic output", dout, ref_at(u.size() - 6));
        if (i == 19 && c == 49) check("dc 1000", dout, 1000);
      end
    end
    check("dc -3000 (within 1 LSB)", (dout >= -3001 && dout <= -2999), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
