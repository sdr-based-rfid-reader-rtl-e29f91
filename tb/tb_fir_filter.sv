// tb_fir_filter: self-checking test of the reloadable pulse-shaping FIR.
//
// Drives random 16-bit samples every 50 clocks (100 MHz / 2 MS/s) and compares
// each output with a direct convolution computed here, first with the
// default triangular coefficient set, then after a reload of random
// coefficients through coef_ld / coef_we. Checks the output latency
// (27 clocks for 51 taps on two multipliers), saturation, and the full-scale
// relation txpwr = 2^31 / sum(coefficients) with txpwr = 4800.
//
// Tap count, reload procedure and the txpwr relation follow the register
// description; the reference convolution is this test's own.
module tb_fir_filter;
  logic clk = 1'b0, rst_n = 1'b0, nd = 1'b0, coef_ld = 1'b0, coef_we = 1'b0, rdy;
  logic signed [15:0] din = '0, coef_din = '0, dout;
  int checks = 0, failures = 0;
  int c_ref [51];
  int x_hist [51];
  longint expq[$];
  int lat_q[$];
  int cyc = 0;

  fir_filter dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint ref_out();
    longint s = 0;
    for (int k = 0; k < 51; k++) s += longint'(x_hist[k]) * c_ref[k];
    s = s >>> 16;
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    return s;
  endfunction

  // output monitor
  always @(posedge clk) if (rdy) begin
    automatic longint e = expq.pop_front();
    automatic int l = lat_q.pop_front();
    check("fir output", dout, e);
    check("latency", cyc - l, 27);
  end

  task automatic push(input int v);
    @(negedge clk);
    din = 16'(v); nd = 1'b1;
    for (int k = 50; k > 0; k--) x_hist[k] = x_hist[k-1];
    x_hist[0] = v;
    expq.push_back(ref_out());
    lat_q.push_back(cyc + 1);
    @(negedge clk); nd = 1'b0;
    repeat (48) @(negedge clk);
  endtask

  initial begin
    int sum = 0;
    for (int k = 0; k < 51; k++) begin
      c_ref[k] = 662 * (26 - ((k > 25) ? k - 25 : 25 - k));
      sum += c_ref[k];
      x_hist[k] = 0;
    end
    check("2^31/sum == 4800", (64'd1 << 31) / sum, 4798);
    repeat (3) @(posedge clk); rst_n = 1'b1;
    // step response at the documented txpwr level: settles near full scale
    repeat (60) push(4800);
    check("full-scale step", dout > 32000, 1);
    for (int i = 0; i < 150; i++) push($urandom_range(0, 65535) - 32768);
    // reload random coefficients
    @(negedge clk); coef_ld = 1'b1; @(negedge clk); coef_ld = 1'b0;
    for (int k = 0; k < 51; k++) begin
      c_ref[k] = $urandom_range(0, 4095) - 2048;
      @(negedge clk); coef_we = 1'b1; coef_din = 16'(c_ref[k]);
      @(negedge clk); coef_we = 1'b0;
    end
    for (int i = 0; i < 150; i++) push($urandom_range(0, 65535) - 32768);
    repeat (40) @(posedge clk);
    check("all outputs seen", expq.size(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
