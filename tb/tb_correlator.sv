// tb_correlator: self-checking test of the recursive square-wave correlator.
//
// Drives random I/Q samples (with gaps in in_valid, as with the sampling
// divider of the debug unit) and compares every output with a brute-force
// sum over the last 2a samples computed here: the older a samples count +1,
// the newer a samples -1. Checks that `warm` rises with exactly the 2a-th
// sample and that the output is exact from then on, for several half periods
// a, including a restart with a new a, and the 3-clock latency.
//
// The recursion under test follows the reader description; the brute-force
// reference and the stimulus are this test's own.
module tb_correlator;
  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0, in_valid = 1'b0;
  logic [15:0] a = 16'd8;
  logic signed [13:0] i_in = '0, q_in = '0;
  logic out_valid, warm;
  logic signed [27:0] corr_i, corr_q;
  int checks = 0, failures = 0, errs = 0;
  int xi[$], xq[$];
  int lat_ok = 1;
  longint cyc = 0, tin[$];

  correlator dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (errs++ < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // output monitor: k-th output belongs to the k-th sample since restart
  int nout = 0;
  always @(posedge clk) if (out_valid && rst_n) begin
    automatic int k = nout;
    automatic int aa = int'(a);
    automatic longint si = 0, sq = 0;
    nout <= nout + 1;
    check("latency", cyc - tin[k], 3);
    check("warm flag", warm, (k + 1 >= 2 * aa));
    if (k + 1 >= 2 * aa) begin
      for (int j = k - 2*aa + 1; j <= k; j++) begin
        if (j <= k - aa) begin si += xi[j]; sq += xq[j]; end
        else begin si -= xi[j]; sq -= xq[j]; end
      end
      check("corr I", corr_i, si);
      check("corr Q", corr_q, sq);
    end
  end

  task automatic run(input int aa, input int nsamp);
    @(negedge clk); a = 16'(aa); restart = 1'b1;
    @(negedge clk); restart = 1'b0;
    repeat (4) @(negedge clk);
    xi.delete(); xq.delete(); tin.delete(); nout = 0;
    for (int s = 0; s < nsamp; s++) begin
      @(negedge clk);
      in_valid = 1'b1;
      i_in = 14'($urandom_range(0, 16383) - 8192);
      q_in = 14'($urandom_range(0, 16383) - 8192);
      xi.push_back(i_in); xq.push_back(q_in); tin.push_back(cyc);
      if ($urandom_range(0, 3) == 0) begin @(negedge clk); in_valid = 1'b0; end
      @(negedge clk); in_valid = 1'b0;
    end
    repeat (6) @(negedge clk);
    check("outputs per run", nout, nsamp);
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1'b1;
    run(8, 100);
    run(1, 20);
    run(37, 300);
    run(79, 500);     // half period at 640 kHz BLF
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
