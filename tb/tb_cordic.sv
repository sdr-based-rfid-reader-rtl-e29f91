// tb_cordic: self-checking test of the vectoring CORDIC.
//
// Feeds random vectors in all four quadrants, one per clock, and compares
// the magnitude with sqrt(x^2 + y^2) (to 0.01 % plus 4 LSB) and the angle
// with atan2(y, x) in 2^16-per-turn units (to 8 units), at the stated
// latency of ITER + 2 = 18 clocks.
//
// The reference values are plain math; the tolerances are this test's own
// choice.
module tb_cordic;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [27:0] x_in = '0, y_in = '0;
  logic out_valid;
  logic [27:0] mag;
  logic [15:0] angle;
  int checks = 0, failures = 0, errs = 0;
  real em[$], ea[$];
  longint cyc = 0, tq[$];

  cordic dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok, input real got, input real exp);
    checks++;
    if (!ok) begin
      failures++;
      if (errs++ < 10) $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  always @(posedge clk) if (out_valid) begin
    automatic real m = em.pop_front();
    automatic real an = ea.pop_front();
    automatic real d;
    automatic longint t = tq.pop_front();
    check("latency", cyc - t == 18, cyc - t, 18);
    check("magnitude", (mag - m < m * 1e-4 + 4) && (m - mag < m * 1e-4 + 4), mag, m);
    d = real'(angle) - an;
    if (d > 32768) d -= 65536;
    if (d < -32768) d += 65536;
    check("angle", d < 8 && d > -8, angle, an);
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      automatic int sc = (i < 1000) ? 50000 : 30000000;
      automatic int xv = $urandom_range(0, 2 * sc) - sc;
      automatic int yv = $urandom_range(0, 2 * sc) - sc;
      automatic real an;
      @(negedge clk);
      in_valid = 1'b1; x_in = 28'(xv); y_in = 28'(yv);
      em.push_back($sqrt(real'(xv) * xv + real'(yv) * yv));
      an = $atan2(real'(yv), real'(xv)) / (2.0 * 3.14159265358979) * 65536.0;
      if (an < 0) an += 65536.0;
      ea.push_back(an);
      tq.push_back(cyc);
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (30) @(negedge clk);
    check("all outputs", em.size() == 0, em.size(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
