// tb_rx_decoder: self-checking test of the sub-symbol decoder on its own.
//
// Instead of a correlator the testbench synthesises the correlation
// magnitude directly: a triangle of height P and half-width a around every
// subcarrier edge of a Miller reply, none where the phase inverts, plus a
// little noise; the magnitude stream has random gaps (mag_valid low). For
// random Miller factors, TRext, BLF errors and payloads it checks the bits
// (strobes and BRAM words), bits_read, the BLF-period and power estimates,
// the threshold and done pulses, the correlator restart pulse, the edge
// reports, the stop on an interval the code does not allow, and the soft
// reset.
//
// The decoding rules checked follow the sub-symbol decoder description and
// the Miller code; the synthetic magnitude model is this test's own.
module tb_rx_decoder;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        trext;
  logic [1:0]  m_code;
  logic [25:0] threshold;
  logic [15:0] a_cfg;
  logic        start, soft_reset, busy, thr_hit, done, corr_restart;
  logic        mag_valid;
  logic [27:0] mag;
  logic [15:0] angle;
  logic [25:0] pwr_estimate;
  logic [15:0] blf_estimate, bits_read, edge_angle;
  logic        bit_valid, bit_value, edge_valid, wr_en;
  logic [31:0] edge_time, wr_data;
  logic [8:0]  wr_addr;

  rx_decoder dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin
    #100_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  bit got[$];
  logic [31:0] ram [512];
  int n_thr, n_done, n_restart, n_edges;
  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (bit_valid) got.push_back(bit_value);
      if (wr_en) ram[wr_addr] <= wr_data;
      if (thr_hit) n_thr++;
      if (done) n_done++;
      if (corr_restart) n_restart++;
      if (edge_valid) begin
        n_edges++;
        check(edge_angle == angle_of_edges, "edge angle");
      end
    end
  end
  logic [15:0] angle_of_edges;

  // magnitude model
  real edges[$];
  bit  exp_bits[$];

  task automatic build(int m, bit te, bit data[$], real a_true, real t0, bit bad_tail);
    bit b[$];
    bit inv[$];
    real t;
    edges.delete();
    exp_bits.delete();
    b = '{0, 1, 0, 1, 1, 1};
    foreach (data[i]) b.push_back(data[i]);
    b.push_back(1'b1);
    for (int i = 0; i < (te ? 16 : 4) * m * 2; i++) inv.push_back(1'b0);
    foreach (b[i]) begin
      for (int k = 0; k < 2 * m; k++) begin
        if (k == 0) inv.push_back(i > 0 && !b[i] && !b[i-1]);
        else if (k == m) inv.push_back(b[i]);
        else inv.push_back(1'b0);
      end
    end
    foreach (b[i]) exp_bits.push_back(b[i]);
    t = t0;
    foreach (inv[k]) begin
      if (!inv[k]) edges.push_back(t);
      t += a_true;
    end
    if (bad_tail) begin
      // an inversion after 5M boundaries of a steady pilot-like tone
      for (int k = 0; k < 12 * m; k++) begin
        edges.push_back(t);
        t += a_true;
      end
    end
  endtask

  function automatic int mag_at(real t, real a_true, int p);
    real best = 0.0;
    foreach (edges[i]) begin
      real d;
      d = t - edges[i];
      if (d < 0.0) d = -d;
      if (d < a_true) begin
        real v;
        v = real'(p) * (1.0 - d / a_true);
        if (v > best) best = v;
      end
    end
    return int'(best);
  endfunction

  task automatic run_stream(real a_true, int p, real t_end);
    int n;
    n = 0;
    while (real'(n) < t_end) begin
      if ($urandom_range(9) < 8) begin
        mag_valid <= 1'b1;
        mag <= 28'(mag_at(real'(n), a_true, p) + int'($urandom_range(p / 50)));
        n++;
      end else mag_valid <= 1'b0;
      @(posedge clk);
    end
    mag_valid <= 1'b0;
  endtask

  task automatic do_start();
    got.delete();
    n_thr = 0; n_done = 0; n_restart = 0; n_edges = 0;
    for (int i = 0; i < 512; i++) ram[i] = 32'hDEAD_BEEF;
    @(posedge clk); start <= 1'b1;
    @(posedge clk); start <= 1'b0;
    repeat (40) @(posedge clk);
  endtask

  initial begin
    bit data[$];
    int m, a, p, nd;
    real delta, a_true;
    bit te;
    trext = 0; m_code = 2'd1; threshold = '0; a_cfg = 16'd40;
    start = 0; soft_reset = 0; mag_valid = 0; mag = '0; angle = '0;
    angle_of_edges = 16'h1234;
    n_thr = 0; n_done = 0; n_restart = 0; n_edges = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);
    angle = 16'h1234;

    for (int run = 0; run < 10; run++) begin
      m  = 2 << $urandom_range(2);
      te = 1'($urandom);
      a  = 20 + int'($urandom_range(60));
      p  = 10000 + int'($urandom_range(500000));
      nd = 8 + int'($urandom_range(60));
      delta = (real'($urandom_range(100)) - 50.0) / 1000.0;
      a_true = real'(a) * (1.0 + delta);
      data.delete();
      for (int i = 0; i < nd; i++) data.push_back(1'($urandom));
      m_code = (m == 2) ? 2'd1 : (m == 4) ? 2'd2 : 2'd3;
      trext = te;
      a_cfg = 16'(a);
      threshold = 26'(p / 2);
      build(m, te, data, a_true, 200.0 + real'($urandom_range(100)), run == 3);
      do_start();
      check(n_restart == 1, "one correlator restart per start");
      check(busy, "busy after start");
      run_stream(a_true, p, edges[edges.size() - 1] + 20.0 * a_true);
      repeat (10) @(posedge clk);
      check(n_thr == 1, $sformatf("run %0d: %0d threshold pulses", run, n_thr));
      check(n_done == 1 && !busy, $sformatf("run %0d: done %0d busy %0d", run, n_done, busy));
      check(int'(bits_read) == exp_bits.size(),
            $sformatf("run %0d M=%0d: bits_read %0d expected %0d", run, m, bits_read, exp_bits.size()));
      if (got.size() == exp_bits.size()) begin
        int nerr = 0;
        foreach (exp_bits[i]) begin
          if (got[i] != exp_bits[i]) nerr++;
          if (ram[i / 32][31 - i % 32] != exp_bits[i]) nerr++;
        end
        check(nerr == 0, $sformatf("run %0d: %0d bit errors", run, nerr));
      end else check(0, $sformatf("run %0d: %0d bit strobes", run, got.size()));
      check(int'(blf_estimate) >= int'(2.0 * a_true) - 2 && int'(blf_estimate) <= int'(2.0 * a_true) + 2,
            $sformatf("run %0d: blf_estimate %0d true %0.1f", run, blf_estimate, 2.0 * a_true));
      check(int'(pwr_estimate) > p * 9 / 10 && int'(pwr_estimate) < p * 11 / 10,
            $sformatf("run %0d: pwr_estimate %0d peak %0d", run, pwr_estimate, p));
      check(n_edges > 8 * m, $sformatf("run %0d: %0d edges", run, n_edges));
    end

    // soft reset in the middle of a reply
    data.delete();
    for (int i = 0; i < 32; i++) data.push_back(1'($urandom));
    m_code = 2'd2; trext = 0; a_cfg = 16'd30; threshold = 26'd50000;
    build(4, 0, data, 30.0, 100.0, 0);
    do_start();
    fork
      run_stream(30.0, 100000, 2000.0);
      begin
        repeat (1500) @(posedge clk);
        soft_reset <= 1'b1;
        @(posedge clk);
        soft_reset <= 1'b0;
        repeat (3) @(posedge clk);
        check(!busy, "soft reset returns to idle");
      end
    join
    check(int'(bits_read) < exp_bits.size(), "soft reset stopped decoding early");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
