// tb_rfidrx: self-checking test of the receive chain with synthetic tag
// replies.
//
// A behavioural tag model builds Miller-modulated subcarrier replies (pilot
// of 4M or 16M cycles, preamble 010111, random data, dummy 1) with a random
// Miller factor, random BLF error of up to +-10 %, random I/Q phase, a DC
// carrier leak and a little noise, and feeds them as ADC samples. The
// test checks every decoded bit and the bram_rx contents against the sent
// bits, the bit count, the BLF and power estimates, the spacing of the
// reported sub-symbol edges, and that the decoder stops by itself after the
// reply. Two fixed runs take the ends of the EPC BLF range: 640 kHz
// (a = 79) and 40 kHz (a = 1250, 5 % off). A last run records a reply with the debug unit (single record,
// divider 1) into a behavioural SRAM and plays it back into the decoder.
//
// The Miller reply structure follows the EPC air interface; the tag model,
// the noise and the tolerances are this test's own choices.
module tb_rfidrx;
  import rfid_pkg::*;

  localparam int DBG_DEPTH = 4096 * 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  rx_cfg_t  rcfg;
  dbg_cfg_t dcfg;
  logic start_rx, reset_rx, dbg_start, dbg_reset, dbg_trigger, tx_done;
  logic signed [ADC_W-1:0] adc_i, adc_q;
  logic rx_busy, rx_done, rx_thr_hit, bit_valid, bit_value, edge_valid, wr_en;
  logic [25:0] pwr_estimate;
  logic [15:0] blf_estimate, bits_read, edge_angle;
  logic [31:0] edge_time, wr_data;
  logic [8:0]  wr_addr;
  logic dbg_waittrigger, dbg_busy;
  logic [17:0] dbg_countervalue;
  logic [16:0] sram_addr, h_addr;
  logic sram_we, h_req, h_we, h_ack;
  logic [35:0] sram_wdata, sram_rdata;
  logic [31:0] h_wdata, h_rdata;

  rfidrx #(.DBG_DEPTH(DBG_DEPTH)) dut (.*);

  // behavioural pipelined SRAM, two clocks read latency
  logic [35:0] sram [DBG_DEPTH];
  logic [35:0] rd1;
  always_ff @(posedge clk) begin
    if (sram_we) sram[sram_addr] <= sram_wdata;
    rd1 <= sram[sram_addr];
    sram_rdata <= rd1;
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin
    #200_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // ------------------------------------------------ captured decoder output
  bit exp_bits[$];
  bit got_bits[$];
  logic [31:0] ram_rx [512];
  int edges[$];
  int n_thr, n_done;
  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (bit_valid) got_bits.push_back(bit_value);
      if (wr_en) ram_rx[wr_addr] <= wr_data;
      if (edge_valid) edges.push_back(int'(edge_time));
      if (rx_thr_hit) n_thr++;
      if (rx_done) n_done++;
    end
  end

  // ----------------------------------------------------- tag reply model
  int   lvl[$];          // subcarrier level per sample: +1, -1 or 0
  real  amp;
  real  phi;
  int   dc_i, dc_q;

  task automatic build_reply(int m, bit trext, int ndata, real a_true, int lead);
    bit bits[$];
    bit inv[$];          // per half period: inverted at its start
    int pilot_h;
    int level;
    int h;
    real t;
    lvl.delete();
    exp_bits.delete();
    for (int i = 0; i < lead; i++) lvl.push_back(0);
    bits = '{0, 1, 0, 1, 1, 1};
    for (int i = 0; i < ndata; i++) bits.push_back(1'($urandom));
    bits.push_back(1'b1);
    foreach (bits[i]) exp_bits.push_back(bits[i]);
    pilot_h = (trext ? 16 : 4) * m * 2;
    for (int i = 0; i < pilot_h; i++) inv.push_back(1'b0);
    foreach (bits[i]) begin
      for (int k = 0; k < 2 * m; k++) begin
        if (k == 0) inv.push_back(i > 0 && !bits[i] && !bits[i-1]);
        else if (k == m) inv.push_back(bits[i]);
        else inv.push_back(1'b0);
      end
    end
    level = 1;
    t = 0.0;
    h = 0;
    foreach (inv[k]) begin
      int n_end;
      if (k > 0 && !inv[k]) level = -level;
      t += a_true;
      n_end = int'(t);
      while (h < n_end) begin
        lvl.push_back(level);
        h++;
      end
    end
    for (int i = 0; i < 40 * int'(a_true) + 400; i++) lvl.push_back(0);
  endtask

  task automatic play_reply();
    foreach (lvl[k]) begin
      real s;
      s = amp * real'(lvl[k]);
      adc_i <= 14'(dc_i + int'(s * $cos(phi)) + int'($urandom_range(20)) - 10);
      adc_q <= 14'(dc_q + int'(s * $sin(phi)) + int'($urandom_range(20)) - 10);
      @(posedge clk);
    end
  endtask

  task automatic check_reply(int a_true_x10, string tag);
    int nerr;
    int tol;
    int nb;
    tol = 40 + 2 * ((a_true_x10 > 10 * int'(rcfg.lencorripulse)) ?
                    a_true_x10 - 10 * int'(rcfg.lencorripulse) :
                    10 * int'(rcfg.lencorripulse) - a_true_x10);
    check(n_thr == 1, $sformatf("%s: threshold hits %0d", tag, n_thr));
    check(n_done == 1, $sformatf("%s: done pulses %0d", tag, n_done));
    check(!rx_busy, $sformatf("%s: decoder still busy", tag));
    check(int'(bits_read) == exp_bits.size(),
          $sformatf("%s: bits_read %0d expected %0d", tag, bits_read, exp_bits.size()));
    check(got_bits.size() == exp_bits.size(),
          $sformatf("%s: %0d bit strobes", tag, got_bits.size()));
    nerr = 0;
    nb = (got_bits.size() < exp_bits.size()) ? got_bits.size() : exp_bits.size();
    for (int i = 0; i < nb; i++) begin
      if (got_bits[i] != exp_bits[i]) nerr++;
      if (ram_rx[i / 32][31 - (i % 32)] != exp_bits[i]) nerr++;
    end
    check(nerr == 0, $sformatf("%s: %0d bit errors", tag, nerr));
    // BLF period estimate within 2.5 samples of the true period
    // (plus a share of the peak flattening when the kernel length is off)
    check((int'(blf_estimate) * 10 - 2 * a_true_x10) <= 25 + tol / 2 &&
          (2 * a_true_x10 - int'(blf_estimate) * 10) <= 25 + tol / 2,
          $sformatf("%s: blf_estimate %0d true %0d/10", tag, blf_estimate, 2 * a_true_x10));
    // edges half or one BLF period apart
    nerr = 0;
    // (the kernel length a is not retuned, so a BLF error flattens the
    // peaks by |a - a_true| samples; the first edge comes from the
    // threshold window and is not checked)
    for (int i = 2; i < edges.size(); i++) begin
      int dd;
      dd = (edges[i] - edges[i-1]) * 10;
      if (!((dd > a_true_x10 - tol && dd < a_true_x10 + tol) ||
            (dd > 2 * a_true_x10 - tol && dd < 2 * a_true_x10 + tol))) begin
        nerr++;
        if (nerr < 4) $display("  edge %0d spacing %0d/10", i, dd);
      end
    end
    check(edges.size() > 20 && nerr == 0,
          $sformatf("%s: %0d edges, %0d bad spacings", tag, edges.size(), nerr));
  endtask

  task automatic clear_capture();
    got_bits.delete();
    edges.delete();
    n_thr = 0;
    n_done = 0;
    for (int i = 0; i < 512; i++) ram_rx[i] = 32'hDEAD_BEEF;
  endtask

  task automatic start_decoder();
    @(posedge clk);
    start_rx <= 1'b1;
    @(posedge clk);
    start_rx <= 1'b0;
    repeat (50) @(posedge clk);
  endtask

  initial begin
    int a, m, nd;
    real delta, a_true;
    bit te;
    rcfg = '0; dcfg = '0;
    start_rx = 0; reset_rx = 0; dbg_start = 0; dbg_reset = 0; dbg_trigger = 0;
    tx_done = 0; adc_i = 0; adc_q = 0;
    h_req = 0; h_we = 0; h_addr = '0; h_wdata = '0;
    for (int i = 0; i < DBG_DEPTH; i++) sram[i] = '0;
    rd1 = '0; sram_rdata = '0;
    n_thr = 0; n_done = 0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    for (int run = 0; run < 9; run++) begin
      m  = 2 << $urandom_range(2);            // 2, 4 or 8
      te = 1'($urandom);
      a  = 40 + int'($urandom_range(60));
      nd = 16 + int'($urandom_range(48));
      delta  = (real'($urandom_range(200)) - 100.0) / 1000.0;
      if (run == 0) delta = 0.0;
      // the two ends of the EPC BLF range: 640 kHz (a = 79), 40 kHz (a = 1250)
      if (run == 7) begin m = 2; te = 0; a = 79; nd = 16; end
      if (run == 8) begin m = 2; te = 0; a = 1250; nd = 16; delta = 0.05; end
      a_true = real'(a) * (1.0 + delta);
      amp    = 300.0 + real'($urandom_range(1500));
      phi    = real'($urandom_range(6283)) / 1000.0;
      dc_i   = int'($urandom_range(4000)) - 2000;
      dc_q   = int'($urandom_range(4000)) - 2000;
      rcfg.m = (m == 2) ? 2'd1 : (m == 4) ? 2'd2 : 2'd3;
      rcfg.trext = te;
      rcfg.lencorripulse = 16'(a);
      rcfg.blf = 16'(2 * a);
      rcfg.threshold = 26'(int'(amp * real'(a)));
      clear_capture();
      build_reply(m, te, nd, a_true, 3 * a + int'($urandom_range(500)));
      adc_i <= 14'(dc_i); adc_q <= 14'(dc_q);
      start_decoder();
      play_reply();
      repeat (100) @(posedge clk);
      check_reply(int'(a_true * 10.0), $sformatf("run %0d M=%0d a=%0d d=%0.3f", run, m, a, delta));
      // power estimate: peak correlation magnitude 2 a A (within 15 %)
      check(real'(pwr_estimate) > 2.0 * a_true * amp * 0.85 &&
            real'(pwr_estimate) < 2.0 * a_true * amp * 1.15,
            $sformatf("run %0d: pwr_estimate %0d, expected about %0.0f", run, pwr_estimate,
                      2.0 * a_true * amp));
    end

    // ------------------------------------------- soft reset stops decoding
    clear_capture();
    start_decoder();
    check(rx_busy, "decoder busy after start");
    reset_rx <= 1'b1;
    @(posedge clk);
    reset_rx <= 1'b0;
    repeat (3) @(posedge clk);
    check(!rx_busy, "soft reset ends decoding");

    // --------------------------------- record with the debug unit, replay
    m = 4; a = 50; nd = 32;
    rcfg.m = 2'd2; rcfg.trext = 1'b0; rcfg.lencorripulse = 16'(a);
    amp = 1000.0; phi = 0.7; dc_i = 500; dc_q = -300;
    rcfg.threshold = 26'(int'(amp * real'(a)));
    build_reply(m, 1'b0, nd, 50.0, 200);
    check(lvl.size() < DBG_DEPTH, "recording fits the debug memory");
    dcfg.mode = DBG_SINGLE_RECORD;
    dcfg.clk_div = 16'd1;
    dcfg.trigger_mask = 4'b0001;      // end of transmission
    @(posedge clk); dbg_start <= 1'b1; @(posedge clk); dbg_start <= 1'b0;
    @(posedge clk);
    check(dbg_waittrigger, "debug unit waits for its trigger");
    tx_done <= 1'b1; @(posedge clk); tx_done <= 1'b0;
    clear_capture();
    play_reply();
    wait (!dbg_busy);
    @(posedge clk);
    check(int'(dbg_countervalue) == DBG_DEPTH - 1, $sformatf("counter %0d", dbg_countervalue));
    // live decoding of the same reply happened while recording? (not started)
    check(n_thr == 0, "decoder idle during recording");
    // replay: the input is now silent, the decoder sees only the recording
    adc_i <= 0; adc_q <= 0;
    dcfg.mode = DBG_SINGLE_PLAY;
    dcfg.trigger_mask = 4'b0010;      // start of the receiver
    dcfg.adca_default = 14'd0;
    dcfg.adcb_default = 14'd0;
    @(posedge clk); dbg_start <= 1'b1; @(posedge clk); dbg_start <= 1'b0;
    repeat (5) @(posedge clk);
    start_rx <= 1'b1; @(posedge clk); start_rx <= 1'b0;
    wait (!dbg_busy);
    repeat (100) @(posedge clk);
    check_reply(500, "playback");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
