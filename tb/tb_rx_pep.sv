// tb_rx_pep: packet error probability of the receive chain for RN16
// replies with Miller M=2 in white Gaussian noise.
//
// A behavioural tag sends RN16 replies (pilot of 4M cycles, preamble
// 010111, 16 random bits, dummy 1) at a BLF of 640 kHz (half period 79
// samples at 100 MS/s) with a random carrier phase and a DC offset. Complex
// Gaussian noise (Box-Muller from $urandom) is added to both ADC channels.
// For four noise levels it sends PACKETS replies and counts a packet error
// whenever the decoded bits or the bit count differ from the sent ones. It
// prints the packet energy to noise ratio Ep/N0 = (samples x A^2) / (2
// sigma^2) and the packet error rate for each level. Checks: no packet
// error at the highest ratio, an error rate that never falls as the noise
// grows, and errors at the lowest ratio (so that the sweep reaches the
// region where the decoder fails). The receiver is reset before each
// packet; a reply that is not finished 40 half periods after its end
// counts as an error.
//
// The measurement (RN16, M=2, packet error over packet energy to noise)
// follows the decoder evaluation of the reader description; the noise
// levels and packet count are this test's own choices.
module tb_rx_pep;
  import rfid_pkg::*;

  localparam int DBG_DEPTH = 1024;
  localparam int PACKETS = 25;
  localparam int A_HALF = 79;

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
  logic [9:0] sram_addr, h_addr;
  logic sram_we, h_req, h_we, h_ack;
  logic [35:0] sram_wdata, sram_rdata;
  logic [31:0] h_wdata, h_rdata;

  rfidrx #(.DBG_DEPTH(DBG_DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin
    #500_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  bit got_bits[$];
  always_ff @(posedge clk) begin
    if (rst_n && bit_valid) got_bits.push_back(bit_value);
  end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  int  lvl[$];
  bit  exp_bits[$];
  int  n_reply;

  task automatic build_rn16();
    bit bits[$];
    bit inv[$];
    int level;
    lvl.delete();
    exp_bits.delete();
    for (int i = 0; i < 3 * A_HALF + int'($urandom_range(200)); i++) lvl.push_back(0);
    bits = '{0, 1, 0, 1, 1, 1};
    for (int i = 0; i < 16; i++) bits.push_back(1'($urandom));
    bits.push_back(1'b1);
    foreach (bits[i]) exp_bits.push_back(bits[i]);
    for (int i = 0; i < 16; i++) inv.push_back(1'b0);       // pilot 4M cycles, M=2
    foreach (bits[i])
      for (int k = 0; k < 4; k++)
        inv.push_back((k == 0) ? (i > 0 && !bits[i] && !bits[i-1]) : (k == 2) ? bits[i] : 1'b0);
    level = 1;
    n_reply = 0;
    foreach (inv[k]) begin
      if (k > 0 && !inv[k]) level = -level;
      for (int j = 0; j < A_HALF; j++) begin
        lvl.push_back(level);
        n_reply++;
      end
    end
    for (int i = 0; i < 40 * A_HALF; i++) lvl.push_back(0);
  endtask

  initial begin
    real sigma_tab[4];
    real amp, phi, sigma, epn0;
    int  dc_i, dc_q, nerr;
    int  pe[4];
    sigma_tab = '{20.0, 300.0, 700.0, 1400.0};
    amp = 500.0;
    rcfg = '0; dcfg = '0;
    start_rx = 0; reset_rx = 0; dbg_start = 0; dbg_reset = 0; dbg_trigger = 0;
    tx_done = 0; adc_i = 0; adc_q = 0;
    h_req = 0; h_we = 0; h_addr = '0; h_wdata = '0; sram_rdata = '0;
    rcfg.m = 2'd1;
    rcfg.trext = 1'b0;
    rcfg.lencorripulse = 16'(A_HALF);
    rcfg.blf = 16'(2 * A_HALF);
    // threshold at half the expected correlation peak 2 a A
    rcfg.threshold = 26'(int'(amp * real'(A_HALF)));
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    foreach (sigma_tab[s]) begin
      sigma = sigma_tab[s];
      pe[s] = 0;
      for (int p = 0; p < PACKETS; p++) begin
        build_rn16();
        phi = real'($urandom_range(6283)) / 1000.0;
        dc_i = int'($urandom_range(2000)) - 1000;
        dc_q = int'($urandom_range(2000)) - 1000;
        @(posedge clk); reset_rx <= 1'b1;
        @(posedge clk); reset_rx <= 1'b0;
        got_bits.delete();
        @(posedge clk); start_rx <= 1'b1;
        @(posedge clk); start_rx <= 1'b0;
        foreach (lvl[k]) begin
          real si, sq;
          si = real'(dc_i) + amp * real'(lvl[k]) * $cos(phi) + sigma * gauss();
          sq = real'(dc_q) + amp * real'(lvl[k]) * $sin(phi) + sigma * gauss();
          if (si > 8191.0) si = 8191.0;
          if (si < -8192.0) si = -8192.0;
          if (sq > 8191.0) sq = 8191.0;
          if (sq < -8192.0) sq = -8192.0;
          adc_i <= 14'(int'(si));
          adc_q <= 14'(int'(sq));
          @(posedge clk);
        end
        nerr = 0;
        if (rx_busy || got_bits.size() != exp_bits.size()) nerr = 1;
        else foreach (exp_bits[i]) if (got_bits[i] != exp_bits[i]) nerr = 1;
        pe[s] += nerr;
      end
      epn0 = 10.0 * $log10(real'(n_reply) * amp * amp / (2.0 * sigma * sigma));
      $display("Ep/N0 %5.1f dB  (A %0.0f, sigma %0.0f): PER %0d/%0d", epn0, amp, sigma, pe[s], PACKETS);
    end
    check(pe[0] == 0, $sformatf("errors at the highest Ep/N0: %0d", pe[0]));
    for (int s = 1; s < 4; s++)
      check(pe[s] + 2 >= pe[s-1], $sformatf("error rate falls with more noise (%0d -> %0d)", pe[s-1], pe[s]));
    check(pe[3] > 0, "no errors even at the lowest Ep/N0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
