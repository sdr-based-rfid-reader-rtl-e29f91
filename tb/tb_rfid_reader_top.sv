// tb_rfid_reader_top: end-to-end test of the reader at its default size.
//
// The testbench plays the processor (register/memory bus), the clock chip
// (records the SPI words), the external SRAM (behavioural, two clocks read
// latency) and a tag. The tag listens to the DAC A output: it finds the PIE
// symbols from the rising edges of |DAC| above half the CW level, decodes
// delimiter, data-0, RTcal, TRcal and the command bits, and checks the CRC.
// It answers on the ADC pins with a Miller-4 subcarrier reply over a DC
// carrier leak. The inventory round:
//   1. Query (DSB-ASK, preamble, CRC-5) after switching the carrier on,
//      tag replies RN16, which the debug unit records (single record,
//      hardware trigger on the end of transmission);
//   2. ACK with the RN16 read back from bram_rx (frame-sync, no CRC), tag
//      replies PC+EPC+CRC-16;
//   3. the recorded RN16 reply is played back (single playback, trigger on the
//      receiver start) and decoded a second time from the SRAM;
//   4. Req_RN with PR-ASK (CRC-16 appended automatically);
//   5. host access to the SRAM while idle and refused while busy.
// Each mechanism is counted and must happen at least once.
//
// The register programming and the command sequence follow the reader's
// driver flow; the tag model, the PIE timings and the tolerances are this
// test's own choices.
module tb_rfid_reader_top;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic ext_rst_n = 1'b0;

  logic h_req, h_we, h_ack;
  logic [1:0]  h_sel;
  logic [19:0] h_addr;
  logic [31:0] h_wdata, h_rdata;
  logic irq_tx_done, irq_rx_done, irq_rx_start, rst_n_user;
  logic dcm_adc_locked, dcm_adc_reset;
  logic spi_sclk, spi_mosi, spi_cs_n, spi_miso;
  logic cpu_spi_sclk, cpu_spi_mosi, cpu_spi_cs_n, cpu_spi_miso;
  logic [13:0] adc_a, adc_b;
  logic [15:0] dac_a, dac_b;
  logic rf_carrier_on;
  logic [17:0] sram_addr;
  logic sram_we;
  logic [35:0] sram_wdata, sram_rdata;
  logic edge_valid, bit_valid, bit_value;
  logic [31:0] edge_time;
  logic [15:0] edge_angle;

  rfid_reader_top dut (.*);

  // ---------------------------------------------------------------- SRAM
  logic [35:0] sram [262144];
  logic [35:0] rd1;
  always_ff @(posedge clk) begin
    if (sram_we) sram[sram_addr] <= sram_wdata;
    rd1 <= sram[sram_addr];
    sram_rdata <= rd1;
  end

  // ------------------------------------------------------------ checking
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin
    #60_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // mechanism counters
  int n_spi_cfg, n_spi_pass, n_settle, n_preamble, n_fsync, n_crc5, n_crc16;
  int n_dsb, n_prask, n_thr, n_blf, n_decode, n_edges, n_stop, n_rec, n_play;
  int n_ram_idle, n_ram_busy, n_regs;

  // ------------------------------------------------------ clock chip SPI
  logic [23:0] spi_sr;
  int          spi_bits;
  logic [23:0] spi_words[$];
  logic        sclk_q;
  always @(posedge clk) begin
    sclk_q <= spi_sclk;
    if (rst_n_user === 1'b0 && ext_rst_n) begin
      if (spi_cs_n) begin
        if (spi_bits == 24) spi_words.push_back(spi_sr);
        spi_bits = 0;
      end else if (spi_sclk && !sclk_q) begin
        spi_sr = {spi_sr[22:0], spi_mosi};
        spi_bits++;
      end
    end
  end

  // ------------------------------------------------------------ processor
  task automatic bus_write(logic [1:0] sel, logic [19:0] addr, logic [31:0] data);
    @(posedge clk);
    h_req <= 1'b1; h_we <= 1'b1; h_sel <= sel; h_addr <= addr; h_wdata <= data;
    @(posedge clk);
    h_req <= 1'b0; h_we <= 1'b0;
    while (!h_ack) @(posedge clk);
  endtask

  task automatic bus_read(logic [1:0] sel, logic [19:0] addr, output logic [31:0] data);
    @(posedge clk);
    h_req <= 1'b1; h_we <= 1'b0; h_sel <= sel; h_addr <= addr;
    @(posedge clk);
    h_req <= 1'b0;
    while (!h_ack) @(posedge clk);
    data = h_rdata;
  endtask

  localparam logic [19:0] A_ADC_DCM = 20'h00, A_TX1 = 20'h04, A_TX2 = 20'h08,
    A_TX3 = 20'h0C, A_TX4 = 20'h10, A_TX5 = 20'h14, A_DBGC = 20'h1C,
    A_DBGN = 20'h20, A_DBGD = 20'h24, A_RX1 = 20'h28, A_RX2 = 20'h2C,
    A_RX3 = 20'h30, A_RX4 = 20'h34;

  // Reader timing (0.5 us ticks): Tari 25 us, data-1 45 us, PW 12.5 us,
  // RTcal 70 us, TRcal 140 us -> BLF 152 kHz with DR = 64/3, half period
  // TRcal * 100 MHz / (2 DR) = 328 samples.
  localparam int TARI = 50, TONE = 90, PW = 25, RTCAL = 140, TRCAL = 280;
  localparam int A_HALF = 328;          // half BLF period in 10 ns samples
  localparam int TXPWR = 4000;
  localparam int CW = (TXPWR * 447512) >>> 16;

  // --------------------------------------------------------- tag: listen
  int  rise_t[$];          // rising edges of |DAC| during a frame
  int  fall_t[$];
  bit  above, neg_seen;
  int  cyc;
  always @(posedge clk) begin
    int v;
    cyc <= cyc + 1;
    v = $signed(dac_a);
    if (v < 0) v = -v;
    if (rst_n_user) begin
      if (above && v < CW / 2) begin
        above <= 1'b0;
        fall_t.push_back(cyc);
      end else if (!above && v > CW / 2) begin
        above <= 1'b1;
        rise_t.push_back(cyc);
      end
      if ($signed(dac_a) < -CW / 2) neg_seen <= 1'b1;
    end
  end

  function automatic logic [4:0] crc5_of(bit b[$], int n);
    logic [4:0] c = 5'b01001;
    for (int i = 0; i < n; i++) begin
      logic fb;
      fb = c[4] ^ b[i];
      c = {c[3:0], 1'b0} ^ (fb ? 5'b01001 : 5'b0);
    end
    return c;
  endfunction

  function automatic logic [15:0] crc16_of(bit b[$], int n);
    logic [15:0] c = 16'hFFFF;
    for (int i = 0; i < n; i++) begin
      logic fb;
      fb = c[15] ^ b[i];
      c = {c[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0);
    end
    return ~c;
  endfunction

  function automatic bit same_bits(bit x[$], bit y[$]);
    if (x.size() != y.size()) return 1'b0;
    foreach (x[i]) if (x[i] != y[i]) return 1'b0;
    return 1'b1;
  endfunction

  // decode the frame captured so far; returns the command bits
  task automatic tag_decode(output bit pre, output bit bits[$]);
    int d;
    int k;
    int pivot;
    bits.delete();
    pre = 1'b0;
    // a rise before the delimiter is the carrier coming on
    while (rise_t.size() > 0 && fall_t.size() > 0 && rise_t[0] < fall_t[0]) void'(rise_t.pop_front());
    check(rise_t.size() >= 3 && fall_t.size() >= 3, "frame has symbols");
    if (rise_t.size() < 3 || fall_t.size() < 3) return;
    // delimiter: first low time, 12.5 us
    d = rise_t[0] - fall_t[0];
    check(d > 1250 - 150 && d < 1250 + 150, $sformatf("delimiter %0d clocks", d));
    d = rise_t[1] - rise_t[0];
    check(d > TARI * 50 - 150 && d < TARI * 50 + 150, $sformatf("data-0 %0d clocks", d));
    d = rise_t[2] - rise_t[1];
    check(d > RTCAL * 50 - 150 && d < RTCAL * 50 + 150, $sformatf("RTcal %0d clocks", d));
    pivot = d / 2;
    k = 3;
    if (rise_t.size() > 3 && rise_t[3] - rise_t[2] > d + d / 20) begin
      pre = 1'b1;
      check(rise_t[3] - rise_t[2] > TRCAL * 50 - 150 && rise_t[3] - rise_t[2] < TRCAL * 50 + 150,
            "TRcal length");
      k = 4;
    end
    for (int i = k; i < rise_t.size(); i++) bits.push_back((rise_t[i] - rise_t[i-1]) > pivot);
  endtask

  // -------------------------------------------------------- tag: answer
  int  dc_i = 600, dc_q = -400;
  real amp = 1000.0, phi = 0.9;

  task automatic tag_reply(bit data[$]);
    bit b[$];
    bit inv[$];
    int level;
    b = '{0, 1, 0, 1, 1, 1};
    foreach (data[i]) b.push_back(data[i]);
    b.push_back(1'b1);
    for (int i = 0; i < 4 * 4 * 2; i++) inv.push_back(1'b0);     // pilot, M=4
    foreach (b[i]) begin
      for (int k = 0; k < 8; k++) begin
        if (k == 0) inv.push_back(i > 0 && !b[i] && !b[i-1]);
        else if (k == 4) inv.push_back(b[i]);
        else inv.push_back(1'b0);
      end
    end
    level = 1;
    foreach (inv[k]) begin
      if (k > 0 && !inv[k]) level = -level;
      for (int s = 0; s < A_HALF; s++) begin
        adc_a <= 14'(dc_i + int'(amp * real'(level) * $cos(phi)) + int'($urandom_range(16)) - 8);
        adc_b <= 14'(dc_q + int'(amp * real'(level) * $sin(phi)) + int'($urandom_range(16)) - 8);
        @(posedge clk);
      end
    end
    adc_a <= 14'(dc_i);
    adc_b <= 14'(dc_q);
  endtask

  // ------------------------------------------------------- reader helpers
  task automatic load_cmd(bit bits[$]);
    logic [31:0] w;
    for (int wi = 0; wi * 32 < bits.size(); wi++) begin
      w = '0;
      for (int i = 0; i < 32 && wi * 32 + i < bits.size(); i++) w[31 - i] = bits[wi * 32 + i];
      bus_write(2'd1, 20'(wi * 4), w);
    end
  endtask

  // txconf1: start, modulation, pwr_on, crc auto, preamble auto, length
  task automatic send_cmd(bit bits[$], bit prask);
    rise_t.delete();
    fall_t.delete();
    neg_seen = 1'b0;
    load_cmd(bits);
    bus_write(2'd0, A_TX1, (32'(bits.size()) << 16) | (32'(prask) << 10) | (1 << 11) | (1 << 9));
    @(posedge irq_tx_done);
    repeat (3000) @(posedge clk);     // the pulse shaping delays the DAC by ~13 us
  endtask

  task automatic start_rx();
    // rxconf1: start, M=4, threshold = a * A
    bus_write(2'd0, A_RX1, (32'(A_HALF * 1000) << 6) | (2 << 4) | (1 << 2));
  endtask

  function automatic bit [15:0] bits_to_u16(bit b[$], int off);
    bit [15:0] v = '0;
    for (int i = 0; i < 16; i++) v[15 - i] = b[off + i];
    return v;
  endfunction

  // check the receiver status and bram_rx against the expected reply
  task automatic check_rx(bit data[$], string tag);
    logic [31:0] r;
    bit exp[$];
    int nerr;
    exp = '{0, 1, 0, 1, 1, 1};
    foreach (data[i]) exp.push_back(data[i]);
    exp.push_back(1'b1);
    bus_read(2'd0, A_RX3, r);
    check(r[5] == 1'b0, $sformatf("%s: receiver idle", tag));
    check(r[31:6] > 26'(2 * A_HALF * 1000 * 85 / 100) && r[31:6] < 26'(2 * A_HALF * 1000 * 115 / 100),
          $sformatf("%s: power estimate %0d", tag, r[31:6]));
    bus_read(2'd0, A_RX4, r);
    check(int'(r[15:0]) == exp.size(), $sformatf("%s: bits read %0d, expected %0d", tag, r[15:0], exp.size()));
    if (r[31:16] >= 16'(2 * A_HALF - 2) && r[31:16] <= 16'(2 * A_HALF + 2)) n_blf++;
    else check(0, $sformatf("%s: BLF estimate %0d", tag, r[31:16]));
    nerr = 0;
    for (int wi = 0; wi * 32 < exp.size(); wi++) begin
      bus_read(2'd2, 20'(wi * 4), r);
      for (int i = 0; i < 32 && wi * 32 + i < exp.size(); i++)
        if (r[31 - i] != exp[wi * 32 + i]) nerr++;
    end
    if (nerr == 0) n_decode++;
    else check(0, $sformatf("%s: %0d bits differ in bram_rx", tag, nerr));
  endtask

  int edge_cnt;
  always @(posedge clk) begin
    if (rst_n_user && edge_valid) edge_cnt <= edge_cnt + 1;
    if (rst_n_user && irq_rx_start) n_thr <= n_thr + 1;
    if (rst_n_user && irq_rx_done) n_stop <= n_stop + 1;
  end

  // ------------------------------------------------------------- sequence
  initial begin
    bit cmd[$];
    bit got[$];
    bit pre;
    bit rn16[$];
    bit epc[$];
    logic [31:0] r;
    int t0;
    logic [15:0] crc;

    h_req = 0; h_we = 0; h_sel = 0; h_addr = 0; h_wdata = 0;
    dcm_adc_locked = 1'b1; spi_miso = 1'b0;
    cpu_spi_sclk = 1'b0; cpu_spi_mosi = 1'b0; cpu_spi_cs_n = 1'b1;
    adc_a = 14'(dc_i); adc_b = 14'(dc_q);
    for (int i = 0; i < 262144; i++) sram[i] = '0;
    rd1 = '0; sram_rdata = '0; sclk_q = 1'b0; spi_sr = '0; spi_bits = 0;
    above = 1'b0; neg_seen = 1'b0; cyc = 0; edge_cnt = 0;
    n_spi_cfg = 0; n_spi_pass = 0; n_settle = 0; n_preamble = 0; n_fsync = 0;
    n_crc5 = 0; n_crc16 = 0; n_dsb = 0; n_prask = 0; n_thr = 0; n_blf = 0;
    n_decode = 0; n_edges = 0; n_stop = 0; n_rec = 0; n_play = 0;
    n_ram_idle = 0; n_ram_busy = 0; n_regs = 0;
    repeat (10) @(posedge clk);
    ext_rst_n = 1'b1;

    // ---- start-up: clock chip configured, then the user logic leaves reset
    wait (rst_n_user);
    check(spi_words.size() == 2, $sformatf("%0d SPI words", spi_words.size()));
    if (spi_words.size() == 2 && spi_words[0] == 24'h004980 && spi_words[1] == 24'h005A01) n_spi_cfg++;
    else check(0, "SPI configuration words");
    cpu_spi_sclk = 1'b1; cpu_spi_mosi = 1'b1; cpu_spi_cs_n = 1'b0; spi_miso = 1'b1;
    #1;
    if (spi_sclk && spi_mosi && !spi_cs_n && cpu_spi_miso) n_spi_pass++;
    else check(0, "SPI handed to the processor");
    cpu_spi_sclk = 1'b0; cpu_spi_cs_n = 1'b1;
    repeat (5) @(posedge clk);

    // ---- registers
    bus_read(2'd0, A_ADC_DCM, r);
    check(r[7:0] == 8'h01 && r[30], $sformatf("version/locked %h", r));
    bus_write(2'd0, A_TX2, (32'(TARI) << 16) | 32'(TONE));
    bus_write(2'd0, A_TX3, (32'(RTCAL) << 16) | 32'(TRCAL));
    bus_write(2'd0, A_TX4, (32'(PW) << 16) | 32'(TXPWR));
    bus_write(2'd0, A_TX5, 32'h0);
    bus_write(2'd0, A_RX2, (32'(2 * A_HALF) << 16) | 32'(A_HALF));
    bus_read(2'd0, A_TX3, r);
    if (r == ((32'(RTCAL) << 16) | 32'(TRCAL))) n_regs++;
    else check(0, "txconf3 read back");
    bus_read(2'd0, A_RX2, r);
    if (r == ((32'(2 * A_HALF) << 16) | 32'(A_HALF))) n_regs++;
    else check(0, "rxconf2 read back");

    // record the reply: single record, trigger on end of transmission
    bus_write(2'd3, 20'h10, 32'h1234_5678);   // something to hide
    bus_write(2'd0, A_DBGC, (32'd1 << 16) | (32'b0001 << 8) | (32'd2 << 6) | (1 << 5));
    bus_read(2'd0, A_DBGC, r);
    check(r[1] && r[2], $sformatf("debug waiting for trigger %h", r));
    // access to the SRAM is refused while the debug unit is busy
    bus_read(2'd3, 20'h10, r);
    if (r == 32'd0) n_ram_busy++;
    else check(0, $sformatf("SRAM read while busy gave %h", r));

    // ---- 1. Query: 1000 DR=1 M=10 TRext=0 Sel=00 S=00 T=0 Q=0100
    cmd = '{1,0,0,0, 1, 1,0, 0, 0,0, 0,0, 0, 0,1,0,0};
    t0 = cyc;
    send_cmd(cmd, 1'b0);
    // carrier settle: first delimiter at least 1500 us after power on
    check(fall_t.size() > 0, "Query frame seen");
    if (fall_t.size() > 0 && fall_t[0] - t0 >= 150000) n_settle++;
    else check(0, "carrier settle time");
    tag_decode(pre, got);
    if (pre) n_preamble++;
    else check(0, "Query has no preamble");
    if (!neg_seen) n_dsb++;
    check(got.size() == cmd.size() + 5, $sformatf("Query: %0d bits", got.size()));
    if (got.size() == cmd.size() + 5 && crc5_of(got, got.size()) == 5'd0) n_crc5++;
    else check(0, "Query CRC-5");
    // tag answers with an RN16
    for (int i = 0; i < 16; i++) rn16.push_back(1'($urandom));
    start_rx();
    repeat (3000) @(posedge clk);
    tag_reply(rn16);
    repeat (3000) @(posedge clk);
    check_rx(rn16, "RN16");

    // ---- 2. ACK with the RN16 from bram_rx (driver: word0 >> 10)
    bus_read(2'd2, 20'h0, r);
    check(16'(r >> 10) == bits_to_u16(rn16, 0), $sformatf("RN16 %h from bram_rx", 16'(r >> 10)));
    cmd = '{0, 1};
    for (int i = 0; i < 16; i++) cmd.push_back(r[25 - i]);
    send_cmd(cmd, 1'b0);
    tag_decode(pre, got);
    if (!pre) n_fsync++;
    else check(0, "ACK sent with a preamble");
    check(got.size() == cmd.size(), $sformatf("ACK: %0d bits (no CRC)", got.size()));
    check(same_bits(got, cmd), "ACK bits");
    // PC + EPC-96 + CRC-16
    for (int i = 0; i < 112; i++) epc.push_back(1'($urandom));
    crc = crc16_of(epc, epc.size());
    for (int i = 15; i >= 0; i--) epc.push_back(crc[i]);
    start_rx();
    repeat (3000) @(posedge clk);
    tag_reply(epc);
    repeat (3000) @(posedge clk);
    check_rx(epc, "EPC");
    // the recording ended long ago
    bus_read(2'd0, A_DBGC, r);
    check(!r[2], "recording finished");
    bus_read(2'd0, A_DBGN, r);
    if (r[17:0] == 18'h3FFFF) n_rec++;
    else check(0, $sformatf("record counter %h", r[17:0]));

    // ---- 3. replay the recording into the decoder
    bus_write(2'd2, 20'h0, 32'hFFFF_FFFF);   // clear the first bram_rx words
    bus_write(2'd2, 20'h4, 32'hFFFF_FFFF);
    bus_write(2'd0, A_DBGD, 32'h0);
    bus_write(2'd0, A_DBGC, (32'd1 << 16) | (32'b0010 << 8) | (32'd3 << 6) | (1 << 5));
    start_rx();
    repeat (10) @(posedge clk);
    bus_read(2'd0, A_DBGC, r);
    check(r[2] && !r[1], $sformatf("debug playing %h", r));
    do begin
      bus_read(2'd0, A_DBGC, r);
      repeat (1000) @(posedge clk);
    end while (r[2]);
    repeat (1000) @(posedge clk);
    n_decode = 0;
    check_rx(rn16, "replayed RN16");
    if (n_decode > 0) n_play++;

    // ---- 4. Req_RN with PR-ASK: 11000001 RN16 (+ CRC-16 appended)
    cmd = '{1,1,0,0,0,0,0,1};
    foreach (rn16[i]) cmd.push_back(rn16[i]);
    send_cmd(cmd, 1'b1);
    if (neg_seen) n_prask++;
    else check(0, "no negative levels with PR-ASK");
    tag_decode(pre, got);
    check(!pre, "Req_RN with frame-sync");
    check(got.size() == cmd.size() + 16, $sformatf("Req_RN: %0d bits", got.size()));
    if (got.size() == cmd.size() + 16) begin
      crc = crc16_of(got, cmd.size());
      if (bits_to_u16(got, cmd.size()) == crc) n_crc16++;
      else check(0, "Req_RN CRC-16");
    end

    // ---- 5. SRAM host access while idle
    bus_write(2'd3, 20'h40, 32'hA5A5_1234);
    bus_read(2'd3, 20'h40, r);
    if (r == 32'hA5A5_1234) n_ram_idle++;
    else check(0, $sformatf("SRAM read back %h", r));

    // switch the carrier off
    bus_write(2'd0, A_TX1, 32'h0);
    repeat (100) @(posedge clk);
    check(!rf_carrier_on, "carrier off");
    n_edges = edge_cnt;

    // ---- every mechanism seen
    check(n_spi_cfg > 0,  "mechanism: clock chip configuration");
    check(n_spi_pass > 0, "mechanism: SPI pass-through");
    check(n_regs > 0,     "mechanism: register read back");
    check(n_settle > 0,   "mechanism: carrier settle time");
    check(n_preamble > 0, "mechanism: preamble");
    check(n_fsync > 0,    "mechanism: frame-sync");
    check(n_crc5 > 0,     "mechanism: CRC-5");
    check(n_crc16 > 0,    "mechanism: CRC-16");
    check(n_dsb > 0,      "mechanism: DSB-ASK");
    check(n_prask > 0,    "mechanism: PR-ASK");
    check(n_thr > 0,      "mechanism: reply threshold");
    check(n_blf > 0,      "mechanism: BLF estimate");
    check(n_decode > 0,   "mechanism: Miller decode");
    check(n_stop > 0,     "mechanism: end of reply");
    check(n_edges > 0,    "mechanism: edge reports");
    check(n_rec > 0,      "mechanism: debug record");
    check(n_play > 0,     "mechanism: debug playback");
    check(n_ram_busy > 0, "mechanism: SRAM locked while busy");
    check(n_ram_idle > 0, "mechanism: SRAM host access");
    $display("mechanisms: spi %0d/%0d regs %0d settle %0d pre %0d fs %0d crc5 %0d crc16 %0d dsb %0d prask %0d thr %0d blf %0d dec %0d stop %0d edges %0d rec %0d play %0d ram %0d/%0d",
             n_spi_cfg, n_spi_pass, n_regs, n_settle, n_preamble, n_fsync, n_crc5, n_crc16,
             n_dsb, n_prask, n_thr, n_blf, n_decode, n_stop, n_edges, n_rec, n_play,
             n_ram_busy, n_ram_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
