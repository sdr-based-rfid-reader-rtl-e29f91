// tb_rfiduhf: self-checking test of the reader user logic at bus level.
//
// Reduced sizes (debug memory 1024 words, short carrier settle time) with a
// behavioural SRAM. Checks: every request is acknowledged exactly once;
// random write/read-back of bram_tx, bram_rx, registers and the debug SRAM
// through the host bus; the DAC offsets reach their outputs; a short
// Select-like frame (frame-sync, no CRC) is sent: carrier on, the
// transmit samples dip during the pulses, busy is visible in txconf1, the
// tx_done pulse comes once at the end; the receiver start/reset bits drive
// busy_rx in rxconf3; an SRAM access is refused (reads 0) while the debug
// unit waits for a trigger.
//
// The memory map follows the reader description; the reduced sizes and
// the frame parameters are this test's own choices.
module tb_rfiduhf;
  import rfid_pkg::*;

  localparam int DBG_DEPTH = 1024;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic h_req, h_we, h_ack;
  logic [1:0] h_sel;
  logic [19:0] h_addr;
  logic [31:0] h_wdata, h_rdata;
  logic dcm_adc_locked, dcm_adc_reset;
  logic signed [13:0] adc_i, adc_q;
  logic signed [15:0] tx_sample, daca_offset, dacb_offset;
  logic carrier_on;
  logic [9:0] sram_addr;
  logic sram_we;
  logic [35:0] sram_wdata, sram_rdata;
  logic tx_done, rx_done, rx_thr_hit, edge_valid, bit_valid, bit_value;
  logic [31:0] edge_time;
  logic [15:0] edge_angle;

  rfiduhf #(.ON_SETTLE_TICKS(200), .OFF_MIN_TICKS(100), .DBG_DEPTH(DBG_DEPTH)) dut (.*);

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
    #50_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  int n_ack, n_req, n_txdone;
  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (h_ack) n_ack++;
      if (h_req) n_req++;
      if (tx_done) n_txdone++;
    end
  end

  task automatic bus(bit we, logic [1:0] sel, logic [19:0] a, logic [31:0] d, output logic [31:0] q);
    @(posedge clk);
    h_req <= 1'b1; h_we <= we; h_sel <= sel; h_addr <= a; h_wdata <= d;
    @(posedge clk);
    h_req <= 1'b0;
    #1;
    while (!h_ack) begin
      @(posedge clk);
      #1;
    end
    q = h_rdata;
  endtask

  initial begin
    logic [31:0] q;
    logic [31:0] mem [4][16];
    logic [19:0] ad [4][16];
    int t_on, min_s, max_s;
    h_req = 0; h_we = 0; h_sel = 0; h_addr = '0; h_wdata = '0;
    dcm_adc_locked = 1; adc_i = '0; adc_q = '0; rd1 = '0; sram_rdata = '0;
    n_ack = 0; n_req = 0; n_txdone = 0;
    for (int i = 0; i < DBG_DEPTH; i++) sram[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // memories: bram_tx, bram_rx, ram_debug
    for (int s = 1; s < 4; s++)
      for (int i = 0; i < 16; i++) begin
        ad[s][i] = (s == 3) ? 20'({$urandom_range(DBG_DEPTH - 1), 2'b00})
                            : 20'({8'(i * 13 + s), 2'b00});
        mem[s][i] = $urandom;
        bus(1, 2'(s), ad[s][i], mem[s][i], q);
      end
    for (int s = 1; s < 4; s++)
      for (int i = 0; i < 16; i++) begin
        logic [31:0] e;
        e = mem[s][i];
        for (int j = i + 1; j < 16; j++) if (ad[s][j] == ad[s][i]) e = mem[s][j];
        bus(0, 2'(s), ad[s][i], 0, q);
        check(q == e, $sformatf("region %0d addr %h: %h expected %h", s, ad[s][i], q, e));
      end

    // registers and offsets
    bus(0, 0, 20'h00, 0, q);
    check(q[7:0] == 8'h01 && q[30], "version and DCM locked");
    bus(1, 0, 20'h14, 32'h0123_FF00, q);
    repeat (2) @(posedge clk);
    check(daca_offset == 16'sh0123 && dacb_offset == -16'sh0100, "DAC offsets");

    // a short frame: 8 bits 1010_0110, frame-sync, no CRC, DSB-ASK
    bus(1, 1, 20'h0, 32'hA600_0000, q);
    bus(1, 0, 20'h08, {16'd25, 16'd45}, q);    // tari 12.5 us, data-1 22.5 us
    bus(1, 0, 20'h0C, {16'd70, 16'd140}, q);   // rtcal, trcal
    bus(1, 0, 20'h10, {16'd25, 16'h4000}, q);  // pw, txpwr
    bus(1, 0, 20'h04, 32'd8 << 16 | 32'h0800 | 32'h0200 | (32'(PRE_FSYNC) << 14), q);
    repeat (5) @(posedge clk);
    bus(0, 0, 20'h04, 0, q);
    check(q[8], "busy_tx visible");
    t_on = 0; min_s = 32767; max_s = -32768;
    while (n_txdone == 0 && t_on < 2_000_000) begin
      @(posedge clk);
      t_on++;
      if (carrier_on && t_on > 11_000) begin
        if (int'(tx_sample) < min_s) min_s = int'(tx_sample);
        if (int'(tx_sample) > max_s) max_s = int'(tx_sample);
      end
    end
    check(n_txdone == 1, "tx_done after the frame");
    check(carrier_on, "carrier stays on");
    check(max_s > 8000 && min_s < max_s / 2, $sformatf("transmit envelope %0d..%0d", min_s, max_s));
    repeat (100) @(posedge clk);
    check(n_txdone == 1, "one tx_done only");

    // receiver start / reset
    bus(1, 0, 20'h2C, 32'd40, q);
    bus(1, 0, 20'h28, {26'd1000000, 2'd2, 1'b0, 3'b100}, q);
    repeat (4) @(posedge clk);
    bus(0, 0, 20'h30, 0, q);
    check(q[5], "busy_rx after start_rx");
    bus(1, 0, 20'h28, {26'd1000000, 2'd2, 1'b0, 3'b010}, q);
    repeat (4) @(posedge clk);
    bus(0, 0, 20'h30, 0, q);
    check(!q[5], "reset_rx clears busy_rx");

    // SRAM refused while the debug unit waits for a trigger
    bus(1, 0, 20'h1C, {16'd1, 4'd0, 4'b0000, 2'(DBG_SINGLE_RECORD), 6'b100000}, q);
    repeat (3) @(posedge clk);
    bus(0, 0, 20'h1C, 0, q);
    check(q[1] && q[2], "debug waiting and busy");
    bus(0, 3, ad[3][0], 0, q);
    check(q == 0, "SRAM read refused while busy");
    bus(1, 0, 20'h1C, {16'd1, 4'd0, 4'b0000, 2'(DBG_SINGLE_RECORD), 6'b010000}, q);
    repeat (3) @(posedge clk);
    bus(0, 0, 20'h1C, 0, q);
    check(!q[2], "debug reset");

    repeat (4) @(posedge clk);
    check(n_ack == n_req, $sformatf("%0d requests %0d acks", n_req, n_ack));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
