// tb_pie_encoder: self-checking test of the PIE transmit state machine.
//
// A BRAM model holds the command bits. For each test frame the testbench
// builds the expected sequence of (level, ticks) runs from the frame rules
// (delimiter, data-0, RTcal, TRcal for a Preamble, data bits, CRC bits with a
// checksum computed here by long division) and compares it with the
// run-length encoded samples the encoder produces. It also measures the
// carrier settle time (3000 ticks) and the minimum off time (2000 ticks).
// Frames: Query (automatic Preamble + CRC-5), ACK (Frame-Sync, no CRC),
// Req_RN (CRC-16), a forced Preamble/CRC-16 frame and a PR-ASK frame.
//
// The frame structure and carrier timing checked here follow the reader
// description and the EPC air interface; the tick values are this test's own.
module tb_pie_encoder;
  import rfid_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0, start = 1'b0;
  tx_cfg_t cfg;
  logic busy, carrier_on, sample_valid;
  logic [8:0] rd_addr;
  logic [31:0] rd_data;
  logic signed [15:0] sample;
  logic [31:0] mem [512];
  int checks = 0, failures = 0;
  int tick = 0;

  pie_encoder dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) rd_data <= mem[rd_addr];
  // 2 MHz tick every 4 clocks
  int div = 0;
  always_ff @(posedge clk) begin
    div <= (div == 3) ? 0 : div + 1;
    ce  <= (div == 3);
    if (ce) tick <= tick + 1;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
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

  // ---------------------------------------------------------- reference
  int exp_lvl[$], exp_len[$];
  function automatic void add_run(int lvl, int len);
    if (len <= 0) return;
    if (exp_lvl.size() > 0 && exp_lvl[$] == lvl) exp_len[$] += len;
    else begin exp_lvl.push_back(lvl); exp_len.push_back(len); end
  endfunction

  function automatic logic [15:0] div16(input logic msg[$]);
    logic [15:0] r = 16'hFFFF;
    foreach (msg[i]) begin
      logic t = r[15]; r = r << 1; if (t != msg[i]) r ^= 16'h1021;
    end
    return ~r;
  endfunction
  function automatic logic [4:0] div5(input logic msg[$]);
    logic [4:0] r = 5'h09;
    foreach (msg[i]) begin
      logic t = r[4]; r = r << 1; if (t != msg[i]) r ^= 5'h09;
    end
    return r;
  endfunction

  // build the expected frame; crc: 0 none, 5, 16
  function automatic void build(input int nbits, input bit pre, input int crc, input bit pr);
    logic msg[$];
    int sign = 1, a = cfg.txpwr;
    int syms[$];
    exp_lvl.delete(); exp_len.delete();
    for (int i = 0; i < nbits; i++) msg.push_back(mem[i/32][31 - (i%32)]);
    syms.push_back(cfg.tari); syms.push_back(cfg.rtcal);
    if (pre) syms.push_back(cfg.trcal);
    foreach (msg[i]) syms.push_back(msg[i] ? cfg.tone : cfg.tari);
    if (crc == 5)  begin logic [4:0]  c = div5(msg);  for (int b = 4; b >= 0; b--)  syms.push_back(c[b] ? cfg.tone : cfg.tari); end
    if (crc == 16) begin logic [15:0] c = div16(msg); for (int b = 15; b >= 0; b--) syms.push_back(c[b] ? cfg.tone : cfg.tari); end
    add_run(0, 25);
    if (pr) sign = -sign;
    foreach (syms[i]) begin
      add_run(sign * a, syms[i] - cfg.pw);
      add_run(0, cfg.pw);
      if (pr) sign = -sign;
    end
  endfunction

  // capture one frame and compare
  task automatic run_frame(input string name);
    int got_lvl[$], got_len[$];
    bit seen_low = 0;
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    wait (busy);
    while (busy) begin
      @(posedge clk);
      if (sample_valid) begin
        int v = sample;
        if (v == 0) seen_low = 1;
        if (seen_low) begin
          if (got_lvl.size() > 0 && got_lvl[$] == v) got_len[$]++;
          else begin got_lvl.push_back(v); got_len.push_back(1); end
        end
      end
    end
    // the run after the last low pulse is CW and open ended
    repeat (12) @(posedge clk);
    if (got_lvl.size() > 0 && got_lvl[$] != 0) begin void'(got_lvl.pop_back()); void'(got_len.pop_back()); end
    check({name, " run count"}, got_lvl.size(), exp_lvl.size());
    for (int i = 0; i < exp_lvl.size() && i < got_lvl.size(); i++) begin
      check({name, " level"}, got_lvl[i], exp_lvl[i]);
      check({name, " ticks"}, got_len[i], exp_len[i]);
    end
  endtask

  initial begin
    int t0;
    cfg = '0;
    cfg.tari = 16'd8; cfg.tone = 16'd14; cfg.rtcal = 16'd22; cfg.trcal = 16'd40;
    cfg.pw = 16'd4; cfg.txpwr = 16'sd1000; cfg.crc = CRC_AUTO; cfg.preamble = PRE_AUTO0;
    foreach (mem[i]) mem[i] = $urandom;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (8) @(posedge clk);
    check("off: no carrier", carrier_on, 0);
    // ---- power on: busy for 1500 us
    @(negedge clk); cfg.pwr_on = 1'b1;
    wait (busy); t0 = tick;
    wait (!busy);
    check("settle ticks (+-1)", (tick - t0 >= 2999 && tick - t0 <= 3001), 1);
    repeat (8) @(posedge clk);
    check("CW level", sample, 1000);
    // ---- Query, 17 bits: automatic Preamble + CRC-5
    mem[0] = {4'b1000, 1'b0, 2'b01, 1'b0, 2'b00, 2'b00, 1'b0, 4'd3, 15'h0};
    cfg.length = 14'd17;
    build(17, 1, 5, 0); run_frame("query");
    // ---- ACK, 18 bits: Frame-Sync, no CRC
    mem[0] = {2'b01, 16'hBEEF, 14'h0};
    cfg.length = 14'd18;
    build(18, 0, 0, 0); run_frame("ack");
    // ---- Req_RN 8+16 bits: CRC-16, Frame-Sync
    mem[0] = {8'b1100_0001, 16'h1234, 8'h0};
    cfg.length = 14'd24;
    build(24, 0, 16, 0); run_frame("req_rn");
    // ---- forced Preamble + CRC-16 over 40 random bits spanning two words
    mem[0] = $urandom; mem[1] = $urandom;
    cfg.length = 14'd40; cfg.crc = CRC_16; cfg.preamble = PRE_PREAMBLE;
    build(40, 1, 16, 0); run_frame("forced");
    // ---- PR-ASK, QueryRep with forced no CRC, Frame-Sync
    mem[0] = {4'b0000, 28'h0};
    cfg.length = 14'd4; cfg.crc = CRC_NONE; cfg.preamble = PRE_FSYNC; cfg.modulation = 1'b1;
    build(4, 0, 0, 1); run_frame("pr-ask");
    cfg.modulation = 1'b0;
    // ---- carrier off, then straight back on: 1 ms off + 1500 us settle
    @(negedge clk); cfg.pwr_on = 1'b0;
    repeat (12) @(posedge clk);
    check("carrier off", carrier_on, 0);
    check("off sample", sample, 0);
    t0 = tick;
    @(negedge clk); cfg.pwr_on = 1'b1;
    wait (carrier_on);
    check("off time (+-2)", (tick - t0 >= 1998 && tick - t0 <= 2002), 1);
    wait (!busy);
    check("off+settle (+-3)", (tick - t0 >= 4997 && tick - t0 <= 5003), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
