// tb_rfidtx: self-checking test of the complete transmit chain.
//
// Sends a Query with the timing of a typical inventory (Tari 25 us, data-1
// 50 us, PW 12.5 us, RTcal 75 us, TRcal 160 us) and looks at the 100 MS/s
// DAC samples the way a tag's envelope detector would: it thresholds them at
// half the carrier level and measures the time between falling edges. The
// expected intervals follow from the PIE rules and a CRC-5 computed here.
// Also checks the carrier level (txpwr * sum of the default coefficients /
// 2^16), the 1500 us settle time at the 100 MHz clock, and that the filters
// keep the carrier off at 0.
//
// The chain under test follows the reader description; the envelope
// measures and limits are this test's own.
module tb_rfidtx;
  import rfid_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  tx_cfg_t cfg;
  logic busy, carrier_on, coef_ld = 1'b0, coef_we = 1'b0;
  logic signed [15:0] coef_din = '0, dac;
  logic [8:0] rd_addr;
  logic [31:0] rd_data, mem [512];
  int checks = 0, failures = 0;
  longint cyc = 0;

  rfidtx dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin rd_data <= mem[rd_addr]; cyc <= cyc + 1; end

  initial begin : watchdog
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp, input longint tol = 0);
    checks++;
    if (got < exp - tol || got > exp + tol) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (+-%0d)", what, got, exp, tol);
    end
  endtask

  function automatic logic [4:0] div5(input logic msg[$]);
    logic [4:0] r = 5'h09;
    foreach (msg[i]) begin
      logic t = r[4]; r = r << 1; if (t != msg[i]) r ^= 5'h09;
    end
    return r;
  endfunction

  initial begin
    longint t0, falls[$];
    logic msg[$];
    int exp_int[$];
    int cw;
    logic was_low;
    cfg = '0;
    cfg.tari = 16'd50; cfg.tone = 16'd100; cfg.pw = 16'd25;
    cfg.rtcal = 16'd150; cfg.trcal = 16'd320; cfg.txpwr = 16'sd4000;
    cfg.length = 14'd17;
    mem[0] = {4'b1000, 1'b0, 2'b01, 1'b0, 2'b00, 2'b00, 1'b0, 4'd0, 15'h0};
    repeat (3) @(posedge clk); rst_n = 1'b1;
    repeat (200) @(posedge clk);
    check("carrier off level", dac, 0);
    @(negedge clk); cfg.pwr_on = 1'b1; t0 = cyc;
    wait (busy); wait (!busy);
    check("settle time in clocks", cyc - t0, 150000, 150);
    repeat (3000) @(posedge clk);
    cw = (4000 * 447512) >>> 16;
    check("carrier level", dac, cw, 2);
    // expected falling-edge intervals in 0.5 us ticks
    for (int i = 0; i < 17; i++) msg.push_back(mem[0][31-i]);
    exp_int.push_back(25 + 50 - 25);            // delimiter + high part of data-0
    exp_int.push_back(150); exp_int.push_back(320);
    foreach (msg[i]) exp_int.push_back(msg[i] ? 100 : 50);
    begin
      automatic logic [4:0] c = div5(msg);
      for (int b = 4; b >= 0; b--) exp_int.push_back(c[b] ? 100 : 50);
    end
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    was_low = 1'b0;
    wait (busy);
    while (busy || falls.size() < exp_int.size() + 1) begin
      @(posedge clk);
      if (!was_low && dac < cw / 2) falls.push_back(cyc);
      was_low = (dac < cw / 2);
      if (cyc > 590000) break;
    end
    check("low pulses seen", falls.size(), exp_int.size() + 1);
    for (int i = 0; i < exp_int.size() && i + 1 < falls.size(); i++)
      check("falling-edge interval (clocks)", falls[i+1] - falls[i], exp_int[i] * 50, 150);
    repeat (5000) @(posedge clk);
    check("carrier back after frame", dac, cw, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
