// tb_rfiduhf_regs: self-checking test of the processor register block.
//
// A shadow model holds the value of every read/write field. Random writes
// to random offsets (all fourteen registers plus unused ones) are followed
// by reads, and the read data is compared with the shadow under each
// register's read/write mask. The decoded outputs (transmit, receive and
// debug configuration, DAC offsets, coefficient data) are compared field by
// field with the shadow. Status inputs are randomised and must appear in
// the read-only fields. Every self-clearing bit must give exactly one
// one-clock pulse per write of 1, and the start_tx bit must read back as 1
// until busy_tx is seen and as 0 afterwards.
//
// The field positions checked follow the register tables; the random
// access pattern is this test's own.
module tb_rfiduhf_regs;
  import rfid_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic wr, rd;
  logic [7:0] addr;
  logic [31:0] wdata, rdata;
  logic dcm_adc_locked, dcm_adc_reset;
  tx_cfg_t tx_cfg;
  logic start_tx, busy_tx, coef_we, coef_ld;
  logic signed [15:0] daca_offset, dacb_offset, coef_din;
  dbg_cfg_t dbg_cfg;
  logic dbg_trigger, dbg_reset, dbg_start, dbg_waittrigger, dbg_busy;
  logic [17:0] dbg_countervalue;
  rx_cfg_t rx_cfg;
  logic reset_rx, start_rx, busy_rx;
  logic [25:0] pwr_estimate;
  logic [15:0] bits_read, blf_estimate;

  rfiduhf_regs dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin
    #10_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // pulse counters: dcm_reset, start_tx, coef_we, coef_ld, trigger, reset,
  // start, reset_rx, start_rx
  int pc[9];
  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (dcm_adc_reset) pc[0]++;
      if (start_tx)      pc[1]++;
      if (coef_we)       pc[2]++;
      if (coef_ld)       pc[3]++;
      if (dbg_trigger)   pc[4]++;
      if (dbg_reset)     pc[5]++;
      if (dbg_start)     pc[6]++;
      if (reset_rx)      pc[7]++;
      if (start_rx)      pc[8]++;
    end
  end

  logic [31:0] shadow [14];
  function automatic logic [31:0] rw_mask(int idx);
    unique case (idx)
      1:  return 32'h3FFF_FC00;
      2, 3, 4, 5, 11: return 32'hFFFF_FFFF;
      7:  return 32'hFFFF_0FC0;
      9:  return 32'hFFFF_FFF0;
      10: return 32'hFFFF_FFF8;
      default: return 32'h0;
    endcase
  endfunction

  task automatic bus_write(logic [7:0] a, logic [31:0] d);
    @(posedge clk); wr <= 1'b1; addr <= a; wdata <= d;
    @(posedge clk); wr <= 1'b0;
  endtask
  task automatic bus_read(logic [7:0] a, output logic [31:0] q);
    @(posedge clk); rd <= 1'b1; addr <= a;
    @(posedge clk); rd <= 1'b0;
    #1 q = rdata;
  endtask

  task automatic check_outputs();
    check(tx_cfg.modulation == shadow[1][10] && tx_cfg.pwr_on == shadow[1][11] &&
          tx_cfg.crc == crc_mode_e'(shadow[1][13:12]) && tx_cfg.preamble == pre_mode_e'(shadow[1][15:14]) &&
          tx_cfg.length == shadow[1][29:16], "txconf1 fields");
    check(tx_cfg.tone == shadow[2][15:0] && tx_cfg.tari == shadow[2][31:16], "txconf2 fields");
    check(tx_cfg.trcal == shadow[3][15:0] && tx_cfg.rtcal == shadow[3][31:16], "txconf3 fields");
    check(tx_cfg.txpwr == shadow[4][15:0] && tx_cfg.pw == shadow[4][31:16], "txconf4 fields");
    check(dacb_offset == shadow[5][15:0] && daca_offset == shadow[5][31:16], "txconf5 fields");
    check(dbg_cfg.mode == dbg_mode_e'(shadow[7][7:6]) && dbg_cfg.trigger_mask == shadow[7][11:8] &&
          dbg_cfg.clk_div == shadow[7][31:16], "rxdebug_conf fields");
    check(dbg_cfg.adca_default == shadow[9][17:4] && dbg_cfg.adcb_default == shadow[9][31:18],
          "rxdebug_default fields");
    check(rx_cfg.trext == shadow[10][3] && rx_cfg.m == shadow[10][5:4] &&
          rx_cfg.threshold == shadow[10][31:6], "rxconf1 fields");
    check(rx_cfg.lencorripulse == shadow[11][15:0] && rx_cfg.blf == shadow[11][31:16], "rxconf2 fields");
  endtask

  initial begin
    logic [31:0] q, d, st;
    int exp_pc[9];
    wr = 0; rd = 0; addr = '0; wdata = '0;
    dcm_adc_locked = 0; busy_tx = 0; dbg_waittrigger = 0; dbg_busy = 0; dbg_countervalue = '0;
    busy_rx = 0; pwr_estimate = '0; bits_read = '0; blf_estimate = '0;
    foreach (pc[i]) begin pc[i] = 0; exp_pc[i] = 0; end
    foreach (shadow[i]) shadow[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    bus_read(8'h00, q);
    check(q == 32'h0000_0001, $sformatf("version register %h", q));

    for (int it = 0; it < 3000; it++) begin
      int idx;
      logic [7:0] a;
      idx = $urandom_range(15);
      a = 8'(idx * 4);
      d = $urandom;
      if (idx == 1) d[9] = 1'b0;       // start_tx tested separately
      // status inputs
      dcm_adc_locked <= 1'($urandom); dbg_waittrigger <= 1'($urandom); dbg_busy <= 1'($urandom);
      dbg_countervalue <= 18'($urandom); busy_rx <= 1'($urandom); pwr_estimate <= 26'($urandom);
      bits_read <= 16'($urandom); blf_estimate <= 16'($urandom);
      bus_write(a, d);
      if (idx < 14) shadow[idx] = d & rw_mask(idx);
      unique case (idx)
        0:  if (d[31]) exp_pc[0]++;
        6:  begin if (d[16]) exp_pc[2]++; if (d[17]) exp_pc[3]++; end
        7:  begin if (d[3]) exp_pc[4]++; if (d[4]) exp_pc[5]++; if (d[5]) exp_pc[6]++; end
        10: begin if (d[1]) exp_pc[7]++; if (d[2]) exp_pc[8]++; end
        default: ;
      endcase
      #1 if (idx == 6) check(coef_din == d[15:0], "coefficient data");
      idx = $urandom_range(15);
      a = 8'(idx * 4);
      bus_read(a, q);
      unique case (idx)
        0:  st = {1'b0, dcm_adc_locked, 22'd0, 8'h01};
        7:  st = {29'd0, dbg_busy, dbg_waittrigger, 1'b0};
        8:  st = {14'd0, dbg_countervalue};
        12: st = {pwr_estimate, busy_rx, 5'd0};
        13: st = {blf_estimate, bits_read};
        default: st = '0;
      endcase
      if (idx < 14) check(q == ((shadow[idx] & rw_mask(idx)) | st),
                          $sformatf("read %02h = %h expected %h", a, q, (shadow[idx] & rw_mask(idx)) | st));
      else check(q == 0, "unused offset reads 0");
      if (it % 50 == 0) check_outputs();
    end
    check_outputs();
    repeat (2) @(posedge clk);
    foreach (pc[i]) check(pc[i] == exp_pc[i], $sformatf("pulse %0d: %0d expected %0d", i, pc[i], exp_pc[i]));

    // start_tx bit
    busy_tx <= 1'b0;
    bus_write(8'h04, shadow[1] | 32'h200);
    repeat (2) @(posedge clk);
    check(pc[1] == 1, "one start_tx pulse");
    bus_read(8'h04, q);
    check(q[9] == 1'b1, "start bit reads 1 before busy");
    busy_tx <= 1'b1;
    repeat (3) @(posedge clk);
    bus_read(8'h04, q);
    check(q[9] == 1'b0 && q[8] == 1'b1, "start bit cleared by busy, busy visible");
    busy_tx <= 1'b0;
    bus_read(8'h04, q);
    check(q[9] == 1'b0, "start bit stays clear");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
