// tb_rx_debug: self-checking test of the debug record/playback unit.
//
// Uses a reduced memory (DEPTH 1024) and a behavioural pipelined SRAM with
// the unit's read latency. Checks: live pass-through in the initial state;
// host write/read of the SRAM while idle and refusal while busy; single
// record after a hardware trigger (masked and unmasked triggers) with clock
// divider 3 and the counter value; continuous record as a ring buffer
// stopped by the software trigger; single playback of the recorded samples
// in order, at the divided rate, with the default value sent while waiting;
// continuous playback wrapping around until the soft reset.
//
// The four modes and the idle-only host access follow the reader
// description; the ramp stimulus and the reduced depth are this test's own.
module tb_rx_debug;
  import rfid_pkg::*;

  localparam int DEPTH = 1024;
  localparam int LAT = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  dbg_cfg_t cfg;
  logic start, soft_reset, trigger_sw;
  logic [3:0] trigger_hw;
  logic signed [13:0] adc_i, adc_q, out_i, out_q;
  logic out_valid, waittrigger, busy;
  logic [17:0] countervalue;
  logic [9:0] sram_addr, h_addr;
  logic sram_we, h_req, h_we, h_ack;
  logic [35:0] sram_wdata, sram_rdata;
  logic [31:0] h_wdata, h_rdata;

  rx_debug #(.DEPTH(DEPTH), .SRAM_RD_LAT(LAT)) dut (.*);

  logic [35:0] sram [DEPTH];
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
    #5_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic int s14(logic [13:0] x);
    return int'($signed(x));
  endfunction

  // ADC ramp: sample n is (n, -n) so positions can be recognised
  int n;
  always_ff @(posedge clk) begin
    n <= n + 1;
    adc_i <= 14'(n + 1);
    adc_q <= 14'(-(n + 1));
  end

  task automatic pulse_start();
    @(posedge clk); start <= 1'b1;
    @(posedge clk); start <= 1'b0;
  endtask
  task automatic pulse_trigger();
    @(posedge clk); trigger_sw <= 1'b1;
    @(posedge clk); trigger_sw <= 1'b0;
  endtask
  task automatic pulse_reset();
    @(posedge clk); soft_reset <= 1'b1;
    @(posedge clk); soft_reset <= 1'b0;
  endtask

  task automatic host(bit we, logic [9:0] a, logic [31:0] d, output logic [31:0] q);
    @(posedge clk);
    h_req <= 1'b1; h_we <= we; h_addr <= a; h_wdata <= d;
    @(posedge clk);
    h_req <= 1'b0;
    while (!h_ack) @(posedge clk);
    q = h_rdata;
  endtask

  // collected playback samples
  int pl_i[$];
  int pl_t[$];
  bit collect;
  logic wt_q;
  always_ff @(posedge clk) begin
    wt_q <= waittrigger;
    // the first clock after the trigger still shows the default value
    if (rst_n && collect && out_valid && busy && !waittrigger && !wt_q) begin
      pl_i.push_back(int'(out_i));
      pl_t.push_back(n);
    end
  end

  initial begin
    logic [31:0] q;
    int first;
    cfg = '0;
    start = 0; soft_reset = 0; trigger_sw = 0; trigger_hw = '0;
    h_req = 0; h_we = 0; h_addr = '0; h_wdata = '0;
    n = 0; collect = 0; wt_q = 1'b0; adc_i = '0; adc_q = '0; rd1 = '0; sram_rdata = '0;
    for (int i = 0; i < DEPTH; i++) sram[i] = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);

    // pass-through: output follows the input one clock later
    for (int k = 0; k < 20; k++) begin
      @(posedge clk);
      #1 check(out_valid && out_i == adc_i - 14'sd1 && out_q == -out_i, "pass-through");
    end
    check(!busy && !waittrigger, "idle after reset");

    // host access while idle
    for (int k = 0; k < 20; k++) begin
      logic [9:0] a;
      logic [31:0] d;
      a = 10'($urandom);
      d = $urandom;
      host(1, a, d, q);
      host(0, a, 0, q);
      check(q == d, $sformatf("host read back %h expected %h", q, d));
    end

    // single record, hardware trigger 2 (masked off first), divider 3
    cfg.mode = DBG_SINGLE_RECORD;
    cfg.trigger_mask = 4'b0100;
    cfg.clk_div = 16'd3;
    pulse_start();
    repeat (3) @(posedge clk);
    check(busy && waittrigger, "waiting for trigger");
    host(0, 10'd5, 0, q);
    check(q == 0, "host read refused while busy");
    trigger_hw <= 4'b0010;            // not enabled
    @(posedge clk); trigger_hw <= '0;
    repeat (5) @(posedge clk);
    check(waittrigger, "masked trigger ignored");
    first = n;
    trigger_hw <= 4'b0100;
    @(posedge clk); trigger_hw <= '0;
    #1 check(!waittrigger, "enabled trigger starts recording");
    while (busy) @(posedge clk);
    check(n - first >= 3 * DEPTH && n - first <= 3 * DEPTH + 10, $sformatf("recording took %0d clocks", n - first));
    check(int'(countervalue) == DEPTH - 1, $sformatf("counter %0d", countervalue));
    begin
      int nerr = 0;
      for (int k = 1; k < DEPTH; k++) begin
        int d;
        d = s14(sram[k][17:4]) - s14(sram[k-1][17:4]);
        if (d != 3 && d != 3 - 16384) nerr++;
        if (s14(sram[k][31:18]) != -s14(sram[k][17:4]) && s14(sram[k][17:4]) != -8192) nerr++;
      end
      check(nerr == 0, $sformatf("recorded ramp has %0d errors", nerr));
    end

    // single playback with default value while waiting, divider 2
    cfg.mode = DBG_SINGLE_PLAY;
    cfg.clk_div = 16'd2;
    cfg.adca_default = 14'sd77;
    cfg.adcb_default = -14'sd77;
    pulse_start();
    repeat (4) @(posedge clk);
    #1 check(out_valid && out_i == 14'sd77 && out_q == -14'sd77, "default value while waiting");
    pl_i.delete(); pl_t.delete(); collect = 1;
    pulse_trigger();
    while (busy) @(posedge clk);
    repeat (LAT + 3) @(posedge clk);
    collect = 0;
    check(pl_i.size() >= DEPTH - 2, $sformatf("%0d samples played", pl_i.size()));
    begin
      int nerr = 0;
      for (int k = 0; k < pl_i.size() && k < DEPTH; k++) begin
        if (pl_i[k] != s14(sram[k][17:4])) nerr++;
        if (k > 0 && pl_t[k] - pl_t[k-1] != 2) nerr++;
      end
      check(nerr == 0, $sformatf("playback order/rate: %0d errors", nerr));
    end

    // continuous record as a ring buffer, stopped by software trigger
    cfg.mode = DBG_CONT_RECORD;
    cfg.clk_div = 16'd1;
    pulse_start();
    repeat (3) @(posedge clk);
    repeat (DEPTH + 300) @(posedge clk);
    check(waittrigger, "continuous record waits for trigger");
    pulse_trigger();
    repeat (3) @(posedge clk);
    check(!busy, "stopped by trigger");
    check(int'(countervalue) > 250 && int'(countervalue) < 320, $sformatf("ring counter %0d", countervalue));
    begin
      int c;
      int d;
      c = int'(countervalue);
      d = s14(sram[c][17:4]) - s14(sram[(c + 1) % DEPTH][17:4]);
      check(d == DEPTH - 1 || d == DEPTH - 1 - 16384, $sformatf("newest-oldest %0d", d));
    end

    // continuous playback wraps until soft reset
    cfg.mode = DBG_CONT_PLAY;
    pl_i.delete(); pl_t.delete(); collect = 1;
    pulse_start();
    pulse_trigger();
    repeat (2 * DEPTH + 100) @(posedge clk);
    check(busy, "continuous playback still running");
    pulse_reset();
    repeat (2) @(posedge clk);
    check(!busy, "soft reset ends playback");
    collect = 0;
    check(pl_i.size() > DEPTH + 10 && pl_i[DEPTH + 5] == pl_i[5], "playback wraps around");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
