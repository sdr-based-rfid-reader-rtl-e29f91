// tb_clk_reset: self-checking test of the clock-chip start-up sequence.
//
// An SPI slave model samples MOSI on rising SCLK while CS is low and
// collects 24-bit words. Checks: the configured words arrive in order and
// MSB first, CS rises between words, SCLK period is 2*SPI_DIV clocks, the
// user reset stays low until the words are sent plus RST_CYCLES and is then
// released together with cfg_done, afterwards the SPI pins follow the
// processor pins (random toggling) and MISO is returned. An external reset
// in the middle of a later run restarts the whole sequence. Uses the
// default parameters.
//
// The sequence (configure, self reset, hand over) follows the reader
// description; the expected register words are this design's own choice.
module tb_clk_reset;

  localparam int SPI_DIV = 8;
  localparam int RST_CYCLES = 16;
  localparam logic [47:0] WORDS = {24'h0049_80, 24'h005A_01};

  logic clk = 1'b0;
  logic ext_rst_n = 1'b0;
  always #5 clk = ~clk;

  logic spi_sclk, spi_mosi, spi_cs_n, spi_miso;
  logic cpu_sclk, cpu_mosi, cpu_cs_n, cpu_miso;
  logic cfg_done, rst_n_out;

  clk_reset dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin
    #2_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // SPI slave model
  logic [23:0] sh;
  int nbits, cyc;
  logic [23:0] words[$];
  int rise_t[$];
  logic sclk_q;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    sclk_q <= spi_sclk;
    if (!cfg_done) begin
      if (spi_cs_n) begin
        nbits <= 0;
      end else if (spi_sclk && !sclk_q) begin
        sh <= {sh[22:0], spi_mosi};
        rise_t.push_back(cyc);
        if (nbits == 23) begin
          words.push_back({sh[22:0], spi_mosi});
          nbits <= 0;
        end else nbits <= nbits + 1;
      end
    end
  end

  task automatic run_sequence(string tag);
    int t0, t_rel;
    words.delete(); rise_t.delete();
    t0 = cyc;
    while (!cfg_done) begin
      @(posedge clk);
      #1 check(!rst_n_out || cfg_done, {tag, ": user reset released before done"});
    end
    t_rel = cyc;
    @(posedge clk);
    #1 check(rst_n_out, {tag, ": user reset released after done"});
    check(words.size() == 2, $sformatf("%s: %0d words", tag, words.size()));
    if (words.size() == 2)
      check(words[0] == WORDS[47:24] && words[1] == WORDS[23:0],
            $sformatf("%s: words %h %h", tag, words[0], words[1]));
    begin
      int bad;
      bad = 0;
      for (int i = 1; i < rise_t.size(); i++)
        if (i % 24 != 0 && rise_t[i] - rise_t[i-1] != 2 * SPI_DIV) bad++;
      check(bad == 0, $sformatf("%s: %0d SCLK periods wrong", tag, bad));
    end
    check(t_rel - t0 >= 48 * 2 * SPI_DIV + RST_CYCLES, $sformatf("%s: sequence only %0d clocks", tag, t_rel - t0));
  endtask

  initial begin
    spi_miso = 0; cpu_sclk = 0; cpu_mosi = 0; cpu_cs_n = 1;
    nbits = 0; cyc = 0; sh = '0; sclk_q = 0;
    repeat (5) @(posedge clk);
    #1 check(!rst_n_out && !cfg_done, "held in reset");
    ext_rst_n = 1'b1;
    run_sequence("first");

    // pass-through
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      cpu_sclk = 1'($urandom); cpu_mosi = 1'($urandom); cpu_cs_n = 1'($urandom);
      spi_miso = 1'($urandom);
      #1 check(spi_sclk == cpu_sclk && spi_mosi == cpu_mosi && spi_cs_n == cpu_cs_n &&
               cpu_miso == spi_miso, "SPI pass-through");
    end
    cpu_cs_n = 1; cpu_sclk = 0;

    // external reset in the middle of a new sequence
    ext_rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(!rst_n_out && !cfg_done, "external reset");
    ext_rst_n = 1'b1;
    repeat (200) @(posedge clk);
    ext_rst_n = 1'b0;
    repeat (2) @(posedge clk);
    nbits = 0;
    ext_rst_n = 1'b1;
    run_sequence("restart");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
