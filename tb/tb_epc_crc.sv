// tb_epc_crc: self-checking test of the serial EPC CRC generator.
//
// Feeds the ASCII string "123456789" MSB first and compares with the published
// check values of the two catalogued CRCs the EPC Gen2 air interface uses:
// CRC-5/EPC-C1G2 gives 5'h00 and CRC-16/GENIBUS (the complemented CCITT CRC)
// gives 16'hD64E. It then checks random messages against a bit-by-bit
// polynomial division written out here, and the clear input.
//
// Check values come from the published CRC catalogue of the EPC air
// interface; the random messages are this test's own.
module tb_epc_crc;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0, bit_in = 1'b0;
  logic [4:0] crc5;
  logic [15:0] crc16;
  int checks = 0, failures = 0;

  epc_crc dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_bit(input logic b);
    @(negedge clk); en = 1'b1; bit_in = b;
    @(negedge clk); en = 1'b0;
  endtask

  task automatic clear();
    @(negedge clk); clr = 1'b1; @(negedge clk); clr = 1'b0;
  endtask

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // reference: long division, independent of the package functions
  function automatic logic [15:0] ref_crc16(input logic msg[$]);
    logic [15:0] r = 16'hFFFF;
    foreach (msg[i]) begin
      logic top = r[15];
      r = r << 1;
      if (top != msg[i]) r = r ^ 16'h1021;
    end
    return ~r;
  endfunction
  function automatic logic [4:0] ref_crc5(input logic msg[$]);
    logic [4:0] r = 5'h09;
    foreach (msg[i]) begin
      logic top = r[4];
      r = r << 1;
      if (top != msg[i]) r = r ^ 5'h09;
    end
    return r;
  endfunction

  initial begin
    string s = "123456789";
    logic msg[$];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check("reset crc5", {11'd0, crc5}, 16'h0009);
    for (int i = 0; i < s.len(); i++)
      for (int b = 7; b >= 0; b--) send_bit(s[i][b]);
    @(negedge clk);
    check("crc5 check value", {11'd0, crc5}, 16'h0000);
    check("crc16 check value", crc16, 16'hD64E);
    for (int t = 0; t < 40; t++) begin
      int n = 1 + ($urandom % 96);
      clear();
      msg.delete();
      for (int i = 0; i < n; i++) begin
        logic b = 1'($urandom);
        msg.push_back(b);
        send_bit(b);
      end
      @(negedge clk);
      check("crc16 random", crc16, ref_crc16(msg));
      check("crc5 random", {11'd0, crc5}, {11'd0, ref_crc5(msg)});
    end
    clear();
    check("clear crc16", crc16, 16'h0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
