// tb_adc_dac_interface: self-checking test of the converter registers.
//
// Drives random 14-bit ADC codes and random transmit samples and offsets.
// A reference model keeps the pin history: adc_i/adc_q must equal the pins
// of two clocks earlier (A = I, B = Q, signed); dac_a must be the
// saturated sum of transmit sample and channel-A offset of one clock
// earlier and dac_b the channel-B offset. Large values are mixed in so
// that both saturation limits are exercised. Also checks the reset values.
//
// The channel assignment and the offset rule checked here follow the register
// description of the reader; the random stimulus is this test's own.
module tb_adc_dac_interface;
  import rfid_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [13:0] adc_a_pin, adc_b_pin;
  logic [15:0] dac_a_pin, dac_b_pin;
  logic signed [13:0] adc_i, adc_q;
  logic signed [15:0] tx_sample, daca_offset, dacb_offset;

  adc_dac_interface dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin
    #1_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic logic [15:0] sat(int v);
    if (v > 32767) return 16'h7FFF;
    if (v < -32768) return 16'h8000;
    return 16'(v);
  endfunction

  function automatic logic signed [15:0] rnd16();
    unique case ($urandom_range(3))
      0: return 16'sh7F00 + 16'($urandom_range(255));
      1: return 16'sh8000 + 16'($urandom_range(255));
      default: return 16'($urandom);
    endcase
  endfunction

  initial begin
    logic [13:0] a_h[3], b_h[3];
    int exp_a, exp_b, n_sat;
    adc_a_pin = '0; adc_b_pin = '0; tx_sample = '0; daca_offset = '0; dacb_offset = '0;
    for (int i = 0; i < 3; i++) begin a_h[i] = '0; b_h[i] = '0; end
    n_sat = 0;
    repeat (3) @(posedge clk);
    #1 check(adc_i == 0 && adc_q == 0 && dac_a_pin == 0 && dac_b_pin == 0, "reset values");
    rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      adc_a_pin = 14'($urandom); adc_b_pin = 14'($urandom);
      tx_sample = rnd16(); daca_offset = rnd16(); dacb_offset = rnd16();
      exp_a = int'(tx_sample) + int'(daca_offset);
      exp_b = int'(dacb_offset);
      if (exp_a > 32767 || exp_a < -32768) n_sat++;
      a_h[2] = a_h[1]; a_h[1] = a_h[0]; a_h[0] = adc_a_pin;
      b_h[2] = b_h[1]; b_h[1] = b_h[0]; b_h[0] = adc_b_pin;
      @(posedge clk);
      #1;
      check(dac_a_pin == sat(exp_a), $sformatf("dac_a %h expected %h", dac_a_pin, sat(exp_a)));
      check(dac_b_pin == sat(exp_b), "dac_b offset");
      if (k >= 2) begin
        check(adc_i == $signed(a_h[1]) && adc_q == $signed(b_h[1]),
              $sformatf("adc %0d/%0d expected %0d/%0d", adc_i, adc_q, $signed(a_h[1]), $signed(b_h[1])));
      end
    end
    check(n_sat > 100, $sformatf("saturation exercised %0d times", n_sat));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
