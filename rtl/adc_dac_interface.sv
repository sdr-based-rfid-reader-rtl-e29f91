// adc_dac_interface: sample registers between the converters and the user
// logic.
//
// ADC side: the two 14-bit channels of the dual ADC (A = I, B = Q) are
// captured in input registers and passed through a second register stage
// so that the receiver sees them on the system clock. DAC side: channel A
// carries the shaped transmit baseband, channel B is idle; each channel gets
// its signed offset-compensation value (txconf5) added with saturation to
// 16 bits, and is registered before it leaves the FPGA.
// Timing: two clocks from ADC pins to adc_i/adc_q, one clock from the
// transmit sample to the DAC pins. All on the single 100 MHz sample clock.
// The channel widths and the offset compensation follow the reader
// description; which converter channel carries which signal, and the
// plain register capture in place of the phase-shifted DCM clock of the
// reference board, are this design's choices.
module adc_dac_interface
  import rfid_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  // converter pins
  input  logic [ADC_W-1:0]        adc_a_pin,
  input  logic [ADC_W-1:0]        adc_b_pin,
  output logic [15:0]             dac_a_pin,
  output logic [15:0]             dac_b_pin,
  // user logic side
  output logic signed [ADC_W-1:0] adc_i,
  output logic signed [ADC_W-1:0] adc_q,
  input  logic signed [15:0]      tx_sample,
  input  logic signed [15:0]      daca_offset,
  input  logic signed [15:0]      dacb_offset
);

  logic [ADC_W-1:0] a_q1, b_q1;

  function automatic logic [15:0] sat_add(logic signed [15:0] x, logic signed [15:0] y);
    logic signed [16:0] s;
    s = 17'(x) + 17'(y);
    if (s > 17'sd32767)       return 16'h7FFF;
    else if (s < -17'sd32768) return 16'h8000;
    else                      return s[15:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q1 <= '0; b_q1 <= '0; adc_i <= '0; adc_q <= '0;
      dac_a_pin <= '0; dac_b_pin <= '0;
    end else begin
      a_q1  <= adc_a_pin;
      b_q1  <= adc_b_pin;
      adc_i <= a_q1;
      adc_q <= b_q1;
      dac_a_pin <= sat_add(tx_sample, daca_offset);
      dac_b_pin <= sat_add(16'sd0, dacb_offset);
    end
  end

endmodule
