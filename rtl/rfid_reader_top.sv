// rfid_reader_top: FPGA top level of the SDR-based UHF RFID reader.
//
// Contains the parts of the reader that are plain logic:
//   clk_reset          start-up SPI configuration of the clock chip, self
//                      reset of the user logic, then SPI pass-through to
//                      the processor
//   adc_dac_interface  converter registers and DAC offset compensation
//   rfiduhf            registers, block RAMs, transmitter, receiver and
//                      debug unit
// Everything that is a vendor primitive, a processor system or an external
// chip is outside and reached through ports:
//   - the processor and its bus attachment: the h_* register/memory bus
//     (one request per access, h_ack answers it) and the event pulses
//     irq_tx_done / irq_rx_start / irq_rx_done for an interrupt controller;
//   - the clock manager of the ADC interface: `clk` is its 100 MHz output,
//     dcm_adc_locked / dcm_adc_reset its status and reset;
//   - the clock distribution chip: spi_* pins; the processor's own SPI
//     master: cpu_spi_* pins;
//   - the 14-bit dual ADC, the 16-bit dual DAC and the 1 MB ZBT SRAM.
// The edge and bit outputs of the decoder (time stamp and phase of every
// sub-symbol edge) are brought out for a localisation unit.
// All ports are plain scalar or vector signals. One clock domain: `clk`.
// Structure and interfaces follow the reference reader; the port-level
// form of the replaced parts is this design's choice.
module rfid_reader_top
  import rfid_pkg::*;
#(
  parameter int unsigned CE_DIV          = 50,
  parameter int unsigned ON_SETTLE_TICKS = 3000,
  parameter int unsigned OFF_MIN_TICKS   = 2000,
  parameter int unsigned CORR_DEPTH      = 2048,
  parameter int unsigned DBG_DEPTH       = 262144,
  parameter int unsigned SRAM_RD_LAT     = 2,
  parameter int unsigned SPI_DIV         = 8,
  localparam int unsigned DBG_AW         = $clog2(DBG_DEPTH)
) (
  input  logic              clk,
  input  logic              ext_rst_n,
  // processor bus
  input  logic              h_req,
  input  logic              h_we,
  input  logic [1:0]        h_sel,
  input  logic [19:0]       h_addr,
  input  logic [31:0]       h_wdata,
  output logic [31:0]       h_rdata,
  output logic              h_ack,
  output logic              irq_tx_done,
  output logic              irq_rx_done,
  output logic              irq_rx_start,
  output logic              rst_n_user,
  // clock manager
  input  logic              dcm_adc_locked,
  output logic              dcm_adc_reset,
  // clock distribution chip SPI
  output logic              spi_sclk,
  output logic              spi_mosi,
  output logic              spi_cs_n,
  input  logic              spi_miso,
  input  logic              cpu_spi_sclk,
  input  logic              cpu_spi_mosi,
  input  logic              cpu_spi_cs_n,
  output logic              cpu_spi_miso,
  // converters
  input  logic [13:0]       adc_a,
  input  logic [13:0]       adc_b,
  output logic [15:0]       dac_a,
  output logic [15:0]       dac_b,
  output logic              rf_carrier_on,
  // external SRAM
  output logic [DBG_AW-1:0] sram_addr,
  output logic              sram_we,
  output logic [35:0]       sram_wdata,
  input  logic [35:0]       sram_rdata,
  // decoder events for localisation
  output logic              edge_valid,
  output logic [31:0]       edge_time,
  output logic [15:0]       edge_angle,
  output logic              bit_valid,
  output logic              bit_value
);

  logic cfg_done;

  clk_reset #(.SPI_DIV(SPI_DIV)) u_clk_reset (
    .clk, .ext_rst_n,
    .spi_sclk, .spi_mosi, .spi_cs_n, .spi_miso,
    .cpu_sclk(cpu_spi_sclk), .cpu_mosi(cpu_spi_mosi), .cpu_cs_n(cpu_spi_cs_n),
    .cpu_miso(cpu_spi_miso),
    .cfg_done, .rst_n_out(rst_n_user)
  );

  logic signed [ADC_W-1:0] adc_i, adc_q;
  logic signed [15:0]      tx_sample, daca_offset, dacb_offset;

  adc_dac_interface u_conv (
    .clk, .rst_n(rst_n_user),
    .adc_a_pin(adc_a), .adc_b_pin(adc_b), .dac_a_pin(dac_a), .dac_b_pin(dac_b),
    .adc_i, .adc_q, .tx_sample, .daca_offset, .dacb_offset
  );

  rfiduhf #(
    .CE_DIV(CE_DIV), .ON_SETTLE_TICKS(ON_SETTLE_TICKS), .OFF_MIN_TICKS(OFF_MIN_TICKS),
    .CORR_DEPTH(CORR_DEPTH), .DBG_DEPTH(DBG_DEPTH), .SRAM_RD_LAT(SRAM_RD_LAT)
  ) u_uhf (
    .clk, .rst_n(rst_n_user),
    .h_req(h_req && cfg_done), .h_we, .h_sel, .h_addr, .h_wdata, .h_rdata, .h_ack,
    .dcm_adc_locked, .dcm_adc_reset,
    .adc_i, .adc_q, .tx_sample, .daca_offset, .dacb_offset, .carrier_on(rf_carrier_on),
    .sram_addr, .sram_we, .sram_wdata, .sram_rdata,
    .tx_done(irq_tx_done), .rx_done(irq_rx_done), .rx_thr_hit(irq_rx_start),
    .edge_valid, .edge_time, .edge_angle, .bit_valid, .bit_value
  );

endmodule
