// rfidrx: receive chain of the reader, from the ADC samples to the bits.
//
//   ADC I/Q -> rx_debug (pass-through, record or playback)
//           -> correlator (square wave of one BLF period, a = lencorripulse)
//           -> cordic (magnitude and angle of the correlation)
//           -> rx_decoder (threshold, preamble averaging, sub-symbol decode)
//           -> bram_rx write port
// All of it runs at the full 100 MS/s sample clock. The correlator output
// reaches the CORDIC only once the correlator's window is full (`warm`), so
// the decoder never sees the start-up transient after a restart.
// Hardware triggers of the debug unit (enabled by trigger_mask):
//   bit 0  end of a transmitted frame (tx_done)
//   bit 1  receiver started (start_rx)
//   bit 2  reply detected (magnitude crossed the threshold)
//   bit 3  reply decoded (decoder done)
// Interface: configuration comes straight from the register block; start_rx
// and reset_rx are one-clock pulses. `edge_*` report every sub-symbol edge
// the decoder locks onto (time in decoder samples, I/Q angle), `bit_*` every
// decoded bit; both are brought out for localisation experiments.
// The chain and the register semantics follow the reference receiver; the
// assignment of the four hardware triggers is this design's choice.
module rfidrx
  import rfid_pkg::*;
#(
  parameter int unsigned CORR_DEPTH  = 2048,
  parameter int unsigned DBG_DEPTH   = 262144,
  parameter int unsigned SRAM_RD_LAT = 2,
  localparam int unsigned MAG_W      = 28,
  localparam int unsigned DBG_AW     = $clog2(DBG_DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  rx_cfg_t                 rcfg,
  input  dbg_cfg_t                dcfg,
  // control pulses
  input  logic                    start_rx,
  input  logic                    reset_rx,
  input  logic                    dbg_start,
  input  logic                    dbg_reset,
  input  logic                    dbg_trigger,
  input  logic                    tx_done,
  // samples
  input  logic signed [ADC_W-1:0] adc_i,
  input  logic signed [ADC_W-1:0] adc_q,
  // decoder status
  output logic                    rx_busy,
  output logic                    rx_done,
  output logic                    rx_thr_hit,
  output logic [25:0]             pwr_estimate,
  output logic [15:0]             blf_estimate,
  output logic [15:0]             bits_read,
  output logic                    bit_valid,
  output logic                    bit_value,
  output logic                    edge_valid,
  output logic [31:0]             edge_time,
  output logic [15:0]             edge_angle,
  // bram_rx write port
  output logic                    wr_en,
  output logic [8:0]              wr_addr,
  output logic [31:0]             wr_data,
  // debug unit
  output logic                    dbg_waittrigger,
  output logic                    dbg_busy,
  output logic [17:0]             dbg_countervalue,
  output logic [DBG_AW-1:0]       sram_addr,
  output logic                    sram_we,
  output logic [35:0]             sram_wdata,
  input  logic [35:0]             sram_rdata,
  input  logic                    h_req,
  input  logic                    h_we,
  input  logic [DBG_AW-1:0]       h_addr,
  input  logic [31:0]             h_wdata,
  output logic [31:0]             h_rdata,
  output logic                    h_ack
);

  logic                    s_valid;
  logic signed [ADC_W-1:0] s_i, s_q;

  rx_debug #(.DEPTH(DBG_DEPTH), .SRAM_RD_LAT(SRAM_RD_LAT)) u_debug (
    .clk, .rst_n, .cfg(dcfg),
    .start(dbg_start), .soft_reset(dbg_reset), .trigger_sw(dbg_trigger),
    .trigger_hw({rx_done, rx_thr_hit, start_rx, tx_done}),
    .adc_i, .adc_q,
    .out_valid(s_valid), .out_i(s_i), .out_q(s_q),
    .waittrigger(dbg_waittrigger), .busy(dbg_busy), .countervalue(dbg_countervalue),
    .sram_addr, .sram_we, .sram_wdata, .sram_rdata,
    .h_req, .h_we, .h_addr, .h_wdata, .h_rdata, .h_ack
  );

  logic                    corr_restart, c_valid, c_warm;
  logic signed [MAG_W-1:0] c_i, c_q;

  correlator #(.ADC_W(ADC_W), .CORR_W(MAG_W), .DEPTH(CORR_DEPTH)) u_corr (
    .clk, .rst_n, .restart(corr_restart), .a(rcfg.lencorripulse),
    .in_valid(s_valid), .i_in(s_i), .q_in(s_q),
    .out_valid(c_valid), .warm(c_warm), .corr_i(c_i), .corr_q(c_q)
  );

  logic             m_valid;
  logic [MAG_W-1:0] m_mag;
  logic [15:0]      m_angle;

  cordic #(.W(MAG_W), .ITER(16)) u_cordic (
    .clk, .rst_n, .in_valid(c_valid && c_warm), .x_in(c_i), .y_in(c_q),
    .out_valid(m_valid), .mag(m_mag), .angle(m_angle)
  );

  rx_decoder #(.MAG_W(MAG_W)) u_dec (
    .clk, .rst_n,
    .trext(rcfg.trext), .m_code(rcfg.m), .threshold(rcfg.threshold),
    .a_cfg(rcfg.lencorripulse),
    .start(start_rx), .soft_reset(reset_rx),
    .busy(rx_busy), .thr_hit(rx_thr_hit), .done(rx_done),
    .corr_restart, .mag_valid(m_valid), .mag(m_mag), .angle(m_angle),
    .pwr_estimate, .blf_estimate, .bits_read, .bit_valid, .bit_value,
    .edge_valid, .edge_time, .edge_angle,
    .wr_en, .wr_addr, .wr_data
  );

endmodule
