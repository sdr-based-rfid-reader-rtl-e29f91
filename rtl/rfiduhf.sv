// rfiduhf: the reader user logic seen by the processor - register block,
// the two block RAMs, the transmitter and the receiver.
//
// Host bus: one request per access (`h_req` one clock, `h_we` for writes)
// with a region select and a byte address inside the region:
//   h_sel 0  registers (offsets 0x00..0x34)
//   h_sel 1  bram_tx   2 kB, 512 words: the command bits to send, MSB first
//   h_sel 2  bram_rx   2 kB, 512 words: the decoded reply bits
//   h_sel 3  ram_debug 1 MB, 256 k words in the external SRAM (reachable
//            only while the debug unit is in its initial state)
// `h_ack` answers every request; read data is valid with it. Registers and
// block RAMs answer on the next clock, the SRAM after its read latency.
// Other outputs: the DAC-A transmit sample, the interrupt-style pulses at
// the end of a frame (tx_done), the start (rx_thr_hit) and end (rx_done)
// of a reply, and the decoder's
// sub-symbol edges and bits for localisation.
// The memory map and the split into transmitter, receiver, registers and
// memories follow the reference user logic; the bus handshake stands in
// for the processor bus attachment, which is not modelled.
module rfiduhf
  import rfid_pkg::*;
#(
  parameter int unsigned CE_DIV          = 50,
  parameter int unsigned ON_SETTLE_TICKS = 3000,
  parameter int unsigned OFF_MIN_TICKS   = 2000,
  parameter int unsigned CORR_DEPTH      = 2048,
  parameter int unsigned DBG_DEPTH       = 262144,
  parameter int unsigned SRAM_RD_LAT     = 2,
  localparam int unsigned DBG_AW         = $clog2(DBG_DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // host bus
  input  logic                    h_req,
  input  logic                    h_we,
  input  logic [1:0]              h_sel,
  input  logic [19:0]             h_addr,
  input  logic [31:0]             h_wdata,
  output logic [31:0]             h_rdata,
  output logic                    h_ack,
  // clocking status
  input  logic                    dcm_adc_locked,
  output logic                    dcm_adc_reset,
  // converters (after the interface registers)
  input  logic signed [ADC_W-1:0] adc_i,
  input  logic signed [ADC_W-1:0] adc_q,
  output logic signed [15:0]      tx_sample,
  output logic signed [15:0]      daca_offset,
  output logic signed [15:0]      dacb_offset,
  output logic                    carrier_on,
  // external SRAM
  output logic [DBG_AW-1:0]       sram_addr,
  output logic                    sram_we,
  output logic [35:0]             sram_wdata,
  input  logic [35:0]             sram_rdata,
  // events
  output logic                    tx_done,
  output logic                    rx_done,
  output logic                    rx_thr_hit,
  output logic                    edge_valid,
  output logic [31:0]             edge_time,
  output logic [15:0]             edge_angle,
  output logic                    bit_valid,
  output logic                    bit_value
);

  tx_cfg_t  tx_cfg;
  rx_cfg_t  rx_cfg;
  dbg_cfg_t dbg_cfg;
  logic start_tx, busy_tx, coef_we, coef_ld;
  logic signed [15:0] coef_din;
  logic dbg_trigger, dbg_reset, dbg_start, dbg_waittrigger, dbg_busy;
  logic [17:0] dbg_countervalue;
  logic reset_rx, start_rx, busy_rx;
  logic [25:0] pwr_estimate;
  logic [15:0] bits_read, blf_estimate;

  // ------------------------------------------------------------ bus decode
  logic reg_wr, reg_rd, tx_en, rx_en, dbg_req;
  logic [31:0] reg_rdata, txm_rdata, rxm_rdata, dbg_rdata;
  logic dbg_ack;
  logic [1:0] sel_q;
  logic       ack_q;

  assign reg_wr  = h_req && h_we && h_sel == SEL_REGS;
  assign reg_rd  = h_req && !h_we && h_sel == SEL_REGS;
  assign tx_en   = h_req && h_sel == SEL_BRAM_TX;
  assign rx_en   = h_req && h_sel == SEL_BRAM_RX;
  assign dbg_req = h_req && h_sel == SEL_RAM_DBG;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q <= '0; ack_q <= 1'b0;
    end else begin
      ack_q <= h_req && h_sel != SEL_RAM_DBG;
      if (h_req) sel_q <= h_sel;
    end
  end

  always_comb begin
    unique case (bus_sel_e'(sel_q))
      SEL_REGS:    h_rdata = reg_rdata;
      SEL_BRAM_TX: h_rdata = txm_rdata;
      SEL_BRAM_RX: h_rdata = rxm_rdata;
      default:     h_rdata = dbg_rdata;
    endcase
  end
  assign h_ack = ack_q || dbg_ack;

  // bus rule: a request lasts one clock and the next waits for the answer
  a_req_one_clock: assert property (@(posedge clk) disable iff (!rst_n) h_req |=> !h_req);

  // -------------------------------------------------------------- registers
  rfiduhf_regs u_regs (
    .clk, .rst_n, .wr(reg_wr), .rd(reg_rd), .addr(h_addr[7:0]),
    .wdata(h_wdata), .rdata(reg_rdata),
    .dcm_adc_locked, .dcm_adc_reset,
    .tx_cfg, .start_tx, .busy_tx, .daca_offset, .dacb_offset,
    .coef_we, .coef_ld, .coef_din,
    .dbg_cfg, .dbg_trigger, .dbg_reset, .dbg_start,
    .dbg_waittrigger, .dbg_busy, .dbg_countervalue,
    .rx_cfg, .reset_rx, .start_rx, .busy_rx, .pwr_estimate, .bits_read, .blf_estimate
  );

  // ---------------------------------------------------------------- bram_tx
  logic [8:0]  tx_rd_addr;
  logic [31:0] tx_rd_data;
  dp_bram #(.DW(32), .DEPTH(BRAM_WORDS)) u_bram_tx (
    .clk,
    .a_en(tx_en), .a_we(h_we), .a_addr(h_addr[10:2]), .a_wdata(h_wdata), .a_rdata(txm_rdata),
    .b_en(1'b1), .b_we(1'b0), .b_addr(tx_rd_addr), .b_wdata(32'd0), .b_rdata(tx_rd_data)
  );

  // ---------------------------------------------------------------- bram_rx
  logic        rx_wr_en;
  logic [8:0]  rx_wr_addr;
  logic [31:0] rx_wr_data, rx_b_rdata;
  dp_bram #(.DW(32), .DEPTH(BRAM_WORDS)) u_bram_rx (
    .clk,
    .a_en(rx_en), .a_we(h_we), .a_addr(h_addr[10:2]), .a_wdata(h_wdata), .a_rdata(rxm_rdata),
    .b_en(rx_wr_en), .b_we(rx_wr_en), .b_addr(rx_wr_addr), .b_wdata(rx_wr_data),
    .b_rdata(rx_b_rdata)
  );

  // ------------------------------------------------------------ transmitter
  rfidtx #(.CE_DIV(CE_DIV), .ON_SETTLE_TICKS(ON_SETTLE_TICKS), .OFF_MIN_TICKS(OFF_MIN_TICKS)) u_tx (
    .clk, .rst_n, .cfg(tx_cfg), .start(start_tx), .busy(busy_tx), .carrier_on,
    .rd_addr(tx_rd_addr), .rd_data(tx_rd_data),
    .coef_ld, .coef_we, .coef_din, .dac(tx_sample)
  );

  logic busy_tx_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_tx_q <= 1'b0;
    else        busy_tx_q <= busy_tx;
  end
  assign tx_done = busy_tx_q && !busy_tx;

  // --------------------------------------------------------------- receiver
  rfidrx #(.CORR_DEPTH(CORR_DEPTH), .DBG_DEPTH(DBG_DEPTH), .SRAM_RD_LAT(SRAM_RD_LAT)) u_rx (
    .clk, .rst_n, .rcfg(rx_cfg), .dcfg(dbg_cfg),
    .start_rx, .reset_rx, .dbg_start, .dbg_reset, .dbg_trigger, .tx_done,
    .adc_i, .adc_q,
    .rx_busy(busy_rx), .rx_done, .rx_thr_hit, .pwr_estimate, .blf_estimate, .bits_read,
    .bit_valid, .bit_value, .edge_valid, .edge_time, .edge_angle,
    .wr_en(rx_wr_en), .wr_addr(rx_wr_addr), .wr_data(rx_wr_data),
    .dbg_waittrigger, .dbg_busy, .dbg_countervalue,
    .sram_addr, .sram_we, .sram_wdata, .sram_rdata,
    .h_req(dbg_req), .h_we, .h_addr(h_addr[DBG_AW+1:2]), .h_wdata,
    .h_rdata(dbg_rdata), .h_ack(dbg_ack)
  );

endmodule
