// rfiduhf_regs: processor-visible register block of the reader user logic.
//
// Fourteen 32-bit registers at byte offsets 0x00..0x34 (LSB = bit 0):
//   0x00 adc_dcm      7:0 version (R), 30 dcm_adc_locked (R),
//                     31 dcm_adc_reset (W, self clearing)
//   0x04 txconf1      8 busy_tx (R), 9 start_tx, 10 modulation, 11 pwr_on,
//                     13:12 crc, 15:14 preamble, 29:16 length
//   0x08 txconf2      15:0 tone, 31:16 tari
//   0x0C txconf3      15:0 trcal, 31:16 rtcal
//   0x10 txconf4      15:0 txpwr, 31:16 pw
//   0x14 txconf5      15:0 dacb_offset, 31:16 daca_offset
//   0x18 coefrld      15:0 nextcoef, 16 coefwe, 17 coefld (W, pulses)
//   0x1C rxdebug_conf 1 waittrigger (R), 2 busy (R), 3 trigger, 4 reset,
//                     5 start (W, self clearing), 7:6 mode, 11:8 mask,
//                     31:16 clk_div
//   0x20 rxdebug_counter 17:0 countervalue (R)
//   0x24 rxdebug_default 17:4 adca_default, 31:18 adcb_default
//   0x28 rxconf1      1 reset_rx, 2 start_rx (self clearing), 3 trext,
//                     5:4 m, 31:6 threshold
//   0x2C rxconf2      15:0 lencorripulse, 31:16 blf
//   0x30 rxconf3      5 busy_rx (R), 31:6 pwrestimate (R)
//   0x34 rxconf4      15:0 bitsread (R), 31:16 blf estimate (R)
// Bus: `wr`/`rd` strobes with a byte offset; read data is registered and
// valid on the clock after `rd`. Self-clearing bits give one-clock pulses.
// start_tx is special: the write gives a one-clock start pulse and the bit
// reads back as 1 until the transmitter reports busy, when it clears.
// The map and the field meanings follow the reference register tables; the
// reset values (all zero) and the bus handshake are this design's choices.
module rfiduhf_regs
  import rfid_pkg::*;
#(
  parameter logic [7:0] VERSION = 8'h01
) (
  input  logic        clk,
  input  logic        rst_n,
  // register bus
  input  logic        wr,
  input  logic        rd,
  input  logic [7:0]  addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  // clocking
  input  logic        dcm_adc_locked,
  output logic        dcm_adc_reset,
  // transmitter
  output tx_cfg_t     tx_cfg,
  output logic        start_tx,
  input  logic        busy_tx,
  output logic signed [15:0] daca_offset,
  output logic signed [15:0] dacb_offset,
  output logic        coef_we,
  output logic        coef_ld,
  output logic signed [15:0] coef_din,
  // debug unit
  output dbg_cfg_t    dbg_cfg,
  output logic        dbg_trigger,
  output logic        dbg_reset,
  output logic        dbg_start,
  input  logic        dbg_waittrigger,
  input  logic        dbg_busy,
  input  logic [17:0] dbg_countervalue,
  // receiver
  output rx_cfg_t     rx_cfg,
  output logic        reset_rx,
  output logic        start_rx,
  input  logic        busy_rx,
  input  logic [25:0] pwr_estimate,
  input  logic [15:0] bits_read,
  input  logic [15:0] blf_estimate
);

  logic start_tx_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_cfg <= '0; dbg_cfg <= '0; rx_cfg <= '0;
      daca_offset <= '0; dacb_offset <= '0; coef_din <= '0;
      start_tx_bit <= 1'b0; start_tx <= 1'b0; dcm_adc_reset <= 1'b0;
      coef_we <= 1'b0; coef_ld <= 1'b0;
      dbg_trigger <= 1'b0; dbg_reset <= 1'b0; dbg_start <= 1'b0;
      reset_rx <= 1'b0; start_rx <= 1'b0;
    end else begin
      // self-clearing bits
      start_tx <= 1'b0; dcm_adc_reset <= 1'b0; coef_we <= 1'b0; coef_ld <= 1'b0;
      dbg_trigger <= 1'b0; dbg_reset <= 1'b0; dbg_start <= 1'b0;
      reset_rx <= 1'b0; start_rx <= 1'b0;
      if (busy_tx) start_tx_bit <= 1'b0;
      if (wr) begin
        unique case (addr)
          REG_ADC_DCM: dcm_adc_reset <= wdata[31];
          REG_TXCONF1: begin
            start_tx_bit         <= wdata[9];
            start_tx             <= wdata[9];
            tx_cfg.modulation    <= wdata[10];
            tx_cfg.pwr_on        <= wdata[11];
            tx_cfg.crc           <= crc_mode_e'(wdata[13:12]);
            tx_cfg.preamble      <= pre_mode_e'(wdata[15:14]);
            tx_cfg.length        <= wdata[29:16];
          end
          REG_TXCONF2: begin tx_cfg.tone  <= wdata[15:0]; tx_cfg.tari  <= wdata[31:16]; end
          REG_TXCONF3: begin tx_cfg.trcal <= wdata[15:0]; tx_cfg.rtcal <= wdata[31:16]; end
          REG_TXCONF4: begin tx_cfg.txpwr <= wdata[15:0]; tx_cfg.pw    <= wdata[31:16]; end
          REG_TXCONF5: begin dacb_offset  <= wdata[15:0]; daca_offset  <= wdata[31:16]; end
          REG_COEFRLD: begin
            coef_din <= wdata[15:0];
            coef_we  <= wdata[16];
            coef_ld  <= wdata[17];
          end
          REG_RXDEBUG_CONF: begin
            dbg_trigger          <= wdata[3];
            dbg_reset            <= wdata[4];
            dbg_start            <= wdata[5];
            dbg_cfg.mode         <= dbg_mode_e'(wdata[7:6]);
            dbg_cfg.trigger_mask <= wdata[11:8];
            dbg_cfg.clk_div      <= wdata[31:16];
          end
          REG_RXDEBUG_DEFLT: begin
            dbg_cfg.adca_default <= wdata[17:4];
            dbg_cfg.adcb_default <= wdata[31:18];
          end
          REG_RXCONF1: begin
            reset_rx         <= wdata[1];
            start_rx         <= wdata[2];
            rx_cfg.trext     <= wdata[3];
            rx_cfg.m         <= wdata[5:4];
            rx_cfg.threshold <= wdata[31:6];
          end
          REG_RXCONF2: begin
            rx_cfg.lencorripulse <= wdata[15:0];
            rx_cfg.blf           <= wdata[31:16];
          end
          default: ;   // read-only or unused offsets
        endcase
      end
    end
  end

  // read back
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rdata <= '0;
    else if (rd) begin
      unique case (addr)
        REG_ADC_DCM:  rdata <= {1'b0, dcm_adc_locked, 22'd0, VERSION};
        REG_TXCONF1:  rdata <= {2'b0, tx_cfg.length, tx_cfg.preamble, tx_cfg.crc,
                                tx_cfg.pwr_on, tx_cfg.modulation, start_tx_bit, busy_tx, 8'd0};
        REG_TXCONF2:  rdata <= {tx_cfg.tari, tx_cfg.tone};
        REG_TXCONF3:  rdata <= {tx_cfg.rtcal, tx_cfg.trcal};
        REG_TXCONF4:  rdata <= {tx_cfg.pw, tx_cfg.txpwr};
        REG_TXCONF5:  rdata <= {daca_offset, dacb_offset};
        REG_RXDEBUG_CONF: rdata <= {dbg_cfg.clk_div, 4'd0, dbg_cfg.trigger_mask, dbg_cfg.mode,
                                    3'd0, dbg_busy, dbg_waittrigger, 1'b0};
        REG_RXDEBUG_COUNT: rdata <= {14'd0, dbg_countervalue};
        REG_RXDEBUG_DEFLT: rdata <= {dbg_cfg.adcb_default, dbg_cfg.adca_default, 4'd0};
        REG_RXCONF1:  rdata <= {rx_cfg.threshold, rx_cfg.m, rx_cfg.trext, 3'd0};
        REG_RXCONF2:  rdata <= {rx_cfg.blf, rx_cfg.lencorripulse};
        REG_RXCONF3:  rdata <= {pwr_estimate, busy_rx, 5'd0};
        REG_RXCONF4:  rdata <= {blf_estimate, bits_read};
        default:      rdata <= '0;   // coefrld is write-only
      endcase
    end
  end

endmodule
