// pie_encoder: reader-to-tag PIE state machine of the transmitter.
//
// Runs on the 2 MHz clock enable `ce` (0.5 us per tick) and produces the
// 16-bit baseband level that feeds the pulse-shaping FIR. A frame is:
//   delimiter (low, DELIM_TICKS) , data-0 , RTcal , [TRcal] , data bits , [CRC]
// where every symbol is a high part followed by a low pulse of PW ticks and
// lasts Tari (data-0), Tone (data-1), RTcal or TRcal ticks in total. TRcal
// is only sent in a Preamble (before a Query); a Frame-Sync omits it. The
// command bits are read MSB first from bram_tx, word 0 bit 31 first. In
// automatic mode the first command bits choose Preamble or Frame-Sync (Query
// code 1000 gets the Preamble) and the checksum (CRC-5 for Query, CRC-16 for
// Select and the 11xxxxxx access commands, none for QueryRep, ACK,
// QueryAdjust and NAK). DSB-ASK sends +txpwr high and 0 low; PR-ASK sends 0
// in the low pulse and flips the sign of the level after each low pulse.
// Carrier power timing: after pwr_on rises the carrier is on (CW level) and
// no frame starts for ON_SETTLE_TICKS (1500 us); after the carrier is switched
// off it cannot come back on for OFF_MIN_TICKS (1 ms).
// Interface: `start` is a request that is remembered until the frame begins;
// `busy` is high from the clock after `start` while a frame is pending,
// while the carrier settles and while a frame is sent. `sample` is
// updated one clock after each `ce` and `sample_valid` marks it (the FIR's
// new-data strobe). The BRAM read port has one clock of latency; `ce` must
// never be high on two consecutive clocks.
// The frame layout, the register fields and the power timing follow the
// reader description; the delimiter length (12.5 us), the command-code table
// for the automatic modes and the PR-ASK representation are taken from the
// EPC Gen2 air interface and are this design's reading of it.
module pie_encoder
  import rfid_pkg::*;
#(
  parameter int unsigned DELIM_TICKS     = 25,    // 12.5 us
  parameter int unsigned ON_SETTLE_TICKS = 3000,  // 1500 us
  parameter int unsigned OFF_MIN_TICKS   = 2000   // 1 ms
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ce,           // 2 MHz tick
  input  tx_cfg_t            cfg,
  input  logic               start,
  output logic               busy,
  output logic               carrier_on,
  output logic [8:0]         rd_addr,      // bram_tx word address
  input  logic [31:0]        rd_data,      // one clock after rd_addr
  output logic signed [15:0] sample,
  output logic               sample_valid
);

  typedef enum logic [2:0] {
    ST_OFF, ST_SETTLE, ST_IDLE, ST_FRAME
  } state_e;

  typedef enum logic [2:0] {
    SEG_DELIM, SEG_DATA0, SEG_RTCAL, SEG_TRCAL, SEG_BITS, SEG_CRC
  } seg_e;

  state_e      state;
  seg_e        seg;
  logic        low_phase;       // in the low pulse of the current symbol
  logic [15:0] tcnt;            // ticks spent in the current phase
  logic [15:0] settle_cnt;
  logic [15:0] off_cnt;
  logic [13:0] bidx;            // bit index within bram_tx
  logic [4:0]  crc_idx;
  logic [4:0]  crc_len;
  logic        use_pre, pend, neg;
  logic [4:0]  crc5;
  logic [15:0] crc16;
  logic        crc_clr, crc_en, crc_bit;

  // ---------------------------------------------------- current symbol
  logic        cur_bit;
  logic [15:0] sym_len, high_len;

  assign rd_addr = bidx[13:5];
  // the checksum does not change while it is sent (nothing is fed then)
  assign cur_bit = (seg != SEG_CRC) ? rd_data[5'd31 - bidx[4:0]]
                 : (crc_len == 5'd5) ? crc5[3'd4 - crc_idx[2:0]]
                 : crc16[4'd15 - crc_idx[3:0]];

  always_comb begin
    unique case (seg)
      SEG_DATA0: sym_len = cfg.tari;
      SEG_RTCAL: sym_len = cfg.rtcal;
      SEG_TRCAL: sym_len = cfg.trcal;
      default:   sym_len = cur_bit ? cfg.tone : cfg.tari;
    endcase
    high_len = (sym_len > cfg.pw) ? sym_len - cfg.pw : 16'd0;
  end

  // ------------------------------------------------------ automatic modes
  logic [7:0] cmd;
  logic       auto_pre;
  crc_mode_e  auto_crc, crc_sel;
  assign cmd = rd_data[31:24];   // word 0 is on the read port while idle

  always_comb begin
    auto_pre = (cmd[7:4] == 4'b1000);
    if (cmd[7:6] == 2'b00 || cmd[7:6] == 2'b01)   auto_crc = CRC_NONE; // QueryRep, ACK
    else if (cmd[7:4] == 4'b1000)                 auto_crc = CRC_5;    // Query
    else if (cmd[7:4] == 4'b1010)                 auto_crc = CRC_16;   // Select
    else if (cmd == 8'b1100_0000)                 auto_crc = CRC_NONE; // NAK
    else if (cmd[7:6] == 2'b11)                   auto_crc = CRC_16;   // access commands
    else                                          auto_crc = CRC_NONE; // QueryAdjust, reserved
    crc_sel = (cfg.crc == CRC_AUTO) ? auto_crc : cfg.crc;
  end

  // --------------------------------------------------------------- CRC
  epc_crc u_crc (
    .clk, .rst_n, .clr(crc_clr), .en(crc_en), .bit_in(crc_bit),
    .crc5, .crc16
  );

  // ---------------------------------------------------- state machine
  logic sym_end;
  assign sym_end = low_phase && (tcnt + 16'd1 >= cfg.pw);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_OFF; seg <= SEG_DELIM; low_phase <= 1'b0;
      tcnt <= '0; settle_cnt <= '0; off_cnt <= 16'(OFF_MIN_TICKS);
      bidx <= '0; crc_idx <= '0; crc_len <= '0; crc_bit <= 1'b0;
      use_pre <= 1'b0; pend <= 1'b0; neg <= 1'b0;
      crc_clr <= 1'b0; crc_en <= 1'b0;
      sample <= '0; sample_valid <= 1'b0;
    end else begin
      crc_clr      <= 1'b0;
      crc_en       <= 1'b0;
      sample_valid <= ce;
      if (start) pend <= 1'b1;
      if (ce) begin
        unique case (state)
          ST_OFF: begin
            if (off_cnt < 16'(OFF_MIN_TICKS)) off_cnt <= off_cnt + 16'd1;
            else if (cfg.pwr_on) begin
              state <= ST_SETTLE;
              settle_cnt <= '0;
            end
          end
          ST_SETTLE: begin
            if (!cfg.pwr_on) begin
              state <= ST_OFF; off_cnt <= '0;
            end else if (settle_cnt + 16'd1 >= 16'(ON_SETTLE_TICKS)) state <= ST_IDLE;
            else settle_cnt <= settle_cnt + 16'd1;
          end
          ST_IDLE: begin
            neg <= 1'b0;
            if (!cfg.pwr_on) begin
              state <= ST_OFF; off_cnt <= '0;
            end else if (pend || start) begin
              pend      <= 1'b0;
              state     <= ST_FRAME;
              seg       <= SEG_DELIM;
              low_phase <= 1'b1;
              tcnt      <= '0;
              crc_clr   <= 1'b1;
              use_pre   <= (cfg.preamble == PRE_PREAMBLE) ||
                           ((cfg.preamble != PRE_FSYNC) && auto_pre);
              crc_len   <= (crc_sel == CRC_5) ? 5'd5 : (crc_sel == CRC_16) ? 5'd16 : 5'd0;
            end
          end
          ST_FRAME: begin
            if (seg == SEG_DELIM) begin
              if (tcnt + 16'd1 >= 16'(DELIM_TICKS)) begin
                seg <= SEG_DATA0; low_phase <= 1'b0; tcnt <= '0;
                if (cfg.modulation) neg <= ~neg;
              end else tcnt <= tcnt + 16'd1;
            end else if (!low_phase) begin
              if (tcnt + 16'd1 >= high_len) begin
                low_phase <= 1'b1; tcnt <= '0;
              end else tcnt <= tcnt + 16'd1;
            end else if (sym_end) begin
              low_phase <= 1'b0; tcnt <= '0;
              if (cfg.modulation) neg <= ~neg;
              unique case (seg)
                SEG_DATA0: seg <= SEG_RTCAL;
                SEG_RTCAL: begin
                  if (use_pre) seg <= SEG_TRCAL;
                  else if (cfg.length != 0) seg <= SEG_BITS;
                  else state <= ST_IDLE;
                end
                SEG_TRCAL: begin
                  if (cfg.length != 0) seg <= SEG_BITS;
                  else state <= ST_IDLE;
                end
                SEG_BITS: begin
                  crc_en  <= 1'b1;
                  crc_bit <= cur_bit;
                  if (bidx + 14'd1 >= cfg.length) begin
                    bidx <= '0;
                    if (crc_len != 0) begin
                      seg <= SEG_CRC; crc_idx <= '0;
                    end else state <= ST_IDLE;
                  end else bidx <= bidx + 14'd1;
                end
                default: begin // SEG_CRC
                  if (crc_idx + 5'd1 >= crc_len) begin
                    state <= ST_IDLE; crc_idx <= '0;
                  end else crc_idx <= crc_idx + 5'd1;
                end
              endcase
            end else tcnt <= tcnt + 16'd1;
          end
          default: state <= ST_OFF;
        endcase
      end
      // level for the FIR
      if (ce) begin
        if (state == ST_OFF) sample <= '0;
        else if (state == ST_FRAME && (low_phase || seg == SEG_DELIM)) sample <= '0;
        else sample <= neg ? -cfg.txpwr : cfg.txpwr;
      end
    end
  end

  assign busy       = (state == ST_SETTLE) || (state == ST_FRAME) || pend ||
                      (state == ST_OFF && cfg.pwr_on);
  assign carrier_on = (state != ST_OFF);

  // the BRAM read latency needs a free clock between ticks
  a_ce_spacing: assert property (@(posedge clk) disable iff (!rst_n) ce |=> !ce);

endmodule
