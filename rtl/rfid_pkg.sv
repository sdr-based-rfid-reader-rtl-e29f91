// rfid_pkg: types and constants shared by the UHF RFID reader user logic.
//
// Holds the register map of the processor-visible register block, the field
// encodings of the configuration registers, the sample widths of the ADC/DAC
// paths and the CRC polynomials of the EPC Gen2 air interface. The register
// offsets and field positions follow the published register map of the
// reader; the CRC polynomials and presets are those of the EPC Gen2 standard.
// Bit numbering throughout is LSB = bit 0.
package rfid_pkg;

  // ---------------------------------------------------------------- widths
  localparam int unsigned ADC_W  = 14;  // ADS62P44 sample width, per channel
  localparam int unsigned DAC_W  = 16;  // AD9777 sample width, per channel
  localparam int unsigned BUS_AW = 20;  // byte address width of the host bus
  localparam int unsigned BRAM_WORDS = 512;  // 2 kB of 32-bit words

  // ------------------------------------------------------- register offsets
  typedef enum logic [7:0] {
    REG_ADC_DCM        = 8'h00,
    REG_TXCONF1        = 8'h04,
    REG_TXCONF2        = 8'h08,
    REG_TXCONF3        = 8'h0C,
    REG_TXCONF4        = 8'h10,
    REG_TXCONF5        = 8'h14,
    REG_COEFRLD        = 8'h18,
    REG_RXDEBUG_CONF   = 8'h1C,
    REG_RXDEBUG_COUNT  = 8'h20,
    REG_RXDEBUG_DEFLT  = 8'h24,
    REG_RXCONF1        = 8'h28,
    REG_RXCONF2        = 8'h2C,
    REG_RXCONF3        = 8'h30,
    REG_RXCONF4        = 8'h34
  } reg_addr_e;

  // Host bus regions (one chip select each): registers and the three memories
  typedef enum logic [1:0] {
    SEL_REGS     = 2'd0,
    SEL_BRAM_TX  = 2'd1,
    SEL_BRAM_RX  = 2'd2,
    SEL_RAM_DBG  = 2'd3
  } bus_sel_e;

  // --------------------------------------------------------- field encodings
  typedef enum logic [1:0] {
    CRC_AUTO = 2'd0, CRC_5 = 2'd1, CRC_16 = 2'd2, CRC_NONE = 2'd3
  } crc_mode_e;

  typedef enum logic [1:0] {
    PRE_AUTO0 = 2'd0, PRE_AUTO1 = 2'd1, PRE_FSYNC = 2'd2, PRE_PREAMBLE = 2'd3
  } pre_mode_e;

  typedef enum logic [1:0] {
    DBG_CONT_RECORD = 2'd0, DBG_CONT_PLAY = 2'd1,
    DBG_SINGLE_RECORD = 2'd2, DBG_SINGLE_PLAY = 2'd3
  } dbg_mode_e;

  // Transmitter configuration (txconf1..5)
  typedef struct packed {
    logic        modulation;   // 0: DSB-ASK PIE, 1: PR-ASK PIE
    logic        pwr_on;       // RF carrier on
    crc_mode_e   crc;
    pre_mode_e   preamble;
    logic [13:0] length;       // number of bits in bram_tx to send
    logic [15:0] tone;         // data-1 length, 0.5 us ticks
    logic [15:0] tari;         // data-0 length, 0.5 us ticks
    logic [15:0] trcal;        // 0.5 us ticks
    logic [15:0] rtcal;        // 0.5 us ticks
    logic signed [15:0] txpwr; // FIR input level while the carrier is on
    logic [15:0] pw;           // low-pulse width, 0.5 us ticks
  } tx_cfg_t;

  // Receiver configuration (rxconf1, rxconf2)
  typedef struct packed {
    logic        trext;          // extended preamble (pilot tone)
    logic [1:0]  m;              // 1: M=2, 2: M=4, 3: M=8
    logic [25:0] threshold;      // start-of-reply magnitude threshold
    logic [15:0] lencorripulse;  // half BLF period a, in samples
    logic [15:0] blf;            // BLF period, in samples
  } rx_cfg_t;

  // Debug unit configuration (rxdebug_conf, rxdebug_default)
  typedef struct packed {
    dbg_mode_e   mode;
    logic [3:0]  trigger_mask;
    logic [15:0] clk_div;
    logic signed [ADC_W-1:0] adca_default;
    logic signed [ADC_W-1:0] adcb_default;
  } dbg_cfg_t;

  // ---------------------------------------------------------------- CRCs
  // EPC Gen2 CRC-5: x^5 + x^3 + 1, preset 5'b01001, sent MSB first as is.
  localparam logic [4:0]  CRC5_POLY   = 5'b01001;
  localparam logic [4:0]  CRC5_PRESET = 5'b01001;
  // EPC Gen2 CRC-16 (CCITT): x^16 + x^12 + x^5 + 1, preset 16'hFFFF, sent
  // MSB first and ones-complemented.
  localparam logic [15:0] CRC16_POLY   = 16'h1021;
  localparam logic [15:0] CRC16_PRESET = 16'hFFFF;

  function automatic logic [4:0] crc5_step(logic [4:0] crc, logic bit_in);
    logic fb;
    fb = crc[4] ^ bit_in;
    return {crc[3:0], 1'b0} ^ (fb ? CRC5_POLY : 5'd0);
  endfunction

  function automatic logic [15:0] crc16_step(logic [15:0] crc, logic bit_in);
    logic fb;
    fb = crc[15] ^ bit_in;
    return {crc[14:0], 1'b0} ^ (fb ? CRC16_POLY : 16'd0);
  endfunction

endpackage
