// clk_reset: start-up configuration of the clock distribution chip and the
// reset of the user logic.
//
// On the board the ADC/DAC sample clock comes from a clock distribution
// chip (AD9510) whose power-up setting divides the 200 MHz reference by two
// on the way to the FPGA. After the external reset is released this block
// therefore
//   1. sends NWORDS 24-bit SPI write words (16-bit instruction + 8-bit data,
//      MSB first, SPI mode 0, chip select low for the whole word) to the
//      chip, from the CFG_WORDS parameter;
//   2. holds the user logic in reset for RST_CYCLES more clocks, so it
//      restarts on the new clock (the self reset);
//   3. hands the SPI pins over to the processor, which keeps access to the
//      chip from then on.
// SCLK runs at clk / (2 * SPI_DIV). `cfg_done` is high once the sequence is
// over; `rst_n_out` (synchronously released) resets the rest of the design.
// The sequence (configure, self reset, pass the SPI bus on) follows the
// reader description; the register words (bypass of divider 0, register
// 0x49 = 0x80, then the update command 0x5A = 0x01), the SPI timing and the
// reset length are this design's choices, as the description does not list
// them.
module clk_reset #(
  parameter int unsigned SPI_DIV    = 8,
  parameter int unsigned RST_CYCLES = 16,
  parameter int unsigned NWORDS     = 2,
  parameter logic [NWORDS*24-1:0] CFG_WORDS = {24'h0049_80, 24'h005A_01}
) (
  input  logic clk,
  input  logic ext_rst_n,       // board reset, asynchronous
  // SPI to the clock chip
  output logic spi_sclk,
  output logic spi_mosi,
  output logic spi_cs_n,
  input  logic spi_miso,
  // SPI from the processor
  input  logic cpu_sclk,
  input  logic cpu_mosi,
  input  logic cpu_cs_n,
  output logic cpu_miso,
  // resets
  output logic cfg_done,
  output logic rst_n_out
);

  // reset synchroniser
  logic [1:0] rsync;
  logic       rst_n;
  always_ff @(posedge clk or negedge ext_rst_n) begin
    if (!ext_rst_n) rsync <= 2'b00;
    else            rsync <= {rsync[0], 1'b1};
  end
  assign rst_n = rsync[1];

  typedef enum logic [1:0] { C_SEND, C_GAP, C_SELFRST, C_DONE } cstate_e;
  cstate_e st;
  logic [$clog2(NWORDS+1)-1:0] widx;
  logic [4:0]  bidx;
  logic [15:0] dcnt;
  logic        phase;           // 0: SCLK low half, 1: SCLK high half
  logic        m_sclk, m_cs_n;
  logic [23:0] word;
  logic [15:0] rcnt;

  always_comb begin
    word = CFG_WORDS[(NWORDS - 1 - int'(widx)) * 24 +: 24];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_SEND; widx <= '0; bidx <= '0; dcnt <= '0; phase <= 1'b0;
      m_sclk <= 1'b0; m_cs_n <= 1'b1; rcnt <= '0; rst_n_out <= 1'b0;
    end else begin
      unique case (st)
        C_SEND: begin
          m_cs_n <= 1'b0;
          if (m_cs_n) begin
            dcnt <= '0; phase <= 1'b0; bidx <= '0; m_sclk <= 1'b0;
          end else if (dcnt + 16'd1 >= 16'(SPI_DIV)) begin
            dcnt  <= '0;
            phase <= ~phase;
            m_sclk <= ~phase;
            if (phase) begin
              if (bidx == 5'd23) begin
                st <= C_GAP;
              end else bidx <= bidx + 5'd1;
            end
          end else dcnt <= dcnt + 16'd1;
        end
        C_GAP: begin
          m_cs_n <= 1'b1;
          m_sclk <= 1'b0;
          if (dcnt + 16'd1 >= 16'(SPI_DIV)) begin
            dcnt <= '0;
            if (int'(widx) + 1 >= int'(NWORDS)) st <= C_SELFRST;
            else begin
              widx <= widx + 1'b1; st <= C_SEND;
            end
          end else dcnt <= dcnt + 16'd1;
        end
        C_SELFRST: begin
          if (rcnt + 16'd1 >= 16'(RST_CYCLES)) st <= C_DONE;
          else rcnt <= rcnt + 16'd1;
        end
        default: rst_n_out <= 1'b1;   // C_DONE
      endcase
    end
  end

  assign cfg_done = (st == C_DONE);

  // SPI pin multiplexer
  always_comb begin
    if (cfg_done) begin
      spi_sclk = cpu_sclk;
      spi_mosi = cpu_mosi;
      spi_cs_n = cpu_cs_n;
    end else begin
      spi_sclk = m_sclk;
      spi_mosi = word[5'd23 - bidx];
      spi_cs_n = m_cs_n;
    end
  end
  assign cpu_miso = spi_miso;

endmodule
