// rx_debug: capture and playback of ADC samples in the external SRAM.
//
// Sits between the ADC interface and the correlator. In its initial state
// it passes the live ADC samples through (one per clock) and lets the host
// read and write the SRAM. Started in one of four modes it:
//   0 continuous record - writes samples into the SRAM as a circular buffer
//                         until a trigger; `countervalue` then holds the
//                         last address written;
//   1 continuous play   - waits for a trigger (sending the default value),
//                         then plays the buffer over and over until reset;
//   2 single record     - waits for a trigger, records DEPTH samples once;
//   3 single play       - waits for a trigger (sending the default value),
//                         plays the buffer once.
// Recording and playback run at clk / clk_div (0 and 1 mean every clock);
// no anti-alias filtering is applied. A trigger is the software trigger or
// any enabled (trigger_mask) hardware trigger. One SRAM word holds one I/Q
// pair as {Q[13:0], I[13:0], 4'b0} in bits 31:0, the layout of the default
// register (ADC A = I in bits 17:4, ADC B = Q in bits 31:18).
// SRAM port: synchronous, address and write strobe in one clock, read data
// SRAM_RD_LAT clocks after the address (pipelined ZBT-style).
// Host port: `h_req` with `h_we`; `h_ack` answers every request, with read
// data SRAM_RD_LAT + 1 clocks later; while the unit is busy the SRAM is not
// reachable and requests are acknowledged at once with data 0.
// Modes, triggers, divider, memory depth (256 k samples) and the
// initial-state-only host access follow the reference design; the SRAM
// timing and data layout are this design's choices.
module rx_debug
  import rfid_pkg::*;
#(
  parameter int unsigned DEPTH       = 262144,
  parameter int unsigned SRAM_RD_LAT = 2,
  localparam int unsigned AW         = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  dbg_cfg_t                cfg,
  input  logic                    start,
  input  logic                    soft_reset,
  input  logic                    trigger_sw,
  input  logic [3:0]              trigger_hw,
  // live samples
  input  logic signed [ADC_W-1:0] adc_i,
  input  logic signed [ADC_W-1:0] adc_q,
  // to the correlator
  output logic                    out_valid,
  output logic signed [ADC_W-1:0] out_i,
  output logic signed [ADC_W-1:0] out_q,
  // status
  output logic                    waittrigger,
  output logic                    busy,
  output logic [17:0]             countervalue,
  // external SRAM
  output logic [AW-1:0]           sram_addr,
  output logic                    sram_we,
  output logic [35:0]             sram_wdata,
  input  logic [35:0]             sram_rdata,
  // host access
  input  logic                    h_req,
  input  logic                    h_we,
  input  logic [AW-1:0]           h_addr,
  input  logic [31:0]             h_wdata,
  output logic [31:0]             h_rdata,
  output logic                    h_ack
);

  typedef enum logic [2:0] {
    D_IDLE, D_REC_CONT, D_WAIT_REC, D_REC_SINGLE, D_WAIT_PLAY, D_PLAY
  } dstate_e;

  dstate_e        st;
  logic [AW-1:0]  addr;
  logic [15:0]    dcnt;
  logic           tick;
  logic           trig;
  logic           play_loop;
  logic [SRAM_RD_LAT:0] rd_pipe;   // playback reads in flight
  logic [SRAM_RD_LAT:0] h_pipe;    // host reads in flight

  assign trig = trigger_sw || |(trigger_hw & cfg.trigger_mask);

  // sample-rate divider
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dcnt <= '0; tick <= 1'b0;
    end else if (st == D_IDLE) begin
      dcnt <= '0; tick <= 1'b0;
    end else begin
      if (dcnt + 16'd1 >= cfg.clk_div) begin
        dcnt <= '0; tick <= 1'b1;
      end else begin
        dcnt <= dcnt + 16'd1; tick <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= D_IDLE; addr <= '0; countervalue <= '0; play_loop <= 1'b0;
    end else if (soft_reset) begin
      st <= D_IDLE; addr <= '0;
    end else begin
      unique case (st)
        D_IDLE: begin
          addr <= '0;
          if (start) begin
            unique case (cfg.mode)
              DBG_CONT_RECORD:   st <= D_REC_CONT;
              DBG_SINGLE_RECORD: st <= D_WAIT_REC;
              DBG_CONT_PLAY:     begin st <= D_WAIT_PLAY; play_loop <= 1'b1; end
              default:           begin st <= D_WAIT_PLAY; play_loop <= 1'b0; end
            endcase
          end
        end
        D_REC_CONT: begin
          if (tick) begin
            countervalue <= 18'(addr);
            addr <= (int'(addr) == int'(DEPTH) - 1) ? '0 : addr + 1'b1;
          end
          if (trig) st <= D_IDLE;
        end
        D_WAIT_REC:  if (trig) st <= D_REC_SINGLE;
        D_REC_SINGLE: begin
          if (tick) begin
            countervalue <= 18'(addr);
            if (int'(addr) == int'(DEPTH) - 1) st <= D_IDLE;
            else addr <= addr + 1'b1;
          end
        end
        D_WAIT_PLAY: if (trig) st <= D_PLAY;
        D_PLAY: begin
          if (tick) begin
            if (int'(addr) == int'(DEPTH) - 1) begin
              addr <= '0;
              if (!play_loop) st <= D_IDLE;
            end else addr <= addr + 1'b1;
          end
        end
        default: st <= D_IDLE;
      endcase
    end
  end

  // SRAM access: recorder, player or host
  logic rec_wr, play_rd;
  assign rec_wr  = tick && (st == D_REC_CONT || st == D_REC_SINGLE);
  assign play_rd = tick && (st == D_PLAY);

  always_comb begin
    sram_addr  = addr;
    sram_we    = rec_wr;
    sram_wdata = {4'b0, adc_q, adc_i, 4'b0};
    if (st == D_IDLE) begin
      sram_addr  = h_addr;
      sram_we    = h_req && h_we;
      sram_wdata = {4'b0, h_wdata};
    end
  end

  // read pipelines
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pipe <= '0; h_pipe <= '0; h_ack <= 1'b0; h_rdata <= '0;
    end else begin
      rd_pipe <= {rd_pipe[SRAM_RD_LAT-1:0], play_rd};
      h_pipe  <= {h_pipe[SRAM_RD_LAT-1:0], (st == D_IDLE) && h_req && !h_we};
      h_ack   <= 1'b0;
      if (h_req && (h_we || st != D_IDLE)) begin
        h_ack <= 1'b1; h_rdata <= '0;
      end
      if (h_pipe[SRAM_RD_LAT-1]) begin
        h_ack <= 1'b1; h_rdata <= sram_rdata[31:0];
      end
    end
  end

  // sample output
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_i <= '0; out_q <= '0;
    end else begin
      unique case (st)
        D_IDLE, D_REC_CONT, D_WAIT_REC, D_REC_SINGLE: begin
          if (rd_pipe[SRAM_RD_LAT-1]) begin
            // last playback word still arriving after the unit went idle
            out_valid <= 1'b1;
            out_i <= sram_rdata[17:4]; out_q <= sram_rdata[31:18];
          end else begin
            out_valid <= 1'b1; out_i <= adc_i; out_q <= adc_q;
          end
        end
        D_WAIT_PLAY: begin
          out_valid <= 1'b1; out_i <= cfg.adca_default; out_q <= cfg.adcb_default;
        end
        default: begin // D_PLAY
          out_valid <= rd_pipe[SRAM_RD_LAT-1];
          out_i <= sram_rdata[17:4]; out_q <= sram_rdata[31:18];
        end
      endcase
    end
  end

  assign waittrigger = (st == D_REC_CONT) || (st == D_WAIT_REC) || (st == D_WAIT_PLAY);
  assign busy        = (st != D_IDLE);

  a_host_write_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (sram_we && st != D_IDLE) |-> rec_wr);

endmodule
