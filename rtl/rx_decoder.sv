// rx_decoder: synchronous sub-symbol decoder for Miller-coded tag replies.
//
// Works on the magnitude of the square-wave correlation, one value per
// sample. Every edge of the tag's subcarrier gives a magnitude peak; where
// the Miller code inverts the subcarrier phase an edge is missing and the
// magnitude stays near zero. The decoder therefore looks at one window per
// sub-symbol boundary (half a BLF period apart) and classifies it as
// "peak" or "inversion", then turns the distances between inversions into
// bits. Steps:
//  1. `start`: restart the correlator and let it fill (it raises mag_valid
//     only once its window is complete); ignore FLUSH clocks of stale data.
//  2. Wait until the magnitude reaches the `threshold` register.
//  3. Preamble: take the maximum over a window of a samples (a = half BLF
//     period from lencorripulse) as the first peak, then one window of
//     +-a/8 samples centred a samples after the previous peak for each
//     further peak. The windows are kept this narrow because a kernel that
//     is longer than the true half period widens the peaks next to an
//     inversion and pulls them towards it by up to |a - a_true| samples.
//     The first NAVG peaks of the pilot (NAVG = 4M, or 16M with TRext; half
//     the peaks the pilot offers) are summed: sum / NAVG is the power
//     estimate and half of it the decision threshold; the distance from the
//     first to the last of them, times 2, divided by NAVG-1 (serial divider) is
//     the BLF period estimate, which replaces a once it is known.
//  4. Each later window is a peak if its maximum reaches the decision
//     threshold, else an inversion. A peak re-centres the next window on
//     itself (peak + a); an inversion moves it on by a.
//  5. The first inversion is taken as the middle of the first '1' of the
//     Miller preamble (0 1 0 1 1 1): the bits 0 and 1 are stored.
//  6. With d = boundaries since the last inversion and M the Miller factor:
//     after a 1: d = 2M -> 1, d = 3M -> 00, d = 4M -> 01;
//     after a 0: d = 2M -> 0, d = 3M -> 1.
//     Any other d (or a run longer than 4M) ends the reply.
// Outputs: bits are written MSB first into 32-bit words of bram_rx (word 0
// bit 31 is the first preamble bit) as they are found; `bits_read` counts
// them, preamble included. Every peak also produces `edge_valid` with the
// index of the peak in the magnitude stream (counted from the first sample
// examined for the threshold; the subcarrier edge itself lies a samples
// earlier in the correlator input) and the I/Q angle there: this is the
// sub-symbol timing used by ranging. `busy` is high from start until the reply ends or `soft_reset`.
// The decoding method, the estimates and the register semantics follow the
// reference decoder; window shapes, NAVG, the centring rule, the exact
// decision table and the storage layout (read back from the documented
// driver code) are this design's reading of it.
module rx_decoder #(
  parameter int unsigned MAG_W = 28,
  parameter int unsigned FLUSH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration
  input  logic             trext,
  input  logic [1:0]       m_code,      // 1: M=2, 2: M=4, 3: M=8
  input  logic [25:0]      threshold,
  input  logic [15:0]      a_cfg,       // half BLF period in samples
  // control
  input  logic             start,
  input  logic             soft_reset,
  output logic             busy,
  output logic             thr_hit,     // pulse: reply start detected
  output logic             done,        // pulse: reply ended
  // correlator
  output logic             corr_restart,
  input  logic             mag_valid,
  input  logic [MAG_W-1:0] mag,
  input  logic [15:0]      angle,
  // results
  output logic [25:0]      pwr_estimate,
  output logic [15:0]      blf_estimate,
  output logic [15:0]      bits_read,
  output logic             bit_valid,
  output logic             bit_value,
  output logic             edge_valid,
  output logic [31:0]      edge_time,
  output logic [15:0]      edge_angle,
  // bram_rx write port
  output logic             wr_en,
  output logic [8:0]       wr_addr,
  output logic [31:0]      wr_data
);

  localparam int unsigned BRAM_BITS = 512 * 32;

  typedef enum logic [2:0] {
    S_IDLE, S_FLUSH, S_WAIT_THR, S_PREAMBLE, S_SYNC, S_DECODE
  } state_e;

  state_e       state;
  logic [31:0]  scnt;                  // magnitude samples since start
  logic [31:0]  wstart, wend, center;  // current window
  logic [MAG_W-1:0] pmax;
  logic [31:0]  ppos;
  logic [15:0]  pang;
  logic [15:0]  a_cur;
  logic [7:0]   fcnt;
  logic [7:0]   npk;                   // peaks summed so far
  logic [MAG_W+7:0] psum;
  logic [31:0]  first_pos;
  logic [MAG_W-1:0] thr_half;
  logic [5:0]   d;                     // boundaries since last inversion
  logic         last_bit;
  // pending bits (at most two per decision)
  logic [1:0]   pend_n;
  logic [1:0]   pend_b;                // pend_b[1] goes first
  logic [31:0]  wbuf;

  // ---------------------------------------------------------------- sizes
  logic [3:0]  mval;        // M
  logic [3:0]  navg_log2;
  logic [7:0]  navg;
  assign mval      = 4'd1 << m_code;
  assign navg_log2 = 4'(m_code) + 4'd2 + (trext ? 4'd2 : 4'd0);
  assign navg      = 8'd1 << navg_log2;

  // ------------------------------------------------------------- divider
  logic        div_start, div_done;
  logic [31:0] div_q;
  logic [31:0] span2;
  logic [7:0]  navg_m1;
  assign span2   = (ppos - first_pos) << 1;   // NAVG-1 half periods, doubled
  assign navg_m1 = navg - 8'd1;
  divider #(.NW(32), .DW(16)) u_div (
    .clk, .rst_n, .start(div_start),
    .dividend(span2 + 32'(navg_m1 >> 1)),
    .divisor(16'(navg_m1)),
    .quotient(div_q), .done(div_done)
  );

  // ------------------------------------------- window bookkeeping (comb)
  logic             in_win, at_end;
  logic [MAG_W-1:0] cmax;
  logic [31:0]      cpos;
  logic [15:0]      cang;
  always_comb begin
    in_win = (scnt >= wstart);
    at_end = (scnt >= wend);
    cmax = pmax; cpos = ppos; cang = pang;
    if (in_win && mag > pmax) begin
      cmax = mag; cpos = scnt; cang = angle;
    end
  end

  // decision table: returns number of bits (0 = invalid) and the bits
  function automatic logic [3:0] miller_decode(logic lb, logic [5:0] dlen, logic [3:0] mm);
    // {n[1:0], b1, b0}
    logic [5:0] m2, m3, m4;
    m2 = 6'(mm) << 1;
    m3 = 6'(mm) + (6'(mm) << 1);
    m4 = 6'(mm) << 2;
    if (lb) begin
      if (dlen == m2) return {2'd1, 1'b1, 1'b0};
      if (dlen == m3) return {2'd2, 1'b0, 1'b0};
      if (dlen == m4) return {2'd2, 1'b0, 1'b1};
    end else begin
      if (dlen == m2) return {2'd1, 1'b0, 1'b0};
      if (dlen == m3) return {2'd1, 1'b1, 1'b0};
    end
    return 4'd0;
  endfunction

  logic [3:0] dec;
  assign dec = miller_decode(last_bit, d + 6'd1, mval);

  // --------------------------------------------------------- main FSM
  logic is_peak;
  assign is_peak = (cmax >= thr_half);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; scnt <= '0; wstart <= '0; wend <= '0; center <= '0;
      pmax <= '0; ppos <= '0; pang <= '0; a_cur <= '0; fcnt <= '0; npk <= '0;
      psum <= '0; first_pos <= '0; thr_half <= '0; d <= '0; last_bit <= 1'b0;
      pend_n <= '0; pend_b <= '0; corr_restart <= 1'b0; thr_hit <= 1'b0;
      pwr_estimate <= '0; blf_estimate <= '0; div_start <= 1'b0;
      edge_valid <= 1'b0; edge_time <= '0; edge_angle <= '0;
    end else begin
      corr_restart <= 1'b0;
      thr_hit      <= 1'b0;
      div_start    <= 1'b0;
      edge_valid   <= 1'b0;
      if (div_done) begin
        blf_estimate <= (|div_q[31:16]) ? 16'hFFFF : div_q[15:0];
        a_cur        <= (|div_q[31:16]) ? 16'h8000 : (div_q[15:0] + 16'd1) >> 1;
      end
      if (soft_reset) begin
        state <= S_IDLE;
      end else begin
        unique case (state)
          S_IDLE: begin
            if (start) begin
              state <= S_FLUSH; corr_restart <= 1'b1; fcnt <= '0;
              a_cur <= a_cfg;
            end
          end
          S_FLUSH: begin
            fcnt <= fcnt + 8'd1;
            scnt <= '0;
            if (int'(fcnt) >= int'(FLUSH)) state <= S_WAIT_THR;
          end
          S_WAIT_THR: begin
            if (mag_valid) begin
              scnt <= scnt + 32'd1;
              if (mag >= MAG_W'(threshold)) begin
                thr_hit <= 1'b1;
                state   <= S_PREAMBLE;
                wstart  <= scnt;
                wend    <= scnt + 32'(a_cfg) - 32'd1;
                pmax    <= mag; ppos <= scnt; pang <= angle;
                npk     <= '0; psum <= '0;
              end
            end
          end
          default: begin // windowed states
            if (mag_valid) begin
              scnt <= scnt + 32'd1;
              pmax <= cmax; ppos <= cpos; pang <= cang;
              if (at_end) begin
                pmax <= '0;
                if (state == S_PREAMBLE || is_peak) begin
                  // a peak: re-centre on it
                  center <= cpos + 32'(a_cur);
                  wstart <= cpos + 32'(a_cur) - 32'(a_cur >> 3);
                  wend   <= cpos + 32'(a_cur) + 32'(a_cur >> 3);
                  edge_valid <= 1'b1;
                  edge_time  <= cpos;
                  edge_angle <= cang;
                end else begin
                  center <= center + 32'(a_cur);
                  wstart <= center + 32'(a_cur) - 32'(a_cur >> 3);
                  wend   <= center + 32'(a_cur) + 32'(a_cur >> 3);
                end
                unique case (state)
                  S_PREAMBLE: begin
                    if (cmax < MAG_W'(threshold)) begin
                      state <= S_WAIT_THR;   // lost it: look again
                      edge_valid <= 1'b0;
                    end else begin
                      psum <= psum + (MAG_W+8)'(cmax);
                      npk  <= npk + 8'd1;
                      if (npk == 0) first_pos <= cpos;
                      if (npk + 8'd1 == navg) begin
                        pwr_estimate <= 26'((psum + (MAG_W+8)'(cmax)) >> navg_log2);
                        thr_half     <= MAG_W'((psum + (MAG_W+8)'(cmax)) >> (navg_log2 + 4'd1));
                        div_start    <= 1'b1;   // uses ppos <= cpos, one clock later
                        state        <= S_SYNC;
                      end
                    end
                  end
                  S_SYNC: begin
                    if (!is_peak) begin
                      state    <= S_DECODE;
                      pend_n   <= 2'd2; pend_b <= 2'b01;
                      last_bit <= 1'b1;
                      d        <= '0;
                    end
                  end
                  default: begin // S_DECODE
                    if (is_peak) begin
                      if (d + 6'd1 > 6'(mval) << 2) state <= S_IDLE;
                      else d <= d + 6'd1;
                    end else begin
                      if (dec[3:2] == 2'd0) state <= S_IDLE;
                      else begin
                        pend_n   <= dec[3:2];
                        pend_b   <= dec[1:0];
                        last_bit <= (dec[3:2] == 2'd1) ? dec[1] : dec[0];
                        d        <= '0;
                      end
                    end
                  end
                endcase
              end
            end
          end
        endcase
      end
      if (pend_n != 0) begin
        pend_n <= pend_n - 2'd1;
        pend_b <= {pend_b[0], 1'b0};
      end
    end
  end

  // end of a reply: busy falls
  logic busy_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_q <= 1'b0;
    else        busy_q <= busy;
  end
  assign busy = (state != S_IDLE) || (pend_n != 0);
  assign done = busy_q && !busy;

  // ------------------------------------------------------- bit writer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits_read <= '0; wbuf <= '0; wr_en <= 1'b0; wr_addr <= '0; wr_data <= '0;
      bit_valid <= 1'b0; bit_value <= 1'b0;
    end else begin
      wr_en     <= 1'b0;
      bit_valid <= 1'b0;
      if (state == S_IDLE && start) begin
        bits_read <= '0; wbuf <= '0;
      end else if (pend_n != 0 && bits_read < 16'(BRAM_BITS)) begin
        automatic logic [31:0] nb;
        nb = (bits_read[4:0] == 0) ? 32'd0 : wbuf;
        nb[5'd31 - bits_read[4:0]] = pend_b[1];
        wbuf      <= nb;
        wr_en     <= 1'b1;
        wr_addr   <= bits_read[13:5];
        wr_data   <= nb;
        bits_read <= bits_read + 16'd1;
        bit_valid <= 1'b1;
        bit_value <= pend_b[1];
      end
    end
  end


endmodule
