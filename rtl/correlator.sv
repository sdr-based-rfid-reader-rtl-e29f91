// correlator: running correlation of the I/Q samples with one period of a
// square wave at the expected backscatter link frequency (BLF).
//
// The kernel is +1 over a samples and -1 over the next a samples, a being
// half a BLF period in samples (the lencorripulse register). Instead of a
// 2a-tap FIR the correlation is updated once per sample with four terms:
//   C[m] = C[m-1] + 2 x[m-a] - x[m-2a] - x[m]
// which is the recursion of the reference decoder written causally (its
// output for kernel centre n appears a samples later, at m = n + a). x[m-a]
// and x[m-2a] come from two chained delay lines of length a, kept in block
// RAM as circular buffers (the two "FIFO BRAMs"). Starting from C = 0 the
// terms are switched on in sequence: for the first a samples only -x[m],
// for the next a samples 2x[m-a] - x[m] as well, and from then on all three,
// so that after 2a samples C is exactly the correlation over the last 2a
// samples. `warm` rises then. I and Q are processed the same way.
// Interface: `restart` (one clock) clears the correlation and the start-up
// sequence and must be given after `a` changes. `in_valid` qualifies a new
// sample pair; `out_valid` qualifies the matching correlation, three clocks
// later. 1 <= a < DEPTH.
// The recursion, the start-up sequence and the two-BRAM structure follow the
// reference design; the pipeline and widths are this design's choices
// (DEPTH 2048 covers a = 1250, the longest half period at the lowest BLF of
// 40 kHz sampled at 100 MS/s).
module correlator #(
  parameter int unsigned ADC_W  = 14,
  parameter int unsigned CORR_W = 28,
  parameter int unsigned DEPTH  = 2048,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     restart,
  input  logic [15:0]              a,
  input  logic                     in_valid,
  input  logic signed [ADC_W-1:0]  i_in,
  input  logic signed [ADC_W-1:0]  q_in,
  output logic                     out_valid,
  output logic                     warm,
  output logic signed [CORR_W-1:0] corr_i,
  output logic signed [CORR_W-1:0] corr_q
);

  localparam int unsigned DW = 2 * ADC_W;

  typedef enum logic [1:0] { PH_FIRST, PH_SECOND, PH_FULL } phase_e;

  logic [AW-1:0]    wp, wp1;
  logic [AW-1:0]    a_addr;
  logic [DW-1:0]    d1_rd, d2_rd, x_s1, x_s2, xa_s2;
  logic             v1, v2;
  logic [16:0]      n;           // samples since restart, saturating at 2a
  phase_e           ph1, ph2;
  logic             w1, w2;      // window complete for this sample

  assign a_addr = a[AW-1:0];

  // first delay line: x[m] in, x[m-a] out
  dp_bram #(.DW(DW), .DEPTH(DEPTH)) u_fifo1 (
    .clk,
    .a_en(in_valid), .a_we(1'b1), .a_addr(wp), .a_wdata({i_in, q_in}), .a_rdata(),
    .b_en(in_valid), .b_we(1'b0), .b_addr(wp - a_addr), .b_wdata('0), .b_rdata(d1_rd)
  );

  // second delay line: x[m-a] in, x[m-2a] out
  dp_bram #(.DW(DW), .DEPTH(DEPTH)) u_fifo2 (
    .clk,
    .a_en(v1), .a_we(1'b1), .a_addr(wp1), .a_wdata(d1_rd), .a_rdata(),
    .b_en(v1), .b_we(1'b0), .b_addr(wp1 - a_addr), .b_wdata('0), .b_rdata(d2_rd)
  );

  // correlator state machine: pointers and start-up sequence
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; wp1 <= '0; v1 <= 1'b0; v2 <= 1'b0; n <= '0;
      x_s1 <= '0; x_s2 <= '0; xa_s2 <= '0; ph1 <= PH_FIRST; ph2 <= PH_FIRST;
      w1 <= 1'b0; w2 <= 1'b0;
    end else begin
      v1 <= in_valid && !restart;
      v2 <= v1 && !restart;
      if (restart) begin
        n <= '0;
      end else if (in_valid) begin
        wp   <= wp + 1'b1;
        wp1  <= wp;
        x_s1 <= {i_in, q_in};
        ph1  <= (n < {1'b0, a}) ? PH_FIRST : (n < {a, 1'b0}) ? PH_SECOND : PH_FULL;
        w1   <= (n + 1'b1 >= {a, 1'b0});
        if (n < {a, 1'b0}) n <= n + 1'b1;
      end
      if (v1) begin
        x_s2  <= x_s1;
        xa_s2 <= d1_rd;
        ph2   <= ph1;
        w2    <= w1;
      end
    end
  end

  // the accumulation, per channel
  logic signed [ADC_W-1:0] xi, xq, xai, xaq, x2i, x2q;
  assign {xi, xq}   = x_s2;
  assign {xai, xaq} = xa_s2;
  assign {x2i, x2q} = d2_rd;

  function automatic logic signed [CORR_W-1:0] step(
      logic signed [CORR_W-1:0] c, phase_e ph,
      logic signed [ADC_W-1:0] x, logic signed [ADC_W-1:0] xa, logic signed [ADC_W-1:0] x2);
    logic signed [CORR_W-1:0] r;
    r = c - CORR_W'(x);
    if (ph != PH_FIRST) r = r + (CORR_W'(xa) <<< 1);
    if (ph == PH_FULL)  r = r - CORR_W'(x2);
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      corr_i <= '0; corr_q <= '0; out_valid <= 1'b0; warm <= 1'b0;
    end else begin
      out_valid <= v2 && !restart;
      if (restart) begin
        corr_i <= '0; corr_q <= '0; warm <= 1'b0;
      end else if (v2) begin
        corr_i <= step(corr_i, ph2, xi, xai, x2i);
        corr_q <= step(corr_q, ph2, xq, xaq, x2q);
        warm   <= w2;
      end
    end
  end

endmodule
