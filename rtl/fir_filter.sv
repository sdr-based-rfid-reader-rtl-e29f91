// fir_filter: reloadable pulse-shaping FIR of the transmitter.
//
// A TAPS-tap direct-form FIR (51 taps by default) on the 2 MS/s PIE level.
// The filter runs much faster than its sample rate, so it is time-multiplexed:
// NMAC multiply-accumulate units (two, like the two DSP slices of the
// reference implementation) walk through the taps, tap k and tap k+ceil(TAPS/2)
// at the same time, and finish a sample in ceil(TAPS/NMAC) clocks after `nd`.
// The result is the full-precision sum shifted right by OUT_SHIFT and
// saturated to 16 bits; with the default coefficients (sum 447,512) an input
// of 2^31/sum gives full scale, which is how the txpwr register is set.
// Coefficient reload: `coef_ld` restarts the load pointer at tap 0, and each
// `coef_we` writes `coef_din` to the next tap, so a processor writes coef_ld
// once and then the TAPS coefficients in order.
// Timing: `nd` marks a new input sample (it must be at least
// ceil(TAPS/NMAC)+2 clocks after the previous one); `rdy` pulses with `dout`
// valid LATENCY = ceil(TAPS/NMAC)+1 clocks after `nd`.
// Tap count, width and the reload register follow the reader description;
// the default coefficient set is this design's own: a triangular window
// c[k] = 662 * (26 - |k - 25|), chosen so that its sum matches the
// documented txpwr setting of 4800.
module fir_filter #(
  parameter int unsigned TAPS      = 51,
  parameter int unsigned NMAC      = 2,
  parameter int unsigned OUT_SHIFT = 16,
  parameter int unsigned TRI_SCALE = 662
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               nd,
  input  logic signed [15:0] din,
  input  logic               coef_ld,
  input  logic               coef_we,
  input  logic signed [15:0] coef_din,
  output logic signed [15:0] dout,
  output logic               rdy
);

  localparam int unsigned STEPS = (TAPS + NMAC - 1) / NMAC;
  localparam int unsigned ACC_W = 32 + $clog2(TAPS) + 1;

  function automatic logic signed [15:0] default_coef(int k);
    int d = k - int'(TAPS / 2);
    if (d < 0) d = -d;
    return 16'(int'(TRI_SCALE) * (int'(TAPS / 2) + 1 - d));
  endfunction

  logic signed [15:0] hist [TAPS];
  logic signed [15:0] coef [TAPS];
  logic [$clog2(TAPS+1)-1:0] ld_ptr;
  logic [$clog2(STEPS+1)-1:0] step;
  logic busy;
  logic signed [ACC_W-1:0] acc [NMAC];

  // coefficient memory with reload port
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) coef[k] <= default_coef(k);
      ld_ptr <= '0;
    end else if (coef_ld) begin
      ld_ptr <= '0;
    end else if (coef_we) begin
      if (int'(ld_ptr) < int'(TAPS)) coef[ld_ptr] <= coef_din;
      ld_ptr <= (int'(ld_ptr) < int'(TAPS)) ? ld_ptr + 1'b1 : ld_ptr;
    end
  end

  // sample history
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) hist[k] <= '0;
    end else if (nd) begin
      hist[0] <= din;
      for (int k = 1; k < TAPS; k++) hist[k] <= hist[k-1];
    end
  end

  // time-multiplexed multiply-accumulate
  logic signed [ACC_W-1:0] total, sh;
  always_comb begin
    total = '0;
    for (int m = 0; m < NMAC; m++) total += acc[m];
    sh = total >>> OUT_SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; step <= '0; rdy <= 1'b0; dout <= '0;
      for (int m = 0; m < NMAC; m++) acc[m] <= '0;
    end else begin
      rdy <= 1'b0;
      if (nd) begin
        busy <= 1'b1; step <= '0;
        for (int m = 0; m < NMAC; m++) acc[m] <= '0;
      end else if (busy) begin
        for (int m = 0; m < NMAC; m++) begin
          automatic int idx;
          idx = m * int'(STEPS) + int'(step);
          if (idx < int'(TAPS))
            acc[m] <= acc[m] + ACC_W'(hist[idx] * coef[idx]);
        end
        if (int'(step) == int'(STEPS) - 1) begin
          busy <= 1'b0;
        end
        step <= step + 1'b1;
      end else if (int'(step) == int'(STEPS)) begin
        // all products summed: scale and saturate
        if (sh > 32767)       dout <= 16'sd32767;
        else if (sh < -32768) dout <= -16'sd32768;
        else                  dout <= 16'(sh);
        rdy  <= 1'b1;
        step <= '0;
      end
    end
  end

  a_nd_spacing: assert property (@(posedge clk) disable iff (!rst_n) nd |-> !busy && int'(step) != int'(STEPS));

endmodule
