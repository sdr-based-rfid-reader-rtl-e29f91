// cic_interp: cascaded integrator-comb interpolator, 2 MS/s to 100 MS/s.
//
// Raises the pulse-shaped transmit signal from the FIR's 2 MS/s to the DAC
// rate of 100 MS/s. N comb stages (differential delay 1) run at the input
// rate on `nd`; their output is inserted once per input sample into the
// zero-stuffed high-rate stream that N integrators run on every clock. The
// DC gain R^(N-1) (2500 for R = 50, N = 3) is removed by a constant multiply
// by round(2^26 / R^(N-1)) and a shift of 26, so a constant input appears
// unchanged at the output.
// Interface: `nd` must pulse exactly every R clocks (the transmitter's 2 MHz
// clock enable from a 100 MHz clock). `dout` is a new sample every clock.
// Timing: a new input reaches the output 5 clocks after its `nd`.
// Interpolation factor and placement follow the reader description; the
// order N = 3 (matching the three DSP slices the CIC is said to use), the
// differential delay of 1 and the gain correction are this design's choices.
module cic_interp #(
  parameter int unsigned R  = 50,
  parameter int unsigned N  = 3,
  parameter int unsigned W  = 40   // internal register width
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               nd,
  input  logic signed [15:0] din,
  output logic signed [15:0] dout
);

  localparam longint GAIN    = longint'(R) ** (N - 1);
  localparam int     GSHIFT  = 26;
  localparam longint GMUL    = ((longint'(1) << GSHIFT) + GAIN / 2) / GAIN;

  logic signed [W-1:0] cdelay [N];   // comb delay elements
  logic signed [W-1:0] cdiff  [N];   // comb stage outputs (combinational)
  logic signed [W-1:0] comb_out;     // registered comb result
  logic signed [W-1:0] integ  [N];
  logic                inject;

  // comb section at the input rate
  always_comb begin
    logic signed [W-1:0] x;
    x = W'(din);
    for (int i = 0; i < N; i++) begin
      cdiff[i] = x - cdelay[i];
      x = cdiff[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) cdelay[i] <= '0;
      comb_out <= '0;
    end else if (nd) begin
      for (int i = 0; i < N; i++) cdelay[i] <= (i == 0) ? W'(din) : cdiff[i-1];
      comb_out <= cdiff[N-1];
    end
  end

  // zero-stuffing and integrator section at the output rate
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inject <= 1'b0;
      for (int i = 0; i < N; i++) integ[i] <= '0;
    end else begin
      inject   <= nd;
      integ[0] <= integ[0] + (inject ? comb_out : '0);
      for (int i = 1; i < N; i++) integ[i] <= integ[i] + integ[i-1];
    end
  end

  // gain correction
  logic signed [W+17:0] scaled;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scaled <= '0;
    end else begin
      scaled <= (W+18)'(integ[N-1]) * (W+18)'(GMUL);
    end
  end

  logic signed [W+17:0] shifted;
  assign shifted = scaled >>> GSHIFT;
  assign dout = (shifted > 32767) ? 16'sd32767 :
                (shifted < -32768) ? -16'sd32768 : 16'(shifted);

endmodule
