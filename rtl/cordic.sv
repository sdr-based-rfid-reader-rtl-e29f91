// cordic: pipelined vectoring CORDIC, magnitude and angle of an I/Q pair.
//
// Rotates the vector (x, y) onto the positive x axis in ITER micro-rotations
// by +-atan(2^-i); the final x is the magnitude times the CORDIC gain
// K = 1.6468, which is removed by a multiply with round(2^16 / K) = 39797.
// A vector in the left half plane is first turned by 180 degrees. The angle
// is accumulated in binary angle units (2^16 = one full turn); the table holds
// round(atan(2^-i) / (2 pi) * 2^16).
// Interface: `in_valid` with `x_in`, `y_in`; `out_valid` with `mag`
// (unsigned) and `angle` ITER + 2 clocks later. Throughput one pair per clock.
// The reference design uses a vendor CORDIC core for this step; this
// implementation and its precision are this design's own.
module cordic #(
  parameter int unsigned W    = 28,
  parameter int unsigned ITER = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  output logic                out_valid,
  output logic        [W-1:0] mag,
  output logic         [15:0] angle
);

  localparam int unsigned XW = W + 2;

  function automatic logic [15:0] atan_tab(int i);
    case (i)
      0: return 16'd8192;  1: return 16'd4836;  2: return 16'd2555;  3: return 16'd1297;
      4: return 16'd651;   5: return 16'd326;   6: return 16'd163;   7: return 16'd81;
      8: return 16'd41;    9: return 16'd20;    10: return 16'd10;   11: return 16'd5;
      12: return 16'd3;    13: return 16'd1;    14: return 16'd1;    default: return 16'd0;
    endcase
  endfunction

  logic signed [XW-1:0] xs [ITER+1];
  logic signed [XW-1:0] ys [ITER+1];
  logic        [15:0]   zs [ITER+1];
  logic                 vs [ITER+1];

  // pre-rotation into the right half plane
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs[0] <= '0; ys[0] <= '0; zs[0] <= '0; vs[0] <= 1'b0;
    end else begin
      vs[0] <= in_valid;
      if (x_in < 0) begin
        xs[0] <= -XW'(x_in); ys[0] <= -XW'(y_in); zs[0] <= 16'h8000;
      end else begin
        xs[0] <= XW'(x_in);  ys[0] <= XW'(y_in);  zs[0] <= 16'h0000;
      end
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xs[i+1] <= '0; ys[i+1] <= '0; zs[i+1] <= '0; vs[i+1] <= 1'b0;
      end else begin
        vs[i+1] <= vs[i];
        if (ys[i] >= 0) begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + atan_tab(i);
        end else begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - atan_tab(i);
        end
      end
    end
  end

  // gain correction
  logic [XW+16:0] prod;
  assign prod = XW'(xs[ITER]) * 17'd39797;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mag <= '0; angle <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= vs[ITER];
      mag       <= (prod[XW+16:16] > (XW+1)'({W{1'b1}})) ? {W{1'b1}} : W'(prod[XW+16:16]);
      angle     <= zs[ITER];
    end
  end

endmodule
