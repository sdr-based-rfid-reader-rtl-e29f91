// divider: serial restoring divider for unsigned integers.
//
// Computes quotient = dividend / divisor (truncated) one quotient bit per
// clock. `start` loads the operands; `done` pulses with the quotient NW
// clocks later. A zero divisor gives an all-ones quotient. Used by the
// receive decoder for the BLF estimate, where a few tens of clocks are free.
module divider #(
  parameter int unsigned NW = 32,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic [NW-1:0] quotient,
  output logic          done
);

  logic [NW-1:0] q;
  logic [DW-1:0] rem;
  logic [DW-1:0] dv;
  logic [$clog2(NW+1)-1:0] cnt;
  logic          run;
  logic [DW:0]   trial;

  assign trial = {rem[DW-1:0], q[NW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; rem <= '0; dv <= '0; cnt <= '0; run <= 1'b0; done <= 1'b0; quotient <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        q <= dividend; rem <= '0; dv <= divisor; cnt <= '0; run <= 1'b1;
      end else if (run) begin
        if (trial >= {1'b0, dv}) begin
          rem <= DW'(trial - {1'b0, dv});
          q   <= {q[NW-2:0], 1'b1};
        end else begin
          rem <= trial[DW-1:0];
          q   <= {q[NW-2:0], 1'b0};
        end
        cnt <= cnt + 1'b1;
        if (int'(cnt) == int'(NW) - 1) begin
          run  <= 1'b0;
          done <= 1'b1;
          quotient <= (trial >= {1'b0, dv}) ? {q[NW-2:0], 1'b1} : {q[NW-2:0], 1'b0};
        end
      end
    end
  end

endmodule
