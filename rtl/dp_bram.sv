// dp_bram: dual-port block RAM with one clock of read latency on both ports.
//
// Used for the processor-shared memories of the reader (bram_tx, bram_rx)
// and for the correlator's delay lines. Each port has an enable, a write
// enable, an address and write data; `rdata` shows the word at the address
// presented with `en` one clock earlier (read-first on a write). Writes to the
// same address from both ports in the same clock leave port B's data.
// The memory is written as an array so that synthesis maps it onto block RAM.
module dp_bram #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_wdata;
    end
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
  end

endmodule
