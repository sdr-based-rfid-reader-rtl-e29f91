// rfidtx: reader-to-tag transmit chain.
//
// Generates the 2 MHz clock enable from the 100 MHz clock, runs the PIE
// state machine on it, shapes its output with the 51-tap FIR at 2 MS/s and
// interpolates the result by 50 with the CIC filter to the 100 MS/s DAC rate:
//
//   bram_tx -> pie_encoder --16--> fir_filter --16--> cic_interp --16--> dac
//
// The FIR and CIC take the state machine's sample strobe as their new-data
// input. Interface: configuration and start/busy come from the register
// block; the bram_tx read port is driven here; `dac` is the baseband sample
// for DAC channel A, one per clock. Timing: a level change of the state
// machine reaches `dac` about 1 + 27 + 5 clocks after its 2 MHz tick, plus
// the FIR's group delay of 25 input samples (12.5 us).
// The chain, the rates and the filter lengths follow the reader description;
// the reference design clocks the FIR at 200 MHz, this one runs the whole
// chain on a single 100 MHz clock (two multipliers still finish a sample in
// 26 of the 50 clocks available).
module rfidtx
  import rfid_pkg::*;
#(
  parameter int unsigned CE_DIV          = 50,    // 100 MHz / 2 MHz
  parameter int unsigned DELIM_TICKS     = 25,
  parameter int unsigned ON_SETTLE_TICKS = 3000,
  parameter int unsigned OFF_MIN_TICKS   = 2000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  tx_cfg_t            cfg,
  input  logic               start,
  output logic               busy,
  output logic               carrier_on,
  output logic [8:0]         rd_addr,
  input  logic [31:0]        rd_data,
  input  logic               coef_ld,
  input  logic               coef_we,
  input  logic signed [15:0] coef_din,
  output logic signed [15:0] dac
);

  // 2 MHz clock enable
  logic [$clog2(CE_DIV)-1:0] div;
  logic ce;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0; ce <= 1'b0;
    end else begin
      div <= (int'(div) == int'(CE_DIV) - 1) ? '0 : div + 1'b1;
      ce  <= (int'(div) == int'(CE_DIV) - 1);
    end
  end

  logic signed [15:0] pie_level, fir_out;
  logic pie_valid, fir_rdy;

  pie_encoder #(
    .DELIM_TICKS(DELIM_TICKS), .ON_SETTLE_TICKS(ON_SETTLE_TICKS),
    .OFF_MIN_TICKS(OFF_MIN_TICKS)
  ) u_pie (
    .clk, .rst_n, .ce, .cfg, .start, .busy, .carrier_on,
    .rd_addr, .rd_data, .sample(pie_level), .sample_valid(pie_valid)
  );

  fir_filter u_fir (
    .clk, .rst_n, .nd(pie_valid), .din(pie_level),
    .coef_ld, .coef_we, .coef_din, .dout(fir_out), .rdy(fir_rdy)
  );

  // the CIC needs its input strobe exactly every CE_DIV clocks: the FIR's
  // ready strobe is a fixed delay of the 2 MHz tick, so it qualifies
  cic_interp #(.R(CE_DIV)) u_cic (
    .clk, .rst_n, .nd(fir_rdy), .din(fir_out), .dout(dac)
  );

endmodule
