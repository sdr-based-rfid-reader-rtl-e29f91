// epc_crc: serial CRC-5 and CRC-16 generator for EPC Gen2 reader commands.
//
// The transmit state machine feeds every command bit it sends, MSB first, one
// bit per `en` pulse. Both checksums are kept in parallel so the choice of
// which one to append (automatic by command code, or forced by the
// configuration register) can be made after the command bits are known.
// `clr` presets both registers. `crc5` is sent as is, `crc16` is already the
// ones complement that goes on the air; both are sent MSB first.
// Timing: the outputs reflect all bits accepted up to the previous clock edge.
// The polynomials and presets are the EPC Gen2 ones (see rfid_pkg); the
// serial, one-bit-per-cycle structure is this design's choice.
module epc_crc
  import rfid_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,     // preset both CRCs
  input  logic        en,      // accept `bit_in`
  input  logic        bit_in,
  output logic [4:0]  crc5,    // CRC-5 to append
  output logic [15:0] crc16    // complemented CRC-16 to append
);

  logic [4:0]  r5;
  logic [15:0] r16;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r5  <= CRC5_PRESET;
      r16 <= CRC16_PRESET;
    end else if (clr) begin
      r5  <= CRC5_PRESET;
      r16 <= CRC16_PRESET;
    end else if (en) begin
      r5  <= crc5_step(r5, bit_in);
      r16 <= crc16_step(r16, bit_in);
    end
  end

  assign crc5  = r5;
  assign crc16 = ~r16;

endmodule
