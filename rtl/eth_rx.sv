// eth_rx: 10BaseT receiver (one input pin, rxd).
//
// Three stages in a row: clock extraction (eth_manchester_rx) recovers bits
// from the Manchester-coded line; the preamble synchronizer and de-serializer
// (eth_rx_framer) find the start frame delimiter and assemble bytes; the
// checksum checker here runs the Ethernet CRC-32 over every byte of the frame,
// FCS included, and at the end of the frame compares the register with the
// fixed CRC-32 residue.
// Outputs, all one-cycle pulses: sof when a frame starts, byte_valid with
// byte_data for each byte (destination address first, FCS last), eof at the end
// of carrier with crc_ok and len (bytes, FCS included) valid in the same cycle.
// A byte comes out about 4 cycles after its last mid-bit transition on rxd,
// eof 3/2 bit periods after the last transition of the frame.
// The three stages and the single input pin are those of the original hub's
// receiver; how each stage works is this design's own, and the Manchester
// code, frame format and CRC are those of the 10BaseT standard.
module eth_rx #(
  parameter int unsigned CLK_HZ = 48_000_000,
  parameter int unsigned BIT_HZ = 10_000_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        rxd,
  output logic        sof,
  output logic        byte_valid,
  output logic [7:0]  byte_data,
  output logic        eof,
  output logic        crc_ok,
  output logic [15:0] len,
  output logic        carrier
);
  import hub_pkg::*;

  logic bit_valid, bit_val, eoc;
  logic [31:0] crc;

  eth_manchester_rx #(.CLK_HZ(CLK_HZ), .BIT_HZ(BIT_HZ)) u_clkx (
    .clk, .rst, .rxd, .bit_valid, .bit_val, .carrier, .eoc
  );

  eth_rx_framer u_framer (
    .clk, .rst, .bit_valid, .bit_val, .eoc,
    .sof, .byte_valid, .byte_data, .eof, .in_frame()
  );

  // checksum checker
  always_ff @(posedge clk) begin
    if (rst || sof) begin
      crc <= CRC32_INIT;
      len <= '0;
    end else if (byte_valid) begin
      crc <= crc32_byte(crc, byte_data);
      len <= len + 1'b1;
    end
  end
  assign crc_ok = (crc == CRC32_RESIDUE);
endmodule
