// hub_pkg: types and constants shared by the RFID hub fabric.
//
// The peripheral bus is a single-master, word-wide bus modelled on the on-chip
// peripheral bus of the hub's processor: the master holds a request (select,
// read-not-write, address, write data) until a slave answers with a one-cycle
// transfer acknowledge (or error acknowledge) and read data. The bus protocol
// details and the Ethernet core's base address are this design's own choice;
// the other base addresses and 64 KiB windows are those of the hub's address map.
// The package also holds the Ethernet CRC-32 byte update used by the receiver's
// checksum checker and by the transmitter's FCS generator.
package hub_pkg;

  typedef struct packed {
    logic        select;   // request valid; held until acknowledged
    logic        rnw;      // 1 = read, 0 = write
    logic [31:0] addr;     // byte address
    logic [31:0] wdata;    // write data
  } opb_req_t;

  typedef struct packed {
    logic [31:0] rdata;    // read data, valid while xferack is high
    logic        xferack;  // one-cycle transfer acknowledge
    logic        errack;   // one-cycle error acknowledge (nobody at that address)
  } opb_rsp_t;

  localparam opb_rsp_t OPB_RSP_IDLE = '{rdata: 32'h0, xferack: 1'b0, errack: 1'b0};

  // Address map (base addresses of 64 KiB windows on the peripheral bus).
  localparam logic [31:0] ADDR_DEBUG    = 32'h4140_0000;
  localparam logic [31:0] ADDR_MEM0_LO  = 32'h2008_0000;  // external SRAM, 512 KiB
  localparam logic [31:0] ADDR_MEM0_HI  = 32'h200F_FFFF;
  localparam logic [31:0] ADDR_RS232_0  = 32'h4066_0000;  // "RS232"; RS232_k sits 0x2_0000*k lower
  localparam logic [31:0] ADDR_UART_STEP = 32'h0002_0000;
  localparam logic [31:0] ADDR_GPIO     = 32'h4000_0000;
  localparam logic [31:0] ADDR_ETH      = 32'h4080_0000;  // own choice: not in the address map
  localparam logic [31:0] WIN64K_MASK   = 32'hFFFF_0000;

  // Ethernet CRC-32 (IEEE 802.3): reflected polynomial, bytes enter LSB first.
  localparam logic [31:0] CRC32_POLY_REFL = 32'hEDB8_8320;
  localparam logic [31:0] CRC32_INIT      = 32'hFFFF_FFFF;
  // Register value after a frame and its own FCS have been shifted in.
  localparam logic [31:0] CRC32_RESIDUE   = 32'hDEBB_20E3;

  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] data);
    logic [31:0] c;
    c = crc;
    for (int i = 0; i < 8; i++) begin
      if (c[0] ^ data[i]) c = (c >> 1) ^ CRC32_POLY_REFL;
      else                c = c >> 1;
    end
    return c;
  endfunction

  // Odd parity bit over a data byte: data plus parity hold an odd number of ones.
  function automatic logic odd_parity(input logic [7:0] d);
    return ~(^d);
  endfunction

endpackage
