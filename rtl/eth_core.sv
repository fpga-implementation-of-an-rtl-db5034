// eth_core: the hub's own 10BaseT Ethernet peripheral.
//
// Joins the receiver (eth_rx, one input pin rxd) and the transmitter (eth_tx,
// output pair txdp/txdm) to the processor's peripheral bus with one frame
// buffer per direction. Everything runs on the single system clock, which the
// Ethernet part needs at about 48 MHz (46 to 50 MHz work).
//
// Receive: a frame that starts while the receive buffer is free is written
// into it byte by byte (destination address first, FCS last). At its end the
// buffer is held, with its length and CRC result, until the processor
// releases it; frames that start meanwhile are dropped and counted. Bytes
// beyond the buffer's size are discarded and mark the frame truncated.
// Transmit: the processor fills the transmit buffer and writes the frame
// length (without FCS); the core then streams the bytes to eth_tx, which adds
// preamble, padding and FCS.
//
// Registers (byte offsets in the core's 64 KiB window; one buffer byte per
// 32-bit word, in bits [7:0]):
//   0x0000 STATUS read : [0] rx frame held, [1] rx CRC good, [2] rx truncated,
//                        [3] tx busy, [4] carrier on rxd now,
//                        [15:8] dropped frames (saturating),
//                        [31:16] rx length in bytes, FCS included
//   0x0004 RX_RELEASE write: frees the receive buffer
//   0x0008 TX_LEN    write: [15:0] bytes to send (1..TX_BYTES); ignored while busy
//   0x2000 + 4*i     read : receive buffer byte i
//   0x4000 + 4*i     write: transmit buffer byte i
// Bus timing as the other slaves: acknowledge in the cycle after select.
// The buffer sizes, register layout and buffer hand-over are this design's
// choice; a full-size frame (1518 bytes) fits in either buffer.
// The split into a receive module with one input pin and a send module with
// the output pair txdp/txdm, and the 48 MHz clock, follow the original hub.
module eth_core #(
  parameter int unsigned CLK_HZ     = 48_000_000,
  parameter int unsigned RX_BYTES   = 2048,
  parameter int unsigned TX_BYTES   = 2048,
  parameter int unsigned NLP_PERIOD = CLK_HZ / 1000 * 16
) (
  input  logic              clk,
  input  logic              rst,
  input  hub_pkg::opb_req_t req,
  output hub_pkg::opb_rsp_t rsp,
  input  logic              rxd,
  output logic              txdp,
  output logic              txdm
);
  import hub_pkg::*;

  localparam int unsigned RAW = $clog2(RX_BYTES);
  localparam int unsigned TAW = $clog2(TX_BYTES);

  // ---------------- receive path ----------------
  logic        rx_sof, rx_bv, rx_eof, rx_crc_ok, rx_carrier;
  logic [7:0]  rx_byte;
  logic [15:0] rx_len_unused;

  eth_rx #(.CLK_HZ(CLK_HZ)) u_rx (
    .clk, .rst, .rxd, .sof(rx_sof), .byte_valid(rx_bv), .byte_data(rx_byte),
    .eof(rx_eof), .crc_ok(rx_crc_ok), .len(rx_len_unused), .carrier(rx_carrier)
  );

  logic [7:0]  rx_mem [RX_BYTES];
  logic [15:0] rx_wp;
  logic        rx_accepting, rx_held, rx_good, rx_trunc;
  logic [7:0]  rx_dropped;
  logic        rx_release;

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_wp        <= '0;
      rx_accepting <= 1'b0;
      rx_held      <= 1'b0;
      rx_good      <= 1'b0;
      rx_trunc     <= 1'b0;
      rx_dropped   <= '0;
    end else begin
      if (rx_release) rx_held <= 1'b0;
      if (rx_sof) begin
        if (!rx_held && !rx_accepting) begin
          rx_accepting <= 1'b1;
          rx_wp        <= '0;
          rx_trunc     <= 1'b0;
        end else if (rx_dropped != 8'hFF) begin
          rx_dropped <= rx_dropped + 1'b1;
        end
      end
      if (rx_bv && rx_accepting) begin
        if (rx_wp < 16'(RX_BYTES)) rx_wp <= rx_wp + 1'b1;
        else                       rx_trunc <= 1'b1;
      end
      if (rx_eof && rx_accepting) begin
        rx_accepting <= 1'b0;
        rx_held      <= 1'b1;
        rx_good      <= rx_crc_ok && !rx_trunc;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rx_bv && rx_accepting && rx_wp < 16'(RX_BYTES)) rx_mem[rx_wp[RAW-1:0]] <= rx_byte;
  end

  // ---------------- transmit path ----------------
  logic [7:0]     tx_mem [TX_BYTES];
  logic [TAW-1:0] tx_rp;
  logic [15:0]    tx_len, tx_sent;
  logic           tx_active, tx_q_valid, tx_busy_core;
  logic [7:0]     tx_q;
  logic           tx_ready, tx_start;
  logic           tx_underrun_unused, tx_nlp_unused;
  wire            tx_fire = tx_q_valid && tx_ready;

  eth_tx #(.CLK_HZ(CLK_HZ), .NLP_PERIOD(NLP_PERIOD)) u_tx (
    .clk, .rst, .in_valid(tx_q_valid), .in_data(tx_q), .in_last(tx_sent == tx_len - 1'b1),
    .in_ready(tx_ready), .busy(tx_busy_core), .underrun(tx_underrun_unused),
    .nlp(tx_nlp_unused), .txdp, .txdm
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_active  <= 1'b0;
      tx_q_valid <= 1'b0;
      tx_rp      <= '0;
      tx_sent    <= '0;
      tx_len     <= '0;
    end else if (tx_start) begin
      tx_active  <= 1'b1;
      tx_q_valid <= 1'b0;
      tx_rp      <= '0;
      tx_sent    <= '0;
      tx_len     <= req.wdata[15:0];
    end else if (tx_active) begin
      if (tx_fire) begin
        tx_q_valid <= 1'b0;
        tx_sent    <= tx_sent + 1'b1;
        if (tx_sent == tx_len - 1'b1) tx_active <= 1'b0;
      end else if (!tx_q_valid) begin
        tx_q_valid <= 1'b1;          // tx_q is read from tx_mem[tx_rp] this cycle
        tx_rp      <= tx_rp + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (tx_active && !tx_q_valid) tx_q <= tx_mem[tx_rp];
  end

  // ---------------- bus side ----------------
  logic ack_q;
  wire  access  = req.select && !ack_q;
  wire  rd      = access && req.rnw;
  wire  wr      = access && !req.rnw;
  wire  in_rxb  = req.addr[15:13] == 3'b001;   // 0x2000..0x3FFF
  wire  in_txb  = req.addr[15:13] == 3'b010;   // 0x4000..0x5FFF
  wire  in_regs = req.addr[15:13] == 3'b000;
  wire  tx_busy = tx_active || tx_busy_core;
  wire [15:0] wlen = req.wdata[15:0];

  assign rx_release = wr && in_regs && req.addr[3:2] == 2'd1;
  assign tx_start   = wr && in_regs && req.addr[3:2] == 2'd2 && !tx_busy &&
                      wlen != 16'd0 && wlen <= 16'(TX_BYTES);

  always_ff @(posedge clk) begin
    if (wr && in_txb) tx_mem[req.addr[TAW+1:2]] <= req.wdata[7:0];
  end

  // The receive buffer is read through a register of its own (no reset, no
  // enable) so that it maps to a synchronous block RAM; the response picks
  // it or the register value one cycle after select.
  logic [7:0]  rxb_q;
  logic        rxb_sel_q;
  logic [31:0] reg_q;

  always_ff @(posedge clk) begin
    rxb_q <= rx_mem[req.addr[RAW+1:2]];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ack_q     <= 1'b0;
      rxb_sel_q <= 1'b0;
      reg_q     <= 32'h0;
    end else begin
      ack_q     <= access;
      rxb_sel_q <= rd && in_rxb;
      reg_q     <= 32'h0;
      if (rd && in_regs && req.addr[3:2] == 2'd0)
        reg_q <= {rx_wp, rx_dropped, 3'h0, rx_carrier, tx_busy, rx_trunc, rx_good, rx_held};
    end
  end

  assign rsp.xferack = ack_q;
  assign rsp.errack  = 1'b0;
  assign rsp.rdata   = rxb_sel_q ? {24'h0, rxb_q} : reg_q;
endmodule
