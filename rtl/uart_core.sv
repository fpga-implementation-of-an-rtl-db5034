// uart_core: peripheral-bus UART for one RFID reader link.
//
// The hub gives each RFID reader its own UART in the FPGA, all set to 38400
// baud, 8 data bits, odd parity and 1 stop bit. This core joins a transmitter
// and a receiver (uart_tx, uart_rx) to the peripheral bus through a FIFO in
// each direction and four word registers (offsets within the core's window):
//   0x0 RX  read : oldest received byte in [7:0], removed from the FIFO
//   0x4 TX  write: byte [7:0] appended to the transmit FIFO
//   0x8 STAT read: [0] rx data valid, [1] rx FIFO full, [2] tx FIFO empty,
//                  [3] tx FIFO full, [5] overrun, [6] framing error,
//                  [7] parity error; the three error flags clear when read
//   0xC CTRL write: [0] clear tx FIFO, [1] clear rx FIFO
// The register layout, FIFO depth and error flags are this design's choice,
// in the style of a small "lite" UART; the framing and baud rate follow the hub.
// Bus timing: a selected request is acknowledged (xferack) in the next cycle,
// once per request; the master drops select after the acknowledge.
// A character received while the rx FIFO is full is dropped and sets overrun.
module uart_core #(
  parameter int unsigned CLK_HZ     = 48_000_000,
  parameter int unsigned BAUD       = 38_400,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  hub_pkg::opb_req_t req,
  output hub_pkg::opb_rsp_t rsp,
  input  logic              rxd,
  output logic              txd
);
  import hub_pkg::*;

  // ---------------- serial side ----------------
  logic       tx_ready;
  logic       rx_valid, rx_perr, rx_ferr;
  logic [7:0] rx_data;

  logic       txf_empty, txf_full, rxf_empty, rxf_full;
  logic [7:0] txf_data, rxf_data;
  logic       txf_push, rxf_pop, txf_clr, rxf_clr;
  logic       overrun, frame_err, parity_err;

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (
    .clk, .rst, .valid(!txf_empty), .data(txf_data), .ready(tx_ready), .txd
  );

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
    .clk, .rst, .rxd, .valid(rx_valid), .data(rx_data),
    .parity_err(rx_perr), .frame_err(rx_ferr)
  );

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_txf (
    .clk, .rst, .clear(txf_clr), .push(txf_push), .wr_data(req.wdata[7:0]),
    .pop(tx_ready && !txf_empty), .rd_data(txf_data), .empty(txf_empty), .full(txf_full)
  );

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_rxf (
    .clk, .rst, .clear(rxf_clr), .push(rx_valid), .wr_data(rx_data),
    .pop(rxf_pop), .rd_data(rxf_data), .empty(rxf_empty), .full(rxf_full)
  );

  // ---------------- bus side ----------------
  logic       ack_q;
  wire        access = req.select && !ack_q;
  wire [3:2]  reg_sel = req.addr[3:2];
  wire        rd = access && req.rnw;
  wire        wr = access && !req.rnw;

  assign txf_push = wr && reg_sel == 2'd1;
  assign txf_clr  = wr && reg_sel == 2'd3 && req.wdata[0];
  assign rxf_clr  = wr && reg_sel == 2'd3 && req.wdata[1];
  assign rxf_pop  = rd && reg_sel == 2'd0;
  wire   stat_rd  = rd && reg_sel == 2'd2;

  logic [31:0] rdata_d;
  always_comb begin
    unique case (reg_sel)
      2'd0:    rdata_d = {24'h0, rxf_empty ? 8'h00 : rxf_data};
      2'd2:    rdata_d = {24'h0, parity_err, frame_err, overrun, 1'b0,
                          txf_full, txf_empty, rxf_full, !rxf_empty};
      default: rdata_d = 32'h0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ack_q      <= 1'b0;
      rsp        <= OPB_RSP_IDLE;
      overrun    <= 1'b0;
      frame_err  <= 1'b0;
      parity_err <= 1'b0;
    end else begin
      ack_q       <= access;
      rsp.xferack <= access;
      rsp.errack  <= 1'b0;
      rsp.rdata   <= rd ? rdata_d : 32'h0;
      // error flags: set by the receiver, cleared by a status read
      if (stat_rd) begin
        overrun    <= 1'b0;
        frame_err  <= 1'b0;
        parity_err <= 1'b0;
      end
      if (rx_valid) begin
        if (rxf_full && !rxf_pop) overrun <= 1'b1;
        if (rx_ferr)              frame_err  <= 1'b1;
        if (rx_perr)              parity_err <= 1'b1;
      end
    end
  end
endmodule
