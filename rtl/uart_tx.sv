// uart_tx: asynchronous serial transmitter, fixed 8-O-1 framing.
//
// Each character is sent as a start bit (0), eight data bits LSB first, an odd
// parity bit and one stop bit (1): the reader settings of the hub (38400 baud,
// 8 data bits, odd parity, 1 stop bit). A bit lasts CLK_HZ/BAUD clock cycles,
// counted by a free divider restarted at each character.
// Interface: when ready is high, a cycle with valid high takes data and starts
// the character; ready stays low until the stop bit has been sent. txd idles high.
// Framing and baud rate are the hub's reader settings; the rest is this
// design's choice.
module uart_tx #(
  parameter int unsigned CLK_HZ = 48_000_000,
  parameter int unsigned BAUD   = 38_400
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);
  localparam int unsigned BIT_CYC = CLK_HZ / BAUD;
  localparam int unsigned CW = $clog2(BIT_CYC + 1);

  logic [10:0]   shreg;     // remaining bits, LSB goes out next
  logic [3:0]    bits_left;
  logic [CW-1:0] baud_cnt;
  logic          busy;

  assign ready = !busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      txd       <= 1'b1;
      shreg     <= '1;
      bits_left <= '0;
      baud_cnt  <= '0;
    end else if (!busy) begin
      txd <= 1'b1;
      if (valid) begin
        // frame: stop, parity, data[7:0], start -- sent LSB first
        shreg     <= {1'b1, hub_pkg::odd_parity(data), data, 1'b0};
        bits_left <= 4'd11;
        baud_cnt  <= '0;
        busy      <= 1'b1;
      end
    end else begin
      if (baud_cnt == '0) begin
        txd       <= shreg[0];
        shreg     <= {1'b1, shreg[10:1]};
        bits_left <= bits_left - 1'b1;
      end
      if (baud_cnt == CW'(BIT_CYC - 1)) begin
        baud_cnt <= '0;
        if (bits_left == '0) busy <= 1'b0;
      end else begin
        baud_cnt <= baud_cnt + 1'b1;
      end
    end
  end
endmodule
