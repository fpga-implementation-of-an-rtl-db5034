// uart_rx: asynchronous serial receiver, fixed 8-O-1 framing.
//
// rxd is brought into the clock domain by two flip-flops. A falling edge on an
// idle line starts a character; the start bit is checked again half a bit
// later (a glitch returns to idle), and from there the line is sampled once per
// bit period (CLK_HZ/BAUD cycles) in the middle of each bit: eight data bits
// LSB first, the odd parity bit and the stop bit.
// Interface: valid pulses for one cycle after the stop bit's sample, with data,
// parity_err (the ones in data and parity are even) and frame_err (stop bit 0).
// Framing and baud rate are the hub's reader settings; mid-bit sampling and
// the error outputs are this design's choice.
module uart_rx #(
  parameter int unsigned CLK_HZ = 48_000_000,
  parameter int unsigned BAUD   = 38_400
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data,
  output logic       parity_err,
  output logic       frame_err
);
  localparam int unsigned BIT_CYC = CLK_HZ / BAUD;
  localparam int unsigned CW = $clog2(BIT_CYC + 1);

  typedef enum logic [1:0] {S_IDLE, S_START, S_BITS} state_t;

  state_t        state;
  logic [1:0]    sync;
  logic [CW-1:0] cnt;
  logic [3:0]    nbits;     // bits sampled after the start bit
  logic [8:0]    shreg;     // at the stop bit: parity in [8], data in [7:0]

  always_ff @(posedge clk) begin
    if (rst) sync <= 2'b11;
    else     sync <= {sync[0], rxd};
  end
  wire rx = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      cnt        <= '0;
      nbits      <= '0;
      shreg      <= '0;
      valid      <= 1'b0;
      data       <= '0;
      parity_err <= 1'b0;
      frame_err  <= 1'b0;
    end else begin
      valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (!rx) state <= S_START;
        end
        S_START: begin
          if (cnt == CW'(BIT_CYC / 2 - 1)) begin
            cnt   <= '0;
            nbits <= '0;
            state <= rx ? S_IDLE : S_BITS;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_BITS: begin
          if (cnt == CW'(BIT_CYC - 1)) begin
            cnt   <= '0;
            shreg <= {rx, shreg[8:1]};
            nbits <= nbits + 1'b1;
            if (nbits == 4'd9) begin
              state      <= S_IDLE;
              valid      <= 1'b1;
              data       <= shreg[7:0];
              parity_err <= (hub_pkg::odd_parity(shreg[7:0]) != shreg[8]);
              frame_err  <= !rx;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
