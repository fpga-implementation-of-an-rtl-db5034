// eth_rx_framer: preamble synchronizer and de-serializer of the 10BaseT receiver.
//
// Takes the recovered bit stream of eth_manchester_rx. While hunting it counts
// alternating bits of the preamble (1010...); two ones in a row after at least
// PRE_MIN alternating bits are the end of the start frame delimiter (0xD5) and
// start the frame (sof pulse). From then on bits are shifted in LSB first and
// every eighth bit delivers a byte (byte_valid/byte_data). The end of carrier
// ends the frame (eof pulse); a partial last byte (dribble bits) is dropped.
// An end of carrier or a non-alternating pair while hunting restarts the hunt.
// PRE_MIN is this design's choice: the receiver may lose the first preamble
// bits while it locks, so it does not ask for all 62 of them.
module eth_rx_framer #(
  parameter int unsigned PRE_MIN = 8
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       bit_valid,
  input  logic       bit_val,
  input  logic       eoc,
  output logic       sof,
  output logic       byte_valid,
  output logic [7:0] byte_data,
  output logic       eof,
  output logic       in_frame
);
  localparam int unsigned PW = $clog2(PRE_MIN + 1);

  logic [PW-1:0] alt_cnt;   // alternating preamble bits seen (saturating)
  logic          prev_bit;
  logic [6:0]    shreg;     // the bits of the byte received so far
  logic [2:0]    bit_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_frame   <= 1'b0;
      alt_cnt    <= '0;
      prev_bit   <= 1'b0;
      shreg      <= '0;
      bit_cnt    <= '0;
      sof        <= 1'b0;
      eof        <= 1'b0;
      byte_valid <= 1'b0;
      byte_data  <= '0;
    end else begin
      sof        <= 1'b0;
      eof        <= 1'b0;
      byte_valid <= 1'b0;
      if (eoc) begin
        eof      <= in_frame;
        in_frame <= 1'b0;
        alt_cnt  <= '0;
        bit_cnt  <= '0;
      end else if (bit_valid) begin
        prev_bit <= bit_val;
        if (!in_frame) begin
          if (alt_cnt != '0 && bit_val == prev_bit) begin
            if (bit_val && alt_cnt >= PW'(PRE_MIN)) begin
              in_frame <= 1'b1;   // "11" closing the SFD
              sof      <= 1'b1;
              bit_cnt  <= '0;
            end
            alt_cnt <= PW'(1);
          end else if (alt_cnt != PW'(PRE_MIN)) begin
            alt_cnt <= alt_cnt + 1'b1;
          end
        end else begin
          shreg   <= {bit_val, shreg[6:1]};
          bit_cnt <= bit_cnt + 1'b1;
          if (bit_cnt == 3'd7) begin
            byte_valid <= 1'b1;
            byte_data  <= {bit_val, shreg};
          end
        end
      end
    end
  end
endmodule
