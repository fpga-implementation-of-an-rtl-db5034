// eth_tx: 10BaseT transmitter driving the pair txdp/txdm.
//
// A frame is fed as a byte stream (in_valid/in_ready handshake, in_last on
// the final byte). The transmitter sends 7 preamble bytes 0x55 and the start
// frame delimiter 0xD5, then the bytes of the stream, zero padding up to 60
// bytes, and the frame check sequence (complemented CRC-32, least significant
// byte first). Every bit goes out LSB first in Manchester code: the first half
// of the bit cell carries the complement of the bit, the second half the bit.
// After the frame the line is held high for TP_IDL_HALF half-bits (end of
// transmission delimiter), then both outputs go low and no new frame starts
// for an interframe gap of 96 bit times. While idle a link test pulse
// (txdp high for about 100 ns) is sent every NLP_PERIOD cycles (16 ms).
// Timing: half-bit instants come from a phase accumulator that adds 2*BIT_HZ
// per clock and ticks when it passes CLK_HZ (both divided by their greatest
// common divisor), so at 48 MHz a half-bit lasts 2 or 3 cycles (2.4 on
// average) and the bit rate is exactly 10 Mb/s on average. txdm is the
// complement of txdp while transmitting; both are low when the line is idle.
// A byte is taken from the stream as soon as the previous one has been loaded
// for sending; a stream that has no byte ready when one is needed ends the
// frame early without an FCS (underrun pulse).
// Padding, FCS generation, delimiter, interframe gap and link pulses follow the
// 10BaseT standard; their exact lengths here are this design's choice.
module eth_tx #(
  parameter int unsigned CLK_HZ      = 48_000_000,
  parameter int unsigned BIT_HZ      = 10_000_000,
  parameter int unsigned NLP_PERIOD  = CLK_HZ / 1000 * 16,
  parameter int unsigned TP_IDL_HALF = 6
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  input  logic       in_last,
  output logic       in_ready,
  output logic       busy,
  output logic       underrun,
  output logic       nlp,       // high while a link test pulse is sent
  output logic       txdp,
  output logic       txdm
);
  import hub_pkg::*;

  localparam int unsigned MIN_DATA = 60;                              // bytes before the FCS
  localparam int unsigned IFG_HALF = 192;                             // 96 bit times
  localparam int unsigned NLP_CYC  = (CLK_HZ + BIT_HZ - 1) / BIT_HZ;  // ~100 ns
  localparam int unsigned NW = $clog2(NLP_PERIOD + 1);

  typedef enum logic [2:0] {S_IDLE, S_NLP, S_PRE, S_DATA, S_PAD, S_FCS, S_ETD, S_IFG} state_t;
  state_t state;

  // ---------------- half-bit tick ----------------
  // Phase accumulator in units of gcd(2*BIT_HZ, CLK_HZ): at 48 MHz it adds 5
  // modulo 12, so it needs only 4 bits.
  function automatic int unsigned gcd(input int unsigned a, input int unsigned b);
    int unsigned x = a, y = b, t;
    while (y != 0) begin
      t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction
  localparam int unsigned G       = gcd(2 * BIT_HZ, CLK_HZ);
  localparam int unsigned ACC_INC = 2 * BIT_HZ / G;
  localparam int unsigned ACC_MOD = CLK_HZ / G;
  localparam int unsigned AW      = $clog2(ACC_MOD + ACC_INC + 1);

  logic [AW-1:0] acc;
  logic          tick;
  always_ff @(posedge clk) begin
    if (rst) begin
      acc  <= '0;
      tick <= 1'b0;
    end else if (acc + AW'(ACC_INC) >= AW'(ACC_MOD)) begin
      acc  <= acc + AW'(ACC_INC) - AW'(ACC_MOD);
      tick <= 1'b1;
    end else begin
      acc  <= acc + AW'(ACC_INC);
      tick <= 1'b0;
    end
  end

  // ---------------- byte holding register ----------------
  logic       hold_valid, hold_last;
  logic [7:0] hold;
  logic       take_hold;           // the next byte to send is the held one
  logic       do_take;             // ... and it is loaded now
  assign in_ready = !hold_valid && (state == S_IDLE || state == S_PRE || state == S_DATA);

  always_ff @(posedge clk) begin
    if (rst) begin
      hold_valid <= 1'b0;
      hold_last  <= 1'b0;
      hold       <= '0;
    end else if (in_valid && in_ready) begin
      hold_valid <= 1'b1;
      hold_last  <= in_last;
      hold       <= in_data;
    end else if (do_take) begin
      hold_valid <= 1'b0;
    end
  end

  // ---------------- serializer ----------------
  logic [7:0]    shreg;
  logic [2:0]    bit_idx;
  logic          half;           // 0: first half of the bit cell is next
  logic [7:0]    cnt;            // bytes sent in PRE / FCS, half-bits in ETD / IFG
  logic [10:0]   data_cnt;       // data + pad bytes loaded
  logic          last_loaded;    // the byte being sent is the stream's last
  logic [31:0]   crc;
  logic [NW-1:0] nlp_timer;

  // what to send after the current byte
  state_t     nxt_state;
  logic [7:0] nxt_byte;
  logic       nxt_is_data;       // the next byte counts into the CRC
  always_comb begin
    nxt_state   = state;
    nxt_byte    = 8'h00;
    nxt_is_data = 1'b0;
    take_hold   = 1'b0;
    unique case (state)
      S_PRE: begin
        if (cnt == 8'd7) begin
          nxt_state   = S_DATA;
          nxt_byte    = hold;
          nxt_is_data = 1'b1;
          take_hold   = 1'b1;
        end else begin
          nxt_byte = (cnt == 8'd6) ? 8'hD5 : 8'h55;
        end
      end
      S_DATA, S_PAD: begin
        if (state == S_DATA && !last_loaded) begin
          if (hold_valid) begin
            nxt_byte    = hold;
            nxt_is_data = 1'b1;
            take_hold   = 1'b1;
          end else begin
            nxt_state = S_ETD;       // underrun
          end
        end else if (data_cnt < 11'(MIN_DATA)) begin
          nxt_state   = S_PAD;
          nxt_is_data = 1'b1;
        end else begin
          nxt_state = S_FCS;
          nxt_byte  = ~crc[7:0];
        end
      end
      S_FCS: begin
        if (cnt == 8'd3) nxt_state = S_ETD;
        else             nxt_byte  = ~crc[8*(cnt+1) +: 8];
      end
      default: ;
    endcase
  end

  // a new byte is loaded with the second half of bit 7 of the current one
  assign do_take = tick && half && bit_idx == 3'd7 && take_hold &&
                   (state == S_PRE || state == S_DATA);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      shreg       <= '0;
      bit_idx     <= '0;
      half        <= 1'b0;
      cnt         <= '0;
      data_cnt    <= '0;
      last_loaded <= 1'b0;
      crc         <= CRC32_INIT;
      nlp_timer   <= '0;
      txdp        <= 1'b0;
      txdm        <= 1'b0;
      underrun    <= 1'b0;
    end else begin
      underrun <= 1'b0;
      unique case (state)
        S_IDLE: begin
          txdp <= 1'b0;
          txdm <= 1'b0;
          if (hold_valid && tick) begin
            state       <= S_PRE;
            shreg       <= 8'h55;
            bit_idx     <= '0;
            half        <= 1'b0;
            cnt         <= '0;
            data_cnt    <= '0;
            last_loaded <= 1'b0;
            crc         <= CRC32_INIT;
          end else if (nlp_timer >= NW'(NLP_PERIOD - 1)) begin
            state     <= S_NLP;
            nlp_timer <= '0;
          end else begin
            nlp_timer <= nlp_timer + 1'b1;
          end
        end
        S_NLP: begin
          txdp      <= 1'b1;
          txdm      <= 1'b0;
          nlp_timer <= nlp_timer + 1'b1;
          if (nlp_timer >= NW'(NLP_CYC - 1)) begin
            state     <= S_IDLE;
            nlp_timer <= '0;
          end
        end
        S_PRE, S_DATA, S_PAD, S_FCS: if (tick) begin
          txdp <= half ? shreg[0] : ~shreg[0];
          txdm <= half ? ~shreg[0] : shreg[0];
          half <= ~half;
          if (half) begin
            shreg   <= shreg >> 1;
            bit_idx <= bit_idx + 1'b1;
            if (bit_idx == 3'd7) begin
              shreg <= nxt_byte;
              state <= nxt_state;
              cnt   <= (nxt_state != state) ? 8'd0 : cnt + 1'b1;
              if (nxt_is_data) begin
                crc      <= crc32_byte(crc, nxt_byte);
                data_cnt <= data_cnt + 1'b1;
              end
              if (take_hold) last_loaded <= hold_last;
              if (state == S_DATA && nxt_state == S_ETD) underrun <= 1'b1;
            end
          end
        end
        S_ETD: if (tick) begin
          if (cnt == 8'(TP_IDL_HALF)) begin
            txdp  <= 1'b0;
            txdm  <= 1'b0;
            state <= S_IFG;
            cnt   <= '0;
          end else begin
            txdp <= 1'b1;
            txdm <= 1'b0;
            cnt  <= cnt + 1'b1;
          end
        end
        S_IFG: begin
          txdp <= 1'b0;
          txdm <= 1'b0;
          if (tick) begin
            cnt <= cnt + 1'b1;
            if (cnt == 8'(IFG_HALF - 1)) begin
              state     <= S_IDLE;
              nlp_timer <= '0;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE && state != S_NLP) || hold_valid;
  assign nlp  = (state == S_NLP);

  // the holding register is only emptied by a load
  always_ff @(posedge clk) if (!rst && do_take) assert (hold_valid);
endmodule
