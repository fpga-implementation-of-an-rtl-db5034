// eth_manchester_rx: clock extraction for the 10BaseT receiver.
//
// The receive line (the single rxd input, already turned from the twisted pair
// into a logic level by an external differential receiver) carries Manchester
// code: every bit cell has a transition in its middle whose direction is the
// bit value (low-to-high = 1), plus a transition at the cell boundary whenever
// two equal bits follow each other. rxd is sampled at the system clock
// (CLK_HZ, about 4.8 samples per 100 ns bit at 48 MHz) after a two-flop
// synchronizer. A counter measures the time since the last mid-bit
// transition: a transition seen at least 3/4 of a bit period after it is the
// next mid-bit transition and yields a bit, an earlier one is a boundary
// transition and is skipped. The first transition on a quiet line is taken as
// a mid-bit one, which is right for the 1010... preamble (it has no boundary
// transitions). No transition for 3/2 bit periods ends the carrier.
// Outputs: bit_valid pulses with bit_val for each recovered bit; carrier is
// high from the first transition to the end of carrier; eoc pulses once then.
// Latency: a bit appears 3 cycles after its mid-bit transition reaches rxd.
// The original hub samples the line with its 48 MHz clock (46 to 50 MHz
// work); the counting scheme and its thresholds are this design's choice.
module eth_manchester_rx #(
  parameter int unsigned CLK_HZ = 48_000_000,
  parameter int unsigned BIT_HZ = 10_000_000
) (
  input  logic clk,
  input  logic rst,
  input  logic rxd,
  output logic bit_valid,
  output logic bit_val,
  output logic carrier,
  output logic eoc
);
  // ceil(3/4 bit) and ceil(3/2 bit) in clock cycles
  localparam int unsigned MID_MIN = (3 * (CLK_HZ / 1000) + 4 * (BIT_HZ / 1000) - 1) / (4 * (BIT_HZ / 1000));
  localparam int unsigned END_CYC = (3 * (CLK_HZ / 1000) + 2 * (BIT_HZ / 1000) - 1) / (2 * (BIT_HZ / 1000));
  localparam int unsigned SW = $clog2(END_CYC + 2);

  logic [2:0]    smp;      // synchronizer (1:0) and previous sample (2)
  logic [SW-1:0] since;    // cycles since the last mid-bit transition

  always_ff @(posedge clk) begin
    if (rst) smp <= '0;
    else     smp <= {smp[1:0], rxd};
  end
  wire level = smp[1];
  wire edge_seen = smp[1] ^ smp[2];

  always_ff @(posedge clk) begin
    if (rst) begin
      since     <= '0;
      carrier   <= 1'b0;
      bit_valid <= 1'b0;
      bit_val   <= 1'b0;
      eoc       <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      eoc       <= 1'b0;
      if (edge_seen && (!carrier || since >= SW'(MID_MIN))) begin
        // mid-bit transition: the new level is the bit
        carrier   <= 1'b1;
        since     <= SW'(1);
        bit_valid <= 1'b1;
        bit_val   <= level;
      end else if (carrier) begin
        if (since >= SW'(END_CYC)) begin
          carrier <= 1'b0;
          eoc     <= 1'b1;
        end else begin
          since <= since + 1'b1;
        end
      end
    end
  end

  initial assert (CLK_HZ >= 4 * BIT_HZ)
    else $error("eth_manchester_rx: need at least 4 samples per bit");
endmodule
