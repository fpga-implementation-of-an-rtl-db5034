// tb_eth_rx: self-checking testbench of the 10BaseT receiver at 48 MHz.
//
// The testbench drives rxd in real time, independently of the receiver's
// clock: Manchester half-bits of 50 ns (optionally a little fast or slow),
// preamble, start frame delimiter, payload and an FCS it computes with its own
// CRC-32 routine (MSB-first form of the polynomial, bit-reversed at the end).
// It checks the recovered bytes, the CRC verdict and length for good and
// corrupted frames, frames with a shortened preamble and with a clock offset,
// that link test pulses start no frame, and the byte rate (one per 800 ns)
// and end-of-frame latency. Two more receivers, clocked at 46 and 50 MHz,
// must recover the same frames.
module tb_eth_rx;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst = 1, rxd = 0;
  logic sof, byte_valid, eof, crc_ok, carrier;
  logic [7:0] byte_data;
  logic [15:0] len;
  int checks = 0, failures = 0;

  eth_rx dut (.clk, .rst, .rxd, .sof, .byte_valid, .byte_data, .eof, .crc_ok, .len, .carrier);

  always #(1000.0 / 96.0) clk = ~clk;   // 48 MHz

  // the same line also feeds receivers clocked at 46 and 50 MHz, the ends of
  // the clock range the core is meant to work in
  logic clk46 = 0, clk50 = 0;
  always #(1000.0 / 92.0)  clk46 = ~clk46;
  always #(1000.0 / 100.0) clk50 = ~clk50;
  logic [1:0]  x_sof, x_bv, x_eof, x_ok, x_car;
  logic [7:0]  x_byte [2];
  logic [15:0] x_len [2];
  eth_rx #(.CLK_HZ(46_000_000)) dut46 (.clk(clk46), .rst, .rxd, .sof(x_sof[0]), .byte_valid(x_bv[0]),
    .byte_data(x_byte[0]), .eof(x_eof[0]), .crc_ok(x_ok[0]), .len(x_len[0]), .carrier(x_car[0]));
  eth_rx #(.CLK_HZ(50_000_000)) dut50 (.clk(clk50), .rst, .rxd, .sof(x_sof[1]), .byte_valid(x_bv[1]),
    .byte_data(x_byte[1]), .eof(x_eof[1]), .crc_ok(x_ok[1]), .len(x_len[1]), .carrier(x_car[1]));
  logic [7:0]  x_got [2][$];
  bit          x_last_ok [2];
  int          x_frames [2] = '{0, 0};
  always @(posedge clk46) begin
    if (x_sof[0]) x_got[0].delete();
    if (x_bv[0]) x_got[0].push_back(x_byte[0]);
    if (x_eof[0]) begin x_frames[0]++; x_last_ok[0] = x_ok[0]; end
  end
  always @(posedge clk50) begin
    if (x_sof[1]) x_got[1].delete();
    if (x_bv[1]) x_got[1].push_back(x_byte[1]);
    if (x_eof[1]) begin x_frames[1]++; x_last_ok[1] = x_ok[1]; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // CRC-32 in the non-reflected shift form; bits enter LSB first per byte
  function automatic logic [31:0] fcs_of(input logic [7:0] b[$]);
    logic [31:0] c = 32'hFFFF_FFFF, r;
    foreach (b[i])
      for (int k = 0; k < 8; k++)
        c = (c[31] ^ b[i][k]) ? ((c << 1) ^ 32'h04C1_1DB7) : (c << 1);
    for (int k = 0; k < 32; k++) r[k] = c[31-k];
    return ~r;
  endfunction

  realtime half = 50.0;
  realtime last_edge;

  task automatic send_bit(input logic b);
    if (rxd != ~b) last_edge = $realtime;
    rxd = ~b; #(half);
    last_edge = $realtime;
    rxd = b;  #(half);
  endtask

  task automatic send_frame(input logic [7:0] body[$], input int pre_bytes);
    for (int i = 0; i < pre_bytes; i++)
      for (int k = 0; k < 8; k++) send_bit(k % 2 == 0);
    for (int k = 0; k < 8; k++) send_bit(8'hD5 >> k);
    foreach (body[i]) for (int k = 0; k < 8; k++) send_bit(body[i][k]);
    rxd = 1; #(300.0);                   // end of transmission delimiter
    rxd = 0; #(2000.0);
  endtask

  // collect the receiver's output
  logic [7:0] got[$];
  realtime    t_byte[$];
  int         n_sof = 0, n_eof = 0;
  logic       last_ok;
  logic [15:0] last_len;
  realtime    t_eof;
  always @(posedge clk) begin
    if (sof) begin n_sof++; got.delete(); t_byte.delete(); end
    if (byte_valid) begin got.push_back(byte_data); t_byte.push_back($realtime); end
    if (eof) begin n_eof++; last_ok = crc_ok; last_len = len; t_eof = $realtime; end
  end

  task automatic run_frame(input int nbytes, input bit corrupt, input int pre_bytes, input string name);
    logic [7:0] body[$];
    logic [31:0] f;
    int s0, e0;
    for (int i = 0; i < nbytes; i++) body.push_back((i % 7 == 3) ? 8'h00 : (i % 11 == 5) ? 8'hFF : 8'($urandom));
    f = fcs_of(body);
    for (int k = 0; k < 4; k++) body.push_back(f[8*k +: 8]);
    if (corrupt) body[nbytes / 2] ^= 8'h10;
    s0 = n_sof; e0 = n_eof;
    send_frame(body, pre_bytes);
    check(n_sof == s0 + 1 && n_eof == e0 + 1, {name, ": one frame seen"});
    check(got.size() == body.size(), $sformatf("%s: %0d bytes, want %0d", name, got.size(), body.size()));
    check(last_len == 16'(body.size()), {name, ": length"});
    if (got.size() == body.size()) begin
      int bad = 0;
      foreach (body[i]) if (got[i] != body[i]) bad++;
      check(bad == 0, $sformatf("%s: %0d byte mismatches", name, bad));
    end
    check(last_ok == !corrupt, $sformatf("%s: crc_ok=%0d", name, last_ok));
    for (int x = 0; x < 2; x++) begin
      check(x_got[x] == body && x_last_ok[x] == !corrupt,
            $sformatf("%s: receiver at %0d MHz: %0d bytes, crc_ok=%0d", name, x ? 50 : 46, x_got[x].size(), x_last_ok[x]));
    end
    if (t_byte.size() > 1) begin
      realtime span = t_byte[t_byte.size()-1] - t_byte[0];
      realtime want = (t_byte.size() - 1) * 16 * half;
      check(span > want - 60 && span < want + 60, $sformatf("%s: byte rate span %0t want %0t", name, span, want));
    end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst = 0;
    #1000;
    run_frame(64, 0, 7, "good 64");
    run_frame(64, 1, 7, "bad crc");
    run_frame(200, 0, 3, "short preamble");
    half = 50.01;                          // 0.02 % slow transmitter
    run_frame(300, 0, 7, "slow clock");
    half = 49.99;
    run_frame(300, 0, 7, "fast clock");
    half = 50.0;
    // end-of-frame latency: eof within 3/2 bit plus pipeline after the last mid-bit edge
    run_frame(46, 0, 7, "latency");
    // link test pulses: no frame
    begin
      int s0;
      s0 = n_sof;
      for (int i = 0; i < 5; i++) begin rxd = 1; #100; rxd = 0; #3000; end
      check(n_sof == s0, "link pulses start no frame");
    end
    // a full-size frame
    run_frame(1514, 0, 7, "max size");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency of eof measured on the "latency" frame
  initial begin
    wait (n_eof == 6);
    check(t_eof - last_edge < 300.0 + 250.0 + 100.0, $sformatf("eof latency %0t", t_eof - last_edge));
  end

  initial begin
    #5ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
