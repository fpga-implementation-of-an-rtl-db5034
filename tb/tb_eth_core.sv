// tb_eth_core: self-checking testbench of the Ethernet peripheral at 48 MHz.
//
// The transmit pair is looped back to the receive input (txdp -> rxd), so the
// core receives its own frames. Frames also come from the testbench's own
// Manchester generator on a second core instance's input for the cases the
// loopback cannot make. Checked through the bus registers only: transmit of a
// frame written into the transmit buffer, its reception into the receive
// buffer with the FCS appended by the transmitter (length and CRC good),
// padding of a short frame, dropping of frames while the buffer is held and
// the drop counter, release, truncation of a frame longer than the (shortened)
// receive buffer, a bad FCS, TX_LEN ignored while busy, and the tx busy flag.
module tb_eth_core;
  timeunit 1ns; timeprecision 1ps;
  import hub_pkg::*;

  localparam int unsigned RXB = 128;     // shortened buffers for a quick run
  localparam int unsigned TXB = 128;

  logic clk = 0, rst = 1;
  opb_req_t req, req2;
  opb_rsp_t rsp, rsp2;
  logic txdp, txdm, txdp2, txdm2;
  logic rxd2 = 0;
  int checks = 0, failures = 0;

  eth_core #(.RX_BYTES(RXB), .TX_BYTES(TXB), .NLP_PERIOD(20000)) dut (
    .clk, .rst, .req, .rsp, .rxd(txdp), .txdp, .txdm
  );
  eth_core #(.RX_BYTES(RXB), .TX_BYTES(TXB), .NLP_PERIOD(20000)) dut2 (
    .clk, .rst, .req(req2), .rsp(rsp2), .rxd(rxd2), .txdp(txdp2), .txdm(txdm2)
  );

  always #(1000.0 / 96.0) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic bus(input bit second, input bit rnw, input logic [31:0] a,
                     input logic [31:0] wd, output logic [31:0] rd);
    @(posedge clk);
    if (second) req2 <= '{select: 1'b1, rnw: rnw, addr: a, wdata: wd};
    else        req  <= '{select: 1'b1, rnw: rnw, addr: a, wdata: wd};
    do @(posedge clk); while (!(second ? rsp2.xferack : rsp.xferack));
    rd = second ? rsp2.rdata : rsp.rdata;
    if (second) req2.select <= 1'b0; else req.select <= 1'b0;
  endtask

  function automatic logic [31:0] fcs_of(input logic [7:0] b[$]);
    logic [31:0] c = 32'hFFFF_FFFF, r;
    foreach (b[i])
      for (int k = 0; k < 8; k++)
        c = (c[31] ^ b[i][k]) ? ((c << 1) ^ 32'h04C1_1DB7) : (c << 1);
    for (int k = 0; k < 32; k++) r[k] = c[31-k];
    return ~r;
  endfunction

  task automatic line_frame(input logic [7:0] body[$]);
    logic [7:0] all[$];
    all = '{8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'hD5};
    foreach (body[i]) all.push_back(body[i]);
    foreach (all[i]) for (int k = 0; k < 8; k++) begin
      rxd2 = ~all[i][k]; #50;
      rxd2 = all[i][k];  #50;
    end
    rxd2 = 1; #300; rxd2 = 0; #1000;
  endtask

  logic [31:0] d;
  logic [7:0]  frame[$];

  task automatic send_own(input int n);
    frame.delete();
    for (int i = 0; i < n; i++) frame.push_back(8'($urandom));
    foreach (frame[i]) bus(0, 0, 32'h4000 + 4 * i, {24'h0, frame[i]}, d);
    bus(0, 0, 32'h8, n, d);
  endtask

  task automatic wait_held(input bit second);
    int t = 0;
    do begin bus(second, 1, 32'h0, 0, d); t++; end while (!d[0] && t < 20000);
  endtask

  initial begin
    req = '0; req2 = '0;
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    bus(0, 1, 32'h0, 0, d);
    check(d[3:0] == 4'b0000, "idle after reset");

    // ---- 1: 64-byte frame through the loopback ----
    send_own(64);
    bus(0, 1, 32'h0, 0, d);
    check(d[3] == 1'b1, "tx busy after TX_LEN");
    bus(0, 0, 32'h8, 10, d);       // ignored while busy
    wait_held(0);
    check(d[1:0] == 2'b11 && d[31:16] == 68, $sformatf("loopback frame held, crc good, len %0d", d[31:16]));
    begin
      logic [31:0] f;
      int bad;
      f = fcs_of(frame);
      bad = 0;
      for (int i = 0; i < 64; i++) begin
        bus(0, 1, 32'h2000 + 4 * i, 0, d);
        if (d[7:0] != frame[i]) bad++;
      end
      check(bad == 0, $sformatf("loopback payload: %0d mismatches", bad));
      for (int k = 0; k < 4; k++) begin
        bus(0, 1, 32'h2000 + 4 * (64 + k), 0, d);
        check(d[7:0] == f[8*k +: 8], $sformatf("FCS byte %0d", k));
      end
    end
    repeat (2000) @(posedge clk);
    bus(0, 1, 32'h0, 0, d);
    check(d[3] == 1'b0, "tx idle again; second TX_LEN was ignored");

    // ---- 2: frame arrives while the buffer is held: dropped ----
    send_own(20);
    repeat (4000) @(posedge clk);
    bus(0, 1, 32'h0, 0, d);
    check(d[15:8] == 8'd1 && d[31:16] == 68, $sformatf("dropped count %0d, old frame kept", d[15:8]));
    bus(0, 0, 32'h4, 0, d);        // release
    bus(0, 1, 32'h0, 0, d);
    check(d[0] == 1'b0, "released");

    // ---- 3: short frame padded to 60 bytes ----
    send_own(20);
    wait_held(0);
    check(d[1:0] == 2'b11 && d[31:16] == 64, $sformatf("padded frame len %0d", d[31:16]));
    bus(0, 1, 32'h2000 + 4 * 30, 0, d);
    check(d[7:0] == 8'h00, "padding byte is zero");
    bus(0, 1, 32'h2000 + 4 * 19, 0, d);
    check(d[7:0] == frame[19], "last payload byte before padding");
    bus(0, 0, 32'h4, 0, d);

    // ---- 4: frame longer than the receive buffer: truncated ----
    begin
      logic [7:0] body[$];
      logic [31:0] f;
      for (int i = 0; i < RXB + 20; i++) body.push_back(8'(i));
      f = fcs_of(body);
      for (int k = 0; k < 4; k++) body.push_back(f[8*k +: 8]);
      line_frame(body);
      wait_held(1);
      check(d[2] == 1'b1 && d[1] == 1'b0 && d[31:16] == RXB, $sformatf("truncated: status %08h", d));
      bus(1, 1, 32'h2000 + 4 * (RXB - 1), 0, d);
      check(d[7:0] == 8'(RXB - 1), "last stored byte of truncated frame");
      bus(1, 0, 32'h4, 0, d);
      // ---- 5: bad FCS ----
      body = '{};
      for (int i = 0; i < 60; i++) body.push_back(8'($urandom));
      f = fcs_of(body) ^ 32'h0000_0100;
      for (int k = 0; k < 4; k++) body.push_back(f[8*k +: 8]);
      line_frame(body);
      wait_held(1);
      check(d[1:0] == 2'b01 && d[2] == 1'b0 && d[31:16] == 64, $sformatf("bad FCS: status %08h", d));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #4ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
