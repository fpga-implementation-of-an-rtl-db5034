// tb_uart_core: self-checking testbench of one reader UART at 48 MHz, 38400 baud.
//
// The testbench plays the RFID reader on the serial side and the processor on
// the bus side. Its own serial model sends characters with chosen parity and
// stop bits and decodes what the UART sends by sampling the middle of each
// bit period. It checks: transmitted data, odd parity, stop bit and bit length
// (1250 cycles); received data through the RX register; the parity, framing and
// overrun flags and their clearing on a status read; the FIFO clear controls.
module tb_uart_core;
  import hub_pkg::*;

  localparam int unsigned CLK_HZ  = 48_000_000;
  localparam int unsigned BAUD    = 38_400;
  localparam int unsigned BIT_CYC = CLK_HZ / BAUD;
  localparam int unsigned DEPTH   = 16;

  logic clk = 0, rst = 1;
  opb_req_t req;
  opb_rsp_t rsp;
  logic rxd = 1, txd;
  int checks = 0, failures = 0;

  uart_core dut (.clk, .rst, .req, .rsp, .rxd, .txd);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic bus_write(input logic [31:0] a, input logic [31:0] d);
    @(posedge clk);
    req <= '{select: 1'b1, rnw: 1'b0, addr: a, wdata: d};
    do @(posedge clk); while (!rsp.xferack);
    req.select <= 1'b0;
  endtask

  task automatic bus_read(input logic [31:0] a, output logic [31:0] d);
    @(posedge clk);
    req <= '{select: 1'b1, rnw: 1'b1, addr: a, wdata: 32'h0};
    do @(posedge clk); while (!rsp.xferack);
    d = rsp.rdata;
    req.select <= 1'b0;
  endtask

  // reader -> UART: one character, parity and stop bit chosen by the caller
  task automatic send_char(input logic [7:0] d, input bit bad_parity, input bit bad_stop);
    logic [10:0] f;
    logic par;
    par = ~(d[0]^d[1]^d[2]^d[3]^d[4]^d[5]^d[6]^d[7]) ^ bad_parity;
    f = {~bad_stop, par, d, 1'b0};
    for (int i = 0; i < 11; i++) begin
      rxd <= f[i];
      repeat (BIT_CYC) @(posedge clk);
    end
    rxd <= 1'b1;
    repeat (BIT_CYC) @(posedge clk);
  endtask

  // UART -> reader: decode characters from txd
  logic [7:0] got_q[$];
  int         start_len[$];
  initial begin
    forever begin
      logic [10:0] f;
      int n;
      @(negedge txd);
      n = 0;
      // measure the start bit when data bit 0 is 1 (line rises after it)
      fork
        begin
          while (txd == 1'b0 && n < 3 * BIT_CYC) begin @(posedge clk); n++; end
        end
      join_none
      repeat (BIT_CYC / 2) @(posedge clk);
      for (int i = 0; i < 11; i++) begin
        f[i] = txd;
        if (i < 10) repeat (BIT_CYC) @(posedge clk);
      end
      check(f[0] == 1'b0, "start bit low in the middle");
      check(f[10] == 1'b1, "stop bit high");
      check(f[9] == ~(^f[8:1]), "odd parity on transmitted character");
      got_q.push_back(f[8:1]);
      if (f[1]) start_len.push_back(n);
    end
  end

  initial begin
    logic [31:0] d;
    logic [7:0]  sent [4] = '{8'h02, 8'hB0, 8'h65, 8'hFF};
    req = '0;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (5) @(posedge clk);

    // status after reset: rx empty, tx empty
    bus_read(32'h8, d);
    check(d[7:0] == 8'b0000_0100, $sformatf("reset status %02h", d[7:0]));

    // ---- transmit four characters ----
    foreach (sent[i]) bus_write(32'h4, {24'h0, sent[i]});
    bus_read(32'h8, d);
    check(d[2] == 1'b0, "tx FIFO not empty while sending");
    wait (got_q.size() == 4);
    foreach (sent[i]) check(got_q[i] == sent[i], $sformatf("tx char %0d: got %02h want %02h", i, got_q[i], sent[i]));
    check(start_len.size() >= 2, "start bits measured");
    foreach (start_len[i]) check(start_len[i] >= BIT_CYC - 1 && start_len[i] <= BIT_CYC + 1,
                                 $sformatf("bit time %0d cycles, want %0d", start_len[i], BIT_CYC));
    repeat (2 * BIT_CYC) @(posedge clk);
    bus_read(32'h8, d);
    check(d[2] == 1'b1, "tx FIFO empty after sending");

    // ---- receive good characters ----
    send_char(8'hA5, 0, 0);
    send_char(8'h3C, 0, 0);
    bus_read(32'h8, d);
    check(d[0] == 1'b1 && d[7:5] == 3'b000, $sformatf("status after 2 good chars %02h", d[7:0]));
    bus_read(32'h0, d);
    check(d[7:0] == 8'hA5, $sformatf("rx char 0 %02h", d[7:0]));
    bus_read(32'h0, d);
    check(d[7:0] == 8'h3C, $sformatf("rx char 1 %02h", d[7:0]));
    bus_read(32'h8, d);
    check(d[0] == 1'b0, "rx empty after reading");

    // ---- parity error ----
    send_char(8'h81, 1, 0);
    bus_read(32'h8, d);
    check(d[7] == 1'b1 && d[6] == 1'b0, $sformatf("parity error flagged %02h", d[7:0]));
    bus_read(32'h8, d);
    check(d[7] == 1'b0, "parity flag cleared by status read");
    bus_read(32'h0, d);
    check(d[7:0] == 8'h81, "char with parity error still delivered");

    // ---- framing error ----
    send_char(8'h55, 0, 1);
    bus_read(32'h8, d);
    check(d[6] == 1'b1 && d[7] == 1'b0, $sformatf("framing error flagged %02h", d[7:0]));
    bus_write(32'hC, 32'h2);        // clear rx FIFO
    bus_read(32'h8, d);
    check(d[0] == 1'b0 && d[6] == 1'b0, "rx FIFO cleared, framing flag cleared");

    // ---- overrun ----
    for (int i = 0; i <= DEPTH; i++) send_char(8'(i + 8'h10), 0, 0);
    bus_read(32'h8, d);
    check(d[1] == 1'b1 && d[5] == 1'b1, $sformatf("rx full and overrun %02h", d[7:0]));
    for (int i = 0; i < DEPTH; i++) begin
      bus_read(32'h0, d);
      check(d[7:0] == 8'(i + 8'h10), $sformatf("fifo order %0d got %02h", i, d[7:0]));
    end
    bus_read(32'h8, d);
    check(d[0] == 1'b0 && d[5] == 1'b0, "after draining: empty, overrun cleared");

    // ---- tx FIFO clear ----
    for (int i = 0; i < 5; i++) bus_write(32'h4, 32'h33);
    bus_write(32'hC, 32'h1);
    bus_read(32'h8, d);
    check(d[2] == 1'b1, "tx FIFO cleared");
    repeat (15 * BIT_CYC) @(posedge clk);
    check(got_q.size() <= 6, $sformatf("at most the char in flight left after clear (%0d)", got_q.size()));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
