// tb_opb_decoder: self-checking testbench of the peripheral bus decoder.
//
// Behavioural slaves stand on every port; each answers a request after a set
// delay with read data made of its own number and the address. For addresses
// of every window of the map (RS232 ... RS232_3, Ethernet, debug, GPIO, both
// ends of the external SRAM range) the testbench checks that exactly that
// slave is selected and that its data and acknowledge come back; for an
// unmapped address (also the window a fifth UART would use) it checks the
// error acknowledge in the cycle after the request (as fast as the fastest
// slave); for a slave that never answers, the error
// acknowledge after TIMEOUT cycles.
module tb_opb_decoder;
  import hub_pkg::*;

  localparam int NU = 4;
  localparam int NS = NU + 4;       // uarts, eth, mem, dbg, gpio
  localparam int TIMEOUT = 16;

  logic clk = 0, rst = 1;
  opb_req_t m_req;
  opb_rsp_t m_rsp;
  opb_req_t sreq [NS];
  opb_rsp_t srsp [NS];
  opb_req_t uart_req [NU];
  opb_rsp_t uart_rsp [NU];
  int checks = 0, failures = 0;
  int delay [NS];
  bit silent [NS];

  opb_decoder #(.NUM_UARTS(NU), .TIMEOUT(TIMEOUT)) dut (
    .clk, .rst, .m_req, .m_rsp, .uart_req, .uart_rsp,
    .eth_req(sreq[NU]), .eth_rsp(srsp[NU]),
    .mem_req(sreq[NU+1]), .mem_rsp(srsp[NU+1]),
    .dbg_req(sreq[NU+2]), .dbg_rsp(srsp[NU+2]),
    .gpio_req(sreq[NU+3]), .gpio_rsp(srsp[NU+3])
  );

  for (genvar k = 0; k < NU; k++) begin : g_u
    assign sreq[k] = uart_req[k];
    assign uart_rsp[k] = srsp[k];
  end

  always #5 clk = ~clk;

  // behavioural slaves
  for (genvar s = 0; s < NS; s++) begin : g_slave
    int cnt = 0;
    bit acked = 0;
    always @(posedge clk) begin
      srsp[s] <= '0;
      if (!sreq[s].select) begin cnt = 0; acked = 0; end
      else if (!acked && !silent[s]) begin
        if (cnt == delay[s]) begin
          srsp[s].xferack <= 1'b1;
          srsp[s].rdata   <= sreq[s].rnw ? {s[7:0], sreq[s].addr[23:0]} : 32'h0;
          acked = 1;
        end
        cnt++;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one read; returns the cycles to the answer and which kind it was
  task automatic access(input logic [31:0] a, output int cycles, output bit ok, output bit err,
                        output logic [31:0] rd, output int nsel, output int who);
    @(posedge clk);
    m_req <= '{select: 1'b1, rnw: 1'b1, addr: a, wdata: 32'h0};
    cycles = 0; nsel = 0; who = -1;
    do begin
      @(posedge clk);
      cycles++;
      for (int s = 0; s < NS; s++) if (sreq[s].select) begin nsel = (who == s) ? nsel : nsel + 1; who = s; end
    end while (!m_rsp.xferack && !m_rsp.errack && cycles < 100);
    ok = m_rsp.xferack; err = m_rsp.errack; rd = m_rsp.rdata;
    m_req.select <= 1'b0;
    @(posedge clk);
  endtask

  initial begin
    logic [31:0] addrs [10] = '{32'h4066_0008, 32'h4064_0004, 32'h4062_0000, 32'h4060_000C,
                                32'h4080_2000, 32'h2008_0000, 32'h200F_FFFC, 32'h4140_0010,
                                32'h4000_0004, 32'h4066_FFFC};
    int          exp   [10] = '{0, 1, 2, 3, NU, NU+1, NU+1, NU+2, NU+3, 0};
    int cyc, nsel, who;
    bit ok, err;
    logic [31:0] rd;
    m_req = '0;
    foreach (delay[s]) begin delay[s] = s % 3; silent[s] = 0; end
    repeat (3) @(posedge clk);
    rst = 0;
    foreach (addrs[i]) begin
      access(addrs[i], cyc, ok, err, rd, nsel, who);
      check(ok && !err, $sformatf("%08h acknowledged", addrs[i]));
      check(nsel == 1 && who == exp[i], $sformatf("%08h selects slave %0d (want %0d, %0d selected)", addrs[i], who, exp[i], nsel));
      check(rd == {8'(exp[i]), addrs[i][23:0]}, $sformatf("%08h read data %08h", addrs[i], rd));
      check(cyc == delay[exp[i]] + 2, $sformatf("%08h answered after %0d cycles", addrs[i], cyc));
    end
    // unmapped: error acknowledge next cycle
    for (int i = 0; i < 4; i++) begin
      logic [31:0] a;
      a = (i == 0) ? 32'h405E_0000 : (i == 1) ? 32'h2007_FFFC : (i == 2) ? 32'h2010_0000 : 32'h5000_0000;
      access(a, cyc, ok, err, rd, nsel, who);
      check(err && !ok && nsel == 0 && cyc == 2, $sformatf("%08h unmapped: err=%0d sel=%0d cyc=%0d", a, err, nsel, cyc));
    end
    // silent slave: error acknowledge after the timeout
    silent[NU+3] = 1;
    access(32'h4000_0000, cyc, ok, err, rd, nsel, who);
    check(err && !ok, "silent slave answered with error");
    check(cyc == TIMEOUT + 2, $sformatf("timeout after %0d cycles", cyc));
    silent[NU+3] = 0;
    access(32'h4000_0000, cyc, ok, err, rd, nsel, who);
    check(ok && !err, "slave answers again after a timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
