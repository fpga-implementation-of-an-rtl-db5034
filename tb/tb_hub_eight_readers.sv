// tb_hub_eight_readers: the RFID hub serving eight readers at once.
//
// The same end-to-end operation as tb_rfid_hub_top, with the hub built for
// the largest number of readers it is meant for (NUM_UARTS = 8, the UARTs
// at 0x40660000 down to 0x40580000): one server frame carries a command for
// each of the eight readers, all eight exchanges run at the same time, and
// the replies come back in one frame (large enough here to need no padding).
// The testbench plays the server, the readers, the processor and the
// external slaves exactly as described in tb_rfid_hub_top, and counts the
// same mechanisms except padding.
module tb_hub_eight_readers;
  timeunit 1ns; timeprecision 1ps;
  import hub_pkg::*;

  localparam int NU      = 8;
  localparam int BIT_CYC = 48_000_000 / 38_400;

  logic clk = 0, rst = 1;
  opb_req_t m_req = '0;
  opb_rsp_t m_rsp;
  opb_req_t mem_req, dbg_req, gpio_req;
  opb_rsp_t mem_rsp, dbg_rsp, gpio_rsp;
  logic [NU-1:0] uart_rxd, uart_txd;
  logic eth_rxd = 0, eth_txdp, eth_txdm;
  int checks = 0, failures = 0;

  rfid_hub_top #(.NUM_UARTS(NU)) dut (
    .clk, .rst, .m_req, .m_rsp, .mem_req, .mem_rsp, .dbg_req, .dbg_rsp,
    .gpio_req, .gpio_rsp, .uart_rxd, .uart_txd, .eth_rxd, .eth_txdp, .eth_txdm
  );

  always #(1000.0 / 96.0) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_good = 0, n_badcrc = 0, n_dropped = 0, n_padded = 0, n_nlp = 0, n_parallel = 0;
  int n_parity = 0, n_sram = 0, n_unmapped = 0, n_timeout = 0;

  // ---------------- external slaves ----------------
  logic [31:0] sram [1024];
  always @(posedge clk) begin
    mem_rsp <= '0;
    dbg_rsp <= '0;
    gpio_rsp <= '0;                                  // GPIO never answers
    if (mem_req.select && !mem_rsp.xferack) begin
      mem_rsp.xferack <= 1'b1;
      if (mem_req.rnw) mem_rsp.rdata <= sram[mem_req.addr[11:2]];
      else             sram[mem_req.addr[11:2]] <= mem_req.wdata;
    end
    if (dbg_req.select && !dbg_rsp.xferack) begin
      dbg_rsp.xferack <= 1'b1;
      dbg_rsp.rdata   <= 32'hDEB6_0001;
    end
  end

  // ---------------- processor bus master ----------------
  task automatic bus(input bit rnw, input logic [31:0] a, input logic [31:0] wd,
                     output logic [31:0] rd, output bit err);
    @(posedge clk);
    m_req <= '{select: 1'b1, rnw: rnw, addr: a, wdata: wd};
    do @(posedge clk); while (!m_rsp.xferack && !m_rsp.errack);
    rd = m_rsp.rdata; err = m_rsp.errack;
    m_req.select <= 1'b0;
  endtask
  task automatic wr(input logic [31:0] a, input logic [31:0] wd);
    logic [31:0] rd; bit err;
    bus(0, a, wd, rd, err);
    if (err) check(0, $sformatf("write %08h acknowledged", a));
  endtask
  task automatic rd(input logic [31:0] a, output logic [31:0] d);
    bit err;
    bus(1, a, 0, d, err);
    if (err) check(0, $sformatf("read %08h acknowledged", a));
  endtask

  function automatic logic [31:0] uart_base(input int k);
    return 32'h4066_0000 - 32'h0002_0000 * k;
  endfunction
  localparam logic [31:0] ETH = 32'h4080_0000;

  // ---------------- CRC and Manchester on the server side ----------------
  function automatic logic [31:0] fcs_of(input logic [7:0] b[$]);
    logic [31:0] c = 32'hFFFF_FFFF, r;
    foreach (b[i])
      for (int k = 0; k < 8; k++)
        c = (c[31] ^ b[i][k]) ? ((c << 1) ^ 32'h04C1_1DB7) : (c << 1);
    for (int k = 0; k < 32; k++) r[k] = c[31-k];
    return ~r;
  endfunction

  task automatic server_send(input logic [7:0] body[$], input bit corrupt);
    logic [7:0] all[$];
    logic [31:0] f;
    f = fcs_of(body) ^ (corrupt ? 32'h1 : 32'h0);
    all = '{8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'hD5};
    foreach (body[i]) all.push_back(body[i]);
    for (int k = 0; k < 4; k++) all.push_back(f[8*k +: 8]);
    foreach (all[i]) for (int k = 0; k < 8; k++) begin
      eth_rxd = ~all[i][k]; #50;
      eth_rxd = all[i][k];  #50;
    end
    eth_rxd = 1; #300; eth_rxd = 0; #9600;
  endtask

  // server receiver: the hub's frames
  logic s_sof, s_bv, s_eof, s_ok, s_car;
  logic [7:0] s_byte;
  logic [15:0] s_len;
  eth_rx srv_rx (.clk, .rst, .rxd(eth_txdp), .sof(s_sof), .byte_valid(s_bv), .byte_data(s_byte),
                 .eof(s_eof), .crc_ok(s_ok), .len(s_len), .carrier(s_car));
  logic [7:0] srv_bytes[$];
  int srv_frames = 0;
  bit srv_ok;
  always @(posedge clk) begin
    if (s_sof) srv_bytes.delete();
    if (s_bv) srv_bytes.push_back(s_byte);
    if (s_eof) begin srv_frames++; srv_ok = s_ok; end
  end

  // link pulses on the hub's pair: a short txdp pulse out of a long quiet line
  int pulse_len = 0, quiet = 0;
  bit quiet_before = 0;
  always @(posedge clk) begin
    if (eth_txdp && !eth_txdm) begin
      if (pulse_len == 0) quiet_before = (quiet > 1000);
      pulse_len++;
      quiet = 0;
    end else if (!eth_txdp && !eth_txdm) begin
      if (pulse_len >= 4 && pulse_len <= 6 && quiet_before) n_nlp++;
      pulse_len = 0;
      quiet++;
    end else begin
      pulse_len = 0;
      quiet = 0;
    end
  end

  // ---------------- RFID reader models ----------------
  // A reader answers a command [len, cmd...] with [len, cmd ^ (0x5A + k)...].
  logic [7:0] rd_got [NU][$];
  int         busy_readers = 0;
  bit         bad_parity_next [NU];

  for (genvar k = 0; k < NU; k++) begin : g_reader
    initial begin
      uart_rxd[k] = 1'b1;
      bad_parity_next[k] = 0;
      forever begin
        logic [7:0] cmd[$];
        cmd = '{};
        // receive a command
        do begin
          logic [10:0] f;
          @(negedge uart_txd[k]);
          repeat (BIT_CYC / 2) @(posedge clk);
          for (int i = 0; i < 11; i++) begin
            f[i] = uart_txd[k];
            if (i < 10) repeat (BIT_CYC) @(posedge clk);
          end
          check(f[9] == ~(^f[8:1]) && f[10], $sformatf("reader %0d: parity/stop of received char", k));
          cmd.push_back(f[8:1]);
          if (cmd.size() == 1) busy_readers++;
        end while (cmd.size() < int'(cmd[0]));
        rd_got[k] = cmd;
        repeat (3 * BIT_CYC) @(posedge clk);
        // answer
        for (int i = 0; i < cmd.size(); i++) begin
          logic [7:0] b;
          logic [10:0] f;
          b = (i == 0) ? cmd[0] : cmd[i] ^ (8'h5A + 8'(k));
          f = {1'b1, ~(^b) ^ bad_parity_next[k], b, 1'b0};
          for (int j = 0; j < 11; j++) begin
            uart_rxd[k] = f[j];
            repeat (BIT_CYC) @(posedge clk);
          end
        end
        uart_rxd[k] = 1'b1;
        busy_readers--;
      end
    end
  end
  always @(posedge clk) if (busy_readers == NU) n_parallel++;

  // ---------------- the operation ----------------
  // server frame: dst(6) src(6) type(2) then per reader: [reader, len, cmd bytes (len-1)]
  logic [7:0] hub_mac [6] = '{8'h02, 8'h00, 8'h00, 8'h00, 8'h00, 8'h01};
  logic [7:0] srv_mac [6] = '{8'h02, 8'h00, 8'h00, 8'h00, 8'h00, 8'h99};

  function automatic void header(ref logic [7:0] b[$], input bit to_hub);
    for (int i = 0; i < 6; i++) b.push_back(to_hub ? hub_mac[i] : srv_mac[i]);
    for (int i = 0; i < 6; i++) b.push_back(to_hub ? srv_mac[i] : hub_mac[i]);
    b.push_back(8'h88); b.push_back(8'hB5);
  endfunction

  logic [7:0] cmds [NU][$];

  initial begin
    logic [31:0] d;
    logic [7:0]  rx[$], reply_frame[$], exp_reply[$];
    logic [7:0]  body[$];
    bit err;
    int len, t;
    repeat (10) @(posedge clk);
    rst = 0;

    // ---- SRAM through the bus ----
    for (int i = 0; i < 8; i++) wr(32'h2008_0000 + 4 * i, 32'hC0DE_0000 + i);
    begin
      int ok;
      ok = 1;
      for (int i = 0; i < 8; i++) begin rd(32'h2008_0000 + 4 * i, d); if (d != 32'hC0DE_0000 + i) ok = 0; end
      check(ok == 1, "SRAM read back");
      if (ok) n_sram++;
    end
    rd(32'h4140_0000, d);
    check(d == 32'hDEB6_0001, "debug module reached");
    // ---- unmapped address and a silent slave ----
    bus(1, 32'h4050_0000, 0, d, err);
    if (err) n_unmapped++;
    bus(1, 32'h4000_0000, 0, d, err);
    if (err) n_timeout++;

    // ---- a corrupted server frame is received with a bad CRC ----
    body = '{};
    header(body, 1);
    for (int i = 0; i < 50; i++) body.push_back(8'(i));
    server_send(body, 1);
    rd(ETH, d);
    check(d[0] == 1'b1 && d[1] == 1'b0, $sformatf("bad-CRC frame flagged (status %08h)", d));
    if (d[0] && !d[1]) n_badcrc++;
    // a second frame while the first is held is dropped
    server_send(body, 0);
    rd(ETH, d);
    if (d[15:8] == 8'd1) n_dropped++;
    check(d[15:8] == 8'd1, "frame dropped while buffer held");
    wr(ETH + 4, 0);

    // ---- the command frame: one command per reader ----
    body = '{};
    header(body, 1);
    for (int k = 0; k < NU; k++) begin
      int n;
      n = 3 + k;
      cmds[k] = '{};
      cmds[k].push_back(8'(n));
      for (int i = 1; i < n; i++) cmds[k].push_back(8'($urandom));
      body.push_back(8'(k));
      foreach (cmds[k][i]) body.push_back(cmds[k][i]);
    end
    server_send(body, 0);

    // processor: take the frame
    t = 0;
    do begin rd(ETH, d); t++; end while (!d[0] && t < 1000);
    check(d[1:0] == 2'b11, $sformatf("command frame received with good CRC (status %08h)", d));
    if (d[1:0] == 2'b11) n_good++;
    len = d[31:16];
    rx = '{};
    for (int i = 0; i < len - 4; i++) begin rd(ETH + 32'h2000 + 4 * i, d); rx.push_back(d[7:0]); end
    wr(ETH + 4, 0);
    // forward each command to its reader
    begin
      int p;
      p = 14;
      for (int k = 0; k < NU; k++) begin
        int rdr, n;
        rdr = rx[p]; n = rx[p+1];
        for (int i = 0; i < n; i++) wr(uart_base(rdr) + 4, {24'h0, rx[p+1+i]});
        p += n + 1;
      end
    end
    // collect the replies, all readers polled in turn
    begin
      logic [7:0] rep [NU][$];
      int done;
      done = 0;
      t = 0;
      while (done < NU && t < 200000) begin
        for (int k = 0; k < NU; k++) begin
          rd(uart_base(k) + 8, d);
          if (d[0]) begin
            rd(uart_base(k), d);
            rep[k].push_back(d[7:0]);
            if (rep[k].size() == int'(cmds[k][0])) done++;
          end
        end
        t++;
      end
      check(done == NU, $sformatf("all readers answered (%0d)", done));
      // reply frame to the server
      reply_frame = '{};
      header(reply_frame, 0);
      for (int k = 0; k < NU; k++) begin
        reply_frame.push_back(8'(k));
        foreach (rep[k][i]) reply_frame.push_back(rep[k][i]);
      end
    end
    foreach (reply_frame[i]) wr(ETH + 32'h4000 + 4 * i, {24'h0, reply_frame[i]});
    wr(ETH + 8, reply_frame.size());
    t = srv_frames;
    wait (srv_frames == t + 1);

    // server: check the reply against what the readers must have answered
    exp_reply = '{};
    header(exp_reply, 0);
    for (int k = 0; k < NU; k++) begin
      exp_reply.push_back(8'(k));
      foreach (cmds[k][i]) exp_reply.push_back(i == 0 ? cmds[k][0] : cmds[k][i] ^ (8'h5A + 8'(k)));
    end
    for (int k = 0; k < NU; k++) check(rd_got[k] == cmds[k], $sformatf("reader %0d got its command", k));
    check(srv_ok, "reply frame CRC good at the server");
    check(srv_bytes.size() == ((exp_reply.size() < 60) ? 60 : exp_reply.size()) + 4,
          $sformatf("reply frame size %0d bytes, FCS included", srv_bytes.size()));
    if (srv_bytes.size() == 64 && exp_reply.size() < 60) n_padded++;
    begin
      int bad = 0;
      foreach (exp_reply[i]) if (i >= srv_bytes.size() || srv_bytes[i] != exp_reply[i]) bad++;
      check(bad == 0, $sformatf("reply frame content: %0d mismatches", bad));
    end

    // ---- a parity error on reader 2's line ----
    bad_parity_next[2] = 1;
    wr(uart_base(2) + 4, 32'h02);
    wr(uart_base(2) + 4, 32'h33);
    t = 0;
    do begin rd(uart_base(2) + 8, d); t++; end while (!d[7] && t < 100000);
    if (d[7]) n_parity++;
    bad_parity_next[2] = 0;

    // ---- idle until link pulses have been sent (16 ms period) ----
    t = 0;
    while (n_nlp < 1 && t < 1_000_000) begin @(posedge clk); t++; end

    check(n_good > 0,     $sformatf("good frames: %0d", n_good));
    check(n_badcrc > 0,   $sformatf("bad-CRC frames: %0d", n_badcrc));
    check(n_dropped > 0,  $sformatf("dropped frames: %0d", n_dropped));
    check(n_nlp > 0,      $sformatf("link pulses: %0d", n_nlp));
    check(n_parallel > 0, $sformatf("cycles with all readers busy: %0d", n_parallel));
    check(n_parity > 0,   $sformatf("parity errors: %0d", n_parity));
    check(n_sram > 0,     $sformatf("SRAM accesses: %0d", n_sram));
    check(n_unmapped > 0, $sformatf("unmapped errors: %0d", n_unmapped));
    check(n_timeout > 0,  $sformatf("bus timeouts: %0d", n_timeout));
    $display("mechanisms: good=%0d badcrc=%0d dropped=%0d padded=%0d nlp=%0d parallel=%0d parity=%0d sram=%0d unmapped=%0d timeout=%0d",
             n_good, n_badcrc, n_dropped, n_padded, n_nlp, n_parallel, n_parity, n_sram, n_unmapped, n_timeout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #60ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
