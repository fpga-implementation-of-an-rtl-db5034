// tb_eth_tx: self-checking testbench of the 10BaseT transmitter at 48 MHz.
//
// The testbench feeds frames as byte streams and decodes the txdp/txdm pair on
// its own: it measures the run lengths between transitions, turns each into a
// whole number of 50 ns half-bits (2.4 cycles each), checks that every bit
// cell is a valid Manchester symbol (second half the complement of the first)
// and rebuilds the bytes. Checked: preamble and delimiter, payload, zero
// padding to 60 bytes, the FCS (own CRC-32 routine), the end delimiter, the
// 10 Mb/s rate from the frame length in cycles, txdm = ~txdp while sending,
// the interframe gap, link test pulses (width and period, shortened here)
// and the underrun ending of a stream that runs dry.
module tb_eth_tx;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned NLP_PERIOD = 3000;

  logic clk = 0, rst = 1;
  logic in_valid = 0, in_last = 0, in_ready, busy, underrun, nlp, txdp, txdm;
  logic [7:0] in_data = 0;
  int checks = 0, failures = 0;

  eth_tx #(.NLP_PERIOD(NLP_PERIOD)) dut (
    .clk, .rst, .in_valid, .in_data, .in_last, .in_ready, .busy, .underrun, .nlp, .txdp, .txdm
  );

  always #(1000.0 / 96.0) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] fcs_of(input logic [7:0] b[$]);
    logic [31:0] c = 32'hFFFF_FFFF, r;
    foreach (b[i])
      for (int k = 0; k < 8; k++)
        c = (c[31] ^ b[i][k]) ? ((c << 1) ^ 32'h04C1_1DB7) : (c << 1);
    for (int k = 0; k < 32; k++) r[k] = c[31-k];
    return ~r;
  endfunction

  // ---------------- line decoder ----------------
  int          cyc = 0;
  bit          in_frame = 0, prev;
  int          run_len;
  int          runs[$];
  logic        run_lvl[$];
  int          frame_start, frame_end, last_frame_end = -100000;
  int          n_frames = 0, nlp_count = 0, nlp_len = 0, nlp_last = -1, nlp_in_frame = 0;
  logic [7:0]  dec_bytes[$];      // bytes after the delimiter, of the last frame
  bit          dec_ok;            // symbols valid, preamble and delimiter right
  int          dec_halves;
  int          min_gap = 1 << 30;

  function automatic void decode();
    logic h[$];
    int nb;
    dec_ok = 1;
    foreach (runs[i]) begin
      int k = (runs[i] * 10 + 12) / 24;        // round(run / 2.4)
      if (k < 1) begin k = 1; dec_ok = 0; end
      for (int j = 0; j < k; j++) h.push_back(run_lvl[i]);
    end
    dec_halves = h.size();
    // end delimiter: the last 6 half-bits are high
    for (int j = 0; j < 6; j++) if (h.pop_back() !== 1'b1) dec_ok = 0;
    if (h.size() % 2 != 0) begin dec_ok = 0; return; end
    nb = h.size() / 2;
    dec_bytes.delete();
    for (int i = 0; i + 8 <= nb; i += 8) begin
      logic [7:0] b;
      for (int k = 0; k < 8; k++) begin
        if (h[2*(i+k)] == h[2*(i+k)+1]) dec_ok = 0;
        b[k] = h[2*(i+k)+1];
      end
      dec_bytes.push_back(b);
    end
    if (nb % 8 != 0) dec_ok = 0;
    for (int i = 0; i < 8; i++)
      if (dec_bytes.size() == 0 || dec_bytes.pop_front() != ((i == 7) ? 8'hD5 : 8'h55)) dec_ok = 0;
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (!in_frame) begin
        if (txdm) begin
          in_frame    = 1;
          frame_start = cyc;
          if (frame_start - last_frame_end < min_gap) min_gap = frame_start - last_frame_end;
          runs.delete(); run_lvl.delete();
          prev = txdp; run_len = 1;
        end else if (txdp) begin
          nlp_len++;
        end else if (nlp_len > 0) begin
          check(nlp_len >= 4 && nlp_len <= 6, $sformatf("link pulse %0d cycles", nlp_len));
          if (nlp_last >= 0)
            check(cyc - nlp_last >= NLP_PERIOD - 2, $sformatf("link pulse spacing %0d", cyc - nlp_last));
          nlp_last = cyc;
          nlp_count++;
          nlp_len = 0;
        end
      end else begin
        if (!txdp && !txdm) begin
          runs.push_back(run_len); run_lvl.push_back(prev);
          in_frame = 0;
          frame_end = cyc;
          last_frame_end = cyc;
          nlp_last = -1;
          decode();
          n_frames++;
        end else begin
          if (txdm !== ~txdp) nlp_in_frame++;
          if (txdp == prev) run_len++;
          else begin
            runs.push_back(run_len); run_lvl.push_back(prev);
            prev = txdp; run_len = 1;
          end
        end
      end
    end
  end

  // ---------------- stream source ----------------
  task automatic feed(input logic [7:0] b[$], input int stall_at);
    foreach (b[i]) begin
      if (i == stall_at) begin
        in_valid <= 0;
        repeat (400) @(posedge clk);
      end
      in_valid <= 1; in_data <= b[i]; in_last <= (i == b.size() - 1);
      do @(negedge clk); while (!in_ready);
      @(posedge clk);
    end
    in_valid <= 0; in_last <= 0;
  endtask

  task automatic send_and_check(input int n, input string name);
    logic [7:0] body[$], exp[$];
    logic [31:0] f;
    int f0;
    for (int i = 0; i < n; i++) body.push_back((i % 5 == 0) ? 8'hFF : 8'($urandom));
    exp = body;
    while (exp.size() < 60) exp.push_back(8'h00);
    f = fcs_of(exp);
    for (int k = 0; k < 4; k++) exp.push_back(f[8*k +: 8]);
    f0 = n_frames;
    feed(body, -1);
    wait (n_frames == f0 + 1);
    check(dec_ok, {name, ": Manchester symbols, preamble, SFD and delimiter"});
    check(dec_bytes.size() == exp.size(), $sformatf("%s: %0d bytes, want %0d", name, dec_bytes.size(), exp.size()));
    if (dec_bytes.size() == exp.size()) begin
      int bad = 0;
      foreach (exp[i]) if (dec_bytes[i] != exp[i]) bad++;
      check(bad == 0, $sformatf("%s: %0d byte mismatches (payload, padding, FCS)", name, bad));
    end
    // 10 Mb/s: (8 preamble + data + FCS) bytes of 16 half-bits, plus 6 delimiter half-bits
    begin
      real want = (exp.size() + 8) * 16 * 2.4 + 6 * 2.4;
      int  got  = frame_end - frame_start;
      check(got > want - 3 && got < want + 3, $sformatf("%s: frame lasts %0d cycles, want %0.1f", name, got, want));
    end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst = 0;
    // idle: link pulses only
    repeat (3 * NLP_PERIOD + 100) @(posedge clk);
    check(nlp_count >= 2, $sformatf("link pulses while idle: %0d", nlp_count));
    send_and_check(64, "64 bytes");
    send_and_check(10, "short, padded");
    send_and_check(300, "300 bytes");
    check(min_gap >= 96 * 48 / 10, $sformatf("interframe gap %0d cycles", min_gap));
    check(nlp_in_frame == 0, "txdm is the complement of txdp while sending");
    // underrun: the stream stalls mid-frame
    begin
      logic [7:0] body[$];
      int f0, u0;
      for (int i = 0; i < 20; i++) body.push_back(8'(i));
      f0 = n_frames;
      fork
        feed(body, 10);
        begin
          @(posedge underrun);
          check(1, "underrun pulse");
        end
      join_any
      wait (n_frames >= f0 + 1);
      check(dec_bytes.size() <= 11, $sformatf("underrun frame cut short (%0d bytes)", dec_bytes.size()));
      wait (!busy);
      disable fork;
      // the rest of the stream becomes a frame of its own; let it pass
      repeat (4000) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
