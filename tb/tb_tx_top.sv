// tb_tx_top: checks the transmit path (interface buffer, interface bus, Tx
// and packet-indicator buffers, ordered-set buffer, controller, start/end
// framing, multiplexer, framing alignment) at default sizes. The testbench
// writes random TLPs (even lengths 4..64 bytes and one 544-byte packet) and
// DLLPs (6 bytes) as 32-byte rows with SOP/EOP/valid maps, and ordered sets
// (SKP: COM + 3 SKP; TS1: 16 symbols) into the ordered-set port, and parses
// the PIPE words on its own:
//  * outside a packet a word is logical idle (0000h, both data), an
//    ordered-set word (compared in order with what was fed, D/K flags from
//    the symbol values) or the start of a packet: {first byte, STP or SDP}
//    with D/K = 10;
//  * inside a packet words are two data bytes until {END, last byte} with
//    D/K = 01; the bytes and the framing symbol (STP for TLP, SDP for DLLP)
//    are compared with the packet written.
// Also checked: no packet leaves while i_L0 is low (ordered sets still do),
// a first row without SOP is ignored, ordered sets fed during a packet wait
// for its END. Mechanisms counted (failure if never seen): TLP, DLLP, SKP
// set, TS set, idle, L0 gating, ordered set waiting behind a packet.
// A watchdog stops a hung run.
module tb_tx_top;
  logic clk;
  logic rst_n;
  initial clk = 1'b0;
  always #4 clk = ~clk;

  logic [255:0] dl_data;
  logic [31:0]  dl_sop, dl_eop, dl_valid;
  logic         dl_wr, dl_type, dl_ack;
  logic [15:0]  os_data, phy;
  logic         os_valid, l0, os_full;
  logic [1:0]   dk;

  tx_top u_dut (
    .i_clk(clk), .i_reset_n(rst_n), .i_DataLink(dl_data), .i_SOP(dl_sop), .i_EOP(dl_eop),
    .i_DataValid(dl_valid), .i_WrEn(dl_wr), .i_PktType(dl_type), .o_ACK(dl_ack),
    .i_OsData(os_data), .i_OsValid(os_valid), .i_L0(l0), .o_OsBuffer_Full(os_full),
    .o_PHY_packet(phy), .o_DK(dk)
  );

  int checks, failures, cycles;
  int n_tlp, n_dllp, n_skp, n_ts, n_idle, n_gate, n_oswait;
  byte unsigned exp_bytes [$];
  int           exp_len [$];
  bit           exp_type [$];
  logic [15:0]  exp_os [$];
  byte unsigned cur [$];
  bit           in_pkt, cur_type, os_fed_in_pkt;
  int           os_left;      // words left of the ordered set being parsed

  function automatic bit is_k(input logic [7:0] b);
    return b == 8'hBC || b == 8'h1C || b == 8'h7C || b == 8'hFC || b == 8'hF7;
  endfunction

  task automatic fail(input string m);
    failures++;
    $display("FAIL %s at clock %0d: word %h dk %b", m, cycles, phy, dk);
  endtask

  // ---------------- wire parser ----------------
  always @(posedge clk) begin
    if (rst_n) begin
      cycles++;
      if (!in_pkt) begin
        if (!dk[0] && (phy[7:0] == 8'hFB || phy[7:0] == 8'h5C)) begin
          checks++;
          if (dk != 2'b10) fail("start word D/K");
          if (!l0) begin fail("packet started outside L0"); end
          in_pkt   = 1;
          cur_type = (phy[7:0] == 8'h5C);
          cur.delete();
          cur.push_back(phy[15:8]);
        end else if (phy == 16'h0000 && dk == 2'b11 && os_left == 0) begin
          n_idle++;
        end else begin
          checks++;
          if (exp_os.size() == 0) fail("unexpected word");
          else begin
            logic [15:0] e;
            e = exp_os.pop_front();
            if (phy != e || dk != {!is_k(e[15:8]), !is_k(e[7:0])}) fail("ordered-set word");
            if (os_left == 0) begin
              os_left = (e == 16'h1CBC) ? 1 : 7;
              if (e == 16'h1CBC) n_skp++; else n_ts++;
            end else os_left--;
          end
        end
      end else begin
        if (dk == 2'b01 && phy[15:8] == 8'hFD) begin
          cur.push_back(phy[7:0]);
          in_pkt = 0;
          checks++;
          if (exp_len.size() == 0) fail("packet not sent");
          else begin
            int len;
            bit ty, ok;
            len = exp_len.pop_front();
            ty  = exp_type.pop_front();
            ok  = (len == cur.size()) && (ty == cur_type);
            for (int i = 0; i < len; i++) begin
              byte unsigned e;
              e = exp_bytes.pop_front();
              if (i < cur.size() && cur[i] != e) ok = 0;
            end
            if (!ok) begin
              failures++;
              $display("FAIL packet: len %0d got %0d type %0d got %0d", len, cur.size(), ty, cur_type);
            end
            if (ty) n_dllp++; else n_tlp++;
          end
        end else begin
          checks++;
          if (dk != 2'b11) fail("packet word D/K");
          cur.push_back(phy[7:0]);
          cur.push_back(phy[15:8]);
        end
      end
      if (in_pkt && os_valid) os_fed_in_pkt = 1;
      if (!in_pkt && os_fed_in_pkt) begin n_oswait++; os_fed_in_pkt = 0; end
      if (cycles > 300000) begin
        fail("watchdog");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  // ---------------- drivers ----------------
  // inputs change on the falling edge
  task automatic write_row(input logic [255:0] d, input logic [31:0] s, input logic [31:0] e,
                           input logic [31:0] v, input bit t);
    @(negedge clk);
    dl_data = d; dl_sop = s; dl_eop = e; dl_valid = v; dl_type = t; dl_wr = 1'b1;
  endtask

  task automatic end_rows;
    @(negedge clk);
    dl_wr = 1'b0; dl_sop = '0; dl_eop = '0; dl_valid = '0;
  endtask

  task automatic send_packet(input int len, input bit dllp);
    byte unsigned b [$];
    for (int i = 0; i < len; i++) b.push_back(8'($urandom));
    foreach (b[i]) exp_bytes.push_back(b[i]);
    exp_len.push_back(len);
    exp_type.push_back(dllp);
    while (dl_ack) @(posedge clk);
    for (int r = 0; r < (len + 31) / 32; r++) begin
      logic [255:0] d;
      logic [31:0] s, e, v;
      d = '0; s = '0; e = '0; v = '0;
      for (int k = 0; k < 32; k++) begin
        int idx;
        idx = r * 32 + k;
        if (idx < len) begin
          d[8*(31-k) +: 8] = b[idx];
          v[31-k] = 1'b1;
          if (idx == 0) s[31-k] = 1'b1;
          if (idx == len - 1) e[31-k] = 1'b1;
        end
      end
      write_row(d, s, e, v, dllp);
    end
    end_rows();
    @(posedge clk);
    while (dl_ack) @(posedge clk);
  endtask

  task automatic feed_os(input bit ts);
    logic [15:0] w [$];
    if (ts) begin
      w.push_back(16'hF7BC);  w.push_back(16'h20F7);  w.push_back(16'h0002);
      for (int i = 0; i < 5; i++) w.push_back(16'h4A4A);
    end else begin
      w.push_back(16'h1CBC);  w.push_back(16'h1C1C);
    end
    foreach (w[i]) begin
      @(negedge clk);
      while (os_full) @(negedge clk);
      os_data = w[i]; os_valid = 1'b1;
      exp_os.push_back(w[i]);
    end
    @(negedge clk);
    os_valid = 1'b0;
  endtask

  initial begin
    checks = 0; failures = 0; cycles = 0;
    n_tlp = 0; n_dllp = 0; n_skp = 0; n_ts = 0; n_idle = 0; n_gate = 0; n_oswait = 0;
    in_pkt = 0; cur_type = 0; os_fed_in_pkt = 0; os_left = 0;
    dl_data = '0; dl_sop = '0; dl_eop = '0; dl_valid = '0; dl_wr = 0; dl_type = 0;
    os_data = '0; os_valid = 0; l0 = 0;
    rst_n = 1'b0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    // outside L0: ordered sets go out, a packet waits
    feed_os(1);
    feed_os(0);
    send_packet(20, 0);
    repeat (200) @(posedge clk);
    checks++;
    if (exp_len.size() != 1) fail("packet left outside L0");
    else n_gate++;
    l0 = 1;
    repeat (100) @(posedge clk);
    // a row without SOP is ignored
    write_row({8{32'hDEADBEEF}}, 32'h0, 32'h0, 32'hFFFF_FFFF, 0);
    end_rows();
    // random traffic with ordered sets in parallel
    fork
      begin
        for (int p = 0; p < 60; p++) begin
          if (p == 5) send_packet(544, 0);
          else if ($urandom_range(0, 2) == 0) send_packet(6, 1);
          else send_packet(2 * int'($urandom_range(2, 32)), 0);
          repeat ($urandom_range(0, 20)) @(posedge clk);
        end
      end
      begin
        for (int k = 0; k < 40; k++) begin
          feed_os($urandom_range(0, 3) == 0);
          repeat ($urandom_range(0, 60)) @(posedge clk);
        end
      end
    join
    repeat (2000) @(posedge clk);
    checks++;
    if (exp_len.size() != 0 || exp_os.size() != 0) fail("not everything was sent");
    checks += 7;
    if (n_tlp == 0)    fail("no TLP");
    if (n_dllp == 0)   fail("no DLLP");
    if (n_skp == 0)    fail("no SKP");
    if (n_ts == 0)     fail("no TS");
    if (n_idle == 0)   fail("no idle");
    if (n_gate == 0)   fail("no L0 gating");
    if (n_oswait == 0) fail("no ordered set waiting behind a packet");
    $display("TLP %0d DLLP %0d SKP %0d TS %0d idle %0d waits %0d", n_tlp, n_dllp, n_skp, n_ts,
             n_idle, n_oswait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
