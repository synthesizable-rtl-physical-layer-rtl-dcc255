// tb_rx_top: checks the receive path (general filter, buffer controller,
// buffer interface, data and control-signal buffers, controller interface) at
// default sizes. The testbench builds a symbol stream (two symbols per clock,
// first in bits 7:0, K_D = 1 for data) of logical idle, ordered sets
// (TS1: COM + 15 symbols, SKP: COM + 3 SKP) and packets (STP/SDP, bytes, END)
// at random byte alignment, and checks:
//  * every packet sent in L0 reaches the data link layer side once, in order,
//    with its bytes, its type (0 TLP, 1 DLLP) and start/end/valid maps
//    (first byte = byte 31 of the first row, end bit on the last byte);
//  * every ordered set appears, symbol by symbol and with its COM flag, on
//    the LTSSM outputs; other symbols sent there are idle data;
//  * dropped, never delivered: a packet cut by a control symbol (error), a
//    packet cut by a second STP (the second one is delivered), packets sent
//    while i_L0 is low;
//  * the data link layer acknowledges after a random delay (ACK stall) and
//    no row is given while a packet waits for ACK.
// Also sent: packets closed by two END symbols (the second END has no
// effect) and data bytes ending in END with no start symbol (ignored).
// Mechanisms counted (failure if never seen): TLP, DLLP, 544-byte TLP, TS
// and SKP forwarding, error drop, second-start drop, L0 gating, ACK stall,
// double END, missing start.
// A watchdog stops a hung run.
module tb_rx_top;
  logic clk;
  logic rst_n;
  initial clk = 1'b0;
  always #4 clk = ~clk;

  logic [1:0]   kd, lt_k, lt_v, lt_c;
  logic [15:0]  rxd, lt_d;
  logic         l0, ack, rtype;
  logic [255:0] rdata;
  logic [31:0]  rstart, rend, rvalid;

  rx_top u_dut (
    .i_clk(clk), .i_reset_n(rst_n), .i_Rx_K_D(kd), .i_Rx_data(rxd), .i_L0(l0),
    .o_LTSSM_data(lt_d), .o_LTSSM_K_D(lt_k), .o_LTSSM_valid(lt_v), .o_LTSSM_COM(lt_c),
    .i_Rx_ACK(ack), .o_Rx_data(rdata), .o_Rx_start(rstart), .o_Rx_end(rend),
    .o_Rx_valid(rvalid), .o_Rx_type(rtype)
  );

  int checks, failures, cycles;
  int n_tlp, n_dllp, n_big, n_ts, n_skp, n_err, n_second, n_gate, n_stall;
  int n_dend, n_nostart;
  // symbol stream: {K_D, byte}
  logic [8:0]   sq [$];
  // expected packets and ordered-set symbols
  byte unsigned exp_bytes [$];
  int           exp_len [$];
  bit           exp_type [$];
  logic [8:0]   exp_os [$];
  byte unsigned cur [$];
  bit           waiting_ack;
  int           ackdly;
  int           os_left;

  task automatic fail(input string m);
    failures++;
    $display("FAIL %s at clock %0d", m, cycles);
  endtask

  // ---------------- stream driver ----------------
  always @(negedge clk) begin
    logic [8:0] s0, s1;
    s0 = (sq.size() != 0) ? sq.pop_front() : 9'h100;
    s1 = (sq.size() != 0) ? sq.pop_front() : 9'h100;
    rxd = {s1[7:0], s0[7:0]};
    kd  = {s1[8], s0[8]};
  end

  function automatic logic [8:0] K(input logic [7:0] b); return {1'b0, b}; endfunction
  function automatic logic [8:0] D(input logic [7:0] b); return {1'b1, b}; endfunction

  task automatic idle(input int n);
    for (int i = 0; i < n; i++) sq.push_back(D(8'h00));
  endtask

  task automatic os(input bit ts);
    logic [8:0] s [$];
    s.push_back(K(8'hBC));
    if (ts) begin
      s.push_back(K(8'hF7)); s.push_back(K(8'hF7)); s.push_back(D(8'h20));
      s.push_back(D(8'h02)); s.push_back(D(8'h00));
      for (int i = 0; i < 10; i++) s.push_back(D(8'h4A));
    end else begin
      for (int i = 0; i < 3; i++) s.push_back(K(8'h1C));
    end
    foreach (s[i]) begin sq.push_back(s[i]); exp_os.push_back(s[i]); end
  endtask

  // packet: deliver = 1 when it must be delivered; cut: 0 none, 1 error, 2 second STP
  task automatic packet(input int len, input bit dllp, input bit deliver, input int cut);
    byte unsigned b [$];
    for (int i = 0; i < len; i++) b.push_back(8'($urandom));
    sq.push_back(K(dllp ? 8'h5C : 8'hFB));
    if (cut != 0) begin
      for (int i = 0; i < len / 2; i++) sq.push_back(D(b[i]));
      if (cut == 1) begin
        sq.push_back(K(8'h7C));       // a control symbol inside a packet
        for (int i = len / 2; i < len; i++) sq.push_back(D(b[i]));
        sq.push_back(K(8'hFD));
        n_err++;
      end else n_second++;
      return;
    end
    foreach (b[i]) sq.push_back(D(b[i]));
    sq.push_back(K(8'hFD));
    if (deliver) begin
      foreach (b[i]) exp_bytes.push_back(b[i]);
      exp_len.push_back(len);
      exp_type.push_back(dllp);
    end
  endtask

  // ---------------- data link layer side ----------------
  always @(posedge clk) begin
    if (!rst_n) begin
      ack <= 1'b0;
    end else begin
      cycles++;
      ack <= 1'b0;
      if (waiting_ack) begin
        if (rvalid != 0) fail("row given while waiting for ACK");
        if (u_dut.u_ci.cnt1 != u_dut.u_ci.cnt2) n_stall++;
        if (ackdly == 0) begin ack <= 1'b1; waiting_ack = 0; end
        else ackdly--;
      end
      if (rvalid != 0) begin
        for (int k = 31; k >= 0; k--) begin
          if (rvalid[k]) begin
            checks++;
            if (rstart[k] != (cur.size() == 0)) fail("start map");
            cur.push_back(rdata[8*k +: 8]);
            if (rend[k]) begin
              int len;
              bit ty, ok;
              checks++;
              if (k != 0 && rvalid[k-1]) fail("valid bytes after the end");
              if (exp_len.size() == 0) fail("unexpected packet");
              else begin
                len = exp_len.pop_front();
                ty  = exp_type.pop_front();
                ok  = (len == cur.size()) && (ty == rtype);
                for (int i = 0; i < len; i++) begin
                  byte unsigned e;
                  e = exp_bytes.pop_front();
                  if (i < cur.size() && cur[i] != e) ok = 0;
                end
                if (!ok) begin
                  failures++;
                  $display("FAIL packet len %0d got %0d type %0d got %0d", len, cur.size(), ty, rtype);
                end
                if (ty) n_dllp++; else n_tlp++;
                if (len == 544 && ok) n_big++;
              end
              cur.delete();
              waiting_ack = 1;
              ackdly = int'($urandom_range(0, 30));
            end
          end
        end
      end
      // LTSSM side: ordered-set symbols in order, idle data elsewhere
      for (int i = 0; i < 2; i++) begin
        if (lt_v[i]) begin
          logic [8:0] s;
          s = {lt_k[i], lt_d[8*i +: 8]};
          checks++;
          if (lt_c[i] != (s == K(8'hBC))) fail("COM flag");
          if (s == K(8'hBC) || os_left != 0) begin
            if (exp_os.size() == 0 || exp_os[0] != s) fail("ordered-set symbol");
            else void'(exp_os.pop_front());
            if (s == K(8'hBC)) os_left = (exp_os.size() != 0 && exp_os[0] == K(8'h1C)) ? 3 : 15;
            else os_left--;
            if (s == K(8'hBC) && os_left == 3) n_skp++;
            if (s == K(8'hBC) && os_left == 15) n_ts++;
          end else if (s != D(8'h00)) fail("symbol to LTSSM outside a set");
        end
      end
      if (cycles > 200000) begin
        fail("watchdog");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  task automatic wait_drain(input int limit);
    while ((sq.size() != 0 || exp_len.size() > limit) && cycles < 190000) @(posedge clk);
  endtask

  initial begin
    checks = 0; failures = 0; cycles = 0;
    n_tlp = 0; n_dllp = 0; n_big = 0; n_ts = 0; n_skp = 0; n_err = 0; n_second = 0;
    n_gate = 0; n_stall = 0; n_dend = 0; n_nostart = 0; waiting_ack = 0; ackdly = 0; os_left = 0;
    kd = 2'b11; rxd = '0; l0 = 1'b0;
    rst_n = 1'b0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    // outside L0: ordered sets pass, packets are ignored
    idle(7); os(1); idle(4); os(0);
    packet(20, 0, 0, 0);
    idle(5);
    wait_drain(0);
    repeat (50) @(posedge clk);
    checks++;
    if (exp_os.size() != 0) fail("ordered sets not forwarded");
    n_gate++;
    @(negedge clk);
    l0 = 1'b1;
    repeat (5) @(posedge clk);
    for (int p = 0; p < 150; p++) begin
      int r;
      r = int'($urandom_range(0, 9));
      if (p == 20) begin wait_drain(0); packet(544, 0, 1, 0); end
      else if (p == 30 || (r == 4 && p % 4 == 0)) begin
        // a packet closed by two END symbols: the second one is ignored
        packet(int'($urandom_range(3, 64)), 0, 1, 0);
        sq.push_back(K(8'hFD));
        n_dend++;
      end else if (p == 31 || (r == 4 && p % 4 == 1)) begin
        // bytes and END with no start symbol: nothing is delivered. A packet
        // goes first, so the filter is between packets (after an ordered set
        // every symbol would go to the LTSSM until the next start symbol)
        packet(int'($urandom_range(3, 64)), 0, 1, 0);
        for (int i = 0; i < 10; i++) sq.push_back(D(8'($urandom_range(1, 255))));
        sq.push_back(K(8'hFD));
        n_nostart++;
      end
      else if (r == 0) os(1);
      else if (r == 1) os(0);
      else if (r == 2) packet(6, 1, 1, 0);
      else if (r == 3 && p % 3 == 0) packet(2 * int'($urandom_range(2, 20)), 0, 0, 1);
      else if (r == 3) packet(2 * int'($urandom_range(2, 20)), 0, 0, 2);
      else packet(int'($urandom_range(3, 64)), 0, 1, 0);
      idle(int'($urandom_range(0, 5)));
      wait_drain(2);
    end
    wait_drain(0);
    repeat (200) @(posedge clk);
    checks++;
    if (exp_len.size() != 0 || exp_os.size() != 0) fail("not everything delivered");
    // L0 dropped in the middle of a packet: it is dropped
    packet(40, 0, 0, 0);
    repeat (8) @(posedge clk);
    @(negedge clk);
    l0 = 1'b0;
    repeat (40) @(posedge clk);
    @(negedge clk);
    l0 = 1'b1;
    packet(30, 0, 1, 0);
    idle(4);
    wait_drain(0);
    repeat (200) @(posedge clk);
    checks++;
    if (exp_len.size() != 0) fail("packet after L0 loss not delivered");
    n_gate++;
    checks += 11;
    if (n_dend == 0)    fail("no packet with two END symbols");
    if (n_nostart == 0) fail("no packet without a start symbol");
    if (n_tlp == 0)    fail("no TLP");
    if (n_dllp == 0)   fail("no DLLP");
    if (n_big == 0)    fail("no 544-byte TLP");
    if (n_ts == 0)     fail("no TS forwarded");
    if (n_skp == 0)    fail("no SKP forwarded");
    if (n_err == 0)    fail("no error drop");
    if (n_second == 0) fail("no second-start drop");
    if (n_gate == 0)   fail("no L0 gating");
    if (n_stall == 0)  fail("no ACK stall");
    $display("TLP %0d DLLP %0d TS %0d SKP %0d err %0d second %0d stall %0d", n_tlp, n_dllp,
             n_ts, n_skp, n_err, n_second, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
