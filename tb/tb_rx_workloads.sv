// tb_rx_workloads: runs the receive path at default sizes through the traffic
// of the receive test plan, each at full line rate (two symbols every clock,
// no gaps unless the scenario has them) with a data link layer that
// acknowledges each packet in the clock after its last row:
//  1. 30 consecutive DLLPs (6 bytes), then 30 consecutive TLPs of the
//     minimum size (28 bytes);
//  2. 30 consecutive TLPs of the maximum size (544 bytes);
//  3. one 544-byte TLP followed by 30 DLLPs;
//  4. the mixed sequence TLP 200, DLLP, TLP 32, TLP 544, idle, idle,
//     TLP 544, DLLP, SKP, SKP, SKP, idle, idle, SKP, TLP 200, DLLP;
//  5. a reset in the middle of a packet and another in the middle of a TS:
//     the outputs clear, the cut packet never appears, and five TLPs and a
//     SKP set sent afterwards arrive normally.
// Every packet must arrive once, in order, byte for byte and with the right
// type and start/end/valid maps; every SKP set must reach the LTSSM side.
// The receive path has no way to slow the link down, so a scenario passes
// only if nothing is lost. The test also checks rate: each scenario must be
// fully delivered within its own wire time (symbols / 2 clocks) plus 40
// clocks of latency, i.e. the path keeps up with 250 MB/s. (A slower ACK
// lets short packets queue in the buffers, which then take longer to empty;
// tb_rx_top covers that.) The packet
// counts and the timing check are counted as checks.
// A watchdog stops a hung run.
module tb_rx_workloads;
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
              ackdly = 0;
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

  // run one scenario already queued in sq; nsym symbols long
  task automatic finish_phase(input string name, input int nsym, input int t0, input int npk);
    int dt;
    while ((exp_len.size() != 0 || cur.size() != 0 || sq.size() != 0) && cycles < 190000)
      @(posedge clk);
    dt = cycles - t0;
    checks += 2;
    if (exp_len.size() != 0) fail({name, ": packets missing"});
    if (dt > nsym / 2 + 40) fail($sformatf("%s: %0d clocks for %0d symbols", name, dt, nsym));
    $display("%s: %0d packets in %0d clocks (%0d symbols on the wire)", name, npk, dt, nsym);
    repeat (20) @(posedge clk);
    checks++;
    if (exp_os.size() != 0) fail({name, ": ordered sets missing"});
  endtask

  int t0, n0;

  // reset for three clocks; whatever was in flight is forgotten
  task automatic pulse_reset();
    @(negedge clk);
    rst_n = 1'b0;
    sq.delete(); cur.delete(); exp_os.delete();
    waiting_ack = 0; os_left = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  initial begin
    checks = 0; failures = 0; cycles = 0;
    n_tlp = 0; n_dllp = 0; n_big = 0; n_ts = 0; n_skp = 0; n_err = 0; n_second = 0;
    n_gate = 0; n_stall = 0; waiting_ack = 0; ackdly = 0; os_left = 0;
    kd = 2'b11; rxd = '0; l0 = 1'b1;
    rst_n = 1'b0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // 1. minimum-size packets
    @(negedge clk); #1;
    t0 = cycles;
    for (int i = 0; i < 30; i++) packet(6, 1, 1, 0);
    for (int i = 0; i < 30; i++) packet(28, 0, 1, 0);
    finish_phase("30 DLLPs + 30 TLPs of 28 B", 30 * 8 + 30 * 30, t0, 60);
    checks++;
    if (n_dllp != 30 || n_tlp != 30) fail("scenario 1 counts");

    // 2. maximum-size packets
    @(negedge clk); #1;
    t0 = cycles; n0 = n_big;
    for (int i = 0; i < 30; i++) packet(544, 0, 1, 0);
    finish_phase("30 TLPs of 544 B", 30 * 546, t0, 30);
    checks++;
    if (n_big - n0 != 30) fail("scenario 2 counts");

    // 3. maximum TLP then DLLPs
    @(negedge clk); #1;
    t0 = cycles; n0 = n_dllp;
    packet(544, 0, 1, 0);
    for (int i = 0; i < 30; i++) packet(6, 1, 1, 0);
    finish_phase("TLP 544 B + 30 DLLPs", 546 + 30 * 8, t0, 31);
    checks++;
    if (n_dllp - n0 != 30) fail("scenario 3 counts");

    // 4. mixed sequence
    @(negedge clk); #1;
    t0 = cycles; n0 = n_skp;
    packet(200, 0, 1, 0); packet(6, 1, 1, 0); packet(32, 0, 1, 0); packet(544, 0, 1, 0);
    idle(2); packet(544, 0, 1, 0); packet(6, 1, 1, 0);
    os(0); os(0); os(0); idle(2); os(0);
    packet(200, 0, 1, 0); packet(6, 1, 1, 0);
    finish_phase("mixed sequence", 202 + 8 + 34 + 546 + 2 + 546 + 8 + 16 + 2 + 202 + 8, t0, 9);
    checks++;
    if (n_skp - n0 != 4) fail("scenario 4 SKP count");

    // 5. reset in the middle of a packet, then in the middle of a TS
    n0 = n_tlp;
    packet(300, 0, 0, 0);              // cut by the reset, never delivered
    repeat (60) @(posedge clk);
    pulse_reset();
    checks++;
    if (rvalid != 0 || lt_v != 0) fail("outputs not cleared by reset");
    os(1);
    repeat (3) @(posedge clk);
    pulse_reset();
    @(negedge clk); #1;
    t0 = cycles;
    for (int i = 0; i < 5; i++) packet(40 + i, 0, 1, 0);
    os(0);
    finish_phase("five TLPs after two resets", 5 * 42 + 10 + 4, t0, 5);
    checks++;
    if (n_tlp - n0 != 5) fail("scenario 5 counts");

    $display("TLP %0d DLLP %0d SKP %0d", n_tlp, n_dllp, n_skp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
