// tb_ltssm: checks the LTSSM (state machine, timer, ordered-set creator and
// decoder, PIPE operation) with two instances at default parameters joined
// back to back: port 0 downstream, port 1 upstream. A small link model per
// direction stands in for the Tx and Rx paths: creator words enter a 16-word
// queue (o_OScreator_valid, back-pressure through i_Tx_OSbufferFull), one
// word per clock leaves it (logical idle 0000h when empty), and the partner
// receives it with D/K flags worked out from the symbol values (COM, SKP,
// IDL, EIE and PAD are control symbols) and a COM flag. A PHY model answers
// TxDetectRx with PhyStatus and RxStatus = 011.
// Checks:
//  * each port goes Detect.Quiet, Detect.Active, Polling.Active,
//    Polling.Configuration, Config.Linkwidth.Start/Accept,
//    Config.Lanenum.Wait/Accept, Config.Complete, Config.Idle, L0 in this
//    order and reaches L0 (0xA);
//  * in L0 SKP sets (COM + 3 SKP) are sent, spaced by the SKP interval
//    (590 clocks, one set at a time);
//  * TS1s injected into port 0 in L0 take both ports through Recovery
//    (RcvrLock, RcvrCfg, Config.Idle) back to L0;
//  * timeouts, on two lone instances with short timeouts: a port with no
//    receiver detected returns from Detect.Active to Detect.Quiet after
//    T_DETECT; a port with a receiver but no partner leaves Polling.Active
//    for Detect.Quiet after T_POLL_ACTIVE;
//  * forced training on a fifth, scaled port whose partner is a script
//    answering its current state: Polling.Active left on TS1 with training
//    control 4; in Config.Linkwidth.Start a TS1 with link 5 then link 6
//    restarts the count (3 sets needed, link 6 kept and sent in
//    Lanenum.Wait); in Linkwidth.Accept a TS1 with a foreign link is
//    ignored (3 sets needed); in Config.Idle the script sends nothing and
//    the port times out to Detect.Quiet after T_CFG_2MS.
// A watchdog stops a hung run.
module tb_ltssm;
  logic clk;
  logic rst_n;
  initial clk = 1'b0;
  always #4 clk = ~clk;

  localparam int NP = 5;   // 0,1 pair; 2 lone, no receiver; 3 lone, receiver;
                           // 4 lone, receiver, scripted partner
  logic        phystatus [NP], det [NP], txei [NP], comp [NP], pol [NP], rate [NP];
  logic [2:0]  rxstatus [NP];
  logic [1:0]  pd [NP];
  logic        osfull [NP], osvalid [NP], l0 [NP];
  logic [15:0] osdata [NP];
  logic [15:0] rxd [NP];
  logic [1:0]  rxk [NP], rxv [NP], rxc [NP];
  logic [4:0]  st [NP];
  logic        rxei [NP];
  logic [2:0]  detcnt [NP];

  ltssm u_p0 (
    .i_clk(clk), .i_reset_n(rst_n), .i_IsDownstream(1'b1),
    .i_PhyStatus(phystatus[0]), .i_RxElecIdle(rxei[0]), .i_RxStatus(rxstatus[0]),
    .o_TxDetectRx_loopback(det[0]), .o_TxElecIdle(txei[0]), .o_TxCompliance(comp[0]),
    .o_RxPolarity(pol[0]), .o_PowerDown(pd[0]), .o_Rate(rate[0]),
    .i_Tx_OSbufferFull(osfull[0]), .o_OScreator_Data(osdata[0]), .o_OScreator_valid(osvalid[0]),
    .i_Rx_Data(rxd[0]), .i_Rx_DataK(rxk[0]), .i_Rx_valid(rxv[0]), .i_Rx_COM_Indicator(rxc[0]),
    .o_L0_UP(l0[0]), .o_LTSSM_state(st[0])
  );
  ltssm u_p1 (
    .i_clk(clk), .i_reset_n(rst_n), .i_IsDownstream(1'b0),
    .i_PhyStatus(phystatus[1]), .i_RxElecIdle(rxei[1]), .i_RxStatus(rxstatus[1]),
    .o_TxDetectRx_loopback(det[1]), .o_TxElecIdle(txei[1]), .o_TxCompliance(comp[1]),
    .o_RxPolarity(pol[1]), .o_PowerDown(pd[1]), .o_Rate(rate[1]),
    .i_Tx_OSbufferFull(osfull[1]), .o_OScreator_Data(osdata[1]), .o_OScreator_valid(osvalid[1]),
    .i_Rx_Data(rxd[1]), .i_Rx_DataK(rxk[1]), .i_Rx_valid(rxv[1]), .i_Rx_COM_Indicator(rxc[1]),
    .o_L0_UP(l0[1]), .o_LTSSM_state(st[1])
  );
  ltssm #(.T_DETECT(200), .T_POLL_ACTIVE(3000)) u_p2 (
    .i_clk(clk), .i_reset_n(rst_n), .i_IsDownstream(1'b1),
    .i_PhyStatus(phystatus[2]), .i_RxElecIdle(rxei[2]), .i_RxStatus(rxstatus[2]),
    .o_TxDetectRx_loopback(det[2]), .o_TxElecIdle(txei[2]), .o_TxCompliance(comp[2]),
    .o_RxPolarity(pol[2]), .o_PowerDown(pd[2]), .o_Rate(rate[2]),
    .i_Tx_OSbufferFull(osfull[2]), .o_OScreator_Data(osdata[2]), .o_OScreator_valid(osvalid[2]),
    .i_Rx_Data(rxd[2]), .i_Rx_DataK(rxk[2]), .i_Rx_valid(rxv[2]), .i_Rx_COM_Indicator(rxc[2]),
    .o_L0_UP(l0[2]), .o_LTSSM_state(st[2])
  );
  ltssm #(.T_DETECT(200), .T_POLL_ACTIVE(3000)) u_p3 (
    .i_clk(clk), .i_reset_n(rst_n), .i_IsDownstream(1'b1),
    .i_PhyStatus(phystatus[3]), .i_RxElecIdle(rxei[3]), .i_RxStatus(rxstatus[3]),
    .o_TxDetectRx_loopback(det[3]), .o_TxElecIdle(txei[3]), .o_TxCompliance(comp[3]),
    .o_RxPolarity(pol[3]), .o_PowerDown(pd[3]), .o_Rate(rate[3]),
    .i_Tx_OSbufferFull(osfull[3]), .o_OScreator_Data(osdata[3]), .o_OScreator_valid(osvalid[3]),
    .i_Rx_Data(rxd[3]), .i_Rx_DataK(rxk[3]), .i_Rx_valid(rxv[3]), .i_Rx_COM_Indicator(rxc[3]),
    .o_L0_UP(l0[3]), .o_LTSSM_state(st[3])
  );

  // port 4: LTSSM with counts and timeouts scaled for simulation (24 TS1 in
  // Polling.Active; timeouts of 160 to 260 clocks)
  ltssm #(.T_DETECT(12), .T_POLL_ACTIVE(260), .T_POLL_CONFIG(160), .T_CFG_LW(200),
          .T_CFG_2MS(160), .NUM_TS1_POLL(24)) u_p4 (
    .i_clk(clk), .i_reset_n(rst_n), .i_IsDownstream(1'b1),
    .i_PhyStatus(phystatus[4]), .i_RxElecIdle(rxei[4]), .i_RxStatus(rxstatus[4]),
    .o_TxDetectRx_loopback(det[4]), .o_TxElecIdle(txei[4]), .o_TxCompliance(comp[4]),
    .o_RxPolarity(pol[4]), .o_PowerDown(pd[4]), .o_Rate(rate[4]),
    .i_Tx_OSbufferFull(osfull[4]), .o_OScreator_Data(osdata[4]), .o_OScreator_valid(osvalid[4]),
    .i_Rx_Data(rxd[4]), .i_Rx_DataK(rxk[4]), .i_Rx_valid(rxv[4]), .i_Rx_COM_Indicator(rxc[4]),
    .o_L0_UP(l0[4]), .o_LTSSM_state(st[4])
  );

  int checks, failures, cycles;
  logic [15:0] inj4 [$];         // scripted partner words for port 4
  int   ts_in_state [16];        // sets the script sent per state of port 4
  int   p4_link_seen, p4_idle_timeout, p4_since9;
  logic [4:0] p4_prev;
  bit   p4_done;
  int   gap4;                 // script stops once port 4 reached Config.Idle
  logic [15:0] q [NP][$];
  logic [15:0] wire_w [2];
  logic [15:0] inj [$];          // words injected into port 0's receiver
  int   trace [NP][$];
  int   state_since [NP];
  int   n_skp [2], last_skp [2], n_skp_gap_bad, n_pa_timeout, n_da_timeout;
  int   skp_words [2];

  function automatic bit is_k(input logic [7:0] b);
    return b == 8'hBC || b == 8'h1C || b == 8'h7C || b == 8'hFC || b == 8'hF7;
  endfunction

  // PHY model: receiver present on 0, 1 and 3, absent on 2
  for (genvar s = 0; s < NP; s++) begin : g_phy
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        detcnt[s] <= '0; phystatus[s] <= 1'b0; rxstatus[s] <= 3'b000;
      end else begin
        phystatus[s] <= 1'b0;
        rxstatus[s]  <= 3'b000;
        if (!det[s]) detcnt[s] <= '0;
        else if (detcnt[s] != 3'd7) detcnt[s] <= detcnt[s] + 1'b1;
        if (det[s] && detcnt[s] == 3'd3) begin
          phystatus[s] <= 1'b1;
          rxstatus[s]  <= (s == 2) ? 3'b000 : 3'b011;
        end
      end
    end
  end

  // ordered-set buffer full flags (16 words) are combinational from the queues
  always_comb for (int s = 0; s < NP; s++) osfull[s] = (q[s].size() >= 16);

  // link model and monitors
  always @(posedge clk) begin
    if (rst_n) begin
      cycles++;
      for (int s = 0; s < NP; s++) begin
        if (osvalid[s] && q[s].size() < 16) q[s].push_back(osdata[s]);
        // state trace
        if (trace[s].size() == 0 || trace[s][$] != int'(st[s])) begin
          if (s == 3 && trace[s].size() != 0 && trace[s][$] == 2 && st[s] == 5'd0) begin
            checks++;
            if (cycles - state_since[s] < 3000 || cycles - state_since[s] > 3005) begin
              failures++;
              $display("FAIL Polling.Active timeout after %0d clocks", cycles - state_since[s]);
            end
            n_pa_timeout++;
          end
          if (s == 2 && trace[s].size() != 0 && trace[s][$] == 1 && st[s] == 5'd0) begin
            checks++;
            if (cycles - state_since[s] < 200 || cycles - state_since[s] > 205) begin
              failures++;
              $display("FAIL Detect.Active timeout after %0d clocks", cycles - state_since[s]);
            end
            n_da_timeout++;
          end
          trace[s].push_back(int'(st[s]));
          state_since[s] = cycles;
        end
      end
      for (int s = 0; s < 2; s++) begin
        logic [15:0] w;
        w = (q[s].size() != 0) ? q[s].pop_front() : 16'h0000;
        wire_w[s] = w;
        // SKP sets in L0: word {SKP, COM} starts one
        if (l0[s] && w == 16'h1CBC) begin
          if (n_skp[s] > 0) begin
            checks++;
            if (cycles - last_skp[s] < 590 || cycles - last_skp[s] > 600) begin
              failures++;
              n_skp_gap_bad++;
              $display("FAIL port %0d SKP spacing %0d", s, cycles - last_skp[s]);
            end
          end
          n_skp[s]++;
          last_skp[s] = cycles;
        end
        if (l0[s] && (w == 16'h1CBC || w == 16'h1C1C)) skp_words[s]++;
      end
      for (int s = 2; s < NP; s++) if (q[s].size() != 0) begin
        logic [15:0] w;
        w = q[s].pop_front();
        // port 4 in Config.Lanenum.Wait must send the link number it kept
        if (s == 4 && st[4] == 5'd6 && w[7:0] == 8'hBC) begin
          checks++;
          if (w[15:8] != 8'h06) begin
            failures++;
            $display("FAIL port 4 sends link %h in Lanenum.Wait, expected 06", w[15:8]);
          end
          p4_link_seen++;
        end
      end
      // scripted partner of port 4: one set at a time, chosen from its state
      if (st[4] == 5'd9) p4_done = 1;
      if (inj4.size() == 0 && gap4 != 0) gap4--;
      else if (inj4.size() == 0 && !p4_done && st[4] >= 5'd2 && st[4] <= 5'd8) begin
        int n;
        gap4 = 6;                // the state settles before the next set
        n = ts_in_state[st[4][3:0]]++;
        unique case (st[4])
          5'd2: ts_words(0, 8'hF7, 8'hF7, 8'h04);                   // TS1, control 4
          5'd3: ts_words(1, 8'hF7, 8'hF7, 8'h00);                   // TS2
          5'd4: ts_words(0, (n == 0) ? 8'h05 : 8'h06, 8'hF7, 8'h00); // link 5, then 6
          5'd5: ts_words(0, (n == 0) ? 8'h07 : 8'h06, 8'hF7, 8'h00); // foreign link first
          5'd6, 5'd7: ts_words(0, 8'h06, 8'h00, 8'h00);
          default: ts_words(1, 8'h06, 8'h00, 8'h00);                // Config.Complete
        endcase
      end
      begin
        logic [15:0] w;
        bit v;
        v = (inj4.size() != 0);
        w = v ? inj4.pop_front() : 16'h0000;
        rxd[4] <= w;
        rxk[4] <= {!is_k(w[15:8]), !is_k(w[7:0])};
        rxc[4] <= {v && w[15:8] == 8'hBC, v && w[7:0] == 8'hBC};
        rxv[4] <= {v, v};         // nothing at all in Config.Idle
      end
      if (p4_prev != 5'd9 && st[4] == 5'd9) p4_since9 = cycles;
      if (p4_prev == 5'd9 && st[4] == 5'd0) begin
        checks++;
        if (cycles - p4_since9 < 160 || cycles - p4_since9 > 165) begin
          failures++;
          $display("FAIL Config.Idle timeout after %0d clocks", cycles - p4_since9);
        end
        p4_idle_timeout++;
      end
      p4_prev = st[4];
      // receivers: port 0 gets port 1's word (or an injected word), and back
      for (int s = 0; s < 2; s++) begin
        logic [15:0] w;
        w = wire_w[1 - s];
        if (s == 0 && inj.size() != 0) w = inj.pop_front();
        rxd[s] <= w;
        rxk[s] <= {!is_k(w[15:8]), !is_k(w[7:0])};
        rxc[s] <= {w[15:8] == 8'hBC, w[7:0] == 8'hBC};
        rxv[s] <= 2'b11;
      end
      if (cycles > 400000) begin
        failures++;
        $display("FAIL watchdog: states %h %h", st[0], st[1]);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  task automatic ts_words(input bit ts2, input logic [7:0] link, input logic [7:0] lane,
                          input logic [7:0] ctrl);
    inj4.push_back({link, 8'hBC});
    inj4.push_back({8'h20, lane});
    inj4.push_back({ctrl, 8'h02});
    for (int i = 0; i < 5; i++) inj4.push_back(ts2 ? 16'h4545 : 16'h4A4A);
  endtask

  task automatic check_trace(input int s, input int exp [], input string what);
    bit ok;
    ok = (trace[s].size() == exp.size());
    for (int i = 0; i < exp.size() && ok; i++) if (trace[s][i] != exp[i]) ok = 0;
    checks++;
    if (!ok) begin
      failures++;
      $write("FAIL port %0d %s trace:", s, what);
      foreach (trace[s][i]) $write(" %h", trace[s][i]);
      $write("\n");
    end
  endtask

  initial begin
    int train [];
    int recov [];
    checks = 0; failures = 0; cycles = 0; n_skp_gap_bad = 0; n_pa_timeout = 0; n_da_timeout = 0;
    for (int s = 0; s < NP; s++) begin
      rxd[s] = '0; rxk[s] = 2'b11; rxv[s] = '0; rxc[s] = '0; state_since[s] = 0;
      rxei[s] = (s == 2);       // lone port without partner: electrical idle
    end
    rxei[3] = 1'b0;
    p4_link_seen = 0; p4_idle_timeout = 0; p4_since9 = 0; p4_prev = '0; p4_done = 0; gap4 = 0;
    foreach (ts_in_state[i]) ts_in_state[i] = 0;
    for (int s = 0; s < 2; s++) begin n_skp[s] = 0; last_skp[s] = 0; skp_words[s] = 0; end
    wire_w[0] = '0; wire_w[1] = '0;
    rst_n = 1'b0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    while (!(l0[0] && l0[1])) @(posedge clk);
    $display("pair in L0 after %0d clocks", cycles);
    repeat (2) @(posedge clk);
    train = '{0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10};
    check_trace(0, train, "training");
    check_trace(1, train, "training");
    // stay in L0 for several SKP intervals
    repeat (3000) @(posedge clk);
    checks++;
    if (n_skp[0] < 3 || n_skp[1] < 3 || !l0[0] || !l0[1]) begin
      failures++;
      $display("FAIL SKP sets in L0: %0d %0d", n_skp[0], n_skp[1]);
    end
    checks++;
    if (skp_words[0] != 2 * n_skp[0] || skp_words[1] != 2 * n_skp[1]) begin
      failures++;
      $display("FAIL SKP set length: words %0d sets %0d", skp_words[0], n_skp[0]);
    end
    // Recovery: inject two TS1 (link 0, lane 0) into port 0
    for (int k = 0; k < 2; k++) begin
      inj.push_back(16'h00BC);             // COM, link 0
      inj.push_back(16'h2000);             // lane 0, N_FTS 32
      inj.push_back(16'h0002);             // rate Gen1, training control 0
      for (int i = 0; i < 5; i++) inj.push_back(16'h4A4A);
    end
    for (int s = 0; s < 2; s++) begin trace[s].delete(); trace[s].push_back(10); end
    repeat (50) @(posedge clk);
    while (!(l0[0] && l0[1])) @(posedge clk);
    repeat (10) @(posedge clk);
    recov = '{10, 11, 12, 9, 10};
    check_trace(0, recov, "recovery");
    check_trace(1, recov, "recovery");
    // scripted port 4
    begin
      int fexp [];
      bit ok;
      fexp = '{0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 0};
      ok = (trace[4].size() >= 11);
      for (int i = 0; i < 11 && ok; i++) if (trace[4][i] != fexp[i]) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        $write("FAIL port 4 trace:");
        foreach (trace[4][i]) $write(" %h", trace[4][i]);
        $write("\n");
      end
      checks += 4;
      // a second link number restarts the count: 3 sets, not 2
      if (ts_in_state[4] != 3) begin failures++; $display("FAIL Linkwidth.Start took %0d sets", ts_in_state[4]); end
      // a foreign link number is ignored: 3 sets, not 2
      if (ts_in_state[5] != 3) begin failures++; $display("FAIL Linkwidth.Accept took %0d sets", ts_in_state[5]); end
      if (p4_link_seen == 0)    begin failures++; $display("FAIL port 4 link number never seen"); end
      if (p4_idle_timeout == 0) begin failures++; $display("FAIL no Config.Idle timeout"); end
    end
    // lone ports
    checks += 2;
    if (n_da_timeout == 0) begin failures++; $display("FAIL no Detect.Active timeout"); end
    if (n_pa_timeout == 0) begin failures++; $display("FAIL no Polling.Active timeout"); end
    $display("SKP sets %0d/%0d, timeouts DA %0d PA %0d", n_skp[0], n_skp[1], n_da_timeout, n_pa_timeout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
