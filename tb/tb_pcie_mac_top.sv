// tb_pcie_mac_top: end-to-end test of the MAC. Two pcie_mac_top instances at
// their default parameters are joined back to back (A downstream, B
// upstream): A's TxData/TxDataK drive B's RxData/RxDataK and the other way
// round. A small PHY model per side answers TxDetectRx with a PhyStatus pulse
// and RxStatus = 011 (receiver present) and holds RxElecIdle low.
// Sequence: reset, wait until both LTSSMs reach L0 (state 0xA), then both
// data link layer models send random TLPs (STP-framed, even lengths up to
// 64 bytes plus one 544-byte maximum TLP) and DLLPs (6 bytes, SDP-framed) at
// the same time. The receiving models rebuild each packet from the row
// outputs (start/end/valid maps) and compare it byte for byte, and by type,
// with the copy the sender kept; they acknowledge each packet after a random
// delay, which makes the receive buffers hold later packets (ACK stall).
// Then both sides send 30 consecutive 544-byte TLPs at once; all must
// arrive, within BIG_BOUND clocks (about 94% of the line rate).
// Mechanisms counted, each a failure if never seen: link training to L0,
// TLPs and DLLPs delivered both ways, SKP ordered sets in L0, logical idle in
// L0, an ordered set waiting while a packet is being sent, ACK stall, the
// 30 maximum TLPs delivered.
// A watchdog ends the run as a failure after 200000 clocks.
module tb_pcie_mac_top;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #4 clk = ~clk;

  // per side (0 = A, 1 = B)
  logic [15:0]  txd [2];
  logic [1:0]   txk [2];
  logic         phystatus [2], det [2], txei [2], txcomp [2], rxpol [2], rate [2];
  logic [2:0]   rxstatus [2];
  logic [1:0]   pd [2];
  logic [255:0] dl_data [2];
  logic [31:0]  dl_sop [2], dl_eop [2], dl_valid [2];
  logic         dl_wr [2], dl_type [2], dl_ack [2];
  logic         rx_ack [2];
  logic [255:0] rx_data [2];
  logic [31:0]  rx_start [2], rx_end [2], rx_valid [2];
  logic         rx_type [2];
  logic         linkup [2];
  logic [4:0]   lstate [2];
  logic [2:0]   detcnt [2];

  pcie_mac_top dut_a (
    .i_clk(clk), .i_reset_n(rst_n), .i_IsDownstream(1'b1),
    .o_TxData(txd[0]), .o_TxDataK(txk[0]), .i_RxData(txd[1]), .i_RxDataK(txk[1]),
    .i_PhyStatus(phystatus[0]), .i_RxElecIdle(1'b0), .i_RxStatus(rxstatus[0]),
    .o_TxDetectRx_loopback(det[0]), .o_TxElecIdle(txei[0]), .o_TxCompliance(txcomp[0]),
    .o_RxPolarity(rxpol[0]), .o_PowerDown(pd[0]), .o_Rate(rate[0]),
    .i_DataLink(dl_data[0]), .i_SOP(dl_sop[0]), .i_EOP(dl_eop[0]), .i_DataValid(dl_valid[0]),
    .i_WrEn(dl_wr[0]), .i_PktType(dl_type[0]), .o_ACK(dl_ack[0]),
    .i_Rx_ACK(rx_ack[0]), .o_Rx_data(rx_data[0]), .o_Rx_start(rx_start[0]), .o_Rx_end(rx_end[0]),
    .o_Rx_valid(rx_valid[0]), .o_Rx_type(rx_type[0]),
    .o_LinkUp(linkup[0]), .o_LTSSM_state(lstate[0])
  );

  pcie_mac_top dut_b (
    .i_clk(clk), .i_reset_n(rst_n), .i_IsDownstream(1'b0),
    .o_TxData(txd[1]), .o_TxDataK(txk[1]), .i_RxData(txd[0]), .i_RxDataK(txk[0]),
    .i_PhyStatus(phystatus[1]), .i_RxElecIdle(1'b0), .i_RxStatus(rxstatus[1]),
    .o_TxDetectRx_loopback(det[1]), .o_TxElecIdle(txei[1]), .o_TxCompliance(txcomp[1]),
    .o_RxPolarity(rxpol[1]), .o_PowerDown(pd[1]), .o_Rate(rate[1]),
    .i_DataLink(dl_data[1]), .i_SOP(dl_sop[1]), .i_EOP(dl_eop[1]), .i_DataValid(dl_valid[1]),
    .i_WrEn(dl_wr[1]), .i_PktType(dl_type[1]), .o_ACK(dl_ack[1]),
    .i_Rx_ACK(rx_ack[1]), .o_Rx_data(rx_data[1]), .o_Rx_start(rx_start[1]), .o_Rx_end(rx_end[1]),
    .o_Rx_valid(rx_valid[1]), .o_Rx_type(rx_type[1]),
    .o_LinkUp(linkup[1]), .o_LTSSM_state(lstate[1])
  );

  int checks = 0, failures = 0;
  int cycles = 0;
  // mechanism counters
  int n_tlp [2], n_dllp [2], n_skp, n_idle, n_os_wait, n_stall, n_trained, n_big, t0;
  // per maximum TLP: 17 clocks writing its rows (the interface buffer is not
  // read meanwhile), 273 words on the link (start word + 272 data words, the
  // end word shares the last one after alignment), 4 clocks of handshake and
  // SKP allowance
  localparam int BIG_BOUND = 30 * (17 + 273 + 4);

  // expected packets per receiving side
  byte unsigned exp_bytes [2][$];
  int           exp_len [2][$];
  bit           exp_type [2][$];

  // ---------------- PHY model ----------------
  for (genvar s = 0; s < 2; s++) begin : g_phy
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        detcnt[s]    <= '0;
        phystatus[s] <= 1'b0;
        rxstatus[s]  <= 3'b000;
      end else begin
        phystatus[s] <= 1'b0;
        rxstatus[s]  <= 3'b000;
        if (!det[s]) detcnt[s] <= '0;
        else if (detcnt[s] != 3'd7) detcnt[s] <= detcnt[s] + 1'b1;
        if (det[s] && detcnt[s] == 3'd3) begin
          phystatus[s] <= 1'b1;
          rxstatus[s]  <= 3'b011;
        end
      end
    end
  end

  // ---------------- receive DLL model ----------------
  byte unsigned cur [2][$];
  int  ackdly [2];
  bit  ackpend [2];

  task automatic finish_packet(input int r);
    int len;
    bit ty;
    bit ok;
    checks++;
    if (exp_len[r].size() == 0) begin
      failures++;
      $display("FAIL side %0d: unexpected packet of %0d bytes", r, cur[r].size());
      cur[r].delete();
      return;
    end
    len = exp_len[r].pop_front();
    ty  = exp_type[r].pop_front();
    ok  = (len == cur[r].size()) && (ty == rx_type[r]);
    for (int i = 0; i < len; i++) begin
      byte unsigned e;
      e = exp_bytes[r].pop_front();
      if (i < cur[r].size() && cur[r][i] != e) begin
        if (ok) $display("  side %0d byte %0d exp %h got %h", r, i, e, cur[r][i]);
        ok = 0;
      end
    end
    if (!ok) begin
      failures++;
      $display("FAIL side %0d: packet mismatch len exp %0d got %0d type exp %0d got %0d",
               r, len, cur[r].size(), ty, rx_type[r]);
    end
    if (ty) n_dllp[r]++; else n_tlp[r]++;
    cur[r].delete();
  endtask

  for (genvar r = 0; r < 2; r++) begin : g_rx
    always @(posedge clk) begin
      if (!rst_n) begin
        rx_ack[r]  <= 1'b0;
        ackpend[r] = 0;
        ackdly[r]  = 0;
      end else begin
        rx_ack[r] <= 1'b0;
        if (ackpend[r]) begin
          if (ackdly[r] == 0) begin
            rx_ack[r]  <= 1'b1;
            ackpend[r] = 0;
          end else ackdly[r]--;
        end
        if (rx_valid[r] != 0) begin
          for (int k = 31; k >= 0; k--) begin
            if (rx_valid[r][k]) begin
              checks++;
              if (rx_start[r][k] != (cur[r].size() == 0)) begin
                failures++;
                $display("FAIL side %0d: start map wrong at byte %0d", r, k);
              end
              cur[r].push_back(rx_data[r][8*k +: 8]);
              if (rx_end[r][k]) begin
                finish_packet(r);
                ackpend[r] = 1;
                ackdly[r]  = int'($urandom_range(0, 40));
              end
            end
          end
        end
      end
    end
  end

  // ---------------- transmit DLL model ----------------
  task automatic send_packet(input int s, input int len, input bit dllp);
    byte unsigned b [$];
    int rows;
    for (int i = 0; i < len; i++) b.push_back(8'($urandom));
    foreach (b[i]) exp_bytes[1-s].push_back(b[i]);
    exp_len[1-s].push_back(len);
    exp_type[1-s].push_back(dllp);
    while (dl_ack[s]) @(posedge clk);
    rows = (len + 31) / 32;
    for (int r = 0; r < rows; r++) begin
      dl_data[s]  <= '0;
      dl_sop[s]   <= '0;
      dl_eop[s]   <= '0;
      dl_valid[s] <= '0;
      dl_wr[s]    <= 1'b1;
      dl_type[s]  <= dllp;
      for (int k = 0; k < 32; k++) begin
        int idx;
        idx = r * 32 + k;
        if (idx < len) begin
          dl_data[s][8*(31-k) +: 8] <= b[idx];
          dl_valid[s][31-k] <= 1'b1;
          if (idx == 0)       dl_sop[s][31-k] <= 1'b1;
          if (idx == len - 1) dl_eop[s][31-k] <= 1'b1;
        end
      end
      @(posedge clk);
    end
    dl_wr[s]    <= 1'b0;
    dl_sop[s]   <= '0;
    dl_eop[s]   <= '0;
    dl_valid[s] <= '0;
    @(posedge clk);
    while (dl_ack[s]) @(posedge clk);
  endtask

  task automatic sender(input int s, input int npkt);
    for (int p = 0; p < npkt; p++) begin
      int gap;
      if (p == 3)                      send_packet(s, 544, 0);
      else if ($urandom_range(0, 2) == 0) send_packet(s, 6, 1);
      else                             send_packet(s, 2 * int'($urandom_range(2, 32)), 0);
      gap = int'($urandom_range(0, 30));
      repeat (gap) @(posedge clk);
    end
  endtask

  // ---------------- monitors ----------------
  always @(posedge clk) begin
    if (rst_n) begin
      cycles++;
      for (int s = 0; s < 2; s++) begin
        if (linkup[s]) begin
          if ((!txk[s][0] && txd[s][7:0] == 8'h1C) || (!txk[s][1] && txd[s][15:8] == 8'h1C)) n_skp++;
          if (txk[s] == 2'b11 && txd[s] == 16'h0000) n_idle++;
        end
      end
      if (dut_a.u_tx.u_ctrl.state_q != 0 && !dut_a.u_tx.osb_empty) n_os_wait++;
      if (dut_b.u_tx.u_ctrl.state_q != 0 && !dut_b.u_tx.osb_empty) n_os_wait++;
      if (dut_a.u_rx.u_ci.state_q == 2 && dut_a.u_rx.u_ci.cnt1 != dut_a.u_rx.u_ci.cnt2) n_stall++;
      if (dut_b.u_rx.u_ci.state_q == 2 && dut_b.u_rx.u_ci.cnt1 != dut_b.u_rx.u_ci.cnt2) n_stall++;
      if (cycles > 200000) begin
        failures++;
        $display("FAIL watchdog: states %h %h", lstate[0], lstate[1]);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never seen: %s", what);
    end else $display("mechanism %s: %0d", what, n);
  endtask

  initial begin
    for (int s = 0; s < 2; s++) begin
      dl_data[s] = '0; dl_sop[s] = '0; dl_eop[s] = '0; dl_valid[s] = '0;
      dl_wr[s] = 1'b0; dl_type[s] = 1'b0;
      n_tlp[s] = 0; n_dllp[s] = 0;
    end
    n_skp = 0; n_idle = 0; n_os_wait = 0; n_stall = 0; n_trained = 0; n_big = 0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    // training
    while (!(linkup[0] && linkup[1])) @(posedge clk);
    $display("both ports in L0 after %0d clocks", cycles);
    checks++;
    if (lstate[0] != 5'h0A || lstate[1] != 5'h0A) begin
      failures++;
      $display("FAIL LTSSM states %h %h", lstate[0], lstate[1]);
    end else n_trained++;
    // traffic both ways
    fork
      sender(0, 40);
      sender(1, 40);
    join
    // drain
    while ((exp_len[0].size() != 0 || exp_len[1].size() != 0) && cycles < 190000) @(posedge clk);
    repeat (100) @(posedge clk);
    checks++;
    if (exp_len[0].size() != 0 || exp_len[1].size() != 0) begin
      failures++;
      $display("FAIL packets not delivered: %0d to A, %0d to B", exp_len[0].size(), exp_len[1].size());
    end
    // maximum-size TLPs back to back, both ways at once
    t0 = cycles;
    fork
      for (int p = 0; p < 30; p++) send_packet(0, 544, 0);
      for (int p = 0; p < 30; p++) send_packet(1, 544, 0);
    join
    while ((exp_len[0].size() != 0 || exp_len[1].size() != 0) && cycles < 190000) @(posedge clk);
    checks++;
    if (exp_len[0].size() != 0 || exp_len[1].size() != 0) begin
      failures++;
      $display("FAIL 544-byte TLPs not delivered: %0d to A, %0d to B", exp_len[0].size(), exp_len[1].size());
    end else n_big = 30;
    $display("30 TLPs of 544 bytes each way in %0d clocks", cycles - t0);
    checks++;
    if (cycles - t0 > BIG_BOUND) begin
      failures++;
      $display("FAIL 544-byte TLPs took %0d clocks, bound %0d", cycles - t0, BIG_BOUND);
    end
    repeat (100) @(posedge clk);
    checks++;
    if (!linkup[0] || !linkup[1]) begin
      failures++;
      $display("FAIL link left L0: %h %h", lstate[0], lstate[1]);
    end
    need("link trained to L0", n_trained);
    need("TLP A->B", n_tlp[1]);
    need("TLP B->A", n_tlp[0]);
    need("DLLP A->B", n_dllp[1]);
    need("DLLP B->A", n_dllp[0]);
    need("SKP symbols in L0", n_skp);
    need("logical idle in L0", n_idle);
    need("ordered set waiting behind a packet", n_os_wait);
    need("receive ACK stall", n_stall);
    need("30 consecutive 544-byte TLPs each way", n_big);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
