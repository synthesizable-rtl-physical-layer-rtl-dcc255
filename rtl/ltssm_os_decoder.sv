// ltssm_os_decoder: receive side of the LTSSM. It takes the symbols the Rx
// block forwards to the LTSSM (two per clock, byte 0 first, each with valid,
// COM and D/K flags; D/K bit 1 = data) and
//  * assembles ordered sets: a COM starts a set; COM followed by SKP or IDL is
//    a 4-symbol "other" set, anything else a 16-symbol training sequence
//    (OS_Filter / OtherOS_Detector);
//  * checks a TS: symbols 6..15 must all be the TS1 (4Ah) or TS2 (45h)
//    identifier as data (TS_Detector);
//  * counts logical idle data symbols (00h) received outside any set;
//  * matches each good TS against what the current sub-state and port role
//    expect, and counts consecutive matches carrying the same link and lane
//    numbers (Decoder_MainBlock).
// o_OSdecoder_Ack[0] is high (combinationally from registers) when the count
// for the current sub-state has reached its threshold; [1] reports that TS1/
// TS2 were received while in L0 (entry to Recovery). i_State_change clears the
// count. Link/Lane outputs hold the numbers of the last matching TS. The
// per-state match rules follow the document's exit-condition tables; the
// assembler and the consecutive rule are this design's.
module ltssm_os_decoder
  import pcie_mac_pkg::*;
#(
  parameter int unsigned NUM_RX_POLL     = 8,
  parameter int unsigned NUM_RX_CFG      = 2,
  parameter int unsigned NUM_RX_COMPLETE = 8,
  parameter int unsigned NUM_RX_IDLE     = 8,
  parameter int unsigned NUM_RX_L0       = 2
) (
  input  logic        i_clk,
  input  logic        i_reset_n,
  input  logic [15:0] i_Rx_Data,
  input  logic [1:0]  i_Rx_DataK,
  input  logic [1:0]  i_Rx_valid,
  input  logic [1:0]  i_Rx_COM_Indicator,
  input  logic [4:0]  i_LTSSM_state,
  input  logic        i_State_change,
  input  logic        i_IsDownstream,
  output logic [1:0]  o_OSdecoder_Ack,
  output logic [7:0]  o_OSdecoder_Lane,
  output logic [7:0]  o_OSdecoder_Link
);
  // ---------------- set assembler ----------------
  logic             coll_q, other_q;
  logic [4:0]       idx_q;
  logic [15:0][7:0] syms_q;
  logic [15:0]      kf_q;

  logic             coll_n, other_n;
  logic [4:0]       idx_n;
  logic [15:0][7:0] syms_n;
  logic [15:0]      kf_n;
  logic             ts_done;
  logic [15:0][7:0] ts_syms;
  logic [15:0]      ts_kf;
  logic [1:0]       idle_syms;

  always_comb begin
    logic [7:0] b;
    logic       isk;
    coll_n    = coll_q;
    other_n   = other_q;
    idx_n     = idx_q;
    syms_n    = syms_q;
    kf_n      = kf_q;
    ts_done   = 1'b0;
    ts_syms   = syms_q;
    ts_kf     = kf_q;
    idle_syms = '0;
    for (int i = 0; i < 2; i++) begin
      b   = i_Rx_Data[8*i +: 8];
      isk = !i_Rx_DataK[i];
      if (i_Rx_valid[i]) begin
        if (i_Rx_COM_Indicator[i] || (isk && b == K_COM)) begin
          coll_n    = 1'b1;
          other_n   = 1'b0;
          idx_n     = 5'd1;
          syms_n    = '0;
          kf_n      = '0;
          syms_n[0] = b;
          kf_n[0]   = 1'b1;
        end else if (coll_n) begin
          syms_n[idx_n[3:0]] = b;
          kf_n[idx_n[3:0]]   = isk;
          if (idx_n == 5'd1 && isk && (b == K_SKP || b == K_IDL)) other_n = 1'b1;
          idx_n = idx_n + 5'd1;
          if (other_n && idx_n == 5'd4) begin
            coll_n = 1'b0;
          end else if (!other_n && idx_n == 5'd16) begin
            coll_n  = 1'b0;
            ts_done = 1'b1;
            ts_syms = syms_n;
            ts_kf   = kf_n;
          end
        end else if (!isk && b == 8'h00) begin
          idle_syms = idle_syms + 2'd1;
        end
      end
    end
  end

  always_ff @(posedge i_clk or negedge i_reset_n) begin
    if (!i_reset_n) begin
      coll_q  <= 1'b0;
      other_q <= 1'b0;
      idx_q   <= '0;
      syms_q  <= '0;
      kf_q    <= '0;
    end else begin
      coll_q  <= coll_n;
      other_q <= other_n;
      idx_q   <= idx_n;
      syms_q  <= syms_n;
      kf_q    <= kf_n;
    end
  end

  // ---------------- TS check ----------------
  logic ts_ok, ts2;
  always_comb begin
    ts_ok = ts_done && !ts_kf[6] && (ts_syms[6] == TS1_ID || ts_syms[6] == TS2_ID);
    for (int i = 7; i < 16; i++)
      if (ts_syms[i] != ts_syms[6] || ts_kf[i]) ts_ok = 1'b0;
    ts2 = (ts_syms[6] == TS2_ID);
  end

  // ---------------- main block ----------------
  logic [7:0] link_q, lane_q;
  logic [3:0] cnt_q;
  logic [1:0] l0cnt_q;

  logic [7:0] r_link, r_lane;
  logic       link_pad, lane_pad, link_eq, lane_eq, ts1;
  logic       match;
  logic [3:0] thr;
  ltssm_state_t st;

  always_comb begin
    st       = ltssm_state_t'(i_LTSSM_state);
    r_link   = ts_syms[1];
    r_lane   = ts_syms[2];
    link_pad = ts_kf[1] && (r_link == K_PAD);
    lane_pad = ts_kf[2] && (r_lane == K_PAD);
    link_eq  = !link_pad && (r_link == link_q);
    lane_eq  = !lane_pad && (r_lane == lane_q);
    ts1      = !ts2;
    match    = 1'b0;
    thr      = 4'(NUM_RX_CFG);
    unique case (st)
      ST_POLLING_ACTIVE: begin
        match = (ts1 && (ts_syms[5] == 8'h00 || ts_syms[5] == 8'h04)) || ts2;
        thr   = 4'(NUM_RX_POLL);
      end
      ST_POLLING_CONFIG: begin
        match = ts2;
        thr   = 4'(NUM_RX_POLL);
      end
      ST_CFG_LW_START:  match = ts1 && !link_pad;
      ST_CFG_LW_ACCEPT: match = i_IsDownstream ? (ts1 && link_eq && lane_pad)
                                               : (ts1 && link_eq && !lane_pad);
      ST_CFG_LN_WAIT:   match = i_IsDownstream ? (ts1 && link_eq && !lane_pad)
                                               : (ts2 && link_eq && lane_eq);
      ST_CFG_LN_ACCEPT: match = i_IsDownstream ? (ts1 && link_eq && lane_eq)
                                               : (ts2 && link_eq && lane_eq);
      ST_CFG_COMPLETE: begin
        match = ts2 && link_eq && lane_eq;
        thr   = 4'(NUM_RX_COMPLETE);
      end
      ST_CFG_IDLE:      thr = 4'(NUM_RX_IDLE);
      ST_RCV_LOCK: begin
        match = link_eq && lane_eq;
        thr   = 4'(NUM_RX_COMPLETE);
      end
      ST_RCV_CFG: begin
        match = ts2 && link_eq && lane_eq;
        thr   = 4'(NUM_RX_COMPLETE);
      end
      default: ;
    endcase
    match = match && ts_ok;
  end

  always_ff @(posedge i_clk or negedge i_reset_n) begin
    if (!i_reset_n) begin
      link_q  <= K_PAD;
      lane_q  <= K_PAD;
      cnt_q   <= '0;
      l0cnt_q <= '0;
    end else if (ltssm_state_t'(i_LTSSM_state) == ST_DETECT_QUIET ||
                 ltssm_state_t'(i_LTSSM_state) == ST_DETECT_ACTIVE) begin
      link_q  <= K_PAD;
      lane_q  <= K_PAD;
      cnt_q   <= '0;
      l0cnt_q <= '0;
    end else if (i_State_change) begin
      cnt_q   <= '0;
      l0cnt_q <= '0;
    end else begin
      if (st == ST_CFG_IDLE) begin
        if (cnt_q < 4'd14) cnt_q <= cnt_q + 4'(idle_syms);
      end else if (match) begin
        if (r_link != link_q || r_lane != lane_q) begin
          cnt_q  <= 4'd1;
          link_q <= r_link;
          lane_q <= r_lane;
        end else if (cnt_q != 4'hF) begin
          cnt_q <= cnt_q + 4'd1;
        end
      end
      if (st == ST_L0 && ts_ok && l0cnt_q != 2'b11) l0cnt_q <= l0cnt_q + 2'd1;
    end
  end

  assign o_OSdecoder_Ack[0] = (cnt_q >= thr) && (st != ST_L0) &&
                              (st != ST_DETECT_QUIET) && (st != ST_DETECT_ACTIVE);
  assign o_OSdecoder_Ack[1] = (st == ST_L0) && (l0cnt_q >= 2'(NUM_RX_L0));
  assign o_OSdecoder_Link   = link_q;
  assign o_OSdecoder_Lane   = lane_q;
endmodule
