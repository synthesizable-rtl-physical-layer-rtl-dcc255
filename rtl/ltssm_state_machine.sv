// ltssm_state_machine: the sub-state controller of the LTSSM for a Gen1 x1
// link. Normal flow: Detect.Quiet -> Detect.Active -> Polling.Active ->
// Polling.Config -> Config.Linkwidth.Start -> .Linkwidth.Accept ->
// .Lanenum.Wait -> .Lanenum.Accept -> .Complete -> .Idle -> L0. A small
// Recovery (RcvrLock -> RcvrCfg -> Config.Idle) is entered from L0 when the
// partner sends training sets again. Every timeout returns to Detect.Quiet.
// In each sub-state it tells the OS creator which set to send (TS1/TS2 with
// PAD or assigned link and lane numbers, logical idle, SKP) and how many,
// loads the timer with the sub-state's timeout, and leaves when the creator's
// Counter_Ack and/or the decoder's Ack say the required sets were sent and
// received (exit conditions of the document's tables; thresholds live in the
// creator request and the decoder). Configuration differs by role: a
// downstream port proposes link and lane numbers, an upstream port echoes
// them. In L0 a SKP set is sent every SKP_INTERVAL clocks (1180 symbol
// times). The first clock of every sub-state is a settling clock: the timer
// and the counts are restarted (o_State_change, creator enable low) and no
// exit is taken. Timeouts are in PCLK cycles (125 MHz); the defaults are the
// specification's milliseconds. Recovery's sub-states, the settling clock and
// the cycle conversion are this design's choices.
module ltssm_state_machine
  import pcie_mac_pkg::*;
#(
  parameter int unsigned T_DETECT      = 1500000,  // 12 ms
  parameter int unsigned T_POLL_ACTIVE = 3000000,  // 24 ms
  parameter int unsigned T_POLL_CONFIG = 6000000,  // 48 ms
  parameter int unsigned T_CFG_LW      = 3000000,  // 24 ms
  parameter int unsigned T_CFG_2MS     = 250000,   //  2 ms
  parameter int unsigned NUM_TS1_POLL  = 1024,
  parameter int unsigned NUM_TS2_SENT  = 16,
  parameter int unsigned NUM_IDLE_SENT = 16,
  parameter int unsigned SKP_INTERVAL  = 590,
  parameter logic [7:0]  LINK_NUMBER   = 8'd0,
  parameter logic [7:0]  LANE_NUMBER   = 8'd0,
  parameter logic [7:0]  N_FTS         = 8'd32
) (
  input  logic              i_clk,
  input  logic              i_reset_n,
  input  logic              i_IsDownstream,
  // OS creator
  output logic [15:0][7:0]  o_OS_Symbols,
  output logic [1:0]        o_OS_type,
  output logic [10:0]       o_OS_reqNum,
  output logic              o_Creator_En,
  input  logic              i_Counter_Ack,
  // PIPE operation block
  input  logic              i_LTSSM_UpLink,
  input  logic              i_LTSSM_RxElecidle,
  input  logic              i_LTSSM_LaneDetected,
  output logic [4:0]        o_LTSSM_state,
  // decoder
  input  logic [1:0]        i_Decoder_Ack,
  input  logic [7:0]        i_Decoder_Lane,
  input  logic [7:0]        i_Decoder_Link,
  output logic              o_State_change,
  // timer
  output logic [22:0]       o_Timeout_value,
  output logic              o_Start,
  input  logic              i_Timeout,
  // Tx
  output logic              o_L0_UP
);
  ltssm_state_t state_q, state_n;
  logic         first_q;
  logic [7:0]   link_q, lane_q;
  logic         skp_sending_q, skp_restart_q;

  function automatic logic [15:0][7:0] ts_syms(input logic is_ts2,
                                               input logic [7:0] link,
                                               input logic [7:0] lane);
    logic [15:0][7:0] s;
    s[0] = K_COM;
    s[1] = link;
    s[2] = lane;
    s[3] = N_FTS;
    s[4] = RATE_GEN1;
    s[5] = 8'h00;               // training control: nothing special
    for (int i = 6; i < 16; i++) s[i] = is_ts2 ? TS2_ID : TS1_ID;
    return s;
  endfunction

  // ---------------- next state ----------------
  always_comb begin
    state_n = state_q;
    if (!first_q) begin
      unique case (state_q)
        ST_DETECT_QUIET:
          if (i_Timeout || !i_LTSSM_RxElecidle) state_n = ST_DETECT_ACTIVE;
        ST_DETECT_ACTIVE:
          if (i_LTSSM_LaneDetected)             state_n = ST_POLLING_ACTIVE;
          else if (i_Timeout)                   state_n = ST_DETECT_QUIET;
        ST_POLLING_ACTIVE, ST_POLLING_CONFIG, ST_CFG_COMPLETE, ST_RCV_CFG:
          if (i_Counter_Ack && i_Decoder_Ack[0]) begin
            unique case (state_q)
              ST_POLLING_ACTIVE: state_n = ST_POLLING_CONFIG;
              ST_POLLING_CONFIG: state_n = ST_CFG_LW_START;
              default:           state_n = ST_CFG_IDLE;
            endcase
          end else if (i_Timeout)               state_n = ST_DETECT_QUIET;
        ST_CFG_LW_START, ST_CFG_LW_ACCEPT, ST_CFG_LN_WAIT, ST_CFG_LN_ACCEPT, ST_RCV_LOCK:
          if (i_Decoder_Ack[0]) begin
            unique case (state_q)
              ST_CFG_LW_START:  state_n = ST_CFG_LW_ACCEPT;
              ST_CFG_LW_ACCEPT: state_n = ST_CFG_LN_WAIT;
              ST_CFG_LN_WAIT:   state_n = ST_CFG_LN_ACCEPT;
              ST_CFG_LN_ACCEPT: state_n = ST_CFG_COMPLETE;
              default:          state_n = ST_RCV_CFG;
            endcase
          end else if (i_Timeout)               state_n = ST_DETECT_QUIET;
        ST_CFG_IDLE:
          if (i_Counter_Ack && i_Decoder_Ack[0] && i_LTSSM_UpLink) state_n = ST_L0;
          else if (i_Timeout)                   state_n = ST_DETECT_QUIET;
        ST_L0:
          if (i_Decoder_Ack[1])                 state_n = ST_RCV_LOCK;
        default:                                state_n = ST_DETECT_QUIET;
      endcase
    end
  end

  always_ff @(posedge i_clk or negedge i_reset_n) begin
    if (!i_reset_n) begin
      state_q       <= ST_DETECT_QUIET;
      first_q       <= 1'b1;
      link_q        <= K_PAD;
      lane_q        <= K_PAD;
      skp_sending_q <= 1'b0;
      skp_restart_q <= 1'b0;
    end else begin
      state_q       <= state_n;
      first_q       <= (state_n != state_q);
      skp_restart_q <= 1'b0;
      if (state_n == ST_DETECT_QUIET) begin
        link_q <= K_PAD;
        lane_q <= K_PAD;
      end else if (state_q == ST_CFG_LW_START && state_n == ST_CFG_LW_ACCEPT) begin
        link_q <= i_Decoder_Link;
      end else if (state_q == ST_CFG_LW_ACCEPT && state_n == ST_CFG_LN_WAIT) begin
        lane_q <= i_IsDownstream ? LANE_NUMBER : i_Decoder_Lane;
      end
      // SKP scheduling in L0
      if (state_q != ST_L0 || state_n != ST_L0) begin
        skp_sending_q <= 1'b0;
      end else if (!skp_sending_q && i_Timeout) begin
        skp_sending_q <= 1'b1;
      end else if (skp_sending_q && i_Counter_Ack) begin
        skp_sending_q <= 1'b0;
        skp_restart_q <= 1'b1;
      end
    end
  end

  // ---------------- outputs ----------------
  always_comb begin
    o_OS_Symbols    = ts_syms(1'b0, K_PAD, K_PAD);
    o_OS_type       = OS_TS;
    o_OS_reqNum     = 11'd1;
    o_Creator_En    = !first_q;
    o_Timeout_value = 23'(T_CFG_2MS);
    unique case (state_q)
      ST_DETECT_QUIET, ST_DETECT_ACTIVE: begin
        o_Creator_En    = 1'b0;
        o_Timeout_value = 23'(T_DETECT);
      end
      ST_POLLING_ACTIVE: begin
        o_OS_reqNum     = 11'(NUM_TS1_POLL);
        o_Timeout_value = 23'(T_POLL_ACTIVE);
      end
      ST_POLLING_CONFIG: begin
        o_OS_Symbols    = ts_syms(1'b1, K_PAD, K_PAD);
        o_OS_reqNum     = 11'(NUM_TS2_SENT);
        o_Timeout_value = 23'(T_POLL_CONFIG);
      end
      ST_CFG_LW_START: begin
        o_OS_Symbols    = ts_syms(1'b0, i_IsDownstream ? LINK_NUMBER : K_PAD, K_PAD);
        o_Timeout_value = 23'(T_CFG_LW);
      end
      ST_CFG_LW_ACCEPT: begin
        o_OS_Symbols    = ts_syms(1'b0, link_q, i_IsDownstream ? LANE_NUMBER : K_PAD);
        o_Timeout_value = 23'(T_CFG_LW);
      end
      ST_CFG_LN_WAIT, ST_CFG_LN_ACCEPT:
        o_OS_Symbols    = ts_syms(1'b0, link_q, lane_q);
      ST_CFG_COMPLETE: begin
        o_OS_Symbols    = ts_syms(1'b1, link_q, lane_q);
        o_OS_reqNum     = 11'(NUM_TS2_SENT);
      end
      ST_CFG_IDLE: begin
        o_OS_type       = OS_IDLE;
        o_OS_reqNum     = 11'(NUM_IDLE_SENT);
      end
      ST_L0: begin
        o_OS_type       = OS_OTHER;
        o_OS_Symbols    = '0;
        o_OS_Symbols[0] = K_COM;
        o_OS_Symbols[1] = K_SKP;
        o_OS_Symbols[2] = K_SKP;
        o_OS_Symbols[3] = K_SKP;
        o_Creator_En    = skp_sending_q;
        o_Timeout_value = 23'(SKP_INTERVAL);
      end
      ST_RCV_LOCK: begin
        o_OS_Symbols    = ts_syms(1'b0, link_q, lane_q);
        o_Timeout_value = 23'(T_POLL_ACTIVE);
      end
      ST_RCV_CFG: begin
        o_OS_Symbols    = ts_syms(1'b1, link_q, lane_q);
        o_OS_reqNum     = 11'(NUM_TS2_SENT);
        o_Timeout_value = 23'(T_POLL_CONFIG);
      end
      default: o_Creator_En = 1'b0;
    endcase
  end

  assign o_Start        = !first_q && !skp_restart_q;
  assign o_State_change = first_q;
  assign o_LTSSM_state  = state_q;
  assign o_L0_UP        = (state_q == ST_L0);
endmodule
