// ltssm: link training and status state machine of the MAC. It joins the
// state machine, the timer, the ordered-set creator (towards Tx), the
// ordered-set decoder (from Rx) and the PIPE operation block (towards the
// PHY). Tx interface: o_OScreator_Data/valid words, stalled by
// i_Tx_OSbufferFull. Rx interface: two symbols per clock with valid, COM and
// D/K (1 = data) flags. o_L0_UP tells Tx and Rx the link is in L0.
// i_IsDownstream selects the configuration role. Parameters are the state
// machine's timeouts (PCLK cycles) and set counts, and the decoder's receive
// thresholds; defaults are the specification values the document lists.
// TxCompliance, RxPolarity and Rate are constant 0 (Gen1, no compliance
// pattern, no polarity inversion).
module ltssm
  import pcie_mac_pkg::*;
#(
  parameter int unsigned T_DETECT        = 1500000,
  parameter int unsigned T_POLL_ACTIVE   = 3000000,
  parameter int unsigned T_POLL_CONFIG   = 6000000,
  parameter int unsigned T_CFG_LW        = 3000000,
  parameter int unsigned T_CFG_2MS       = 250000,
  parameter int unsigned NUM_TS1_POLL    = 1024,
  parameter int unsigned NUM_TS2_SENT    = 16,
  parameter int unsigned NUM_IDLE_SENT   = 16,
  parameter int unsigned SKP_INTERVAL    = 590,
  parameter int unsigned NUM_RX_POLL     = 8,
  parameter int unsigned NUM_RX_CFG      = 2,
  parameter int unsigned NUM_RX_COMPLETE = 8,
  parameter int unsigned NUM_RX_IDLE     = 8,
  parameter logic [7:0]  LINK_NUMBER     = 8'd0,
  parameter logic [7:0]  LANE_NUMBER     = 8'd0,
  parameter logic [7:0]  N_FTS           = 8'd32
) (
  input  logic        i_clk,
  input  logic        i_reset_n,
  input  logic        i_IsDownstream,
  // PHY (PIPE)
  input  logic        i_PhyStatus,
  input  logic        i_RxElecIdle,
  input  logic [2:0]  i_RxStatus,
  output logic        o_TxDetectRx_loopback,
  output logic        o_TxElecIdle,
  output logic        o_TxCompliance,
  output logic        o_RxPolarity,
  output logic [1:0]  o_PowerDown,
  output logic        o_Rate,
  // Tx
  input  logic        i_Tx_OSbufferFull,
  output logic [15:0] o_OScreator_Data,
  output logic        o_OScreator_valid,
  // Rx
  input  logic [15:0] i_Rx_Data,
  input  logic [1:0]  i_Rx_DataK,
  input  logic [1:0]  i_Rx_valid,
  input  logic [1:0]  i_Rx_COM_Indicator,
  // status
  output logic        o_L0_UP,
  output logic [4:0]  o_LTSSM_state
);
  logic [15:0][7:0] os_symbols;
  logic [1:0]       os_type;
  logic [10:0]      os_reqnum;
  logic             creator_en, counter_ack;
  logic             uplink, rxelecidle, lanedet;
  logic [1:0]       dec_ack;
  logic [7:0]       dec_lane, dec_link;
  logic             state_change;
  logic [22:0]      tmo_value;
  logic             tmr_start, tmo;

  ltssm_state_machine #(
    .T_DETECT(T_DETECT), .T_POLL_ACTIVE(T_POLL_ACTIVE), .T_POLL_CONFIG(T_POLL_CONFIG),
    .T_CFG_LW(T_CFG_LW), .T_CFG_2MS(T_CFG_2MS), .NUM_TS1_POLL(NUM_TS1_POLL),
    .NUM_TS2_SENT(NUM_TS2_SENT), .NUM_IDLE_SENT(NUM_IDLE_SENT), .SKP_INTERVAL(SKP_INTERVAL),
    .LINK_NUMBER(LINK_NUMBER), .LANE_NUMBER(LANE_NUMBER), .N_FTS(N_FTS)
  ) u_sm (
    .i_clk, .i_reset_n, .i_IsDownstream,
    .o_OS_Symbols(os_symbols), .o_OS_type(os_type), .o_OS_reqNum(os_reqnum),
    .o_Creator_En(creator_en), .i_Counter_Ack(counter_ack),
    .i_LTSSM_UpLink(uplink), .i_LTSSM_RxElecidle(rxelecidle), .i_LTSSM_LaneDetected(lanedet),
    .o_LTSSM_state,
    .i_Decoder_Ack(dec_ack), .i_Decoder_Lane(dec_lane), .i_Decoder_Link(dec_link),
    .o_State_change(state_change),
    .o_Timeout_value(tmo_value), .o_Start(tmr_start), .i_Timeout(tmo),
    .o_L0_UP
  );

  ltssm_timer #(.WIDTH(23)) u_timer (
    .i_clk, .i_reset_n, .i_Timeout_value(tmo_value), .i_Start(tmr_start), .o_Timeout(tmo)
  );

  ltssm_os_creator u_creator (
    .i_clk, .i_reset_n, .i_Enable(creator_en), .i_OS_type(os_type),
    .i_OS_Symbols(os_symbols), .i_reqNum(os_reqnum), .i_Tx_OSbufferFull,
    .o_OScreator_Data, .o_OScreator_valid, .o_Counter_Ack(counter_ack)
  );

  ltssm_os_decoder #(
    .NUM_RX_POLL(NUM_RX_POLL), .NUM_RX_CFG(NUM_RX_CFG),
    .NUM_RX_COMPLETE(NUM_RX_COMPLETE), .NUM_RX_IDLE(NUM_RX_IDLE)
  ) u_decoder (
    .i_clk, .i_reset_n, .i_Rx_Data, .i_Rx_DataK, .i_Rx_valid, .i_Rx_COM_Indicator,
    .i_LTSSM_state(o_LTSSM_state), .i_State_change(state_change), .i_IsDownstream,
    .o_OSdecoder_Ack(dec_ack), .o_OSdecoder_Lane(dec_lane), .o_OSdecoder_Link(dec_link)
  );

  ltssm_pipe_operation u_pipe (
    .i_clk, .i_reset_n, .i_LTSSM_State(o_LTSSM_state),
    .i_PhyStatus, .i_RxElecIdle, .i_RxStatus,
    .o_TxDetectRx_loopback, .o_TxElecIdle, .o_TxCompliance, .o_RxPolarity,
    .o_PowerDown, .o_Rate,
    .o_PIPE_UpLink(uplink), .o_PIPE_RxElecidle(rxelecidle), .o_PIPE_LaneDetected(lanedet)
  );
endmodule
