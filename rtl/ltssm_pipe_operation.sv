// ltssm_pipe_operation: the LTSSM's side of the PIPE 3.0 control interface.
// From the current LTSSM sub-state it drives the PHY controls and turns PHY
// status into three flags for the state machine.
//  * Detect.Quiet / Detect.Active: transmitter electrically idle, PowerDown
//    P1 (10). In Detect.Active it raises TxDetectRx once and holds it until
//    the PHY answers with PhyStatus; RxStatus = 011 then means a receiver is
//    present (o_PIPE_LaneDetected, held until Detect.Quiet), 000 none.
//  * other states: transmitter active, PowerDown P0 (00).
// o_PIPE_UpLink ("bit and symbol lock") is this design's proxy: the receiver
// is out of electrical idle outside Detect. Rate is fixed at 2.5 GT/s;
// compliance and polarity inversion are not used. The detect handshake and
// the RxStatus codes follow the document; the PowerDown choice and the
// UpLink proxy are this design's. TxCompliance, RxPolarity and Rate are
// therefore constant 0, and o_PIPE_RxElecidle is i_RxElecIdle passed on.
module ltssm_pipe_operation
  import pcie_mac_pkg::*;
(
  input  logic       i_clk,
  input  logic       i_reset_n,
  input  logic [4:0] i_LTSSM_State,
  input  logic       i_PhyStatus,
  input  logic       i_RxElecIdle,
  input  logic [2:0] i_RxStatus,
  output logic       o_TxDetectRx_loopback,
  output logic       o_TxElecIdle,
  output logic       o_TxCompliance,
  output logic       o_RxPolarity,
  output logic [1:0] o_PowerDown,
  output logic       o_Rate,
  output logic       o_PIPE_UpLink,
  output logic       o_PIPE_RxElecidle,
  output logic       o_PIPE_LaneDetected
);
  logic in_detect, in_active;
  logic det_req;       // TxDetectRx asserted, waiting for PhyStatus
  logic det_done;      // detection finished for this visit of Detect.Active
  logic lane_det;

  assign in_active = (ltssm_state_t'(i_LTSSM_State) == ST_DETECT_ACTIVE);
  assign in_detect = (ltssm_state_t'(i_LTSSM_State) == ST_DETECT_QUIET) || in_active;

  always_ff @(posedge i_clk or negedge i_reset_n) begin
    if (!i_reset_n) begin
      det_req  <= 1'b0;
      det_done <= 1'b0;
      lane_det <= 1'b0;
    end else if (!in_active) begin
      det_req  <= 1'b0;
      det_done <= 1'b0;
      if (ltssm_state_t'(i_LTSSM_State) == ST_DETECT_QUIET) lane_det <= 1'b0;
    end else if (!det_done) begin
      if (!det_req) begin
        det_req <= 1'b1;
      end else if (i_PhyStatus) begin
        det_req  <= 1'b0;
        det_done <= 1'b1;
        lane_det <= (i_RxStatus == 3'b011);
      end
    end
  end

  assign o_TxDetectRx_loopback = det_req;
  assign o_TxElecIdle          = in_detect;
  assign o_TxCompliance        = 1'b0;
  assign o_RxPolarity          = 1'b0;
  assign o_PowerDown           = in_detect ? 2'b10 : 2'b00;
  assign o_Rate                = 1'b0;
  assign o_PIPE_UpLink         = !in_detect && !i_RxElecIdle;
  assign o_PIPE_RxElecidle     = i_RxElecIdle;
  assign o_PIPE_LaneDetected   = lane_det;
endmodule
