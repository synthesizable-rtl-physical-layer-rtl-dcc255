// tb_ltssm_pipe_operation: checks the PIPE control outputs of the LTSSM.
// The testbench walks the LTSSM state input through random sequences of
// Detect.Quiet, Detect.Active and later states, answers receiver detection
// with a PhyStatus pulse after a random delay and a random RxStatus (011 =
// receiver present), and toggles RxElecIdle. Expected values, per clock:
//  * TxElecIdle = 1 and PowerDown = 10 (P1) in Detect, else 0 / 00;
//  * TxDetectRx goes high the clock after Detect.Active is entered, stays
//    high until PhyStatus, and is not raised again in the same visit;
//  * LaneDetected is set by PhyStatus with RxStatus = 011, kept outside
//    Detect.Quiet and cleared there;
//  * UpLink = outside Detect and RxElecIdle low; TxCompliance, RxPolarity
//    and Rate stay 0 (Gen1).
// A watchdog stops a hung run.
module tb_ltssm_pipe_operation;
  logic clk;
  logic rst_n;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [4:0] state;
  logic       phystatus, rxei, det, txei, comp, pol, rate, uplink, rxei_o, lane;
  logic [2:0] rxstatus;
  logic [1:0] pd;

  ltssm_pipe_operation u_dut (
    .i_clk(clk), .i_reset_n(rst_n), .i_LTSSM_State(state), .i_PhyStatus(phystatus),
    .i_RxElecIdle(rxei), .i_RxStatus(rxstatus), .o_TxDetectRx_loopback(det),
    .o_TxElecIdle(txei), .o_TxCompliance(comp), .o_RxPolarity(pol), .o_PowerDown(pd),
    .o_Rate(rate), .o_PIPE_UpLink(uplink), .o_PIPE_RxElecidle(rxei_o),
    .o_PIPE_LaneDetected(lane)
  );

  int  checks, failures, n_det, n_lane;
  bit  m_req, m_done, m_lane;     // model
  bit  in_da_prev;
  int  answer_in;

  task automatic fail(input string m);
    failures++;
    $display("FAIL %s (state %0d)", m, state);
  endtask

  task automatic tick;
    bit detect;
    detect = (state == 5'd0) || (state == 5'd1);
    checks++;
    if (txei != detect) fail("TxElecIdle");
    if (pd != (detect ? 2'b10 : 2'b00)) fail("PowerDown");
    if (det != m_req) fail("TxDetectRx");
    if (lane != m_lane) fail("LaneDetected");
    if (uplink != (!detect && !rxei)) fail("UpLink");
    if (rxei_o != rxei) fail("RxElecIdle");
    if (comp || pol || rate) fail("constant outputs");
    if (det) n_det++;
    if (lane) n_lane++;
    // model of the registers, next clock
    if (state != 5'd1) begin
      m_req = 0; m_done = 0;
      if (state == 5'd0) m_lane = 0;
    end else if (!m_done) begin
      if (!m_req) m_req = 1;
      else if (phystatus) begin
        m_req = 0; m_done = 1; m_lane = (rxstatus == 3'b011);
      end
    end
    @(posedge clk);
    @(negedge clk);
  endtask

  initial begin
    checks = 0; failures = 0; n_det = 0; n_lane = 0;
    m_req = 0; m_done = 0; m_lane = 0; in_da_prev = 0; answer_in = 0;
    state = 5'd0; phystatus = 1'b0; rxei = 1'b1; rxstatus = 3'b000;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int v = 0; v < 300; v++) begin
      int len;
      // pick the next state: mostly Detect, sometimes later states
      case ($urandom_range(0, 3))
        0:       state = 5'd0;
        1, 2:    state = 5'd1;
        default: state = 5'($urandom_range(2, 12));
      endcase
      len = int'($urandom_range(1, 20));
      answer_in = int'($urandom_range(1, 8));
      for (int i = 0; i < len; i++) begin
        rxei = ($urandom_range(0, 3) == 0);
        // PHY answers TxDetectRx after a random delay
        if (det && answer_in > 0) answer_in--;
        phystatus = det && (answer_in == 0) || ($urandom_range(0, 30) == 0);
        rxstatus  = phystatus ? ($urandom_range(0, 2) != 0 ? 3'b011 : 3'b000) : 3'($urandom);
        #1 tick();
      end
    end
    checks += 2;
    if (n_det == 0)  fail("TxDetectRx never raised");
    if (n_lane == 0) fail("lane never detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
