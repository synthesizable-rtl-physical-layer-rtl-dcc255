// tx_controller: arbiter and sequencer of the transmit path. Each clock it
// chooses what the multiplexer sends:
//  * between packets, a waiting ordered-set word has priority and is read;
//  * otherwise, only in L0, a packet waiting in the Tx buffer is started:
//    the framing word STP (TLP) or SDP (DLLP) is sent, chosen from the packet
//    indicator of the head word, then the packet's words are read one per
//    clock; the packet ends when the next indicator is not "continuation"
//    (or the buffer is empty), and the END word follows. A packet is never
//    interrupted: ordered sets arriving meanwhile wait, and a packet in
//    flight is finished even if L0 drops;
//  * otherwise logical idle.
// A head word with an indicator that does not start a packet is discarded.
// Outputs are combinational from the state and the buffer flags; mux
// encoding: 00 Tx buffer, 01 framing, 10 idle, 11 ordered set.
module tx_controller
  import pcie_mac_pkg::*;
(
  input  logic       i_clk,
  input  logic       i_reset_n,
  input  logic       i_L0,
  input  logic       i_OS_Empty,
  input  logic       i_TxBuffer_Empty,
  input  logic [1:0] i_Pi_Buffer,
  output logic [1:0] o_Mux_Sel,
  output logic [1:0] o_SE_Sel,
  output logic       o_OS_rd_en,
  output logic       o_TxBuffer_rd_en,
  output logic       o_PiBuffer_rd_en
);
  typedef enum logic [1:0] {S_FREE, S_FIRST, S_DATA} ctl_state_t;
  ctl_state_t state_q, state_n;
  logic       tx_rd;

  always_comb begin
    state_n    = state_q;
    o_Mux_Sel  = MUX_IDLE;
    o_SE_Sel   = SE_STP;
    o_OS_rd_en = 1'b0;
    tx_rd      = 1'b0;
    unique case (state_q)
      S_FREE: begin
        if (!i_OS_Empty) begin
          o_Mux_Sel  = MUX_OS;
          o_OS_rd_en = 1'b1;
        end else if (i_L0 && !i_TxBuffer_Empty) begin
          if (pi_t'(i_Pi_Buffer) == PI_TLP || pi_t'(i_Pi_Buffer) == PI_DLLP) begin
            o_Mux_Sel = MUX_SE;
            o_SE_Sel  = (pi_t'(i_Pi_Buffer) == PI_TLP) ? SE_STP : SE_SDP;
            state_n   = S_FIRST;
          end else begin
            tx_rd = 1'b1;                 // stray word: drop it
          end
        end
      end
      S_FIRST: begin
        o_Mux_Sel = MUX_TXBUF;
        tx_rd     = 1'b1;
        state_n   = S_DATA;
      end
      default: begin
        if (!i_TxBuffer_Empty && pi_t'(i_Pi_Buffer) == PI_CONT) begin
          o_Mux_Sel = MUX_TXBUF;
          tx_rd     = 1'b1;
        end else begin
          o_Mux_Sel = MUX_SE;
          o_SE_Sel  = SE_END;
          state_n   = S_FREE;
        end
      end
    endcase
  end

  assign o_TxBuffer_rd_en = tx_rd;
  assign o_PiBuffer_rd_en = tx_rd;

  always_ff @(posedge i_clk or negedge i_reset_n) begin
    if (!i_reset_n) state_q <= S_FREE;
    else            state_q <= state_n;
  end
endmodule
