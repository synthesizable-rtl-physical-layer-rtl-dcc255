// rx_controller_interface: hands complete packets from the row buffers to
// the data link layer, one packet at a time. Counter 1 counts packets
// committed to the buffers (i_controller_interface_end), counter 2 packets
// handed over. States:
//  * IDLE: counters equal, nothing to send. When they differ the first row is
//    read at once (o_rd_en); if that row holds the END the next state is HOLD,
//    otherwise SEND.
//  * SEND: one row per clock until the row holding the END.
//  * HOLD: at least one clock; waits for i_ACK from the data link layer, then
//    back to IDLE.
// The rows appear on the registered o_Rx_* outputs the clock after they are
// read, and the outputs are all zero when no row is sent. The state machine
// and counters follow the document; the output register is this design's.
module rx_controller_interface #(
  parameter int unsigned CW = 5
) (
  input  logic         i_clk,
  input  logic         i_reset_n,
  input  logic         i_controller_interface_ACK,
  input  logic         i_controller_interface_end,
  input  logic [31:0]  i_controller_interface_end_indicators,
  input  logic         i_buffer_empty,
  input  logic [255:0] i_row_data,
  input  logic [96:0]  i_row_control,
  output logic         o_controller_interface_rd_en,
  output logic [255:0] o_Rx_data,
  output logic [31:0]  o_Rx_start,
  output logic [31:0]  o_Rx_end,
  output logic [31:0]  o_Rx_valid,
  output logic         o_Rx_type
);
  typedef enum logic [1:0] {S_IDLE, S_SEND, S_HOLD} ci_state_t;
  ci_state_t     state_q;
  logic [CW-1:0] cnt1, cnt2;
  logic          rd, last_row;

  assign last_row = (i_controller_interface_end_indicators != '0);

  always_comb begin
    rd = 1'b0;
    unique case (state_q)
      S_IDLE:  rd = (cnt1 != cnt2) && !i_buffer_empty;
      S_SEND:  rd = !i_buffer_empty;
      default: rd = 1'b0;
    endcase
  end
  assign o_controller_interface_rd_en = rd;

  always_ff @(posedge i_clk or negedge i_reset_n) begin
    if (!i_reset_n) begin
      state_q <= S_IDLE;
      cnt1    <= '0;
      cnt2    <= '0;
    end else begin
      if (i_controller_interface_end) cnt1 <= cnt1 + 1'b1;
      unique case (state_q)
        S_IDLE, S_SEND:
          if (rd) begin
            if (last_row) begin
              state_q <= S_HOLD;
              cnt2    <= cnt2 + 1'b1;
            end else begin
              state_q <= S_SEND;
            end
          end
        default:
          if (i_controller_interface_ACK) state_q <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge i_clk or negedge i_reset_n) begin
    if (!i_reset_n) begin
      o_Rx_data  <= '0;
      o_Rx_start <= '0;
      o_Rx_end   <= '0;
      o_Rx_valid <= '0;
      o_Rx_type  <= 1'b0;
    end else if (rd) begin
      o_Rx_data  <= i_row_data;
      {o_Rx_start, o_Rx_end, o_Rx_valid, o_Rx_type} <= i_row_control;
    end else begin
      o_Rx_data  <= '0;
      o_Rx_start <= '0;
      o_Rx_end   <= '0;
      o_Rx_valid <= '0;
      o_Rx_type  <= 1'b0;
    end
  end
endmodule
