// tx_framing_alignment: removes the zero pad bytes that the start-end framing
// adds, so that on the link STP/SDP is directly followed by the first packet
// byte and the last packet byte by END. One register stage (one clock of
// latency); bits 7:0 are the first symbol, DK bit 1 = data.
//  * aligned (between packets): the word passes unchanged.
//  * a start word {STP|SDP, 00h}: the symbol is held, a logical idle word
//    (0000h, DK 11) is sent instead and the stage becomes shifted.
//  * shifted: each output word is {low byte of the input, held byte}; the
//    input's high byte is held for the next word.
//  * an end word {00h, END|EDB} while shifted: {END, held byte} is sent and
//    the stage is aligned again.
// So a packet of N bytes leaves as STP, N bytes, END in (N+2)/2 words plus one
// idle word. Reset output is 0000h with DK 11, as the document's tests expect.
// The one-byte shift is this design's way of doing the removal.
module tx_framing_alignment
  import pcie_mac_pkg::*;
(
  input  logic        i_clk,
  input  logic        i_reset_n,
  input  logic [15:0] i_Data,
  input  logic [1:0]  i_DK,
  output logic [15:0] o_Data,
  output logic [1:0]  o_DK
);
  logic       shifted;
  logic [7:0] held;
  logic       held_dk;
  logic       is_start, is_end;

  assign is_start = (i_DK == 2'b01) && (i_Data[7:0] == 8'h00) &&
                    (i_Data[15:8] == K_STP || i_Data[15:8] == K_SDP);
  assign is_end   = (i_DK == 2'b10) && (i_Data[15:8] == 8'h00) &&
                    (i_Data[7:0] == K_END || i_Data[7:0] == K_EDB);

  always_ff @(posedge i_clk or negedge i_reset_n) begin
    if (!i_reset_n) begin
      shifted <= 1'b0;
      held    <= '0;
      held_dk <= 1'b1;
      o_Data  <= '0;
      o_DK    <= 2'b11;
    end else if (!shifted) begin
      if (is_start) begin
        held    <= i_Data[15:8];
        held_dk <= 1'b0;
        shifted <= 1'b1;
        o_Data  <= 16'h0000;
        o_DK    <= 2'b11;
      end else begin
        o_Data <= i_Data;
        o_DK   <= i_DK;
      end
    end else begin
      o_Data <= {i_Data[7:0], held};
      o_DK   <= {i_DK[0], held_dk};
      if (is_end) begin
        shifted <= 1'b0;
      end else begin
        held    <= i_Data[15:8];
        held_dk <= i_DK[1];
      end
    end
  end
endmodule
