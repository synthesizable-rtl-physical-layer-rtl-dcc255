// tx_mux: the transmit multiplexer. Picks the word for the link from the Tx
// buffer (00), the start-end framing (01), logical idle (10) or the ordered-set
// buffer (11), and produces the D/K flag of each byte (bit 1 for bits 15:8;
// 1 = data, 0 = control). Packet bytes and idle are data. In a framing word
// the non-zero byte is the control symbol and the zero pad is marked data. An
// ordered-set word carries no flag from the LTSSM, so a byte is marked
// control when its value is COM, SKP, IDL, EIE or PAD (the LTSSM never sends
// these values as data). Purely combinational.
module tx_mux
  import pcie_mac_pkg::*;
(
  input  logic [15:0] i_Tx_Buffer_Data,
  input  logic [15:0] i_SE_Data,
  input  logic [15:0] i_Logical_Idle,
  input  logic [15:0] i_OrderdSet,
  input  logic [1:0]  i_Sele,
  output logic [15:0] o_Data,
  output logic [1:0]  o_DK
);
  always_comb begin
    unique case (mux_sel_t'(i_Sele))
      MUX_TXBUF: begin
        o_Data = i_Tx_Buffer_Data;
        o_DK   = 2'b11;
      end
      MUX_SE: begin
        o_Data = i_SE_Data;
        o_DK   = {i_SE_Data[15:8] == 8'h00, i_SE_Data[7:0] == 8'h00};
      end
      MUX_IDLE: begin
        o_Data = i_Logical_Idle;
        o_DK   = 2'b11;
      end
      default: begin
        o_Data = i_OrderdSet;
        o_DK   = {!os_byte_is_k(i_OrderdSet[15:8]), !os_byte_is_k(i_OrderdSet[7:0])};
      end
    endcase
  end
endmodule
