// tx_se_framing: start-end framing word generator of the transmit path.
// Selects STP (00), SDP (01), END (10) or EDB (11). The framing symbol is
// padded with a zero byte to fill the 16-bit word: {STP,00h}/{SDP,00h} put the
// symbol in the upper byte, so it follows the pad on the link; {00h,END}/
// {00h,EDB} put it in the lower byte, so it comes first. The framing
// alignment stage later removes the pad bytes. EDB is selectable but the
// controller never uses it, as in the document.
module tx_se_framing
  import pcie_mac_pkg::*;
(
  input  logic [1:0]  i_SE_sel,
  output logic [15:0] o_DataFrame
);
  always_comb begin
    unique case (se_sel_t'(i_SE_sel))
      SE_STP:  o_DataFrame = {K_STP, 8'h00};
      SE_SDP:  o_DataFrame = {K_SDP, 8'h00};
      SE_END:  o_DataFrame = {8'h00, K_END};
      default: o_DataFrame = {8'h00, K_EDB};
    endcase
  end
endmodule
