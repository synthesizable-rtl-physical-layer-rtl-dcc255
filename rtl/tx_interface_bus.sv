// tx_interface_bus: data link layer to MAC interface bus. While the
// interface buffer holds a packet (i_Row_Ready) and the Tx buffer has room
// (i_Interface_RdEn), it takes the head row two bytes per clock, first byte
// in bits 7:0 of o_InterfaceBus_TxData, and writes the packet indicator
// beside each word: 01 first word of a TLP, 10 first word of a DLLP (the word
// whose first byte carries SOP), 11 any later word. A word is sent while its
// first byte is valid; when the next pair is not valid, or the row is used
// up, o_Receive_ACK pops the row so the next one follows on the next clock
// without a gap. Packets are assumed to have an even number of bytes. The
// document's bus keeps a row register; this one reads the buffer's head row
// in place, which does the same work without the copy.
module tx_interface_bus
  import pcie_mac_pkg::*;
(
  input  logic         i_clk,
  input  logic         i_reset_n,
  input  logic         i_Interface_RdEn,
  input  logic         i_Row_Ready,
  input  logic [31:0]  i_Data_Valid,
  input  logic [31:0]  i_SOP,
  input  logic [255:0] i_Interface_Data,
  input  logic         i_PktType,
  output logic [15:0]  o_InterfaceBus_TxData,
  output logic [1:0]   o_InterfaceBus_Pi,
  output logic         o_Receive_ACK,
  output logic         o_Data_valid
);
  logic [3:0] pair_q;   // pair p holds row bytes 31-2p (first) and 30-2p
  logic [4:0] b0, b1, bn;
  logic       active, pair_ok, next_ok;

  always_comb begin
    b0      = 5'd31 - {pair_q, 1'b0};
    b1      = b0 - 5'd1;
    bn      = b0 - 5'd2;
    active  = i_Row_Ready && i_Interface_RdEn;
    pair_ok = i_Data_Valid[b0];
    next_ok = (pair_q != 4'd15) && i_Data_Valid[bn];
    o_InterfaceBus_TxData = {i_Interface_Data[8*b1 +: 8], i_Interface_Data[8*b0 +: 8]};
    o_Data_valid  = active && pair_ok;
    o_Receive_ACK = active && (!pair_ok || !next_ok);
    if (i_SOP[b0])  o_InterfaceBus_Pi = i_PktType ? PI_DLLP : PI_TLP;
    else            o_InterfaceBus_Pi = PI_CONT;
  end

  always_ff @(posedge i_clk or negedge i_reset_n) begin
    if (!i_reset_n)          pair_q <= '0;
    else if (o_Receive_ACK)  pair_q <= '0;
    else if (o_Data_valid)   pair_q <= pair_q + 1'b1;
  end
endmodule
