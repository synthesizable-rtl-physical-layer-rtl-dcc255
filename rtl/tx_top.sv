// tx_top: transmit path of the MAC. Packets arrive from the data link layer
// as 32-byte rows (interface buffer), are cut into two-byte words with a
// packet indicator (interface bus) and queued (Tx buffer, 2047 words, and the
// packet-indicator buffer beside it). Ordered sets from the LTSSM are queued
// in the ordered-set buffer. The controller arbitrates (ordered sets first,
// packets only in L0 and never cut, idle otherwise), the multiplexer forms
// the word and its D/K flags, and the framing alignment removes the framing
// pad bytes. Output to PIPE: o_PHY_packet (first symbol in bits 7:0) and o_DK
// (1 = data), one register after the multiplexer. Latency from a word
// leaving a buffer to the PIPE is one clock.
module tx_top
  import pcie_mac_pkg::*;
#(
  parameter int unsigned TXBUF_DEPTH = 2047,
  parameter int unsigned IFBUF_DEPTH = 17,
  parameter int unsigned OSBUF_DEPTH = 16
) (
  input  logic         i_clk,
  input  logic         i_reset_n,
  // data link layer
  input  logic [255:0] i_DataLink,
  input  logic [31:0]  i_SOP,
  input  logic [31:0]  i_EOP,
  input  logic [31:0]  i_DataValid,
  input  logic         i_WrEn,
  input  logic         i_PktType,
  output logic         o_ACK,
  // LTSSM
  input  logic [15:0]  i_OsData,
  input  logic         i_OsValid,
  input  logic         i_L0,
  output logic         o_OsBuffer_Full,
  // PIPE
  output logic [15:0]  o_PHY_packet,
  output logic [1:0]   o_DK
);
  logic         dm_type, dm_ack, dm_rden;
  logic [31:0]  dm_sop, dm_valid;
  logic [255:0] dm_data;
  logic [15:0]  bus_data;
  logic [1:0]   bus_pi;
  logic         bus_valid;
  logic [15:0]  txb_data, osb_data, se_data, mux_data;
  logic [1:0]   pib_data, mux_dk, mux_sel, se_sel;
  logic         txb_full, txb_empty, pib_full, pib_empty, osb_empty;
  logic         os_rd, txb_rd, pib_rd;

  tx_interface_buffer #(.DEPTH(IFBUF_DEPTH)) u_ifbuf (
    .i_clk, .i_reset_n, .i_DM_RdEn(dm_rden), .i_DM_WrEn(i_WrEn), .i_DM_Type(i_PktType),
    .i_DM_SOP(i_SOP), .i_DM_EOP(i_EOP), .i_DM_Valid(i_DataValid), .i_DM_Data(i_DataLink),
    .o_DM_Type(dm_type), .o_DM_SOP(dm_sop), .o_DM_Data(dm_data), .o_DM_Valid(dm_valid),
    .o_DM_ACK(dm_ack)
  );
  assign o_ACK = dm_ack;

  tx_interface_bus u_ifbus (
    .i_clk, .i_reset_n, .i_Interface_RdEn(!txb_full && !pib_full), .i_Row_Ready(dm_ack),
    .i_Data_Valid(dm_valid), .i_SOP(dm_sop), .i_Interface_Data(dm_data), .i_PktType(dm_type),
    .o_InterfaceBus_TxData(bus_data), .o_InterfaceBus_Pi(bus_pi),
    .o_Receive_ACK(dm_rden), .o_Data_valid(bus_valid)
  );

  mac_sync_fifo #(.WIDTH(16), .DEPTH(TXBUF_DEPTH)) u_txbuf (
    .i_clk, .i_reset_n, .i_WrEn(bus_valid), .i_Data(bus_data), .i_RdEn(txb_rd),
    .o_Data(txb_data), .o_Full(txb_full), .o_Empty(txb_empty)
  );

  mac_sync_fifo #(.WIDTH(2), .DEPTH(TXBUF_DEPTH)) u_pibuf (
    .i_clk, .i_reset_n, .i_WrEn(bus_valid), .i_Data(bus_pi), .i_RdEn(pib_rd),
    .o_Data(pib_data), .o_Full(pib_full), .o_Empty(pib_empty)
  );

  mac_sync_fifo #(.WIDTH(16), .DEPTH(OSBUF_DEPTH)) u_osbuf (
    .i_clk, .i_reset_n, .i_WrEn(i_OsValid), .i_Data(i_OsData), .i_RdEn(os_rd),
    .o_Data(osb_data), .o_Full(o_OsBuffer_Full), .o_Empty(osb_empty)
  );

  tx_controller u_ctrl (
    .i_clk, .i_reset_n, .i_L0, .i_OS_Empty(osb_empty), .i_TxBuffer_Empty(txb_empty || pib_empty),
    .i_Pi_Buffer(pib_data), .o_Mux_Sel(mux_sel), .o_SE_Sel(se_sel), .o_OS_rd_en(os_rd),
    .o_TxBuffer_rd_en(txb_rd), .o_PiBuffer_rd_en(pib_rd)
  );

  tx_se_framing u_se (.i_SE_sel(se_sel), .o_DataFrame(se_data));

  tx_mux u_mux (
    .i_Tx_Buffer_Data(txb_data), .i_SE_Data(se_data), .i_Logical_Idle(16'h0000),
    .i_OrderdSet(osb_data), .i_Sele(mux_sel), .o_Data(mux_data), .o_DK(mux_dk)
  );

  tx_framing_alignment u_align (
    .i_clk, .i_reset_n, .i_Data(mux_data), .i_DK(mux_dk), .o_Data(o_PHY_packet), .o_DK
  );
endmodule
