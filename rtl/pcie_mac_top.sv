// pcie_mac_top: logical physical layer (MAC) of a PCI Express Gen1 x1 port,
// sitting between a PIPE PHY (16-bit data path, two symbols per PCLK,
// 125 MHz) and the data link layer (32-byte rows with per-byte SOP/EOP/valid
// maps). Three parts:
//  * ltssm:  link training (Detect, Polling, Configuration, L0, Recovery);
//            drives the PIPE control pins and produces ordered sets.
//  * tx_top: buffers packets from the data link layer, frames them with
//            STP/SDP ... END, merges ordered sets and logical idle, and drives
//            TxData/TxDataK.
//  * rx_top: separates ordered sets (to the LTSSM) from packets, checks
//            framing, stores whole packets and hands them to the data link
//            layer row by row.
// Wiring: the LTSSM's ordered-set words go into the Tx ordered-set buffer
// (which back-pressures the creator when full); the Rx filter's ordered-set
// symbols feed the LTSSM decoder; o_LinkUp (LTSSM in L0) lets the Tx and Rx
// packet paths run. PIPE byte order: bits 7:0 are the first symbol; K/D flag
// 1 = data, 0 = control. The port role (downstream / upstream) is the
// i_IsDownstream pin, a choice of this design so that one module serves both
// ends of a link. All parameters are the lower-level defaults.
// o_TxCompliance, o_RxPolarity and o_Rate are constant 0 (no compliance
// pattern, no polarity inversion, Gen1 only), so synthesis sees them as
// outputs driven by constants.
module pcie_mac_top
  import pcie_mac_pkg::*;
(
  input  logic         i_clk,
  input  logic         i_reset_n,
  input  logic         i_IsDownstream,
  // PIPE
  output logic [15:0]  o_TxData,
  output logic [1:0]   o_TxDataK,
  input  logic [15:0]  i_RxData,
  input  logic [1:0]   i_RxDataK,
  input  logic         i_PhyStatus,
  input  logic         i_RxElecIdle,
  input  logic [2:0]   i_RxStatus,
  output logic         o_TxDetectRx_loopback,
  output logic         o_TxElecIdle,
  output logic         o_TxCompliance,
  output logic         o_RxPolarity,
  output logic [1:0]   o_PowerDown,
  output logic         o_Rate,
  // data link layer, transmit
  input  logic [255:0] i_DataLink,
  input  logic [31:0]  i_SOP,
  input  logic [31:0]  i_EOP,
  input  logic [31:0]  i_DataValid,
  input  logic         i_WrEn,
  input  logic         i_PktType,
  output logic         o_ACK,
  // data link layer, receive
  input  logic         i_Rx_ACK,
  output logic [255:0] o_Rx_data,
  output logic [31:0]  o_Rx_start,
  output logic [31:0]  o_Rx_end,
  output logic [31:0]  o_Rx_valid,
  output logic         o_Rx_type,
  // status
  output logic         o_LinkUp,
  output logic [4:0]   o_LTSSM_state
);
  logic [15:0] os_data, lt_rx_data;
  logic        os_valid, os_full, l0;
  logic [1:0]  lt_rx_k, lt_rx_valid, lt_rx_com;

  ltssm u_ltssm (
    .i_clk, .i_reset_n, .i_IsDownstream,
    .i_PhyStatus, .i_RxElecIdle, .i_RxStatus,
    .o_TxDetectRx_loopback, .o_TxElecIdle, .o_TxCompliance, .o_RxPolarity,
    .o_PowerDown, .o_Rate,
    .i_Tx_OSbufferFull(os_full), .o_OScreator_Data(os_data), .o_OScreator_valid(os_valid),
    .i_Rx_Data(lt_rx_data), .i_Rx_DataK(lt_rx_k), .i_Rx_valid(lt_rx_valid),
    .i_Rx_COM_Indicator(lt_rx_com),
    .o_L0_UP(l0), .o_LTSSM_state
  );

  tx_top u_tx (
    .i_clk, .i_reset_n,
    .i_DataLink, .i_SOP, .i_EOP, .i_DataValid, .i_WrEn, .i_PktType, .o_ACK,
    .i_OsData(os_data), .i_OsValid(os_valid), .i_L0(l0), .o_OsBuffer_Full(os_full),
    .o_PHY_packet(o_TxData), .o_DK(o_TxDataK)
  );

  rx_top u_rx (
    .i_clk, .i_reset_n,
    .i_Rx_K_D(i_RxDataK), .i_Rx_data(i_RxData),
    .i_L0(l0),
    .o_LTSSM_data(lt_rx_data), .o_LTSSM_K_D(lt_rx_k), .o_LTSSM_valid(lt_rx_valid),
    .o_LTSSM_COM(lt_rx_com),
    .i_Rx_ACK, .o_Rx_data, .o_Rx_start, .o_Rx_end, .o_Rx_valid, .o_Rx_type
  );

  assign o_LinkUp = l0;
endmodule
