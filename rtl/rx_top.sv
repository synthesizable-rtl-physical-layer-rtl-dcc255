// rx_top: receive path of the MAC. Two symbols per clock arrive from the
// PIPE (first symbol in bits 7:0, K_D bit 1 = data). The general filter
// sends ordered sets and everything after them to the LTSSM (o_LTSSM_*), and
// packet symbols, classified, to the buffer controller. The buffer controller
// strips STP/SDP/END, re-pairs the bytes into the 32-byte row register
// (buffer interface) and copies finished rows with their start/end/valid/type
// word into the data buffer and the control-signal buffer (19 rows each); a
// packet becomes visible there only once its END was seen. The controller
// interface then sends each packet, one row per clock, to the data link layer
// and waits for i_Rx_ACK before the next. Packets are accepted only in L0.
// Latency from the END symbol at the input to the first row at the output is
// about five clocks.
module rx_top #(
  parameter int unsigned BUF_DEPTH = 19
) (
  input  logic         i_clk,
  input  logic         i_reset_n,
  // PIPE
  input  logic [1:0]   i_Rx_K_D,
  input  logic [15:0]  i_Rx_data,
  // LTSSM
  input  logic         i_L0,
  output logic [15:0]  o_LTSSM_data,
  output logic [1:0]   o_LTSSM_K_D,
  output logic [1:0]   o_LTSSM_valid,
  output logic [1:0]   o_LTSSM_COM,
  // data link layer
  input  logic         i_Rx_ACK,
  output logic [255:0] o_Rx_data,
  output logic [31:0]  o_Rx_start,
  output logic [31:0]  o_Rx_end,
  output logic [31:0]  o_Rx_valid,
  output logic         o_Rx_type
);
  logic        en1, en2;
  logic [7:0]  d1, d2;
  logic [2:0]  c1, c2;
  logic [15:0] pair;
  logic        pair_wr, rst_ptr, row_wr, pkt_end, drop, committed, ctl_committed;
  logic [96:0] row_ctl, head_ctl;
  logic [255:0] row_data, head_data;
  logic        buf_empty, ctl_empty, rd_en;

  rx_general_filter u_filter (
    .i_clk, .i_reset_n,
    .i_generalFilter_K_D1(i_Rx_K_D[0]), .i_generalFilter_data1(i_Rx_data[7:0]),
    .i_generalFilter_K_D2(i_Rx_K_D[1]), .i_generalFilter_data2(i_Rx_data[15:8]),
    .o_generalFilter_Data_Enable1(en1), .o_generalFilter_Data_Enable2(en2),
    .o_generalFilter_data_Rx_buffer1(d1), .o_generalFilter_data_Rx_buffer2(d2),
    .o_generalFilter_controlsSignals1(c1), .o_generalFilter_controlsSignals2(c2),
    .o_generalFilter_data_LTSSM1(o_LTSSM_data[7:0]), .o_generalFilter_data_LTSSM2(o_LTSSM_data[15:8]),
    .o_generalFilter_valid_LTSSM_Indicator1(o_LTSSM_valid[0]),
    .o_generalFilter_valid_LTSSM_Indicator2(o_LTSSM_valid[1]),
    .o_generalFilter_COM_indicator1(o_LTSSM_COM[0]), .o_generalFilter_COM_indicator2(o_LTSSM_COM[1]),
    .o_generalFilter_K_D1(o_LTSSM_K_D[0]), .o_generalFilter_K_D2(o_LTSSM_K_D[1])
  );

  rx_buffer_controller u_bctrl (
    .i_clk, .i_reset_n, .i_buffer_controller_L0(i_L0),
    .i_buffer_controller_Data_Enable1(en1), .i_buffer_controller_Data_Enable2(en2),
    .i_buffer_controller_data_Rx_buffer1(d1), .i_buffer_controller_data_Rx_buffer2(d2),
    .i_buffer_controller_controlsSignals1(c1), .i_buffer_controller_controlsSignals2(c2),
    .o_buffer_controller_data(pair), .o_buffer_controller_wr_en(pair_wr),
    .o_buffer_controller_resetPtr(rst_ptr), .o_buffer_controller_rd_en(row_wr),
    .o_buffer_controller_control(row_ctl), .o_buffer_controller_END(pkt_end),
    .o_buffer_controller_drop(drop)
  );

  rx_buffer_interface u_bif (
    .i_clk, .i_reset_n, .i_bufferi_rd_en(row_wr), .i_bufferi_wr_en(pair_wr),
    .i_bufferi_din(pair), .i_bufferi_resetPtr(rst_ptr), .o_bufferi_rdata(row_data)
  );

  rx_packet_buffer #(.WIDTH(256), .DEPTH(BUF_DEPTH)) u_buffer (
    .i_clk, .i_reset_n, .i_wr_en(row_wr), .i_din(row_data), .i_commit(pkt_end),
    .i_rewind(drop), .i_rd_en(rd_en), .o_rdata(head_data), .o_empty(buf_empty),
    .o_committed(committed)
  );

  rx_packet_buffer #(.WIDTH(97), .DEPTH(BUF_DEPTH)) u_ctlbuf (
    .i_clk, .i_reset_n, .i_wr_en(row_wr), .i_din(row_ctl), .i_commit(pkt_end),
    .i_rewind(drop), .i_rd_en(rd_en), .o_rdata(head_ctl), .o_empty(ctl_empty),
    .o_committed(ctl_committed)
  );

  rx_controller_interface u_ci (
    .i_clk, .i_reset_n, .i_controller_interface_ACK(i_Rx_ACK),
    .i_controller_interface_end(committed && ctl_committed),
    .i_controller_interface_end_indicators(head_ctl[64:33]),
    .i_buffer_empty(buf_empty || ctl_empty), .i_row_data(head_data), .i_row_control(head_ctl),
    .o_controller_interface_rd_en(rd_en),
    .o_Rx_data, .o_Rx_start, .o_Rx_end, .o_Rx_valid, .o_Rx_type
  );
endmodule
