// rx_general_filter: decides for each received symbol whether it goes to the
// LTSSM or towards the data link layer. Two rx_filter steps are chained in one
// clock: symbol 1 (bits 7:0, first on the link) uses the state left by
// symbol 2 of the previous clock, symbol 2 uses the state after symbol 1
// (the document's feedback from filter 2 to filter 1, starting in IDLE).
// The register block then registers all outputs, so every output appears one
// clock after its input; the filter controller is the routing of the two
// steps' results to the buffer side (Data_Enable, data, class) and the LTSSM
// side (data, valid, COM, K_D). K_D inputs and outputs are 1 for data.
module rx_general_filter
  import pcie_mac_pkg::*;
(
  input  logic       i_clk,
  input  logic       i_reset_n,
  input  logic       i_generalFilter_K_D1,
  input  logic [7:0] i_generalFilter_data1,
  input  logic       i_generalFilter_K_D2,
  input  logic [7:0] i_generalFilter_data2,
  output logic       o_generalFilter_Data_Enable1,
  output logic       o_generalFilter_Data_Enable2,
  output logic [7:0] o_generalFilter_data_Rx_buffer1,
  output logic [7:0] o_generalFilter_data_Rx_buffer2,
  output logic [2:0] o_generalFilter_controlsSignals1,
  output logic [2:0] o_generalFilter_controlsSignals2,
  output logic [7:0] o_generalFilter_data_LTSSM1,
  output logic [7:0] o_generalFilter_data_LTSSM2,
  output logic       o_generalFilter_valid_LTSSM_Indicator1,
  output logic       o_generalFilter_valid_LTSSM_Indicator2,
  output logic       o_generalFilter_COM_indicator1,
  output logic       o_generalFilter_COM_indicator2,
  output logic       o_generalFilter_K_D1,
  output logic       o_generalFilter_K_D2
);
  logic [1:0] state_q, ns1, ns2;
  logic [2:0] c1, c2;
  logic       e1, e2, v1, v2, m1, m2;

  rx_filter u_f1 (.i_state(state_q), .i_K_D(i_generalFilter_K_D1), .i_data(i_generalFilter_data1),
                  .o_next_state(ns1), .o_ctrl(c1), .o_data_en(e1), .o_ltssm_valid(v1), .o_com(m1));
  rx_filter u_f2 (.i_state(ns1), .i_K_D(i_generalFilter_K_D2), .i_data(i_generalFilter_data2),
                  .o_next_state(ns2), .o_ctrl(c2), .o_data_en(e2), .o_ltssm_valid(v2), .o_com(m2));

  always_ff @(posedge i_clk or negedge i_reset_n) begin
    if (!i_reset_n) begin
      state_q <= FS_IDLE;
      o_generalFilter_Data_Enable1           <= 1'b0;
      o_generalFilter_Data_Enable2           <= 1'b0;
      o_generalFilter_data_Rx_buffer1        <= '0;
      o_generalFilter_data_Rx_buffer2        <= '0;
      o_generalFilter_controlsSignals1       <= FC_DFT;
      o_generalFilter_controlsSignals2       <= FC_DFT;
      o_generalFilter_data_LTSSM1            <= '0;
      o_generalFilter_data_LTSSM2            <= '0;
      o_generalFilter_valid_LTSSM_Indicator1 <= 1'b0;
      o_generalFilter_valid_LTSSM_Indicator2 <= 1'b0;
      o_generalFilter_COM_indicator1         <= 1'b0;
      o_generalFilter_COM_indicator2         <= 1'b0;
      o_generalFilter_K_D1                   <= 1'b1;
      o_generalFilter_K_D2                   <= 1'b1;
    end else begin
      state_q <= ns2;
      o_generalFilter_Data_Enable1           <= e1;
      o_generalFilter_Data_Enable2           <= e2;
      o_generalFilter_data_Rx_buffer1        <= e1 ? i_generalFilter_data1 : 8'h00;
      o_generalFilter_data_Rx_buffer2        <= e2 ? i_generalFilter_data2 : 8'h00;
      o_generalFilter_controlsSignals1       <= c1;
      o_generalFilter_controlsSignals2       <= c2;
      o_generalFilter_data_LTSSM1            <= v1 ? i_generalFilter_data1 : 8'h00;
      o_generalFilter_data_LTSSM2            <= v2 ? i_generalFilter_data2 : 8'h00;
      o_generalFilter_valid_LTSSM_Indicator1 <= v1;
      o_generalFilter_valid_LTSSM_Indicator2 <= v2;
      o_generalFilter_COM_indicator1         <= m1;
      o_generalFilter_COM_indicator2         <= m2;
      o_generalFilter_K_D1                   <= i_generalFilter_K_D1;
      o_generalFilter_K_D2                   <= i_generalFilter_K_D2;
    end
  end
endmodule
