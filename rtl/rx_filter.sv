// rx_filter: one step of the receive filter state machine for one symbol.
// Combinational; two copies are chained in rx_general_filter to handle the
// two symbols of a clock. States: IDLE (between packets, nothing forwarded),
// OS (after a COM: every symbol goes to the LTSSM) and PKT (after STP/SDP:
// symbols go to the packet buffers).
//  * COM (control) -> OS, forwarded to the LTSSM with the COM flag.
//  * STP/SDP -> PKT, class STP/SDP, enabled towards the buffers.
//  * in PKT: data -> VLD; END/EDB -> END/EBD and back to IDLE; any other
//    control symbol -> ERR and back to IDLE.
//  * END/EDB outside a packet are ignored (a second END has no effect).
//  * in OS: all symbols, data or control, go to the LTSSM.
// i_K_D is 1 for a data symbol. The class codes are the document's; the
// exact transitions are this design's reading of its description.
module rx_filter
  import pcie_mac_pkg::*;
(
  input  logic [1:0] i_state,
  input  logic       i_K_D,
  input  logic [7:0] i_data,
  output logic [1:0] o_next_state,
  output logic [2:0] o_ctrl,
  output logic       o_data_en,
  output logic       o_ltssm_valid,
  output logic       o_com
);
  filt_state_t st;
  assign st = filt_state_t'(i_state);

  always_comb begin
    o_next_state  = i_state;
    o_ctrl        = FC_DFT;
    o_data_en     = 1'b0;
    o_ltssm_valid = 1'b0;
    o_com         = 1'b0;
    if (!i_K_D) begin
      unique case (i_data)
        K_COM: begin
          o_next_state  = FS_OS;
          o_ltssm_valid = 1'b1;
          o_com         = 1'b1;
        end
        K_STP, K_SDP: begin
          o_next_state = FS_PKT;
          o_ctrl       = (i_data == K_STP) ? FC_STP : FC_SDP;
          o_data_en    = 1'b1;
        end
        K_END, K_EDB: begin
          if (st == FS_PKT) begin
            o_next_state = FS_IDLE;
            o_ctrl       = (i_data == K_END) ? FC_END : FC_EBD;
            o_data_en    = 1'b1;
          end else if (st == FS_OS) begin
            o_ltssm_valid = 1'b1;
          end
        end
        default: begin
          if (st == FS_PKT) begin
            o_next_state = FS_IDLE;
            o_ctrl       = FC_ERR;
            o_data_en    = 1'b1;
          end else if (st == FS_OS) begin
            o_ltssm_valid = 1'b1;
          end
        end
      endcase
    end else begin
      if (st == FS_PKT) begin
        o_ctrl    = FC_VLD;
        o_data_en = 1'b1;
      end else if (st == FS_OS) begin
        o_ltssm_valid = 1'b1;
      end
    end
  end
endmodule
