// rx_buffer_controller: turns the classified symbol stream of the filter into
// packet rows. Per clock it handles the two symbols in order:
//  * STP/SDP opens a packet (type 0 TLP, 1 DLLP); a second start while a
//    packet is open drops the open one;
//  * VLD bytes of an open packet are appended: bytes are paired (first byte
//    in bits 15:8) and each full pair is written to the row register
//    (o_wr_en); byte k of a row sets valid bit 31-k, the first byte of the
//    packet sets start bit 31;
//  * END/EBD closes the packet: a lone last byte is written padded with 00h,
//    the end bit of the last byte is set, the row is copied to the row
//    buffers with its 97-bit control word {start, end, valid, type} and the
//    packet is committed; resetPtr returns the row register to pair 0;
//  * ERR inside a packet, or L0 going low, drops the open packet (o_drop
//    rewinds the row buffers).
// A full row (32 bytes) is copied out when the next byte of the same packet
// arrives, or at END, so that its end bit is known. A row whose last pair is
// written in the clock it is closed (by END, or by the first byte of the next
// row) is copied one clock later; otherwise it is copied in the same clock. Outside L0 every symbol is ignored. Packets are
// re-aligned so the first byte is byte 31 of a row wherever STP fell on the
// PIPE word. Input classes and the 97-bit word follow the document; the
// pairing, the drop rules and the copy timing are this design's.
module rx_buffer_controller
  import pcie_mac_pkg::*;
(
  input  logic        i_clk,
  input  logic        i_reset_n,
  input  logic        i_buffer_controller_L0,
  input  logic        i_buffer_controller_Data_Enable1,
  input  logic        i_buffer_controller_Data_Enable2,
  input  logic [7:0]  i_buffer_controller_data_Rx_buffer1,
  input  logic [7:0]  i_buffer_controller_data_Rx_buffer2,
  input  logic [2:0]  i_buffer_controller_controlsSignals1,
  input  logic [2:0]  i_buffer_controller_controlsSignals2,
  output logic [15:0] o_buffer_controller_data,
  output logic        o_buffer_controller_wr_en,
  output logic        o_buffer_controller_resetPtr,
  output logic        o_buffer_controller_rd_en,
  output logic [96:0] o_buffer_controller_control,
  output logic        o_buffer_controller_END,
  output logic        o_buffer_controller_drop
);
  // packet / row state
  logic        inp_q, typ_q, hv_q;
  logic [7:0]  h_q;
  logic [5:0]  n_q;                 // bytes in the current row (0..32)
  logic [31:0] smap_q, emap_q, vmap_q;
  // delayed copy of a row closed by END
  logic        dflush_q;
  logic [96:0] dctrl_q;
  // delayed copy of a full row whose last pair is written in this clock
  logic        rflush_q;
  logic [96:0] rctrl_q;

  logic        inp, typ, hv;
  logic [7:0]  h;
  logic [5:0]  n;
  logic [31:0] smap, emap, vmap;
  logic        wr, rst_ptr, drop, cflush, dflush, rflush, ccommit;
  logic [15:0] wdata;
  logic [96:0] cctrl, dctrl, rctrl;
  logic        pend_start;

  always_comb begin
    logic       en;
    logic [7:0] b;
    filt_ctrl_t c;
    en = 1'b0; b = '0; c = FC_DFT;
    inp = inp_q;  typ = typ_q;  hv = hv_q;  h = h_q;  n = n_q;
    smap = smap_q; emap = emap_q; vmap = vmap_q;
    wr = 1'b0; wdata = '0; rst_ptr = 1'b0; drop = 1'b0;
    cflush = 1'b0; ccommit = 1'b0; cctrl = '0; dflush = 1'b0; dctrl = '0;
    rflush = 1'b0; rctrl = '0;
    pend_start = inp_q && (n_q == '0) && !hv_q && (smap_q == '0);
    if (!i_buffer_controller_L0) begin
      if (inp_q) drop = 1'b1;
      inp = 1'b0; hv = 1'b0; n = '0; smap = '0; emap = '0; vmap = '0;
    end else begin
      for (int i = 0; i < 2; i++) begin
        en = (i == 0) ? i_buffer_controller_Data_Enable1 : i_buffer_controller_Data_Enable2;
        b  = (i == 0) ? i_buffer_controller_data_Rx_buffer1 : i_buffer_controller_data_Rx_buffer2;
        c  = filt_ctrl_t'((i == 0) ? i_buffer_controller_controlsSignals1
                                   : i_buffer_controller_controlsSignals2);
        if (en) begin
          unique case (c)
            FC_STP, FC_SDP: begin
              if (inp) drop = 1'b1;
              inp = 1'b1; typ = (c == FC_SDP); hv = 1'b0; n = '0;
              smap = '0; emap = '0; vmap = '0; pend_start = 1'b1;
            end
            FC_VLD: if (inp) begin
              if (n == 6'd32) begin
                // full row of this packet: copy it out now
                if (cflush || dflush) drop = 1'b1;
                if (wr) begin
                  // its last pair is written in this clock: copy next clock
                  rflush = 1'b1;
                  rctrl  = {smap, emap, vmap, typ};
                end else begin
                  cflush = 1'b1;
                  cctrl  = {smap, emap, vmap, typ};
                end
                n = '0; smap = '0; emap = '0; vmap = '0;
              end
              vmap[5'd31 - n[4:0]] = 1'b1;
              if (pend_start) smap[31] = 1'b1;
              pend_start = 1'b0;
              if (hv) begin
                wr = 1'b1; wdata = {h, b}; hv = 1'b0;
              end else begin
                h = b; hv = 1'b1;
              end
              n = n + 6'd1;
            end
            FC_END, FC_EBD: if (inp) begin
              if (n != '0) begin
                emap[5'd31 - 5'(n - 6'd1)] = 1'b1;
                if (hv) begin
                  wr = 1'b1; wdata = {h, 8'h00}; hv = 1'b0;
                end
                if (n == 6'd32 && !wr) begin
                  if (cflush) drop = 1'b1;
                  cflush = 1'b1; ccommit = 1'b1;
                  cctrl  = {smap, emap, vmap, typ};
                end else begin
                  dflush = 1'b1;
                  dctrl  = {smap, emap, vmap, typ};
                end
              end
              rst_ptr = 1'b1;
              inp = 1'b0; n = '0; smap = '0; emap = '0; vmap = '0;
            end
            FC_ERR: if (inp) begin
              drop = 1'b1;
              inp = 1'b0; hv = 1'b0; n = '0; smap = '0; emap = '0; vmap = '0;
            end
            default: ;
          endcase
        end
      end
    end
    if (drop) begin
      rst_ptr = 1'b1;
      if (!inp) begin cflush = 1'b0; dflush = 1'b0; rflush = 1'b0; end
    end
  end

  always_ff @(posedge i_clk or negedge i_reset_n) begin
    if (!i_reset_n) begin
      inp_q <= 1'b0; typ_q <= 1'b0; hv_q <= 1'b0; h_q <= '0; n_q <= '0;
      smap_q <= '0; emap_q <= '0; vmap_q <= '0;
      dflush_q <= 1'b0; dctrl_q <= '0;
      rflush_q <= 1'b0; rctrl_q <= '0;
    end else begin
      inp_q <= inp; typ_q <= typ; hv_q <= hv; h_q <= h; n_q <= n;
      smap_q <= smap; emap_q <= emap; vmap_q <= vmap;
      dflush_q <= dflush; dctrl_q <= dctrl;
      rflush_q <= rflush; rctrl_q <= rctrl;
    end
  end

  assign o_buffer_controller_data     = wdata;
  assign o_buffer_controller_wr_en    = wr;
  assign o_buffer_controller_resetPtr = rst_ptr;
  assign o_buffer_controller_rd_en    = cflush || dflush_q || rflush_q;
  assign o_buffer_controller_control  = cflush ? cctrl : (dflush_q ? dctrl_q : rctrl_q);
  assign o_buffer_controller_END      = ccommit || dflush_q;
  assign o_buffer_controller_drop     = drop;
endmodule
