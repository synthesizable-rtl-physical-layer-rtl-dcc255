// ltssm_os_creator: builds the ordered sets the LTSSM sends and feeds them to
// the Tx ordered-set buffer two symbols per clock (first symbol in bits 7:0).
// The state machine selects the set with i_OS_type (TS, other set such as SKP,
// or logical idle) and supplies the 16 symbols in i_OS_Symbols. A TS is 16
// symbols (8 words), an "other" set 4 symbols (2 words), logical idle one word
// of 00h at a time. Symbols are latched when a set starts, and a set that has
// started is always finished, so no partial set reaches the link even when
// the state machine changes its request. While i_Enable is high, TS and idle
// repeat back to back (the link partner may still need them after the count
// is met); an "other" set is sent exactly i_reqNum times. o_Counter_Ack is
// high once at least i_reqNum sets (idle: symbols) were sent since i_Enable
// rose; dropping i_Enable clears the count. i_Tx_OSbufferFull stalls output.
// The three sub-creators of the document (TS, other OS, logical idle) are
// the three cases of the word selection below; the repeat rules and set
// lengths are this design's reading of the interface.
module ltssm_os_creator
  import pcie_mac_pkg::*;
(
  input  logic              i_clk,
  input  logic              i_reset_n,
  input  logic              i_Enable,
  input  logic [1:0]        i_OS_type,
  input  logic [15:0][7:0]  i_OS_Symbols,
  input  logic [10:0]       i_reqNum,
  input  logic              i_Tx_OSbufferFull,
  output logic [15:0]       o_OScreator_Data,
  output logic              o_OScreator_valid,
  output logic              o_Counter_Ack
);
  logic             busy;          // a multi-word set is in flight
  logic [2:0]       widx;          // next word of the set in flight
  logic [2:0]       last_w;        // last word index of the set in flight
  logic             counts;        // set in flight counts toward reqNum
  logic [15:0][7:0] syms_q;        // latched symbols of the set in flight
  logic [11:0]      sent;          // sets (idle: symbols) sent

  logic             start_ok;
  logic [15:0][7:0] cur_syms;
  logic [2:0]       cur_idx;
  logic [2:0]       cur_last;
  logic             is_idle;

  always_comb begin
    is_idle  = (os_type_t'(i_OS_type) == OS_IDLE);
    start_ok = i_Enable && !is_idle &&
               ((os_type_t'(i_OS_type) == OS_TS) || (sent < {1'b0, i_reqNum}));
    cur_syms = busy ? syms_q : i_OS_Symbols;
    cur_idx  = busy ? widx : 3'd0;
    cur_last = busy ? last_w : ((os_type_t'(i_OS_type) == OS_TS) ? 3'd7 : 3'd1);
    o_OScreator_Data  = '0;
    o_OScreator_valid = 1'b0;
    if (!i_Tx_OSbufferFull) begin
      if (busy || start_ok) begin
        o_OScreator_Data  = {cur_syms[{cur_idx, 1'b1}], cur_syms[{cur_idx, 1'b0}]};
        o_OScreator_valid = 1'b1;
      end else if (i_Enable && is_idle) begin
        o_OScreator_Data  = 16'h0000;
        o_OScreator_valid = 1'b1;
      end
    end
  end

  always_ff @(posedge i_clk or negedge i_reset_n) begin
    if (!i_reset_n) begin
      busy   <= 1'b0;
      widx   <= '0;
      last_w <= '0;
      counts <= 1'b0;
      syms_q <= '0;
      sent   <= '0;
    end else begin
      if (!i_Enable) begin
        sent   <= '0;
        counts <= 1'b0;
      end
      if (o_OScreator_valid) begin
        if (!busy && !(i_Enable && is_idle)) begin
          // first word of a new set
          syms_q <= i_OS_Symbols;
          last_w <= cur_last;
          counts <= i_Enable;
          busy   <= 1'b1;
          widx   <= 3'd1;
        end else if (busy) begin
          if (widx == last_w) begin
            busy <= 1'b0;
            widx <= '0;
            if (counts && i_Enable && sent != '1) sent <= sent + 1'b1;
          end else begin
            widx <= widx + 1'b1;
          end
        end else if (sent < 12'hFFE) begin
          sent <= sent + 12'd2;   // one idle word = two symbols
        end
      end
    end
  end

  assign o_Counter_Ack = i_Enable && (sent >= {1'b0, i_reqNum});
endmodule
