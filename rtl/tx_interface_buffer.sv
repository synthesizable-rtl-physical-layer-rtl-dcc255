// tx_interface_buffer: data link layer to MAC interface buffer of the
// transmit path. The data link layer writes one packet, one 32-byte row per
// clock (i_DM_WrEn), with per-byte SOP, EOP and valid maps; byte 31
// (bits 255:248) is the first byte of a row. When the row holding the EOP is
// written, o_DM_ACK rises: the data link layer must stop writing and the
// interface bus may read the packet, one row per i_DM_RdEn, from the head
// outputs. After the last row is read o_DM_ACK falls and the next packet may
// be written. Depth is 17 rows, enough for the 544-byte maximum packet.
// Rules for bad input (from the document's negative tests): a first row with
// no SOP is ignored; a packet that fills all rows without an EOP is flushed.
// The packet type (0 TLP, 1 DLLP) is taken from the first row.
module tx_interface_buffer #(
  parameter int unsigned DEPTH = 17
) (
  input  logic         i_clk,
  input  logic         i_reset_n,
  input  logic         i_DM_RdEn,
  input  logic         i_DM_WrEn,
  input  logic         i_DM_Type,
  input  logic [31:0]  i_DM_SOP,
  input  logic [31:0]  i_DM_EOP,
  input  logic [31:0]  i_DM_Valid,
  input  logic [255:0] i_DM_Data,
  output logic         o_DM_Type,
  output logic [31:0]  o_DM_SOP,
  output logic [255:0] o_DM_Data,
  output logic [31:0]  o_DM_Valid,
  output logic         o_DM_ACK
);
  localparam int unsigned AW = $clog2(DEPTH + 1);

  logic [255:0] data_mem  [DEPTH];
  logic [31:0]  sop_mem   [DEPTH];
  logic [31:0]  valid_mem [DEPTH];
  logic [AW-1:0] wptr, rptr, nrows;
  logic          type_q, ack_q;
  logic          do_wr;

  assign do_wr = i_DM_WrEn && !ack_q && !(wptr == '0 && i_DM_SOP == '0);

  always_ff @(posedge i_clk) begin
    if (do_wr) begin
      data_mem[wptr[$clog2(DEPTH)-1:0]]  <= i_DM_Data;
      sop_mem[wptr[$clog2(DEPTH)-1:0]]   <= i_DM_SOP;
      valid_mem[wptr[$clog2(DEPTH)-1:0]] <= i_DM_Valid;
    end
  end

  always_ff @(posedge i_clk or negedge i_reset_n) begin
    if (!i_reset_n) begin
      wptr   <= '0;
      rptr   <= '0;
      nrows  <= '0;
      type_q <= 1'b0;
      ack_q  <= 1'b0;
    end else if (!ack_q) begin
      if (do_wr) begin
        if (wptr == '0) type_q <= i_DM_Type;
        if (i_DM_EOP != '0) begin
          ack_q <= 1'b1;
          nrows <= wptr + 1'b1;
          wptr  <= '0;
        end else if (wptr == AW'(DEPTH - 1)) begin
          wptr <= '0;                       // no EOP in a full buffer: flush
        end else begin
          wptr <= wptr + 1'b1;
        end
      end
      rptr <= '0;
    end else if (i_DM_RdEn) begin
      if (rptr + 1'b1 == nrows) begin
        ack_q <= 1'b0;
        rptr  <= '0;
      end else begin
        rptr <= rptr + 1'b1;
      end
    end
  end

  assign o_DM_ACK   = ack_q;
  assign o_DM_Type  = type_q;
  assign o_DM_Data  = data_mem[rptr[$clog2(DEPTH)-1:0]];
  assign o_DM_SOP   = sop_mem[rptr[$clog2(DEPTH)-1:0]];
  assign o_DM_Valid = valid_mem[rptr[$clog2(DEPTH)-1:0]];
endmodule
