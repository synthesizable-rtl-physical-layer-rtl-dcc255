// rx_buffer_interface: the 32-byte row register between the buffer
// controller and the row buffers. Each i_bufferi_wr_en stores two bytes
// (i_bufferi_din, first byte in bits 15:8) at the next pair position; pair 0
// is bytes 31..30 of the row (bits 255:240), so the row is big-endian like the
// data link layer interface. i_bufferi_resetPtr returns the position to pair 0
// after the current write (end of packet). o_bufferi_rdata is the whole row;
// the controller copies it into the row buffer in the clock it raises
// i_bufferi_rd_en, and the register is then cleared (a pair written in that
// same clock is kept), so bytes past the end of a packet read as zero. Rows
// fill in 16 writes and the position wraps by itself after a full row.
module rx_buffer_interface (
  input  logic         i_clk,
  input  logic         i_reset_n,
  input  logic         i_bufferi_rd_en,
  input  logic         i_bufferi_wr_en,
  input  logic [15:0]  i_bufferi_din,
  input  logic         i_bufferi_resetPtr,
  output logic [255:0] o_bufferi_rdata
);
  logic [15:0][15:0] pairs;   // pairs[15] is pair 0 (bits 255:240)
  logic [3:0]        ptr;

  always_ff @(posedge i_clk or negedge i_reset_n) begin
    if (!i_reset_n) begin
      pairs <= '0;
      ptr   <= '0;
    end else begin
      if (i_bufferi_rd_en) pairs <= '0;     // row copied out: start clean
      if (i_bufferi_wr_en) pairs[4'd15 - ptr] <= i_bufferi_din;
      if (i_bufferi_resetPtr)   ptr <= '0;
      else if (i_bufferi_wr_en) ptr <= ptr + 1'b1;
    end
  end

  assign o_bufferi_rdata = pairs;
endmodule
