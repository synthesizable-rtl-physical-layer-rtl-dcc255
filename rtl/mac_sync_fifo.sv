// mac_sync_fifo: single-clock first-word-fall-through FIFO used for the Tx
// buffer (2047 x 16 bits), the packet-indicator buffer (2047 x 2 bits) and the
// ordered-set buffer of the transmit path. The head entry is visible on
// o_Data whenever o_Empty is low; i_RdEn pops it at the clock edge. A write
// when full and a read when empty are ignored. Depth need not be a power of
// two: pointers wrap at DEPTH-1. Storage is a plain array (a RAM with one
// write and one asynchronous read port). Reset empties the FIFO; the array
// itself is not reset.
module mac_sync_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 2047
) (
  input  logic             i_clk,
  input  logic             i_reset_n,
  input  logic             i_WrEn,
  input  logic [WIDTH-1:0] i_Data,
  input  logic             i_RdEn,
  output logic [WIDTH-1:0] o_Data,
  output logic             o_Full,
  output logic             o_Empty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [CW-1:0]    count;
  logic             do_wr, do_rd;

  assign o_Full  = (count == CW'(DEPTH));
  assign o_Empty = (count == '0);
  assign do_wr   = i_WrEn && !o_Full;
  assign do_rd   = i_RdEn && !o_Empty;
  assign o_Data  = mem[rptr];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge i_clk) begin
    if (do_wr) mem[wptr] <= i_Data;
  end

  always_ff @(posedge i_clk or negedge i_reset_n) begin
    if (!i_reset_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= inc(wptr);
      if (do_rd) rptr <= inc(rptr);
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end
endmodule
