// rx_packet_buffer: row FIFO of the receive path, used both as the data
// buffer (19 rows of 32 bytes) and as the control-signal buffer (19 rows of
// 97 bits: start, end and valid maps and the packet type). Rows of a packet
// are written one by one and become readable only when the packet is
// committed (i_commit, together with or after its last row); i_rewind drops
// the rows written since the last commit, which is how an incomplete or
// broken packet is removed. A row written when the buffer is full is lost,
// and the packet it belongs to is dropped at its commit instead of being
// kept. o_committed pulses (registered) for each packet that was kept.
// Reads are first-word-fall-through: o_rdata is the oldest committed row,
// i_rd_en pops it. Depth 19 covers the 17 rows of a 544-byte packet. The
// commit/rewind mechanism is this design's way to discard bad packets.
module rx_packet_buffer #(
  parameter int unsigned WIDTH = 256,
  parameter int unsigned DEPTH = 19
) (
  input  logic             i_clk,
  input  logic             i_reset_n,
  input  logic             i_wr_en,
  input  logic [WIDTH-1:0] i_din,
  input  logic             i_commit,
  input  logic             i_rewind,
  input  logic             i_rd_en,
  output logic [WIDTH-1:0] o_rdata,
  output logic             o_empty,
  output logic             o_committed
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr, cptr;
  logic [CW-1:0]    used, avail;     // rows held / committed rows held
  logic             ovf;
  logic             do_wr, do_rd;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign do_wr   = i_wr_en && (used != CW'(DEPTH));
  assign do_rd   = i_rd_en && (avail != '0);
  assign o_empty = (avail == '0);
  assign o_rdata = mem[rptr];

  always_ff @(posedge i_clk) begin
    if (do_wr) mem[wptr] <= i_din;
  end

  logic [AW-1:0] w1, c1;
  logic [CW-1:0] u1, a1;
  logic          lost, com1, ovf1;

  // next pointer / count values
  always_comb begin
    w1   = do_wr ? inc(wptr) : wptr;
    c1   = cptr;
    u1   = used + CW'(do_wr) - CW'(do_rd);
    a1   = avail - CW'(do_rd);
    lost = ovf || (i_wr_en && !do_wr);
    com1 = 1'b0;
    ovf1 = ovf;
    if (i_commit) begin
      if (lost) begin
        w1 = cptr;
        u1 = a1;
      end else begin
        c1   = w1;
        a1   = u1;
        com1 = 1'b1;
      end
      ovf1 = 1'b0;
    end else if (lost) begin
      ovf1 = 1'b1;
    end
    if (i_rewind) begin
      w1   = c1;
      u1   = a1;
      ovf1 = 1'b0;
    end
  end

  always_ff @(posedge i_clk or negedge i_reset_n) begin
    if (!i_reset_n) begin
      wptr        <= '0;
      rptr        <= '0;
      cptr        <= '0;
      used        <= '0;
      avail       <= '0;
      ovf         <= 1'b0;
      o_committed <= 1'b0;
    end else begin
      if (do_rd) rptr <= inc(rptr);
      wptr        <= w1;
      cptr        <= c1;
      used        <= u1;
      avail       <= a1;
      ovf         <= ovf1;
      o_committed <= com1;
    end
  end
endmodule
