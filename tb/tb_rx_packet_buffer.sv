// tb_rx_packet_buffer: checks the commit/rewind row buffer of the receive
// path at its defaults (19 rows of 256 bits), and a 97-bit instance like the
// control-signal buffer. Random writes, commits, rewinds and reads are
// applied; the testbench model keeps a queue of committed rows, a list of
// rows of the packet still open and a lost-row flag, and predicts o_empty,
// o_rdata (oldest committed row) and the o_committed pulse every clock.
// Covered: packets becoming readable only after commit, rewind of an open
// packet, overflow of a full buffer turning the commit into a drop, reads
// while empty. A watchdog stops a hung run.
module tb_rx_packet_buffer;
  logic clk;
  logic rst_n;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  localparam int DEPTH = 19;
  logic         wr, commit, rewind, rd;
  logic [255:0] din, dout;
  logic [96:0]  cdout;
  logic         empty, cempty, committed, ccommitted;

  rx_packet_buffer u_dut (
    .i_clk(clk), .i_reset_n(rst_n), .i_wr_en(wr), .i_din(din), .i_commit(commit),
    .i_rewind(rewind), .i_rd_en(rd), .o_rdata(dout), .o_empty(empty), .o_committed(committed)
  );
  rx_packet_buffer #(.WIDTH(97)) u_ctl (
    .i_clk(clk), .i_reset_n(rst_n), .i_wr_en(wr), .i_din(din[96:0]), .i_commit(commit),
    .i_rewind(rewind), .i_rd_en(rd), .o_rdata(cdout), .o_empty(cempty), .o_committed(ccommitted)
  );

  int checks, failures;
  int n_commit, n_rewind, n_lost;
  logic [255:0] cq [$];
  logic [255:0] pq [$];
  bit           ovf, exp_com;

  task automatic step(input int pw, input int pc, input int pr, input int pd, input int prd);
    bit lost;
    checks++;
    if (empty != (cq.size() == 0) || cempty != empty || committed != exp_com ||
        ccommitted != exp_com ||
        (cq.size() != 0 && (dout != cq[0] || cdout != cq[0][96:0]))) begin
      failures++;
      $display("FAIL committed rows %0d empty %0d committed %0d exp %0d", cq.size(), empty,
               committed, exp_com);
    end
    wr     = ($urandom_range(0, 99) < pw);
    commit = ($urandom_range(0, 99) < pc);
    rewind = ($urandom_range(0, 99) < pr) && !commit ? 1'b1 : (($urandom_range(0, 99) < pd) && commit);
    rd     = ($urandom_range(0, 99) < prd);
    din    = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    // model of the next clock
    exp_com = 0;
    lost = ovf;
    if (wr) begin
      if (cq.size() + pq.size() != DEPTH) pq.push_back(din);
      else begin lost = 1; n_lost++; end
    end
    if (rd && cq.size() != 0) void'(cq.pop_front());
    if (commit) begin
      if (!lost) begin
        foreach (pq[i]) cq.push_back(pq[i]);
        exp_com = 1;
        n_commit++;
      end
      pq.delete();
      ovf = 0;
    end else if (lost) ovf = 1;
    if (rewind) begin
      if (pq.size() != 0) n_rewind++;
      pq.delete();
      ovf = 0;
    end
    @(negedge clk);
  endtask

  initial begin
    checks = 0; failures = 0; n_commit = 0; n_rewind = 0; n_lost = 0;
    wr = 0; commit = 0; rewind = 0; rd = 0; din = '0; ovf = 0; exp_com = 0;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    repeat (4000) step(50, 15, 5, 5, 40);
    repeat (300)  step(80, 5, 1, 0, 5);     // fill up, overflow
    repeat (300)  step(30, 20, 5, 5, 80);
    repeat (4000) step(60, 10, 3, 3, 50);
    checks += 3;
    if (n_commit == 0) begin failures++; $display("FAIL no commit"); end
    if (n_rewind == 0) begin failures++; $display("FAIL no rewind"); end
    if (n_lost == 0)   begin failures++; $display("FAIL no overflow"); end
    $display("commits %0d rewinds %0d lost rows %0d", n_commit, n_rewind, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
