// tb_mac_sync_fifo: checks the first-word-fall-through FIFO used for the
// transmit buffer (2047 x 16), the packet-indicator buffer (2047 x 2) and the
// ordered-set buffer (16 x 16). Two instances: the 2047-word default and a
// 16-word one. Random writes and reads, including writes when full and reads
// when empty, are applied; a queue model in the testbench predicts o_Data,
// o_Full and o_Empty, which are compared every clock (inputs change on the
// falling edge, outputs are sampled just before it). Each instance is also
// filled to full once. A watchdog stops a hung run.
module tb_mac_sync_fifo;
  logic clk;
  logic rst_n;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic        wr [2], rd [2], full [2], empty [2];
  logic [15:0] din [2], dout [2];

  mac_sync_fifo u_big (
    .i_clk(clk), .i_reset_n(rst_n), .i_WrEn(wr[0]), .i_Data(din[0]), .i_RdEn(rd[0]),
    .o_Data(dout[0]), .o_Full(full[0]), .o_Empty(empty[0])
  );
  mac_sync_fifo #(.WIDTH(16), .DEPTH(16)) u_small (
    .i_clk(clk), .i_reset_n(rst_n), .i_WrEn(wr[1]), .i_Data(din[1]), .i_RdEn(rd[1]),
    .o_Data(dout[1]), .o_Full(full[1]), .o_Empty(empty[1])
  );

  int checks, failures;
  int depth [2];
  logic [15:0] q [2][$];

  task automatic check_outputs(input int f);
    checks++;
    if (empty[f] != (q[f].size() == 0) || full[f] != (q[f].size() == depth[f]) ||
        (q[f].size() != 0 && dout[f] != q[f][0])) begin
      failures++;
      $display("FAIL fifo %0d: size %0d empty %0d full %0d dout %h exp %h", f, q[f].size(),
               empty[f], full[f], dout[f], (q[f].size() != 0) ? q[f][0] : 16'h0);
    end
  endtask

  // one clock: choose inputs, update model, advance
  task automatic step(input int pw, input int pr);
    bit w [2], r [2];
    for (int f = 0; f < 2; f++) begin
      check_outputs(f);
      w[f] = ($urandom_range(0, 99) < pw);
      r[f] = ($urandom_range(0, 99) < pr);
      wr[f]  = w[f];
      rd[f]  = r[f];
      din[f] = 16'($urandom);
    end
    @(posedge clk);
    for (int f = 0; f < 2; f++) begin
      bit can_w, can_r;
      can_w = w[f] && (q[f].size() != depth[f]);
      can_r = r[f] && (q[f].size() != 0);
      if (can_r) void'(q[f].pop_front());
      if (can_w) q[f].push_back(din[f]);
    end
    @(negedge clk);
  endtask

  initial begin
    checks = 0; failures = 0;
    depth[0] = 2047; depth[1] = 16;
    for (int f = 0; f < 2; f++) begin
      wr[f] = 1'b0; rd[f] = 1'b0; din[f] = '0;
    end
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    repeat (3000) step(50, 50);
    repeat (2200) step(100, 0);     // fill both to full, overfill
    repeat (200)  step(60, 60);     // full with simultaneous read/write
    repeat (2200) step(0, 100);     // drain, read while empty
    repeat (3000) step(70, 40);
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
