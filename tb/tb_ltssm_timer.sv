// tb_ltssm_timer: checks the LTSSM timeout counter at its default width
// (23 bits, enough for the 48 ms Polling.Configuration timeout of 6,000,000
// clocks at 125 MHz). The testbench counts clocks since i_Start rose on its
// own and expects o_Timeout exactly when Start is high and that count reaches
// i_Timeout_value; dropping Start clears the count. Random short timeouts and
// Start pulses, plus one full 1,500,000-clock (12 ms Detect.Quiet) run.
// A watchdog stops a hung run.
module tb_ltssm_timer;
  logic clk;
  logic rst_n;
  initial clk = 1'b0;
  always #4 clk = ~clk;

  logic [22:0] tval;
  logic        start, tout;
  int          elapsed;
  int          checks, failures, n_tout;

  ltssm_timer u_dut (.i_clk(clk), .i_reset_n(rst_n), .i_Timeout_value(tval),
                     .i_Start(start), .o_Timeout(tout));

  task automatic check;
    bit e;
    e = start && (elapsed >= int'(tval));
    checks++;
    if (tout != e) begin
      failures++;
      $display("FAIL start %0d elapsed %0d value %0d timeout %0d", start, elapsed, tval, tout);
    end
    if (tout) n_tout++;
  endtask

  task automatic run(input int len, input int value);
    tval    = 23'(value);
    start   = 1'b1;
    elapsed = 0;
    for (int i = 0; i < len; i++) begin
      #1 check();
      @(posedge clk);
      elapsed++;
      @(negedge clk);
    end
    start = 1'b0;
    #1 check();
    @(posedge clk);
    elapsed = 0;
    @(negedge clk);
    #1 check();
  endtask

  initial begin
    checks = 0; failures = 0; n_tout = 0;
    tval = '0; start = 1'b0; elapsed = 0;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 200; k++) run(int'($urandom_range(1, 80)), int'($urandom_range(0, 60)));
    run(1500010, 1500000);
    checks++;
    if (n_tout == 0) begin
      failures++;
      $display("FAIL timeout never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
