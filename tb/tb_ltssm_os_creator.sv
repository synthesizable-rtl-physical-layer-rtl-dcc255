// tb_ltssm_os_creator: checks the ordered-set creator. For each scenario the
// testbench drives i_Enable, the set type, the 16 symbols (changed at random
// every clock, so a set must keep the symbols it started with), i_reqNum
// and random i_Tx_OSbufferFull stalls, and checks every output word:
//  * TS: words repeat in sets of 8, word k = {sym[2k+1], sym[2k]} of the
//    symbols present at the set's first word; o_Counter_Ack is high exactly
//    when at least reqNum whole sets went out since Enable rose (registered: words of
//    earlier clocks);
//  * other set (SKP): sets of 2 words, exactly reqNum sets, then silence;
//  * idle: 0000h words, Ack once 2 x words >= reqNum;
//  * nothing is sent while the buffer is full, and a set in flight finishes
//    after Enable falls, then output stops.
// A watchdog stops a hung run.
module tb_ltssm_os_creator;
  logic clk;
  logic rst_n;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic             en, full, valid, ack;
  logic [1:0]       otype;
  logic [15:0][7:0] syms, set_syms;
  logic [10:0]      reqnum;
  logic [15:0]      data;

  ltssm_os_creator u_dut (
    .i_clk(clk), .i_reset_n(rst_n), .i_Enable(en), .i_OS_type(otype), .i_OS_Symbols(syms),
    .i_reqNum(reqnum), .i_Tx_OSbufferFull(full), .o_OScreator_Data(data),
    .o_OScreator_valid(valid), .o_Counter_Ack(ack)
  );

  int checks, failures;
  int words;        // words of the current enable period
  int setlen;

  task automatic fail(input string m);
    failures++;
    $display("FAIL %s (type %0d words %0d)", m, otype, words);
  endtask

  function automatic logic [15:0][7:0] rnd_syms();
    logic [15:0][7:0] s;
    for (int i = 0; i < 16; i++) s[i] = 8'($urandom);
    return s;
  endfunction

  // sample the outputs of this clock against the model, then advance
  task automatic tick(input bit enabled);
    int k;
    int done;
    checks++;
    done = (otype == 2'b10) ? 2 * words : words / setlen;
    if (enabled && ack != (done >= int'(reqnum))) fail("Counter_Ack wrong");
    if (!enabled && ack) fail("Counter_Ack while disabled");
    if (full && valid) fail("word sent while buffer full");
    if (valid) begin
      if (otype == 2'b10 && enabled) begin
        if (data != 16'h0000) fail("idle word not zero");
      end else begin
        k = words % setlen;
        if (k == 0) set_syms = syms;
        if (data != {set_syms[2*k+1], set_syms[2*k]}) fail("wrong word");
      end
      words++;
    end
    @(posedge clk);
    @(negedge clk);
    syms = rnd_syms();
  endtask

  task automatic scenario(input logic [1:0] t, input int req, input int len, input int pfull);
    otype  = t;
    reqnum = 11'(req);
    setlen = (t == 2'b01) ? 8 : 2;
    words  = 0;
    en     = 1'b1;
    for (int i = 0; i < len; i++) begin
      full = ($urandom_range(0, 99) < pfull);
      #1 tick(1);
    end
    // other set: exactly req sets
    if (t == 2'b00) begin
      checks++;
      if (words != 2 * req) fail("other set count not reqNum");
    end
    // disable: a set in flight must finish, then silence
    en = 1'b0;
    full = 1'b0;
    for (int i = 0; i < 20; i++) begin
      #1 tick(0);
    end
    checks++;
    if (t != 2'b10 && (words % setlen) != 0) fail("partial set after disable");
  endtask

  initial begin
    checks = 0; failures = 0; words = 0; setlen = 8;
    en = 1'b0; full = 1'b0; otype = 2'b01; syms = '0; set_syms = '0; reqnum = '0;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int r = 0; r < 30; r++) begin
      scenario(2'b01, int'($urandom_range(1, 12)), int'($urandom_range(5, 150)), 20);
      scenario(2'b00, int'($urandom_range(1, 6)),  int'($urandom_range(40, 60)), 20);
      scenario(2'b10, int'($urandom_range(1, 20)), int'($urandom_range(1, 40)),  20);
    end
    scenario(2'b01, 1024, 9000, 0);    // Polling.Active: 1024 TS1
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
