// Self-checking testbench of sync_register with a slow clock (31 ns) and an
// unrelated fast clock (2 ns). Each random command must produce exactly one
// fast `start` pulse with the command visible on cmd_f; each fast completion
// must produce exactly one slow `done_s` pulse with the read word on rdata_s;
// `busy_s` must cover the whole exchange and drop with `done_s`. The round trip in slow cycles is
// checked against the two synchronizer stages each way.
module sync_register_tb;
  import aaa_pkg::*;
  logic clk_s = 0, clk_f = 0, rst_s_n = 0, rst_f_n = 0;
  logic load_s, busy_s, done_s, start_f, done_f;
  cmd_t cmd_s, cmd_f;
  logic [DW-1:0] rdata_s, rdata_f;
  int checks = 0, failures = 0;
  int starts = 0, dones = 0;

  sync_register dut (.*);

  always #15.5 clk_s = ~clk_s;
  always #1    clk_f = ~clk_f;

  always @(posedge clk_f) if (start_f && rst_f_n) starts++;
  always @(posedge clk_s) if (done_s && rst_s_n) dones++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_s = 0; done_f = 0; rdata_f = 0; cmd_s = '0;
    #50 rst_s_n = 1; rst_f_n = 1;
    for (int n = 0; n < 100; n++) begin
      cmd_t c; logic [DW-1:0] word; int sc;
      c = cmd_t'({$urandom, $urandom, $urandom});
      c.mode = MODE_DTL;
      word = $urandom;
      @(posedge clk_s); #0.1;
      check(!busy_s, "free before load");
      cmd_s = c; load_s = 1;
      @(posedge clk_s); #0.1;
      load_s = 0; cmd_s = '0;
      check(busy_s, "busy after load");
      // fast side: wait for start
      @(posedge clk_f iff start_f); #0.1;
      check(cmd_f == c, "command seen on fast side");
      repeat ($urandom % 20) @(posedge clk_f);
      #0.1 rdata_f = word; done_f = 1;
      @(posedge clk_f); #0.1 done_f = 0;
      // slow side: count cycles to done
      sc = 0;
      while (!done_s) begin @(posedge clk_s); #0.1; sc++; end
      check(rdata_s == word, "read word on slow side");
      check(!busy_s, "free again while done_s is high");
      check(sc >= 2 && sc <= 4, "ack crosses in 2..4 slow cycles");
      @(posedge clk_s); #0.1;
      check(!busy_s && !done_s, "free after done");
      rdata_f = ~word;
    end
    repeat (5) @(posedge clk_s);
    check(starts == 100, "one start per load");
    check(dones == 100, "one done per completion");
    $display("starts=%0d dones=%0d", starts, dones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
