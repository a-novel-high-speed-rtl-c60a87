// Self-checking testbench of master_fsm. For each activation the grant is
// given after a random wait; the testbench checks that REQ is held until the
// grant, that the address phase is the cycle after the grant, that exactly
// three wait cycles follow, that the data phase (and done) comes four cycles
// after the address phase, that the read word is captured, and that the FSM is
// idle again afterwards.
module master_fsm_tb;
  import aaa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, grant;
  logic [DW-1:0] hrdata;
  logic req, addr_phase, data_phase, done, busy;
  logic [DW-1:0] rdata;
  int checks = 0, failures = 0;

  master_fsm dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; grant = 0; hrdata = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int wait_g;
      logic [DW-1:0] word;
      wait_g = $urandom % 5;
      word   = $urandom;
      repeat ($urandom % 3) begin
        @(posedge clk); #1;
        check(!req && !busy && !addr_phase && !data_phase, "idle outputs");
      end
      start = 1; @(posedge clk); #1; start = 0;
      for (int k = 0; k < wait_g; k++) begin
        check(req && busy, "req held while waiting");
        @(posedge clk); #1;
      end
      check(req, "req before grant");
      grant = 1; @(posedge clk); #1; grant = 0;
      check(addr_phase && !req, "address phase after grant");
      for (int w = 0; w < 3; w++) begin
        @(posedge clk); #1;
        check(!addr_phase && !data_phase && busy && !req, "wait state");
      end
      @(posedge clk); #1;
      check(data_phase && done, "data phase four cycles after address");
      hrdata = word;
      @(posedge clk); #1;
      hrdata = ~word;
      check(!busy && rdata == word, "idle and read word captured");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
