// Self-checking testbench of phase_arbiter: the phase must count 0,1,2,3,...
// from reset, and a request may only be admitted when its bank is the bank
// whose slot comes two cycles later. Every bank must be admitted at some time
// and refused at some time.
module phase_arbiter_tb;
  import aaa_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  logic [N-1:0][PHASE_W-1:0] bank;
  logic [N-1:0] ok;
  logic [PHASE_W-1:0] phase;
  int checks = 0, failures = 0;
  int admitted[PHASES], refused[PHASES];

  phase_arbiter #(.N(N), .LOOKAHEAD(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bank = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < N; i++) bank[i] = PHASE_W'($urandom);
      #1;
      checks++;
      if (phase != PHASE_W'(t)) begin failures++; $display("phase %0d at t=%0d", phase, t); end
      for (int i = 0; i < N; i++) begin
        bit e;
        e = (int'(bank[i]) == (t + 2) % PHASES);
        checks++;
        if (ok[i] !== e) failures++;
        if (e) admitted[bank[i]]++; else refused[bank[i]]++;
      end
      @(posedge clk); #1;
    end
    for (int b = 0; b < PHASES; b++) begin
      checks++;
      if (admitted[b] == 0 || refused[b] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
