// Self-checking testbench of rr_block: random requests, random advance; the
// expected winner is recomputed from a separately kept last-served pointer.
module rr_block_tb;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req;
  logic advance;
  logic [$clog2(N)-1:0] gnt_id;
  logic gnt_valid;
  int checks = 0, failures = 0;
  int last = N - 1;

  rr_block #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; advance = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int exp_id; bit exp_v;
      req     = N'($urandom);
      advance = ($urandom % 4) != 0;
      #1;
      exp_v = 0; exp_id = 0;
      for (int k = 1; k <= N; k++)
        if (!exp_v && req[(last + k) % N]) begin exp_v = 1; exp_id = (last + k) % N; end
      checks++;
      if (gnt_valid !== exp_v || (exp_v && gnt_id != exp_id)) begin
        failures++;
        if (failures < 10) $display("mismatch t=%0d req=%b got %0d/%0d exp %0d/%0d", t, req, gnt_valid, gnt_id, exp_v, exp_id);
      end
      @(posedge clk);
      if (advance && exp_v) last = exp_id;
      #1;
    end
    // fairness: all requesting -> every requester served once in N grants
    begin
      int seen[N];
      req = '1; advance = 1;
      for (int i = 0; i < N; i++) seen[i] = 0;
      for (int i = 0; i < N; i++) begin #1; seen[gnt_id]++; @(posedge clk); #1; end
      for (int i = 0; i < N; i++) begin checks++; if (seen[i] != 1) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
