// Self-checking testbench of p_block: random requests and priority levels;
// the expected winner is the highest level, lowest index among equals.
module p_block_tb;
  localparam int N = 6, PW = 3;
  logic [N-1:0] req;
  logic [N-1:0][PW-1:0] prio;
  logic [$clog2(N)-1:0] gnt_id;
  logic gnt_valid;
  int checks = 0, failures = 0;

  p_block #(.N(N), .PRIO_W(PW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int best, bid;
      req = N'($urandom);
      for (int i = 0; i < N; i++) prio[i] = PW'($urandom);
      if (t % 3 == 0) prio = '0;               // fixed-priority use
      #1;
      best = -1; bid = 0;
      for (int i = 0; i < N; i++)
        if (req[i] && int'(prio[i]) > best) begin best = prio[i]; bid = i; end
      checks++;
      if (gnt_valid !== (req != 0) || (req != 0 && gnt_id != bid)) begin
        failures++;
        if (failures < 10) $display("mismatch req=%b got %0d exp %0d", req, gnt_id, bid);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
