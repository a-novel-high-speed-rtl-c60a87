// Self-checking testbench of aaa_arbiter.
//
// Random requests, phase admissions, priority levels, lengths, modes and last
// flags, with the policy changed every few hundred cycles. A reference model
// in the testbench (its own round-robin pointer, priority search and hold
// bookkeeping) predicts the registered master number and no-port of every
// cycle. Counts how often each of the nine schemes granted and how often a
// hold ended by length and by transaction end; each must happen.
module aaa_arbiter_tb;
  import aaa_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  policy_e policy;
  logic [N-1:0] req, ok, last;
  logic [N-1:0][PRIO_W-1:0] prio;
  logic [N-1:0][LEN_W-1:0]  len_m1;
  mode_e [N-1:0] mode;
  logic [$clog2(N)-1:0] master_num;
  logic no_port, locked;
  int checks = 0, failures = 0;

  // reference state
  int  rr_last = N - 1;
  bit  r_hold = 0;
  int  r_owner = 0, r_cnt = 0;
  mode_e r_mode = MODE_TRANSFER;
  int  exp_num = 0; bit exp_np = 1;
  int  scheme_grants[3][3];
  int  len_releases = 0, last_releases = 0, hold_blocks = 0;

  aaa_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    policy = POL_FIXED; req = 0; ok = 0; last = 0; prio = 0; len_m1 = 0; mode = '{default: MODE_TRANSFER};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      bit [N-1:0] el;
      int  w; bit wv;
      if (t % 500 == 0) policy = policy_e'((t / 500) % 3);
      req = N'($urandom) & N'($urandom);
      ok  = N'($urandom);
      for (int i = 0; i < N; i++) begin
        prio[i]   = PRIO_W'($urandom);
        len_m1[i] = LEN_W'($urandom % 5);
        mode[i]   = mode_e'($urandom % 3);
        last[i]   = ($urandom % 6) == 0;
      end
      #1;
      // reference arbitration for this cycle
      el = req & ok;
      wv = 0; w = 0;
      if (r_hold) begin
        w = r_owner; wv = el[r_owner];
        if (!wv && el != 0) hold_blocks++;
      end else if (policy == POL_RR) begin
        for (int k = 1; k <= N; k++)
          if (!wv && el[(rr_last + k) % N]) begin wv = 1; w = (rr_last + k) % N; end
      end else begin
        int best, p;
        best = -1;
        for (int i = 0; i < N; i++) begin
          p = (policy == POL_DYNAMIC) ? int'(prio[i]) : 0;
          if (el[i] && p > best) begin best = p; w = i; wv = 1; end
        end
      end
      @(posedge clk);
      // registered outputs of the previous decision are now visible
      if (wv) begin
        mode_e gm; int cn; bit nh;
        gm = r_hold ? r_mode : mode[w];
        cn = r_hold ? r_cnt + 1 : 1;
        nh = !last[w] && (gm == MODE_TRANSACTION || (gm == MODE_DTL && cn <= int'(len_m1[w])));
        if (!r_hold && policy == POL_RR) rr_last = w;
        if (!r_hold) scheme_grants[policy][gm]++;
        if (r_hold && !nh) begin if (last[w]) last_releases++; else len_releases++; end
        r_hold = nh; r_owner = w; r_mode = gm; r_cnt = cn;
      end
      #1;
      checks++;
      if (no_port !== !wv || (wv && master_num != w) || locked !== r_hold) begin
        failures++;
        if (failures < 10) $display("t=%0d mismatch: got np=%0d num=%0d lk=%0d exp np=%0d num=%0d lk=%0d",
                                    t, no_port, master_num, locked, !wv, w, r_hold);
      end
    end
    for (int p = 0; p < 3; p++)
      for (int m = 0; m < 3; m++) begin
        checks++;
        if (scheme_grants[p][m] == 0) begin failures++; $display("scheme %0d/%0d never used", p, m); end
      end
    checks++; if (len_releases == 0)  begin failures++; $display("no length release"); end
    checks++; if (last_releases == 0) begin failures++; $display("no transaction-end release"); end
    checks++; if (hold_blocks == 0)   begin failures++; $display("hold never blocked another master"); end
    $display("len_releases=%0d last_releases=%0d hold_blocks=%0d", len_releases, last_releases, hold_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
