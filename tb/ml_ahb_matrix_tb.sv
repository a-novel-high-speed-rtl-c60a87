// End-to-end testbench of ml_ahb_matrix at its default size (four masters,
// 4096-word shared memory).
//
// Four AHB master models on their own clocks (32, 40, 48 and 64 MHz) run
// random programs of write bursts (SINGLE, INCR, INCR4, INCR8) into their own
// quarter of the shared memory and read bursts of words they wrote before,
// with random priority level, desired transfer length and multiplexing mode
// in HADDR[31:22]. The fabric runs at 2 GHz. The write and read policies are
// switched between fixed, round robin and dynamic while the programs run.
// Checks: every read returns the word the master last wrote there; every
// transfer is accepted and completed; each mechanism of the design occurs:
// phase waits, slave holds blocking another master, holds ended by the
// desired length, all nine arbitration schemes, both master FSMs of a bridge
// in flight together, posted writes without and with wait states, reads
// waiting for their master's posted writes, and cycles with no port selected.
module ml_ahb_matrix_tb;
  import aaa_pkg::*;
  localparam int NM     = 4;
  localparam int BURSTS = 60;     // bursts per master

  logic [NM-1:0] clk_s = '0, rst_s_n = '0;
  logic clk_f = 0, rst_f_n = 0;
  policy_e policy_w, policy_r;
  logic [NM-1:0][AW-1:0] m_haddr;
  logic [NM-1:0][1:0]    m_htrans;
  logic [NM-1:0]         m_hwrite, m_hready, m_hresp;
  logic [NM-1:0][2:0]    m_hburst;
  logic [NM-1:0][DW-1:0] m_hwdata, m_hrdata;

  int checks = 0, failures = 0;
  int reads_checked = 0, writes_done = 0;
  bit [NM-1:0] finished = '0;

  // mechanism counters
  int phase_waits = 0, hold_blocks = 0, len_releases = 0, no_port_cycles = 0;
  int ab_overlap = 0, posted_zero_wait = 0, posted_stall = 0, read_ordering_holds = 0;
  int scheme[2][3][3];
  int rd_wait_min = 1000, rd_wait_max = 0, rd_wait_sum = 0, wr_wait_max = 0;

  ml_ahb_matrix dut (.*);

  always #0.25 clk_f = ~clk_f;                 // 2 GHz
  always #15.625 clk_s[0] = ~clk_s[0];         // 32 MHz
  always #12.5   clk_s[1] = ~clk_s[1];         // 40 MHz
  always #10.417 clk_s[2] = ~clk_s[2];         // 48 MHz
  always #7.8125 clk_s[3] = ~clk_s[3];         // 64 MHz

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------------------------------------------------------- masters
  for (genvar m = 0; m < NM; m++) begin : g_m
    typedef struct { logic [AW-1:0] addr; logic write; logic [2:0] burst; logic [1:0] trans;
                     logic [DW-1:0] wdata; } xfer_t;
    logic [DW-1:0] ref_mem [int];
    int written_bases[$];
    int written_beats[$];

    task automatic run(input xfer_t list[$]);
      int i; bit dpv; xfer_t dpx; bit r; logic [DW-1:0] rd; int waits;
      i = 0; dpv = 0; waits = 0;
      @(posedge clk_s[m]); #1;
      while (i < list.size() || dpv) begin
        if (i < list.size()) begin
          m_haddr[m] = list[i].addr; m_htrans[m] = list[i].trans; m_hburst[m] = list[i].burst;
          m_hwrite[m] = list[i].write;
        end else begin
          m_htrans[m] = HTRANS_IDLE;
        end
        m_hwdata[m] = dpv ? dpx.wdata : '0;
        @(negedge clk_s[m]);
        r = m_hready[m]; rd = m_hrdata[m];
        @(posedge clk_s[m]); #1;
        if (!r) waits++;
        if (r) begin
          if (dpv) begin
            check(!m_hresp[m], "OKAY response");
            if (dpx.write) begin
              writes_done++;
              if (waits == 0) posted_zero_wait++; else posted_stall++;
              if (waits > wr_wait_max) wr_wait_max = waits;
            end else begin
              reads_checked++;
              rd_wait_sum += waits;
              if (waits < rd_wait_min) rd_wait_min = waits;
              if (waits > rd_wait_max) rd_wait_max = waits;
              check(rd == ref_mem[int'(dpx.addr[13:2])], $sformatf("master %0d read %h", m, dpx.addr));
            end
          end
          waits = 0;
          dpv = (i < list.size());
          if (dpv) dpx = list[i];
          i++;
        end
      end
      m_htrans[m] = HTRANS_IDLE;
    endtask

    initial begin
      xfer_t list[$];
      m_htrans[m] = HTRANS_IDLE; m_haddr[m] = '0; m_hwrite[m] = 0; m_hburst[m] = 0; m_hwdata[m] = 0;
      wait (rst_s_n[m]);
      for (int n = 0; n < BURSTS; n++) begin
        int beats, base_w, kind;
        logic [2:0] burst;
        logic [9:0] hi;
        bit wr;
        list.delete();
        hi = {4'($urandom), 4'($urandom % 8), 2'($urandom % 3)};   // prio, len-1, mode
        wr = (written_bases.size() == 0) || ($urandom % 2 == 0);
        if (wr) begin
          kind = $urandom % 4;
          case (kind)
            0: begin beats = 1; burst = 3'd0; end
            1: begin beats = 2 + $urandom % 3; burst = 3'd1; end
            2: begin beats = 4; burst = 3'd3; end
            default: begin beats = 8; burst = 3'd5; end
          endcase
          base_w = ($urandom % 128) * 8;
          written_bases.push_back(base_w); written_beats.push_back(beats);
        end else begin
          int k;
          k = $urandom % written_bases.size();
          base_w = written_bases[k]; beats = written_beats[k];
          burst = (beats == 1) ? 3'd0 : (beats == 4) ? 3'd3 : (beats == 8) ? 3'd5 : 3'd1;
        end
        for (int b = 0; b < beats; b++) begin
          xfer_t x;
          x.addr  = {hi, 8'd0, 2'(m), 10'(base_w + b), 2'b00};
          x.write = wr;
          x.burst = burst;
          x.trans = (b == 0) ? HTRANS_NONSEQ : HTRANS_SEQ;
          x.wdata = $urandom;
          if (wr) ref_mem[m * 1024 + base_w + b] = x.wdata;
          list.push_back(x);
        end
        run(list);
        repeat ($urandom % 3) @(posedge clk_s[m]);
      end
      finished[m] = 1'b1;
    end
  end

  // ---------------------------------------------------------------- counters
  always @(posedge clk_f) if (rst_f_n) begin
    if (dut.u_wport.no_port && dut.u_rport.no_port) no_port_cycles++;
    for (int i = 0; i < NM; i++) begin
      if (dut.u_wport.req[i] && !dut.u_wport.ok[i]) phase_waits++;
      if (dut.u_rport.req[i] && !dut.u_rport.ok[i]) phase_waits++;
    end
  end

  for (genvar s = 0; s < 2; s++) begin : g_side
    always @(posedge clk_f) if (rst_f_n) begin
      if (s == 0) begin
        if (dut.u_wport.u_aaa.locked_q &&
            ((dut.u_wport.u_aaa.elig & ~(NM'(1) << dut.u_wport.u_aaa.owner_q)) != 0)) hold_blocks++;
        if (dut.u_wport.u_aaa.sel_v && dut.u_wport.u_aaa.locked_q && !dut.u_wport.u_aaa.hold_nxt &&
            !dut.u_wport.u_aaa.last[dut.u_wport.u_aaa.sel_id]) len_releases++;
        if (dut.u_wport.u_aaa.sel_v && !dut.u_wport.u_aaa.locked_q)
          scheme[0][dut.u_wport.u_aaa.policy][dut.u_wport.u_aaa.g_mode]++;
      end else begin
        if (dut.u_rport.u_aaa.locked_q &&
            ((dut.u_rport.u_aaa.elig & ~(NM'(1) << dut.u_rport.u_aaa.owner_q)) != 0)) hold_blocks++;
        if (dut.u_rport.u_aaa.sel_v && dut.u_rport.u_aaa.locked_q && !dut.u_rport.u_aaa.hold_nxt &&
            !dut.u_rport.u_aaa.last[dut.u_rport.u_aaa.sel_id]) len_releases++;
        if (dut.u_rport.u_aaa.sel_v && !dut.u_rport.u_aaa.locked_q)
          scheme[1][dut.u_rport.u_aaa.policy][dut.u_rport.u_aaa.g_mode]++;
      end
    end
  end

  for (genvar m = 0; m < NM; m++) begin : g_cnt
    always @(posedge clk_f) if (rst_f_n) begin
      if (dut.g_master[m].u_wbridge.g_path[0].u_master.busy &&
          dut.g_master[m].u_wbridge.g_path[1].u_master.busy) ab_overlap++;
      if (dut.g_master[m].u_rbridge.g_path[0].u_master.busy &&
          dut.g_master[m].u_rbridge.g_path[1].u_master.busy) ab_overlap++;
    end
    always @(posedge clk_s[m]) if (rst_s_n[m]) begin
      if (dut.g_master[m].u_rbridge.u_slave.dp_valid_q && !dut.g_master[m].u_rbridge.u_slave.dp_trig_q &&
          dut.g_master[m].u_rbridge.hold) read_ordering_holds++;
    end
  end

  // ---------------------------------------------------------------- control
  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("read wait states: min=%0d max=%0d mean=%0.2f; write wait states: max=%0d",
             rd_wait_min, rd_wait_max, real'(rd_wait_sum) / reads_checked, wr_wait_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    policy_w = POL_FIXED; policy_r = POL_RR;
    #40 rst_f_n = 1; rst_s_n = '1;
    for (int k = 0; !(&finished); k++) begin
      #2000;
      policy_w = policy_e'(k % 3);
      policy_r = policy_e'((k + 1) % 3);
    end
    #200;
    for (int s = 0; s < 2; s++)
      for (int p = 0; p < 3; p++)
        for (int md = 0; md < 3; md++) begin
          checks++;
          if (scheme[s][p][md] == 0) begin
            failures++; $display("%s side: policy %0d mode %0d never used", s ? "read" : "write", p, md);
          end
        end
    check(reads_checked > 0 && writes_done > 0, "reads and writes done");
    check(phase_waits > 0, "phase waits");
    check(hold_blocks > 0, "holds blocking another master");
    check(len_releases > 0, "holds ended by desired length");
    check(no_port_cycles > 0, "no-port cycles");
    check(ab_overlap > 0, "master FSMs A and B in flight together");
    check(posted_zero_wait > 0, "posted writes without wait state");
    check(posted_stall > 0, "posted writes with wait states");
    check(read_ordering_holds > 0, "reads waiting for posted writes");
    $display("writes=%0d reads=%0d phase_waits=%0d hold_blocks=%0d len_releases=%0d no_port=%0d",
             writes_done, reads_checked, phase_waits, hold_blocks, len_releases, no_port_cycles);
    $display("ab_overlap=%0d posted_zero_wait=%0d posted_stall=%0d read_holds=%0d",
             ab_overlap, posted_zero_wait, posted_stall, read_ordering_holds);
    $display("read wait states: min=%0d max=%0d mean=%0.2f; write wait states: max=%0d",
             rd_wait_min, rd_wait_max, real'(rd_wait_sum) / reads_checked, wr_wait_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
