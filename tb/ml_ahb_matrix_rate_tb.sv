// Throughput testbench of ml_ahb_matrix: how close the fabric comes to one
// write and one read per fast cycle when enough slow masters feed it.
//
// 32 masters at 64 MHz (phases staggered) against a 2 GHz fabric, the number
// of 64 MHz masters it takes to offer about one transfer per fast cycle to one
// memory port. Every master writes INCR8 bursts into its own 1024-word region
// (transfer mode, round robin), then reads them all back. The testbench
// measures the share of fast cycles in which the write port and the read port
// carry an address, checks every read word, and requires a write-port
// utilisation of at least 0.6 over the write phase (the phase arbiter can
// only serve requests whose bank comes next, so random arrival costs some
// slots).
module ml_ahb_matrix_rate_tb;
  import aaa_pkg::*;
  localparam int NM     = 32;
  localparam int BURSTS = 16;    // INCR8 write bursts per master

  logic [NM-1:0] clk_s = '0, rst_s_n = '0;
  logic clk_f = 0, rst_f_n = 0;
  policy_e policy_w, policy_r;
  logic [NM-1:0][AW-1:0] m_haddr;
  logic [NM-1:0][1:0]    m_htrans;
  logic [NM-1:0]         m_hwrite, m_hready, m_hresp;
  logic [NM-1:0][2:0]    m_hburst;
  logic [NM-1:0][DW-1:0] m_hwdata, m_hrdata;

  int checks = 0, failures = 0, reads_checked = 0;
  bit [NM-1:0] wr_done = '0, finished = '0;
  bit measuring_w = 0, measuring_r = 0;
  longint w_cycles = 0, w_busy = 0, r_cycles = 0, r_busy = 0;

  ml_ahb_matrix #(.NM(NM), .MEM_WORDS(NM * 1024)) dut (.*);

  always #0.25 clk_f = ~clk_f;
  for (genvar m = 0; m < NM; m++) begin : g_clk
    initial begin
      #(0.37 * m);
      forever #7.8125 clk_s[m] = ~clk_s[m];
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  for (genvar m = 0; m < NM; m++) begin : g_m
    typedef struct { logic [AW-1:0] addr; logic write; logic [1:0] trans; logic [DW-1:0] wdata; } xfer_t;

    function automatic logic [DW-1:0] word(input int a);
      return 32'h1357_9bdf ^ (a * 32'h0101_0101) ^ (m << 24);
    endfunction

    task automatic run(input xfer_t list[$]);
      int i; bit dpv; xfer_t dpx; bit r; logic [DW-1:0] rd;
      i = 0; dpv = 0;
      @(posedge clk_s[m]); #1;
      while (i < list.size() || dpv) begin
        if (i < list.size()) begin
          m_haddr[m] = list[i].addr; m_htrans[m] = list[i].trans; m_hburst[m] = 3'd5;
          m_hwrite[m] = list[i].write;
        end else m_htrans[m] = HTRANS_IDLE;
        m_hwdata[m] = dpv ? dpx.wdata : '0;
        @(negedge clk_s[m]);
        r = m_hready[m]; rd = m_hrdata[m];
        @(posedge clk_s[m]); #1;
        if (r) begin
          if (dpv && !dpx.write) begin
            reads_checked++;
            check(rd == word(int'(dpx.addr[16:2])), "read word");
          end
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
      for (int pass = 0; pass < 2; pass++) begin
        list.delete();
        for (int n = 0; n < BURSTS; n++)
          for (int b = 0; b < 8; b++) begin
            xfer_t x;
            int a;
            a = m * 1024 + n * 8 + b;
            x.addr  = {10'd0, 5'd0, 15'(a), 2'b00};
            x.write = (pass == 0);
            x.trans = (b == 0) ? HTRANS_NONSEQ : HTRANS_SEQ;
            x.wdata = word(a);
            list.push_back(x);
          end
        run(list);
        if (pass == 0) begin
          wr_done[m] = 1'b1;
          wait (&wr_done);
        end
      end
      finished[m] = 1'b1;
    end
  end

  always @(posedge clk_f) begin
    if (measuring_w) begin w_cycles++; if (dut.mw_av) w_busy++; end
    if (measuring_r) begin r_cycles++; if (dut.mr_av) r_busy++; end
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real wu, ru;
    policy_w = POL_RR; policy_r = POL_RR;
    #40 rst_f_n = 1; rst_s_n = '1;
    #100 measuring_w = 1;                   // steady state of the write phase
    wait (wr_done != 0);
    measuring_w = 0;
    wait (&wr_done);
    #200 measuring_r = 1;
    wait (finished != 0);
    measuring_r = 0;
    wait (&finished);
    wu = real'(w_busy) / w_cycles;
    ru = real'(r_busy) / r_cycles;
    $display("write port: %0d of %0d fast cycles carry an address (%0.2f)", w_busy, w_cycles, wu);
    $display("read port:  %0d of %0d fast cycles carry an address (%0.2f)", r_busy, r_cycles, ru);
    check(reads_checked == NM * BURSTS * 8, "all words read back");
    check(wu >= 0.6, "write port busy enough");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
