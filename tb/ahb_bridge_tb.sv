// Self-checking testbench of ahb_bridge: a write bridge and a read bridge on a
// slow clock (31 ns), a fast clock (2 ns), a fabric model that grants a request
// after a random delay, and a memory model that takes the address in the
// address phase and the write word four cycles later, or returns the read word
// then. Writes of random bursts go through the write bridge, then the same
// addresses are read back through the read bridge.
// Checks: each written word lands at its address; each read returns it; the
// fabric sees the address exactly one cycle after the grant and the data four
// cycles after the address; both master FSMs of a bridge were in flight at the
// same time at least once.
module ahb_bridge_tb;
  import aaa_pkg::*;
  logic clk_s = 0, clk_f = 0, rst_s_n = 0, rst_f_n = 0;

  typedef struct { logic [AW-1:0] addr; logic write; logic [2:0] burst; logic [1:0] trans;
                   logic [DW-1:0] wdata; } xfer_t;

  logic [1:0]          hsel, hwrite, hready, hreadyout, hresp;
  logic [1:0][AW-1:0]  haddr;
  logic [1:0][1:0]     htrans;
  logic [1:0][2:0]     hburst;
  logic [1:0][DW-1:0]  hwdata, hrdata;
  logic [1:0]          req, gnt, addr_valid, wdata_valid;
  cmd_t [1:0]          req_cmd;
  logic [1:0][MADDR_W-1:0] addr;
  logic [1:0][DW-1:0]  wdata;
  logic [DW-1:0]       hrdata_f;

  logic [1:0] pend;
  logic w_pend;
  assign w_pend = pend[0];
  int checks = 0, failures = 0, both_busy = 0, writes_done = 0, reads_done = 0;
  logic [DW-1:0] mem [logic [MADDR_W-1:0]];
  logic [DW-1:0] written [logic [MADDR_W-1:0]];

  for (genvar d = 0; d < 2; d++) begin : g_dut
    ahb_bridge #(.IS_WRITE(d == 0)) u (
      .clk_s, .rst_s_n, .clk_f, .rst_f_n,
      .hsel(hsel[d]), .haddr(haddr[d]), .htrans(htrans[d]), .hwrite(hwrite[d]), .hburst(hburst[d]),
      .hwdata(hwdata[d]), .hready(hready[d]), .hold(d == 1 ? w_pend : 1'b0), .pending(pend[d]), .hreadyout(hreadyout[d]), .hrdata(hrdata[d]),
      .hresp(hresp[d]), .req(req[d]), .req_cmd(req_cmd[d]), .gnt(gnt[d]),
      .addr_valid(addr_valid[d]), .addr(addr[d]), .wdata_valid(wdata_valid[d]), .wdata(wdata[d]),
      .hrdata_f(hrdata_f));
  end

  assign hready = hreadyout;

  always #15.5 clk_s = ~clk_s;
  always #1    clk_f = ~clk_f;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // fabric model: one grant per cycle, each request after a random delay
  int gdelay[2];
  int since[2][$];      // per bridge: cycles since grant / address
  bit [MADDR_W-1:0] pend_addr[2][$];
  always @(posedge clk_f) begin
    if (!rst_f_n) begin
      gnt <= '0; gdelay = '{0, 0};
    end else begin
      logic [1:0] g;
      g = '0;
      for (int d = 0; d < 2; d++) begin
        if (req[d]) begin
          if (gdelay[d] == 0 && g == 0) begin g[d] = 1'b1; gdelay[d] = (($urandom % 4) == 0) ? 30 + $urandom % 30 : $urandom % 4; end
          else if (gdelay[d] > 0) gdelay[d]--;
        end
        if (gnt[d]) since[d].push_back(0);
      end
      gnt <= g;
      if (g_dut[0].u.g_path[0].u_master.busy && g_dut[0].u.g_path[1].u_master.busy) both_busy++;
    end
  end

  // memory model with address / data phase timing checks
  int age[2][$];
  logic [MADDR_W-1:0] aq[2][$];
  always @(negedge clk_f) if (rst_f_n) begin
    hrdata_f = $urandom;
    for (int d = 0; d < 2; d++) begin
      for (int k = 0; k < since[d].size(); k++) since[d][k]++;
      if (since[d].size() > 0 && since[d][0] == 1) begin
        void'(since[d].pop_front());
        check(addr_valid[d], "address one cycle after grant");
        aq[d].push_back(addr[d]); age[d].push_back(0);
      end else begin
        check(!addr_valid[d], "no address without grant");
      end
      for (int k = 0; k < age[d].size(); k++) age[d][k]++;
      if (age[d].size() > 0 && age[d][0] == 5) begin
        logic [MADDR_W-1:0] a;
        void'(age[d].pop_front());
        a = aq[d].pop_front();
        check(wdata_valid[d] == (d == 0), "data phase four cycles after address");
        if (d == 0) begin mem[a] = wdata[d]; writes_done++; end
        else begin hrdata_f = mem.exists(a) ? mem[a] : 32'hdead_beef; reads_done++; end
      end else begin
        check(!wdata_valid[d], "no data phase out of turn");
      end
    end
  end

  task automatic run(input int d, input xfer_t list[$]);
    int i; bit dpv; xfer_t dpx; bit r; logic [DW-1:0] rd;
    i = 0; dpv = 0;
    @(posedge clk_s); #1;
    while (i < list.size() || dpv) begin
      if (i < list.size()) begin
        haddr[d] = list[i].addr; htrans[d] = list[i].trans; hburst[d] = list[i].burst;
        hwrite[d] = list[i].write; hsel[d] = 1;
      end else begin
        htrans[d] = HTRANS_IDLE; hsel[d] = 0;
      end
      hwdata[d] = dpv ? dpx.wdata : '0;
      @(negedge clk_s);
      r = hready[d]; rd = hrdata[d];
      @(posedge clk_s); #1;
      if (r) begin
        if (dpv && !dpx.write)
          check(rd == written[dpx.addr[MADDR_W-1:0]], "read returns the written word");
        dpv = (i < list.size());
        if (dpv) dpx = list[i];
        i++;
      end
    end
    htrans[d] = HTRANS_IDLE; hsel[d] = 0;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xfer_t wl[$], rl[$];
    hsel = 0; htrans = 0; hwrite = 0; haddr = 0; hburst = 0; hwdata = 0;
    #40 rst_s_n = 1; rst_f_n = 1;
    for (int n = 0; n < 40; n++) begin
      logic [AW-1:0] base;
      int beats;
      wl.delete(); rl.delete();
      beats = (n % 2) ? 4 : 1;
      base = {4'($urandom), 4'($urandom), 2'($urandom % 3), 12'd0, 8'($urandom) & 8'hf0, 2'b00};
      for (int b = 0; b < beats; b++) begin
        xfer_t x;
        x.addr = base + AW'(4 * b); x.burst = (beats == 4) ? 3'd3 : 3'd0;
        x.trans = (b == 0) ? HTRANS_NONSEQ : HTRANS_SEQ;
        x.wdata = $urandom; x.write = 1;
        written[x.addr[MADDR_W-1:0]] = x.wdata;
        wl.push_back(x);
        x.write = 0;
        rl.push_back(x);
      end
      run(0, wl);
      repeat (3) @(posedge clk_s);    // let posted writes finish
      run(1, rl);
    end
    repeat (5) @(posedge clk_s);
    check(writes_done == reads_done && writes_done == 100, "all writes and reads reached the fabric");
    check(both_busy > 0, "master FSMs A and B in flight together");
    $display("writes=%0d reads=%0d both_busy=%0d", writes_done, reads_done, both_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
