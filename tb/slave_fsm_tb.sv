// Self-checking testbench of slave_fsm: a write-type and a read-type instance,
// each driven by a pipelined AHB master model, with a behavioural model of the
// two synchronization registers (busy from load to a done pulse a random
// number of cycles later; read word = a hash of the address).
// Checks: every accepted transfer loads exactly one register, strictly
// alternating A, B; the loaded command carries the address, write data,
// priority level, desired length, mode and the `last` flag of the burst beat;
// reads return the model word; writes complete without wait states when the
// register is free, and stall when it is not (both must happen); a read is
// never started while `hold` is high (and hold did delay reads); reads are
// loaded from the address phase when possible (must happen) and from the data
// phase otherwise; the write instance's `pending` is high while a write data
// phase is open or a register is busy.
module slave_fsm_tb;
  import aaa_pkg::*;
  logic clk = 0, rst_n = 0;

  typedef struct { logic [AW-1:0] addr; logic write; logic [2:0] burst; logic [1:0] trans;
                   logic [DW-1:0] wdata; logic last; } xfer_t;

  // per instance signals: [0] write type, [1] read type
  logic [1:0]          hsel, hwrite, hready, hreadyout, hresp;
  logic [1:0][AW-1:0]  haddr;
  logic [1:0][1:0]     htrans;
  logic [1:0][2:0]     hburst;
  logic [1:0][DW-1:0]  hwdata, hrdata;
  logic [1:0][1:0]     load, busy, done;
  cmd_t [1:0]          cmd;
  logic [1:0][1:0][DW-1:0] rdata;

  int checks = 0, failures = 0;
  logic hold_r;
  int held_cycles = 0, early_reads = 0;
  logic pending_w;
  int zero_wait_writes = 0, stalled_writes = 0;
  xfer_t exp_q[2][$];
  int    next_slot[2] = '{0, 0};
  cmd_t  held[2][2];
  int    cnt[2][2];

  slave_fsm #(.IS_WRITE(1'b1)) u_w (
    .clk, .rst_n, .hsel(hsel[0]), .haddr(haddr[0]), .htrans(htrans[0]), .hwrite(hwrite[0]),
    .hburst(hburst[0]), .hwdata(hwdata[0]), .hready(hready[0]), .hold(1'b0), .pending(pending_w), .hreadyout(hreadyout[0]),
    .hrdata(hrdata[0]), .hresp(hresp[0]), .load(load[0]), .cmd(cmd[0]), .busy(busy[0]),
    .done(done[0]), .rdata(rdata[0]));
  slave_fsm #(.IS_WRITE(1'b0)) u_r (
    .clk, .rst_n, .hsel(hsel[1]), .haddr(haddr[1]), .htrans(htrans[1]), .hwrite(hwrite[1]),
    .hburst(hburst[1]), .hwdata(hwdata[1]), .hready(hready[1]), .hold(hold_r), .pending(), .hreadyout(hreadyout[1]),
    .hrdata(hrdata[1]), .hresp(hresp[1]), .load(load[1]), .cmd(cmd[1]), .busy(busy[1]),
    .done(done[1]), .rdata(rdata[1]));

  assign hready = hreadyout;   // each instance alone on its AHB layer

  always #5 clk = ~clk;

  function automatic logic [DW-1:0] hash(input logic [MADDR_W-1:0] a);
    return {10'h2a5, a} ^ 32'h5a5a_0f0f;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // random read hold; a read must never start while it is high
  always @(posedge clk) begin
    if (rst_n && hold_r && u_r.dp_valid_q && !u_r.dp_trig_q) held_cycles++;
    if (rst_n) check(!(hold_r && load[1] != 0), "no read started during hold");
    if (rst_n && load[1] != 0 && !(u_r.dp_valid_q && !u_r.dp_trig_q)) early_reads++;
    if (rst_n) check(pending_w == (u_w.dp_valid_q || busy[0] != 0), "write pending");
    hold_r <= ($urandom % 3) == 0;
  end

  // behavioural synchronization registers
  always @(posedge clk) begin
    if (!rst_n) begin
      busy <= '0; done <= '0; cnt <= '{default: 0};
    end else begin
      for (int d = 0; d < 2; d++)
        for (int s = 0; s < 2; s++) begin
          done[d][s] <= 1'b0;
          if (done[d][s]) busy[d][s] <= 1'b0;
          if (load[d][s]) begin
            xfer_t e;
            check(!busy[d][s], "load only into a free register");
            check(s == next_slot[d], "A and B loaded alternately");
            next_slot[d] = 1 - s;
            check(exp_q[d].size() > 0, "load expected");
            if (exp_q[d].size() > 0) begin
              e = exp_q[d].pop_front();
              check(cmd[d].addr == e.addr[MADDR_W-1:0] && cmd[d].prio == e.addr[31:28] &&
                    cmd[d].len_m1 == e.addr[27:24] && cmd[d].mode == mode_e'(e.addr[23:22]) &&
                    cmd[d].last == e.last && (d == 1 || cmd[d].wdata == e.wdata),
                    "command contents");
            end
            held[d][s] = cmd[d];
            busy[d][s] <= 1'b1;
            cnt[d][s]  = 1 + $urandom % 8;
          end else if (busy[d][s] && !done[d][s] && cnt[d][s] > 0) begin
            cnt[d][s]--;
            if (cnt[d][s] == 0) begin
              done[d][s]  <= 1'b1;
              rdata[d][s] <= hash(held[d][s].addr);
            end
          end
        end
    end
  end

  // pipelined AHB master model on instance d
  task automatic run(input int d, input xfer_t list[$]);
    int i; bit dpv; xfer_t dpx; bit r; logic [DW-1:0] rd; int waits;
    i = 0; dpv = 0; waits = 0;
    while (i < list.size() || dpv) begin
      if (i < list.size()) begin
        haddr[d] = list[i].addr; htrans[d] = list[i].trans; hburst[d] = list[i].burst;
        hwrite[d] = list[i].write; hsel[d] = 1;
      end else begin
        htrans[d] = HTRANS_IDLE; hsel[d] = 0;
      end
      hwdata[d] = dpv ? dpx.wdata : '0;
      @(negedge clk);
      r = hready[d]; rd = hrdata[d];
      @(posedge clk); #1;
      if (!r) waits++;
      if (r) begin
        if (dpv && !dpx.write) check(rd == hash(dpx.addr[MADDR_W-1:0]), "read word");
        if (dpv && dpx.write) begin
          if (waits == 0) zero_wait_writes++; else stalled_writes++;
        end
        waits = 0;
        dpv = (i < list.size());
        if (dpv) dpx = list[i];
        i++;
      end
    end
    htrans[d] = HTRANS_IDLE; hsel[d] = 0;
  endtask

  function automatic void make(input int d, input int beats, input logic [2:0] burst,
                               ref xfer_t list[$]);
    logic [AW-1:0] base;
    base = {4'($urandom), 4'($urandom), 2'($urandom % 3), 10'd0, 10'($urandom) & 10'h3f0, 2'b00};
    for (int b = 0; b < beats; b++) begin
      xfer_t x;
      x.addr  = base + AW'(4 * b);
      x.write = (d == 0);
      x.burst = burst;
      x.trans = (b == 0) ? HTRANS_NONSEQ : HTRANS_SEQ;
      x.wdata = $urandom;
      x.last  = (burst == 3'd1) ? 1'b1 : (b == beats - 1);
      list.push_back(x);
      exp_q[d].push_back(x);
    end
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hsel = 0; htrans = 0; hwrite = 0; haddr = 0; hburst = 0; hwdata = 0; rdata = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      for (int d = 0; d < 2; d++) begin
        xfer_t list[$];
        list.delete();
        case (n % 4)
          0: make(d, 1, 3'd0, list);   // SINGLE
          1: make(d, 4, 3'd3, list);   // INCR4
          2: make(d, 8, 3'd5, list);   // INCR8
          3: make(d, 3, 3'd1, list);   // INCR, 3 beats
        endcase
        run(d, list);
      end
    end
    repeat (20) @(posedge clk);
    check(exp_q[0].size() == 0 && exp_q[1].size() == 0, "all transfers handed over");
    check(held_cycles > 0, "read held back by hold");
    check(early_reads > 0, "read loaded from the address phase");
    check(zero_wait_writes > 0, "posted write without wait state");
    check(stalled_writes > 0, "write stalled on a busy register");
    $display("zero-wait writes=%0d stalled writes=%0d early reads=%0d",
             zero_wait_writes, stalled_writes, early_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
