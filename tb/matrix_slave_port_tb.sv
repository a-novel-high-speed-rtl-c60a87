// Self-checking testbench of matrix_slave_port. Four requester models behave
// like bridge master FSMs: they request with a random command, drop the
// request when granted, drive their address in the next cycle and their write
// data four cycles after that. A write-type and a read-type port see the same
// requesters. Checks: at most one grant per cycle; every granted address
// reaches the memory bus in the right cycle, in the bank whose slot it is;
// every write word reaches the write data bus four cycles later; the read port
// passes the memory word through; every request is eventually served under
// each policy; grants in consecutive cycles occur (the port sustains one
// transfer per cycle). Counts phase waits (a request held back because its bank was
// not next) and holds of the slave; both must occur.
module matrix_slave_port_tb;
  import aaa_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  policy_e policy;
  logic [N-1:0] req, want, gnt, gnt_r, addr_valid, wdata_valid;
  cmd_t [N-1:0] req_cmd;
  logic [N-1:0][MADDR_W-1:0] addr;
  logic [N-1:0][DW-1:0] wdata;
  logic [DW-1:0] hrdata_f, hrdata_f_r, mem_rdata;
  logic [PHASE_W-1:0] phase, phase_r;
  logic mem_addr_valid, mem_wdata_valid, locked, r_av, r_dv, r_locked;
  logic [MADDR_W-1:0] mem_addr, r_addr;
  logic [DW-1:0] mem_wdata, r_wdata;
  int checks = 0, failures = 0;
  int issued = 0, served = 0, phase_waits = 0, holds = 0, back_to_back = 0;
  bit prev_gnt = 0;
  int cnt_data[N];   // cycles until this requester's data phase, 0 = none

  matrix_slave_port #(.N(N), .IS_WRITE(1'b1)) dut (
    .clk, .rst_n, .policy, .req, .req_cmd, .gnt, .addr_valid, .addr, .wdata_valid, .wdata,
    .hrdata_f, .phase, .mem_addr_valid, .mem_addr, .mem_wdata_valid, .mem_wdata,
    .mem_rdata('0), .locked);

  matrix_slave_port #(.N(N), .IS_WRITE(1'b0)) dut_r (
    .clk, .rst_n, .policy, .req, .req_cmd, .gnt(gnt_r), .addr_valid, .addr, .wdata_valid, .wdata,
    .hrdata_f(hrdata_f_r), .phase(phase_r), .mem_addr_valid(r_av), .mem_addr(r_addr),
    .mem_wdata_valid(r_dv), .mem_wdata(r_wdata), .mem_rdata, .locked(r_locked));

  assign req = want & ~gnt;

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic cmd_t new_cmd();
    cmd_t c;
    c.addr   = MADDR_W'($urandom) & ~MADDR_W'(3);
    c.wdata  = $urandom;
    c.prio   = PRIO_W'($urandom);
    c.len_m1 = LEN_W'($urandom % 4);
    c.mode   = mode_e'($urandom % 3);
    c.last   = ($urandom % 3) == 0;
    return c;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // requester models
  always @(posedge clk) begin
    if (!rst_n) begin
      want <= '0; addr_valid <= '0; wdata_valid <= '0;
      for (int i = 0; i < N; i++) cnt_data[i] = 0;
    end else begin
      for (int i = 0; i < N; i++) begin
        addr_valid[i]  <= gnt[i];
        wdata_valid[i] <= (cnt_data[i] == 1);
        if (cnt_data[i] > 0) cnt_data[i]--;
        if (gnt[i]) begin
          want[i] <= 1'b0;
          cnt_data[i] = 4;
          served++;
        end else if (!want[i] && cnt_data[i] == 0 && !addr_valid[i] && ($urandom % 4) == 0 &&
                     (issued < 4000 || !req_cmd[i].last)) begin
          cmd_t c;
          c = new_cmd();
          if (issued >= 4000) c.last = 1'b1;   // close open transactions at the end
          req_cmd[i] <= c;
          want[i]    <= 1'b1;
          issued++;
        end
        if (want[i] && !gnt[i] && !dut.ok[i]) phase_waits++;
      end
      if (locked) holds++;
      if (gnt != 0 && prev_gnt) back_to_back++;
      prev_gnt = (gnt != 0);
    end
  end

  always_comb
    for (int i = 0; i < N; i++) begin
      addr[i]  = addr_valid[i]  ? req_cmd[i].addr  : '1;
      wdata[i] = wdata_valid[i] ? req_cmd[i].wdata : '1;
    end

  // bus checks
  always @(negedge clk) if (rst_n) begin
    mem_rdata = $urandom;
    #0.1;
    check($onehot0(gnt) && gnt == gnt_r, "one grant, same on both ports");
    check(mem_addr_valid == (addr_valid != 0), "address valid follows the granted requester");
    if (mem_addr_valid) begin
      int k;
      k = 0;
      for (int i = 0; i < N; i++) if (addr_valid[i]) k = i;
      check(mem_addr == req_cmd[k].addr, "address multiplexer");
      check(bank_of(mem_addr) == phase, "address in the bank of the current slot");
    end
    check(mem_wdata_valid == (wdata_valid != 0), "write data valid four cycles after address");
    if (mem_wdata_valid) begin
      int k;
      k = 0;
      for (int i = 0; i < N; i++) if (wdata_valid[i]) k = i;
      check(mem_wdata == req_cmd[k].wdata, "write data multiplexer");
    end
    check(r_av == mem_addr_valid && r_addr == mem_addr && !r_dv, "read port address");
    check(hrdata_f_r == mem_rdata, "read data returned");
  end

  initial begin
    policy = POL_FIXED; want = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int p = 0; p < 3; p++) begin
      policy = policy_e'(p);
      repeat (4000) @(posedge clk);
    end
    wait (issued >= 4000 && want == 0 && !locked);
    repeat (10) @(posedge clk);
    check(served == issued, "every request served");
    check(phase_waits > 0, "phase waits happened");
    check(holds > 0, "slave holds happened");
    check(back_to_back > 0, "grants in consecutive cycles (one transfer per cycle)");
    $display("issued=%0d served=%0d phase_waits=%0d holds=%0d back_to_back=%0d", issued, served, phase_waits, holds, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
