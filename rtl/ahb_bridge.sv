// Bridge from a slow AHB master (32-64 MHz class) to the fast fabric.
//
// Two kinds exist in the matrix, a write bridge and a read bridge; this module
// is both, chosen with IS_WRITE. Inside, as in the design: a slave FSM on the
// slow AHB, two synchronization registers, and two master FSMs (A and B) on the
// fast fabric that are triggered alternately so both AHB pipeline stages can be
// in flight. The internal arbitration between A and B is a turn pointer: the
// FSM whose turn it is presents its request (with its priority level, desired
// transfer length, mode, last flag and target address) to the slave-side
// arbiter; the grant is routed to it and the turn passes to the other FSM.
// Because the slave FSM loads A and B strictly in turn, this serves them in
// the order they were started. The turn pointer is this implementation's way
// of resolving the A/B conflict the design mentions.
//
// `pending` (slow clock) is high while a transfer handed to a master FSM has
// not completed, and in a write bridge also while a write data phase is open;
// `hold` stops a read bridge from starting a read (see
// slave_fsm).
//
// Fast-side timing: `req` is high while the FSM in turn waits; `gnt` (from the
// arbiter's registered master number) arrives one cycle after the request is
// seen and the request is masked during that cycle. The granted FSM drives the
// address one cycle later (`addr_valid`) and, four cycles after that, the write
// data (`wdata_valid`) or takes the read data from `hrdata_f`.
module ahb_bridge
  import aaa_pkg::*;
#(
  parameter bit IS_WRITE = 1'b1
) (
  input  logic          clk_s,
  input  logic          rst_s_n,
  input  logic          clk_f,
  input  logic          rst_f_n,
  // slow AHB slave
  input  logic          hsel,
  input  logic [AW-1:0] haddr,
  input  logic [1:0]    htrans,
  input  logic          hwrite,
  input  logic [2:0]    hburst,
  input  logic [DW-1:0] hwdata,
  input  logic          hready,
  input  logic          hold,         // read bridge: wait before starting a read
  output logic          pending,      // transfers handed to the fast side not yet done
  output logic          hreadyout,
  output logic [DW-1:0] hrdata,
  output logic          hresp,
  // fast fabric master
  output logic          req,
  output cmd_t          req_cmd,
  input  logic          gnt,
  output logic          addr_valid,
  output logic [MADDR_W-1:0] addr,
  output logic          wdata_valid,
  output logic [DW-1:0] wdata,
  input  logic [DW-1:0] hrdata_f
);
  logic [1:0]          load, busy_s, done_s;
  cmd_t                cmd_s;
  logic [1:0][DW-1:0]  rdata_s;
  cmd_t [1:0]          cmd_f;
  logic [1:0]          start_f, fsm_req, fsm_gnt, fsm_addr, fsm_data, fsm_done;
  logic [1:0][DW-1:0]  fsm_rdata;
  logic                turn_q;

  slave_fsm #(.IS_WRITE(IS_WRITE)) u_slave (
    .clk(clk_s), .rst_n(rst_s_n),
    .hsel, .haddr, .htrans, .hwrite, .hburst, .hwdata, .hready, .hold,
    .hreadyout, .hrdata, .hresp,
    .load, .cmd(cmd_s), .busy(busy_s), .done(done_s), .rdata(rdata_s), .pending
  );

  for (genvar i = 0; i < 2; i++) begin : g_path
    sync_register u_sync (
      .clk_s, .rst_s_n, .clk_f, .rst_f_n,
      .load_s(load[i]), .cmd_s(cmd_s), .busy_s(busy_s[i]), .done_s(done_s[i]),
      .rdata_s(rdata_s[i]),
      .cmd_f(cmd_f[i]), .start_f(start_f[i]), .done_f(fsm_done[i]),
      .rdata_f(fsm_rdata[i])
    );

    master_fsm u_master (
      .clk(clk_f), .rst_n(rst_f_n),
      .start(start_f[i]), .grant(fsm_gnt[i]), .hrdata(hrdata_f),
      .req(fsm_req[i]), .addr_phase(fsm_addr[i]), .data_phase(fsm_data[i]),
      .done(fsm_done[i]), .busy(), .rdata(fsm_rdata[i])
    );

    assign fsm_gnt[i] = gnt && (turn_q == 1'(i));
  end

  // internal A/B arbitration: turn pointer
  always_ff @(posedge clk_f or negedge rst_f_n) begin
    if (!rst_f_n)  turn_q <= 1'b0;
    else if (gnt)  turn_q <= ~turn_q;
  end

  assign req     = fsm_req[turn_q] && !gnt;
  assign req_cmd = cmd_f[turn_q];

  // fast bus outputs of the FSM in address / data phase
  assign addr_valid  = |fsm_addr;
  assign addr        = fsm_addr[1] ? cmd_f[1].addr : cmd_f[0].addr;
  assign wdata_valid = IS_WRITE && (|fsm_data);
  assign wdata       = fsm_data[1] ? cmd_f[1].wdata : cmd_f[0].wdata;

endmodule
