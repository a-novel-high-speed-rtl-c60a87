// One slave side of the bus matrix: the write side (IS_WRITE=1, buses HADDRW
// and HDATAW) or the read side (IS_WRITE=0, buses HADDRR and HDATAR) of the
// shared memory.
//
// It holds the slave-side arbitration for that side: the phase acquainted
// arbiter, which admits only requests whose target bank will be at its slot
// when the address is driven, and the automatically actuated arbiter, which
// picks one of them under the current scheme. The registered master number
// then steers the address multiplexer in the following cycle (the master FSM's
// ADDR state) and, four cycles later (its DATA state), the write data
// multiplexer. On the read side the word coming back from the memory is
// broadcast to all bridges; only the FSM in its DATA state takes it. Which
// arbiters and multiplexers exist follows the design's matrix; the pipeline
// alignment is this implementation's.
//
// Timing: gnt[i] is high for one cycle, one cycle after the request was seen.
// mem_addr_valid/mem_addr two cycles after it, mem_wdata_valid/mem_wdata six.
module matrix_slave_port
  import aaa_pkg::*;
#(
  parameter int unsigned N        = 4,
  parameter bit          IS_WRITE = 1'b1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  policy_e                     policy,
  // from the bridges
  input  logic [N-1:0]                req,
  input  cmd_t [N-1:0]                req_cmd,
  output logic [N-1:0]                gnt,
  input  logic [N-1:0]                addr_valid,
  input  logic [N-1:0][MADDR_W-1:0]   addr,
  input  logic [N-1:0]                wdata_valid,
  input  logic [N-1:0][DW-1:0]        wdata,
  output logic [DW-1:0]               hrdata_f,
  // to the shared memory slave
  output logic [PHASE_W-1:0]          phase,
  output logic                        mem_addr_valid,
  output logic [MADDR_W-1:0]          mem_addr,
  output logic                        mem_wdata_valid,
  output logic [DW-1:0]               mem_wdata,
  input  logic [DW-1:0]               mem_rdata,
  // observation
  output logic                        locked
);
  localparam int unsigned IW    = $clog2(N);
  localparam int unsigned DLAT  = 4;     // ADDR -> DATA distance

  logic [N-1:0][PHASE_W-1:0] bank;
  logic [N-1:0]              ok;
  logic [N-1:0][PRIO_W-1:0]  prio;
  logic [N-1:0][LEN_W-1:0]   len_m1;
  mode_e [N-1:0]             mode;
  logic [N-1:0]              last;
  logic [IW-1:0]             master_num;
  logic                      no_port;

  always_comb
    for (int unsigned i = 0; i < N; i++) begin
      bank[i]   = bank_of(req_cmd[i].addr);
      prio[i]   = req_cmd[i].prio;
      len_m1[i] = req_cmd[i].len_m1;
      mode[i]   = req_cmd[i].mode;
      last[i]   = req_cmd[i].last;
    end

  phase_arbiter #(.N(N), .LOOKAHEAD(2)) u_paa (
    .clk, .rst_n, .bank, .ok, .phase
  );

  aaa_arbiter #(.N(N)) u_aaa (
    .clk, .rst_n, .policy, .req, .ok, .prio, .len_m1, .mode, .last,
    .master_num, .no_port, .locked
  );

  always_comb
    for (int unsigned i = 0; i < N; i++)
      gnt[i] = !no_port && (master_num == IW'(i));

  // select pipeline: stage 0 = ADDR cycle, stage DLAT = DATA cycle
  logic [DLAT:0][IW-1:0] sel_q;
  logic [DLAT:0]         act_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q <= '0;
      act_q <= '0;
    end else begin
      sel_q <= {sel_q[DLAT-1:0], master_num};
      act_q <= {act_q[DLAT-1:0], !no_port};
    end
  end

  // address multiplexer (HADDRW / HADDRR); no-port drives it inactive
  assign mem_addr_valid = act_q[0] && addr_valid[sel_q[0]];
  assign mem_addr       = act_q[0] ? addr[sel_q[0]] : '0;

  // write data multiplexer (HDATAW)
  assign mem_wdata_valid = IS_WRITE && act_q[DLAT] && wdata_valid[sel_q[DLAT]];
  assign mem_wdata       = (IS_WRITE && act_q[DLAT]) ? wdata[sel_q[DLAT]] : '0;

  // read data (HDATAR) to all bridges
  assign hrdata_f = IS_WRITE ? '0 : mem_rdata;

  // the granted bridge must be in its address phase, at its bank's slot
  a_addr_phase: assert property (@(posedge clk) disable iff (!rst_n)
    act_q[0] |-> (addr_valid[sel_q[0]] && bank_of(addr[sel_q[0]]) == phase));
  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule
