// Automatically actuated arbiter (self-motivated arbiter) of one shared slave.
//
// Nine arbitration schemes: three priority policies (fixed, round robin,
// dynamic) times three data multiplexing modes (transfer, transaction, desired
// transfer length). As in the design, it is built from an RR block, a P block,
// a scheme multiplexer (RR or P result), a length multiplexer (desired transfer
// length of the selected master), a transfer counter, a controller, and two
// output flip-flops (master number and no-port) that cut the critical path.
//
// The policy is a run-time input of the slave port. The multiplexing mode,
// priority level and desired transfer length arrive with every request, since
// the masters send them on their address bus. The controller behaves as
// follows (this implementation's reading of the three modes):
//   transfer     - a new arbitration for every transfer;
//   transaction  - the winner keeps the slave until it is granted the transfer
//                  flagged `last` (end of its AHB burst);
//   desired len  - the winner keeps the slave for len_m1+1 transfers, or until
//                  its transaction ends, whichever comes first.
// While the slave is kept, other masters are not served even if the owner is
// not requesting in that cycle.
//
// `ok` comes from the phase acquainted arbiter: a request only counts in a
// cycle where its target memory bank is at the right phase.
//
// Timing: a request seen in cycle c produces master number / no-port in c+1
// (registered). A requester must drop its request once granted.
module aaa_arbiter
  import aaa_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  policy_e                policy,
  input  logic [N-1:0]           req,
  input  logic [N-1:0]           ok,       // phase match from the phase arbiter
  input  logic [N-1:0][PRIO_W-1:0] prio,
  input  logic [N-1:0][LEN_W-1:0]  len_m1,
  input  mode_e [N-1:0]          mode,
  input  logic [N-1:0]           last,
  output logic [$clog2(N)-1:0]   master_num,  // registered
  output logic                   no_port,     // registered: nobody selected
  output logic                   locked       // slave kept by master_num's owner
);
  localparam int unsigned IW = $clog2(N);

  logic [N-1:0]             elig;
  logic [N-1:0][PRIO_W-1:0] p_in;
  logic [IW-1:0]            rr_id, p_id, sch_id, sel_id;
  logic                     rr_v, p_v, sch_v, sel_v;
  logic                     rr_adv;

  // controller state
  logic          locked_q;
  logic [IW-1:0] owner_q;
  mode_e         lmode_q;
  logic [LEN_W:0] cnt_q;      // transfers granted in the current hold

  assign elig = req & ok;

  // fixed priority = P block with equal levels (index order)
  always_comb
    for (int unsigned i = 0; i < N; i++)
      p_in[i] = (policy == POL_DYNAMIC) ? prio[i] : '0;

  rr_block #(.N(N)) u_rr (
    .clk, .rst_n, .req(elig), .advance(rr_adv), .gnt_id(rr_id), .gnt_valid(rr_v)
  );

  p_block #(.N(N), .PRIO_W(PRIO_W)) u_p (
    .req(elig), .prio(p_in), .gnt_id(p_id), .gnt_valid(p_v)
  );

  // scheme multiplexer
  assign sch_id = (policy == POL_RR) ? rr_id : p_id;
  assign sch_v  = (policy == POL_RR) ? rr_v  : p_v;

  // controller: a held slave goes to its owner only
  always_comb begin
    if (locked_q) begin
      sel_id = owner_q;
      sel_v  = elig[owner_q];
    end else begin
      sel_id = sch_id;
      sel_v  = sch_v;
    end
  end

  assign rr_adv = sel_v && !locked_q && (policy == POL_RR);

  // length multiplexer and counter
  logic [LEN_W-1:0] len_sel;
  mode_e            g_mode;
  logic [LEN_W:0]   cnt_nxt;
  logic             hold_nxt;

  always_comb begin
    len_sel  = len_m1[sel_id];
    g_mode   = locked_q ? lmode_q : mode[sel_id];
    cnt_nxt  = locked_q ? cnt_q + 1'b1 : (LEN_W+1)'(1);
    hold_nxt = !last[sel_id] &&
               ((g_mode == MODE_TRANSACTION) ||
                (g_mode == MODE_DTL && cnt_nxt <= {1'b0, len_sel}));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked_q   <= 1'b0;
      owner_q    <= '0;
      lmode_q    <= MODE_TRANSFER;
      cnt_q      <= '0;
      master_num <= '0;
      no_port    <= 1'b1;
    end else begin
      master_num <= sel_id;
      no_port    <= !sel_v;
      if (sel_v) begin
        locked_q <= hold_nxt;
        owner_q  <= sel_id;
        lmode_q  <= g_mode;
        cnt_q    <= cnt_nxt;
      end
    end
  end

  assign locked = locked_q;

endmodule
