// Synchronization register between the slow AHB clock and the fast fabric
// clock, one per master FSM.
//
// The slave FSM (slow clock) loads a command into the register and flips a
// request toggle. The fast side passes the toggle through two flip-flops and
// turns each change into a one-cycle `start` pulse for its master FSM; the
// command register is stable by then and is read directly. When the master FSM
// finishes (`done_f`) the fast side flips an acknowledge toggle, which comes
// back through two slow flip-flops as a one-cycle `done_s` pulse. Read data
// from the fast side is captured into the slow domain one slow cycle after the
// acknowledge was first sampled, so `rdata_s` is valid while `done_s` is high.
// `busy_s` is high from the load until `done_s`; the register may be loaded
// again in the cycle `done_s` is high.
//
// The design gives the register its job (telling a master FSM when to start);
// the toggle handshake and the two-flip-flop synchronizers are this
// implementation's. Clocks may be unrelated.
module sync_register
  import aaa_pkg::*;
(
  input  logic          clk_s,
  input  logic          rst_s_n,
  input  logic          clk_f,
  input  logic          rst_f_n,
  // slow side
  input  logic          load_s,
  input  cmd_t          cmd_s,
  output logic          busy_s,
  output logic          done_s,
  output logic [DW-1:0] rdata_s,
  // fast side
  output cmd_t          cmd_f,
  output logic          start_f,
  input  logic          done_f,
  input  logic [DW-1:0] rdata_f
);
  logic       req_tgl_s, ack_meta_s, ack_sync_s, ack_seen_s;
  logic       req_meta_f, req_sync_f, req_seen_f, ack_tgl_f;
  cmd_t       cmd_q;

  // slow side: command register and request toggle
  always_ff @(posedge clk_s or negedge rst_s_n) begin
    if (!rst_s_n) begin
      cmd_q      <= '0;
      req_tgl_s  <= 1'b0;
      ack_meta_s <= 1'b0;
      ack_sync_s <= 1'b0;
      ack_seen_s <= 1'b0;
      rdata_s    <= '0;
    end else begin
      if (load_s) begin
        cmd_q     <= cmd_s;
        req_tgl_s <= ~req_tgl_s;
      end
      ack_meta_s <= ack_tgl_f;
      ack_sync_s <= ack_meta_s;
      ack_seen_s <= ack_sync_s;
      if (ack_meta_s != ack_sync_s) rdata_s <= rdata_f;
    end
  end

  assign done_s = (ack_sync_s != ack_seen_s);
  assign busy_s = (req_tgl_s != ack_sync_s);
  assign cmd_f  = cmd_q;

  // fast side: request synchronizer and acknowledge toggle
  always_ff @(posedge clk_f or negedge rst_f_n) begin
    if (!rst_f_n) begin
      req_meta_f <= 1'b0;
      req_sync_f <= 1'b0;
      req_seen_f <= 1'b0;
      ack_tgl_f  <= 1'b0;
    end else begin
      req_meta_f <= req_tgl_s;
      req_sync_f <= req_meta_f;
      req_seen_f <= req_sync_f;
      if (done_f) ack_tgl_f <= ~ack_tgl_f;
    end
  end

  assign start_f = (req_sync_f != req_seen_f);

endmodule
