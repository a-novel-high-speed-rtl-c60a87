// Master FSM of a bridge: issues one transfer on the fast AHB fabric.
//
// Seven states, one-hot encoded as the design asks for speed:
//   IDLE  - wait for activation from the synchronization register
//   REQ   - request the fabric, wait for the grant (HGRANTF)
//   ADDR  - address phase: the fabric multiplexer takes this FSM's address
//   WAIT1, WAIT2, WAIT3 - three wait states covering the memory pipeline
//   DATA  - data phase: write data is taken / read data is captured
// then back to IDLE. The state order and the three wait states follow the
// design's FSM; the one-cycle-per-state timing and the signal names are this
// implementation's.
//
// Interface: `start` is a one-cycle activation pulse; `grant` is the fabric
// grant routed to this FSM; `req` is high in REQ and must be dropped by the
// fabric side once the grant is seen; `done` is high for the DATA cycle and
// `rdata` holds the word captured in DATA until the next DATA.
module master_fsm
  import aaa_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          grant,
  input  logic [DW-1:0] hrdata,
  output logic          req,
  output logic          addr_phase,
  output logic          data_phase,
  output logic          done,
  output logic          busy,
  output logic [DW-1:0] rdata
);
  typedef enum logic [6:0] {
    S_IDLE  = 7'b0000001,
    S_REQ   = 7'b0000010,
    S_ADDR  = 7'b0000100,
    S_WAIT1 = 7'b0001000,
    S_WAIT2 = 7'b0010000,
    S_WAIT3 = 7'b0100000,
    S_DATA  = 7'b1000000
  } state_e;

  state_e state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_IDLE:  if (start) state_d = S_REQ;
      S_REQ:   if (grant) state_d = S_ADDR;
      S_ADDR:  state_d = S_WAIT1;
      S_WAIT1: state_d = S_WAIT2;
      S_WAIT2: state_d = S_WAIT3;
      S_WAIT3: state_d = S_DATA;
      S_DATA:  state_d = S_IDLE;
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= S_IDLE;
    else        state_q <= state_d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 rdata <= '0;
    else if (state_q == S_DATA) rdata <= hrdata;
  end

  assign req        = (state_q == S_REQ);
  assign addr_phase = (state_q == S_ADDR);
  assign data_phase = (state_q == S_DATA);
  assign done       = data_phase;
  assign busy       = (state_q != S_IDLE);

endmodule
