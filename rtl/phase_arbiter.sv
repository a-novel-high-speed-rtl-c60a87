// Phase acquainted arbiter.
//
// The shared memory is made of PHASES synchronous banks whose clocks are
// spread evenly over one bank period (four banks, 90 degrees apart), so the
// fabric can start one access per fast cycle as long as consecutive accesses go
// to consecutive banks. Here the bank clocks are represented by a free-running
// phase counter in the fast clock domain: bank b takes a command in the fast
// cycles where `phase == b`.
//
// A request seen in cycle c gets its grant registered at the end of c and
// drives its address two cycles later (master FSM REQ -> ADDR), so the arbiter
// admits (`ok`) only requests whose target bank equals phase + LOOKAHEAD. That
// granting by the memory phase a target address needs is the design's idea;
// the counter and the look-ahead are this implementation's.
//
// Timing: `ok` is combinational from `bank` and the registered phase counter.
module phase_arbiter
  import aaa_pkg::*;
#(
  parameter int unsigned N         = 4,
  parameter int unsigned LOOKAHEAD = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N-1:0][PHASE_W-1:0] bank,    // target bank of each request
  output logic [N-1:0]              ok,
  output logic [PHASE_W-1:0]        phase    // bank whose slot is this cycle
);
  logic [PHASE_W-1:0] target;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= '0;
    else        phase <= phase + 1'b1;
  end

  assign target = phase + PHASE_W'(LOOKAHEAD);

  always_comb
    for (int unsigned i = 0; i < N; i++)
      ok[i] = (bank[i] == target);

endmodule
