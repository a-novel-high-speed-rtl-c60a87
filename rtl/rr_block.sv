// Round-robin arbitration block (the "RR block" of the automatically actuated
// arbiter).
//
// Combinationally picks, among the asserted requests, the first one found when
// searching upward (with wrap-around) from the requester after the last one
// served. The last-served pointer is a register that moves to the winner when
// `advance` is high, i.e. when the controller actually uses this block's choice.
// The design names the block and its job; the search order and the pointer
// update rule are this implementation's.
//
// Timing: gnt_id/gnt_valid are combinational from req and the pointer; the
// pointer updates on the rising clock edge.
module rr_block #(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,   // winner was granted this cycle
  output logic [$clog2(N)-1:0] gnt_id,
  output logic                 gnt_valid
);
  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] last_q;

  always_comb begin
    gnt_id    = '0;
    gnt_valid = 1'b0;
    // search last+1, last+2, ..., last+N (mod N)
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (int'(last_q) + k) % N;
      if (!gnt_valid && req[idx]) begin
        gnt_id    = IW'(idx);
        gnt_valid = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      last_q <= IW'(N - 1);   // requester 0 first
    else if (advance && gnt_valid)   last_q <= gnt_id;
  end

endmodule
