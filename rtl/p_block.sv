// Priority arbitration block (the "P block" of the automatically actuated
// arbiter).
//
// Combinationally picks the asserted request with the largest priority level;
// among equal levels the lowest index wins. Fed with the priority levels the
// masters supply it performs dynamic priority; fed with equal levels it
// performs fixed priority (requester 0 highest). The design names the block and
// its job; the tie rule and the fixed order are this implementation's.
//
// Timing: purely combinational.
module p_block #(
  parameter int unsigned N      = 4,
  parameter int unsigned PRIO_W = 4
) (
  input  logic [N-1:0]             req,
  input  logic [N-1:0][PRIO_W-1:0] prio,
  output logic [$clog2(N)-1:0]     gnt_id,
  output logic                     gnt_valid
);
  localparam int unsigned IW = $clog2(N);

  logic [PRIO_W-1:0] best;

  always_comb begin
    gnt_id    = '0;
    gnt_valid = 1'b0;
    best      = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (req[i] && (!gnt_valid || prio[i] > best)) begin
        gnt_id    = IW'(i);
        gnt_valid = 1'b1;
        best      = prio[i];
      end
    end
  end

endmodule
