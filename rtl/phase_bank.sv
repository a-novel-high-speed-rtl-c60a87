// One synchronous memory bank of the shared memory, with a write port and a
// read port, serviced only in the fast cycles of its own phase (slot).
//
// The design uses four synchronous memories, each clocked 90 degrees after the
// previous one; here a bank is clocked by the fast clock with an enable that is
// high one cycle in PHASES, which gives the same slot pattern in one clock
// domain.
//   write port: in a slot it takes the address of a new write; in its next
//               slot (PHASES cycles later, the master FSM's DATA state) it
//               takes the data and writes it;
//   read port:  in a slot it reads the addressed word into its output
//               register, which holds it through the next slot.
// A read and a write to the same word in the same slot return the old word.
module phase_bank
  import aaa_pkg::*;
#(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned ROW_W = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             slot,        // this bank's phase
  input  logic             w_addr_valid,
  input  logic [ROW_W-1:0] w_row,
  input  logic             w_data_valid,
  input  logic [DW-1:0]    w_data,
  input  logic             r_addr_valid,
  input  logic [ROW_W-1:0] r_row,
  output logic [DW-1:0]    r_data
);
  logic [DW-1:0]    mem [WORDS];
  logic             wp_valid_q;
  logic [ROW_W-1:0] wp_row_q;

  // memory array: no reset
  always_ff @(posedge clk) begin
    if (slot && wp_valid_q && w_data_valid) mem[wp_row_q] <= w_data;
    if (slot && r_addr_valid)               r_data <= mem[r_row];
  end

  // pending write address
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_valid_q <= 1'b0;
      wp_row_q   <= '0;
    end else if (slot) begin
      wp_valid_q <= w_addr_valid;
      wp_row_q   <= w_row;
    end
  end

endmodule
