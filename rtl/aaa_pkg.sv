// Shared types and constants of the phase-aware AHB bus matrix.
//
// The fast fabric carries one command per master FSM. A command is built from
// the slow AHB address phase: besides the memory address, the upper bits of the
// 32-bit HADDR carry the master's arbitration wishes (priority level, desired
// transfer length and data multiplexing mode). That masters inform the arbiters
// through the address bus follows the design; the bit positions below are this
// implementation's choice.
//
//   HADDR[31:28]  priority level (dynamic priority, larger wins)
//   HADDR[27:24]  desired transfer length minus one (1..16 transfers)
//   HADDR[23:22]  multiplexing mode (mode_e)
//   HADDR[21:0]   byte address inside the shared memory
package aaa_pkg;

  localparam int unsigned AW       = 32;   // AHB address width
  localparam int unsigned DW       = 32;   // AHB data width
  localparam int unsigned PRIO_W   = 4;
  localparam int unsigned LEN_W    = 4;
  localparam int unsigned PHASES   = 4;    // memory banks, 90 degrees apart
  localparam int unsigned PHASE_W  = 2;
  localparam int unsigned MADDR_W  = 22;   // byte address field of HADDR

  // Arbitration policy: the three priority policies.
  typedef enum logic [1:0] {
    POL_FIXED   = 2'd0,
    POL_RR      = 2'd1,
    POL_DYNAMIC = 2'd2
  } policy_e;

  // Data multiplexing mode: how long a granted master keeps the slave.
  typedef enum logic [1:0] {
    MODE_TRANSFER    = 2'd0,
    MODE_TRANSACTION = 2'd1,
    MODE_DTL         = 2'd2   // desired transfer length
  } mode_e;

  // AHB HTRANS encodings
  localparam logic [1:0] HTRANS_IDLE   = 2'b00;
  localparam logic [1:0] HTRANS_BUSY   = 2'b01;
  localparam logic [1:0] HTRANS_NONSEQ = 2'b10;
  localparam logic [1:0] HTRANS_SEQ    = 2'b11;

  // One transfer handed from the slow side to a master FSM.
  typedef struct packed {
    logic [MADDR_W-1:0] addr;   // byte address in the shared memory
    logic [DW-1:0]      wdata;
    logic [PRIO_W-1:0]  prio;
    logic [LEN_W-1:0]   len_m1; // desired transfer length - 1
    mode_e              mode;
    logic               last;   // last transfer of the master's transaction
  } cmd_t;

  // Memory bank (phase) that a byte address lives in: word interleaving.
  function automatic logic [PHASE_W-1:0] bank_of(input logic [MADDR_W-1:0] a);
    return a[PHASE_W+1:2];
  endfunction

  // Number of beats of an AHB burst (HBURST); SINGLE and INCR count as one.
  function automatic logic [4:0] burst_beats(input logic [2:0] hburst);
    case (hburst)
      3'd2, 3'd3: return 5'd4;    // WRAP4, INCR4
      3'd4, 3'd5: return 5'd8;    // WRAP8, INCR8
      3'd6, 3'd7: return 5'd16;   // WRAP16, INCR16
      default:    return 5'd1;    // SINGLE, INCR
    endcase
  endfunction

endpackage
