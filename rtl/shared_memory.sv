// Shared memory of the matrix with its write slave and read slave ports.
//
// PHASES synchronous banks (phase_bank) are word-interleaved: bank = byte
// address bits [3:2], row = the bits above. The fabric's phase counter says
// which bank has its slot in the current fast cycle; the phase acquainted
// arbiters make sure that an address driven in that cycle targets that bank.
// With four banks each running at a quarter of the fabric rate, the write
// slave and the read slave each accept one transfer per fast cycle, two
// transfers per fast cycle in all. Interleaving on the word address is this
// implementation's choice; the design only states that the bank needed by the
// target address decides the grant. The memory size is not given and is a
// parameter.
//
// Timing: write address at slot t, write data at t+PHASES; read address at
// slot t, read data on r_data during t+PHASES.
module shared_memory
  import aaa_pkg::*;
#(
  parameter int unsigned WORDS = 4096           // 32-bit words in total
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PHASE_W-1:0] phase,
  // write slave
  input  logic               w_addr_valid,
  input  logic [MADDR_W-1:0] w_addr,
  input  logic               w_data_valid,
  input  logic [DW-1:0]      w_data,
  // read slave
  input  logic               r_addr_valid,
  input  logic [MADDR_W-1:0] r_addr,
  output logic [DW-1:0]      r_data
);
  localparam int unsigned BANK_WORDS = WORDS / PHASES;
  localparam int unsigned ROW_W      = $clog2(BANK_WORDS);

  logic [PHASES-1:0][DW-1:0] bank_rdata;

  for (genvar b = 0; b < PHASES; b++) begin : g_bank
    phase_bank #(.WORDS(BANK_WORDS)) u_bank (
      .clk, .rst_n,
      .slot         (phase == PHASE_W'(b)),
      .w_addr_valid (w_addr_valid && bank_of(w_addr) == PHASE_W'(b)),
      .w_row        (w_addr[ROW_W+PHASE_W+1:PHASE_W+2]),
      .w_data_valid (w_data_valid),
      .w_data       (w_data),
      .r_addr_valid (r_addr_valid && bank_of(r_addr) == PHASE_W'(b)),
      .r_row        (r_addr[ROW_W+PHASE_W+1:PHASE_W+2]),
      .r_data       (bank_rdata[b])
    );
  end

  // HDATAR: the word of the bank whose slot it is
  assign r_data = bank_rdata[phase];

endmodule
