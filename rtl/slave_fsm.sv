// Slave FSM of a bridge: the slow AHB slave side.
//
// It watches the slow AHB, accepts address phases (HSEL, HTRANS NONSEQ/SEQ,
// HREADY) and hands every transfer to one of the two master FSMs through their
// synchronization registers, strictly alternating A, B, A, ... so the two AHB
// pipeline stages can be in flight at once. That much follows the design.
// This implementation's choices:
//   * write bridge (IS_WRITE=1): writes are posted. The data phase completes
//     with zero wait states as soon as the chosen synchronization register is
//     free; HWDATA is loaded into it together with the address.
//   * read bridge (IS_WRITE=0): the data phase is held (HREADYOUT low) until
//     the master FSM has fetched the word and the completion has come back.
//     When the chosen register is free and `hold` is low, the read is loaded
//     straight from the address phase, a slow cycle earlier than a write.
//   * a read is not started while `hold` is high; the matrix ties it to the
//     same master's write bridge having writes in flight (`pending`: a write
//     data phase still open or a handed-over write not yet done), so a read
//     never overtakes an earlier write of its master.
//   * the command also carries the master's priority level, desired transfer
//     length and multiplexing mode from HADDR[31:22], and a `last` flag marking
//     the final beat of a fixed-length burst (SINGLE and INCR beats are each
//     their own transaction). Mode code 3 is read as transfer mode.
// Only word transfers are modelled; HSIZE and HPROT are not used and HRESP is
// always OKAY.
module slave_fsm
  import aaa_pkg::*;
#(
  parameter bit IS_WRITE = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  // slow AHB slave
  input  logic          hsel,
  input  logic [AW-1:0] haddr,
  input  logic [1:0]    htrans,
  input  logic          hwrite,
  input  logic [2:0]    hburst,
  input  logic [DW-1:0] hwdata,
  input  logic          hready,
  input  logic          hold,        // read bridge: do not start a read yet
  output logic          hreadyout,
  output logic [DW-1:0] hrdata,
  output logic          hresp,
  // synchronization registers A (0) and B (1)
  output logic [1:0]    load,
  output cmd_t          cmd,
  input  logic [1:0]    busy,
  input  logic [1:0]    done,
  input  logic [1:0][DW-1:0] rdata,
  output logic          pending      // a handed-over transfer is still running
);
  logic          accept;
  logic          nxt_q;              // slot for the next transfer
  logic          dp_valid_q, dp_slot_q, dp_trig_q;
  cmd_t          dp_cmd_q;
  logic [4:0]    rem_q;              // beats left in the current burst
  logic          last_c;
  logic [4:0]    rem_c;
  cmd_t          cmd_c;              // command of the address phase
  logic          early;              // read loaded from the address phase

  assign accept = hsel && htrans[1] && hready && (hwrite == IS_WRITE);

  // burst beat bookkeeping for the `last` flag
  always_comb begin
    if (htrans == HTRANS_NONSEQ) rem_c = burst_beats(hburst) - 5'd1;
    else                         rem_c = (rem_q == 0) ? 5'd0 : rem_q - 5'd1;
    last_c = (rem_c == 0);
    cmd_c        = '0;
    cmd_c.addr   = haddr[MADDR_W-1:0];
    cmd_c.prio   = haddr[31:28];
    cmd_c.len_m1 = haddr[27:24];
    cmd_c.mode   = (haddr[23:22] == 2'd3) ? MODE_TRANSFER : mode_e'(haddr[23:22]);
    cmd_c.last   = last_c;
  end

  // A read bridge only accepts while no data phase waits to be loaded (its
  // HREADYOUT would be low), so the two load paths never meet.
  assign early = !IS_WRITE && accept && !busy[nxt_q] && !hold;

  // data phase
  always_comb begin
    load      = 2'b00;
    hreadyout = 1'b1;
    hrdata    = rdata[dp_slot_q];
    cmd       = dp_cmd_q;
    cmd.wdata = IS_WRITE ? hwdata : '0;
    if (early) begin
      cmd           = cmd_c;
      load[nxt_q]   = 1'b1;
    end
    if (dp_valid_q) begin
      if (IS_WRITE) begin
        hreadyout       = !busy[dp_slot_q];
        load[dp_slot_q] = !busy[dp_slot_q];
      end else if (!dp_trig_q) begin
        hreadyout       = 1'b0;
        load[dp_slot_q] = !busy[dp_slot_q] && !hold;
      end else begin
        hreadyout       = done[dp_slot_q];
      end
    end
  end

  assign hresp   = 1'b0;
  assign pending = (|busy) || (IS_WRITE && dp_valid_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nxt_q      <= 1'b0;
      dp_valid_q <= 1'b0;
      dp_slot_q  <= 1'b0;
      dp_trig_q  <= 1'b0;
      dp_cmd_q   <= '0;
      rem_q      <= '0;
    end else if (hready) begin
      dp_valid_q <= accept;
      dp_trig_q  <= early;
      if (accept) begin
        dp_slot_q <= nxt_q;
        nxt_q     <= ~nxt_q;
        rem_q     <= rem_c;
        dp_cmd_q  <= cmd_c;
      end
    end else if (dp_valid_q && (load != 2'b00)) begin
      dp_trig_q <= 1'b1;
    end
  end

endmodule
