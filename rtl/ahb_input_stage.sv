// Input stage of the bus matrix for one slow AHB master.
//
// Each master input has a D flip-flop and a decoder. The decoder looks at the
// current address phase and selects the write bridge (HWRITE=1) or the read
// bridge (HWRITE=0); the D flip-flop keeps that choice for the data phase that
// follows, so HREADY, HRDATA and HRESP can be returned from the bridge that
// owns the data phase. The arrangement (flip-flop then decoder per input)
// follows the design; decoding on HWRITE is this implementation's reading of
// how a master reaches its two bridges.
//
// Timing: selects are combinational; the owner flip-flop updates when HREADY
// is high (end of a data phase). Idle transfers select no bridge.
module ahb_input_stage
  import aaa_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // from the master
  input  logic [1:0]    htrans,
  input  logic          hwrite,
  // to the bridges
  output logic          hsel_w,
  output logic          hsel_r,
  output logic          hready,      // shared HREADY of this AHB layer
  // responses of the bridges
  input  logic          hreadyout_w,
  input  logic [DW-1:0] hrdata_w,
  input  logic          hresp_w,
  input  logic          hreadyout_r,
  input  logic [DW-1:0] hrdata_r,
  input  logic          hresp_r,
  // to the master
  output logic [DW-1:0] hrdata,
  output logic          hresp
);
  typedef enum logic [1:0] { OWN_NONE, OWN_W, OWN_R } owner_e;
  owner_e own_q;

  // decoder
  assign hsel_w = htrans[1] &&  hwrite;
  assign hsel_r = htrans[1] && !hwrite;

  // D flip-flop: owner of the data phase
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      own_q <= OWN_NONE;
    else if (hready) own_q <= hsel_w ? OWN_W : (hsel_r ? OWN_R : OWN_NONE);
  end

  // output multiplexer
  always_comb begin
    unique case (own_q)
      OWN_W:   begin hready = hreadyout_w; hrdata = hrdata_w; hresp = hresp_w; end
      OWN_R:   begin hready = hreadyout_r; hrdata = hrdata_r; hresp = hresp_r; end
      default: begin hready = 1'b1;        hrdata = '0;       hresp = 1'b0;    end
    endcase
  end

endmodule
