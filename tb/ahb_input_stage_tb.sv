// Self-checking testbench of ahb_input_stage: random address phases and random
// bridge responses. The decoder outputs are checked every cycle; the response
// returned to the master must come from the bridge selected by the address
// phase accepted last (kept by the testbench's own record), and must be ready
// with OKAY when no data phase is open.
module ahb_input_stage_tb;
  import aaa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] htrans;
  logic hwrite, hsel_w, hsel_r, hready;
  logic hreadyout_w, hresp_w, hreadyout_r, hresp_r, hresp;
  logic [DW-1:0] hrdata_w, hrdata_r, hrdata;
  int checks = 0, failures = 0;
  int owner = 0;   // 0 none, 1 write bridge, 2 read bridge
  int seen[3];

  ahb_input_stage dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    htrans = 0; hwrite = 0; hreadyout_w = 1; hreadyout_r = 1; hresp_w = 0; hresp_r = 0;
    hrdata_w = 0; hrdata_r = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      htrans = 2'($urandom); hwrite = 1'($urandom);
      hreadyout_w = ($urandom % 3) != 0; hreadyout_r = ($urandom % 3) != 0;
      hresp_w = 1'($urandom); hresp_r = 1'($urandom);
      hrdata_w = $urandom; hrdata_r = $urandom;
      #1;
      check(hsel_w == (htrans[1] && hwrite) && hsel_r == (htrans[1] && !hwrite), "decoder");
      case (owner)
        1: check(hready == hreadyout_w && hrdata == hrdata_w && hresp == hresp_w, "write bridge response");
        2: check(hready == hreadyout_r && hrdata == hrdata_r && hresp == hresp_r, "read bridge response");
        default: check(hready && !hresp, "no data phase");
      endcase
      seen[owner]++;
      @(posedge clk);
      if (hready) owner = !htrans[1] ? 0 : (hwrite ? 1 : 2);
      #1;
    end
    for (int i = 0; i < 3; i++) check(seen[i] > 0, "each owner seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
