// Self-checking testbench of shared_memory. A phase counter like the fabric's
// drives the slots; every cycle a random write (address in the bank of the
// current slot, data four cycles later) and a random read of the same bank are
// issued. A reference array in the testbench follows the writes; each read
// word, taken four cycles after its address, must match the reference as it
// was when the read was issued. All four banks must see reads and writes.
module shared_memory_tb;
  import aaa_pkg::*;
  localparam int WORDS = 256;
  logic clk = 0, rst_n = 0;
  logic [PHASE_W-1:0] phase;
  logic w_addr_valid, w_data_valid, r_addr_valid;
  logic [MADDR_W-1:0] w_addr, r_addr;
  logic [DW-1:0] w_data, r_data;
  int checks = 0, failures = 0;
  logic [DW-1:0] ref_mem [WORDS];
  bit            ref_init [WORDS];
  int  bank_w[PHASES], bank_r[PHASES];

  // pipelines of issued commands, index 0 = issued this cycle
  bit            wv_p[5], rv_p[5], rchk_p[5];
  int            wa_p[5];
  logic [DW-1:0] wd_p[5], rexp_p[5];

  shared_memory #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    phase = 0; w_addr_valid = 0; w_data_valid = 0; r_addr_valid = 0;
    w_addr = 0; r_addr = 0; w_data = 0;
    for (int i = 0; i < WORDS; i++) ref_init[i] = 0;
    for (int i = 0; i < 5; i++) begin wv_p[i] = 0; rv_p[i] = 0; rchk_p[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      int wa, ra;
      phase = PHASE_W'(t);
      // shift pipelines
      for (int i = 4; i > 0; i--) begin
        wv_p[i] = wv_p[i-1]; wa_p[i] = wa_p[i-1]; wd_p[i] = wd_p[i-1];
        rv_p[i] = rv_p[i-1]; rchk_p[i] = rchk_p[i-1]; rexp_p[i] = rexp_p[i-1];
      end
      // new commands in this slot's bank
      wa = (($urandom % (WORDS / PHASES)) * PHASES) + (t % PHASES);
      ra = (($urandom % (WORDS / PHASES)) * PHASES) + (t % PHASES);
      wv_p[0] = ($urandom % 3) != 0; wa_p[0] = wa; wd_p[0] = $urandom;
      rv_p[0] = ($urandom % 3) != 0;
      // the write issued 4 cycles ago commits now, before a read issued now
      if (wv_p[4]) begin ref_mem[wa_p[4]] = wd_p[4]; ref_init[wa_p[4]] = 1; end
      rchk_p[0] = rv_p[0] && ref_init[ra];
      rexp_p[0] = ref_mem[ra];
      if (ra == wa_p[4] && wv_p[4]) rchk_p[0] = 0;   // same-slot read/write: old word
      w_addr_valid = wv_p[0]; w_addr = MADDR_W'(wa * 4);
      w_data_valid = wv_p[4]; w_data = wd_p[4];
      r_addr_valid = rv_p[0]; r_addr = MADDR_W'(ra * 4);
      if (wv_p[0]) bank_w[t % PHASES]++;
      if (rv_p[0]) bank_r[t % PHASES]++;
      #1;
      if (rchk_p[4]) begin
        checks++;
        if (r_data !== rexp_p[4]) begin
          failures++;
          if (failures < 10) $display("t=%0d read got %h exp %h", t, r_data, rexp_p[4]);
        end
      end
      @(posedge clk); #1;
    end
    for (int b = 0; b < PHASES; b++) begin
      checks++; if (bank_w[b] == 0 || bank_r[b] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
