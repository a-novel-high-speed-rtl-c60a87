// Phase-aware multi-layer AHB bus matrix: top level.
//
// NM slow AHB masters (processors in the 32-64 MHz class, each on its own
// clock) share one memory through a fast fabric. Every master has an input
// stage that sends writes to its write bridge and reads to its read bridge.
// Each bridge turns slow AHB transfers into fast-fabric transfers with its two
// master FSMs. The write bridges of all masters compete for the write slave
// of the shared memory, the read bridges for the read slave; each side has its
// own slave-side arbitration (phase acquainted arbiter plus automatically
// actuated arbiter) and its own address and data multiplexers. The memory is
// four banks serviced in successive fast cycles, so each side moves one word
// per fast cycle. At the design's 2 GHz fabric clock that is 2 G writes plus
// 2 G reads per second.
//
// Clocks: clk_s[m] for master m's AHB, clk_f for the fabric; the fabric clock
// is meant to be much faster than the masters' (2 GHz against 32-64 MHz).
// Resets are active low and asynchronous, one per clock.
//
// Ordering: writes are posted in the write bridge; a master's read waits
// until that master's posted writes have completed, so it reads its own
// latest data.
//
// Policies: policy_w / policy_r choose fixed, round-robin or dynamic priority
// for each side at run time. Each transfer's HADDR[31:22] carries the master's
// priority level, desired transfer length and multiplexing mode (see aaa_pkg).
// HADDR[21:0] is the byte address in the shared memory.
module ml_ahb_matrix
  import aaa_pkg::*;
#(
  parameter int unsigned NM        = 4,      // slow AHB masters
  parameter int unsigned MEM_WORDS = 4096    // shared memory, 32-bit words
) (
  input  logic [NM-1:0]          clk_s,
  input  logic [NM-1:0]          rst_s_n,
  input  logic                   clk_f,
  input  logic                   rst_f_n,
  input  policy_e                policy_w,
  input  policy_e                policy_r,
  // slow AHB masters
  input  logic [NM-1:0][AW-1:0]  m_haddr,
  input  logic [NM-1:0][1:0]     m_htrans,
  input  logic [NM-1:0]          m_hwrite,
  input  logic [NM-1:0][2:0]     m_hburst,
  input  logic [NM-1:0][DW-1:0]  m_hwdata,
  output logic [NM-1:0]          m_hready,
  output logic [NM-1:0][DW-1:0]  m_hrdata,
  output logic [NM-1:0]          m_hresp
);
  // slow side, per master
  logic [NM-1:0]          hsel_w, hsel_r, hreadyout_w, hreadyout_r, hresp_w, hresp_r;
  logic [NM-1:0][DW-1:0]  hrdata_w, hrdata_r;
  logic [NM-1:0]          w_pending, r_pending_unused;

  // fast side, per bridge
  logic [NM-1:0]               w_req, w_gnt, w_av, w_dv, r_req, r_gnt, r_av, r_dv;
  cmd_t [NM-1:0]               w_cmd, r_cmd;
  logic [NM-1:0][MADDR_W-1:0]  w_addr, r_addr;
  logic [NM-1:0][DW-1:0]       w_wdata, r_wdata;
  logic [DW-1:0]               w_hrdata_f, r_hrdata_f;

  // memory side
  logic [PHASE_W-1:0] w_phase, r_phase;
  logic               mw_av, mw_dv, mr_av, mr_dv_unused;
  logic [MADDR_W-1:0] mw_addr, mr_addr;
  logic [DW-1:0]      mw_data, mr_wdata_unused, mr_data;
  logic               w_locked, r_locked;

  for (genvar m = 0; m < NM; m++) begin : g_master
    ahb_input_stage u_in (
      .clk(clk_s[m]), .rst_n(rst_s_n[m]),
      .htrans(m_htrans[m]), .hwrite(m_hwrite[m]),
      .hsel_w(hsel_w[m]), .hsel_r(hsel_r[m]), .hready(m_hready[m]),
      .hreadyout_w(hreadyout_w[m]), .hrdata_w(hrdata_w[m]), .hresp_w(hresp_w[m]),
      .hreadyout_r(hreadyout_r[m]), .hrdata_r(hrdata_r[m]), .hresp_r(hresp_r[m]),
      .hrdata(m_hrdata[m]), .hresp(m_hresp[m])
    );

    ahb_bridge #(.IS_WRITE(1'b1)) u_wbridge (
      .clk_s(clk_s[m]), .rst_s_n(rst_s_n[m]), .clk_f, .rst_f_n,
      .hsel(hsel_w[m]), .haddr(m_haddr[m]), .htrans(m_htrans[m]), .hwrite(m_hwrite[m]),
      .hburst(m_hburst[m]), .hwdata(m_hwdata[m]), .hready(m_hready[m]),
      .hold(1'b0), .pending(w_pending[m]),
      .hreadyout(hreadyout_w[m]), .hrdata(hrdata_w[m]), .hresp(hresp_w[m]),
      .req(w_req[m]), .req_cmd(w_cmd[m]), .gnt(w_gnt[m]),
      .addr_valid(w_av[m]), .addr(w_addr[m]), .wdata_valid(w_dv[m]), .wdata(w_wdata[m]),
      .hrdata_f(w_hrdata_f)
    );

    ahb_bridge #(.IS_WRITE(1'b0)) u_rbridge (
      .clk_s(clk_s[m]), .rst_s_n(rst_s_n[m]), .clk_f, .rst_f_n,
      .hsel(hsel_r[m]), .haddr(m_haddr[m]), .htrans(m_htrans[m]), .hwrite(m_hwrite[m]),
      .hburst(m_hburst[m]), .hwdata(m_hwdata[m]), .hready(m_hready[m]),
      .hold(w_pending[m]), .pending(r_pending_unused[m]),
      .hreadyout(hreadyout_r[m]), .hrdata(hrdata_r[m]), .hresp(hresp_r[m]),
      .req(r_req[m]), .req_cmd(r_cmd[m]), .gnt(r_gnt[m]),
      .addr_valid(r_av[m]), .addr(r_addr[m]), .wdata_valid(r_dv[m]), .wdata(r_wdata[m]),
      .hrdata_f(r_hrdata_f)
    );
  end

  // write side: write arbiter, HADDRW and HDATAW multiplexers
  matrix_slave_port #(.N(NM), .IS_WRITE(1'b1)) u_wport (
    .clk(clk_f), .rst_n(rst_f_n), .policy(policy_w),
    .req(w_req), .req_cmd(w_cmd), .gnt(w_gnt),
    .addr_valid(w_av), .addr(w_addr), .wdata_valid(w_dv), .wdata(w_wdata),
    .hrdata_f(w_hrdata_f),
    .phase(w_phase), .mem_addr_valid(mw_av), .mem_addr(mw_addr),
    .mem_wdata_valid(mw_dv), .mem_wdata(mw_data), .mem_rdata('0),
    .locked(w_locked)
  );

  // read side: read arbiter, HADDRR multiplexer, HDATAR return
  matrix_slave_port #(.N(NM), .IS_WRITE(1'b0)) u_rport (
    .clk(clk_f), .rst_n(rst_f_n), .policy(policy_r),
    .req(r_req), .req_cmd(r_cmd), .gnt(r_gnt),
    .addr_valid(r_av), .addr(r_addr), .wdata_valid(r_dv), .wdata(r_wdata),
    .hrdata_f(r_hrdata_f),
    .phase(r_phase), .mem_addr_valid(mr_av), .mem_addr(mr_addr),
    .mem_wdata_valid(mr_dv_unused), .mem_wdata(mr_wdata_unused), .mem_rdata(mr_data),
    .locked(r_locked)
  );

  shared_memory #(.WORDS(MEM_WORDS)) u_mem (
    .clk(clk_f), .rst_n(rst_f_n), .phase(w_phase),
    .w_addr_valid(mw_av), .w_addr(mw_addr), .w_data_valid(mw_dv), .w_data(mw_data),
    .r_addr_valid(mr_av), .r_addr(mr_addr), .r_data(mr_data)
  );

  // both sides count the same bank slots
  a_same_phase: assert property (@(posedge clk_f) disable iff (!rst_f_n) w_phase == r_phase);

endmodule
