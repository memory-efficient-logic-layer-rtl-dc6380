// ll_node: one tile of the logic layer: router, network interface and adaptive memory
// controller for the DRAM rank stacked on this tile.
//
// The processor attaches to the network interface's AXI slave port; the network interface's
// memory-side AXI master port drives the memory controller directly, and its packet port
// attaches to the router's local port. Requests from this processor to this tile's memory
// use the interface's direct local channel and never reach the router. The four mesh
// directions are brought out as arrays indexed 0 = north, 1 = east, 2 = south, 3 = west.
// The tile coordinates are inputs rather than parameters so that all sixteen tiles are
// one identical module that can be laid out once and replicated.
// The tile composition follows the design; the port grouping is this design's own.
module ll_node
  import ll_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] my_x,   // tile coordinates, strapped by the mesh
  input  logic [COORD_W-1:0] my_y,
  // processor AXI
  input  logic               p_aw_valid,
  output logic               p_aw_ready,
  input  axi_ax_t            p_aw,
  input  logic               p_w_valid,
  output logic               p_w_ready,
  input  axi_w_t             p_w,
  input  logic               p_ar_valid,
  output logic               p_ar_ready,
  input  axi_ax_t            p_ar,
  output logic               p_r_valid,
  input  logic               p_r_ready,
  output axi_r_t             p_r,
  output logic               p_b_valid,
  input  logic               p_b_ready,
  output axi_b_t             p_b,
  // mesh links
  input  logic               ln_in_valid   [4],
  input  logic               ln_in_vc      [4],
  input  flit_t              ln_in_flit    [4],
  output logic [NUM_VC-1:0]  ln_credit_out [4],
  output logic               ln_out_valid  [4],
  output logic               ln_out_vc     [4],
  output flit_t              ln_out_flit   [4],
  input  logic [NUM_VC-1:0]  ln_credit_in  [4],
  // DRAM pins
  output logic               dram_cs_n,
  output logic               dram_ras_n,
  output logic               dram_cas_n,
  output logic               dram_we_n,
  output logic [BANK_W-1:0]  dram_ba,
  output logic [DADDR_W-1:0] dram_a,
  output logic [DATA_W-1:0]  dram_dq_out,
  output logic               dram_dq_oe,
  input  logic [DATA_W-1:0]  dram_dq_in,
  input  logic               dram_dq_in_valid,
  // events
  output logic [5:0]         ev   // {oldest, interleave, hit, local, release, ooo}
);
  // router
  logic              r_in_valid   [NUM_PORTS];
  logic              r_in_vc      [NUM_PORTS];
  flit_t             r_in_flit    [NUM_PORTS];
  logic [NUM_VC-1:0] r_credit_out [NUM_PORTS];
  logic              r_out_valid  [NUM_PORTS];
  logic              r_out_vc     [NUM_PORTS];
  flit_t             r_out_flit   [NUM_PORTS];
  logic [NUM_VC-1:0] r_credit_in  [NUM_PORTS];

  noc_router u_router (
    .clk, .rst_n, .my_x, .my_y,
    .in_valid(r_in_valid), .in_vc(r_in_vc), .in_flit(r_in_flit), .credit_out(r_credit_out),
    .out_valid(r_out_valid), .out_vc(r_out_vc), .out_flit(r_out_flit), .credit_in(r_credit_in)
  );

  for (genvar d = 0; d < 4; d++) begin : g_dir
    assign r_in_valid[d+1]  = ln_in_valid[d];
    assign r_in_vc[d+1]     = ln_in_vc[d];
    assign r_in_flit[d+1]   = ln_in_flit[d];
    assign ln_credit_out[d] = r_credit_out[d+1];
    assign ln_out_valid[d]  = r_out_valid[d+1];
    assign ln_out_vc[d]     = r_out_vc[d+1];
    assign ln_out_flit[d]   = r_out_flit[d+1];
    assign r_credit_in[d+1] = ln_credit_in[d];
  end

  // network interface <-> memory controller
  logic   m_aw_valid, m_aw_ready, m_w_valid, m_w_ready, m_ar_valid, m_ar_ready;
  logic   m_r_valid, m_r_ready, m_b_valid, m_b_ready;
  mc_ax_t m_aw, m_ar;
  axi_w_t m_w;
  mc_r_t  m_r;
  mc_b_t  m_b;

  network_interface u_ni (
    .clk, .rst_n, .my_x, .my_y,
    .s_aw_valid(p_aw_valid), .s_aw_ready(p_aw_ready), .s_aw(p_aw),
    .s_w_valid (p_w_valid),  .s_w_ready (p_w_ready),  .s_w (p_w),
    .s_ar_valid(p_ar_valid), .s_ar_ready(p_ar_ready), .s_ar(p_ar),
    .s_r_valid (p_r_valid),  .s_r_ready (p_r_ready),  .s_r (p_r),
    .s_b_valid (p_b_valid),  .s_b_ready (p_b_ready),  .s_b (p_b),
    .m_aw_valid, .m_aw_ready, .m_aw,
    .m_w_valid,  .m_w_ready,  .m_w,
    .m_ar_valid, .m_ar_ready, .m_ar,
    .m_r_valid,  .m_r_ready,  .m_r,
    .m_b_valid,  .m_b_ready,  .m_b,
    .rt_out_valid(r_in_valid[0]), .rt_out_vc(r_in_vc[0]), .rt_out_flit(r_in_flit[0]),
    .rt_credit_in(r_credit_out[0]),
    .rt_in_valid(r_out_valid[0]), .rt_in_vc(r_out_vc[0]), .rt_in_flit(r_out_flit[0]),
    .rt_credit_out(r_credit_in[0]),
    .ooo_event(ev[0]), .release_event(ev[1]), .local_event(ev[2])
  );

  adaptive_mc u_mc (
    .clk, .rst_n,
    .s_aw_valid(m_aw_valid), .s_aw_ready(m_aw_ready), .s_aw(m_aw),
    .s_w_valid (m_w_valid),  .s_w_ready (m_w_ready),  .s_w (m_w),
    .s_ar_valid(m_ar_valid), .s_ar_ready(m_ar_ready), .s_ar(m_ar),
    .s_r_valid (m_r_valid),  .s_r_ready (m_r_ready),  .s_r (m_r),
    .s_b_valid (m_b_valid),  .s_b_ready (m_b_ready),  .s_b (m_b),
    .dram_cs_n, .dram_ras_n, .dram_cas_n, .dram_we_n, .dram_ba, .dram_a,
    .dram_dq_out, .dram_dq_oe, .dram_dq_in, .dram_dq_in_valid,
    .ev_hit(ev[3]), .ev_interleave(ev[4]), .ev_oldest(ev[5])
  );
endmodule
