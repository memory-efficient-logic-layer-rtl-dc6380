// logic_layer_top: the logic-layer communication platform, a MESH_X x MESH_Y mesh of tiles.
//
// Tile n = y*MESH_X + x sits at column x, row y and owns the stacked memory whose byte
// addresses carry n in bits [31:28] (256 MB per tile, 4 GB in all for 16 tiles). Each tile's
// router is linked to its four neighbours (east/west along x, north/south along y, north
// being y-1); links at the mesh edge are tied off. Per tile, the processor's AXI port, the
// DRAM pins of the rank above it and six event strobes are brought out as arrays indexed by
// tile. The processors and the DRAM peripheral logic themselves are outside this module.
// The 4x4 mesh, the per-tile composition and the memory per tile follow the design; the
// address map and port naming are this design's own.
module logic_layer_top
  import ll_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               p_aw_valid [NUM_NODES],
  output logic               p_aw_ready [NUM_NODES],
  input  axi_ax_t            p_aw       [NUM_NODES],
  input  logic               p_w_valid  [NUM_NODES],
  output logic               p_w_ready  [NUM_NODES],
  input  axi_w_t             p_w        [NUM_NODES],
  input  logic               p_ar_valid [NUM_NODES],
  output logic               p_ar_ready [NUM_NODES],
  input  axi_ax_t            p_ar       [NUM_NODES],
  output logic               p_r_valid  [NUM_NODES],
  input  logic               p_r_ready  [NUM_NODES],
  output axi_r_t             p_r        [NUM_NODES],
  output logic               p_b_valid  [NUM_NODES],
  input  logic               p_b_ready  [NUM_NODES],
  output axi_b_t             p_b        [NUM_NODES],
  output logic               dram_cs_n  [NUM_NODES],
  output logic               dram_ras_n [NUM_NODES],
  output logic               dram_cas_n [NUM_NODES],
  output logic               dram_we_n  [NUM_NODES],
  output logic [BANK_W-1:0]  dram_ba    [NUM_NODES],
  output logic [DADDR_W-1:0] dram_a     [NUM_NODES],
  output logic [DATA_W-1:0]  dram_dq_out[NUM_NODES],
  output logic               dram_dq_oe [NUM_NODES],
  input  logic [DATA_W-1:0]  dram_dq_in [NUM_NODES],
  input  logic               dram_dq_in_valid [NUM_NODES],
  output logic [5:0]         ev         [NUM_NODES]
);
  // link signals, per tile and direction (0 N, 1 E, 2 S, 3 W)
  logic              in_valid   [NUM_NODES][4];
  logic              in_vc      [NUM_NODES][4];
  flit_t             in_flit    [NUM_NODES][4];
  logic [NUM_VC-1:0] credit_out [NUM_NODES][4];
  logic              out_valid  [NUM_NODES][4];
  logic              out_vc     [NUM_NODES][4];
  flit_t             out_flit   [NUM_NODES][4];
  logic [NUM_VC-1:0] credit_in  [NUM_NODES][4];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int N = y * MESH_X + x;

      // neighbour in each direction and the direction it sees us from
      for (genvar d = 0; d < 4; d++) begin : g_d
        localparam int NX  = (d == 1) ? x + 1 : (d == 3) ? x - 1 : x;
        localparam int NY  = (d == 2) ? y + 1 : (d == 0) ? y - 1 : y;
        localparam int OPP = (d + 2) % 4;
        if (NX >= 0 && NX < MESH_X && NY >= 0 && NY < MESH_Y) begin : g_link
          localparam int M = NY * MESH_X + NX;
          assign in_valid[N][d]  = out_valid[M][OPP];
          assign in_vc[N][d]     = out_vc[M][OPP];
          assign in_flit[N][d]   = out_flit[M][OPP];
          assign credit_in[N][d] = credit_out[M][OPP];
        end else begin : g_edge
          assign in_valid[N][d]  = 1'b0;
          assign in_vc[N][d]     = 1'b0;
          assign in_flit[N][d]   = '0;
          assign credit_in[N][d] = '0;
        end
      end

      ll_node u_node (
        .clk, .rst_n, .my_x(COORD_W'(x)), .my_y(COORD_W'(y)),
        .p_aw_valid(p_aw_valid[N]), .p_aw_ready(p_aw_ready[N]), .p_aw(p_aw[N]),
        .p_w_valid (p_w_valid[N]),  .p_w_ready (p_w_ready[N]),  .p_w (p_w[N]),
        .p_ar_valid(p_ar_valid[N]), .p_ar_ready(p_ar_ready[N]), .p_ar(p_ar[N]),
        .p_r_valid (p_r_valid[N]),  .p_r_ready (p_r_ready[N]),  .p_r (p_r[N]),
        .p_b_valid (p_b_valid[N]),  .p_b_ready (p_b_ready[N]),  .p_b (p_b[N]),
        .ln_in_valid(in_valid[N]), .ln_in_vc(in_vc[N]), .ln_in_flit(in_flit[N]),
        .ln_credit_out(credit_out[N]),
        .ln_out_valid(out_valid[N]), .ln_out_vc(out_vc[N]), .ln_out_flit(out_flit[N]),
        .ln_credit_in(credit_in[N]),
        .dram_cs_n(dram_cs_n[N]), .dram_ras_n(dram_ras_n[N]), .dram_cas_n(dram_cas_n[N]),
        .dram_we_n(dram_we_n[N]), .dram_ba(dram_ba[N]), .dram_a(dram_a[N]),
        .dram_dq_out(dram_dq_out[N]), .dram_dq_oe(dram_dq_oe[N]),
        .dram_dq_in(dram_dq_in[N]), .dram_dq_in_valid(dram_dq_in_valid[N]),
        .ev(ev[N])
      );
    end
  end
endmodule
