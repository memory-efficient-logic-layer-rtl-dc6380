// noc_router: 5-port virtual-channel wormhole router of the logic-layer mesh.
//
// Ports 0..4 are Local, North, East, South and West. Each input port is a noc_input_channel
// with a request VC and a response VC. Packets keep their VC class from hop to hop, so the
// VC allocator only has to hand each free output VC to one of the input VCs routed to it
// (round-robin over the five inputs); the output VC stays reserved until the packet's tail
// flit has passed. The switch allocator is separable and round-robin: each input first picks
// one of its ACTIVE VCs that has a flit and at least one downstream credit, then each output
// port picks one of the inputs that chose it. Winners cross the crossbar and are registered
// onto the output link, so a flit spends at least two cycles in a router (buffer write, then
// allocation and traversal). Each output VC has a credit counter, initialised to the
// downstream buffer depth, decremented per flit sent and incremented per credit_in pulse.
//
// my_x / my_y give the router's own tile coordinates (static straps, so all tiles are
// the same module). Interface per port p: in_valid / in_vc / in_flit and credit_out (one bit per VC) toward the
// upstream neighbour; out_valid / out_vc / out_flit and credit_in toward the downstream one.
// The structure (input channels, VC allocator, switch allocator, crossbar, credits, 5 ports,
// 2 VCs, round-robin) follows the design; the allocator organisation and the pipeline depth
// are this design's own choices.
module noc_router
  import ll_pkg::*;
#(
  parameter int DEPTH = VC_DEPTH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [COORD_W-1:0]   my_x,
  input  logic [COORD_W-1:0]   my_y,
  input  logic                 in_valid   [NUM_PORTS],
  input  logic                 in_vc      [NUM_PORTS],
  input  flit_t                in_flit    [NUM_PORTS],
  output logic [NUM_VC-1:0]    credit_out [NUM_PORTS],
  output logic                 out_valid  [NUM_PORTS],
  output logic                 out_vc     [NUM_PORTS],
  output flit_t                out_flit   [NUM_PORTS],
  input  logic [NUM_VC-1:0]    credit_in  [NUM_PORTS]
);
  localparam int CW = $clog2(DEPTH + 1);

  // ---- input channels ----
  logic [NUM_VC-1:0] head_valid [NUM_PORTS];
  flit_t             head_flit  [NUM_PORTS][NUM_VC];
  port_e             route      [NUM_PORTS][NUM_VC];
  logic [NUM_VC-1:0] va_req     [NUM_PORTS];
  logic [NUM_VC-1:0] active     [NUM_PORTS];
  logic [NUM_VC-1:0] va_grant   [NUM_PORTS];
  logic [NUM_VC-1:0] sa_pop     [NUM_PORTS];

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_ic
    noc_input_channel #(.DEPTH(DEPTH)) u_ic (
      .clk, .rst_n, .my_x, .my_y,
      .in_valid  (in_valid[i]),
      .in_vc     (in_vc[i]),
      .in_flit   (in_flit[i]),
      .credit_out(credit_out[i]),
      .va_grant  (va_grant[i]),
      .sa_pop    (sa_pop[i]),
      .head_valid(head_valid[i]),
      .head_flit (head_flit[i]),
      .route     (route[i]),
      .va_req    (va_req[i]),
      .active    (active[i])
    );
  end

  // ---- output VC state ----
  logic [NUM_VC-1:0] ovc_busy [NUM_PORTS];
  logic [CW-1:0]     credits  [NUM_PORTS][NUM_VC];

  // ---- VC allocator ----
  logic [NUM_PORTS-1:0] va_gnt [NUM_PORTS][NUM_VC];   // [out port][vc] -> one-hot input
  logic                 va_any [NUM_PORTS][NUM_VC];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_va_out
    for (genvar v = 0; v < NUM_VC; v++) begin : g_va_vc
      logic [NUM_PORTS-1:0] req;
      logic [$clog2(NUM_PORTS)-1:0] idx;
      for (genvar i = 0; i < NUM_PORTS; i++) begin : g_req
        assign req[i] = va_req[i][v] && (route[i][v] == port_e'(p)) && !ovc_busy[p][v];
      end
      rr_arbiter #(.N(NUM_PORTS)) u_arb (
        .clk, .rst_n, .req(req), .advance(1'b1),
        .gnt(va_gnt[p][v]), .gnt_idx(idx), .any(va_any[p][v])
      );
    end
  end

  always_comb begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      for (int v = 0; v < NUM_VC; v++) begin
        va_grant[i][v] = 1'b0;
        for (int p = 0; p < NUM_PORTS; p++)
          if (va_gnt[p][v][i]) va_grant[i][v] = 1'b1;
      end
    end
  end

  // ---- switch allocator, stage 1: one VC per input ----
  logic [NUM_VC-1:0]          in_elig   [NUM_PORTS];
  logic [$clog2(NUM_VC)-1:0]  in_sel    [NUM_PORTS];
  logic                       in_any    [NUM_PORTS];
  logic [NUM_VC-1:0]          in_gnt1h  [NUM_PORTS];
  port_e                      in_port   [NUM_PORTS];
  logic                       in_won    [NUM_PORTS];

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_sa1
    for (genvar v = 0; v < NUM_VC; v++) begin : g_el
      assign in_elig[i][v] = active[i][v] && head_valid[i][v] &&
                             (credits[route[i][v]][v] != '0);
    end
    rr_arbiter #(.N(NUM_VC)) u_arb (
      .clk, .rst_n, .req(in_elig[i]), .advance(in_won[i]),
      .gnt(in_gnt1h[i]), .gnt_idx(in_sel[i]), .any(in_any[i])
    );
    assign in_port[i] = route[i][in_sel[i]];
  end

  // ---- switch allocator, stage 2: one input per output ----
  logic [NUM_PORTS-1:0]          out_req [NUM_PORTS];
  logic [NUM_PORTS-1:0]          out_gnt [NUM_PORTS];
  logic [$clog2(NUM_PORTS)-1:0]  out_idx [NUM_PORTS];
  logic                          out_any [NUM_PORTS];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_sa2
    for (genvar i = 0; i < NUM_PORTS; i++) begin : g_req
      assign out_req[p][i] = in_any[i] && (in_port[i] == port_e'(p));
    end
    rr_arbiter #(.N(NUM_PORTS)) u_arb (
      .clk, .rst_n, .req(out_req[p]), .advance(1'b1),
      .gnt(out_gnt[p]), .gnt_idx(out_idx[p]), .any(out_any[p])
    );
  end

  always_comb begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      in_won[i] = 1'b0;
      for (int p = 0; p < NUM_PORTS; p++)
        if (out_gnt[p][i]) in_won[i] = 1'b1;
      sa_pop[i] = in_won[i] ? in_gnt1h[i] : '0;
    end
  end

  // ---- crossbar + output registers + credit / VC bookkeeping ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        out_valid[p] <= 1'b0;
        out_vc[p]    <= 1'b0;
        out_flit[p]  <= '0;
        ovc_busy[p]  <= '0;
        for (int v = 0; v < NUM_VC; v++) credits[p][v] <= CW'(DEPTH);
      end
    end else begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        logic  sent;
        logic  svc;
        flit_t f;
        sent = out_any[p];
        svc  = in_sel[out_idx[p]][0];
        f    = head_flit[out_idx[p]][svc];
        out_valid[p] <= sent;
        out_vc[p]    <= svc;
        out_flit[p]  <= sent ? f : '0;
        for (int v = 0; v < NUM_VC; v++) begin
          logic dec;
          dec = sent && (svc == 1'(v));
          credits[p][v] <= credits[p][v] - CW'(dec) + CW'(credit_in[p][v]);
          if (va_any[p][v])                       ovc_busy[p][v] <= 1'b1;
          if (dec && f.tail)                      ovc_busy[p][v] <= 1'b0;
        end
      end
    end
  end

endmodule
