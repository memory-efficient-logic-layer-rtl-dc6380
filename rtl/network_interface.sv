// network_interface: the logic-layer network interface (NI) of one node.
//
// It sits between the node's processor, the node's memory controller and the router's local
// port, and has a forward and a reverse path.
// Forward: AXI queues buffer the processor's read requests (AR), write requests (AW) and
// write data (W), and the memory controller's read data (R) and write responses (B), each
// QUEUE_DEPTH entries deep. The packetizer turns them into packets; request packets get a
// sequence number from the reorder unit. A packet for another node goes to the router on its
// VC (0 request, 1 response) when a credit is available; a packet for this node's own memory
// (or a response for this node's own processor) takes the direct local channel into the
// packet queue and never enters the network.
// Reverse: the packet queue holds packets from the router and from the local channel; the
// detector sends requests to the memory-side depacketizer (AXI AR / AW / W toward the memory
// controller) and responses to the reorder unit, which passes in-order packets to the
// processor-side depacketizer (AXI R / B) and parks out-of-order ones in its 48-word reorder
// buffer until their turn.
//
// Events: ooo_event pulses when a response is parked, release_event when one is released,
// local_event when a packet head takes the local channel.
// The partition into AXI queues, packetizer, reorder unit, packet queue, detector and two
// depacketizers follows the design; the credit counters toward the router and the handshakes
// are this design's own.
module network_interface
  import ll_pkg::*;
#(
  parameter int QDEPTH       = QUEUE_DEPTH,
  parameter int ROUTER_DEPTH = VC_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [COORD_W-1:0] my_x,     // this tile's coordinates (static straps)
  input  logic [COORD_W-1:0] my_y,
  // processor side (AXI slave)
  input  logic              s_aw_valid,
  output logic              s_aw_ready,
  input  axi_ax_t           s_aw,
  input  logic              s_w_valid,
  output logic              s_w_ready,
  input  axi_w_t            s_w,
  input  logic              s_ar_valid,
  output logic              s_ar_ready,
  input  axi_ax_t           s_ar,
  output logic              s_r_valid,
  input  logic              s_r_ready,
  output axi_r_t            s_r,
  output logic              s_b_valid,
  input  logic              s_b_ready,
  output axi_b_t            s_b,
  // memory-controller side (AXI master)
  output logic              m_aw_valid,
  input  logic              m_aw_ready,
  output mc_ax_t            m_aw,
  output logic              m_w_valid,
  input  logic              m_w_ready,
  output axi_w_t            m_w,
  output logic              m_ar_valid,
  input  logic              m_ar_ready,
  output mc_ax_t            m_ar,
  input  logic              m_r_valid,
  output logic              m_r_ready,
  input  mc_r_t             m_r,
  input  logic              m_b_valid,
  output logic              m_b_ready,
  input  mc_b_t             m_b,
  // router local port
  output logic              rt_out_valid,
  output logic              rt_out_vc,
  output flit_t             rt_out_flit,
  input  logic [NUM_VC-1:0] rt_credit_in,
  input  logic              rt_in_valid,
  input  logic              rt_in_vc,
  input  flit_t             rt_in_flit,
  output logic [NUM_VC-1:0] rt_credit_out,
  // events
  output logic              ooo_event,
  output logic              release_event,
  output logic              local_event
);
  localparam int CW = $clog2(ROUTER_DEPTH + 1);

  // ---------------- AXI queues ----------------
  logic ar_full, ar_empty, aw_full, aw_empty, w_full, w_empty;
  logic r_full, r_empty, b_full, b_empty;
  logic ar_pop, aw_pop, w_pop, r_pop, b_pop;
  axi_ax_t ar_q, aw_q;
  axi_w_t  w_q;
  mc_r_t   r_q;
  mc_b_t   b_q;
  logic [$clog2(QDEPTH+1)-1:0] c_ar, c_aw, c_w, c_r, c_b;

  sync_fifo #(.T(axi_ax_t), .DEPTH(QDEPTH)) u_arq (.clk, .rst_n,
    .push(s_ar_valid), .din(s_ar), .pop(ar_pop), .dout(ar_q), .full(ar_full), .empty(ar_empty), .count(c_ar));
  sync_fifo #(.T(axi_ax_t), .DEPTH(QDEPTH)) u_awq (.clk, .rst_n,
    .push(s_aw_valid), .din(s_aw), .pop(aw_pop), .dout(aw_q), .full(aw_full), .empty(aw_empty), .count(c_aw));
  sync_fifo #(.T(axi_w_t), .DEPTH(QDEPTH)) u_wq (.clk, .rst_n,
    .push(s_w_valid), .din(s_w), .pop(w_pop), .dout(w_q), .full(w_full), .empty(w_empty), .count(c_w));
  sync_fifo #(.T(mc_r_t), .DEPTH(QDEPTH)) u_rq (.clk, .rst_n,
    .push(m_r_valid), .din(m_r), .pop(r_pop), .dout(r_q), .full(r_full), .empty(r_empty), .count(c_r));
  sync_fifo #(.T(mc_b_t), .DEPTH(QDEPTH)) u_bq (.clk, .rst_n,
    .push(m_b_valid), .din(m_b), .pop(b_pop), .dout(b_q), .full(b_full), .empty(b_empty), .count(c_b));

  assign s_ar_ready = !ar_full;
  assign s_aw_ready = !aw_full;
  assign s_w_ready  = !w_full;
  assign m_r_ready  = !r_full;
  assign m_b_ready  = !b_full;

  // ---------------- packetizer + reorder unit ----------------
  logic [TID_W-1:0] sn_tid;
  logic [SN_W-1:0]  sn;
  logic             sn_take, can_issue;
  logic             pk_valid, pk_ready, pk_vc, pk_local;
  flit_t            pk_flit;

  ni_packetizer u_pkt (
    .clk, .rst_n, .my_x, .my_y,
    .ar_valid(!ar_empty), .ar_ready(ar_pop), .ar(ar_q),
    .aw_valid(!aw_empty), .aw_ready(aw_pop), .aw(aw_q),
    .w_valid (!w_empty),  .w_ready (w_pop),  .w (w_q),
    .r_valid (!r_empty),  .r_ready (r_pop),  .r (r_q),
    .b_valid (!b_empty),  .b_ready (b_pop),  .b (b_q),
    .sn_tid, .sn, .sn_take, .can_issue,
    .out_valid(pk_valid), .out_ready(pk_ready), .out_flit(pk_flit),
    .out_vc(pk_vc), .out_local(pk_local)
  );

  // credits toward the router's local input port
  logic [CW-1:0] credits [NUM_VC];
  logic          loc_ready;
  logic          to_router;

  assign pk_ready     = pk_local ? loc_ready : (credits[pk_vc] != '0);
  assign to_router    = pk_valid && pk_ready && !pk_local;
  assign rt_out_valid = to_router;
  assign rt_out_vc    = pk_vc;
  assign rt_out_flit  = pk_flit;
  assign local_event  = pk_valid && pk_ready && pk_local && pk_flit.head;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NUM_VC; v++) credits[v] <= CW'(ROUTER_DEPTH);
    end else begin
      for (int v = 0; v < NUM_VC; v++)
        credits[v] <= credits[v] - CW'(to_router && (pk_vc == 1'(v))) + CW'(rt_credit_in[v]);
    end
  end

  // ---------------- packet queue + detector ----------------
  logic [3:0] q_valid, q_pop;
  flit_t      q_flit [4];

  ni_packet_queue #(.DEPTH(QDEPTH)) u_pq (
    .clk, .rst_n,
    .net_valid(rt_in_valid), .net_vc(rt_in_vc), .net_flit(rt_in_flit), .credit_out(rt_credit_out),
    .loc_valid(pk_valid && pk_local), .loc_vc(pk_vc), .loc_flit(pk_flit), .loc_ready(loc_ready),
    .q_valid, .q_flit, .q_pop
  );

  logic  rq_valid, rq_ready, rs_valid, rs_ready;
  flit_t rq_flit, rs_flit;

  ni_detector u_det (
    .clk, .rst_n, .q_valid, .q_flit, .q_pop,
    .req_valid(rq_valid), .req_ready(rq_ready), .req_flit(rq_flit),
    .rsp_valid(rs_valid), .rsp_ready(rs_ready), .rsp_flit(rs_flit)
  );

  // ---------------- memory-side depacketizer ----------------
  ni_mem_depacketizer u_mdp (
    .clk, .rst_n,
    .in_valid(rq_valid), .in_ready(rq_ready), .in_flit(rq_flit),
    .ar_valid(m_ar_valid), .ar_ready(m_ar_ready), .ar(m_ar),
    .aw_valid(m_aw_valid), .aw_ready(m_aw_ready), .aw(m_aw),
    .w_valid (m_w_valid),  .w_ready (m_w_ready),  .w (m_w)
  );

  // ---------------- reorder + processor-side depacketizer ----------------
  logic  ro_valid, ro_ready;
  flit_t ro_flit;

  ni_reorder_unit u_ro (
    .clk, .rst_n,
    .sn_tid, .sn, .sn_take, .can_issue,
    .in_valid(rs_valid), .in_ready(rs_ready), .in_flit(rs_flit),
    .out_valid(ro_valid), .out_ready(ro_ready), .out_flit(ro_flit),
    .ooo_event, .release_event
  );

  ni_proc_depacketizer u_pdp (
    .clk, .rst_n,
    .in_valid(ro_valid), .in_ready(ro_ready), .in_flit(ro_flit),
    .r_valid(s_r_valid), .r_ready(s_r_ready), .r(s_r),
    .b_valid(s_b_valid), .b_ready(s_b_ready), .b(s_b)
  );

endmodule
