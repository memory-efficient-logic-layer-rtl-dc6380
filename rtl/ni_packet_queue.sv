// ni_packet_queue: the NI's receive buffers.
//
// Two sources fill it: the router's local output port (flits tagged with their VC) and the
// NI's own direct local channel, which carries packets whose source and destination are in
// the same node so that they never enter the network. Each source has one queue per VC,
// QUEUE_DEPTH flits deep, so packets of the two sources and the two VCs never interleave.
// Every flit popped from a network queue returns one credit to the router on credit_out.
// The four queue heads are offered to the detector (q_valid / q_flit / q_pop, index
// 0 = network request, 1 = network response, 2 = local request, 3 = local response).
// The packet buffer and the local bypass follow the design; splitting the buffer into four
// queues is this design's own way of keeping the bypass and the VCs apart.
module ni_packet_queue
  import ll_pkg::*;
#(
  parameter int DEPTH = QUEUE_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the router
  input  logic              net_valid,
  input  logic              net_vc,
  input  flit_t             net_flit,
  output logic [NUM_VC-1:0] credit_out,
  // from the packetizer (direct local channel)
  input  logic              loc_valid,
  input  logic              loc_vc,
  input  flit_t             loc_flit,
  output logic              loc_ready,
  // to the detector
  output logic [3:0]        q_valid,
  output flit_t             q_flit [4],
  input  logic [3:0]        q_pop
);
  logic [3:0] full, empty, push;

  assign push[0] = net_valid && !net_vc;
  assign push[1] = net_valid &&  net_vc;
  assign push[2] = loc_valid && !loc_vc && !full[2];
  assign push[3] = loc_valid &&  loc_vc && !full[3];
  assign loc_ready = loc_vc ? !full[3] : !full[2];

  for (genvar q = 0; q < 4; q++) begin : g_q
    logic [$clog2(DEPTH+1)-1:0] cnt;
    sync_fifo #(.T(flit_t), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .push (push[q]),
      .din  ((q < 2) ? net_flit : loc_flit),
      .pop  (q_pop[q]),
      .dout (q_flit[q]),
      .full (full[q]),
      .empty(empty[q]),
      .count(cnt)
    );
    assign q_valid[q] = !empty[q];
  end

  assign credit_out[0] = q_pop[0] && !empty[0];
  assign credit_out[1] = q_pop[1] && !empty[1];

  a_net_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !((push[0] && full[0]) || (push[1] && full[1])));
endmodule
