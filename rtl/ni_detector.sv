// ni_detector: sends each received packet to the unit that handles its type.
//
// It looks at the head flit at the front of each packet-queue head. A request (resp bit 0 of
// the header) goes to the memory-side depacketizer, a response (resp bit 1) to the reorder
// unit and from there to the processor-side depacketizer. Each of the two targets has a
// round-robin arbiter over the queues and, once it has picked a queue, stays with it until
// the tail flit has passed, so packets are never interleaved. A packet once offered stays
// offered until it has been taken, which the reorder unit relies on. Flits move combinationally
// (valid/ready), one per target per cycle.
// The type-based routing follows the design; the per-target arbitration is this design's own.
module ni_detector
  import ll_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] q_valid,
  input  flit_t      q_flit [4],
  output logic [3:0] q_pop,
  // requests to the memory-side depacketizer
  output logic       req_valid,
  input  logic       req_ready,
  output flit_t      req_flit,
  // responses to the reorder unit
  output logic       rsp_valid,
  input  logic       rsp_ready,
  output flit_t      rsp_flit
);
  logic       lock   [2];
  logic [1:0] locked [2];
  logic [3:0] cand   [2];
  logic [3:0] gnt    [2];
  logic [1:0] gidx   [2];
  logic       gany   [2];
  logic [1:0] sel    [2];
  logic       t_valid [2];
  logic       t_ready [2];
  flit_t      t_flit  [2];

  for (genvar t = 0; t < 2; t++) begin : g_t
    for (genvar q = 0; q < 4; q++) begin : g_c
      head_t h;
      assign h = head_t'(q_flit[q].data);
      assign cand[t][q] = q_valid[q] && q_flit[q].head && (h.resp == 1'(t));
    end
    rr_arbiter #(.N(4)) u_arb (
      .clk, .rst_n, .req(cand[t]), .advance(!lock[t]),
      .gnt(gnt[t]), .gnt_idx(gidx[t]), .any(gany[t])
    );
    assign sel[t]     = lock[t] ? locked[t] : gidx[t];
    assign t_valid[t] = lock[t] ? q_valid[sel[t]] : gany[t];
    assign t_flit[t]  = q_flit[sel[t]];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        lock[t]   <= 1'b0;
        locked[t] <= '0;
      end else if (!lock[t]) begin
        // stay with the offered queue until its tail flit has been taken
        if (gany[t] && !(t_ready[t] && t_flit[t].tail)) begin
          lock[t]   <= 1'b1;
          locked[t] <= gidx[t];
        end
      end else if (t_valid[t] && t_ready[t] && t_flit[t].tail) begin
        lock[t] <= 1'b0;
      end
    end
  end

  assign req_valid  = t_valid[0];
  assign req_flit   = t_flit[0];
  assign t_ready[0] = req_ready;
  assign rsp_valid  = t_valid[1];
  assign rsp_flit   = t_flit[1];
  assign t_ready[1] = rsp_ready;

  always_comb begin
    q_pop = '0;
    for (int t = 0; t < 2; t++)
      if (t_valid[t] && t_ready[t]) q_pop[sel[t]] = 1'b1;
  end
endmodule
