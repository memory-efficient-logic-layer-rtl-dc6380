// noc_input_channel: one input port (IC) of the mesh router.
//
// Incoming flits are steered by their VC number into one of two buffers, VC 0 for request
// packets and VC 1 for response packets, VC_DEPTH flits each. For every VC a small controller
// tracks the packet at the buffer head: IDLE until a head flit shows up, then the routing
// unit computes the output port with dimension-ordered XY routing (first along x, then along
// y) and the VC waits for the router's VC allocator (WAIT_VA); once granted it is ACTIVE and
// its flits compete in the switch allocator until the tail flit leaves, after which the VC is
// IDLE again (wormhole switching). Every flit that leaves a buffer returns one credit to the
// upstream router on credit_out in the same cycle.
//
// Interface: my_x / my_y are the tile's coordinates (static straps); in_valid / in_vc / in_flit from the link; va_grant and sa_pop per VC from the
// router; head_valid / head_flit / route / va_req / active per VC to the router.
// Two VC buffers per port, request/response VC classes, XY routing and credits follow the
// design; the three-state VC controller and the mesh orientation (north is y-1) are this
// design's own.
module noc_input_channel
  import ll_pkg::*;
#(
  parameter int DEPTH = VC_DEPTH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [COORD_W-1:0]   my_x,
  input  logic [COORD_W-1:0]   my_y,
  input  logic                 in_valid,
  input  logic                 in_vc,
  input  flit_t                in_flit,
  output logic [NUM_VC-1:0]    credit_out,
  input  logic [NUM_VC-1:0]    va_grant,
  input  logic [NUM_VC-1:0]    sa_pop,
  output logic [NUM_VC-1:0]    head_valid,
  output flit_t                head_flit [NUM_VC],
  output port_e                route     [NUM_VC],
  output logic [NUM_VC-1:0]    va_req,
  output logic [NUM_VC-1:0]    active
);
  typedef enum logic [1:0] {VC_IDLE, VC_WAIT_VA, VC_ACTIVE} vc_state_e;

  vc_state_e state [NUM_VC];
  port_e     route_q [NUM_VC];

  function automatic port_e xy_route(flit_t f);
    head_t h;
    h = head_t'(f.data);
    if (h.dst_x > my_x)      return P_EAST;
    else if (h.dst_x < my_x) return P_WEST;
    else if (h.dst_y > my_y) return P_SOUTH;
    else if (h.dst_y < my_y) return P_NORTH;
    else                           return P_LOCAL;
  endfunction

  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    logic empty, full;
    logic [$clog2(DEPTH+1)-1:0] cnt;
    flit_t dout;

    sync_fifo #(.T(flit_t), .DEPTH(DEPTH)) u_buf (
      .clk, .rst_n,
      .push (in_valid && (in_vc == 1'(v))),
      .din  (in_flit),
      .pop  (sa_pop[v]),
      .dout (dout),
      .full (full),
      .empty(empty),
      .count(cnt)
    );

    assign head_valid[v] = !empty;
    assign head_flit[v]  = dout;
    assign route[v]      = route_q[v];
    assign va_req[v]     = (state[v] == VC_WAIT_VA);
    assign active[v]     = (state[v] == VC_ACTIVE);
    assign credit_out[v] = sa_pop[v] && !empty;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        state[v]   <= VC_IDLE;
        route_q[v] <= P_LOCAL;
      end else begin
        unique case (state[v])
          VC_IDLE: if (!empty && dout.head) begin
            route_q[v] <= xy_route(dout);
            state[v]   <= VC_WAIT_VA;
          end
          VC_WAIT_VA: if (va_grant[v]) state[v] <= VC_ACTIVE;
          VC_ACTIVE:  if (sa_pop[v] && !empty && dout.tail) state[v] <= VC_IDLE;
          default:    state[v] <= VC_IDLE;
        endcase
      end
    end

    // Credit flow control guarantees the buffer never overflows.
    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      !(in_valid && in_vc == 1'(v) && full));
  end

endmodule
