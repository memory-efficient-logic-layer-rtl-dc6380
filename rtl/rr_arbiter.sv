// rr_arbiter: round-robin arbiter, the arbitration policy of the router's allocators and of
// the network interface's multiplexers.
//
// Grants one of N requesters, searching from the one after the last granted requester, so
// every requester waits at most N-1 grants. The grant is combinational (one-hot gnt and index
// gnt_idx, any = some request). The priority pointer moves only when advance is high, i.e.
// when the caller actually used the grant. Round-robin is named by the design; the pointer
// scheme is this design's own.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N)-1:0] gnt_idx,
  output logic                 any
);
  localparam int IW = $clog2(N);
  logic [IW-1:0] last;

  always_comb begin
    logic [IW-1:0] idx;
    gnt     = '0;
    gnt_idx = '0;
    any     = 1'b0;
    for (int k = 1; k <= N; k++) begin
      idx = IW'((int'(last) + k) % N);
      if (!any && req[idx]) begin
        any          = 1'b1;
        gnt_idx      = idx;
        gnt[idx]     = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             last <= IW'(N - 1);
    else if (advance && any) last <= gnt_idx;
  end

endmodule
