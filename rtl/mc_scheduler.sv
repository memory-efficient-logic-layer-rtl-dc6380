// mc_scheduler: the adaptive memory controller's command scheduler.
//
// Purely combinational. Each cycle it looks at every request-table entry that can issue its
// next DRAM command now (cand) and picks one:
//   1. the oldest (highest age) row hit, i.e. an entry whose row is open so only a column
//      access is needed (row-first);
//   2. otherwise the oldest entry whose bank differs from the bank of the most recent column
//      access, so activates and precharges of other banks overlap it (bank-first, bank
//      interleaving);
//   3. otherwise the oldest entry.
// Ties go to the lowest entry index. sel_class reports which rule chose (0, 1, 2).
// The three-level policy and the use of age follow the design; reading "different banks" as
// "different from the bank last accessed" is this design's interpretation.
module mc_scheduler
  import ll_pkg::*;
#(
  parameter int N     = QUEUE_DEPTH,
  parameter int AGE_W = 4
) (
  input  logic [N-1:0]          cand,
  input  logic [N-1:0]          hit,
  input  logic [BANK_W-1:0]     bank [N],
  input  logic [AGE_W-1:0]      age  [N],
  input  logic                  last_bank_valid,
  input  logic [BANK_W-1:0]     last_bank,
  output logic                  sel_valid,
  output logic [$clog2(N)-1:0]  sel,
  output logic [1:0]            sel_class
);
  localparam int IW = $clog2(N);

  function automatic logic [IW:0] oldest(logic [N-1:0] m, logic [AGE_W-1:0] a [N]);
    logic          f;
    logic [IW-1:0] s;
    f = 1'b0;
    s = '0;
    for (int i = 0; i < N; i++)
      if (m[i] && (!f || a[i] > a[s])) begin
        f = 1'b1;
        s = IW'(i);
      end
    return {f, s};
  endfunction

  logic [N-1:0] m_hit, m_other;
  logic [IW:0]  r_hit, r_other, r_any;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      m_hit[i]   = cand[i] && hit[i];
      m_other[i] = cand[i] && (!last_bank_valid || bank[i] != last_bank);
    end
    r_hit   = oldest(m_hit, age);
    r_other = oldest(m_other, age);
    r_any   = oldest(cand, age);
    if (r_hit[IW]) begin
      sel_valid = 1'b1; sel = r_hit[IW-1:0];   sel_class = 2'd0;
    end else if (r_other[IW]) begin
      sel_valid = 1'b1; sel = r_other[IW-1:0]; sel_class = 2'd1;
    end else begin
      sel_valid = r_any[IW]; sel = r_any[IW-1:0]; sel_class = 2'd2;
    end
  end
endmodule
