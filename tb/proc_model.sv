// proc_model: traffic-generating processor model for the mesh testbench (simulation only).
//
// It stands in for a tile's 32-bit AXI processor. Phase 1: NW write bursts of 1..8 words to
// random tiles, each followed by its write response. Phase 2: reads of everything it wrote,
// issued back to back (up to the interface's outstanding limit) with only two T-IDs so that
// responses of one ID come from different tiles and return out of order through the
// network. Every read word is compared with what was written, and responses of each T-ID
// must return in issue order. The destination is uniform over all tiles, or, with
// LOCAL_PCT > 0, one hop away from the tile with that probability in percent (the
// non-uniform traffic profile). Each processor writes into its own row of every bank so
// processors never overwrite one another.
module proc_model
  import ll_pkg::*;
#(
  parameter int NODE      = 0,
  parameter int NW        = 8,
  parameter int LOCAL_PCT = 0
) (
  input  logic    clk,
  input  logic    rst_n,
  output logic    aw_valid,
  input  logic    aw_ready,
  output axi_ax_t aw,
  output logic    w_valid,
  input  logic    w_ready,
  output axi_w_t  w,
  output logic    ar_valid,
  input  logic    ar_ready,
  output axi_ax_t ar,
  input  logic    r_valid,
  output logic    r_ready,
  input  axi_r_t  r,
  input  logic    b_valid,
  output logic    b_ready,
  input  axi_b_t  b,
  output logic    done,
  output int      checks,
  output int      errors
);
  localparam int X = NODE % MESH_X, Y = NODE / MESH_X;

  logic [31:0] shadow [logic [31:0]];
  logic [31:0] waddr [NW];
  int          wlen  [NW];
  int          nb = 0;
  typedef struct { logic [31:0] addr; int len; } rd_t;
  rd_t         pend [2][$];
  int          beat [2];
  int          rdone = 0;

  initial begin
    aw_valid = 0; w_valid = 0; ar_valid = 0; r_ready = 1; b_ready = 1;
    aw = '0; w = '0; ar = '0; done = 0; checks = 0; errors = 0;
    beat = '{0, 0};
  end

  function automatic int pick_node();
    if (LOCAL_PCT > 0 && $urandom_range(0, 99) < LOCAL_PCT) begin
      int nx, ny;
      do begin
        nx = X; ny = Y;
        case ($urandom_range(0, 3))
          0: nx = X + 1;
          1: nx = X - 1;
          2: ny = Y + 1;
          default: ny = Y - 1;
        endcase
      end while (nx < 0 || nx >= MESH_X || ny < 0 || ny >= MESH_Y);
      return ny * MESH_X + nx;
    end
    return $urandom_range(0, NUM_NODES - 1);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (b_valid && b_ready) nb++;
    if (r_valid && r_ready) begin
      int t;
      rd_t e;
      t = int'(r.id[0]);
      checks++;
      if (pend[t].size() == 0) begin
        errors++;
        $display("FAIL: node %0d unexpected read data", NODE);
      end else begin
        e = pend[t][0];
        if (r.data !== shadow[e.addr + 32'(4 * beat[t])] ||
            r.last != (beat[t] == e.len)) begin
          errors++;
          $display("FAIL: node %0d read %h word %0d got %h", NODE, e.addr, beat[t], r.data);
        end
        if (r.last) begin
          void'(pend[t].pop_front());
          beat[t] = 0;
          rdone++;
        end else beat[t]++;
      end
    end
  end

  initial begin
    while (!rst_n) @(posedge clk);
    repeat (2) @(posedge clk);
    for (int k = 0; k < NW; k++) begin
      int n, bank, col;
      n    = pick_node();
      bank = $urandom_range(0, 3);
      col  = 16 * k;
      waddr[k] = {4'(n), 13'(NODE), 2'(bank), 11'(col), 2'b00};
      wlen[k]  = $urandom_range(0, 7);
      #1 aw = '{id: 4'(k % 2), addr: waddr[k], len: 3'(wlen[k])};
      @(negedge clk);
      aw_valid = 1;
      #1;
      while (!aw_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      #1 aw_valid = 0;
      for (int i = 0; i <= wlen[k]; i++) begin
        logic [31:0] d;
        d = $urandom;
        shadow[waddr[k] + 32'(4 * i)] = d;
        w = '{data: d, last: (i == wlen[k])};
        @(negedge clk);
        w_valid = 1;
        #1;
        while (!w_ready) begin @(negedge clk); #1; end
        @(posedge clk);
        #1;
      end
      w_valid = 0;
      while (nb < k + 1) @(posedge clk);
    end
    for (int k = 0; k < NW; k++) begin
      int j;
      j = (k * 5) % NW;   // a permutation when NW is not a multiple of 5
      #1 ar = '{id: 4'(k % 2), addr: waddr[j], len: 3'(wlen[j])};
      pend[k % 2].push_back('{addr: waddr[j], len: wlen[j]});
      @(negedge clk);
      ar_valid = 1;
      #1;
      while (!ar_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      #1 ar_valid = 0;
    end
    while (rdone < NW) @(posedge clk);
    done = 1;
  end
endmodule
