// tb_logic_layer_top: end-to-end test of the full 4x4 logic-layer platform at its default
// configuration.
//
// Every tile gets a processor model (proc_model) and a DRAM rank model (dram_model). First
// all processors run uniform random traffic, then a second round runs the non-uniform
// profile (70 % of requests to a memory one hop away). Each processor writes bursts to
// memories all over the mesh and reads them back with out-of-order-prone T-IDs, checking
// every word. The testbench counts how often each mechanism of the design fired and fails
// if one never did: response parked in and released from a reorder buffer, a packet taking
// the direct local channel, scheduler picks by the row-hit rule, by the other-bank rule and
// by plain age, and back-pressure (a router input VC full). DRAM timing must never be
// violated.
module tb_logic_layer_top;
  import ll_pkg::*;

  localparam int NW = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    p_aw_valid [NUM_NODES], p_aw_ready [NUM_NODES];
  axi_ax_t p_aw       [NUM_NODES];
  logic    p_w_valid  [NUM_NODES], p_w_ready  [NUM_NODES];
  axi_w_t  p_w        [NUM_NODES];
  logic    p_ar_valid [NUM_NODES], p_ar_ready [NUM_NODES];
  axi_ax_t p_ar       [NUM_NODES];
  logic    p_r_valid  [NUM_NODES], p_r_ready  [NUM_NODES];
  axi_r_t  p_r        [NUM_NODES];
  logic    p_b_valid  [NUM_NODES], p_b_ready  [NUM_NODES];
  axi_b_t  p_b        [NUM_NODES];
  logic    cs_n [NUM_NODES], ras_n [NUM_NODES], cas_n [NUM_NODES], we_n [NUM_NODES];
  logic [BANK_W-1:0]  ba [NUM_NODES];
  logic [DADDR_W-1:0] a  [NUM_NODES];
  logic [DATA_W-1:0]  dq_out [NUM_NODES], dq_in [NUM_NODES];
  logic    dq_oe [NUM_NODES], dq_in_valid [NUM_NODES];
  logic [5:0] ev [NUM_NODES];

  logic_layer_top dut (
    .clk, .rst_n,
    .p_aw_valid, .p_aw_ready, .p_aw, .p_w_valid, .p_w_ready, .p_w,
    .p_ar_valid, .p_ar_ready, .p_ar, .p_r_valid, .p_r_ready, .p_r,
    .p_b_valid, .p_b_ready, .p_b,
    .dram_cs_n(cs_n), .dram_ras_n(ras_n), .dram_cas_n(cas_n), .dram_we_n(we_n),
    .dram_ba(ba), .dram_a(a), .dram_dq_out(dq_out), .dram_dq_oe(dq_oe),
    .dram_dq_in(dq_in), .dram_dq_in_valid(dq_in_valid), .ev
  );

  logic done_u [NUM_NODES], done_n [NUM_NODES];
  int   chk_u [NUM_NODES], err_u [NUM_NODES], chk_n [NUM_NODES], err_n [NUM_NODES];
  logic rst_u = 1'b0, rst_n2 = 1'b0;
  int   viol [NUM_NODES];

  // processors: a uniform-traffic model and a non-uniform one per tile, run one after the
  // other; the active one drives the tile's AXI port.
  for (genvar n = 0; n < NUM_NODES; n++) begin : g_n
    logic    aw_v [2], w_v [2], ar_v [2], r_r [2], b_r [2];
    axi_ax_t aw_d [2], ar_d [2];
    axi_w_t  w_d  [2];
    logic    sel;
    assign sel = done_u[n];

    proc_model #(.NODE(n), .NW(NW), .LOCAL_PCT(0)) u_pu (
      .clk, .rst_n(rst_u),
      .aw_valid(aw_v[0]), .aw_ready(p_aw_ready[n] && !sel), .aw(aw_d[0]),
      .w_valid(w_v[0]),   .w_ready(p_w_ready[n] && !sel),   .w(w_d[0]),
      .ar_valid(ar_v[0]), .ar_ready(p_ar_ready[n] && !sel), .ar(ar_d[0]),
      .r_valid(p_r_valid[n] && !sel), .r_ready(r_r[0]), .r(p_r[n]),
      .b_valid(p_b_valid[n] && !sel), .b_ready(b_r[0]), .b(p_b[n]),
      .done(done_u[n]), .checks(chk_u[n]), .errors(err_u[n])
    );
    proc_model #(.NODE(n), .NW(NW), .LOCAL_PCT(70)) u_pn (
      .clk, .rst_n(rst_n2),
      .aw_valid(aw_v[1]), .aw_ready(p_aw_ready[n] && sel), .aw(aw_d[1]),
      .w_valid(w_v[1]),   .w_ready(p_w_ready[n] && sel),   .w(w_d[1]),
      .ar_valid(ar_v[1]), .ar_ready(p_ar_ready[n] && sel), .ar(ar_d[1]),
      .r_valid(p_r_valid[n] && sel), .r_ready(r_r[1]), .r(p_r[n]),
      .b_valid(p_b_valid[n] && sel), .b_ready(b_r[1]), .b(p_b[n]),
      .done(done_n[n]), .checks(chk_n[n]), .errors(err_n[n])
    );
    assign p_aw_valid[n] = sel ? aw_v[1] : aw_v[0];
    assign p_aw[n]       = sel ? aw_d[1] : aw_d[0];
    assign p_w_valid[n]  = sel ? w_v[1]  : w_v[0];
    assign p_w[n]        = sel ? w_d[1]  : w_d[0];
    assign p_ar_valid[n] = sel ? ar_v[1] : ar_v[0];
    assign p_ar[n]       = sel ? ar_d[1] : ar_d[0];
    assign p_r_ready[n]  = sel ? r_r[1]  : r_r[0];
    assign p_b_ready[n]  = sel ? b_r[1]  : b_r[0];

    dram_model u_mem (
      .clk, .rst_n, .cs_n(cs_n[n]), .ras_n(ras_n[n]), .cas_n(cas_n[n]), .we_n(we_n[n]),
      .ba(ba[n]), .a(a[n]), .dq_out(dq_out[n]), .dq_oe(dq_oe[n]),
      .dq_in(dq_in[n]), .dq_in_valid(dq_in_valid[n])
    );
    assign viol[n] = u_mem.violations;
  end

  // mechanism counters
  int n_ev [6];
  int n_full = 0;
  longint cyc = 0;
  initial n_ev = '{0, 0, 0, 0, 0, 0};
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    for (int n = 0; n < NUM_NODES; n++)
      for (int e = 0; e < 6; e++) if (ev[n][e]) n_ev[e]++;
  end
  // back-pressure: some router input VC buffer is full
  for (genvar n = 0; n < NUM_NODES; n++) begin : g_bp
    for (genvar p = 0; p < NUM_PORTS; p++) begin : g_p
      for (genvar v = 0; v < NUM_VC; v++) begin : g_v
        always @(posedge clk)
          if (rst_n && dut.g_y[n / MESH_X].g_x[n % MESH_X].u_node.u_router.g_ic[p].u_ic.g_vc[v].full)
            n_full++;
      end
    end
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit all_set(logic d [NUM_NODES]);
    foreach (d[i]) if (!d[i]) return 0;
    return 1;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    rst_u = 1;
    t0 = cyc;
    while (!all_set(done_u)) @(posedge clk);
    $display("uniform round: %0d cycles", cyc - t0);
    #1 rst_n2 = 1;
    t0 = cyc;
    while (!all_set(done_n)) @(posedge clk);
    $display("non-uniform round: %0d cycles", cyc - t0);
    repeat (50) @(posedge clk);
    for (int n = 0; n < NUM_NODES; n++) begin
      check(err_u[n] == 0 && chk_u[n] > 0, $sformatf("tile %0d uniform reads (%0d words)", n, chk_u[n]));
      check(err_n[n] == 0 && chk_n[n] > 0, $sformatf("tile %0d non-uniform reads (%0d words)", n, chk_n[n]));
      check(viol[n] == 0, $sformatf("tile %0d DRAM timing", n));
      checks += chk_u[n] + chk_n[n];
    end
    $display("events: parked=%0d released=%0d local=%0d row-hit=%0d other-bank=%0d oldest=%0d vc-full=%0d",
             n_ev[0], n_ev[1], n_ev[2], n_ev[3], n_ev[4], n_ev[5], n_full);
    check(n_ev[0] > 0, "reorder buffer parked a response");
    check(n_ev[1] > 0, "reorder buffer released a response");
    check(n_ev[2] > 0, "direct local channel used");
    check(n_ev[3] > 0, "scheduler row-hit rule used");
    check(n_ev[4] > 0, "scheduler other-bank rule used");
    check(n_ev[5] > 0, "scheduler oldest rule used");
    check(n_full > 0,  "back-pressure on a router buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
