// tb_adaptive_mc_planar: the adaptive memory controller test of tb_adaptive_mc, repeated with
// the timings of planar 3D stacked DRAM, whose layers keep conventional DRAM timing:
// tRCD = tCAS = tWR = tRP = 12 ns and tRAS = 36 ns, i.e. 15 and 44 cycles at 1.2 GHz. The
// controller and the DRAM model are both given these timings through their parameters, and
// every latency bound of the test scales with them.
//
// The test itself:
//
// 1. Reordering: four reads like the classic example of out-of-order scheduling
//    (A: bank 0 row 0, B: bank 0 row 1, C: bank 1 row 0, D: bank 0 row 0) arrive back to
//    back. The row conflict B must finish last and the row hit D before it; the whole set
//    must finish faster than the in-order lower bound worked out from the timings.
// 2. Latency: an isolated read to a closed bank must return its first word within
//    tRCD + tCAS + 6 cycles.
// 3. Data: random writes of 1..8 words to random banks / rows, then reads of the same
//    addresses, compared with a shadow memory kept by the testbench.
// The DRAM model must see no timing violation, and the scheduler must have used both the
// row-hit rule and the other-bank rule.
module tb_adaptive_mc_planar;
  import ll_pkg::*;

  // DRAM timings in clock cycles: planar 3D stacked DRAM (12 ns and 36 ns at 1.2 GHz)
  localparam int TRCD = 15, TCAS = 15, TRAS = 44, TRP = 15, TWR = 15;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   aw_valid = 0, aw_ready, w_valid = 0, w_ready, ar_valid = 0, ar_ready;
  logic   r_valid, r_ready = 1, b_valid, b_ready = 1;
  mc_ax_t aw = '0, ar = '0;
  axi_w_t w = '0;
  mc_r_t  r;
  mc_b_t  b;
  logic cs_n, ras_n, cas_n, we_n, dq_oe, dq_in_valid;
  logic [BANK_W-1:0]  ba;
  logic [DADDR_W-1:0] a;
  logic [DATA_W-1:0]  dq_out, dq_in;
  logic ev_hit, ev_il, ev_old;

  adaptive_mc #(.TRCD(TRCD), .TRAS(TRAS), .TRP(TRP), .TWR(TWR)) dut (
    .clk, .rst_n,
    .s_aw_valid(aw_valid), .s_aw_ready(aw_ready), .s_aw(aw),
    .s_w_valid(w_valid), .s_w_ready(w_ready), .s_w(w),
    .s_ar_valid(ar_valid), .s_ar_ready(ar_ready), .s_ar(ar),
    .s_r_valid(r_valid), .s_r_ready(r_ready), .s_r(r),
    .s_b_valid(b_valid), .s_b_ready(b_ready), .s_b(b),
    .dram_cs_n(cs_n), .dram_ras_n(ras_n), .dram_cas_n(cas_n), .dram_we_n(we_n),
    .dram_ba(ba), .dram_a(a), .dram_dq_out(dq_out), .dram_dq_oe(dq_oe),
    .dram_dq_in(dq_in), .dram_dq_in_valid(dq_in_valid),
    .ev_hit, .ev_interleave(ev_il), .ev_oldest(ev_old)
  );

  dram_model #(.TCAS(TCAS), .TRCD(TRCD), .TRAS(TRAS), .TRP(TRP), .TWR(TWR)) mem (
    .clk, .rst_n, .cs_n, .ras_n, .cas_n, .we_n, .ba, .a, .dq_out, .dq_oe, .dq_in, .dq_in_valid
  );

  int checks = 0, failures = 0;
  int n_hit = 0, n_il = 0, n_old = 0;
  longint cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (ev_hit) n_hit++;
    if (ev_il)  n_il++;
    if (ev_old) n_old++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] mk_addr(int bank, int row, int col);
    return {4'd0, 13'(row), 2'(bank), 11'(col), 2'b00};
  endfunction

  // record of returned read words: tag -> first-beat cycle, completion order
  int     done_order [$];
  longint first_cyc [int];
  logic [31:0] rdata_q [int][$];
  int     b_seen [$];

  always @(posedge clk) if (rst_n) begin
    if (r_valid && r_ready) begin
      int t;
      t = int'(r.id.tid);
      if (!first_cyc.exists(t)) first_cyc[t] = cyc;
      rdata_q[t].push_back(r.data);
      if (r.last) done_order.push_back(t);
    end
    if (b_valid && b_ready) b_seen.push_back(int'(b.id.tid));
  end

  task automatic send_ar(int tid, logic [31:0] addr, int len);
    ar.id  = '{src_x: 0, src_y: 0, tid: 4'(tid), sn: 0, len: 3'(len)};
    ar.addr = addr;
    ar.len  = 3'(len);
    @(negedge clk);
    ar_valid = 1;
    #1;
    while (!ar_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 ar_valid = 0;
  endtask

  task automatic send_aw(int tid, logic [31:0] addr, int len, logic [31:0] d []);
    aw.id  = '{src_x: 0, src_y: 0, tid: 4'(tid), sn: 0, len: 3'(len)};
    aw.addr = addr;
    aw.len  = 3'(len);
    @(negedge clk);
    aw_valid = 1;
    #1;
    while (!aw_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 aw_valid = 0;
    for (int i = 0; i <= len; i++) begin
      w.data = d[i];
      w.last = (i == len);
      @(negedge clk);
      w_valid = 1;
      #1;
      while (!w_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      #1;
    end
    w_valid = 0;
  endtask

  logic [31:0] shadow [logic [31:0]];

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, t1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // ---- 2. isolated read latency ----
    t0 = cyc;
    send_ar(9, mk_addr(2, 5, 0), 0);
    while (!(done_order.size() == 1)) @(posedge clk);
    check(first_cyc[9] - t0 <= TRCD + TCAS + 6 && first_cyc[9] - t0 >= TRCD + TCAS,
          $sformatf("isolated read latency %0d", first_cyc[9] - t0));
    done_order.delete();
    repeat (40) @(posedge clk); #1;

    // ---- 1. reordering of four reads ----
    t0 = cyc;
    send_ar(1, mk_addr(0, 0, 0), 3);   // A
    send_ar(2, mk_addr(0, 1, 0), 3);   // B, row conflict
    send_ar(3, mk_addr(1, 0, 0), 3);   // C, other bank
    send_ar(4, mk_addr(0, 0, 8), 3);   // D, row hit on A's row
    while (!(done_order.size() == 4)) @(posedge clk);
    t1 = cyc;
    check(done_order[0] == 1, "A finishes first");
    check(done_order[3] == 2, "row conflict B finishes last");
    foreach (done_order[i]) if (done_order[i] == 4) check(i < 3, "row hit D before B");
    // in order, B's precharge waits for A and tRAS, D needs another PRE + ACT after B:
    // at least 2 x (tRAS + tRP) + tRCD + tCAS cycles.
    check(t1 - t0 < 2 * (TRAS + TRP) + TRCD + TCAS,
          $sformatf("four reads took %0d cycles", t1 - t0));
    done_order.delete();

    // ---- 3. random write / read-back ----
    begin
      logic [31:0] addrs [16];
      int          lens  [16];
      for (int k = 0; k < 16; k++) begin
        logic [31:0] d [];
        addrs[k] = mk_addr($urandom_range(0, 3), $urandom_range(0, 3), 16 * k);
        lens[k]  = $urandom_range(0, 7);
        d = new[lens[k] + 1];
        foreach (d[i]) begin
          d[i] = $urandom;
          shadow[addrs[k] + 32'(4 * i)] = d[i];
        end
        send_aw(k, addrs[k], lens[k], d);
      end
      while (!(b_seen.size() == 16)) @(posedge clk);
      check(1, "all write responses");
      for (int k = 0; k < 16; k++) rdata_q[k].delete();
      for (int k = 0; k < 16; k++) send_ar(k, addrs[k], lens[k]);
      while (!(done_order.size() == 16)) @(posedge clk);
      for (int k = 0; k < 16; k++) begin
        check(rdata_q[k].size() == lens[k] + 1, $sformatf("read %0d length", k));
        foreach (rdata_q[k][i])
          check(rdata_q[k][i] == shadow[addrs[k] + 32'(4 * i)],
                $sformatf("read %0d word %0d data %h", k, i, rdata_q[k][i]));
      end
    end

    check(mem.violations == 0, $sformatf("DRAM timing violations %0d", mem.violations));
    check(n_hit > 0, "row-hit rule used");
    check(n_il > 0,  "other-bank rule used");
    $display("scheduler picks: hit=%0d other-bank=%0d oldest=%0d, DRAM ACT=%0d PRE=%0d RD=%0d WR=%0d",
             n_hit, n_il, n_old, mem.n_act, mem.n_pre, mem.n_rd, mem.n_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
