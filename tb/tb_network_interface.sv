// tb_network_interface: self-checking test of the network interface of tile (0,0).
//
// The testbench plays three roles around the interface:
//  - the processor: it issues reads to a remote tile's memory (several with the same T-ID),
//    reads and writes to the tile's own memory, and checks every R / B it gets back;
//  - the network: it collects the packets the interface sends, answers remote read requests
//    itself with response packets injected in reverse order (so they arrive out of order),
//    and injects a read request and a write request from tile (1,1), checking the response
//    packets that come back;
//  - the memory controller: a simple AXI slave that returns data = f(address) for reads and
//    stores writes.
// Checked: data and order of responses per T-ID (the reorder buffer must have parked and
// released packets), that local requests never show up on the router port, header fields of
// outgoing packets, and credit-correct flow toward the router.
module tb_network_interface;
  import ll_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  function automatic logic [31:0] f(logic [31:0] a);
    return a ^ 32'h5A5A_0F0F;
  endfunction

  // processor side
  logic    s_aw_valid = 0, s_aw_ready, s_w_valid = 0, s_w_ready, s_ar_valid = 0, s_ar_ready;
  logic    s_r_valid, s_r_ready = 1, s_b_valid, s_b_ready = 1;
  axi_ax_t s_aw = '0, s_ar = '0;
  axi_w_t  s_w = '0;
  axi_r_t  s_r;
  axi_b_t  s_b;
  // memory side
  logic    m_aw_valid, m_aw_ready = 1, m_w_valid, m_w_ready = 1, m_ar_valid, m_ar_ready = 1;
  logic    m_r_valid = 0, m_r_ready, m_b_valid = 0, m_b_ready;
  mc_ax_t  m_aw, m_ar;
  axi_w_t  m_w;
  mc_r_t   m_r = '0;
  mc_b_t   m_b = '0;
  // router side
  logic              rt_out_valid, rt_out_vc, rt_in_valid = 0, rt_in_vc = 0;
  flit_t             rt_out_flit, rt_in_flit = '0;
  logic [NUM_VC-1:0] rt_credit_in = '0, rt_credit_out;
  logic ooo_ev, rel_ev, loc_ev;

  network_interface dut (
    .clk, .rst_n, .my_x(2'd0), .my_y(2'd0),
    .s_aw_valid, .s_aw_ready, .s_aw, .s_w_valid, .s_w_ready, .s_w,
    .s_ar_valid, .s_ar_ready, .s_ar, .s_r_valid, .s_r_ready, .s_r,
    .s_b_valid, .s_b_ready, .s_b,
    .m_aw_valid, .m_aw_ready, .m_aw, .m_w_valid, .m_w_ready, .m_w,
    .m_ar_valid, .m_ar_ready, .m_ar, .m_r_valid, .m_r_ready, .m_r,
    .m_b_valid, .m_b_ready, .m_b,
    .rt_out_valid, .rt_out_vc, .rt_out_flit, .rt_credit_in,
    .rt_in_valid, .rt_in_vc, .rt_in_flit, .rt_credit_out,
    .ooo_event(ooo_ev), .release_event(rel_ev), .local_event(loc_ev)
  );

  int checks = 0, failures = 0;
  int n_ooo = 0, n_rel = 0, n_loc = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- router model: collect outgoing packets, return credits ----------------
  flit_t pkt_cur [$];
  flit_t pkts [$][$];
  int    credit_ret [2];
  always @(posedge clk) begin
    rt_credit_in <= '0;
    if (rst_n) begin
      if (ooo_ev) n_ooo++;
      if (rel_ev) n_rel++;
      if (loc_ev) n_loc++;
      if (rt_out_valid) begin
        rt_credit_in[rt_out_vc] <= 1'b1;     // the model drains at once
        pkt_cur.push_back(rt_out_flit);
        if (rt_out_flit.tail) begin
          pkts.push_back(pkt_cur);
          pkt_cur = {};
        end
      end
    end
  end

  // injection into the NI, respecting its packet-queue credits
  int net_cred [2] = '{QUEUE_DEPTH, QUEUE_DEPTH};
  always @(posedge clk) if (rst_n) begin
    for (int v = 0; v < 2; v++) if (rt_credit_out[v]) net_cred[v]++;
  end
  task automatic inject(flit_t p [$], logic vc);
    foreach (p[i]) begin
      while (net_cred[vc] == 0) @(posedge clk);
      #1;
      rt_in_valid = 1; rt_in_vc = vc; rt_in_flit = p[i];
      net_cred[vc]--;
      @(posedge clk);
      #1 rt_in_valid = 0;
    end
  endtask

  // ---------------- memory-controller model ----------------
  logic [31:0] mem_store [logic [31:0]];
  mc_ax_t      rq [$];
  mc_b_t       bq [$];
  logic [31:0] wa;
  int          wi = 0;
  mc_ax_t      waw;
  int          rbeat = 0;
  always @(posedge clk) if (rst_n) begin
    if (m_ar_valid && m_ar_ready) rq.push_back(m_ar);
    if (m_aw_valid && m_aw_ready) begin waw = m_aw; wi = 0; end
    if (m_w_valid && m_w_ready) begin
      mem_store[waw.addr + 32'(4 * wi)] = m_w.data;
      wi++;
      if (m_w.last) bq.push_back('{id: waw.id, resp: 2'b00});
    end
    if (m_r_valid && m_r_ready) begin
      if (m_r.last) begin void'(rq.pop_front()); rbeat = 0; end
      else rbeat++;
    end
    if (m_b_valid && m_b_ready) void'(bq.pop_front());
  end
  always_comb begin
    m_r_valid = rq.size() > 0;
    m_r = '0;
    if (m_r_valid) begin
      m_r.id   = rq[0].id;
      m_r.data = mem_store.exists(rq[0].addr + 32'(4 * rbeat)) ? mem_store[rq[0].addr + 32'(4 * rbeat)]
                                                                : f(rq[0].addr + 32'(4 * rbeat));
      m_r.last = (rbeat == int'(rq[0].len));
    end
    m_b_valid = bq.size() > 0;
    m_b = m_b_valid ? bq[0] : '0;
  end

  // ---------------- processor model: response collection ----------------
  logic [31:0] got [int][$];     // T-ID -> words in arrival order
  int          got_b [$];
  always @(posedge clk) if (rst_n) begin
    if (s_r_valid && s_r_ready) got[int'(s_r.id)].push_back(s_r.data);
    if (s_b_valid && s_b_ready) got_b.push_back(int'(s_b.id));
  end

  task automatic p_read(int tid, logic [31:0] addr, int len);
    #1 s_ar = '{id: 4'(tid), addr: addr, len: 3'(len)};
    @(negedge clk);
    s_ar_valid = 1;
    #1;
    while (!s_ar_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 s_ar_valid = 0;
  endtask

  task automatic p_write(int tid, logic [31:0] addr, int len, logic [31:0] base);
    #1 s_aw = '{id: 4'(tid), addr: addr, len: 3'(len)};
    @(negedge clk);
    s_aw_valid = 1;
    #1;
    while (!s_aw_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 s_aw_valid = 0;
    for (int i = 0; i <= len; i++) begin
      s_w = '{data: base + 32'(i), last: (i == len)};
      @(negedge clk);
      s_w_valid = 1;
      #1;
      while (!s_w_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      #1;
    end
    s_w_valid = 0;
  endtask

  function automatic flit_t mkf(logic h, logic t, logic [31:0] d);
    return '{head: h, tail: t, data: d};
  endfunction

  initial begin
    head_t h;
    logic [31:0] raddr [4];
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);

    // ---- remote reads, T-ID 3 four times (node 5 = x1,y1), answered in reverse order ----
    for (int k = 0; k < 4; k++) begin
      raddr[k] = 32'h5000_0000 + 32'(k * 32'h100);
      p_read(3, raddr[k], 1);
    end
    while (!(pkts.size() == 4)) @(posedge clk);
    for (int k = 0; k < 4; k++) begin
      h = head_t'(pkts[k][0].data);
      check(pkts[k].size() == 2 && h.dst_x == 1 && h.dst_y == 1 && !h.resp && !h.write &&
            h.tid == 3 && h.sn == 3'(k) && pkts[k][1].data == raddr[k],
            $sformatf("request packet %0d format", k));
    end
    for (int k = 3; k >= 0; k--) begin
      flit_t p [$];
      head_t rh;
      p  = {};
      rh = '0;
      rh.dst_x = 0; rh.dst_y = 0; rh.src_x = 1; rh.src_y = 1;
      rh.resp = 1; rh.tid = 3; rh.sn = 3'(k); rh.len = 1;
      p.push_back(mkf(1, 0, rh));
      p.push_back(mkf(0, 0, f(raddr[k])));
      p.push_back(mkf(0, 1, f(raddr[k] + 4)));
      inject(p, 1'b1);
    end
    while (!(got[3].size() == 8)) @(posedge clk);
    for (int k = 0; k < 4; k++) begin
      check(got[3][2*k] == f(raddr[k]) && got[3][2*k+1] == f(raddr[k] + 4),
            $sformatf("remote read %0d returned in order", k));
    end
    check(n_ooo >= 3, $sformatf("responses parked in reorder buffer: %0d", n_ooo));
    check(n_rel >= 3, $sformatf("responses released from reorder buffer: %0d", n_rel));
    pkts = {};

    // ---- local write then local read (node 0): must bypass the router ----
    p_write(5, 32'h0000_4000, 3, 32'hC0DE_0000);
    while (!(got_b.size() == 1)) @(posedge clk);
    check(got_b[0] == 5, "local write response T-ID");
    p_read(6, 32'h0000_4000, 3);
    while (!(got[6].size() == 4)) @(posedge clk);
    for (int i = 0; i < 4; i++)
      check(got[6][i] == 32'hC0DE_0000 + 32'(i), $sformatf("local read word %0d", i));
    check(pkts.size() == 0, "local traffic stayed off the network");
    check(n_loc >= 4, $sformatf("local channel packets %0d", n_loc));

    // ---- remote requests arriving from tile (1,1): read then write ----
    begin
      flit_t p [$];
      head_t qh;
      p  = {};
      qh = '0;
      qh.dst_x = 0; qh.dst_y = 0; qh.src_x = 1; qh.src_y = 1; qh.tid = 7; qh.sn = 2; qh.len = 2;
      p.push_back(mkf(1, 0, qh));
      p.push_back(mkf(0, 1, 32'h0000_8000));
      inject(p, 1'b0);
      while (!(pkts.size() == 1)) @(posedge clk);
      h = head_t'(pkts[0][0].data);
      check(h.resp && !h.write && h.dst_x == 1 && h.dst_y == 1 && h.tid == 7 && h.sn == 2 &&
            pkts[0].size() == 4, "remote read response header");
      for (int i = 0; i < 3; i++)
        check(pkts[0][i+1].data == f(32'h0000_8000 + 32'(4 * i)), $sformatf("remote read data %0d", i));
      p = {};
      qh.write = 1; qh.len = 0; qh.sn = 3;
      p.push_back(mkf(1, 0, qh));
      p.push_back(mkf(0, 0, 32'h0000_9000));
      p.push_back(mkf(0, 1, 32'h1234_5678));
      inject(p, 1'b0);
      while (!(pkts.size() == 2)) @(posedge clk);
      h = head_t'(pkts[1][0].data);
      check(h.resp && h.write && h.tid == 7 && h.sn == 3 && pkts[1].size() == 1,
            "remote write response");
      check(mem_store[32'h0000_9000] == 32'h1234_5678, "remote write reached memory");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
