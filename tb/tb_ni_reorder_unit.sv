// tb_ni_reorder_unit: self-checking unit test of the NI reorder unit.
//
// Each round takes 1 to 6 sequence numbers (random T-IDs 0..2) through the forward-path port,
// exactly as the packetizer does, and checks that the numbers per T-ID count up and that
// can_issue drops once six requests are outstanding. It then feeds the matching response
// packets (head + 0..8 random data words) into the reverse-path port in a random order, with
// random gaps on the input and random back-pressure on the output. The monitor checks that
// every packet leaves exactly once, unchanged, and that per T-ID the packets leave in the
// order their sequence numbers were handed out. The run also requires that packets were
// parked and released. Input is driven and output sampled with nonblocking assignments on the
// rising edge; the forward-path port is driven on falling edges. Watchdog: 200000 cycles.
module tb_ni_reorder_unit;
  import ll_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [TID_W-1:0] sn_tid;
  logic [SN_W-1:0]  sn;
  logic             sn_take, can_issue;
  logic             in_valid, in_ready, out_valid, out_ready;
  flit_t            in_flit, out_flit;
  logic             ooo_event, release_event;

  ni_reorder_unit dut (.*);

  int checks = 0, failures = 0, n_ooo = 0, n_rel = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [TID_W-1:0] tid; logic [SN_W-1:0] sn; int n; logic [31:0] d [8]; } pkt_t;
  pkt_t  issued [$];            // this round's requests, in issue order
  int    order  [3][$];         // per T-ID: indexes into issued, in issue order
  flit_t inq    [$];
  int    delivered = 0;

  // reverse-path input driver
  always @(posedge clk) begin
    if (!rst_n) begin
      in_valid <= 1'b0;
      in_flit  <= '0;
    end else begin
      bit go;
      if (in_valid && in_ready) void'(inq.pop_front());
      go = (in_valid && !in_ready) || ($urandom_range(0, 3) != 0);
      in_valid <= go && (inq.size() > 0);
      in_flit  <= (inq.size() > 0) ? inq[0] : '0;
    end
  end

  // output monitor
  flit_t cur [$];
  always @(posedge clk) begin
    if (!rst_n) begin
      out_ready <= 1'b0;
    end else begin
      out_ready <= ($urandom_range(0, 4) != 0);
      if (ooo_event) n_ooo++;
      if (release_event) n_rel++;
      if (out_valid && out_ready) begin
        cur.push_back(out_flit);
        if (out_flit.tail) begin
          head_t h;
          int    k;
          h = head_t'(cur[0].data);
          check(cur[0].head && h.resp, "first flit of a packet is a response head");
          check(h.tid < 3 && order[h.tid].size() > 0, "packet of an outstanding T-ID");
          if (h.tid < 3 && order[h.tid].size() > 0) begin
            k = order[h.tid].pop_front();
            check(issued[k].sn == h.sn, $sformatf("T-ID %0d in issue order (got S-N %0d, want %0d)",
                                                  h.tid, h.sn, issued[k].sn));
            check(cur.size() == issued[k].n + 1, "packet length");
            for (int i = 1; i < cur.size() && i <= issued[k].n; i++)
              check(cur[i].data == issued[k].d[i-1] && !cur[i].head, "data word");
          end
          cur = {};
          delivered++;
        end
      end
    end
  end

  initial begin
    sn_tid = '0; sn_take = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int round = 0; round < 300; round++) begin
      int k;
      int perm [$];
      k = $urandom_range(1, MAX_OUTSTANDING);
      issued = {};
      perm = {};
      delivered = 0;
      for (int i = 0; i < k; i++) begin
        pkt_t p;
        @(negedge clk);
        check(can_issue, "can_issue while fewer than 6 are outstanding");
        p.tid = TID_W'($urandom_range(0, 2));
        sn_tid = p.tid;
        #1;
        p.sn = sn;
        p.n  = $urandom_range(0, 8);
        for (int j = 0; j < 8; j++) p.d[j] = $urandom;
        sn_take = 1'b1;
        @(negedge clk);
        sn_take = 1'b0;
        foreach (issued[q]) if (issued[q].tid == p.tid)
          check(p.sn != issued[q].sn, "S-N of one T-ID unique among outstanding requests");
        order[p.tid].push_back(issued.size());
        issued.push_back(p);
      end
      #1;
      check(can_issue == (k < MAX_OUTSTANDING), "can_issue reflects the outstanding limit");
      // responses in random order
      for (int i = 0; i < k; i++) perm.push_back(i);
      perm.shuffle();
      foreach (perm[i]) begin
        pkt_t  p;
        head_t h;
        p = issued[perm[i]];
        h = '0;
        h.resp = 1'b1; h.write = (p.n == 0); h.tid = p.tid; h.sn = p.sn;
        h.len = LEN_W'(p.n == 0 ? 0 : p.n - 1);
        inq.push_back('{head: 1'b1, tail: (p.n == 0), data: h});
        for (int j = 0; j < p.n; j++)
          inq.push_back('{head: 1'b0, tail: (j == p.n - 1), data: p.d[j]});
      end
      while (delivered < k) @(negedge clk);
      for (int t = 0; t < 3; t++) check(order[t].size() == 0, "every packet delivered");
    end
    repeat (3) @(negedge clk);
    check(can_issue, "nothing outstanding at the end");
    check(n_ooo > 0, "packets were parked in the reorder buffer");
    check(n_rel > 0, "parked packets were released");
    $display("parked=%0d released=%0d", n_ooo, n_rel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
