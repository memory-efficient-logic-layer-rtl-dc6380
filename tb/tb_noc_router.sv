// tb_noc_router: self-checking test of the 5-port VC router placed at (1,1) of a 4x4 mesh.
//
// All five inputs inject random packets at once (random destination tile, random VC, 1 to
// 5 flits), honouring the credits the router returns. The neighbours modelled by the
// testbench sink every flit and return its credit one cycle later, except that the east
// neighbour stops returning credits for a while to force back-pressure. Checked for every
// packet: it leaves on the port XY routing prescribes (computed here independently), on its
// own VC, with all flits in order and not interleaved with another packet of the same VC.
// Also checked: an isolated head flit driven in cycle 0 is on the output link in cycle 4
// (buffer write, route computation, VC allocation, switch allocation + traversal), output contention occurred
// and was resolved, and every credit is returned.
module tb_noc_router;
  import ll_pkg::*;

  localparam int MX = 1, MY = 1, NPKT = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              in_valid [NUM_PORTS], in_vc [NUM_PORTS];
  flit_t             in_flit  [NUM_PORTS];
  logic [NUM_VC-1:0] credit_out [NUM_PORTS], credit_in [NUM_PORTS];
  logic              out_valid [NUM_PORTS], out_vc [NUM_PORTS];
  flit_t             out_flit  [NUM_PORTS];

  noc_router dut (
    .clk, .rst_n, .my_x(2'(MX)), .my_y(2'(MY)), .in_valid, .in_vc, .in_flit, .credit_out,
    .out_valid, .out_vc, .out_flit, .credit_in
  );

  int checks = 0, failures = 0;
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

  function automatic int xy(int dx, int dy);
    if (dx > MX) return 2;
    if (dx < MX) return 4;
    if (dy > MY) return 3;
    if (dy < MY) return 1;
    return 0;
  endfunction

  // expected packets by id
  int exp_port [int];
  int exp_vc   [int];
  int exp_len  [int];
  int recv_pkts = 0;
  bit hold_east = 0;
  int contention = 0;

  // sinks
  int cur_id  [NUM_PORTS][NUM_VC];
  int cur_idx [NUM_PORTS][NUM_VC];
  logic [NUM_VC-1:0] ret_q [NUM_PORTS];
  int  east_owed [NUM_VC];
  initial begin
    for (int p = 0; p < NUM_PORTS; p++) for (int v = 0; v < NUM_VC; v++) cur_id[p][v] = -1;
    east_owed = '{0, 0};
  end

  always @(posedge clk) begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      logic [NUM_VC-1:0] ret;
      ret = '0;
      if (rst_n && out_valid[p]) begin
        int v;
        v = int'(out_vc[p]);
        if (out_flit[p].head) begin
          head_t h;
          int id;
          h  = head_t'(out_flit[p].data);
          id = int'(h.rsvd);
          check(cur_id[p][v] == -1, "head only between packets on a VC");
          check(exp_port.exists(id) && exp_port[id] == p && exp_vc[id] == v,
                $sformatf("packet %0d on port %0d vc %0d", id, p, v));
          cur_id[p][v]  = id;
          cur_idx[p][v] = 0;
        end else begin
          cur_idx[p][v]++;
          check(out_flit[p].data == {16'(cur_id[p][v]), 16'(cur_idx[p][v])},
                $sformatf("body flit of packet %0d", cur_id[p][v]));
        end
        if (out_flit[p].tail) begin
          check(cur_idx[p][v] + 1 == exp_len[cur_id[p][v]], "packet length");
          cur_id[p][v] = -1;
          recv_pkts++;
        end
        if (p == 2 && hold_east) east_owed[v]++;
        else ret[v] = 1'b1;
      end
      if (p == 2 && !hold_east) begin
        for (int v = 0; v < NUM_VC; v++) if (east_owed[v] > 0) begin
          ret[v] = 1'b1; east_owed[v]--;
        end
      end
      credit_in[p] <= ret;
    end
  end

  // contention: two inputs hold a flit routed to the same output in the same cycle
  always @(posedge clk) if (rst_n) begin
    int want [NUM_PORTS];
    want = '{0, 0, 0, 0, 0};
    for (int i = 0; i < NUM_PORTS; i++)
      for (int v = 0; v < NUM_VC; v++)
        if (dut.active[i][v] && dut.head_valid[i][v]) want[int'(dut.route[i][v])]++;
    foreach (want[p]) if (want[p] > 1) contention++;
  end

  // sources
  int cred [NUM_PORTS][NUM_VC];
  always @(posedge clk) if (rst_n)
    for (int p = 0; p < NUM_PORTS; p++)
      for (int v = 0; v < NUM_VC; v++) if (credit_out[p][v]) cred[p][v]++;

  int next_id = 1;
  task automatic source(int p);
    for (int k = 0; k < NPKT; k++) begin
      int id, dx, dy, len, v;
      head_t h;
      id = next_id++;
      dx = $urandom_range(0, 3);
      dy = $urandom_range(0, 3);
      v  = $urandom_range(0, 1);
      len = $urandom_range(1, 5);
      // an input never sends a packet back where it came from
      while ((p == 1 && xy(dx, dy) == 1) || (p == 2 && xy(dx, dy) == 2) ||
             (p == 3 && xy(dx, dy) == 3) || (p == 4 && xy(dx, dy) == 4)) begin
        dx = $urandom_range(0, 3);
        dy = $urandom_range(0, 3);
      end
      exp_port[id] = xy(dx, dy);
      exp_vc[id]   = v;
      exp_len[id]  = len;
      h = '0;
      h.dst_x = 2'(dx); h.dst_y = 2'(dy); h.rsvd = 10'(id);
      for (int i = 0; i < len; i++) begin
        while (cred[p][v] == 0) @(posedge clk);
        #1;
        in_valid[p] = 1;
        in_vc[p]    = 1'(v);
        in_flit[p]  = '{head: (i == 0), tail: (i == len - 1),
                        data: (i == 0) ? 32'(h) : {16'(id), 16'(i)}};
        cred[p][v]--;
        @(posedge clk);
        #1 in_valid[p] = 0;
        if ($urandom_range(0, 3) == 0) @(posedge clk);
      end
    end
  endtask

  initial begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      in_valid[p] = 0; in_vc[p] = 0; in_flit[p] = '0; credit_in[p] = '0;
      for (int v = 0; v < NUM_VC; v++) cred[p][v] = VC_DEPTH;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);

    // isolated single-flit packet: local in -> east out, latency in cycles
    begin
      head_t h;
      int t;
      h = '0; h.dst_x = 2; h.dst_y = 1; h.rsvd = 10'(1000);
      exp_port[1000] = 2; exp_vc[1000] = 0; exp_len[1000] = 1;
      #1 in_valid[0] = 1; in_flit[0] = '{head: 1, tail: 1, data: 32'(h)}; in_vc[0] = 0;
      cred[0][0]--;
      @(posedge clk); #1 in_valid[0] = 0;
      t = 1;
      while (!out_valid[2]) begin @(posedge clk); t++; end
      check(t == 5, $sformatf("single flit crossed in %0d cycles after injection", t));
      @(posedge clk);
    end

    hold_east = 1;
    fork
      source(0); source(1); source(2); source(3); source(4);
      begin repeat (200) @(posedge clk); hold_east = 0; end
    join
    while (recv_pkts < 5 * NPKT + 1) @(posedge clk);
    repeat (5) @(posedge clk);
    check(contention > 0, $sformatf("output contention cycles %0d", contention));
    for (int p = 0; p < NUM_PORTS; p++)
      for (int v = 0; v < NUM_VC; v++)
        check(cred[p][v] == VC_DEPTH, $sformatf("credits of port %0d vc %0d returned", p, v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
