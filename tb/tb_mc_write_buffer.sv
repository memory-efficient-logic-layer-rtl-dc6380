// tb_mc_write_buffer: self-checking unit test of the linked-list write data buffer.
//
// A writer stores bursts of 1 to 8 random words as chains (wr_first on the first word) while a
// reader, at the same time, walks completed chains word by word, checking every word, the
// rd_next link to the following word, and freeing it. Writes and frees are random and often fall in the same
// cycle. A reference model keeps which words are in use and the pointers and data of every
// chain. It checks that a new word always lands on the lowest free index, that free_cnt is
// right, that chains link correctly and return their data in order, and that the buffer
// fills completely at least once. Inputs change on falling edges, outputs are checked 1 ns
// later, and the model updates on the rising edge. Watchdog: 100000 cycles.
module tb_mc_write_buffer;
  import ll_pkg::*;

  localparam int DEPTH = QUEUE_DEPTH;
  localparam int PW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                       wr_en, wr_first, free_en;
  logic [DATA_W-1:0]          wr_data, rd_data;
  logic [PW-1:0]              alloc_ptr, rd_ptr, rd_next, free_ptr;
  logic [$clog2(DEPTH+1)-1:0] free_cnt;

  mc_write_buffer #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_both = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int ptr [$]; logic [31:0] d [$]; } chain_t;
  bit     used [DEPTH];
  chain_t done [$];        // completed chains, oldest first
  chain_t open;            // chain being written
  int     open_left = 0;   // words still to write in the open chain
  int     rd_pos = 0;      // position inside done[0] of the reader

  initial begin
    wr_en = 0; wr_first = 0; wr_data = '0; rd_ptr = '0; free_en = 0; free_ptr = '0;
    foreach (used[i]) used[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int nfree, lowest;
      bit do_wr, do_rd;
      @(negedge clk);
      nfree = 0; lowest = -1;
      for (int i = DEPTH - 1; i >= 0; i--) if (!used[i]) begin nfree++; lowest = i; end
      if (nfree == 0) n_full++;
      // writer
      do_wr = (nfree > 0) && ($urandom_range(0, 2) != 0);
      wr_en = do_wr;
      wr_first = 1'b0;
      wr_data = $urandom;
      if (do_wr && open_left == 0) begin
        open_left = $urandom_range(1, 8);
        wr_first = 1'b1;
        open.ptr = {}; open.d = {};
      end
      // reader: walk the oldest completed chain, one word per cycle
      do_rd = (done.size() > 0) && ($urandom_range(0, 2) == 0);
      free_en = do_rd;
      if (done.size() > 0) begin
        if (rd_pos == 0) rd_ptr = PW'(done[0].ptr[0]);
        free_ptr = rd_ptr;
      end
      if (do_wr && do_rd) n_both++;
      #1;
      check(int'(free_cnt) == nfree, "free_cnt");
      if (nfree > 0) check(int'(alloc_ptr) == lowest, "allocation takes the lowest free word");
      if (done.size() > 0) begin
        check(int'(rd_ptr) == done[0].ptr[rd_pos], "chain pointer");
        check(rd_data == done[0].d[rd_pos], "chain data");
        if (rd_pos + 1 < done[0].ptr.size())
          check(int'(rd_next) == done[0].ptr[rd_pos + 1], "rd_next links to the next word");
      end
      @(posedge clk);
      // model update
      if (do_rd) begin
        used[done[0].ptr[rd_pos]] = 0;
        if (rd_pos + 1 < done[0].ptr.size()) begin
          rd_ptr = PW'(done[0].ptr[rd_pos + 1]);
          rd_pos++;
        end else begin
          void'(done.pop_front());
          rd_pos = 0;
        end
      end
      if (do_wr) begin
        used[lowest] = 1;
        open.ptr.push_back(lowest);
        open.d.push_back(wr_data);
        open_left--;
        if (open_left == 0) done.push_back(open);
      end
    end
    check(n_full > 0, "buffer filled completely at least once");
    check(n_both > 0, "allocation and free in the same cycle");
    $display("full=%0d same-cycle=%0d", n_full, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
