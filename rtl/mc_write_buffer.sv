// mc_write_buffer: the memory controller's shared write-data buffer, kept as linked lists.
//
// Every write request owns a chain of words: its request-table entry holds the pointer to
// the chain's first word, and each word holds the pointer to the next. Words are allocated
// one per incoming write beat (wr_en; wr_first starts a new chain) from a free map, so
// requests of any burst length share the DEPTH words without fixed partitions; alloc_ptr
// names the word used this cycle. The read side is combinational: rd_ptr selects a word,
// rd_data and rd_next show its data and successor; free_en returns a word to the free map.
// Allocation and freeing may happen in the same cycle. free_cnt counts free words.
// Linked-list data buffers and the 8 x 32-bit size follow the design; the free map is this
// design's own.
module mc_write_buffer
  import ll_pkg::*;
#(
  parameter int DEPTH = QUEUE_DEPTH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic                       wr_first,
  input  logic [DATA_W-1:0]          wr_data,
  output logic [$clog2(DEPTH)-1:0]   alloc_ptr,
  input  logic [$clog2(DEPTH)-1:0]   rd_ptr,
  output logic [DATA_W-1:0]          rd_data,
  output logic [$clog2(DEPTH)-1:0]   rd_next,
  input  logic                       free_en,
  input  logic [$clog2(DEPTH)-1:0]   free_ptr,
  output logic [$clog2(DEPTH+1)-1:0] free_cnt
);
  localparam int PW = $clog2(DEPTH);

  logic [DATA_W-1:0] data [DEPTH];
  logic [PW-1:0]     nxt  [DEPTH];
  logic [DEPTH-1:0]  used;
  logic [PW-1:0]     tail;

  always_comb begin
    alloc_ptr = '0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (!used[i]) alloc_ptr = PW'(i);
  end

  always_comb begin
    free_cnt = '0;
    for (int i = 0; i < DEPTH; i++)
      free_cnt = free_cnt + {{($clog2(DEPTH+1)-1){1'b0}}, !used[i]};
  end

  assign rd_data = data[rd_ptr];
  assign rd_next = nxt[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used <= '0;
      tail <= '0;
    end else begin
      if (free_en) used[free_ptr] <= 1'b0;
      if (wr_en) begin
        used[alloc_ptr] <= 1'b1;
        tail            <= alloc_ptr;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      data[alloc_ptr] <= wr_data;
      nxt[alloc_ptr]  <= alloc_ptr;
      if (!wr_first) nxt[tail] <= alloc_ptr;
    end
  end

  a_no_alloc_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    !(wr_en && used == '1));
endmodule
