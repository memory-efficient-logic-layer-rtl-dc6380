// mc_ctrl_unit: controller unit of the adaptive memory controller.
//
// Request table: NE entries shared by reads and writes, each holding valid, read/write,
// address (bank, row, column), burst length, the requester's tag, an age and the head
// pointer of its write data in the linked-list write buffer. A new request (AR, or AW
// followed by its W beats) takes a free entry; whenever one enters, every waiting entry
// ages by one (saturating), which keeps old requests from starving.
// FSM controller: per bank it keeps the open row and countdown timers for tRCD (ACT to
// column access), tRAS (ACT to PRE), tRP (PRE to ACT) and the end of a burst plus tWR
// (column access to PRE). Each cycle every entry works out its next command (RD / WR when
// its row is open, PRE when another row is open, ACT when the bank is closed) and whether
// timing and buffer space allow it now. The scheduler (mc_scheduler) picks one: oldest row
// hit, else oldest request to another bank, else oldest. A bank is not precharged while an
// entry still hits its open row, unless the conflicting entry's age has saturated.
// A column access leaves the table: reads are queued in an in-flight list so returning words
// can be tagged; writes stream their chain out of the write buffer into the physical
// interface and produce a B response after the last word. Read data words are returned on
// r_push with the tag and RLAST.
// The request table fields, aging, shared buffers and the scheduling policy follow the
// design; the timers, the precharge guard and the buffer reservations are this design's
// own.
module mc_ctrl_unit
  import ll_pkg::*;
#(
  parameter int NE       = QUEUE_DEPTH,  // request-table entries
  parameter int WB_DEPTH = QUEUE_DEPTH,  // write-buffer words
  parameter int RQ_DEPTH = QUEUE_DEPTH,  // read-data queue words
  parameter int BQ_DEPTH = QUEUE_DEPTH,  // write-response queue entries
  parameter int AGE_W    = 4,
  parameter int TRCD     = T_RCD,
  parameter int TRAS     = T_RAS,
  parameter int TRP      = T_RP,
  parameter int TWR      = T_WR
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI requests
  input  logic              aw_valid,
  output logic              aw_ready,
  input  mc_ax_t            aw,
  input  logic              w_valid,
  output logic              w_ready,
  input  axi_w_t            w,
  input  logic              ar_valid,
  output logic              ar_ready,
  input  mc_ax_t            ar,
  // responses (to the AXI interface queues)
  output logic              r_push,
  output mc_r_t             r_data,
  input  logic              r_pop,    // a word left the read-data queue
  output logic              b_push,
  output mc_b_t             b_data,
  input  logic              b_pop,
  // physical interface
  output logic              phy_valid,
  input  logic              phy_ready,
  output dram_cmd_e         phy_cmd,
  output logic [ADDR_W-1:0] phy_addr,
  output logic [LEN_W-1:0]  phy_len,
  input  logic              phy_wbeat,
  input  logic              phy_wbeat_last,
  output logic [DATA_W-1:0] phy_wdata,
  input  logic              phy_rd_valid,
  input  logic [DATA_W-1:0] phy_rd_data,
  // scheduler events
  output logic              ev_hit,
  output logic              ev_interleave,
  output logic              ev_oldest
);
  localparam int IW  = $clog2(NE);
  localparam int WPW = $clog2(WB_DEPTH);
  localparam int TW  = 8;
  localparam int RW  = $clog2(RQ_DEPTH + 1);
  localparam int BW2 = $clog2(BQ_DEPTH + 1);
  localparam logic [AGE_W-1:0] AGE_MAX = '1;

  typedef struct packed {
    logic              valid;
    logic              write;
    logic              data_ready;
    logic [ADDR_W-1:0] addr;
    logic [LEN_W-1:0]  len;
    mid_t              id;
    logic [AGE_W-1:0]  age;
    logic [WPW-1:0]    dptr;
  } entry_t;

  entry_t    tbl [NE];

  // bank state
  logic [NUM_BANKS-1:0] bopen;
  logic [ROW_W-1:0]     brow    [NUM_BANKS];
  logic [TW-1:0]        rcd_cnt [NUM_BANKS];
  logic [TW-1:0]        ras_cnt [NUM_BANKS];
  logic [TW-1:0]        rp_cnt  [NUM_BANKS];
  logic [TW-1:0]        col_cnt [NUM_BANKS];
  logic                 last_bank_valid;
  logic [BANK_W-1:0]    last_bank;

  // ---------------- free entry ----------------
  logic          free_found;
  logic [IW-1:0] free_idx;
  always_comb begin
    free_found = 1'b0;
    free_idx   = '0;
    for (int e = NE - 1; e >= 0; e--)
      if (!tbl[e].valid) begin
        free_found = 1'b1;
        free_idx   = IW'(e);
      end
  end

  // ---------------- write buffer ----------------
  logic                    wb_wr, wb_first, wb_free;
  logic [WPW-1:0]          wb_alloc, wb_rd_ptr, wb_next;
  logic [DATA_W-1:0]       wb_rd_data;
  logic [$clog2(WB_DEPTH+1)-1:0] wb_free_cnt;

  mc_write_buffer #(.DEPTH(WB_DEPTH)) u_wbuf (
    .clk, .rst_n,
    .wr_en(wb_wr), .wr_first(wb_first), .wr_data(w.data), .alloc_ptr(wb_alloc),
    .rd_ptr(wb_rd_ptr), .rd_data(wb_rd_data), .rd_next(wb_next),
    .free_en(wb_free), .free_ptr(wb_rd_ptr), .free_cnt(wb_free_cnt)
  );

  // ---------------- AXI request intake ----------------
  logic          filling;      // write entry waiting for its W beats
  logic [IW-1:0] fill_idx;
  logic          fill_first;
  logic          prefer_w;     // alternate AR / AW when both wait
  logic          take_ar, take_aw;

  always_comb begin
    logic aw_ok, ar_ok;
    aw_ok   = aw_valid && free_found && !filling &&
              (wb_free_cnt >= ($clog2(WB_DEPTH+1))'(aw.len) + 1'b1);
    ar_ok   = ar_valid && free_found;
    take_aw = aw_ok && (prefer_w || !ar_ok);
    take_ar = ar_ok && !take_aw;
  end
  assign aw_ready = take_aw;
  assign ar_ready = take_ar;
  assign w_ready  = filling;
  assign wb_wr    = filling && w_valid;
  assign wb_first = fill_first;

  // ---------------- per-entry next command ----------------
  logic [NE-1:0]     cand, hit;
  logic [BANK_W-1:0] ebank [NE];
  logic [AGE_W-1:0]  eage  [NE];
  dram_cmd_e         ecmd  [NE];
  logic [RW-1:0]     r_resv;
  logic [BW2-1:0]    b_resv;
  logic              ws_active;   // write data streaming

  always_comb begin
    for (int e = 0; e < NE; e++) begin
      dram_loc_t l;
      logic      protect;
      int        b;
      l        = map_addr(tbl[e].addr);
      b        = int'(l.bank);
      ebank[e] = l.bank;
      eage[e]  = tbl[e].age;
      hit[e]   = bopen[b] && (brow[b] == l.row);
      // another waiting entry still hits the open row of this bank
      protect = 1'b0;
      for (int o = 0; o < NE; o++)
        if (o != e && tbl[o].valid && map_addr(tbl[o].addr).bank == l.bank &&
            bopen[b] && brow[b] == map_addr(tbl[o].addr).row)
          protect = 1'b1;
      if (hit[e]) begin
        ecmd[e] = tbl[e].write ? CMD_WR : CMD_RD;
        cand[e] = (rcd_cnt[b] == '0) &&
                  (tbl[e].write ? (!ws_active && b_resv < BW2'(BQ_DEPTH))
                                : (r_resv + RW'(tbl[e].len) + 1'b1 <= RW'(RQ_DEPTH)));
      end else if (bopen[b]) begin
        ecmd[e] = CMD_PRE;
        cand[e] = (ras_cnt[b] == '0) && (col_cnt[b] == '0) &&
                  (!protect || tbl[e].age == AGE_MAX);
      end else begin
        ecmd[e] = CMD_ACT;
        cand[e] = (rp_cnt[b] == '0);
      end
      cand[e] = cand[e] && tbl[e].valid && tbl[e].data_ready && phy_ready;
    end
  end

  logic          s_valid;
  logic [IW-1:0] s_idx;
  logic [1:0]    s_class;

  mc_scheduler #(.N(NE), .AGE_W(AGE_W)) u_sched (
    .cand, .hit, .bank(ebank), .age(eage),
    .last_bank_valid, .last_bank,
    .sel_valid(s_valid), .sel(s_idx), .sel_class(s_class)
  );

  assign ev_hit        = s_valid && s_class == 2'd0;
  assign ev_interleave = s_valid && s_class == 2'd1;
  assign ev_oldest     = s_valid && s_class == 2'd2;

  entry_t    s_ent;
  dram_loc_t s_loc;
  dram_cmd_e s_cmd;
  logic      s_col;
  assign s_ent     = tbl[s_idx];
  assign s_loc     = map_addr(s_ent.addr);
  assign s_cmd     = ecmd[s_idx];
  assign s_col     = s_valid && (s_cmd == CMD_RD || s_cmd == CMD_WR);
  assign phy_valid = s_valid;
  assign phy_cmd   = s_cmd;
  assign phy_addr  = s_ent.addr;
  assign phy_len   = s_ent.len;

  // ---------------- in-flight reads and write streaming ----------------
  typedef struct packed {
    mid_t             id;
    logic [LEN_W-1:0] len;
  } inflight_t;

  inflight_t if_q;
  logic      if_empty, if_full;
  logic [LEN_W-1:0] rbeat;
  logic [$clog2(NE+1)-1:0] if_cnt;
  logic      if_pop;

  assign if_pop = phy_rd_valid && (rbeat == if_q.len);

  sync_fifo #(.T(inflight_t), .DEPTH(NE)) u_inflight (
    .clk, .rst_n,
    .push (s_col && s_cmd == CMD_RD),
    .din  ('{id: s_ent.id, len: s_ent.len}),
    .pop  (if_pop),
    .dout (if_q),
    .full (if_full),
    .empty(if_empty),
    .count(if_cnt)
  );

  assign r_push = phy_rd_valid;
  assign r_data = '{id: if_q.id, data: phy_rd_data, last: (rbeat == if_q.len)};

  mid_t ws_id;
  logic [WPW-1:0] ws_ptr;
  assign wb_rd_ptr = ws_ptr;
  assign phy_wdata = wb_rd_data;
  assign wb_free   = phy_wbeat;
  assign b_push    = phy_wbeat_last;
  assign b_data    = '{id: ws_id, resp: 2'b00};

  // ---------------- state update ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < NE; e++) tbl[e] <= '0;
      for (int b = 0; b < NUM_BANKS; b++) begin
        brow[b]    <= '0;
        rcd_cnt[b] <= '0;
        ras_cnt[b] <= '0;
        rp_cnt[b]  <= '0;
        col_cnt[b] <= '0;
      end
      bopen           <= '0;
      last_bank_valid <= 1'b0;
      last_bank       <= '0;
      filling         <= 1'b0;
      fill_idx        <= '0;
      fill_first      <= 1'b0;
      prefer_w        <= 1'b0;
      r_resv          <= '0;
      b_resv          <= '0;
      ws_active       <= 1'b0;
      ws_ptr          <= '0;
      ws_id           <= '0;
      rbeat           <= '0;
    end else begin
      // timers
      for (int b = 0; b < NUM_BANKS; b++) begin
        if (rcd_cnt[b] != '0) rcd_cnt[b] <= rcd_cnt[b] - 1'b1;
        if (ras_cnt[b] != '0) ras_cnt[b] <= ras_cnt[b] - 1'b1;
        if (rp_cnt[b]  != '0) rp_cnt[b]  <= rp_cnt[b]  - 1'b1;
        if (col_cnt[b] != '0) col_cnt[b] <= col_cnt[b] - 1'b1;
      end

      // intake and aging
      if (take_ar || take_aw) begin
        for (int e = 0; e < NE; e++)
          if (tbl[e].valid && tbl[e].age != AGE_MAX) tbl[e].age <= tbl[e].age + 1'b1;
        tbl[free_idx] <= '{valid: 1'b1, write: take_aw, data_ready: take_ar,
                           addr: take_aw ? aw.addr : ar.addr,
                           len:  take_aw ? aw.len  : ar.len,
                           id:   take_aw ? aw.id   : ar.id,
                           age: '0, dptr: '0};
        prefer_w <= take_ar;
        if (take_aw) begin
          filling    <= 1'b1;
          fill_idx   <= free_idx;
          fill_first <= 1'b1;
        end
      end
      if (wb_wr) begin
        fill_first <= 1'b0;
        if (fill_first) tbl[fill_idx].dptr <= wb_alloc;
        if (w.last) begin
          tbl[fill_idx].data_ready <= 1'b1;
          filling <= 1'b0;
        end
      end

      // issue the scheduled command
      if (s_valid) begin
        int b;
        b = int'(s_loc.bank);
        unique case (s_cmd)
          CMD_ACT: begin
            bopen[b]   <= 1'b1;
            brow[b]    <= s_loc.row;
            rcd_cnt[b] <= TW'(TRCD - 1);
            ras_cnt[b] <= TW'(TRAS - 1);
          end
          CMD_PRE: begin
            bopen[b]  <= 1'b0;
            rp_cnt[b] <= TW'(TRP - 1);
          end
          default: begin   // column access: the request leaves the table
            tbl[s_idx].valid <= 1'b0;
            last_bank_valid  <= 1'b1;
            last_bank        <= s_loc.bank;
            col_cnt[b]       <= (s_cmd == CMD_WR) ? TW'(int'(s_ent.len) + TWR)
                                                  : TW'(int'(s_ent.len) + 1);
            if (s_cmd == CMD_WR) begin
              ws_active <= 1'b1;
              ws_ptr    <= s_ent.dptr;
              ws_id     <= s_ent.id;
            end
          end
        endcase
      end

      // write streaming
      if (phy_wbeat) begin
        ws_ptr <= wb_next;
        if (phy_wbeat_last) ws_active <= 1'b0;
      end

      // read data tagging
      if (phy_rd_valid) rbeat <= (rbeat == if_q.len) ? '0 : rbeat + 1'b1;

      // buffer reservations
      r_resv <= r_resv + ((s_col && s_cmd == CMD_RD) ? RW'(s_ent.len) + 1'b1 : '0) - RW'(r_pop);
      b_resv <= b_resv + BW2'(s_col && s_cmd == CMD_WR) - BW2'(b_pop);
    end
  end

  a_rd_expected: assert property (@(posedge clk) disable iff (!rst_n)
    phy_rd_valid |-> !if_empty);
endmodule
