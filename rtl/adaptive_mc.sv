// adaptive_mc: adaptive memory controller between a network interface and the DRAM
// peripheral logic of one stacked rank.
//
// Three parts, as in the design: the AXI interfaces, the controller unit and the physical
// interface. Requests (AR, AW, W) from the network interface enter the controller unit
// (mc_ctrl_unit), whose request table, linked-list write buffer and scheduler decide which
// DRAM command to issue each cycle: the oldest row hit first, then the oldest request to
// another bank, then the oldest request, with aging against starvation. The physical
// interface (mc_phy_if) maps addresses to bank / row / column, drives the DRAM command pins,
// expands bursts and collects read data. Read words and write responses go back through
// QUEUE_DEPTH-entry queues on the AXI side; the controller only issues a column access when
// the queue space for its response is reserved, so the DRAM side never has to stall.
//
// Latency of an isolated read to a closed bank: ACT, then tRCD, RD, tCAS, data, plus a few
// register stages (about 2 + tRCD + tCAS + len cycles to the first R beat).
// The event outputs pulse when the scheduler picks a row hit, a request to another bank, or
// the plain oldest request.
module adaptive_mc
  import ll_pkg::*;
#(
  parameter int NE    = QUEUE_DEPTH,
  parameter int TRCD  = T_RCD,
  parameter int TRAS  = T_RAS,
  parameter int TRP   = T_RP,
  parameter int TWR   = T_WR
) (
  input  logic               clk,
  input  logic               rst_n,
  // AXI slave (from the network interface)
  input  logic               s_aw_valid,
  output logic               s_aw_ready,
  input  mc_ax_t             s_aw,
  input  logic               s_w_valid,
  output logic               s_w_ready,
  input  axi_w_t             s_w,
  input  logic               s_ar_valid,
  output logic               s_ar_ready,
  input  mc_ax_t             s_ar,
  output logic               s_r_valid,
  input  logic               s_r_ready,
  output mc_r_t              s_r,
  output logic               s_b_valid,
  input  logic               s_b_ready,
  output mc_b_t              s_b,
  // DRAM pins
  output logic               dram_cs_n,
  output logic               dram_ras_n,
  output logic               dram_cas_n,
  output logic               dram_we_n,
  output logic [BANK_W-1:0]  dram_ba,
  output logic [DADDR_W-1:0] dram_a,
  output logic [DATA_W-1:0]  dram_dq_out,
  output logic               dram_dq_oe,
  input  logic [DATA_W-1:0]  dram_dq_in,
  input  logic               dram_dq_in_valid,
  // scheduler events
  output logic               ev_hit,
  output logic               ev_interleave,
  output logic               ev_oldest
);
  logic              r_push, b_push, r_full, b_full, r_empty, b_empty;
  mc_r_t             r_data;
  mc_b_t             b_data;
  logic              phy_valid, phy_ready, phy_wbeat, phy_wbeat_last, phy_rd_valid;
  dram_cmd_e         phy_cmd;
  logic [ADDR_W-1:0] phy_addr;
  logic [LEN_W-1:0]  phy_len;
  logic [DATA_W-1:0] phy_wdata, phy_rd_data;
  logic [$clog2(QUEUE_DEPTH+1)-1:0] r_cnt, b_cnt;

  mc_ctrl_unit #(.NE(NE), .TRCD(TRCD), .TRAS(TRAS), .TRP(TRP), .TWR(TWR)) u_ctrl (
    .clk, .rst_n,
    .aw_valid(s_aw_valid), .aw_ready(s_aw_ready), .aw(s_aw),
    .w_valid (s_w_valid),  .w_ready (s_w_ready),  .w (s_w),
    .ar_valid(s_ar_valid), .ar_ready(s_ar_ready), .ar(s_ar),
    .r_push, .r_data, .r_pop(s_r_valid && s_r_ready),
    .b_push, .b_data, .b_pop(s_b_valid && s_b_ready),
    .phy_valid, .phy_ready, .phy_cmd, .phy_addr, .phy_len,
    .phy_wbeat, .phy_wbeat_last, .phy_wdata, .phy_rd_valid, .phy_rd_data,
    .ev_hit, .ev_interleave, .ev_oldest
  );

  mc_phy_if u_phy (
    .clk, .rst_n,
    .cmd_valid(phy_valid), .cmd_ready(phy_ready), .cmd(phy_cmd), .cmd_addr(phy_addr),
    .cmd_len(phy_len), .wbeat(phy_wbeat), .wbeat_last(phy_wbeat_last), .wdata(phy_wdata),
    .rd_valid(phy_rd_valid), .rd_data(phy_rd_data),
    .dram_cs_n, .dram_ras_n, .dram_cas_n, .dram_we_n, .dram_ba, .dram_a,
    .dram_dq_out, .dram_dq_oe, .dram_dq_in, .dram_dq_in_valid
  );

  // AXI interface: response queues
  sync_fifo #(.T(mc_r_t), .DEPTH(QUEUE_DEPTH)) u_rq (
    .clk, .rst_n, .push(r_push), .din(r_data), .pop(s_r_ready),
    .dout(s_r), .full(r_full), .empty(r_empty), .count(r_cnt));
  sync_fifo #(.T(mc_b_t), .DEPTH(QUEUE_DEPTH)) u_bq (
    .clk, .rst_n, .push(b_push), .din(b_data), .pop(s_b_ready),
    .dout(s_b), .full(b_full), .empty(b_empty), .count(b_cnt));

  assign s_r_valid = !r_empty;
  assign s_b_valid = !b_empty;

  a_r_space: assert property (@(posedge clk) disable iff (!rst_n) !(r_push && r_full));
  a_b_space: assert property (@(posedge clk) disable iff (!rst_n) !(b_push && b_full));
endmodule
