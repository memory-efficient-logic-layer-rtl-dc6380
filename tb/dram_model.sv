// dram_model: behavioural model of one stacked DRAM rank with its peripheral logic (row
// decoders, sense amplifiers / row buffers), for simulation only.
//
// It decodes the command pins (cs_n, ras_n, cas_n, we_n, ba, a) like an SDRAM: ACT opens a
// row, RD returns one 32-bit word TCAS cycles later on dq_in with dq_in_valid, WR stores the
// word presented on dq_out one cycle after the command, PRE closes the bank. Storage is a
// sparse associative array, so any address can be used. It checks the timing rules the
// controller must honour (tRCD, tRAS, tRP, tWR, column access only to the open row, ACT only
// to a closed bank) and counts every breach in violations, and counts the commands it sees.
// While rst_n is low the pins are not interpreted.
module dram_model
  import ll_pkg::*;
#(
  parameter int TCAS = T_CAS,
  parameter int TRCD = T_RCD,
  parameter int TRAS = T_RAS,
  parameter int TRP  = T_RP,
  parameter int TWR  = T_WR
) (
  input  logic               clk,
  input  logic               rst_n,   // commands are ignored while low
  input  logic               cs_n,
  input  logic               ras_n,
  input  logic               cas_n,
  input  logic               we_n,
  input  logic [BANK_W-1:0]  ba,
  input  logic [DADDR_W-1:0] a,
  input  logic [DATA_W-1:0]  dq_out,
  input  logic               dq_oe,
  output logic [DATA_W-1:0]  dq_in,
  output logic               dq_in_valid
);
  logic [DATA_W-1:0] mem [logic [BANK_W+ROW_W+COL_W-1:0]];

  int   violations = 0;
  int   n_act = 0, n_pre = 0, n_rd = 0, n_wr = 0;
  longint cyc = 0;
  logic   open_b  [NUM_BANKS];
  logic [ROW_W-1:0] row_b [NUM_BANKS];
  longint t_act [NUM_BANKS];
  longint t_pre [NUM_BANKS];
  longint t_wr  [NUM_BANKS];

  logic [DATA_W-1:0] pipe_d [TCAS];
  logic              pipe_v [TCAS];
  logic              wr_pending = 1'b0;
  logic [BANK_W+ROW_W+COL_W-1:0] wr_key;

  initial begin
    for (int b = 0; b < NUM_BANKS; b++) begin
      open_b[b] = 1'b0; row_b[b] = '0;
      t_act[b] = -1000; t_pre[b] = -1000; t_wr[b] = -1000;
    end
    for (int i = 0; i < TCAS; i++) begin pipe_v[i] = 1'b0; pipe_d[i] = '0; end
  end

  assign dq_in       = pipe_d[TCAS-1];
  assign dq_in_valid = pipe_v[TCAS-1];

  function automatic logic [BANK_W+ROW_W+COL_W-1:0] key(int b, logic [ROW_W-1:0] r,
                                                         logic [COL_W-1:0] c);
    return {BANK_W'(b), r, c};
  endfunction

  always @(posedge clk) begin
    logic              rv;
    logic [DATA_W-1:0] rd;
    int b;
    cyc <= cyc + 1;
    rv = 1'b0;
    rd = '0;
    b  = int'(ba);
    // write data of the previous cycle's WR
    if (wr_pending) begin
      if (!dq_oe) violations++;
      mem[wr_key] = dq_out;
      wr_pending  <= 1'b0;
    end
    if (rst_n && !cs_n) begin
      unique case ({ras_n, cas_n, we_n})
        3'b011: begin  // ACT
          n_act++;
          if (open_b[b] || cyc - t_pre[b] < TRP) violations++;
          open_b[b] = 1'b1;
          row_b[b]  = ROW_W'(a);
          t_act[b]  = cyc;
        end
        3'b010: begin  // PRE
          n_pre++;
          if (cyc - t_act[b] < TRAS || cyc - t_wr[b] <= TWR) violations++;
          open_b[b] = 1'b0;
          t_pre[b]  = cyc;
        end
        3'b101: begin  // RD
          n_rd++;
          if (!open_b[b] || cyc - t_act[b] < TRCD) violations++;
          rv = 1'b1;
          rd = mem.exists(key(b, row_b[b], COL_W'(a))) ? mem[key(b, row_b[b], COL_W'(a))]
                                                       : 32'hDEAD_BEEF;
        end
        3'b100: begin  // WR
          n_wr++;
          if (!open_b[b] || cyc - t_act[b] < TRCD) violations++;
          wr_pending <= 1'b1;
          wr_key     <= key(b, row_b[b], COL_W'(a));
          t_wr[b]    = cyc;
        end
        default: ;
      endcase
    end
    pipe_v[0] <= rv;
    pipe_d[0] <= rd;
    for (int i = 1; i < TCAS; i++) begin
      pipe_v[i] <= pipe_v[i-1];
      pipe_d[i] <= pipe_d[i-1];
    end
  end
endmodule
