// mc_phy_if: physical interface between the memory controller and the DRAM peripheral logic.
//
// Memory mapping: the byte address of a command is split into bank, row and column
// (ll_pkg::map_addr). Command generator: ACT, RD, WR and PRE are driven on the DRAM command
// pins as chip-select / RAS# / CAS# / WE# levels, with the bank on ba and the row (ACT) or
// column (RD / WR) on the shared address pins a, as in a conventional DRAM. Sequencer: a
// column command for a burst of len+1 words is expanded into len+1 consecutive single-word
// RD or WR commands at consecutive columns; the interface is busy (ready low) until the last
// one is out. Write data is requested from the controller (wbeat, wbeat_last) in the cycle a
// WR command reaches the pins and driven on dq_out one cycle later (write latency 1). Response
// path: read words arriving on dq_in with dq_in_valid are registered and handed to the
// controller (rd_valid / rd_data).
// Timing: a command accepted in cycle t is on the pins in cycle t+1; burst word i in t+1+i.
// Memory mapping, command generator, sequencer and response path are the blocks the design
// names; the pin encoding is the usual SDRAM truth table, chosen here. The PLL, the DLL and
// double-data-rate transfer are not modelled: data moves one 32-bit word per controller
// clock.
module mc_phy_if
  import ll_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // from the controller unit
  input  logic                cmd_valid,
  output logic                cmd_ready,
  input  dram_cmd_e           cmd,
  input  logic [ADDR_W-1:0]   cmd_addr,
  input  logic [LEN_W-1:0]    cmd_len,
  output logic                wbeat,
  output logic                wbeat_last,
  input  logic [DATA_W-1:0]   wdata,
  output logic                rd_valid,
  output logic [DATA_W-1:0]   rd_data,
  // DRAM pins
  output logic                dram_cs_n,
  output logic                dram_ras_n,
  output logic                dram_cas_n,
  output logic                dram_we_n,
  output logic [BANK_W-1:0]   dram_ba,
  output logic [DADDR_W-1:0]  dram_a,
  output logic [DATA_W-1:0]   dram_dq_out,
  output logic                dram_dq_oe,
  input  logic [DATA_W-1:0]   dram_dq_in,
  input  logic                dram_dq_in_valid
);
  logic              seq_busy;
  dram_cmd_e         seq_cmd;
  logic [BANK_W-1:0] seq_bank;
  logic [COL_W-1:0]  seq_col;
  logic [LEN_W-1:0]  seq_left;   // beats still to emit after the current one
  dram_cmd_e         pin_cmd;

  dram_loc_t loc;
  assign loc       = map_addr(cmd_addr);
  assign cmd_ready = !seq_busy;

  // the pins currently carry a WR beat: fetch its data
  assign wbeat      = (pin_cmd == CMD_WR);
  assign wbeat_last = wbeat && !seq_busy;

  task automatic drive(input dram_cmd_e c, input logic [BANK_W-1:0] ba,
                       input logic [DADDR_W-1:0] a);
    pin_cmd    <= c;
    dram_cs_n  <= (c == CMD_NOP);
    dram_ras_n <= !(c == CMD_ACT || c == CMD_PRE);
    dram_cas_n <= !(c == CMD_RD  || c == CMD_WR);
    dram_we_n  <= !(c == CMD_WR  || c == CMD_PRE);
    dram_ba    <= ba;
    dram_a     <= a;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq_busy    <= 1'b0;
      seq_cmd     <= CMD_NOP;
      seq_bank    <= '0;
      seq_col     <= '0;
      seq_left    <= '0;
      pin_cmd     <= CMD_NOP;
      dram_cs_n   <= 1'b1;
      dram_ras_n  <= 1'b1;
      dram_cas_n  <= 1'b1;
      dram_we_n   <= 1'b1;
      dram_ba     <= '0;
      dram_a      <= '0;
      dram_dq_out <= '0;
      dram_dq_oe  <= 1'b0;
      rd_valid    <= 1'b0;
      rd_data     <= '0;
    end else begin
      // write data follows its WR command by one cycle
      dram_dq_oe  <= wbeat;
      dram_dq_out <= wbeat ? wdata : '0;
      // response path
      rd_valid <= dram_dq_in_valid;
      rd_data  <= dram_dq_in;
      // command generator + sequencer
      if (seq_busy) begin
        drive(seq_cmd, seq_bank, DADDR_W'(seq_col));
        seq_col  <= seq_col + 1'b1;
        seq_left <= seq_left - 1'b1;
        seq_busy <= (seq_left != '0);
      end else if (cmd_valid) begin
        unique case (cmd)
          CMD_ACT: drive(CMD_ACT, loc.bank, DADDR_W'(loc.row));
          CMD_PRE: drive(CMD_PRE, loc.bank, '0);
          CMD_RD, CMD_WR: begin
            drive(cmd, loc.bank, DADDR_W'(loc.col));
            seq_cmd  <= cmd;
            seq_bank <= loc.bank;
            seq_col  <= loc.col + 1'b1;
            seq_left <= cmd_len - 1'b1;
            seq_busy <= (cmd_len != '0);
          end
          default: drive(CMD_NOP, '0, '0);
        endcase
      end else begin
        drive(CMD_NOP, '0, '0);
      end
    end
  end
endmodule
