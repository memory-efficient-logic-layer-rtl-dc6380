// ni_reorder_unit: the NI controller that keeps responses in AXI order.
//
// Forward path: every request packet the packetizer starts takes the next sequence number
// (S-N) of its transaction ID (T-ID): sn_tid selects the ID, sn shows the number, sn_take
// consumes it. At most MAX_OUT requests may be outstanding (can_issue), so every response
// that arrives early is guaranteed a slot in the reorder buffer and the NI cannot deadlock.
// Reverse path: for each response packet at the input the unit compares its S-N with the S-N
// expected next for its T-ID. A packet in order is passed straight to the processor-side
// depacketizer (DIRECT); a packet out of order is copied into a free slot of the reorder
// buffer (STORE). After each delivered packet the expected S-N of its T-ID advances, and a
// buffered packet that has become the expected one is released (RELEASE) before any new
// packet is looked at. The buffer has MAX_OUT slots of 8 words (6 x 8 = 48 words).
//
// Streams are valid/ready flit streams. The decision takes one cycle per packet (the IDLE
// state), then one flit moves per cycle. The decision rule, the 48-word buffer, the 4-bit T-ID
// and 3-bit S-N follow the design; the slot organisation and the outstanding limit are this
// design's own.
module ni_reorder_unit
  import ll_pkg::*;
#(
  parameter int MAX_OUT = MAX_OUTSTANDING,
  parameter int BURST   = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // forward path
  input  logic [TID_W-1:0] sn_tid,
  output logic [SN_W-1:0]  sn,
  input  logic             sn_take,
  output logic             can_issue,
  // reverse path: response packets in
  input  logic             in_valid,
  output logic             in_ready,
  input  flit_t            in_flit,
  // to processor-side depacketizer
  output logic             out_valid,
  input  logic             out_ready,
  output flit_t            out_flit,
  // status
  output logic             ooo_event,    // a packet was put into the reorder buffer
  output logic             release_event // a buffered packet was released
);
  localparam int NT = 1 << TID_W;
  localparam int SW = $clog2(MAX_OUT);
  localparam int BW = $clog2(BURST);
  localparam int OW = $clog2(MAX_OUT + 1);

  typedef enum logic [1:0] {R_IDLE, R_DIRECT, R_STORE, R_RELEASE} rstate_e;

  logic [SN_W-1:0] next_sn  [NT];
  logic [SN_W-1:0] exp_sn   [NT];
  logic [OW-1:0]   outstanding;

  logic              slot_valid [MAX_OUT];
  head_t             slot_head  [MAX_OUT];
  logic [BW:0]       slot_cnt   [MAX_OUT];   // number of data flits
  logic [DATA_W-1:0] slot_data  [MAX_OUT][BURST];

  rstate_e          state;
  logic [SW-1:0]    cur_slot;
  logic [BW:0]      beat;        // RELEASE: 0 = head, k = data k-1; STORE: data index
  logic [TID_W-1:0] cur_tid;

  head_t in_head;
  assign in_head = head_t'(in_flit.data);

  assign sn        = next_sn[sn_tid];
  assign can_issue = (outstanding < OW'(MAX_OUT));

  // ---- find a releasable slot and a free slot ----
  logic          rel_found, free_found;
  logic [SW-1:0] rel_slot, free_slot;
  always_comb begin
    rel_found  = 1'b0; rel_slot  = '0;
    free_found = 1'b0; free_slot = '0;
    for (int s = 0; s < MAX_OUT; s++) begin
      if (!rel_found && slot_valid[s] && slot_head[s].sn == exp_sn[slot_head[s].tid]) begin
        rel_found = 1'b1; rel_slot = SW'(s);
      end
      if (!free_found && !slot_valid[s]) begin
        free_found = 1'b1; free_slot = SW'(s);
      end
    end
  end

  // ---- output / input handshakes ----
  always_comb begin
    out_valid = 1'b0;
    out_flit  = in_flit;
    in_ready  = 1'b0;
    unique case (state)
      R_DIRECT: begin
        out_valid = in_valid;
        out_flit  = in_flit;
        in_ready  = out_ready;
      end
      R_STORE: in_ready = 1'b1;
      R_RELEASE: begin
        out_valid = 1'b1;
        if (beat == '0) begin
          out_flit.head = 1'b1;
          out_flit.tail = (slot_cnt[cur_slot] == '0);
          out_flit.data = slot_head[cur_slot];
        end else begin
          out_flit.head = 1'b0;
          out_flit.tail = (beat == slot_cnt[cur_slot]);
          out_flit.data = slot_data[cur_slot][BW'(beat - 1'b1)];
        end
      end
      default: ;
    endcase
  end

  logic delivered;  // a complete packet left toward the depacketizer this cycle
  assign delivered = out_valid && out_ready && out_flit.tail;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= R_IDLE;
      cur_slot    <= '0;
      beat        <= '0;
      cur_tid     <= '0;
      outstanding <= '0;
      for (int t = 0; t < NT; t++) begin
        next_sn[t] <= '0;
        exp_sn[t]  <= '0;
      end
      for (int s = 0; s < MAX_OUT; s++) begin
        slot_valid[s] <= 1'b0;
        slot_head[s]  <= '0;
        slot_cnt[s]   <= '0;
      end
    end else begin
      if (sn_take) next_sn[sn_tid] <= next_sn[sn_tid] + 1'b1;
      outstanding <= outstanding + OW'(sn_take) - OW'(delivered);

      unique case (state)
        R_IDLE: begin
          beat <= '0;
          if (rel_found) begin
            cur_slot <= rel_slot;
            cur_tid  <= slot_head[rel_slot].tid;
            state    <= R_RELEASE;
          end else if (in_valid && in_flit.head) begin
            cur_tid <= in_head.tid;
            if (in_head.sn == exp_sn[in_head.tid]) begin
              state <= R_DIRECT;
            end else if (free_found) begin
              cur_slot <= free_slot;
              state    <= R_STORE;
            end
          end
        end
        R_DIRECT: if (delivered) begin
          exp_sn[cur_tid] <= exp_sn[cur_tid] + 1'b1;
          state           <= R_IDLE;
        end
        R_STORE: if (in_valid) begin
          if (in_flit.head) begin
            slot_head[cur_slot] <= in_head;
            slot_cnt[cur_slot]  <= '0;
          end else begin
            slot_data[cur_slot][BW'(beat)] <= in_flit.data;
            slot_cnt[cur_slot]             <= beat + 1'b1;
            beat                           <= beat + 1'b1;
          end
          if (in_flit.tail) begin
            slot_valid[cur_slot] <= 1'b1;
            state                <= R_IDLE;
          end
        end
        R_RELEASE: if (out_ready) begin
          beat <= beat + 1'b1;
          if (out_flit.tail) begin
            slot_valid[cur_slot] <= 1'b0;
            exp_sn[cur_tid]      <= exp_sn[cur_tid] + 1'b1;
            state                <= R_IDLE;
          end
        end
        default: state <= R_IDLE;
      endcase
    end
  end

  assign ooo_event     = (state == R_IDLE) && !rel_found && in_valid && in_flit.head &&
                         (in_head.sn != exp_sn[in_head.tid]) && free_found;
  assign release_event = (state == R_IDLE) && rel_found;

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    !(delivered && outstanding == '0));
endmodule
