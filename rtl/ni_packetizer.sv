// ni_packetizer: turns AXI messages into packets of 32-bit flits.
//
// Four sources share it: processor read requests (AR) and write requests (AW + W) from the
// processor-side AXI queue, and read data (R) and write responses (B) from the memory-side
// AXI queue. A round-robin arbiter picks a source, and the packet is sent whole before the
// next is picked. The header builder forms the head flit in a header register: for a request
// the address decoder takes the destination node from address bits [31:28] and the reorder
// unit supplies the sequence number; for a response the destination, T-ID and S-N come from
// the tag the memory controller echoed back. The data builder then appends the payload.
//   read request : head, address                      (VC 0)
//   write request: head, address, 1..8 data flits     (VC 0)
//   read response: head, 1..8 data flits              (VC 1)
//   write resp.  : head only                          (VC 1)
// out_local is set when the destination is this node; such packets take the NI's direct
// local channel instead of the router. out_ready is the credit / space check of the chosen
// path. One flit per cycle; a packet costs one idle cycle for arbitration.
// The flit formats, the 4-bit T-ID / 3-bit S-N and the address decoder follow the design's
// description in outline; the exact header layout and the arbitration are this design's own.
module ni_packetizer
  import ll_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  // processor requests
  input  logic             ar_valid,
  output logic             ar_ready,
  input  axi_ax_t          ar,
  input  logic             aw_valid,
  output logic             aw_ready,
  input  axi_ax_t          aw,
  input  logic             w_valid,
  output logic             w_ready,
  input  axi_w_t           w,
  // memory responses
  input  logic             r_valid,
  output logic             r_ready,
  input  mc_r_t            r,
  input  logic             b_valid,
  output logic             b_ready,
  input  mc_b_t            b,
  // reorder unit
  output logic [TID_W-1:0] sn_tid,
  input  logic [SN_W-1:0]  sn,
  output logic             sn_take,
  input  logic             can_issue,
  // flit output
  output logic             out_valid,
  input  logic             out_ready,
  output flit_t            out_flit,
  output logic             out_vc,
  output logic             out_local
);
  typedef enum logic [1:0] {S_AR = 2'd0, S_AW = 2'd1, S_R = 2'd2, S_B = 2'd3} src_e;
  typedef enum logic [1:0] {K_IDLE, K_HEAD, K_ADDR, K_DATA} kstate_e;

  kstate_e           state;
  src_e              src;
  head_t             hdr;      // header register
  logic [ADDR_W-1:0] addr_q;

  logic [3:0] req;
  logic [3:0] gnt;
  logic [1:0] gidx;
  logic       gany;

  assign req[S_AR] = ar_valid && can_issue;
  assign req[S_AW] = aw_valid && can_issue;
  assign req[S_R]  = r_valid;
  assign req[S_B]  = b_valid;

  rr_arbiter #(.N(4)) u_arb (
    .clk, .rst_n, .req(req), .advance(state == K_IDLE),
    .gnt(gnt), .gnt_idx(gidx), .any(gany)
  );

  // header builder (combinational, for the granted source)
  head_t new_hdr;
  always_comb begin
    new_hdr       = '0;
    new_hdr.src_x = my_x;
    new_hdr.src_y = my_y;
    unique case (src_e'(gidx))
      S_AR: begin
        new_hdr.dst_x = addr_node_x(ar.addr);
        new_hdr.dst_y = addr_node_y(ar.addr);
        new_hdr.tid   = ar.id;
        new_hdr.len   = ar.len;
      end
      S_AW: begin
        new_hdr.dst_x = addr_node_x(aw.addr);
        new_hdr.dst_y = addr_node_y(aw.addr);
        new_hdr.write = 1'b1;
        new_hdr.tid   = aw.id;
        new_hdr.len   = aw.len;
      end
      S_R: begin
        new_hdr.dst_x = r.id.src_x;
        new_hdr.dst_y = r.id.src_y;
        new_hdr.resp  = 1'b1;
        new_hdr.tid   = r.id.tid;
        new_hdr.sn    = r.id.sn;
        new_hdr.len   = r.id.len;
      end
      default: begin
        new_hdr.dst_x = b.id.src_x;
        new_hdr.dst_y = b.id.src_y;
        new_hdr.resp  = 1'b1;
        new_hdr.write = 1'b1;
        new_hdr.tid   = b.id.tid;
        new_hdr.sn    = b.id.sn;
        new_hdr.len   = b.id.len;
        new_hdr.bresp = b.resp;
      end
    endcase
  end

  assign sn_tid = hdr.tid;

  // requests take their sequence number from the reorder unit as the head flit leaves
  head_t hdr_out;
  always_comb begin
    hdr_out = hdr;
    if (!hdr.resp) hdr_out.sn = sn;
  end

  // flit builder
  always_comb begin
    out_valid = 1'b0;
    out_flit  = '0;
    ar_ready  = 1'b0;
    aw_ready  = 1'b0;
    w_ready   = 1'b0;
    r_ready   = 1'b0;
    b_ready   = 1'b0;
    sn_take   = 1'b0;
    unique case (state)
      K_HEAD: begin
        out_valid     = 1'b1;
        out_flit.head = 1'b1;
        out_flit.tail = (src == S_B);
        out_flit.data = hdr_out;
        sn_take       = !hdr.resp && out_ready;
        b_ready       = (src == S_B) && out_ready;
      end
      K_ADDR: begin
        out_valid     = 1'b1;
        out_flit.tail = (src == S_AR);
        out_flit.data = addr_q;
        ar_ready      = (src == S_AR) && out_ready;
        aw_ready      = (src == S_AW) && out_ready;
      end
      K_DATA: begin
        if (src == S_AW) begin
          out_valid     = w_valid;
          out_flit.tail = w.last;
          out_flit.data = w.data;
          w_ready       = out_ready;
        end else begin
          out_valid     = r_valid;
          out_flit.tail = r.last;
          out_flit.data = r.data;
          r_ready       = out_ready;
        end
      end
      default: ;
    endcase
  end

  assign out_vc    = hdr.resp;
  assign out_local = (hdr.dst_x == my_x) && (hdr.dst_y == my_y);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= K_IDLE;
      src    <= S_AR;
      hdr    <= '0;
      addr_q <= '0;
    end else begin
      unique case (state)
        K_IDLE: if (gany) begin
          src    <= src_e'(gidx);
          hdr    <= new_hdr;
          addr_q <= (src_e'(gidx) == S_AR) ? ar.addr : aw.addr;
          state  <= K_HEAD;
        end
        K_HEAD: if (out_ready) begin
          if (src == S_B)      state <= K_IDLE;
          else if (hdr.resp)   state <= K_DATA;
          else                 state <= K_ADDR;
        end
        K_ADDR: if (out_ready) state <= (src == S_AR) ? K_IDLE : K_DATA;
        K_DATA: if (out_valid && out_ready && out_flit.tail) state <= K_IDLE;
        default: state <= K_IDLE;
      endcase
    end
  end

endmodule
