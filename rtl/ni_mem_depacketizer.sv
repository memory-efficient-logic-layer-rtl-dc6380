// ni_mem_depacketizer: restores request packets into AXI requests for the memory controller.
//
// The head flit is latched; the address flit that follows becomes an AR request (read) or an
// AW request (write); for a write, the data flits become W beats, the tail flit carrying
// WLAST. The AXI ID handed to the memory controller is a tag made of the requester's node
// coordinates, its T-ID, the S-N and the burst length; the controller returns it unchanged
// so the response can be packetized and routed back. Flits pass combinationally.
// The conversion follows the design; the tag format is this design's own.
module ni_mem_depacketizer
  import ll_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  flit_t  in_flit,
  output logic   ar_valid,
  input  logic   ar_ready,
  output mc_ax_t ar,
  output logic   aw_valid,
  input  logic   aw_ready,
  output mc_ax_t aw,
  output logic   w_valid,
  input  logic   w_ready,
  output axi_w_t w
);
  typedef enum logic [1:0] {D_HEAD, D_ADDR, D_DATA} dstate_e;
  dstate_e state;
  head_t   hdr;
  mc_ax_t  ax;

  always_comb begin
    ax.id   = '{src_x: hdr.src_x, src_y: hdr.src_y, tid: hdr.tid, sn: hdr.sn, len: hdr.len};
    ax.addr = in_flit.data;
    ax.len  = hdr.len;
    ar = ax;
    aw = ax;
    w  = '{data: in_flit.data, last: in_flit.tail};
    ar_valid = 1'b0;
    aw_valid = 1'b0;
    w_valid  = 1'b0;
    in_ready = 1'b0;
    unique case (state)
      D_HEAD: in_ready = 1'b1;
      D_ADDR: begin
        ar_valid = in_valid && !hdr.write;
        aw_valid = in_valid &&  hdr.write;
        in_ready = hdr.write ? aw_ready : ar_ready;
      end
      D_DATA: begin
        w_valid  = in_valid;
        in_ready = w_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= D_HEAD;
      hdr   <= '0;
    end else if (in_valid && in_ready) begin
      unique case (state)
        D_HEAD: begin
          hdr   <= head_t'(in_flit.data);
          state <= D_ADDR;
        end
        D_ADDR: state <= hdr.write ? D_DATA : D_HEAD;
        D_DATA: if (in_flit.tail) state <= D_HEAD;
        default: state <= D_HEAD;
      endcase
    end
  end
endmodule
