// ni_proc_depacketizer: restores response packets into the processor's AXI responses.
//
// It takes the in-order response stream that leaves the reorder unit. The head flit is
// latched (T-ID, read or write, write status). A write response is a one-flit packet and
// becomes one B beat with the packet's T-ID. The data flits of a read response become R
// beats with the latched T-ID; the tail flit carries RLAST. Flits pass combinationally, so a
// data flit leaves in the cycle it arrives if the processor is ready.
// The conversion follows the design's description of the depacketizer; the channel format is
// this design's own simplified AXI.
module ni_proc_depacketizer
  import ll_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  flit_t  in_flit,
  output logic   r_valid,
  input  logic   r_ready,
  output axi_r_t r,
  output logic   b_valid,
  input  logic   b_ready,
  output axi_b_t b
);
  logic             in_body;   // between head and tail of a read response
  logic [TID_W-1:0] tid_q;
  head_t            h;
  assign h = head_t'(in_flit.data);

  always_comb begin
    r_valid  = 1'b0;
    b_valid  = 1'b0;
    in_ready = 1'b0;
    r        = '{id: tid_q, data: in_flit.data, last: in_flit.tail};
    b        = '{id: h.tid, resp: h.bresp};
    if (in_body) begin
      r_valid  = in_valid;
      in_ready = r_ready;
    end else if (in_valid && in_flit.head && h.write) begin
      b_valid  = 1'b1;
      in_ready = b_ready;
    end else begin
      in_ready = 1'b1;   // head of a read response: latch it
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_body <= 1'b0;
      tid_q   <= '0;
    end else if (in_valid && in_ready) begin
      if (in_flit.head) begin
        tid_q   <= h.tid;
        in_body <= !h.write && !in_flit.tail;
      end else if (in_flit.tail) begin
        in_body <= 1'b0;
      end
    end
  end
endmodule
