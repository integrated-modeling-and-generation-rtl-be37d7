// proc_out_ctrl: processor output controller of a router.
//
// Flits that reach their destination router are written by the input
// controller into the processor output buffer (a vc_fifo inside the router).
// This controller hands them to the processor one by one over the same
// return-to-zero handshake as the router links: it pops the buffer into its
// output register and raises req, holds req and data until the processor
// acknowledges with a one-cycle ack, then drops req for one cycle. The
// processor receives in blocking fashion, so it may take any number of
// cycles to acknowledge; the buffer in front of this controller absorbs that
// so the routing channels are not held up at once. The buffer and the
// controller follow the published design; the handshake waveform is this
// design's choice.
module proc_out_ctrl
  import noc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t buf_head,
  input  logic  buf_empty,
  output logic  buf_pop,
  output logic  out_req,
  output flit_t out_data,
  input  logic  out_ack
);
  assign buf_pop = !out_req && !buf_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_req  <= 1'b0;
      out_data <= '0;
    end else if (out_req) begin
      if (out_ack) out_req <= 1'b0;
    end else if (!buf_empty) begin
      out_req  <= 1'b1;
      out_data <= buf_head;
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_req && !out_ack |=> out_req && $stable(out_data));
endmodule
