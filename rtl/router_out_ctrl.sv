// router_out_ctrl: router output controller for one router-to-router link.
//
// Two virtual channel buffers share the physical link. When the link is idle
// (req low) and a channel holds a flit, the controller copies that channel's
// head flit into its output register and raises req with the channel number
// on vc. It holds req, vc and data until the receiver answers:
//   ack   the flit is taken: it is popped from its channel and req drops;
//   nack  the receiver cannot take it now: req drops, the flit stays at the
//         head of its channel, and the other channel is preferred next.
// With both channels ready they take turns (round robin), and thanks to nack
// a worm blocked downstream in one channel never stops the other. Per flit:
// req, req+ack, idle, i.e. 3 cycles, the published router-to-router transfer
// rate. Flits of the two channels may interleave on the link; the receiver
// tells them apart by vc. The two virtual channels and the 3-cycle rate
// follow the published design; the handshake waveform, the nack and the
// round robin between channels are this design's choice.
module router_out_ctrl
  import noc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  flit_t     vc_head  [2],
  input  logic      vc_empty [2],
  output logic      vc_pop   [2],
  output link_fwd_t out_fwd,
  input  link_bwd_t out_bwd
);
  logic rr_q;    // channel preferred on the next choice
  logic sel;
  logic any;

  always_comb begin
    any = !vc_empty[0] || !vc_empty[1];
    if (!vc_empty[0] && !vc_empty[1]) sel = rr_q;
    else                              sel = vc_empty[0];
    vc_pop[0] = out_fwd.req && out_bwd.ack && (out_fwd.vc == 1'b0);
    vc_pop[1] = out_fwd.req && out_bwd.ack && (out_fwd.vc == 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_fwd <= '0;
      rr_q    <= 1'b0;
    end else if (out_fwd.req) begin
      if (out_bwd.ack || out_bwd.nack) begin
        out_fwd.req <= 1'b0;
        rr_q        <= !out_fwd.vc;
      end
    end else if (any) begin
      out_fwd.req  <= 1'b1;
      out_fwd.vc   <= sel;
      out_fwd.data <= vc_head[sel];
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_fwd.req && !out_bwd.ack && !out_bwd.nack |=>
                           out_fwd.req && $stable(out_fwd.data) && $stable(out_fwd.vc));
  a_rtz:  assert property (@(posedge clk) disable iff (!rst_n)
                           out_fwd.req && (out_bwd.ack || out_bwd.nack) |=> !out_fwd.req);
  a_one:  assert property (@(posedge clk) disable iff (!rst_n) !(out_bwd.ack && out_bwd.nack));
endmodule
