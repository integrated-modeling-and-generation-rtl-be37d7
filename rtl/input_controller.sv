// input_controller: the single input controller of a router.
//
// It serves NR router inputs (one per torus dimension) and one processor
// input (index NR). Each cycle it may grant one input whose request is up,
// whose target buffer has room and, for a header flit, whose target virtual
// channel is not owned by another worm. Router inputs take priority over the
// processor input, since software on the processor side is slow; among the
// router inputs a round-robin pointer decides. The controller works as a
// two-stage pipeline, after the grant/acknowledge and read steps of the
// published controller:
//   cycle 1 (grant)  the request is acknowledged (in_ack rises next cycle),
//                    a header is looked up in the routing table and the
//                    target buffer is reserved;
//   cycle 2 (read)   while ack is high the sender still holds the flit, and
//                    it is written into the target buffer.
// Grants and reads overlap, so one flit per cycle can be accepted across all
// inputs. Routing is wormhole: the route chosen for a header is stored per
// input stream (input, link vc) and reused for body and tail flits, and the
// target virtual channel or processor buffer stays owned by that stream until
// its tail passes, so worms never interleave inside one buffer.
// A router-input flit that cannot be accepted (target full or owned by
// another worm) is refused with nack, so the
// upstream router can offer its other virtual channel instead; the cycle
// after a nack that input is not considered. The processor input is never
// refused, its request simply waits.
// Targets: index 2*dim+vc is a virtual channel of router output dim, index
// 2*NR the processor output buffer. The priority order, round robin, routing
// by table and grant-then-read sequence follow the published design; the
// pipelining of the two steps and buffer reservation are this design's own.
module input_controller
  import noc_pkg::*;
#(
  parameter int unsigned NR = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  link_fwd_t         in_fwd   [NR+1],
  output link_bwd_t         in_bwd   [NR+1],
  output logic [ADDR_W-1:0] rt_addr  [NR+1],
  input  route_t            rt_route [NR+1],
  input  logic              tgt_free1 [2*NR+1],
  input  logic              tgt_free2 [2*NR+1],
  output logic              wr_en     [2*NR+1],
  output flit_t             wr_data
);
  localparam int unsigned NIN = NR + 1;
  localparam int unsigned NT  = 2 * NR + 1;
  localparam int unsigned TW  = $clog2(NT);
  localparam int unsigned IW  = $clog2(NIN);
  localparam int unsigned RW  = (NR > 1) ? $clog2(NR) : 1;

  logic          ack_q  [NIN];
  logic          nack_q [NIN];
  logic          act_q  [NIN][2];
  logic [TW-1:0] rtgt_q [NIN][2];
  logic          busy_q [NT];
  logic [RW-1:0] rr_q;
  logic          rd_valid_q;
  logic [IW-1:0] rd_src_q;
  logic [TW-1:0] rd_tgt_q;

  logic          cand   [NIN];
  logic [TW-1:0] cand_t [NIN];
  logic          gnt_any;
  logic [IW-1:0] gnt;
  flit_t         gnt_f;
  logic          gnt_v;
  logic [TW-1:0] gnt_t;

  function automatic logic [TW-1:0] target_of(route_t r);
    if (r.eject)  return TW'(2 * NR);
    if (NR == 1)  return TW'(r.vc);
    return TW'({r.dir, r.vc});
  endfunction

  always_comb begin
    for (int i = 0; i < NIN; i++) rt_addr[i] = dest_of(in_fwd[i].data);
  end

  // Candidate inputs and their targets.
  always_comb begin
    for (int i = 0; i < NIN; i++) begin
      logic          v;
      logic          ok_owner;
      logic [TW-1:0] t;
      logic          room;
      v = (i < NR) ? in_fwd[i].vc : 1'b0;
      if (is_head(in_fwd[i].data)) begin
        t        = target_of(rt_route[i]);
        ok_owner = !busy_q[t];
      end else begin
        t        = rtgt_q[i][v];
        ok_owner = act_q[i][v];
      end
      room      = (rd_valid_q && rd_tgt_q == t) ? tgt_free2[t] : tgt_free1[t];
      cand[i]   = in_fwd[i].req && !ack_q[i] && !nack_q[i] && ok_owner && room;
      cand_t[i] = t;
    end
  end

  // Router inputs first, round robin among them; then the processor input.
  always_comb begin
    gnt_any = 1'b0;
    gnt     = IW'(NR);
    for (int k = 0; k < NR; k++) begin
      logic [IW-1:0] idx;
      idx = IW'((32'(rr_q) + k) % NR);
      if (!gnt_any && cand[idx]) begin
        gnt_any = 1'b1;
        gnt     = idx;
      end
    end
    if (!gnt_any && cand[NR]) begin
      gnt_any = 1'b1;
      gnt     = IW'(NR);
    end
  end

  // The granted flit, its link channel and its target.
  always_comb begin
    gnt_f = in_fwd[gnt].data;
    gnt_v = (32'(gnt) < NR) ? in_fwd[gnt].vc : 1'b0;
    gnt_t = cand_t[gnt];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NIN; i++) begin
        ack_q[i]     <= 1'b0;
        nack_q[i]    <= 1'b0;
        act_q[i][0]  <= 1'b0;
        act_q[i][1]  <= 1'b0;
        rtgt_q[i][0] <= '0;
        rtgt_q[i][1] <= '0;
      end
      for (int t = 0; t < NT; t++) busy_q[t] <= 1'b0;
      rr_q       <= '0;
      rd_valid_q <= 1'b0;
      rd_src_q   <= '0;
      rd_tgt_q   <= '0;
    end else begin
      for (int i = 0; i < NIN; i++) begin
        ack_q[i]  <= gnt_any && (gnt == IW'(i));
        // Refuse a waiting router-input flit so its sender may switch channel.
        nack_q[i] <= (i < NR) && in_fwd[i].req && !ack_q[i] && !nack_q[i] && !cand[i];
      end
      rd_valid_q <= gnt_any;
      if (gnt_any) begin
        rd_src_q <= gnt;
        rd_tgt_q <= gnt_t;
        if (is_head(gnt_f)) begin
          act_q[gnt][gnt_v]  <= !is_tail(gnt_f);
          rtgt_q[gnt][gnt_v] <= gnt_t;
          busy_q[gnt_t]      <= !is_tail(gnt_f);
        end else if (is_tail(gnt_f)) begin
          act_q[gnt][gnt_v]  <= 1'b0;
          busy_q[gnt_t]      <= 1'b0;
        end
        if (32'(gnt) < NR) rr_q <= RW'((32'(gnt) + 1) % NR);
      end
    end
  end

  // Read stage: the acknowledged sender still holds its flit this cycle.
  always_comb begin
    for (int t = 0; t < NT; t++) wr_en[t] = rd_valid_q && (rd_tgt_q == TW'(t));
    wr_data = in_fwd[rd_src_q].data;
  end

  always_comb begin
    for (int i = 0; i < NIN; i++) in_bwd[i] = '{ack: ack_q[i], nack: nack_q[i]};
  end

  for (genvar i = 0; i < NIN; i++) begin : g_chk
    // A sender must hold its request and flit until it is acknowledged.
    a_ack_has_req: assert property (@(posedge clk) disable iff (!rst_n)
                                    ack_q[i] |-> in_fwd[i].req);
  end
endmodule
