// tb_noc_top: end-to-end test of noc_top at its default sizes (1x4 ring of
// 1D routers and 2x2 torus of 2D routers), each node driven by a proc_model.
//  1. One single-flit message A->B and A->D on each network. Zero-load
//     latency, from the source's request to the delivery request, must be
//     3 cycles per router passed: 3*(hops+1).
//  2. 1000 single-flit messages A->B and then A->D on the ring; with the
//     link running at 3 cycles per flit the burst must take about 3000
//     cycles (checked to be under 3*1000 + 40).
//  3. Reconfiguration: the torus tables of nodes 0 and 2 are rewritten so
//     that traffic 0->3 goes Y first; a worm must then leave node 0 on its
//     Y output. The tables are restored.
//  4. Random all-to-all worms of 1..6 flits with slow receivers on both
//     networks. Everything must arrive whole and in order.
// Monitors count the mechanisms of the design: refused flits (nack), both
// virtual channels, wrap-around links, X-to-Y turns, ejection, router vs
// processor input conflicts, round-robin conflicts, full virtual channels,
// full output buffers, multi-flit worms and table rewrites. Each must occur.
module tb_noc_top;
  import noc_pkg::*;
  localparam int RN = 4, TN = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  ring_pin_req [RN], ring_pin_ack [RN], ring_pout_req [RN], ring_pout_ack [RN], ring_cfg_we [RN];
  flit_t ring_pin_data [RN], ring_pout_data [RN];
  logic  tor_pin_req [TN], tor_pin_ack [TN], tor_pout_req [TN], tor_pout_ack [TN], tor_cfg_we [TN];
  flit_t tor_pin_data [TN], tor_pout_data [TN];
  logic [ADDR_W-1:0] cfg_addr;
  route_t cfg_route;

  noc_top dut (.*);

  // processor models
  int r_limit [RN], r_dest [RN], r_len [RN], r_gap [RN], r_rxd [RN];
  int r_sent [RN], r_rcvd [RN], r_flits [RN], r_chk [RN], r_fail [RN];
  int t_limit [TN], t_dest [TN], t_len [TN], t_gap [TN], t_rxd [TN];
  int t_sent [TN], t_rcvd [TN], t_flits [TN], t_chk [TN], t_fail [TN];
  for (genvar n = 0; n < RN; n++) begin : g_rp
    proc_model #(.ME(n), .NODES(RN)) u_p (
      .clk, .rst_n, .pin_req(ring_pin_req[n]), .pin_data(ring_pin_data[n]), .pin_ack(ring_pin_ack[n]),
      .pout_req(ring_pout_req[n]), .pout_data(ring_pout_data[n]), .pout_ack(ring_pout_ack[n]),
      .gen_limit(r_limit[n]), .gen_dest(r_dest[n]), .gen_len_max(r_len[n]), .gen_gap(r_gap[n]),
      .rx_delay_max(r_rxd[n]), .sent_worms(r_sent[n]), .rcvd_worms(r_rcvd[n]), .rcvd_flits(r_flits[n]),
      .checks(r_chk[n]), .failures(r_fail[n]));
  end
  for (genvar n = 0; n < TN; n++) begin : g_tp
    proc_model #(.ME(n), .NODES(TN)) u_p (
      .clk, .rst_n, .pin_req(tor_pin_req[n]), .pin_data(tor_pin_data[n]), .pin_ack(tor_pin_ack[n]),
      .pout_req(tor_pout_req[n]), .pout_data(tor_pout_data[n]), .pout_ack(tor_pout_ack[n]),
      .gen_limit(t_limit[n]), .gen_dest(t_dest[n]), .gen_len_max(t_len[n]), .gen_gap(t_gap[n]),
      .rx_delay_max(t_rxd[n]), .sent_worms(t_sent[n]), .rcvd_worms(t_rcvd[n]), .rcvd_flits(t_flits[n]),
      .checks(t_chk[n]), .failures(t_fail[n]));
  end

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- mechanism monitors ----------------
  int m_nack = 0, m_vc0 = 0, m_vc1 = 0, m_wrap = 0, m_turn = 0, m_eject = 0;
  int m_prio = 0, m_rr = 0, m_vcfull = 0, m_obfull = 0, m_worm = 0, m_cfg = 0, m_yfirst = 0;

  for (genvar n = 0; n < RN; n++) begin : g_rmon
    always @(posedge clk) if (rst_n) begin
      if (dut.u_ring.g_node[n].u_router.rin_bwd[0].nack) m_nack++;
      if (dut.u_ring.g_node[n].u_router.rout_fwd[0].req && dut.u_ring.g_node[n].u_router.rout_bwd[0].ack) begin
        if (dut.u_ring.g_node[n].u_router.rout_fwd[0].vc) m_vc1++; else m_vc0++;
        if (n == RN - 1) m_wrap++;
      end
      if (dut.u_ring.g_node[n].u_router.u_inctl.cand[0] && dut.u_ring.g_node[n].u_router.u_inctl.cand[1]) m_prio++;
      if (!dut.u_ring.g_node[n].u_router.free1[0] || !dut.u_ring.g_node[n].u_router.free1[1]) m_vcfull++;
      if (!dut.u_ring.g_node[n].u_router.free1[2]) m_obfull++;
      if (dut.u_ring.g_node[n].u_router.wr_en[2]) m_eject++;
    end
  end
  for (genvar n = 0; n < TN; n++) begin : g_tmon
    for (genvar d = 0; d < 2; d++) begin : g_d
      always @(posedge clk) if (rst_n) begin
        if (dut.u_torus.g_node[n].u_router.rin_bwd[d].nack) m_nack++;
        if (dut.u_torus.g_node[n].u_router.rout_fwd[d].req && dut.u_torus.g_node[n].u_router.rout_bwd[d].ack) begin
          if (dut.u_torus.g_node[n].u_router.rout_fwd[d].vc) m_vc1++; else m_vc0++;
          if ((d == 0 && n % 2 == 1) || (d == 1 && n / 2 == 1)) m_wrap++;
        end
      end
    end
    always @(posedge clk) if (rst_n) begin
      // a flit read from the X input into a Y virtual channel: X-to-Y turn
      if (dut.u_torus.g_node[n].u_router.u_inctl.rd_valid_q &&
          dut.u_torus.g_node[n].u_router.u_inctl.rd_src_q == 0 &&
          (dut.u_torus.g_node[n].u_router.u_inctl.rd_tgt_q == 2 ||
           dut.u_torus.g_node[n].u_router.u_inctl.rd_tgt_q == 3)) m_turn++;
      if ((dut.u_torus.g_node[n].u_router.u_inctl.cand[0] || dut.u_torus.g_node[n].u_router.u_inctl.cand[1]) &&
          dut.u_torus.g_node[n].u_router.u_inctl.cand[2]) m_prio++;
      if (dut.u_torus.g_node[n].u_router.u_inctl.cand[0] && dut.u_torus.g_node[n].u_router.u_inctl.cand[1]) m_rr++;
      for (int t = 0; t < 4; t++) if (!dut.u_torus.g_node[n].u_router.free1[t]) m_vcfull++;
      if (!dut.u_torus.g_node[n].u_router.free1[4]) m_obfull++;
      if (dut.u_torus.g_node[n].u_router.wr_en[4]) m_eject++;
    end
  end
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < TN; n++) if (tor_cfg_we[n]) m_cfg++;
    if (dut.u_torus.g_node[0].u_router.rout_fwd[1].req && dut.u_torus.g_node[0].u_router.rout_bwd[1].ack &&
        is_head(dut.u_torus.g_node[0].u_router.rout_fwd[1].data) &&
        dest_of(dut.u_torus.g_node[0].u_router.rout_fwd[1].data) == 3) m_yfirst++;
  end

  // ---------------- helpers ----------------
  function automatic int sum(input int a [4]);
    int s;
    s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  task automatic wait_quiet();
    int guard;
    guard = 0;
    while ((sum(r_rcvd) != sum(r_sent) || sum(t_rcvd) != sum(t_sent) ||
            sum(r_sent) != sum(r_limit) || sum(t_sent) != sum(t_limit)) && guard < 100000) begin
      @(posedge clk);
      guard++;
    end
    check("network drained", guard < 100000);
    repeat (5) @(posedge clk);
  endtask

  // latency of one single-flit message from src to dst; ring or torus
  task automatic one_packet(bit torus, int src, int dst, int exp_cycles);
    int t0, t1;
    if (torus) begin t_dest[src] = dst; t_len[src] = 1; t_limit[src] = t_sent[src] + 1; end
    else       begin r_dest[src] = dst; r_len[src] = 1; r_limit[src] = r_sent[src] + 1; end
    if (torus) while (!tor_pin_req[src]) @(posedge clk);
    else       while (!ring_pin_req[src]) @(posedge clk);
    t0 = cyc;
    if (torus) while (!tor_pout_req[dst]) @(posedge clk);
    else       while (!ring_pout_req[dst]) @(posedge clk);
    t1 = cyc;
    $display("%s %0d->%0d: %0d cycles (expected %0d)", torus ? "2x2 torus" : "1x4 ring ", src, dst, t1 - t0, exp_cycles);
    check("zero-load latency 3 cycles per router", t1 - t0 == exp_cycles);
    wait_quiet();
  endtask

  task automatic burst(int src, int dst, int n);
    int t0;
    r_dest[src] = dst; r_len[src] = 1; r_gap[src] = 0;
    t0 = cyc;
    r_limit[src] = r_sent[src] + n;
    while (r_rcvd[dst] < n) @(posedge clk);
    $display("1x4 ring %0d->%0d: %0d single-flit messages in %0d cycles", src, dst, n, cyc - t0);
    check("burst at about 3 cycles per message", cyc - t0 <= 3 * n + 40);
    wait_quiet();
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + sum(r_chk) + sum(t_chk), failures + sum(r_fail) + sum(t_fail) + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4; n++) begin
      r_limit[n] = 0; r_dest[n] = -1; r_len[n] = 1; r_gap[n] = 0; r_rxd[n] = 0;
      t_limit[n] = 0; t_dest[n] = -1; t_len[n] = 1; t_gap[n] = 0; t_rxd[n] = 0;
      ring_cfg_we[n] = 1'b0; tor_cfg_we[n] = 1'b0;
    end
    cfg_addr = '0; cfg_route = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);

    // 1. single messages (A = node 0, B = node 1, D = node 3)
    one_packet(0, 0, 1, 3 * 2);   // ring, 1 hop
    one_packet(0, 0, 3, 3 * 4);   // ring, 3 hops
    one_packet(1, 0, 1, 3 * 2);   // torus, 1 hop
    one_packet(1, 0, 3, 3 * 3);   // torus, 2 hops

    // 2. 1000-message bursts on the ring
    burst(0, 1, 1000);
    for (int n = 0; n < 4; n++) r_limit[n] = r_sent[n];
    burst(0, 3, 1000);

    // 3. reconfiguration: route 0->3 Y first on the torus
    @(negedge clk);
    cfg_addr = 4'd3;
    cfg_route = '{eject: 1'b0, dir: 1'b1, vc: 1'b1};
    tor_cfg_we[0] = 1'b1;
    @(negedge clk);
    tor_cfg_we[0] = 1'b0;
    cfg_route = '{eject: 1'b0, dir: 1'b0, vc: 1'b1};
    tor_cfg_we[2] = 1'b1;
    @(negedge clk);
    tor_cfg_we[2] = 1'b0;
    t_dest[0] = 3; t_len[0] = 4; t_limit[0] = t_sent[0] + 3;
    wait_quiet();
    check("reconfigured route used", m_yfirst >= 3);
    @(negedge clk);
    cfg_route = '{eject: 1'b0, dir: 1'b0, vc: 1'b1};
    tor_cfg_we[0] = 1'b1;
    @(negedge clk);
    tor_cfg_we[0] = 1'b0;
    cfg_route = '{eject: 1'b0, dir: 1'b1, vc: 1'b1};
    tor_cfg_we[2] = 1'b1;
    @(negedge clk);
    tor_cfg_we[2] = 1'b0;
    m_yfirst = 0;
    t_limit[0] = t_sent[0] + 2;
    wait_quiet();
    check("restored route is X first", m_yfirst == 0);

    // 4. random all-to-all traffic with slow receivers
    for (int n = 0; n < 4; n++) begin
      r_dest[n] = -1; r_len[n] = 6; r_gap[n] = 1; r_rxd[n] = (n == 2) ? 12 : 1;
      t_dest[n] = -1; t_len[n] = 6; t_gap[n] = 1; t_rxd[n] = (n == 3) ? 12 : 1;
    end
    for (int n = 0; n < 4; n++) begin
      r_limit[n] = r_sent[n] + 150;
      t_limit[n] = t_sent[n] + 150;
    end
    wait_quiet();
    m_worm = sum(r_flits) + sum(t_flits) - sum(r_rcvd) - sum(t_rcvd);

    $display("mechanisms: nack=%0d vc0=%0d vc1=%0d wrap=%0d turn=%0d eject=%0d prio=%0d rr=%0d vcfull=%0d obfull=%0d worm_bodies=%0d cfg=%0d",
             m_nack, m_vc0, m_vc1, m_wrap, m_turn, m_eject, m_prio, m_rr, m_vcfull, m_obfull, m_worm, m_cfg);
    check("mechanism: nack", m_nack > 0);
    check("mechanism: VC0", m_vc0 > 0);
    check("mechanism: VC1", m_vc1 > 0);
    check("mechanism: wrap-around", m_wrap > 0);
    check("mechanism: X-to-Y turn", m_turn > 0);
    check("mechanism: ejection", m_eject > 0);
    check("mechanism: router/processor input conflict", m_prio > 0);
    check("mechanism: round-robin conflict", m_rr > 0);
    check("mechanism: full virtual channel", m_vcfull > 0);
    check("mechanism: full output buffer", m_obfull > 0);
    check("mechanism: multi-flit worms", m_worm > 0);
    check("mechanism: table rewrite", m_cfg > 0);
    check("ring: every worm delivered", sum(r_rcvd) == sum(r_sent));
    check("torus: every worm delivered", sum(t_rcvd) == sum(t_sent));
    $display("TB_RESULT checks=%0d failures=%0d", checks + sum(r_chk) + sum(t_chk), failures + sum(r_fail) + sum(t_fail));
    $finish;
  end
endmodule
