// tb_router_out_ctrl: the router output controller between two modelled
// virtual channel queues and a modelled receiver.
// Directed part: with an always-ready receiver a stream of flits from one
// channel leaves at exactly one flit per 3 cycles, and with both channels
// loaded the link alternates between them. A nack leaves the flit in its
// channel and the next offer comes from the other channel.
// Random part: the receiver acks, nacks or waits at random; every acked flit
// must be the head of the channel named on vc, in order, each exactly once.
module tb_router_out_ctrl;
  import noc_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;
  always #5 clk = ~clk;

  flit_t     vc_head [2];
  logic      vc_empty [2];
  logic      vc_pop [2];
  link_fwd_t out_fwd;
  link_bwd_t out_bwd;

  router_out_ctrl dut (.clk, .rst_n, .vc_head, .vc_empty, .vc_pop, .out_fwd, .out_bwd);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  flit_t q [2][$];
  always_comb for (int v = 0; v < 2; v++) begin
    vc_empty[v] = (q[v].size() == 0);
    vc_head[v]  = (q[v].size() > 0) ? q[v][0] : '0;
  end

  // receiver model: mode 0 = ack at once, 1 = random ack/nack/wait,
  // 2 = nack everything on channel 0, ack channel 1
  int  mode;
  int  cyc = 0;
  int  acc_cyc [$];
  int  acc_vc [$];
  logic busy_rx;   // the cycle after a response the receiver looks away
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) begin
      out_bwd <= '0;
      busy_rx <= 1'b0;
    end else begin
      link_bwd_t b;
      b = '0;
      if (out_fwd.req && !out_bwd.ack && !out_bwd.nack) begin
        case (mode)
          0: b.ack = 1'b1;
          1: begin
               int r;
               r = $urandom % 4;
               if (r == 0) b.ack = 1'b1;
               else if (r == 1) b.nack = 1'b1;
             end
          default: if (out_fwd.vc) b.ack = 1'b1; else b.nack = 1'b1;
        endcase
      end
      out_bwd <= b;
      // check the flit that is being acknowledged now
      if (out_bwd.ack) begin
        check("acked flit is the channel head", q[out_fwd.vc].size() > 0 && out_fwd.data == q[out_fwd.vc][0]);
        check("pop with ack", vc_pop[out_fwd.vc] && !vc_pop[!out_fwd.vc]);
        acc_cyc.push_back(cyc);
        acc_vc.push_back(int'(out_fwd.vc));
        void'(q[out_fwd.vc].pop_front());
      end else begin
        check("no pop without ack", !vc_pop[0] && !vc_pop[1]);
      end
    end
  end

  // After a nack on channel 0 with channel 1 loaded, the next offer must
  // come from channel 1.
  int   nack_seen_vc0_then_vc1 = 0;
  logic pend_switch = 1'b0;
  logic prev_req = 1'b0;
  always @(posedge clk) if (rst_n) begin
    prev_req <= out_fwd.req;
    if (out_fwd.req && out_bwd.nack && !out_fwd.vc && q[1].size() > 0) pend_switch <= 1'b1;
    else if (out_fwd.req && !prev_req && pend_switch) begin
      check("after nack the other channel is offered", out_fwd.vc == 1'b1);
      if (out_fwd.vc) nack_seen_vc0_then_vc1++;
      pend_switch <= 1'b0;
    end
  end

  int n = 1;
  function automatic flit_t mk(int v);
    flit_t f;
    f = flit_t'({2'b00, 1'(v), 29'(n)});
    n++;
    return f;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // 1. rate: 6 flits in channel 0, always-ready receiver
    @(negedge clk);
    for (int k = 0; k < 6; k++) q[0].push_back(mk(0));
    wait (q[0].size() == 0);
    repeat (3) @(posedge clk);
    check("six flits accepted", acc_cyc.size() == 6);
    for (int k = 1; k < acc_cyc.size(); k++) check("3 cycles per flit", acc_cyc[k] - acc_cyc[k-1] == 3);
    // 2. alternation
    acc_vc.delete(); acc_cyc.delete();
    @(negedge clk);
    for (int k = 0; k < 4; k++) begin q[0].push_back(mk(0)); q[1].push_back(mk(1)); end
    wait (q[0].size() == 0 && q[1].size() == 0);
    repeat (3) @(posedge clk);
    check("eight flits", acc_vc.size() == 8);
    for (int k = 1; k < acc_vc.size(); k++) check("channels alternate", acc_vc[k] != acc_vc[k-1]);
    // 3. channel 0 refused: channel 1 still flows
    mode = 2;
    @(negedge clk);
    for (int k = 0; k < 3; k++) begin q[0].push_back(mk(0)); q[1].push_back(mk(1)); end
    repeat (40) @(posedge clk);
    check("blocked channel keeps its flits", q[0].size() == 3);
    check("other channel drained", q[1].size() == 0);
    check("switch after nack seen", nack_seen_vc0_then_vc1 > 0);
    mode = 0;
    wait (q[0].size() == 0);
    // 4. random
    mode = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      if ($urandom % 3 == 0) begin
        int v;
        v = $urandom % 2;
        q[v].push_back(mk(v));
      end
    end
    mode = 0;
    for (int k = 0; k < 20000 && (q[0].size() != 0 || q[1].size() != 0); k++) @(posedge clk);
    check("all flits sent", q[0].size() == 0 && q[1].size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
