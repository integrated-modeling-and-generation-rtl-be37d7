// tb_input_controller: the input controller of a 2D router (two router
// inputs X and Y, one processor input, five target buffers) surrounded by
// models: handshaking senders, a fixed routing function and 2-entry buffers
// that drain at random.
// Directed part: a request is acknowledged one cycle after it is raised and
// the flit is written in the ack cycle; router inputs win over the processor;
// X and Y take turns under round robin; a full buffer holds off the request.
// Random part: worms of 1..4 flits from all inputs, the router inputs using
// both link channels; every write must land in the target that its worm's
// header selects, worms must not interleave inside a buffer, and every flit
// must arrive.
module tb_input_controller;
  import noc_pkg::*;
  localparam int NR = 2, NIN = 3, NT = 5;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;
  always #5 clk = ~clk;

  link_fwd_t         in_fwd [NIN];
  link_bwd_t         in_bwd [NIN];
  logic [ADDR_W-1:0] rt_addr [NIN];
  route_t            rt_route [NIN];
  logic              free1 [NT], free2 [NT], wr_en [NT];
  flit_t             wr_data;

  input_controller #(.NR(NR)) dut (
    .clk, .rst_n, .in_fwd, .in_bwd, .rt_addr, .rt_route,
    .tgt_free1(free1), .tgt_free2(free2), .wr_en, .wr_data);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Routing model: destination d goes to target d % 5 (4 = processor buffer).
  function automatic int tgt_of_dest(int d);
    return d % NT;
  endfunction
  always_comb begin
    for (int i = 0; i < NIN; i++) begin
      int t;
      t = tgt_of_dest(int'(rt_addr[i]));
      rt_route[i] = (t == 4) ? '{eject: 1'b1, dir: 1'b0, vc: 1'b0}
                             : '{eject: 1'b0, dir: t[1], vc: t[0]};
    end
  end

  // Buffer models
  int cnt [NT];
  bit drain_en;
  bit block [NT];
  always_comb for (int t = 0; t < NT; t++) begin
    free1[t] = !block[t] && cnt[t] < 2;
    free2[t] = !block[t] && cnt[t] == 0;
  end
  always @(posedge clk) begin
    for (int t = 0; t < NT; t++) begin
      int c;
      c = cnt[t];
      if (wr_en[t]) begin
        check("no write into a full buffer", c < 2);
        c++;
      end
      if (drain_en && c > 0 && $urandom % 3 == 0) c--;
      cnt[t] <= c;
    end
  end

  // Senders: per input and link channel a queue of flits. With a bit of
  // sync_mask set, the inputs in the mask raise their requests together,
  // and only when all of them are idle and have a flit.
  flit_t q [NIN][2][$];
  bit    send_en;
  bit [NIN-1:0] sync_mask;
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NIN; i++) in_fwd[i] <= '0;
    end else begin
      bit all_ready;
      all_ready = (sync_mask != 0);
      for (int i = 0; i < NIN; i++)
        if (sync_mask[i] && (in_fwd[i].req || q[i][0].size() == 0)) all_ready = 0;
      for (int i = 0; i < NIN; i++) begin
        if (in_fwd[i].req) begin
          if (in_bwd[i].ack) begin
            void'(q[i][in_fwd[i].vc].pop_front());
            in_fwd[i].req <= 1'b0;
          end else if (in_bwd[i].nack) begin
            check("only router inputs are refused", i < NR);
            in_fwd[i].req <= 1'b0;
          end
        end else if (sync_mask[i]) begin
          if (all_ready) begin
            in_fwd[i].req  <= 1'b1;
            in_fwd[i].vc   <= 1'b0;
            in_fwd[i].data <= q[i][0][0];
          end
        end else if (send_en && $urandom % 2 == 0) begin
          int v;
          v = $urandom % 2;
          if (q[i][v].size() == 0) v = 1 - v;
          if (i == NR) v = 0;
          if (q[i][v].size() > 0) begin
            in_fwd[i].req  <= 1'b1;
            in_fwd[i].vc   <= 1'(v);
            in_fwd[i].data <= q[i][v][0];
          end
        end
      end
    end
  end

  // Order of acknowledgements
  int ack_log[$];
  int nacks [NIN];
  always @(posedge clk) for (int i = 0; i < NIN; i++) begin
    if (in_bwd[i].ack) ack_log.push_back(i);
    if (in_bwd[i].nack) nacks[i]++;
    check("never ack and nack together", !(in_bwd[i].ack && in_bwd[i].nack));
  end

  // Scoreboard on the write side. Flit payload: [3:0] dest (headers),
  // [5:4] input, [6] link vc, [29:7] running number.
  int owner [NT];       // -1 free, else input*2+vc
  int exp_tgt [NIN*2];  // target of the worm in flight per stream
  int writes = 0;
  int last_num [NIN*2];
  always @(posedge clk) if (rst_n) begin
    int n;
    n = 0;
    for (int t = 0; t < NT; t++) if (wr_en[t]) begin
      int s, num;
      n++;
      s   = int'(wr_data.payload[5:4]) * 2 + int'(wr_data.payload[6]);
      num = int'(wr_data.payload[29:7]);
      writes++;
      check("flits of a stream in order", num > last_num[s]);
      last_num[s] = num;
      if (is_head(wr_data)) begin
        check("header target from routing", t == tgt_of_dest(int'(dest_of(wr_data))));
        check("header into a free buffer", owner[t] == -1);
        exp_tgt[s] = t;
        owner[t] = is_tail(wr_data) ? -1 : s;
      end else begin
        check("body follows its header", t == exp_tgt[s]);
        check("no interleaving", owner[t] == s);
        if (is_tail(wr_data)) owner[t] = -1;
      end
    end
    check("one write per cycle", n <= 1);
  end

  int num_ctr = 1;
  function automatic flit_t mk(flit_type_e ft, int i, int v, int dest);
    flit_t f;
    f.ftype   = ft;
    f.payload = {23'(num_ctr), 1'(v), 2'(i), 4'(dest)};
    num_ctr++;
    return f;
  endfunction

  task automatic push_worm(int i, int v, int dest, int len);
    if (len == 1) q[i][v].push_back(mk(FT_SINGLE, i, v, dest));
    else begin
      q[i][v].push_back(mk(FT_HEAD, i, v, dest));
      for (int k = 1; k < len - 1; k++) q[i][v].push_back(mk(FT_BODY, i, v, $urandom % 16));
      q[i][v].push_back(mk(FT_TAIL, i, v, $urandom % 16));
    end
  endtask

  // Drive one request directly (sender model idle) and return the cycle of ack.
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, total;
    send_en = 0; drain_en = 1; sync_mask = 0;
    for (int t = 0; t < NT; t++) begin cnt[t] = 0; owner[t] = -1; block[t] = 0; end
    for (int i = 0; i < NIN; i++) nacks[i] = 0;
    for (int s = 0; s < NIN*2; s++) begin exp_tgt[s] = -1; last_num[s] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // 1. latency: single flit from X, ack one cycle after req, written in the ack cycle
    push_worm(0, 0, 1, 1);
    send_en = 1;
    wait (in_fwd[0].req);
    t0 = cyc;
    @(posedge clk); #1;
    check("ack one cycle after req", in_bwd[0].ack && cyc == t0 + 1);
    check("written in the ack cycle", wr_en[1] && wr_data == in_fwd[0].data);
    send_en = 0;
    repeat (4) @(posedge clk);

    // 2. priority: processor and X request together, X first (3 rounds)
    for (int k = 0; k < 3; k++) begin
      push_worm(2, 0, 4, 1);
      push_worm(0, 0, 1, 1);
    end
    ack_log.delete();
    sync_mask = 3'b101;
    repeat (20) @(posedge clk);
    sync_mask = 0;
    check("priority: six grants", ack_log.size() == 6);
    if (ack_log.size() == 6)
      for (int k = 0; k < 3; k++) check("router input beats processor", ack_log[2*k] == 0 && ack_log[2*k+1] == 2);

    // 3. round robin between X and Y: 4 rounds, grants alternate
    for (int k = 0; k < 4; k++) begin
      push_worm(0, 0, 2, 1);
      push_worm(1, 0, 3, 1);
    end
    ack_log.delete();
    sync_mask = 3'b011;
    repeat (24) @(posedge clk);
    sync_mask = 0;
    check("round robin served all", ack_log.size() == 8);
    for (int k = 1; k < ack_log.size(); k++) check("round robin alternates", ack_log[k] != ack_log[k-1]);
    repeat (4) @(posedge clk);

    // 4. full buffer holds the request back until room appears
    block[3] = 1;
    push_worm(1, 1, 3, 1);
    nacks[1] = 0;
    send_en = 1;
    repeat (12) @(posedge clk);
    #1 check("blocked while full", q[1][1].size() == 1);
    check("blocked flit refused", nacks[1] >= 2);
    block[3] = 0;
    repeat (4) @(posedge clk);
    #1 check("sent after room", q[1][1].size() == 0);

    // 5. random worms
    total = writes;
    for (int k = 0; k < 300; k++) begin
      int i;
      i = $urandom % NIN;
      push_worm(i, (i == NR) ? 0 : $urandom % 2, $urandom % 16, 1 + $urandom % 4);
    end
    send_en = 1;
    begin
      int guard;
      guard = 0;
      while (guard < 20000) begin
        int left;
        left = 0;
        for (int i = 0; i < NIN; i++) left += q[i][0].size() + q[i][1].size();
        if (left == 0) break;
        @(posedge clk);
        guard++;
      end
      check("all random flits delivered", guard < 20000);
    end
    check("flit count", writes > total + 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
