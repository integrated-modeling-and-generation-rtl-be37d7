// router_harness: drives one noc_router with modelled neighbours and a
// modelled processor, and checks what comes out. Used by tb_noc_router.
// 1. Latency: a flit arriving on router input 0 and routed straight on
//    leaves on router output 0 three cycles after its request.
// 2. Reconfiguration: the table entry of one destination is rewritten to
//    eject locally and a worm to that destination then reaches the
//    processor; the entry is restored.
// 3. Random worms (1..4 flits) from every input to every destination, with
//    senders that use both link channels and receivers that ack, nack or
//    wait at random. Each worm must leave on the output and channel given
//    by an independently computed dimension-order route, intact, and every
//    worm must arrive.
// Flit payload: [3:0] destination (header), [7:4] flit index, [29:8] worm id.
module router_harness
  import noc_pkg::*;
#(
  parameter int NDIM  = 2,
  parameter int ROWS  = 3,
  parameter int COLS  = 3,
  parameter int MY_X  = 1,
  parameter int MY_Y  = 1,
  parameter int NWORM = 300
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int NIN = NDIM + 1;

  link_fwd_t rin_fwd [NDIM];
  link_bwd_t rin_bwd [NDIM];
  link_fwd_t rout_fwd [NDIM];
  link_bwd_t rout_bwd [NDIM];
  logic      pin_req, pin_ack, pout_req, pout_ack;
  flit_t     pin_data, pout_data;
  logic      cfg_we;
  logic [ADDR_W-1:0] cfg_addr;
  route_t    cfg_route;

  noc_router #(.NDIM(NDIM), .ROWS(ROWS), .COLS(COLS), .MY_X(MY_X), .MY_Y(MY_Y)) dut (
    .clk, .rst_n, .rin_fwd, .rin_bwd, .rout_fwd, .rout_bwd,
    .pin_req, .pin_data, .pin_ack, .pout_req, .pout_data, .pout_ack,
    .cfg_we, .cfg_addr, .cfg_route);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [router %0dD] %s at %0t", NDIM, what, $time);
    end
  endtask

  // Reference route: output port (NDIM = processor) and channel.
  function automatic void ref_route(int d, output int port, output int vc);
    int dx, dy, hx, hy;
    dx = d % COLS; dy = d / COLS;
    hx = (dx - MY_X + COLS) % COLS;
    hy = (dy - MY_Y + ROWS) % ROWS;
    if (hx != 0)      begin port = 0;    vc = (MY_X + hx >= COLS) ? 0 : 1; end
    else if (hy != 0) begin port = 1;    vc = (MY_Y + hy >= ROWS) ? 0 : 1; end
    else              begin port = NDIM; vc = 0; end
  endfunction

  // ---------------- senders ----------------
  flit_t q [NIN][2][$];
  bit    send_en;
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int d = 0; d < NDIM; d++) rin_fwd[d] <= '0;
      pin_req <= 1'b0; pin_data <= '0;
    end else begin
      for (int d = 0; d < NDIM; d++) begin
        if (rin_fwd[d].req) begin
          if (rin_bwd[d].ack) begin
            void'(q[d][rin_fwd[d].vc].pop_front());
            rin_fwd[d].req <= 1'b0;
          end else if (rin_bwd[d].nack) rin_fwd[d].req <= 1'b0;
        end else if (send_en && $urandom % 4 != 0) begin
          int v;
          v = $urandom % 2;
          if (q[d][v].size() == 0) v = 1 - v;
          if (q[d][v].size() > 0)
            rin_fwd[d] <= '{req: 1'b1, vc: 1'(v), data: q[d][v][0]};
        end
      end
      if (pin_req) begin
        if (pin_ack) begin
          void'(q[NDIM][0].pop_front());
          pin_req <= 1'b0;
        end
      end else if (send_en && q[NDIM][0].size() > 0 && $urandom % 4 != 0) begin
        pin_req  <= 1'b1;
        pin_data <= q[NDIM][0][0];
      end
    end
  end

  // ---------------- receivers ----------------
  int  exp_port [int];   // worm id -> expected output
  int  exp_vc   [int];
  int  cur [NIN][2];     // worm in flight per output and channel
  int  nxt [NIN][2];     // next flit index expected
  int  worms_done = 0;
  bit  rx_random;
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int d = 0; d < NDIM; d++) rout_bwd[d] <= '0;
      pout_ack <= 1'b0;
    end else begin
      for (int p = 0; p < NIN; p++) begin
        logic  rq, ak;
        flit_t f;
        int    v;
        if (p < NDIM) begin rq = rout_fwd[p].req; ak = rout_bwd[p].ack; f = rout_fwd[p].data; v = int'(rout_fwd[p].vc); end
        else          begin rq = pout_req; ak = pout_ack; f = pout_data; v = 0; end
        if (rq && ak) begin
          int id, idx;
          id  = int'(f.payload[29:8]);
          idx = int'(f.payload[7:4]);
          if (is_head(f)) begin
            check("header starts a new worm", cur[p][v] == -1);
            check("known worm", exp_port.exists(id));
            if (exp_port.exists(id)) begin
              check("worm leaves on its route's output", exp_port[id] == p);
              if (p < NDIM) check("worm uses its route's channel", exp_vc[id] == v);
            end
            cur[p][v] = is_tail(f) ? -1 : id;
            nxt[p][v] = 1;
          end else begin
            check("body belongs to the open worm", cur[p][v] == id);
            check("flits in order", nxt[p][v] == idx);
            nxt[p][v]++;
            if (is_tail(f)) cur[p][v] = -1;
          end
          if (is_tail(f)) worms_done++;
        end
      end
      // responses
      for (int d = 0; d < NDIM; d++) begin
        link_bwd_t b;
        b = '0;
        if (rout_fwd[d].req && !rout_bwd[d].ack && !rout_bwd[d].nack) begin
          int r;
          r = rx_random ? $urandom % 4 : 0;
          if (r == 0 || r == 1) b.ack = 1'b1;
          else if (r == 2) b.nack = 1'b1;
        end
        rout_bwd[d] <= b;
      end
      pout_ack <= pout_req && !pout_ack && (!rx_random || $urandom % 2 == 0);
    end
  end

  int wid = 1;
  task automatic push_worm(int i, int v, int d, int len);
    int p, c;
    ref_route(d, p, c);
    exp_port[wid] = p;
    exp_vc[wid]   = c;
    for (int k = 0; k < len; k++) begin
      flit_t f;
      if (len == 1)          f.ftype = FT_SINGLE;
      else if (k == 0)       f.ftype = FT_HEAD;
      else if (k == len - 1) f.ftype = FT_TAIL;
      else                   f.ftype = FT_BODY;
      f.payload = {22'(wid), 4'(k), (k == 0) ? 4'(d) : 4'($urandom)};
      q[i][v].push_back(f);
    end
    wid++;
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    int t0, sent;
    checks = 0; failures = 0; done = 1'b0;
    send_en = 0; rx_random = 0;
    cfg_we = 0; cfg_addr = '0; cfg_route = '0;
    for (int p = 0; p < NIN; p++) begin cur[p][0] = -1; cur[p][1] = -1; nxt[p][0] = 0; nxt[p][1] = 0; end
    @(posedge rst_n);
    repeat (2) @(posedge clk);

    // 1. latency of one hop: input 0 -> output 0
    begin
      int d;
      d = MY_Y * COLS + (MY_X + 1) % COLS;
      push_worm(0, 0, d, 1);
      send_en = 1;
      while (!rin_fwd[0].req) @(posedge clk);
      t0 = cyc;
      send_en = 0;
      while (!rout_fwd[0].req) @(posedge clk);
      check("3 cycles from input request to output request", cyc - t0 == 3);
      while (worms_done < 1) @(posedge clk);
    end

    // 2. reconfigure: send destination (MY_X+1) to the local processor
    begin
      int d;
      d = MY_Y * COLS + (MY_X + 1) % COLS;
      @(negedge clk);
      cfg_we = 1; cfg_addr = ADDR_W'(d); cfg_route = '{eject: 1'b1, dir: 1'b0, vc: 1'b0};
      @(negedge clk);
      cfg_we = 0;
      push_worm(NDIM, 0, d, 3);
      exp_port[wid-1] = NDIM;
      send_en = 1;
      while (worms_done < 2) @(posedge clk);
      send_en = 0;
      check("rerouted worm reached the processor", worms_done == 2);
      @(negedge clk);
      cfg_we = 1; cfg_route = '{eject: 1'b0, dir: 1'b0, vc: 1'(((MY_X + 1) % COLS) > MY_X)};
      @(negedge clk);
      cfg_we = 0;
    end

    // 3. random worms from every input
    sent = 2;
    for (int k = 0; k < NWORM; k++) begin
      int i, d, v;
      i = $urandom % NIN;
      d = $urandom % (ROWS * COLS);
      v = (i == NDIM) ? 0 : $urandom % 2;
      push_worm(i, v, d, 1 + $urandom % 4);
      sent++;
    end
    rx_random = 1;
    send_en = 1;
    for (int k = 0; k < 40000 && worms_done < sent; k++) @(posedge clk);
    check("every worm arrived", worms_done == sent);
    done = 1'b1;
  end
endmodule
