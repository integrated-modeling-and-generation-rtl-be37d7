// proc_model: behavioural stand-in for the processor core at one network
// node (the embedded processor and its software are outside the design).
// Sender: while the number of worms sent is below gen_limit it builds worms
// of 1..gen_len_max flits to gen_dest (or to a random other node when
// gen_dest < 0) and offers them one flit at a time on the processor input
// link, with up to gen_gap idle cycles between flits.
// Receiver: acknowledges delivered flits after 0..rx_delay_max cycles and
// checks them. Header payload: [3:0] destination, [7:4] source, [11:8]
// length, [29:12] sequence number of the source->destination pair; other
// flits repeat source and sequence and carry their index in [11:8]. Worms
// must arrive whole, in order per source and at the right node.
module proc_model
  import noc_pkg::*;
#(
  parameter int ME    = 0,
  parameter int NODES = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  output logic  pin_req,
  output flit_t pin_data,
  input  logic  pin_ack,
  input  logic  pout_req,
  input  flit_t pout_data,
  output logic  pout_ack,
  input  int    gen_limit,
  input  int    gen_dest,
  input  int    gen_len_max,
  input  int    gen_gap,
  input  int    rx_delay_max,
  output int    sent_worms,
  output int    rcvd_worms,
  output int    rcvd_flits,
  output int    checks,
  output int    failures
);
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [node %0d] %s at %0t", ME, what, $time);
    end
  endtask

  flit_t q [$];
  int    seq_tx [NODES];
  int    seq_rx [NODES];
  int    gap;
  int    rx_wait;
  int    open_src, open_seq, open_len, open_idx;

  initial begin
    checks = 0; failures = 0; sent_worms = 0; rcvd_worms = 0; rcvd_flits = 0;
    for (int n = 0; n < NODES; n++) begin seq_tx[n] = 0; seq_rx[n] = 0; end
    open_src = -1; gap = 0; rx_wait = 0;
  end

  // sender
  always @(posedge clk) begin
    if (!rst_n) begin
      pin_req  <= 1'b0;
      pin_data <= '0;
    end else begin
      if (q.size() == 0 && sent_worms < gen_limit) begin
        int d, len;
        d = gen_dest;
        if (d < 0) begin
          d = $urandom % (NODES - 1);
          if (d >= ME) d++;
        end
        len = 1 + $urandom % gen_len_max;
        for (int k = 0; k < len; k++) begin
          flit_t f;
          if (len == 1)          f.ftype = FT_SINGLE;
          else if (k == 0)       f.ftype = FT_HEAD;
          else if (k == len - 1) f.ftype = FT_TAIL;
          else                   f.ftype = FT_BODY;
          f.payload = {18'(seq_tx[d]), 4'((k == 0) ? len : k), 4'(ME), 4'(d)};
          q.push_back(f);
        end
        seq_tx[d]++;
        sent_worms <= sent_worms + 1;
      end
      if (pin_req) begin
        if (pin_ack) begin
          void'(q.pop_front());
          pin_req <= 1'b0;
          gap     <= (gen_gap > 0) ? $urandom % (gen_gap + 1) : 0;
        end
      end else if (gap > 0) begin
        gap <= gap - 1;
      end else if (q.size() > 0) begin
        pin_req  <= 1'b1;
        pin_data <= q[0];
      end
    end
  end

  // receiver
  always @(posedge clk) begin
    if (!rst_n) begin
      pout_ack <= 1'b0;
    end else begin
      pout_ack <= 1'b0;
      if (pout_req && !pout_ack) begin
        if (rx_wait == 0) begin
          pout_ack <= 1'b1;
          rx_wait  <= (rx_delay_max > 0) ? $urandom % (rx_delay_max + 1) : 0;
        end else rx_wait <= rx_wait - 1;
      end
      if (pout_req && pout_ack) begin
        flit_t f;
        int src, sq, fld;
        f   = pout_data;
        src = int'(f.payload[7:4]);
        fld = int'(f.payload[11:8]);
        sq  = int'(f.payload[29:12]);
        rcvd_flits <= rcvd_flits + 1;
        if (is_head(f)) begin
          check("header at its destination", int'(f.payload[3:0]) == ME);
          check("no worm left open", open_src == -1);
          check("worms of a source arrive in order", src < NODES && sq == seq_rx[src]);
          if (src < NODES) seq_rx[src] = sq + 1;
          open_src = src; open_seq = sq; open_len = fld; open_idx = 1;
          check("single flit has length 1", !is_tail(f) || fld == 1);
        end else begin
          check("body of the open worm", src == open_src && sq == open_seq);
          check("flit index", fld == open_idx);
          open_idx++;
        end
        if (is_tail(f)) begin
          check("worm length", open_idx == open_len || (is_head(f) && open_len == 1));
          open_src = -1;
          rcvd_worms <= rcvd_worms + 1;
        end
      end
    end
  end
endmodule
