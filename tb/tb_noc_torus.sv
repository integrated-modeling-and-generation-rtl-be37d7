// tb_noc_torus: random all-to-all worm traffic on a 3x4 torus of 2D routers,
// on a 1x5 ring of 1D routers and on a 1x2 ring, each node driven by a proc_model. Some
// receivers are slow, so output buffers fill and back-pressure spreads
// through the network. Every worm must arrive whole, in order per source
// and at its destination, and the networks must drain (no deadlock).
module tb_noc_torus;
  import noc_pkg::*;
  localparam int R = 3, C = 4, N = R * C;
  localparam int RN = 5;
  localparam int WORMS = 60;   // per node

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  // 3x4 torus
  logic  t_pin_req [N], t_pin_ack [N], t_pout_req [N], t_pout_ack [N], t_cfg_we [N];
  flit_t t_pin_data [N], t_pout_data [N];
  int    t_sent [N], t_rcvd [N], t_chk [N], t_fail [N], t_flits [N];
  // 1x5 ring
  logic  r_pin_req [RN], r_pin_ack [RN], r_pout_req [RN], r_pout_ack [RN], r_cfg_we [RN];
  flit_t r_pin_data [RN], r_pout_data [RN];
  int    r_sent [RN], r_rcvd [RN], r_chk [RN], r_fail [RN], r_flits [RN];
  // 1x2 ring
  logic  s_pin_req [2], s_pin_ack [2], s_pout_req [2], s_pout_ack [2], s_cfg_we [2];
  flit_t s_pin_data [2], s_pout_data [2];
  int    s_sent [2], s_rcvd [2], s_chk [2], s_fail [2], s_flits [2];
  int    limit;

  noc_torus #(.ROWS(R), .COLS(C)) u_t (
    .clk, .rst_n, .pin_req(t_pin_req), .pin_data(t_pin_data), .pin_ack(t_pin_ack),
    .pout_req(t_pout_req), .pout_data(t_pout_data), .pout_ack(t_pout_ack),
    .cfg_we(t_cfg_we), .cfg_addr('0), .cfg_route('0));
  noc_torus #(.ROWS(1), .COLS(RN)) u_r (
    .clk, .rst_n, .pin_req(r_pin_req), .pin_data(r_pin_data), .pin_ack(r_pin_ack),
    .pout_req(r_pout_req), .pout_data(r_pout_data), .pout_ack(r_pout_ack),
    .cfg_we(r_cfg_we), .cfg_addr('0), .cfg_route('0));

  noc_torus #(.ROWS(1), .COLS(2)) u_s (
    .clk, .rst_n, .pin_req(s_pin_req), .pin_data(s_pin_data), .pin_ack(s_pin_ack),
    .pout_req(s_pout_req), .pout_data(s_pout_data), .pout_ack(s_pout_ack),
    .cfg_we(s_cfg_we), .cfg_addr('0), .cfg_route('0));
  for (genvar n = 0; n < 2; n++) begin : g_s
    assign s_cfg_we[n] = 1'b0;
    proc_model #(.ME(n), .NODES(2)) u_p (
      .clk, .rst_n, .pin_req(s_pin_req[n]), .pin_data(s_pin_data[n]), .pin_ack(s_pin_ack[n]),
      .pout_req(s_pout_req[n]), .pout_data(s_pout_data[n]), .pout_ack(s_pout_ack[n]),
      .gen_limit(limit), .gen_dest(-1), .gen_len_max(4), .gen_gap(0),
      .rx_delay_max(n * 6),
      .sent_worms(s_sent[n]), .rcvd_worms(s_rcvd[n]), .rcvd_flits(s_flits[n]),
      .checks(s_chk[n]), .failures(s_fail[n]));
  end
  for (genvar n = 0; n < N; n++) begin : g_t
    assign t_cfg_we[n] = 1'b0;
    proc_model #(.ME(n), .NODES(N)) u_p (
      .clk, .rst_n, .pin_req(t_pin_req[n]), .pin_data(t_pin_data[n]), .pin_ack(t_pin_ack[n]),
      .pout_req(t_pout_req[n]), .pout_data(t_pout_data[n]), .pout_ack(t_pout_ack[n]),
      .gen_limit(limit), .gen_dest(-1), .gen_len_max(5), .gen_gap(2),
      .rx_delay_max((n % 3 == 0) ? 8 : 0),
      .sent_worms(t_sent[n]), .rcvd_worms(t_rcvd[n]), .rcvd_flits(t_flits[n]),
      .checks(t_chk[n]), .failures(t_fail[n]));
  end
  for (genvar n = 0; n < RN; n++) begin : g_r
    assign r_cfg_we[n] = 1'b0;
    proc_model #(.ME(n), .NODES(RN)) u_p (
      .clk, .rst_n, .pin_req(r_pin_req[n]), .pin_data(r_pin_data[n]), .pin_ack(r_pin_ack[n]),
      .pout_req(r_pout_req[n]), .pout_data(r_pout_data[n]), .pout_ack(r_pout_ack[n]),
      .gen_limit(limit), .gen_dest(-1), .gen_len_max(5), .gen_gap(1),
      .rx_delay_max((n == 2) ? 10 : 0),
      .sent_worms(r_sent[n]), .rcvd_worms(r_rcvd[n]), .rcvd_flits(r_flits[n]),
      .checks(r_chk[n]), .failures(r_fail[n]));
  end

  function automatic int total(int what);
    int s;
    s = 0;
    for (int n = 0; n < N; n++)
      case (what)
        0: s += t_sent[n]; 1: s += t_rcvd[n]; 2: s += t_chk[n]; default: s += t_fail[n];
      endcase
    for (int n = 0; n < RN; n++)
      case (what)
        0: s += r_sent[n]; 1: s += r_rcvd[n]; 2: s += r_chk[n]; default: s += r_fail[n];
      endcase
    for (int n = 0; n < 2; n++)
      case (what)
        0: s += s_sent[n]; 1: s += s_rcvd[n]; 2: s += s_chk[n]; default: s += s_fail[n];
      endcase
    return s;
  endfunction

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog: sent %0d received %0d", total(0), total(1));
    $display("TB_RESULT checks=%0d failures=%0d", checks + total(2), failures + total(3) + 1);
    $finish;
  end

  initial begin
    limit = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    limit = WORMS;
    while (total(1) < (N + RN + 2) * WORMS) @(posedge clk);
    repeat (20) @(posedge clk);
    check("all worms sent", total(0) == (N + RN + 2) * WORMS);
    check("all worms received once", total(1) == total(0));
    $display("worms: %0d sent, %0d received", total(0), total(1));
    $display("TB_RESULT checks=%0d failures=%0d", checks + total(2), failures + total(3));
    $finish;
  end
endmodule
