// noc_top: the two evaluated network configurations side by side.
//
//   ring_*   a 1 x RING_NODES ring of 1D routers (default 1x4, four
//            processors A..D connected in a ring);
//   tor_*    a TOR_ROWS x TOR_COLS torus of 2D routers (default 2x2).
// Both share the clock and reset and are otherwise independent; each node's
// processor connects through pin_* (processor to network) and pout_*
// (network to processor), the req/ack links of noc_pkg, and each router's
// routing table can be rewritten through its cfg_we bit with the shared
// cfg_addr/cfg_route. Buffer sizes default to 2 flits per virtual channel
// and 2 in each processor output buffer. The two sizes and the buffering are
// those of the published evaluation; the processors themselves are outside
// this design.
module noc_top
  import noc_pkg::*;
#(
  parameter int unsigned RING_NODES = 4,
  parameter int unsigned TOR_ROWS   = 2,
  parameter int unsigned TOR_COLS   = 2,
  parameter int unsigned VC_DEPTH   = 2,
  parameter int unsigned OBUF_DEPTH = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // 1D ring
  input  logic              ring_pin_req   [RING_NODES],
  input  flit_t             ring_pin_data  [RING_NODES],
  output logic              ring_pin_ack   [RING_NODES],
  output logic              ring_pout_req  [RING_NODES],
  output flit_t             ring_pout_data [RING_NODES],
  input  logic              ring_pout_ack  [RING_NODES],
  input  logic              ring_cfg_we    [RING_NODES],
  // 2D torus
  input  logic              tor_pin_req    [TOR_ROWS*TOR_COLS],
  input  flit_t             tor_pin_data   [TOR_ROWS*TOR_COLS],
  output logic              tor_pin_ack    [TOR_ROWS*TOR_COLS],
  output logic              tor_pout_req   [TOR_ROWS*TOR_COLS],
  output flit_t             tor_pout_data  [TOR_ROWS*TOR_COLS],
  input  logic              tor_pout_ack   [TOR_ROWS*TOR_COLS],
  input  logic              tor_cfg_we     [TOR_ROWS*TOR_COLS],
  // routing table write data, shared by all routers
  input  logic [ADDR_W-1:0] cfg_addr,
  input  route_t            cfg_route
);
  noc_torus #(
    .ROWS(1), .COLS(RING_NODES), .VC_DEPTH(VC_DEPTH), .OBUF_DEPTH(OBUF_DEPTH)
  ) u_ring (
    .clk, .rst_n,
    .pin_req(ring_pin_req), .pin_data(ring_pin_data), .pin_ack(ring_pin_ack),
    .pout_req(ring_pout_req), .pout_data(ring_pout_data), .pout_ack(ring_pout_ack),
    .cfg_we(ring_cfg_we), .cfg_addr, .cfg_route
  );

  noc_torus #(
    .ROWS(TOR_ROWS), .COLS(TOR_COLS), .VC_DEPTH(VC_DEPTH), .OBUF_DEPTH(OBUF_DEPTH)
  ) u_torus (
    .clk, .rst_n,
    .pin_req(tor_pin_req), .pin_data(tor_pin_data), .pin_ack(tor_pin_ack),
    .pout_req(tor_pout_req), .pout_data(tor_pout_data), .pout_ack(tor_pout_ack),
    .cfg_we(tor_cfg_we), .cfg_addr, .cfg_route
  );
endmodule
