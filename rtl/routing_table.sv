// routing_table: the per-router lookup table of the deterministic routing.
//
// One entry per destination node (NODES entries), each a route_t: eject to
// the local processor, or forward on dimension dir in virtual channel vc.
// The table is read combinationally through NRD independent read ports (one
// per router input, so simultaneous header flits can be routed in the same
// cycle). Reconfiguring the network topology or the placement of processing
// units only means rewriting entries: a write on cfg_we takes effect the next
// cycle. At reset every entry is loaded with X-then-Y dimension-order routing
// for a unidirectional MY_X/MY_Y node in a ROWS x COLS torus, with node
// number = y*COLS + x (see noc_pkg::torus_route). That the table is the
// routing mechanism follows the published design; the reset contents, the
// write port and the read-port count are this implementation's choice.
// Addresses at or above NODES read as eject (they cannot occur in a
// well-formed network).
module routing_table
  import noc_pkg::*;
#(
  parameter int unsigned ROWS  = 2,
  parameter int unsigned COLS  = 2,
  parameter int unsigned MY_X  = 0,
  parameter int unsigned MY_Y  = 0,
  parameter int unsigned NRD   = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] rd_addr  [NRD],
  output route_t            rd_route [NRD],
  input  logic              cfg_we,
  input  logic [ADDR_W-1:0] cfg_addr,
  input  route_t            cfg_route
);
  localparam int unsigned NODES = ROWS * COLS;
  localparam int unsigned IW    = (NODES > 1) ? $clog2(NODES) : 1;

  route_t table_q [NODES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned d = 0; d < NODES; d++)
        table_q[d] <= torus_route(MY_X, MY_Y, d % COLS, d / COLS);
    end else if (cfg_we && (32'(cfg_addr) < NODES)) begin
      table_q[IW'(cfg_addr)] <= cfg_route;
    end
  end

  always_comb begin
    for (int p = 0; p < NRD; p++) begin
      if (32'(rd_addr[p]) < NODES) rd_route[p] = table_q[IW'(rd_addr[p])];
      else                         rd_route[p] = '{eject: 1'b1, dir: 1'b0, vc: 1'b0};
    end
  end

  initial assert (NODES <= MAX_NODES) else $error("routing_table: more nodes than ADDR_W can address");
endmodule
