// noc_torus: a ROWS x COLS torus network, one router per processor.
//
// Node n = y*COLS + x sits at column x, row y. Each ring is unidirectional:
// the X output of node (x,y) feeds the X input of ((x+1) mod COLS, y) and
// the Y output feeds the Y input of (x, (y+1) mod ROWS). With ROWS = 1 the
// network is a ring of 1D routers; otherwise every node is a 2D router. The
// routers' reset routing tables implement X-then-Y routing with the
// wrap-around virtual channel rule of noc_pkg::torus_route, and each table
// can be rewritten through cfg_we[n]/cfg_addr/cfg_route to reshape routes.
// Each processor port is a req/ack link: pin_* carries flits into the
// network, pout_* delivers them. A header's low ADDR_W payload bits name the
// destination node. Network latency with no contention: 3 cycles per hop, on
// top of the first grant at the source router and the delivery handshake.
// The torus topologies (1x4 ring, 2x2 torus) are those of the published
// evaluation; the unidirectional rings and node numbering are this design's
// choice.
module noc_torus
  import noc_pkg::*;
#(
  parameter int unsigned ROWS       = 2,
  parameter int unsigned COLS       = 2,
  parameter int unsigned VC_DEPTH   = 2,
  parameter int unsigned OBUF_DEPTH = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pin_req   [ROWS*COLS],
  input  flit_t             pin_data  [ROWS*COLS],
  output logic              pin_ack   [ROWS*COLS],
  output logic              pout_req  [ROWS*COLS],
  output flit_t             pout_data [ROWS*COLS],
  input  logic              pout_ack  [ROWS*COLS],
  input  logic              cfg_we    [ROWS*COLS],
  input  logic [ADDR_W-1:0] cfg_addr,
  input  route_t            cfg_route
);
  localparam int unsigned N    = ROWS * COLS;
  localparam int unsigned NDIM = (ROWS > 1) ? 2 : 1;

  link_fwd_t out_fwd [N][NDIM];   // driven by router n, output d
  link_bwd_t out_bwd [N][NDIM];   // ack/nack back to router n, output d
  link_fwd_t in_fwd  [N][NDIM];   // into router n, input d
  link_bwd_t in_bwd  [N][NDIM];   // ack/nack from router n, input d

  for (genvar n = 0; n < N; n++) begin : g_node
    localparam int unsigned X  = n % COLS;
    localparam int unsigned Y  = n / COLS;
    // upstream neighbours (sources of this node's inputs)
    localparam int unsigned UX = Y * COLS + (X + COLS - 1) % COLS;
    localparam int unsigned UY = ((Y + ROWS - 1) % ROWS) * COLS + X;
    // downstream neighbours (sinks of this node's outputs)
    localparam int unsigned DX = Y * COLS + (X + 1) % COLS;
    localparam int unsigned DY = ((Y + 1) % ROWS) * COLS + X;

    assign in_fwd[n][0]  = out_fwd[UX][0];
    assign out_bwd[n][0] = in_bwd[DX][0];
    if (NDIM == 2) begin : g_y
      assign in_fwd[n][NDIM-1]  = out_fwd[UY][NDIM-1];
      assign out_bwd[n][NDIM-1] = in_bwd[DY][NDIM-1];
    end

    noc_router #(
      .NDIM(NDIM), .ROWS(ROWS), .COLS(COLS), .MY_X(X), .MY_Y(Y),
      .VC_DEPTH(VC_DEPTH), .OBUF_DEPTH(OBUF_DEPTH)
    ) u_router (
      .clk, .rst_n,
      .rin_fwd (in_fwd[n]),  .rin_bwd (in_bwd[n]),
      .rout_fwd(out_fwd[n]), .rout_bwd(out_bwd[n]),
      .pin_req (pin_req[n]),  .pin_data (pin_data[n]),  .pin_ack (pin_ack[n]),
      .pout_req(pout_req[n]), .pout_data(pout_data[n]), .pout_ack(pout_ack[n]),
      .cfg_we  (cfg_we[n]), .cfg_addr, .cfg_route
    );
  end
endmodule
