// noc_router: wormhole router of the reconfigurable torus network.
//
// NDIM = 1 gives the 1D router (ring node): one router input, one router
// output, two virtual channels. NDIM = 2 gives the 2D router: data flows in
// two directions (X and Y), so it has three inputs (X, Y, processor) and
// three outputs (X, Y, processor) and four virtual channels, two per router
// output. The router is built from three concurrent controllers:
//   input_controller  accepts one flit per cycle from the router inputs and
//                     the processor, routes headers through routing_table
//                     and writes each flit into a virtual channel or the
//                     processor output buffer;
//   router_out_ctrl   one per router output, sends the flits of its two
//                     virtual channels to the neighbour;
//   proc_out_ctrl     delivers flits from the processor output buffer.
// All links use the req/ack handshake of noc_pkg (3 cycles per flit); the
// router-to-router links add a nack so a blocked virtual channel does not
// hold up the other one. From a
// request at a router input to the request at the next router output takes
// 3 cycles when nothing blocks: grant, read into the buffer, load the
// output register. Buffer sizes (VC_DEPTH, OBUF_DEPTH, 2 flits by default)
// are parameters, trading area for speed. The routing table is rewritten
// through cfg_we/cfg_addr/cfg_route to change topology or placement.
// The structure follows the published router; widths of the configuration
// port and the coordinates used for the reset routing table are this
// design's choice.
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned NDIM       = 2,
  parameter int unsigned ROWS       = 2,
  parameter int unsigned COLS       = 2,
  parameter int unsigned MY_X       = 0,
  parameter int unsigned MY_Y       = 0,
  parameter int unsigned VC_DEPTH   = 2,
  parameter int unsigned OBUF_DEPTH = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // router inputs (index 0 = X, 1 = Y)
  input  link_fwd_t         rin_fwd  [NDIM],
  output link_bwd_t         rin_bwd  [NDIM],
  // router outputs
  output link_fwd_t         rout_fwd [NDIM],
  input  link_bwd_t         rout_bwd [NDIM],
  // processor -> network
  input  logic              pin_req,
  input  flit_t             pin_data,
  output logic              pin_ack,
  // network -> processor
  output logic              pout_req,
  output flit_t             pout_data,
  input  logic              pout_ack,
  // routing table reconfiguration
  input  logic              cfg_we,
  input  logic [ADDR_W-1:0] cfg_addr,
  input  route_t            cfg_route
);
  localparam int unsigned NIN = NDIM + 1;
  localparam int unsigned NT  = 2 * NDIM + 1;

  link_fwd_t         in_fwd   [NIN];
  link_bwd_t         in_bwd   [NIN];
  logic [ADDR_W-1:0] rt_addr  [NIN];
  route_t            rt_route [NIN];
  logic              free1 [NT];
  logic              free2 [NT];
  logic              wr_en [NT];
  flit_t             wr_data;
  flit_t             head  [NT];
  logic              empty [NT];
  logic              pop   [NT];

  always_comb begin
    for (int d = 0; d < NDIM; d++) begin
      in_fwd[d]  = rin_fwd[d];
      rin_bwd[d] = in_bwd[d];
    end
    in_fwd[NDIM] = '{req: pin_req, vc: 1'b0, data: pin_data};
    pin_ack      = in_bwd[NDIM].ack;
  end

  routing_table #(
    .ROWS(ROWS), .COLS(COLS), .MY_X(MY_X), .MY_Y(MY_Y), .NRD(NIN)
  ) u_rt (
    .clk, .rst_n,
    .rd_addr(rt_addr), .rd_route(rt_route),
    .cfg_we, .cfg_addr, .cfg_route
  );

  input_controller #(.NR(NDIM)) u_inctl (
    .clk, .rst_n,
    .in_fwd, .in_bwd,
    .rt_addr, .rt_route,
    .tgt_free1(free1), .tgt_free2(free2),
    .wr_en, .wr_data
  );

  // Buffers: 2*d+v = virtual channel v of router output d; 2*NDIM = output buffer.
  for (genvar t = 0; t < NT; t++) begin : g_buf
    localparam int unsigned DEPTH = (t == 2 * NDIM) ? OBUF_DEPTH : VC_DEPTH;
    vc_fifo #(.DEPTH(DEPTH), .WIDTH(FLIT_W)) u_fifo (
      .clk, .rst_n,
      .wr_en(wr_en[t]), .wr_data(wr_data),
      .rd_en(pop[t]), .head(head[t]),
      .empty(empty[t]), .free1(free1[t]), .free2(free2[t])
    );
  end

  for (genvar d = 0; d < NDIM; d++) begin : g_out
    flit_t vh [2];
    logic  ve [2];
    logic  vp [2];
    assign vh[0] = head[2*d];
    assign vh[1] = head[2*d+1];
    assign ve[0] = empty[2*d];
    assign ve[1] = empty[2*d+1];
    assign pop[2*d]   = vp[0];
    assign pop[2*d+1] = vp[1];
    router_out_ctrl u_octl (
      .clk, .rst_n,
      .vc_head(vh), .vc_empty(ve), .vc_pop(vp),
      .out_fwd(rout_fwd[d]),
      .out_bwd(rout_bwd[d])
    );
  end

  proc_out_ctrl u_pctl (
    .clk, .rst_n,
    .buf_head(head[2*NDIM]), .buf_empty(empty[2*NDIM]), .buf_pop(pop[2*NDIM]),
    .out_req(pout_req), .out_data(pout_data), .out_ack(pout_ack)
  );

  initial assert (NDIM == 1 || NDIM == 2) else $error("noc_router: NDIM must be 1 or 2");
endmodule
