// noc_pkg: types and constants shared by the routers of the torus network.
//
// A flit ("packet" in the original terminology) is one 32-bit word. Its two
// top bits carry the control field: bit 30 marks a header flit, bit 31 a tail
// flit, so a worm is HEAD, BODY..., TAIL, and a one-word message is a single
// flit with both bits set. The 30 remaining bits are payload; in a header the
// low ADDR_W payload bits are the destination node number, the rest is free
// for the sender. The 32-bit width and the 2-bit control field follow the
// published design; the bit positions, the combined head+tail code and the
// destination position are this implementation's choice.
//
// Links between routers (and between a processor and its router) use a
// return-to-zero two-way handshake: the sender raises req with vc and data
// and holds them until it sees ack (a one-cycle pulse from the receiver),
// then drops req for at least one cycle. That gives 3 cycles per flit.
// On a router-to-router link the receiver may instead answer nack (also a
// one-cycle pulse) when the flit's target buffer is full or owned by another
// worm. The sender then drops req and may offer a flit of the other virtual
// channel, so a worm blocked in one channel never blocks the link for the
// other. After a nack the receiver ignores the next cycle of req, which
// gives the sender a clean edge to change its offer.
//
// Routing entries select: eject to the local processor, or forward on
// dimension dir (0 = X, 1 = Y) in virtual channel vc.
package noc_pkg;

  localparam int unsigned FLIT_W    = 32;
  localparam int unsigned PAYLOAD_W = 30;
  // Width of a node number in a header; 16 nodes at most.
  localparam int unsigned ADDR_W    = 4;
  localparam int unsigned MAX_NODES = 1 << ADDR_W;

  typedef enum logic [1:0] {
    FT_BODY   = 2'b00,
    FT_HEAD   = 2'b01,
    FT_TAIL   = 2'b10,
    FT_SINGLE = 2'b11
  } flit_type_e;

  typedef struct packed {
    flit_type_e           ftype;
    logic [PAYLOAD_W-1:0] payload;
  } flit_t;

  // Forward half of a link; the ack travels the other way on its own wire.
  typedef struct packed {
    logic  req;
    logic  vc;
    flit_t data;
  } link_fwd_t;

  // Backward half of a link.
  typedef struct packed {
    logic ack;
    logic nack;
  } link_bwd_t;

  typedef struct packed {
    logic eject;
    logic dir;
    logic vc;
  } route_t;

  function automatic logic is_head(flit_t f);
    return f.ftype[0];
  endfunction

  function automatic logic is_tail(flit_t f);
    return f.ftype[1];
  endfunction

  function automatic logic [ADDR_W-1:0] dest_of(flit_t f);
    return f.payload[ADDR_W-1:0];
  endfunction

  // Default route for a unidirectional torus (X ring towards increasing x,
  // Y ring towards increasing y), dimension order X then Y. In each ring a
  // packet uses VC0 while it still has to cross the wrap-around link
  // (destination coordinate below the current one) and VC1 afterwards, which
  // breaks the cyclic buffer dependency of the ring.
  function automatic route_t torus_route(int unsigned my_x, int unsigned my_y,
                                         int unsigned dst_x, int unsigned dst_y);
    route_t r;
    r = '0;
    if (dst_x != my_x) begin
      r.dir = 1'b0;
      r.vc  = (dst_x < my_x) ? 1'b0 : 1'b1;
    end else if (dst_y != my_y) begin
      r.dir = 1'b1;
      r.vc  = (dst_y < my_y) ? 1'b0 : 1'b1;
    end else begin
      r.eject = 1'b1;
    end
    return r;
  endfunction

endpackage
