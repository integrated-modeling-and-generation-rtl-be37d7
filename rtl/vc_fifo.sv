// vc_fifo: flit buffer used for every virtual channel and for the processor
// output buffer of a router.
//
// A first-word-fall-through FIFO of DEPTH flits held in a register array:
// head always shows the oldest flit while empty is low. A write (wr_en) and
// a read (rd_en) may happen in the same cycle. A written flit is visible at
// head one cycle after the write. free1 says at least one slot is free,
// free2 at least two: the input controller uses free2 when a write to the
// same buffer is already in flight. The depth is a parameter because buffer
// size is the published area/speed knob of the router; the default of 2
// flits is the size used for the published synthesis results. Writing a
// full buffer or reading an empty one is a protocol error and is asserted.
module vc_fifo #(
  parameter int unsigned DEPTH = 2,
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] head,
  output logic             empty,
  output logic             free1,
  output logic             free2
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wr_ptr, rd_ptr;
  logic [PW:0]      count;

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (wr_en) wr_ptr <= next_ptr(wr_ptr);
      if (rd_en) rd_ptr <= next_ptr(rd_ptr);
      count <= count + (PW+1)'(wr_en) - (PW+1)'(rd_en);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= wr_data;
  end

  assign head  = mem[rd_ptr];
  assign empty = (count == '0);
  assign free1 = (count < (PW+1)'(DEPTH));
  assign free2 = (32'(count) + 32'd2 <= 32'(DEPTH));

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> (free1 || rd_en));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty);
endmodule
