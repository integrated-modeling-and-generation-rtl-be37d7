// tb_routing_table: checks the reset contents of three routing tables
// (2x2 torus node (1,1), 1x4 ring node 3, 3x4 torus node (2,1)) against a
// route computed from hop distances, then rewrites entries through the
// configuration port and reads them back on every read port, and checks
// that an address beyond the node count reads as eject.
module tb_routing_table;
  import noc_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;
  always #5 clk = ~clk;

  logic [ADDR_W-1:0] a_addr [3], b_addr [2], c_addr [1];
  route_t            a_rt   [3], b_rt   [2], c_rt   [1];
  logic              a_we, b_we, c_we;
  logic [ADDR_W-1:0] cfg_addr;
  route_t            cfg_route;

  routing_table #(.ROWS(2), .COLS(2), .MY_X(1), .MY_Y(1), .NRD(3)) ua (
    .clk, .rst_n, .rd_addr(a_addr), .rd_route(a_rt), .cfg_we(a_we), .cfg_addr, .cfg_route);
  routing_table #(.ROWS(1), .COLS(4), .MY_X(3), .MY_Y(0), .NRD(2)) ub (
    .clk, .rst_n, .rd_addr(b_addr), .rd_route(b_rt), .cfg_we(b_we), .cfg_addr, .cfg_route);
  routing_table #(.ROWS(3), .COLS(4), .MY_X(2), .MY_Y(1), .NRD(1)) uc (
    .clk, .rst_n, .rd_addr(c_addr), .rd_route(c_rt), .cfg_we(c_we), .cfg_addr, .cfg_route);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Reference: go X first; use VC0 exactly when the rest of the way in this
  // ring runs through the wrap-around link.
  function automatic route_t ref_route(int rows, int cols, int mx, int my, int d);
    route_t r;
    int dx, dy, hx, hy;
    dx = d % cols; dy = d / cols;
    hx = (dx - mx + cols) % cols;
    hy = (dy - my + rows) % rows;
    r = '0;
    if (hx != 0)      begin r.dir = 0; r.vc = (mx + hx >= cols) ? 1'b0 : 1'b1; end
    else if (hy != 0) begin r.dir = 1; r.vc = (my + hy >= rows) ? 1'b0 : 1'b1; end
    else r.eject = 1;
    return r;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_we = 0; b_we = 0; c_we = 0; cfg_addr = '0; cfg_route = '0;
    for (int p = 0; p < 3; p++) a_addr[p] = '0;
    for (int p = 0; p < 2; p++) b_addr[p] = '0;
    c_addr[0] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // reset contents
    for (int d = 0; d < 4; d++) begin
      for (int p = 0; p < 3; p++) a_addr[p] = ADDR_W'(d);
      for (int p = 0; p < 2; p++) b_addr[p] = ADDR_W'(d);
      #1;
      for (int p = 0; p < 3; p++) check($sformatf("a reset d=%0d", d), a_rt[p] == ref_route(2, 2, 1, 1, d));
      for (int p = 0; p < 2; p++) check($sformatf("b reset d=%0d", d), b_rt[p] == ref_route(1, 4, 3, 0, d));
    end
    for (int d = 0; d < 12; d++) begin
      c_addr[0] = ADDR_W'(d);
      #1;
      check($sformatf("c reset d=%0d", d), c_rt[0] == ref_route(3, 4, 2, 1, d));
    end
    c_addr[0] = ADDR_W'(13);
    #1 check("out of range reads eject", c_rt[0].eject);
    // reconfiguration: rewrite every entry of table a with a pattern
    for (int d = 0; d < 4; d++) begin
      @(negedge clk);
      a_we = 1; cfg_addr = ADDR_W'(d); cfg_route = route_t'(3'(7 - d));
      @(posedge clk);
      #1 a_we = 0;
    end
    // an out-of-range write must not disturb the table
    @(negedge clk);
    a_we = 1; cfg_addr = ADDR_W'(9); cfg_route = route_t'(3'd0);
    @(posedge clk);
    #1 a_we = 0;
    for (int d = 0; d < 4; d++) begin
      for (int p = 0; p < 3; p++) a_addr[p] = ADDR_W'(d);
      for (int p = 0; p < 2; p++) b_addr[p] = ADDR_W'(d);
      #1;
      for (int p = 0; p < 3; p++) check($sformatf("a rewritten d=%0d", d), a_rt[p] == route_t'(3'(7 - d)));
      // table b did not see the write enables
      for (int p = 0; p < 2; p++) check($sformatf("b untouched d=%0d", d), b_rt[p] == ref_route(1, 4, 3, 0, d));
    end
    // different addresses on different ports in the same cycle
    a_addr[0] = 0; a_addr[1] = 2; a_addr[2] = 3;
    #1;
    check("port0", a_rt[0] == route_t'(3'd7));
    check("port1", a_rt[1] == route_t'(3'd5));
    check("port2", a_rt[2] == route_t'(3'd4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
