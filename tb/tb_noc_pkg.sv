// tb_noc_pkg: checks the helper functions of noc_pkg. The flit control
// decoding (is_head, is_tail, dest_of) is checked for all four flit types,
// and torus_route is compared, for every pair of nodes on tori from 1x2 up
// to 4x4, with a route computed from hop distances: X first, then Y, VC0
// exactly when the rest of the way in the current ring crosses the
// wrap-around link.
module tb_noc_pkg;
  import noc_pkg::*;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t f;
    for (int t = 0; t < 4; t++) begin
      f = flit_t'({2'(t), 30'h2bcd_1235});
      check("is_head", is_head(f) == (t == 1 || t == 3));
      check("is_tail", is_tail(f) == (t == 2 || t == 3));
      check("dest_of", dest_of(f) == 4'h5);
    end
    for (int rows = 1; rows <= 4; rows++)
      for (int cols = 2; cols <= 4; cols++)
        for (int s = 0; s < rows * cols; s++)
          for (int d = 0; d < rows * cols; d++) begin
            route_t got, exp;
            int mx, my, dx, dy, hx, hy;
            mx = s % cols; my = s / cols; dx = d % cols; dy = d / cols;
            hx = (dx - mx + cols) % cols;
            hy = (dy - my + rows) % rows;
            exp = '0;
            if (hx != 0)      begin exp.dir = 0; exp.vc = (mx + hx >= cols) ? 1'b0 : 1'b1; end
            else if (hy != 0) begin exp.dir = 1; exp.vc = (my + hy >= rows) ? 1'b0 : 1'b1; end
            else exp.eject = 1'b1;
            got = torus_route(mx, my, dx, dy);
            check($sformatf("torus_route %0dx%0d %0d->%0d", rows, cols, s, d), got == exp);
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
