// tb_noc_router: runs router_harness on a 2D router (centre node (1,1) of a
// 3x3 torus, so every output and both channels are used) and on a 1D router
// (node 2 of a 1x4 ring), and reports the combined result.
module tb_noc_router;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int   c2, f2, c1, f1;
  logic d2, d1;

  router_harness #(.NDIM(2), .ROWS(3), .COLS(3), .MY_X(1), .MY_Y(1)) h2 (
    .clk, .rst_n, .checks(c2), .failures(f2), .done(d2));
  router_harness #(.NDIM(1), .ROWS(1), .COLS(4), .MY_X(2), .MY_Y(0)) h1 (
    .clk, .rst_n, .checks(c1), .failures(f1), .done(d1));

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d1 && d2);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2);
    $finish;
  end
endmodule
