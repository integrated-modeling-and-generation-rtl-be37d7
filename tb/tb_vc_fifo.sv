// tb_vc_fifo: random write/read traffic against a queue reference model, for
// the default 2-flit depth and a 3-flit depth. Checks head, empty, free1 and
// free2 every cycle and that a written flit is visible one cycle later.
module tb_vc_fifo;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;
  always #5 clk = ~clk;

  logic        wr2, rd2, wr3, rd3;
  logic [31:0] wd;
  logic [31:0] h2, h3;
  logic        e2, f12, f22, e3, f13, f23;

  vc_fifo #(.DEPTH(2), .WIDTH(32)) dut2 (.clk, .rst_n, .wr_en(wr2), .wr_data(wd), .rd_en(rd2),
                                         .head(h2), .empty(e2), .free1(f12), .free2(f22));
  vc_fifo #(.DEPTH(3), .WIDTH(32)) dut3 (.clk, .rst_n, .wr_en(wr3), .wr_data(wd), .rd_en(rd3),
                                         .head(h3), .empty(e3), .free1(f13), .free2(f23));

  logic [31:0] q2[$], q3[$];

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr2 = 0; rd2 = 0; wr3 = 0; rd3 = 0; wd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // compare with the model
      check("empty2", e2 == (q2.size() == 0));
      check("free1_2", f12 == (q2.size() < 2));
      check("free2_2", f22 == (q2.size() == 0));
      check("empty3", e3 == (q3.size() == 0));
      check("free1_3", f13 == (q3.size() < 3));
      check("free2_3", f23 == (q3.size() <= 1));
      if (q2.size() > 0) check("head2", h2 == q2[0]);
      if (q3.size() > 0) check("head3", h3 == q3[0]);
      wd  = $urandom;
      wr2 = ($urandom % 2 == 0) && (q2.size() < 2);
      rd2 = ($urandom % 3 != 0) && (q2.size() > 0);
      wr3 = ($urandom % 3 != 0) && (q3.size() < 3);
      rd3 = ($urandom % 2 == 0) && (q3.size() > 0);
      @(posedge clk);
      #1;
      if (rd2) void'(q2.pop_front());
      if (wr2) q2.push_back(wd);
      if (rd3) void'(q3.pop_front());
      if (wr3) q3.push_back(wd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
