// tb_proc_out_ctrl: the processor output controller between a 2-flit
// vc_fifo (the output buffer) and a modelled processor that acknowledges
// after a random delay. Checks that flits arrive in order, each exactly
// once, that req and data hold until ack, and that with an immediate
// acknowledge a flit is delivered every 3 cycles.
module tb_proc_out_ctrl;
  import noc_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;
  always #5 clk = ~clk;

  logic  wr_en, empty, free1, free2, pop, out_req, out_ack;
  flit_t wr_data, head, out_data;

  vc_fifo #(.DEPTH(2), .WIDTH(32)) u_buf (
    .clk, .rst_n, .wr_en, .wr_data, .rd_en(pop), .head, .empty, .free1, .free2);
  proc_out_ctrl dut (
    .clk, .rst_n, .buf_head(head), .buf_empty(empty), .buf_pop(pop),
    .out_req, .out_data, .out_ack);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  flit_t sent [$];
  int    delay_max;
  int    cyc = 0;
  int    got_cyc [$];
  int    wait_cnt;
  logic  prev_req = 1'b0;
  logic  prev_ack = 1'b0;
  flit_t prev_data;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) begin
      out_ack  <= 1'b0;
      wait_cnt <= 0;
    end else begin
      prev_req  <= out_req;
      prev_ack  <= out_ack;
      prev_data <= out_data;
      if (prev_req && !prev_ack)
        check("req and data held until ack", out_req && out_data == prev_data);
      out_ack <= 1'b0;
      if (out_req && !out_ack) begin
        if (wait_cnt >= delay_max) begin
          out_ack  <= 1'b1;
          wait_cnt <= 0;
        end else wait_cnt <= wait_cnt + 1;
      end
      if (out_req && out_ack) begin
        check("delivered in order", sent.size() > 0 && out_data == sent[0]);
        if (sent.size() > 0) void'(sent.pop_front());
        got_cyc.push_back(cyc);
      end
    end
  end

  task automatic feed(int n, bit dense);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      while (!free1) @(negedge clk);
      if (!dense) while ($urandom % 2 == 0) @(negedge clk);
      wr_en   = 1'b1;
      wr_data = flit_t'($urandom);
      sent.push_back(wr_data);
      @(posedge clk);
      #1 wr_en = 1'b0;
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_data = '0; delay_max = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    feed(10, 1);
    while (sent.size() > 0) @(posedge clk);
    for (int k = 1; k < got_cyc.size(); k++) check("3 cycles per flit", got_cyc[k] - got_cyc[k-1] == 3);
    delay_max = 5;
    feed(300, 0);
    while (sent.size() > 0) @(posedge clk);
    check("all delivered", got_cyc.size() == 310);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
