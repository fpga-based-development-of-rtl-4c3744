// tb_sync_fifo - random push/pop traffic against a queue model: data order,
// count, empty/full flags, and push+pop in the same cycle while full.
//
// The design only asks for FIFOs; first-word-fall-through and the full/empty
// rules are this implementation's choices.
`timescale 1ns/1ps
module tb_sync_fifo;
  localparam int W = 8, D = 16;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  logic push = 0, pop = 0, empty, full;
  logic [W-1:0] wd = 0, rd;
  logic [$clog2(D):0] count;
  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst, .push, .wr_data(wd), .pop, .rd_data(rd),
                                         .empty, .full, .count);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [W-1:0] q[$];
  int n_full_pp = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      // choose operations that keep the protocol
      logic p, o;
      int bias;
      bias = (i / 500) % 2 ? 70 : 30;         // phases that fill and drain
      p = ($urandom % 100) < bias;
      o = ($urandom % 100) < (100 - bias) && q.size() > 0;
      if (q.size() == D && !o) p = 0;
      if (q.size() == D && p && o) n_full_pp++;
      push = p; pop = o; wd = W'($urandom);
      #1;
      check(count == q.size(), "count");
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == D), "full flag");
      if (q.size() > 0) check(rd == q[0], "head data");
      @(posedge clk);
      if (o) void'(q.pop_front());
      if (p) q.push_back(wd);
      #0;
    end
    push = 0; pop = 0;
    check(n_full_pp > 0, "push and pop while full happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
