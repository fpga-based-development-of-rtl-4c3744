// tb_gi_insert - random IFFT frames into the guard interval inserter, for the
// 16-point (OFDM) and 32-point (DMT) sizes, with input words every cycle and
// every 4 cycles. Each frame must leave as N + N/4 words: the last N/4 input
// samples followed by the whole frame, with out_first on the first guard word.
//
// The quarter-length cyclic guard follows the design; the input spacing is the
// testbench's own choice.
`timescale 1ns/1ps
module tb_gi_insert;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  logic              iv [2], ov [2], of [2], busy [2];
  logic signed [8:0] ire [2], iim [2], ore [2], oim [2];
  gi_insert #(.LOG2N(4)) u16 (.clk, .rst, .in_valid(iv[0]), .in_re(ire[0]), .in_im(iim[0]),
    .out_valid(ov[0]), .out_first(of[0]), .out_re(ore[0]), .out_im(oim[0]), .busy(busy[0]));
  gi_insert #(.LOG2N(5)) u32 (.clk, .rst, .in_valid(iv[1]), .in_re(ire[1]), .in_im(iim[1]),
    .out_valid(ov[1]), .out_first(of[1]), .out_re(ore[1]), .out_im(oim[1]), .busy(busy[1]));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_q [2][$];        // expected {re,im} packed as re*1024+im
  bit first_q [2][$];
  int nout [2];

  for (genvar u = 0; u < 2; u++) begin : g_mon
    always @(posedge clk) if (!rst && ov[u]) begin
      int e; bit f;
      nout[u]++;
      if (exp_q[u].size() == 0) check(0, "unexpected output word");
      else begin
        e = exp_q[u].pop_front(); f = first_q[u].pop_front();
        check(ore[u] * 1024 + oim[u] == e, $sformatf("inst %0d word mismatch", u));
        check(of[u] == f, $sformatf("inst %0d out_first", u));
      end
    end
  end

  task automatic frame(int u, int n, int gap);
    int re [32], im [32];
    for (int k = 0; k < n; k++) begin re[k] = $urandom_range(511) - 256; im[k] = $urandom_range(511) - 256; end
    for (int k = n - n / 4; k < n; k++) begin exp_q[u].push_back(re[k] * 1024 + im[k]); first_q[u].push_back(k == n - n / 4); end
    for (int k = 0; k < n; k++) begin exp_q[u].push_back(re[k] * 1024 + im[k]); first_q[u].push_back(0); end
    while (busy[u]) @(negedge clk);
    for (int k = 0; k < n; k++) begin
      @(negedge clk) iv[u] = 1; ire[u] = 9'(re[k]); iim[u] = 9'(im[k]);
      repeat (gap) begin @(negedge clk) iv[u] = 0; end
    end
    @(negedge clk) iv[u] = 0;
  endtask

  initial begin
    for (int u = 0; u < 2; u++) begin iv[u] = 0; ire[u] = 0; iim[u] = 0; nout[u] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    fork
      for (int f = 0; f < 10; f++) frame(0, 16, (f % 2) ? 3 : 0);
      for (int f = 0; f < 10; f++) frame(1, 32, (f % 2) ? 1 : 0);
    join
    repeat (60) @(negedge clk);
    check(nout[0] == 10 * 20, $sformatf("OFDM: 20 words per frame (%0d)", nout[0]));
    check(nout[1] == 10 * 40, $sformatf("DMT: 40 words per frame (%0d)", nout[1]));
    check(exp_q[0].size() == 0 && exp_q[1].size() == 0, "all expected words seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
