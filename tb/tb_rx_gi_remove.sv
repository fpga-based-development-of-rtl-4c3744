// tb_rx_gi_remove - a channel sample stream (one sample per 14 cycles, a marker
// on the first guard sample of every 20-sample frame) into the receiver input
// FIFO. Samples before the first marker must be ignored. For each frame the 4
// guard samples are dropped and the 16 useful samples go to the FFT side on 16
// consecutive cycles, in order. fft_ready is held low for a while to show that a
// complete frame waits in the FIFO. A second instance does the DMT size
// (40-sample frames, 32 kept, one sample per 7 cycles).
//
// Dropping N/4 samples and passing N follows the design; the marker input and
// the complete-frame buffering are this implementation's choices.
`timescale 1ns/1ps
module tb_rx_gi_remove;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  logic              stb [2], mark [2], rdy [2], ov [2], ovf [2];
  logic signed [8:0] ire [2], iim [2], ore [2], oim [2];
  rx_gi_remove #(.LOG2N(4)) u16 (.clk, .rst, .in_stb(stb[0]), .in_mark(mark[0]), .in_re(ire[0]), .in_im(iim[0]),
    .fft_ready(rdy[0]), .out_valid(ov[0]), .out_re(ore[0]), .out_im(oim[0]), .overflow(ovf[0]));
  rx_gi_remove #(.LOG2N(5)) u32 (.clk, .rst, .in_stb(stb[1]), .in_mark(mark[1]), .in_re(ire[1]), .in_im(iim[1]),
    .fft_ready(rdy[1]), .out_valid(ov[1]), .out_re(ore[1]), .out_im(oim[1]), .overflow(ovf[1]));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int q [2][$];
  int run [2], nout [2], nburst [2];
  localparam int NN [2] = '{16, 32};
  localparam int PER [2] = '{14, 7};

  for (genvar u = 0; u < 2; u++) begin : g_mon
    always @(posedge clk) if (!rst) begin
      if (ov[u]) begin
        nout[u]++; run[u]++;
        if (q[u].size() == 0) check(0, "unexpected output");
        else check(ore[u] * 1024 + oim[u] == q[u].pop_front(), $sformatf("inst %0d sample order", u));
      end else if (run[u] != 0) begin
        check(run[u] == NN[u], $sformatf("inst %0d burst of %0d words", u, run[u]));
        nburst[u]++;
        run[u] = 0;
      end
    end
  end

  task automatic stream(int u, int frames);
    int re, im;
    // three stray samples before the first marker
    for (int s = 0; s < 3; s++) begin
      repeat (PER[u] - 1) @(negedge clk);
      @(negedge clk) begin stb[u] = 1; mark[u] = 0; ire[u] = 9'(s + 1); iim[u] = 0; end
      @(negedge clk) stb[u] = 0;
    end
    for (int f = 0; f < frames; f++)
      for (int s = 0; s < NN[u] * 5 / 4; s++) begin
        repeat (PER[u] - 2) @(negedge clk);
        re = $urandom_range(511) - 256; im = $urandom_range(511) - 256;
        if (s >= NN[u] / 4) q[u].push_back(re * 1024 + im);
        @(negedge clk) begin stb[u] = 1; mark[u] = (s == 0); ire[u] = 9'(re); iim[u] = 9'(im); end
        @(negedge clk) begin stb[u] = 0; mark[u] = 0; end
      end
  endtask

  initial begin
    for (int u = 0; u < 2; u++) begin
      stb[u] = 0; mark[u] = 0; ire[u] = 0; iim[u] = 0; rdy[u] = 1; run[u] = 0; nout[u] = 0; nburst[u] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    fork
      stream(0, 8);
      stream(1, 8);
      begin  // FFT busy for a while: frames wait in the FIFO
        repeat (1500) @(negedge clk);
        rdy[0] = 0; rdy[1] = 0;
        repeat (500) @(negedge clk);
        rdy[0] = 1; rdy[1] = 1;
      end
    join
    repeat (200) @(negedge clk);
    for (int u = 0; u < 2; u++) begin
      check(nout[u] == 8 * NN[u], $sformatf("inst %0d: %0d samples passed", u, nout[u]));
      check(nburst[u] == 8, $sformatf("inst %0d: 8 bursts", u));
      check(!ovf[u], "no overflow");
      check(q[u].size() == 0, "all samples seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
