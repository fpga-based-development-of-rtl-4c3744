// tb_rate_out_fifo - the DAC-rate output FIFO with the OFDM (14 cycles, 56 ns)
// and DMT (7 cycles, 28 ns) sample periods. Bursts of 20 resp. 40 random words
// arrive once per 280-cycle frame, as from the guard interval inserter. Checks:
// words leave in order, strobes are exactly DOWN_FACT cycles apart, no
// underflow while the source keeps up, and after the source stops the FIFO
// runs dry, outputs 0 and flags underflow.
//
// The periods follow the design; the underflow behaviour is this
// implementation's own.
`timescale 1ns/1ps
module tb_rate_out_fifo;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  logic        pe [2], stb [2], uf [2];
  logic [18:0] wd [2], od [2];
  rate_out_fifo #(.DOWN_FACT(14)) u14 (.clk, .rst, .push_en(pe[0]), .wr_data(wd[0]),
    .out_data(od[0]), .out_stb(stb[0]), .underflow(uf[0]), .level());
  rate_out_fifo #(.DOWN_FACT(7)) u7 (.clk, .rst, .push_en(pe[1]), .wr_data(wd[1]),
    .out_data(od[1]), .out_stb(stb[1]), .underflow(uf[1]), .level());

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

  logic [18:0] q [2][$];
  int cyc, last [2], nstb [2], nuf [2];
  bit  draining;
  localparam int DF [2] = '{14, 7};
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar u = 0; u < 2; u++) begin : g_mon
    always @(posedge clk) if (!rst && stb[u]) begin
      if (last[u] >= 0) check(cyc - last[u] == DF[u], $sformatf("inst %0d strobe spacing %0d", u, cyc - last[u]));
      last[u] = cyc;
      nstb[u]++;
      if (q[u].size() > 0) begin
        check(!uf[u], "no underflow while data is queued");
        check(od[u] == q[u].pop_front(), $sformatf("inst %0d word order", u));
      end else begin
        nuf[u]++;
        check(draining, "underflow only after the source stopped");
        check(uf[u] && od[u] == 0, "empty FIFO outputs 0 with underflow");
      end
    end
  end

  initial begin
    cyc = 0; draining = 0;
    for (int u = 0; u < 2; u++) begin pe[u] = 0; wd[u] = 0; last[u] = -1; nstb[u] = 0; nuf[u] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 12; f++) begin
      for (int k = 0; k < 40; k++) begin
        @(negedge clk);
        pe[0] = (k < 20); pe[1] = 1;
        wd[0] = 19'($urandom); wd[1] = 19'($urandom);
        if (pe[0]) q[0].push_back(wd[0]);
        q[1].push_back(wd[1]);
      end
      @(negedge clk) begin pe[0] = 0; pe[1] = 0; end
      repeat (280 - 41) @(negedge clk);
    end
    draining = 1;
    repeat (700) @(negedge clk);
    check(nuf[0] > 0 && nuf[1] > 0, "underflow happened once the source stopped");
    check(nstb[0] >= 12 * 20 && nstb[1] >= 12 * 40, "every word was sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
