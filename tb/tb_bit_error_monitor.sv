// tb_bit_error_monitor - a random transmitted bit stream and a received stream
// that is the same stream DELAY bits later with known bits inverted. The error
// counter must equal the number of inverted bits, diffsig must be high exactly
// for those bits, the sent counter must count every strobe, and clr must clear
// both counters.
//
// The delay-XOR-count behaviour follows the design; the 20-bit delay is only a
// test size.
`timescale 1ns/1ps
module tb_bit_error_monitor;
  localparam int D = 20;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  logic stb = 0, tx = 0, rx = 0, clr = 0, diff;
  logic [31:0] sent, errs;
  bit_error_monitor #(.DELAY(D)) dut (.clk, .rst, .bit_stb(stb), .inp_trans(tx), .out_recv(rx), .clr,
    .diffsig(diff), .sent_cnt(sent), .err_cnt(errs));

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

  bit hist [$];
  int nflip, n;
  initial begin
    nflip = 0;
    for (int i = 0; i < D; i++) hist.push_back(0);   // delay line resets to 0
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (n = 0; n < 2000; n++) begin
      bit f;
      repeat (4) @(negedge clk);
      f = ($urandom_range(99) < 3);
      tx = $urandom;
      hist.push_back(tx);
      rx = hist.pop_front() ^ f;
      nflip += f;
      stb = 1;
      @(negedge clk) stb = 0;
      check(diff == f, $sformatf("diffsig at bit %0d", n));
      if (n == 999) begin
        check(sent == 1000 && errs == nflip, $sformatf("counters %0d/%0d exp 1000/%0d", sent, errs, nflip));
        clr = 1;
        @(negedge clk) clr = 0;
        check(sent == 0 && errs == 0, "clr clears the counters");
        nflip = 0;
      end
    end
    check(sent == 1000 && errs == nflip, $sformatf("counters %0d/%0d exp 1000/%0d", sent, errs, nflip));
    check(nflip > 0, "errors were injected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
