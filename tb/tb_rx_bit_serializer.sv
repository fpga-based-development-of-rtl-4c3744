// tb_rx_bit_serializer - random 4-bit decisions on all 16 bins; the serializer
// must emit exactly 56 bits on consecutive cycles: bins 1..7 then 9..15, each
// MSB first, and nothing from bins 0 and 8.
//
// That the bits are serialized follows the design; the order, mirroring the
// transmitter, is this implementation's choice.
`timescale 1ns/1ps
module tb_rx_bit_serializer;
  import ofdm_pkg::*;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  logic       iv = 0, op, ob;
  logic [3:0] bits [N_SC];
  rx_bit_serializer dut (.clk, .rst, .in_valid(iv), .bits, .out_push(op), .out_bit(ob));

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

  bit q [$];
  int run, nrun;
  always @(posedge clk) if (!rst) begin
    if (op) begin
      run++;
      if (q.size() == 0) check(0, "extra bit");
      else check(ob == q.pop_front(), "bit order");
    end else if (run != 0) begin
      check(run == 56, $sformatf("56 bits back to back (%0d)", run));
      run = 0; nrun++;
    end
  end

  initial begin
    run = 0; nrun = 0;
    for (int k = 0; k < N_SC; k++) bits[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 20; f++) begin
      @(negedge clk);
      for (int k = 0; k < N_SC; k++) bits[k] = 4'($urandom);
      for (int k = 1; k < 16; k++) if (k != 8) for (int b = 3; b >= 0; b--) q.push_back(bits[k][b]);
      iv = 1;
      @(negedge clk) iv = 0;
      repeat (56 + $urandom_range(20)) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    check(nrun == 20 && q.size() == 0, "20 frames of 56 bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
