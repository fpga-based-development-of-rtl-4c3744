// tb_lfsr_bitgen - checks the random bit source against an independent model of
// the recurrence a[n+15] = a[n+1] xor a[n] (polynomial x^15 + x + 1), the bit
// period of 5 cycles, and the period of the sequence, 32767 bits.
//
// Polynomial, bit period and sequence length follow the design; the start value
// is this implementation's choice.
`timescale 1ns/1ps
module tb_lfsr_bitgen;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  logic b, stb;
  lfsr_bitgen dut (.clk, .rst, .bit_out(b), .bit_stb(stb));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit a [0:32767+40];
  int n = 0, last = -1, cyc = 0, bad_period = 0, mism = 0;
  initial begin
    for (int i = 0; i < 15; i++) a[i] = 1'b1;            // seed: all ones
    for (int i = 15; i < $size(a); i++) a[i] = a[i - 15] ^ a[i - 14];
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    while (n < 32767 + 30) begin
      @(posedge clk);
      cyc++;
      if (stb) begin
        if (last >= 0 && cyc - last != 5) bad_period++;
        last = cyc;
        if (b != a[n]) mism++;
        if (n < 100 || n >= 32767) check(b == a[n], $sformatf("bit %0d", n));
        n++;
      end
    end
    check(mism == 0, $sformatf("sequence matches the recurrence (%0d mismatches)", mism));
    check(bad_period == 0, "one bit every 5 cycles");
    // maximum length: the 15-bit window repeats after 32767 bits and not before
    begin
      int first_rep = -1;
      for (int p = 1; p <= 32767 && first_rep < 0; p++) begin
        bit same;
        same = 1;
        for (int i = 0; i < 15; i++) if (a[p + i] != a[i]) same = 0;
        if (same) first_rep = p;
      end
      check(first_rep == 32767, $sformatf("period 32767 (got %0d)", first_rep));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
