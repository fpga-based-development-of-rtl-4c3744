// tb_rx_equalizer - random FFT frames (16 and 32 bins, in natural order with
// their index) into the equalizer. The testbench keeps bins 0..15 and computes
// y = x * E for each with its own integer arithmetic: exact complex product,
// divided by 2^3 with round-half-to-even, clamped to 9 bits. Checks the values,
// that out_valid comes two cycles after bin 15, that the DMT mirror bins are
// ignored, the saturation flag, and the passthrough with eq_en = 0.
//
// The multiply by 1/H in s5Q3 with convergent rounding follows the design; the
// coefficient ports and eq_en are this implementation's.
`timescale 1ns/1ps
module tb_rx_equalizer;
  import ofdm_pkg::*;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  logic              iv = 0, eq_en = 1, ov, osat;
  logic [4:0]        idx = 0;
  logic signed [8:0] ire = 0, iim = 0;
  logic signed [8:0] cre [N_SC], cim [N_SC], sre [N_SC], sim [N_SC];
  rx_equalizer #(.LOG2N(5)) dut (.clk, .rst, .in_valid(iv), .in_idx(idx), .in_re(ire), .in_im(iim),
    .eq_en, .coef_re(cre), .coef_im(cim), .out_valid(ov), .sym_re(sre), .sym_im(sim), .out_sat(osat));

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

  function automatic int div8_even(longint v);
    longint q, r;
    q = v >>> 3; r = v - q * 8;
    if (r > 4 || (r == 4 && (q & 1))) q++;
    return int'(q);
  endfunction
  function automatic int clamp9(int v, ref bit s);
    if (v > 255) begin s = 1; return 255; end
    if (v < -256) begin s = 1; return -256; end
    return v;
  endfunction

  task automatic frame(int n, int span, bit en);
    int xr [32], xi [32], er [16], ei [16];
    bit s;
    int t15, tv;
    s = 0;
    eq_en = en;
    for (int k = 0; k < N_SC; k++) begin
      cre[k] = 9'($urandom_range(2 * span) - span); cim[k] = 9'($urandom_range(2 * span) - span);
    end
    for (int k = 0; k < n; k++) begin xr[k] = $urandom_range(511) - 256; xi[k] = $urandom_range(511) - 256; end
    for (int k = 0; k < N_SC; k++) begin
      if (en) begin
        er[k] = clamp9(div8_even(longint'(xr[k]) * cre[k] - longint'(xi[k]) * cim[k]), s);
        ei[k] = clamp9(div8_even(longint'(xr[k]) * cim[k] + longint'(xi[k]) * cre[k]), s);
      end else begin
        er[k] = xr[k]; ei[k] = xi[k];
      end
    end
    got_ov = 0;
    for (int k = 0; k < n; k++) begin
      @(negedge clk) begin iv = 1; idx = 5'(k); ire = 9'(xr[k]); iim = 9'(xi[k]); end
      if (k == 15) t15 = $time;
    end
    @(negedge clk) iv = 0;
    while (!got_ov) @(posedge clk);
    @(negedge clk);
    tv = tv_g;
    check(tv - t15 == 10, $sformatf("out_valid %0d ns after bin 15 was driven", tv - t15));
    for (int k = 0; k < N_SC; k++)
      check(sre[k] == er[k] && sim[k] == ei[k],
            $sformatf("bin %0d got (%0d,%0d) exp (%0d,%0d)", k, sre[k], sim[k], er[k], ei[k]));
    check(sat_g == s, $sformatf("out_sat %0d exp %0d", sat_g, s));
    @(negedge clk);
  endtask

  int nsat, tv_g;
  bit got_ov;
  bit sat_g;
  always @(posedge clk) if (ov) begin got_ov = 1; tv_g = $time; sat_g = osat; end
  initial begin
    for (int k = 0; k < N_SC; k++) begin cre[k] = 0; cim[k] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < 30; t++) frame(16, 12, 1);       // |E| up to 1.5: mostly no clipping
    for (int t = 0; t < 10; t++) frame(32, 12, 1);       // DMT: upper bins ignored
    for (int t = 0; t < 10; t++) frame(16, 255, 1);      // large E: clipping
    for (int t = 0; t < 5; t++)  frame(32, 40, 0);       // equalizer off
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
