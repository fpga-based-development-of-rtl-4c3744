// tb_ofdm_pkg - checks the shared helpers against independent references:
// convergent rounding of x / 2^sh (ties to even) over a sweep of values and
// shifts, saturation and the overflow flag, the Q1.14 twiddle table against
// $cos/$sin (within 1 LSB), the used-bin map (bins 1..7, 9..15) and the Gray
// 16-QAM levels.
//
// Subcarrier counts and rates follow the design; the bin map and the twiddle
// format are this implementation's choices.
`timescale 1ns/1ps
module tb_ofdm_pkg;
  import ofdm_pkg::*;
  logic clk = 0;
  always #2 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_round(longint x, int sh);   // ties to even
    real v, f;
    longint fl;
    v = real'(x) / (2.0 ** sh);
    fl = longint'($floor(v));
    f = v - fl;
    if (f > 0.5 || (f == 0.5 && (fl % 2 != 0))) return fl + 1;
    return fl;
  endfunction

  initial begin
    int e, w;
    @(posedge clk);
    for (int sh = 1; sh <= 6; sh++)
      for (int x = -300; x <= 300; x++)
        check(rshift_conv(wide_t'(x), sh) == ref_round(x, sh), $sformatf("round %0d >> %0d", x, sh));
    check(rshift_conv(wide_t'(77), 0) == 77, "shift 0");
    for (int x = -600; x <= 600; x += 7) begin
      e = x > 255 ? 255 : (x < -256 ? -256 : x);
      check(sat(wide_t'(x), 9) == e, $sformatf("sat %0d", x));
      check(overflows(wide_t'(x), 9) == (e != x), $sformatf("overflow flag %0d", x));
    end
    for (int k = 0; k < 32; k++) begin
      e = $rtoi($cos(2.0 * 3.14159265358979 * k / 32) * 16384.0 + 1000000.5) - 1000000;
      check(cos32(k) - e <= 1 && e - cos32(k) <= 1, $sformatf("cos32(%0d)=%0d exp %0d", k, cos32(k), e));
      e = $rtoi($sin(2.0 * 3.14159265358979 * k / 32) * 16384.0 + 1000000.5) - 1000000;
      check(sin32(k) - e <= 1 && e - sin32(k) <= 1, $sformatf("sin32(%0d)=%0d exp %0d", k, sin32(k), e));
    end
    w = 0;
    for (int c = 0; c < N_USED; c++) begin
      check(used_bin(c) == (c < 7 ? c + 1 : c + 2), "used bin map");
      check(is_used_bin(used_bin(c)), "used bin is used");
    end
    check(!is_used_bin(0) && !is_used_bin(8), "bins 0 and 8 unused");
    check(qam_level_i(2'b00) == -3 && qam_level_i(2'b01) == -1 && qam_level_i(2'b11) == 1 && qam_level_i(2'b10) == 3, "I levels");
    check(qam_level_q(2'b00) == 3 && qam_level_q(2'b01) == 1 && qam_level_q(2'b11) == -1 && qam_level_q(2'b10) == -3, "Q levels");
    check(BITS_PER_FRAME == 56 && FRAME_CLKS == 56 * BIT_DIV, "56 bits per 280-cycle frame");
    check(fft_len(0) == 16 && fft_len(1) == 32 && gi_len(0) == 4 && gi_len(1) == 8, "sizes");
    check(chan_down_fact(0) * (fft_len(0) + gi_len(0)) == FRAME_CLKS && chan_down_fact(1) * (fft_len(1) + gi_len(1)) == FRAME_CLKS, "sample rates fill the frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
