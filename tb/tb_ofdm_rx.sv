// tb_ofdm_rx - the whole receiver, in OFDM mode (default sizes) and in DMT mode
// (10-bit samples). The testbench builds the channel frames itself: random
// bits, Gray 16-QAM points on bins 1..7 and 9..15 (plus the conjugate half in
// DMT), an IDFT in real arithmetic, a flat channel gain, rounding and clipping
// to the sample format, and the cyclic guard interval in front. Samples go in
// one per 14 (OFDM) or 7 (DMT) cycles with a marker on each frame's first
// sample. Three phases, with two unchecked frames after each switch:
//   gain 1,   equalizer off -> every bit right
//   gain 1/2, equalizer on with E = 2 on every bin -> every bit right
//   gain 1/2, equalizer off -> the outer points fall inside: errors expected
// Also checked: the received bits leave one per 5 cycles.
//
// Rates, frame layout and the equalizer follow the design; the flat-gain
// channel is the testbench's own, and the frame marker input is this
// implementation's stand-in for synchronisation.
`timescale 1ns/1ps
module tb_ofdm_rx;
  import ofdm_pkg::*;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  logic signed [8:0] o_re, o_im;
  logic signed [9:0] d_re, d_im;
  logic o_stb = 0, o_mark = 0, d_stb = 0, d_mark = 0, eq_en = 0;
  logic signed [8:0] o_cre [N_SC], o_cim [N_SC];
  logic signed [9:0] d_cre [N_SC], d_cim [N_SC];
  logic rb [2], rs [2], sv [2], fs [2], es [2], ov [2], uf [2];
  ofdm_rx u_ofdm (.clk, .rst, .in_re(o_re), .in_im(o_im), .in_stb(o_stb), .in_mark(o_mark), .eq_en,
    .coef_re(o_cre), .coef_im(o_cim), .out_recv(rb[0]), .out_stb(rs[0]), .sym_valid(sv[0]), .fft_sat(fs[0]),
    .eq_sat(es[0]), .in_overflow(ov[0]), .out_underflow(uf[0]));
  ofdm_rx #(.DMT(1'b1), .DW(10)) u_dmt (.clk, .rst, .in_re(d_re), .in_im(d_im), .in_stb(d_stb), .in_mark(d_mark), .eq_en,
    .coef_re(d_cre), .coef_im(d_cim), .out_recv(rb[1]), .out_stb(rs[1]), .sym_valid(sv[1]), .fft_sat(fs[1]),
    .eq_sat(es[1]), .in_overflow(ov[1]), .out_underflow(uf[1]));

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

  localparam int NF = 21;                 // frames: 0..6 phase A, 7..13 B, 14..20 C
  function automatic int phase_of(int f); return f / 7; endfunction
  function automatic bit checked(int f); return (f % 7) >= 2; endfunction

  bit fbits [2][NF][56];
  localparam int NN [2] = '{16, 32};
  localparam int PER [2] = '{14, 7};
  localparam int MAXV [2] = '{255, 511};

  // channel samples of frame f for mode m, guard interval first
  task automatic make_frame(int m, int f, real gain, output int sr [40], output int si [40]);
    int n, g, xr [32], xi [32], v;
    real ar, ai, a;
    n = NN[m]; g = n / 4;
    for (int k = 0; k < 32; k++) begin xr[k] = 0; xi[k] = 0; end
    for (int c = 0; c < N_USED; c++) begin
      logic [3:0] b;
      for (int j = 0; j < 4; j++) b[3 - j] = fbits[m][f][4 * c + j];
      xr[used_bin(c)] = 8 * qam_level_i(b[3:2]);
      xi[used_bin(c)] = 8 * qam_level_q(b[1:0]);
      if (m == 1) begin xr[32 - used_bin(c)] = xr[used_bin(c)]; xi[32 - used_bin(c)] = -xi[used_bin(c)]; end
    end
    for (int i = 0; i < n; i++) begin
      ar = 0.0; ai = 0.0;
      for (int k = 0; k < n; k++) begin
        a = 2.0 * 3.14159265358979 * k * i / n;
        ar += xr[k] * $cos(a) - xi[k] * $sin(a);
        ai += xr[k] * $sin(a) + xi[k] * $cos(a);
      end
      ar *= gain; ai *= gain;
      v = $rtoi(ar >= 0 ? ar + 0.5 : ar - 0.5);
      sr[g + i] = v > MAXV[m] ? MAXV[m] : (v < -MAXV[m] - 1 ? -MAXV[m] - 1 : v);
      v = $rtoi(ai >= 0 ? ai + 0.5 : ai - 0.5);
      si[g + i] = (m == 1) ? 0 : (v > MAXV[m] ? MAXV[m] : (v < -MAXV[m] - 1 ? -MAXV[m] - 1 : v));
    end
    for (int i = 0; i < g; i++) begin sr[i] = sr[n + i]; si[i] = si[n + i]; end
  endtask

  task automatic stream(int m);
    int sr [40], si [40];
    for (int f = 0; f < NF; f++) begin
      make_frame(m, f, phase_of(f) == 0 ? 1.0 : 0.5, sr, si);
      if (m == 0 && f % 7 == 1) eq_en = (phase_of(f) == 1);   // the previous frame is still in the FFT
      for (int s = 0; s < NN[m] * 5 / 4; s++) begin
        repeat (PER[m] - 1) @(negedge clk);
        if (m == 0) begin o_stb = 1; o_mark = (s == 0); o_re = 9'(sr[s]); o_im = 9'(si[s]); end
        else        begin d_stb = 1; d_mark = (s == 0); d_re = 10'(sr[s]); d_im = 10'(si[s]); end
        @(negedge clk);
        if (m == 0) begin o_stb = 0; o_mark = 0; end
        else        begin d_stb = 0; d_mark = 0; end
      end
    end
  endtask

  int nbit [2], err [2][3], last [2], cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  for (genvar m = 0; m < 2; m++) begin : g_mon
    always @(posedge clk) if (!rst && rs[m]) begin
      int f;
      if (last[m] >= 0) check(cyc - last[m] == 5, $sformatf("mode %0d bit period %0d", m, cyc - last[m]));
      last[m] = cyc;
      f = nbit[m] / 56;
      if (f < NF && checked(f)) if (rb[m] != fbits[m][f][nbit[m] % 56]) err[m][phase_of(f)]++;
      nbit[m]++;
    end
  end

  initial begin
    o_re = 0; o_im = 0; d_re = 0; d_im = 0;
    for (int k = 0; k < N_SC; k++) begin o_cre[k] = 16; o_cim[k] = 0; d_cre[k] = 16; d_cim[k] = 0; end
    for (int m = 0; m < 2; m++) begin
      nbit[m] = 0; last[m] = -1;
      for (int p = 0; p < 3; p++) err[m][p] = 0;
      for (int f = 0; f < NF; f++) for (int b = 0; b < 56; b++) fbits[m][f][b] = 1'($urandom);
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    fork
      stream(0);
      stream(1);
    join
    repeat (2000) @(negedge clk);
    for (int m = 0; m < 2; m++) begin
      check(nbit[m] >= NF * 56, $sformatf("mode %0d: %0d bits out", m, nbit[m]));
      check(err[m][0] == 0, $sformatf("mode %0d: gain 1, no equalizer: %0d errors", m, err[m][0]));
      check(err[m][1] == 0, $sformatf("mode %0d: gain 1/2 equalized: %0d errors", m, err[m][1]));
      check(err[m][2] > 20, $sformatf("mode %0d: gain 1/2 not equalized: %0d errors", m, err[m][2]));
      check(!ov[m], "no input overflow");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
