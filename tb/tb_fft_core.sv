// tb_fft_core - checks the radix-2 FFT/IFFT against a DFT computed in real
// arithmetic in the testbench. Three instances: the 16-point IFFT of the OFDM
// transmitter (unscaled), the 32-point FFT of the DMT receiver and the 16-point
// FFT of the OFDM receiver (both scaled by 1/N). Each output must lie within
// 2 LSB of the rounded, saturated reference. Also checked: natural output
// order with out_idx/out_last, N consecutive output cycles, the fixed latency
// of N/2*log2(N) butterfly cycles, and that an overflowing result saturates
// and raises out_sat.
//
// Transform sizes and the scaling split follow the design; the 2 LSB tolerance
// and the latency belong to this implementation's FFT.
`timescale 1ns/1ps
module tb_fft_core;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  logic              iv [3];
  logic signed [8:0] ire [3], iim [3];
  logic              rdy [3], ov [3], ol [3], os [3];
  logic [4:0]        oi [3];
  logic signed [8:0] ore [3], oim [3];

  fft_core #(.LOG2N(4), .INVERSE(1'b1)) u_ifft16 (.clk, .rst, .in_valid(iv[0]), .in_re(ire[0]), .in_im(iim[0]),
    .in_ready(rdy[0]), .out_valid(ov[0]), .out_last(ol[0]), .out_idx(oi[0][3:0]), .out_re(ore[0]), .out_im(oim[0]), .out_sat(os[0]));
  fft_core #(.LOG2N(5), .INVERSE(1'b0)) u_fft32 (.clk, .rst, .in_valid(iv[1]), .in_re(ire[1]), .in_im(iim[1]),
    .in_ready(rdy[1]), .out_valid(ov[1]), .out_last(ol[1]), .out_idx(oi[1]), .out_re(ore[1]), .out_im(oim[1]), .out_sat(os[1]));
  fft_core #(.LOG2N(4), .INVERSE(1'b0)) u_fft16 (.clk, .rst, .in_valid(iv[2]), .in_re(ire[2]), .in_im(iim[2]),
    .in_ready(rdy[2]), .out_valid(ov[2]), .out_last(ol[2]), .out_idx(oi[2][3:0]), .out_re(ore[2]), .out_im(oim[2]), .out_sat(os[2]));
  assign oi[0][4] = 1'b0;
  assign oi[2][4] = 1'b0;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [32], xi [32];
  int cyc;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int rnd_sat(real v);
    int r;
    r = $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
    if (r > 255) r = 255;
    if (r < -256) r = -256;
    return r;
  endfunction

  // one transform on instance u: n points, inverse or forward
  task automatic run(int u, int n, bit inv, bit expect_sat);
    real er [32], ei [32], a;
    int t_last, got, sat_seen, lat;
    for (int k = 0; k < n; k++) begin
      er[k] = 0.0; ei[k] = 0.0;
      for (int m = 0; m < n; m++) begin
        a = (inv ? 2.0 : -2.0) * 3.14159265358979 * k * m / n;
        er[k] += xr[m] * $cos(a) - xi[m] * $sin(a);
        ei[k] += xr[m] * $sin(a) + xi[m] * $cos(a);
      end
      if (!inv) begin er[k] /= n; ei[k] /= n; end
    end
    for (int m = 0; m < n; m++) begin
      @(negedge clk);
      check(rdy[u], "in_ready during load");
      iv[u] = 1; ire[u] = 9'(xr[m]); iim[u] = 9'(xi[m]);
    end
    @(posedge clk) t_last = cyc;
    @(negedge clk) iv[u] = 0;
    got = 0; sat_seen = 0;
    while (!ov[u]) @(posedge clk);
    lat = cyc - t_last;
    check(lat == n / 2 * $clog2(n) + 2, $sformatf("latency %0d cycles", lat));
    while (got < n) begin
      int er_i, ei_i;
      check(ov[u], "outputs on consecutive cycles");
      check(oi[u] == got, $sformatf("out_idx %0d exp %0d", oi[u], got));
      check(ol[u] == (got == n - 1), "out_last");
      er_i = rnd_sat(er[got]); ei_i = rnd_sat(ei[got]);
      if (os[u]) sat_seen++;
      check(ore[u] - er_i <= 2 && er_i - ore[u] <= 2 && oim[u] - ei_i <= 2 && ei_i - oim[u] <= 2,
            $sformatf("u%0d bin %0d got (%0d,%0d) exp (%0d,%0d)", u, got, ore[u], oim[u], er_i, ei_i));
      got++;
      @(posedge clk);
    end
    check(!ov[u], "exactly N outputs");
    check((sat_seen > 0) == expect_sat, $sformatf("out_sat seen %0d, expected %0d", sat_seen, expect_sat));
  endtask

  initial begin
    cyc = 0;
    for (int u = 0; u < 3; u++) begin iv[u] = 0; ire[u] = 0; iim[u] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // IFFT 16, inputs small enough that the unscaled result fits s5Q3
    for (int t = 0; t < 20; t++) begin
      for (int m = 0; m < 16; m++) begin xr[m] = $urandom_range(16) - 8; xi[m] = $urandom_range(16) - 8; end
      run(0, 16, 1, 0);
    end
    // IFFT 16 with 16-QAM levels (+-3 -> +-24) on every bin: may clip; DC of all -3+3i clips
    for (int m = 0; m < 16; m++) begin xr[m] = -24; xi[m] = 24; end
    run(0, 16, 1, 1);
    // FFT 32 and FFT 16 over the full input range
    for (int t = 0; t < 20; t++) begin
      for (int m = 0; m < 32; m++) begin xr[m] = $urandom_range(511) - 256; xi[m] = $urandom_range(511) - 256; end
      run(1, 32, 0, 0);
      run(2, 16, 0, 0);
    end
    // a pure tone lands in exactly one bin
    for (int m = 0; m < 16; m++) begin
      xr[m] = $rtoi(96.0 * $cos(2.0 * 3.14159265358979 * 3 * m / 16));
      xi[m] = $rtoi(96.0 * $sin(2.0 * 3.14159265358979 * 3 * m / 16));
    end
    run(2, 16, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
