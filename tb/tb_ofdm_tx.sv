// tb_ofdm_tx - the whole transmitter, in OFDM mode (default sizes) and in DMT
// mode (10-bit samples), fed with a random bit stream at one bit per 5 cycles.
// The testbench takes each channel frame as it leaves at the DAC rate, starting
// at out_mark, and checks it independently of the RTL:
//  - sample period 14 cycles (OFDM) / 7 cycles (DMT), one frame per 280 cycles,
//    20 / 40 samples per frame;
//  - the guard interval equals the last quarter of the frame;
//  - a DFT of the useful part, computed in real arithmetic, gives 16-QAM points
//    on the used bins and 0 on bins 0 and 8 (in DMT also a real signal);
//  - the demapped bits are the input stream in order (the first frame, sent
//    before 56 bits were collected, carries all-zero bits; all its points are
//    -3+3i, so its first sample clips and only its bits are checked);
//  - each sample is within 2 LSB of the exact IDFT of those points, clipped.
//
// Rates, guard interval and mapping follow the design; the bin map and the
// 2 LSB tolerance belong to this implementation.
`timescale 1ns/1ps
module tb_ofdm_tx;
  import ofdm_pkg::*;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  logic inp = 0;
  logic signed [8:0] o_re, o_im;
  logic signed [9:0] d_re, d_im;
  logic o_stb, o_mark, d_stb, d_mark, o_fs, d_fs, o_real, d_real, o_sat, d_sat, o_uf, d_uf;
  ofdm_tx u_ofdm (.clk, .rst, .inp_trans(inp), .out_re(o_re), .out_im(o_im), .out_stb(o_stb), .out_mark(o_mark),
    .frame_start(o_fs), .frame_real(o_real), .ifft_sat(o_sat), .out_underflow(o_uf));
  ofdm_tx #(.DMT(1'b1), .DW(10)) u_dmt (.clk, .rst, .inp_trans(inp), .out_re(d_re), .out_im(d_im), .out_stb(d_stb),
    .out_mark(d_mark), .frame_start(d_fs), .frame_real(d_real), .ifft_sat(d_sat), .out_underflow(d_uf));

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

  // input stream, one bit per 5 cycles counted from reset release
  int cyc = 0;
  bit ref_q [$];
  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    if (cyc % 5 == 4) inp <= 1'($urandom);
    if (cyc % 5 == 2) ref_q.push_back(inp);
  end

  // frame decoder shared by both modes: m = 0 OFDM, 1 DMT
  int  smp_re [2][$], smp_im [2][$];
  int  nframe [2], bitpos [2], last_stb [2], last_mark [2];
  localparam int NN [2] = '{16, 32};
  localparam int PER [2] = '{14, 7};
  localparam int MAXV [2] = '{255, 511};

  function automatic int lvl(real v);     // nearest of -3 -1 1 3
    if (v < -2.0) return -3;
    if (v < 0.0) return -1;
    if (v < 2.0) return 1;
    return 3;
  endfunction
  function automatic logic [1:0] bits_i(int l);
    case (l) -3: return 2'b00; -1: return 2'b01; 1: return 2'b11; default: return 2'b10; endcase
  endfunction
  function automatic logic [1:0] bits_q(int l);
    case (l) 3: return 2'b00; 1: return 2'b01; -1: return 2'b11; default: return 2'b10; endcase
  endfunction

  task automatic decode(int m);
    int n, g, sr [40], si [40], li [32], lq [32], e;
    real yr, yi, a, xr, xi;
    logic [3:0] b;
    n = NN[m]; g = n / 4;
    for (int i = 0; i < n + g; i++) begin sr[i] = smp_re[m].pop_front(); si[i] = smp_im[m].pop_front(); end
    for (int i = 0; i < g; i++) check(sr[i] == sr[n + i] && si[i] == si[n + i], $sformatf("mode %0d cyclic guard sample %0d", m, i));
    for (int k = 0; k < n; k++) begin
      yr = 0.0; yi = 0.0;
      for (int i = 0; i < n; i++) begin
        a = -2.0 * 3.14159265358979 * k * i / n;
        yr += sr[g + i] * $cos(a) - si[g + i] * $sin(a);
        yi += sr[g + i] * $sin(a) + si[g + i] * $cos(a);
      end
      yr = yr / n / 8.0; yi = yi / n / 8.0;
      if (k == 0 || k == 8 || k == 16 || k == 24) begin
        if (nframe[m] > 0) check(yr < 0.4 && yr > -0.4 && yi < 0.4 && yi > -0.4, $sformatf("mode %0d bin %0d unused", m, k));
        li[k] = 0; lq[k] = 0;
      end else begin
        li[k] = lvl(yr); lq[k] = lvl(yi);
        if (nframe[m] > 0) check((yr - li[k]) < 0.6 && (li[k] - yr) < 0.6 && (yi - lq[k]) < 0.6 && (lq[k] - yi) < 0.6,
              $sformatf("mode %0d bin %0d off the 16-QAM grid (%f,%f)", m, k, yr, yi));
      end
    end
    if (m == 1) for (int k = 1; k < 16; k++) check(li[32 - k] == li[k] && lq[32 - k] == -lq[k], $sformatf("DMT bin %0d Hermitian", k));
    // bits
    for (int c = 0; c < N_USED; c++) begin
      b = {bits_i(li[used_bin(c)]), bits_q(lq[used_bin(c)])};
      for (int j = 3; j >= 0; j--) begin
        if (nframe[m] == 0) check(b[j] == 0, $sformatf("mode %0d first frame carries zeros", m));
        else begin
          check(b[j] == ref_q[bitpos[m]], $sformatf("mode %0d frame %0d bit %0d", m, nframe[m], bitpos[m]));
          bitpos[m]++;
        end
      end
    end
    // samples against the exact IDFT of the decoded points
    for (int i = 0; i < n; i++) begin
      xr = 0.0; xi = 0.0;
      for (int k = 0; k < n; k++) begin
        a = 2.0 * 3.14159265358979 * k * i / n;
        xr += 8 * (li[k] * $cos(a) - lq[k] * $sin(a));
        xi += 8 * (li[k] * $sin(a) + lq[k] * $cos(a));
      end
      e = $rtoi(xr >= 0 ? xr + 0.5 : xr - 0.5);
      if (e > MAXV[m]) e = MAXV[m];
      if (e < -MAXV[m] - 1) e = -MAXV[m] - 1;
      check(sr[g + i] - e <= 2 && e - sr[g + i] <= 2, $sformatf("mode %0d sample %0d: %0d exp %0d", m, i, sr[g + i], e));
      if (m == 1) check(si[g + i] == 0, "DMT output is real");
    end
    nframe[m]++;
  endtask

  bit started [2];
  always @(posedge clk) if (!rst) begin
    if (o_stb) begin
      if (last_stb[0] >= 0) check(cyc - last_stb[0] == PER[0], $sformatf("OFDM sample period %0d", cyc - last_stb[0]));
      last_stb[0] = cyc;
      if (o_mark) begin
        if (last_mark[0] >= 0) check(cyc - last_mark[0] == FRAME_CLKS, "OFDM frame period");
        last_mark[0] = cyc;
        started[0] = 1;
      end
      if (started[0]) begin
        smp_re[0].push_back(o_re); smp_im[0].push_back(o_im);
        if (smp_re[0].size() == 20) decode(0);
      end
    end
    if (d_stb) begin
      if (last_stb[1] >= 0) check(cyc - last_stb[1] == PER[1], $sformatf("DMT sample period %0d", cyc - last_stb[1]));
      last_stb[1] = cyc;
      if (d_mark) begin
        if (last_mark[1] >= 0) check(cyc - last_mark[1] == FRAME_CLKS, "DMT frame period");
        last_mark[1] = cyc;
        started[1] = 1;
      end
      if (started[1]) begin
        smp_re[1].push_back(d_re); smp_im[1].push_back(d_im);
        if (smp_re[1].size() == 40) decode(1);
      end
    end
    if (started[0]) check(!o_uf, "OFDM no underflow");
    if (started[1]) check(!d_uf, "DMT no underflow");
  end

  initial begin
    for (int m = 0; m < 2; m++) begin nframe[m] = 0; bitpos[m] = 0; last_stb[m] = -1; last_mark[m] = -1; started[m] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (280 * 40) @(negedge clk);
    check(nframe[0] >= 38 && nframe[1] >= 38, $sformatf("frames decoded %0d/%0d", nframe[0], nframe[1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
