// tb_ofdm_top - end-to-end test of the baseband controller at its default
// parameters (16-point OFDM, s5Q3 words).
//
// The transmitter output is looped back into the receiver, first directly, then
// through the FIR low-pass channel model. Phases:
//   1. ideal wire, equalizer off: no bit errors (after the first frames)
//   2. FIR channel, equalizer off: the channel must cause bit errors
//   3. FIR channel, equalizer on with E(n) = 1/H(n): no bit errors again
// Also checked: one DAC sample every 14 cycles (56 ns), one frame marker every
// 280 cycles (1120 ns) with 20 samples per frame, the guard interval being a
// copy of the last 4 samples, and 50 Mbit/s of bits compared. Mechanism counts
// (artificial zero frames, data frames, simultaneous FIFO push and pop, guard
// samples dropped, equalized symbol sets) must each be non-zero.
//
// Rates, frame sizes and the FIR channel coefficients follow the design; the
// link delay of 159 bits was measured on this implementation, and the loopback
// with a frame marker is its own choice.
`timescale 1ns/1ps
module tb_ofdm_top;
  import ofdm_pkg::*;

  localparam int DW = 9, FRAC = 3;
  localparam int N = 16, NGI = 4, NCHN = 20, PER = 14;

  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  logic signed [DW-1:0] tx_re, tx_im, rx_re, rx_im;
  logic tx_stb, tx_mark, eq_en, ber_clr, chan_en;
  logic signed [DW-1:0] coef_re [N_SC];
  logic signed [DW-1:0] coef_im [N_SC];
  logic inp_trans, out_recv, diffsig;
  logic [31:0] ber_sent, ber_errors;
  logic frame_real, ifft_sat, fft_sat, eq_sat, fifo_error;

  ofdm_top dut (
    .clk, .rst,
    .out_trans_re(tx_re), .out_trans_im(tx_im),
    .tx_sample_stb(tx_stb), .tx_frame_mark(tx_mark),
    .inp_recv_re(rx_re), .inp_recv_im(rx_im),
    .rx_sample_stb(tx_stb), .rx_frame_mark(tx_mark),
    .eq_en, .eq_coef_re(coef_re), .eq_coef_im(coef_im),
    .inp_trans, .out_recv, .diffsig,
    .ber_clr, .ber_sent, .ber_errors,
    .tx_frame_real(frame_real), .tx_ifft_sat(ifft_sat),
    .rx_fft_sat(fft_sat), .rx_eq_sat(eq_sat), .fifo_error
  );

  fir_channel #(.DW(DW), .FRAC(FRAC)) u_chan (
    .clk, .enable(chan_en), .in_stb(tx_stb),
    .in_re(tx_re), .in_im(tx_im), .out_re(rx_re), .out_im(rx_im)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- equalizer coefficients 1/H(n), H = DFT_N of [a0 a1 a2] ----------------
  function automatic logic signed [DW-1:0] qc(real v);
    return DW'($rtoi(v * 8.0 >= 0.0 ? v * 8.0 + 0.5 : v * 8.0 - 0.5));
  endfunction
  task automatic set_coefs();
    real a0, a1, hr, hi, m, pi;
    pi = 3.14159265358979;
    a0 = 0.21194908595403703; a1 = 0.576101828091926;
    for (int k = 0; k < N_SC; k++) begin
      hr = a0 + a1 * $cos(2.0 * pi * k / N) + a0 * $cos(4.0 * pi * k / N);
      hi = -a1 * $sin(2.0 * pi * k / N) - a0 * $sin(4.0 * pi * k / N);
      m  = hr * hr + hi * hi;
      coef_re[k] = qc(hr / m);
      coef_im[k] = qc(-hi / m);
    end
  endtask

  // ---- monitors ----------------------------------------------------------------
  int cyc = 0, last_stb = -1, last_mark = -1, samples_in_frame = 0;
  int n_stb_bad = 0, n_mark_bad = 0, n_frames_seen = 0, n_gi_bad = 0;
  logic signed [DW-1:0] fr_re [NCHN];
  logic signed [DW-1:0] fr_im [NCHN];
  int n_art = 0, n_real = 0, n_pushpop = 0, n_drop = 0, n_eq = 0, n_diff = 0;
  int n_ifft_sat = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (tx_stb) begin
        if (last_stb >= 0 && cyc - last_stb != PER) n_stb_bad++;
        last_stb <= cyc;
        if (tx_mark) begin
          if (last_mark >= 0) begin
            n_frames_seen++;
            if (cyc - last_mark != FRAME_CLKS) n_mark_bad++;
            if (samples_in_frame != NCHN) n_mark_bad++;
            for (int k = 0; k < NGI; k++)
              if (fr_re[k] != fr_re[N + k] || fr_im[k] != fr_im[N + k]) n_gi_bad++;
          end
          last_mark <= cyc;
          samples_in_frame = 1;
          fr_re[0] = tx_re; fr_im[0] = tx_im;
        end else if (samples_in_frame > 0 && samples_in_frame < NCHN) begin
          fr_re[samples_in_frame] = tx_re; fr_im[samples_in_frame] = tx_im;
          samples_in_frame++;
        end else if (samples_in_frame > 0) begin
          samples_in_frame++;
        end
      end
      if (dut.u_tx.u_alloc.frame_start) begin
        if (dut.u_tx.u_alloc.real_f) n_real++; else n_art++;
      end
      if (dut.u_tx.u_alloc.push && dut.u_tx.u_alloc.pop) n_pushpop++;
      if (dut.u_rx.u_girm.state == dut.u_rx.u_girm.S_DROP) n_drop++;
      if (dut.u_rx.sym_valid && eq_en) n_eq++;
      if (diffsig) n_diff++;
      if (ifft_sat) n_ifft_sat++;
    end
  end

  // ---- watchdog --------------------------------------------------------------
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int e0, s0;
  initial begin
    eq_en = 0; ber_clr = 0; chan_en = 0;
    for (int k = 0; k < N_SC; k++) begin coef_re[k] = 8; coef_im[k] = 0; end
    repeat (5) @(posedge clk);
    @(negedge clk) rst = 0;

    // phase 1: ideal wire
    repeat (20 * FRAME_CLKS) @(posedge clk);
    check(ber_sent > 1000, "bits were compared");
    check(ber_errors == 0, $sformatf("no errors on an ideal wire (errors=%0d of %0d)", ber_errors, ber_sent));
    check(n_diff == 0, "diffsig stayed low");
    check(fifo_error == 0, "no FIFO under/overflow");
    // bit rate: one compared bit per 5 cycles
    s0 = ber_sent;
    repeat (10 * FRAME_CLKS) @(posedge clk);
    check(ber_sent - s0 == 10 * BITS_PER_FRAME, $sformatf("56 bits per 1120 ns (got %0d)", ber_sent - s0));

    // phase 2: FIR channel without equalizer
    chan_en = 1;
    repeat (3 * FRAME_CLKS) @(posedge clk);
    @(posedge clk) ber_clr = 1;
    @(posedge clk) ber_clr = 0;
    repeat (20 * FRAME_CLKS) @(posedge clk);
    e0 = ber_errors;
    check(e0 > 0, $sformatf("FIR channel without equalizer causes errors (errors=%0d)", e0));

    // phase 3: FIR channel with equalizer
    set_coefs();
    eq_en = 1;
    repeat (3 * FRAME_CLKS) @(posedge clk);
    @(posedge clk) ber_clr = 1;
    @(posedge clk) ber_clr = 0;
    repeat (30 * FRAME_CLKS) @(posedge clk);
    check(ber_sent > 1000, "bits compared with equalizer");
    check(ber_errors == 0, $sformatf("equalizer restores the data (errors=%0d of %0d)", ber_errors, ber_sent));

    // timing and structure
    check(n_stb_bad == 0, $sformatf("sample period 14 cycles (%0d bad)", n_stb_bad));
    check(n_mark_bad == 0, $sformatf("frame period 280 cycles with 20 samples (%0d bad)", n_mark_bad));
    check(n_frames_seen > 50, "frames observed");
    check(n_gi_bad == 0, $sformatf("guard interval is a cyclic copy (%0d bad)", n_gi_bad));
    // mechanisms
    $display("mechanisms: artificial=%0d data=%0d push+pop=%0d gi_dropped=%0d eq_sets=%0d ifft_sat=%0d",
             n_art, n_real, n_pushpop, n_drop, n_eq, n_ifft_sat);
    check(n_art > 0, "artificial (zero) frame sent");
    check(n_real > 0, "data frames sent");
    check(n_pushpop > 0, "FIFO push and pop in the same cycle");
    check(n_drop > 0, "guard samples dropped in the receiver");
    check(n_eq > 0, "equalized symbol sets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
