// ber_link - one transmitter/receiver link over a simulated noisy channel,
// with its own bit-error-ratio measurement; a helper of tb_ofdm_ber.
//
// It holds one ofdm_top built with the given mode (DMT) and sample word
// (DW bits, FRAC of them fractional), loops its output back to its input
// through additive white Gaussian noise, and measures the error ratio with
// the on-chip counters at two SNR points, NBITS bits each. It counts a
// failure when a ratio is not within a factor of two of the given reference
// value, and raises done when both points are measured.
//
// Noise model: as in the design's evaluation, the noise power is set from a
// fixed nominal signal power, P_s = 10 * N * 14/16 * N/(N + N/4) * 2 in
// squared constellation units (224 for OFDM, 448 for DMT), scaled by 4^FRAC
// for the sample word: noise power = P_s / SNR. For OFDM it is split evenly
// over the real and imaginary part; DMT uses a real channel, so all of it goes
// on the real part. Noisy samples are rounded and clipped to the sample word,
// as an ADC would. The noise generator (Box-Muller from $urandom), the rounding
// and the tolerance are this testbench's own. The link also measures the real
// mean sample power over data frames.
`timescale 1ns/1ps
module ber_link
  import ofdm_pkg::*;
#(
  parameter bit          DMT   = 1'b0,
  parameter int unsigned DW    = 9,
  parameter int unsigned FRAC  = 3,
  parameter int unsigned NBITS = 209460,
  parameter real         SNR_A = 18.0,
  parameter real         REF_A = 1.58e-3,
  parameter real         SNR_B = 16.0,
  parameter real         REF_B = 7.8e-3
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned NFFT = DMT ? 2 * N_SC : N_SC;
  localparam real PS = 10.0 * NFFT * 14.0 / 16.0 * 0.8 * 2.0 * (4.0 ** FRAC);

  logic signed [DW-1:0] tx_re, tx_im, rx_re, rx_im;
  logic tx_stb, tx_mark, ber_clr;
  logic signed [DW-1:0] coef_re [N_SC];
  logic signed [DW-1:0] coef_im [N_SC];
  logic inp_trans, out_recv, diffsig;
  logic [31:0] ber_sent, ber_errors;
  logic frame_real, ifft_sat, fft_sat, eq_sat, fifo_error;

  always_comb
    for (int k = 0; k < N_SC; k++) begin
      coef_re[k] = DW'(1) <<< FRAC;
      coef_im[k] = '0;
    end

  ofdm_top #(.DMT(DMT), .DW(DW), .FRAC(FRAC)) dut (
    .clk, .rst,
    .out_trans_re(tx_re), .out_trans_im(tx_im),
    .tx_sample_stb(tx_stb), .tx_frame_mark(tx_mark),
    .inp_recv_re(rx_re), .inp_recv_im(rx_im),
    .rx_sample_stb(tx_stb), .rx_frame_mark(tx_mark),
    .eq_en(1'b0), .eq_coef_re(coef_re), .eq_coef_im(coef_im),
    .inp_trans, .out_recv, .diffsig,
    .ber_clr, .ber_sent, .ber_errors,
    .tx_frame_real(frame_real), .tx_ifft_sat(ifft_sat),
    .rx_fft_sat(fft_sat), .rx_eq_sat(eq_sat), .fifo_error
  );

  // ---- noisy channel -------------------------------------------------------------
  real sigma_re = 0.0, sigma_im = 0.0;   // noise deviation per part, in LSB
  real n_re = 0.0, n_im = 0.0;
  real pwr_sum = 0.0;
  int  pwr_n = 0;

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(32'hfffffffe)) + 1.0) / 4294967296.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
  endfunction
  function automatic logic signed [DW-1:0] adc(real v);
    longint r, maxv;
    maxv = (longint'(1) <<< (DW - 1)) - 1;
    r = $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
    if (r > maxv) r = maxv;
    if (r < -maxv - 1) r = -maxv - 1;
    return DW'(r);
  endfunction

  // a new noise value with every transmitted sample
  always @(posedge clk) if (tx_stb) begin
    n_re <= sigma_re * gauss();
    n_im <= sigma_im * gauss();
  end
  always_comb begin
    rx_re = adc(real'(tx_re) + n_re);
    rx_im = adc(real'(tx_im) + n_im);
  end
  always @(posedge clk) if (!rst && tx_stb && frame_real) begin
    pwr_sum += real'(tx_re) * tx_re + real'(tx_im) * tx_im;
    pwr_n++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic measure(real snr_db, real ref_ber);
    real ber, npow;
    npow = PS / (10.0 ** (snr_db / 10.0));
    sigma_re = DMT ? $sqrt(npow) : $sqrt(npow / 2.0);
    sigma_im = DMT ? 0.0 : $sqrt(npow / 2.0);
    repeat (2 * FRAME_CLKS) @(posedge clk);
    @(negedge clk) ber_clr = 1;
    @(negedge clk) ber_clr = 0;
    while (ber_sent < NBITS) @(posedge clk);
    ber = real'(ber_errors) / real'(ber_sent);
    $display("%s s%0dQ%0d, SNR %0.1f dB: %0d errors in %0d bits, BER %0.3e (reference %0.2e)",
             DMT ? "DMT " : "OFDM", DW - FRAC - 1, FRAC, snr_db, ber_errors, ber_sent, ber, ref_ber);
    check(ber > ref_ber / 2.0 && ber < ref_ber * 2.0,
          $sformatf("%s s%0dQ%0d: BER at %0.1f dB within a factor 2 of %0.2e",
                    DMT ? "DMT" : "OFDM", DW - FRAC - 1, FRAC, snr_db, ref_ber));
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; ber_clr = 0;
    @(negedge rst);
    repeat (10 * FRAME_CLKS) @(posedge clk);
    measure(SNR_A, REF_A);
    measure(SNR_B, REF_B);
    $display("%s s%0dQ%0d: mean sample power %0.0f LSB^2, nominal %0.0f", DMT ? "DMT " : "OFDM",
             DW - FRAC - 1, FRAC, pwr_sum / pwr_n, PS);
    check(fifo_error == 0, "no FIFO errors");
    done = 1;
  end
endmodule
