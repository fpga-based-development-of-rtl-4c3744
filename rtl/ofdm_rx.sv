// ofdm_rx - OFDM / DMT receiver of the baseband controller.
//
// Chain (reverse of the transmitter):
//   rx_gi_remove       input FIFO; a complete channel frame is read in a burst,
//                      the guard samples are dropped
//   fft_core           16- or 32-point FFT scaled by 1/N
//   rx_equalizer       bins 0..15 in parallel, optional one-tap zero forcing
//   qam16_demod x16    hard decisions
//   rx_bit_serializer  56 bits of the used subcarriers, one per clock
//   rate_out_fifo      one bit every 20 ns on out_recv
// in_stb / in_mark give the ADC sample strobe and the first sample of a channel
// frame. In DMT mode only the real input is used. eq_en and the coefficient
// arrays (1/H(n) in s5Q3 for bins 0..15) control the equalizer. The structure
// follows the design text; the frame marker input stands in for the receiver
// synchronisation that the design leaves for later.
module ofdm_rx
  import ofdm_pkg::*;
#(
  parameter bit          DMT  = 1'b0,
  parameter int unsigned DW   = 9,
  parameter int unsigned FRAC = 3
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  input  logic                 in_stb,
  input  logic                 in_mark,
  input  logic                 eq_en,
  input  logic signed [DW-1:0] coef_re [N_SC],
  input  logic signed [DW-1:0] coef_im [N_SC],
  output logic                 out_recv,
  output logic                 out_stb,
  output logic                 sym_valid,
  output logic                 fft_sat,
  output logic                 eq_sat,
  output logic                 in_overflow,
  output logic                 out_underflow
);
  localparam int unsigned LOG2N = DMT ? 5 : 4;

  logic                 gr_valid, fft_ready, fft_valid, fft_last;
  logic signed [DW-1:0] gr_re, gr_im, fft_re, fft_im;
  logic [LOG2N-1:0]     fft_idx;
  logic signed [DW-1:0] sym_re [N_SC];
  logic signed [DW-1:0] sym_im [N_SC];
  logic [3:0]           bits   [N_SC];
  logic                 ser_push, ser_bit;

  rx_gi_remove #(.LOG2N(LOG2N), .DW(DW)) u_girm (
    .clk, .rst, .in_stb, .in_mark,
    .in_re, .in_im(DMT ? '0 : in_im),
    .fft_ready,
    .out_valid(gr_valid), .out_re(gr_re), .out_im(gr_im),
    .overflow(in_overflow)
  );

  fft_core #(.LOG2N(LOG2N), .INVERSE(1'b0), .DW(DW)) u_fft (
    .clk, .rst,
    .in_valid(gr_valid), .in_re(gr_re), .in_im(gr_im), .in_ready(fft_ready),
    .out_valid(fft_valid), .out_last(fft_last), .out_idx(fft_idx),
    .out_re(fft_re), .out_im(fft_im), .out_sat(fft_sat)
  );

  rx_equalizer #(.LOG2N(LOG2N), .DW(DW), .FRAC(FRAC)) u_eq (
    .clk, .rst,
    .in_valid(fft_valid), .in_idx(fft_idx), .in_re(fft_re), .in_im(fft_im),
    .eq_en, .coef_re, .coef_im,
    .out_valid(sym_valid), .sym_re, .sym_im, .out_sat(eq_sat)
  );

  for (genvar k = 0; k < N_SC; k++) begin : g_demod
    qam16_demod #(.DW(DW), .FRAC(FRAC)) u_demod (
      .i_in(sym_re[k]), .q_in(sym_im[k]), .bits(bits[k])
    );
  end

  rx_bit_serializer u_ser (
    .clk, .rst, .in_valid(sym_valid), .bits,
    .out_push(ser_push), .out_bit(ser_bit)
  );

  rate_out_fifo #(.WIDTH(1), .DEPTH(128), .DOWN_FACT(BIT_DIV)) u_out (
    .clk, .rst,
    .push_en(ser_push), .wr_data(ser_bit),
    .out_data(out_recv), .out_stb, .underflow(out_underflow), .level()
  );

  assert property (@(posedge clk) disable iff (rst) fft_last |-> fft_idx == '1)
    else $error("ofdm_rx: FFT frame end at wrong index");
endmodule
