// ofdm_tx - OFDM / DMT transmitter of the baseband controller.
//
// Chain (all at the 250 MHz system clock, rates made with enables):
//   tx_subc_alloc     input FIFO, 56 bits per frame to 14 subcarriers (20 ns/bit)
//   tx_frame_builder  16 x 16-QAM, unused bins zeroed, serial into the IFFT
//                     (16 ns/word OFDM, 8 ns/word DMT with the Hermitian half)
//   fft_core          16- or 32-point IFFT, result cast back to DW bits
//   gi_insert         last quarter of the frame copied in front
//   rate_out_fifo     one sample every 56 ns (OFDM) / 28 ns (DMT) to the DAC
// A frame of 56 payload bits becomes 20 complex samples (OFDM) or 40 real
// samples (DMT) every 1120 ns, which carries the 50 Mbit/s input stream.
// DMT = 1 selects the real-valued mode for a wired channel; out_im is then 0.
// out_stb pulses when a new sample is presented; out_mark is high with the first
// guard sample of each frame (the frame timing handed to the receiver).
// Status outputs expose the input FSM (sel: the frame carries data) and
// saturation at the IFFT output. The structure follows the design text; the
// marker output is this design's addition for the receiver.
module ofdm_tx
  import ofdm_pkg::*;
#(
  parameter bit          DMT  = 1'b0,
  parameter int unsigned DW   = 9,
  parameter int unsigned FRAC = 3
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 inp_trans,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im,
  output logic                 out_stb,
  output logic                 out_mark,
  output logic                 frame_start,
  output logic                 frame_real,
  output logic                 ifft_sat,
  output logic                 out_underflow
);
  localparam int unsigned LOG2N = DMT ? 5 : 4;

  logic [3:0]           sym_bits [N_SC];
  logic                 fb_valid, fb_last;
  logic signed [DW-1:0] fb_re, fb_im;
  logic                 ifft_valid, ifft_ready, ifft_last;
  logic [LOG2N-1:0]     ifft_idx;
  logic signed [DW-1:0] ifft_re, ifft_im;
  logic                 gi_valid, gi_first;
  logic signed [DW-1:0] gi_re, gi_im;
  logic [2*DW:0]        of_word;

  tx_subc_alloc u_alloc (
    .clk, .rst, .inp_trans,
    .sym_bits, .frame_start, .frame_real,
    .push(), .pop(), .sel(), .num()
  );

  tx_frame_builder #(.DMT(DMT), .DW(DW), .FRAC(FRAC)) u_frame (
    .clk, .rst, .sym_bits, .frame_start,
    .out_valid(fb_valid), .out_last(fb_last), .out_re(fb_re), .out_im(fb_im)
  );

  fft_core #(.LOG2N(LOG2N), .INVERSE(1'b1), .DW(DW)) u_ifft (
    .clk, .rst,
    .in_valid(fb_valid), .in_re(fb_re), .in_im(fb_im), .in_ready(ifft_ready),
    .out_valid(ifft_valid), .out_last(ifft_last), .out_idx(ifft_idx),
    .out_re(ifft_re), .out_im(ifft_im), .out_sat(ifft_sat)
  );

  gi_insert #(.LOG2N(LOG2N), .DW(DW)) u_gi (
    .clk, .rst,
    .in_valid(ifft_valid), .in_re(ifft_re), .in_im(DMT ? '0 : ifft_im),
    .out_valid(gi_valid), .out_first(gi_first), .out_re(gi_re), .out_im(gi_im),
    .busy()
  );

  rate_out_fifo #(.WIDTH(2 * DW + 1), .DEPTH(64), .DOWN_FACT(chan_down_fact(DMT))) u_out (
    .clk, .rst,
    .push_en(gi_valid), .wr_data({gi_first, gi_re, gi_im}),
    .out_data(of_word), .out_stb, .underflow(out_underflow), .level()
  );

  assign {out_mark, out_re, out_im} = of_word;

  // the frame builder's last word must coincide with the IFFT's frame end
  assert property (@(posedge clk) disable iff (rst) fb_last |-> fb_valid)
    else $error("ofdm_tx: frame end without data");
  assert property (@(posedge clk) disable iff (rst) ifft_last |-> ifft_idx == '1)
    else $error("ofdm_tx: IFFT frame end at wrong index");
endmodule
