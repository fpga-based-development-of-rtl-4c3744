// ofdm_top - OFDM / DMT baseband controller test system on one FPGA.
//
// The random bit generator (15-bit LFSR) feeds the transmitter at 50 Mbit/s.
// The transmitter's DAC-side samples leave on out_trans_re/im (with a sample
// strobe and a frame marker); the receiver takes its ADC-side samples on
// inp_recv_re/im. Outside the chip the two sides are looped back, directly or
// through a channel. The receiver output out_recv is compared with the delayed
// transmitted stream: diffsig is their XOR, and the monitor counts compared and
// wrong bits. inp_trans is also brought out, for an oscilloscope.
// DMT = 0 (default) is the complex OFDM mode with 16-point transforms; DMT = 1
// is the real-valued mode with 32-point transforms. MON_DELAY is the link delay
// in bits, measured for the given mode with the loopback of the testbench
// (direct connection, receiver sampling the transmitter's strobe and marker).
// Single clock of 250 MHz, synchronous active-high reset.
module ofdm_top
  import ofdm_pkg::*;
#(
  parameter bit          DMT       = 1'b0,
  parameter int unsigned DW        = 9,
  parameter int unsigned FRAC      = 3,
  parameter int unsigned MON_DELAY = DMT ? 186 : 159
) (
  input  logic                 clk,
  input  logic                 rst,
  // transmitter side (to the DAC)
  output logic signed [DW-1:0] out_trans_re,
  output logic signed [DW-1:0] out_trans_im,
  output logic                 tx_sample_stb,
  output logic                 tx_frame_mark,
  // receiver side (from the ADC)
  input  logic signed [DW-1:0] inp_recv_re,
  input  logic signed [DW-1:0] inp_recv_im,
  input  logic                 rx_sample_stb,
  input  logic                 rx_frame_mark,
  // equalizer
  input  logic                 eq_en,
  input  logic signed [DW-1:0] eq_coef_re [N_SC],
  input  logic signed [DW-1:0] eq_coef_im [N_SC],
  // bit streams and error check
  output logic                 inp_trans,
  output logic                 out_recv,
  output logic                 diffsig,
  input  logic                 ber_clr,
  output logic [31:0]          ber_sent,
  output logic [31:0]          ber_errors,
  // status
  output logic                 tx_frame_real,
  output logic                 tx_ifft_sat,
  output logic                 rx_fft_sat,
  output logic                 rx_eq_sat,
  output logic                 fifo_error
);
  logic bit_stb;
  logic tx_frame_start, tx_underflow;
  logic rx_stb, rx_sym_valid, rx_overflow, rx_underflow;

  lfsr_bitgen #(.BIT_DIV(BIT_DIV)) u_src (
    .clk, .rst, .bit_out(inp_trans), .bit_stb
  );

  ofdm_tx #(.DMT(DMT), .DW(DW), .FRAC(FRAC)) u_tx (
    .clk, .rst, .inp_trans,
    .out_re(out_trans_re), .out_im(out_trans_im),
    .out_stb(tx_sample_stb), .out_mark(tx_frame_mark),
    .frame_start(tx_frame_start), .frame_real(tx_frame_real),
    .ifft_sat(tx_ifft_sat), .out_underflow(tx_underflow)
  );

  ofdm_rx #(.DMT(DMT), .DW(DW), .FRAC(FRAC)) u_rx (
    .clk, .rst,
    .in_re(inp_recv_re), .in_im(inp_recv_im),
    .in_stb(rx_sample_stb), .in_mark(rx_frame_mark),
    .eq_en, .coef_re(eq_coef_re), .coef_im(eq_coef_im),
    .out_recv, .out_stb(rx_stb), .sym_valid(rx_sym_valid),
    .fft_sat(rx_fft_sat), .eq_sat(rx_eq_sat),
    .in_overflow(rx_overflow), .out_underflow(rx_underflow)
  );

  bit_error_monitor #(.DELAY(MON_DELAY)) u_mon (
    .clk, .rst, .bit_stb, .inp_trans, .out_recv, .clr(ber_clr),
    .diffsig, .sent_cnt(ber_sent), .err_cnt(ber_errors)
  );

  assign fifo_error = tx_underflow | rx_underflow | rx_overflow;
endmodule
