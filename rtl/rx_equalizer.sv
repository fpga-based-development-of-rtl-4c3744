// rx_equalizer - subcarrier extraction and one-tap zero-forcing equalizer.
//
// The FFT delivers the spectrum serially in natural bin order with its index.
// Bins 0..15 are gathered into 16 parallel registers (in DMT mode the upper 16
// bins, the mirrored half, are not needed). One cycle after bin 15 the 16
// values are multiplied, in parallel, by the precomputed inverse channel
// coefficients E(n) = 1/H(n):  y = x * E  (complex), which is the division
// x / H(n) of a zero-forcing one-tap equalizer. Products are brought back to
// the DW-bit data format with convergent rounding and saturation. With
// eq_en = 0 the values pass unchanged. out_valid pulses when sym_re/sym_im hold
// a new set; they stay until the next set.
// Coefficients are given in the same signed format as the data (s5Q3), as in the
// design text. Supplying them on ports (rather than as built-in constants)
// lets a later channel estimator drive them; that is this design's choice.
module rx_equalizer
  import ofdm_pkg::*;
#(
  parameter int unsigned LOG2N = 4,
  parameter int unsigned DW    = 9,
  parameter int unsigned FRAC  = 3
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic [LOG2N-1:0]     in_idx,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  input  logic                 eq_en,
  input  logic signed [DW-1:0] coef_re [N_SC],
  input  logic signed [DW-1:0] coef_im [N_SC],
  output logic                 out_valid,
  output logic signed [DW-1:0] sym_re [N_SC],
  output logic signed [DW-1:0] sym_im [N_SC],
  output logic                 out_sat
);
  logic signed [DW-1:0] x_re [N_SC];
  logic signed [DW-1:0] x_im [N_SC];
  logic                 calc;

  wide_t y_re [N_SC];
  wide_t y_im [N_SC];

  always_comb begin
    for (int k = 0; k < N_SC; k++) begin
      y_re[k] = rshift_conv(wide_t'(x_re[k]) * wide_t'(coef_re[k]) - wide_t'(x_im[k]) * wide_t'(coef_im[k]), FRAC);
      y_im[k] = rshift_conv(wide_t'(x_re[k]) * wide_t'(coef_im[k]) + wide_t'(x_im[k]) * wide_t'(coef_re[k]), FRAC);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      calc      <= 1'b0;
      out_valid <= 1'b0;
      out_sat   <= 1'b0;
      for (int k = 0; k < N_SC; k++) begin
        x_re[k]   <= '0;
        x_im[k]   <= '0;
        sym_re[k] <= '0;
        sym_im[k] <= '0;
      end
    end else begin
      calc      <= in_valid && (32'(in_idx) == N_SC - 1);
      out_valid <= calc;
      out_sat   <= 1'b0;
      if (in_valid && 32'(in_idx) < N_SC) begin
        x_re[in_idx[3:0]] <= in_re;
        x_im[in_idx[3:0]] <= in_im;
      end
      if (calc) begin
        for (int k = 0; k < N_SC; k++) begin
          if (eq_en) begin
            sym_re[k] <= DW'(sat(y_re[k], DW));
            sym_im[k] <= DW'(sat(y_im[k], DW));
            if (overflows(y_re[k], DW) || overflows(y_im[k], DW)) out_sat <= 1'b1;
          end else begin
            sym_re[k] <= x_re[k];
            sym_im[k] <= x_im[k];
          end
        end
      end
    end
  end
endmodule
