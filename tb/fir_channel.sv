// fir_channel - behavioural channel model for testbenches (not synthesizable
// hardware of the design).
//
// Second-order FIR low-pass y[n] = a0 x[n] + a1 x[n-1] + a2 x[n-2] with
// a0 = a2 = 0.21194908595403703 and a1 = 0.576101828091926, applied separately
// to the real and imaginary parts, a wire-like channel for testing the equalizer.
// The output is rounded to the FRAC-bit grid and saturated to DW bits, like an
// ADC. A sample is taken on every in_stb; the output is combinational in the
// current sample, so strobe and frame marker pass through without delay.
// With enable = 0 the channel is an ideal wire.
//
// The coefficients are those of the design's low-pass test channel; the
// rounding to the sample grid and the strobe interface are this model's own.
module fir_channel #(
  parameter int unsigned DW   = 9,
  parameter int unsigned FRAC = 3
) (
  input  logic                 clk,
  input  logic                 enable,
  input  logic                 in_stb,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im
);
  localparam real A0 = 0.21194908595403703;
  localparam real A1 = 0.576101828091926;
  localparam real A2 = A0;

  logic signed [DW-1:0] r1 = '0, r2 = '0, i1 = '0, i2 = '0;

  function automatic logic signed [DW-1:0] q(real v);
    real s, lim;
    s   = v * real'(1 << FRAC);
    lim = real'((1 << (DW - 1)) - 1);
    if (s > lim) s = lim;
    if (s < -lim - 1.0) s = -lim - 1.0;
    return DW'($rtoi(s >= 0.0 ? s + 0.5 : s - 0.5));
  endfunction

  function automatic real r(logic signed [DW-1:0] v);
    return real'(v) / real'(1 << FRAC);
  endfunction

  always @(posedge clk) begin
    if (in_stb) begin
      r2 <= r1; r1 <= in_re;
      i2 <= i1; i1 <= in_im;
    end
  end

  always_comb begin
    if (enable) begin
      out_re = q(A0 * r(in_re) + A1 * r(r1) + A2 * r(r2));
      out_im = q(A0 * r(in_im) + A1 * r(i1) + A2 * r(i2));
    end else begin
      out_re = in_re;
      out_im = in_im;
    end
  end
endmodule
