// qam16_mod - Gray-coded 16-QAM mapper for one subcarrier.
//
// The 4-bit word is split into an in-phase pair (bits 3:2) and a quadrature
// pair (bits 1:0); each pair selects one of the levels -3, -1, +1, +3, as a
// multiplexer choosing constants would. The mapping is the inverse of the
// receiver's decision rule: I 00/01/11/10 -> -3/-1/+1/+3 and
// Q 00/01/11/10 -> +3/+1/-1/-3, so neighbouring points differ in one bit and an
// all-zero word maps to -3+3i. Outputs are signed fixed point with FRAC
// fractional bits (s5Q3 by default). Purely combinational.
module qam16_mod
  import ofdm_pkg::*;
#(
  parameter int unsigned DW   = 9,   // word width (s5Q3: 9)
  parameter int unsigned FRAC = 3    // fractional bits
) (
  input  logic [3:0]           bits,
  output logic signed [DW-1:0] i_out,
  output logic signed [DW-1:0] q_out
);
  always_comb begin
    i_out = DW'(qam_level_i(bits[3:2])) <<< FRAC;
    q_out = DW'(qam_level_q(bits[1:0])) <<< FRAC;
  end
endmodule
