// qam16_demod - hard-decision 16-QAM demapper for one subcarrier.
//
// Decides the four bits from the signs of I and Q and from their magnitude
// against the threshold 2 (the midpoint between the levels 1 and 3):
//   bit3 = (I >= 0)            bit2 = (I >= 0) ? (I <= 2) : (I > -2)
//   bit1 = (Q <  0)            bit0 = (Q >= 0) ? (Q <= 2) : (Q > -2)
// This is the decision rule of the design text and the inverse of qam16_mod.
// Inputs are signed fixed point with FRAC fractional bits. Combinational.
module qam16_demod #(
  parameter int unsigned DW   = 9,
  parameter int unsigned FRAC = 3
) (
  input  logic signed [DW-1:0] i_in,
  input  logic signed [DW-1:0] q_in,
  output logic [3:0]           bits
);
  localparam logic signed [DW-1:0] TWO     = DW'(2) <<< FRAC;
  localparam logic signed [DW-1:0] MIN_TWO = -TWO;

  always_comb begin
    if (i_in >= 0) begin
      bits[3] = 1'b1;
      bits[2] = !(i_in > TWO);
    end else begin
      bits[3] = 1'b0;
      bits[2] = (i_in > MIN_TWO);
    end
    if (q_in >= 0) begin
      bits[1] = 1'b0;
      bits[0] = !(q_in > TWO);
    end else begin
      bits[1] = 1'b1;
      bits[0] = (q_in > MIN_TWO);
    end
  end
endmodule
