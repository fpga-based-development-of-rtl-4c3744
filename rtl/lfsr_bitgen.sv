// lfsr_bitgen - synthesizable random bit source for testing the link.
//
// A 15-stage Fibonacci linear feedback shift register with the generator
// polynomial h(x) = x^15 + x + 1 produces a maximum-length sequence that repeats
// after 2^15 - 1 = 32767 bits. A new bit is produced every BIT_DIV clock cycles
// (T_b = 20 ns at T_clk = 4 ns), so the bit rate is the link's 50 Mbit/s payload
// rate. The register and the polynomial follow the design text; the seed and the
// strobe output are this design's choices.
//
// Interface: bit_out holds the current bit for BIT_DIV cycles; bit_stb is high in
// the first cycle of every new bit. Reset (synchronous, active high) loads SEED
// and restarts the divider, so the first bit after reset is SEED[0].
module lfsr_bitgen #(
  parameter int unsigned       BIT_DIV = 5,
  parameter logic [14:0]       SEED    = 15'h7fff
) (
  input  logic clk,
  input  logic rst,
  output logic bit_out,
  output logic bit_stb
);
  logic [14:0] sr;       // sr[0] = oldest element, shifted out first
  logic [$clog2(BIT_DIV)-1:0] div;

  // Recurrence of x^15 + x + 1: a[n+15] = a[n+1] ^ a[n]
  always_ff @(posedge clk) begin
    if (rst) begin
      sr    <= SEED;
      div   <= '0;
    end else begin
      if (div == BIT_DIV - 1) begin
        div <= '0;
        sr  <= {sr[1] ^ sr[0], sr[14:1]};
      end else begin
        div <= div + 1'b1;
      end
    end
  end

  assign bit_out = sr[0];
  assign bit_stb = (div == '0) && !rst;

  // SEED must not be zero, or the register locks up.
  initial assert (SEED != '0) else $error("lfsr_bitgen: SEED must be non-zero");
endmodule
