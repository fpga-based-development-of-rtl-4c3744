// rx_bit_serializer - parallel-to-serial conversion of the demodulated bits.
//
// When in_valid pulses, the 4-bit words of the 14 used subcarriers are latched
// and sent out one bit per clock cycle (56 cycles) on out_bit with out_push,
// into the receiver output FIFO. The order mirrors the transmitter: used
// subcarrier 0 first (bins 1..7, then 9..15), most significant bit of each
// word first, so the received stream is the transmitted one. A new set while
// the previous one is still being sent is a protocol error (assertion).
module rx_bit_serializer
  import ofdm_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic [3:0] bits [N_SC],
  output logic       out_push,
  output logic       out_bit
);
  logic [BITS_PER_FRAME-1:0] sr;
  logic [$clog2(BITS_PER_FRAME):0] left;

  always_ff @(posedge clk) begin
    if (rst) begin
      sr       <= '0;
      left     <= '0;
      out_push <= 1'b0;
      out_bit  <= 1'b0;
    end else begin
      out_push <= 1'b0;
      if (in_valid) begin
        for (int c = 0; c < N_USED; c++)
          sr[BITS_PER_FRAME-1-4*c -: 4] <= bits[used_bin(c)];
        left <= ($bits(left))'(BITS_PER_FRAME);
      end else if (left != 0) begin
        out_push <= 1'b1;
        out_bit  <= sr[BITS_PER_FRAME-1];
        sr       <= sr << 1;
        left     <= left - 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) in_valid |-> left == 0)
    else $error("rx_bit_serializer: new symbols before the previous were sent");
endmodule
