// tx_frame_builder - modulators and parallel-to-serial frame builder in front of
// the IFFT.
//
// Sixteen qam16_mod instances map the 4-bit words of all 16 subcarriers. On
// frame_start the symbols are latched; the unused subcarriers (bins 0 and 8),
// whose all-zero input would map to -3+3i, are forced to 0 here. The frame is then
// sent to the IFFT serially in natural bin order, one word every
// ifft_period(DMT) cycles: every 16 ns for the 16-point OFDM frame, every 8 ns
// for the 32-point DMT frame. In DMT mode the frame is made Hermitian so that the
// IFFT output is real: bins 0..15 carry the symbols (bin 0 is unused, so real),
// bin 16 is 0 and bin 32-k carries the complex conjugate of bin k.
// out_valid is high for one cycle per word, out_last marks the final word.
// The rates, the zeroing of the unused subcarriers and the conjugate-symmetric
// DMT frame follow the design text; the bin assignment is this design's choice.
module tx_frame_builder
  import ofdm_pkg::*;
#(
  parameter bit          DMT  = 1'b0,
  parameter int unsigned DW   = 9,
  parameter int unsigned FRAC = 3
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [3:0]           sym_bits [N_SC],
  input  logic                 frame_start,
  output logic                 out_valid,
  output logic                 out_last,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im
);
  localparam int unsigned N   = fft_len(DMT);
  localparam int unsigned PER = ifft_period(DMT);

  logic signed [DW-1:0] mod_i [N_SC];
  logic signed [DW-1:0] mod_q [N_SC];
  logic signed [DW-1:0] x_re  [N_SC];
  logic signed [DW-1:0] x_im  [N_SC];

  logic                       busy;
  logic [$clog2(N)-1:0]       idx;
  logic [$clog2(PER)-1:0]     phase;

  for (genvar k = 0; k < N_SC; k++) begin : g_mod
    qam16_mod #(.DW(DW), .FRAC(FRAC)) u_mod (
      .bits(sym_bits[k]), .i_out(mod_i[k]), .q_out(mod_q[k])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      idx       <= '0;
      phase     <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      for (int k = 0; k < N_SC; k++) begin
        x_re[k] <= '0;
        x_im[k] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (frame_start) begin
        for (int k = 0; k < N_SC; k++) begin
          x_re[k] <= is_used_bin(k) ? mod_i[k] : '0;
          x_im[k] <= is_used_bin(k) ? mod_q[k] : '0;
        end
        busy  <= 1'b1;
        idx   <= '0;
        phase <= '0;
      end else if (busy) begin
        phase <= (32'(phase) == PER - 1) ? '0 : phase + 1'b1;
        if (phase == '0) begin
          out_valid <= 1'b1;
          out_last  <= (32'(idx) == N - 1);
          if (32'(idx) < N_SC) begin
            out_re <= x_re[idx[$clog2(N_SC)-1:0]];
            out_im <= x_im[idx[$clog2(N_SC)-1:0]];
          end else if (32'(idx) == N_SC) begin
            out_re <= '0;
            out_im <= '0;
          end else begin
            out_re <= x_re[(N - 32'(idx)) % N_SC];
            out_im <= -x_im[(N - 32'(idx)) % N_SC];
          end
          if (32'(idx) == N - 1) busy <= 1'b0;
          idx <= idx + 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) frame_start |-> !busy)
    else $error("tx_frame_builder: new frame before the previous one was sent");
endmodule
