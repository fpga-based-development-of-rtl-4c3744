// fft_core - frame-serial radix-2 FFT / IFFT for the 16-point (OFDM) and
// 32-point (DMT) transforms of the transmitter and receiver.
//
// Operation, one frame at a time:
//   LOAD  N words arrive on in_valid (any spacing, in natural order) and are
//         stored in bit-reversed order, widened to the internal word.
//   CALC  LOG2N stages of N/2 decimation-in-time butterflies, one butterfly per
//         cycle (N/2*LOG2N cycles: 32 for N = 16, 80 for N = 32). Twiddles come
//         from a Q1.14 table of cos(2*pi*k/32); products are rounded
//         convergently back to the internal precision.
//   OUT   N results leave in natural order on N consecutive cycles with
//         out_valid, out_idx and out_last (the design's tuser/tlast).
// INVERSE = 1 computes x[k] = sum X[n] e^{+j2pi nk/N} without 1/N, so the
// transmit power is N times the symbol power, as the link budget of the design
// assumes. INVERSE = 0 computes X[n] = (1/N) sum x[k] e^{-j2pi nk/N}, which
// returns the transmitted symbols at their original level for the demodulator.
// The internal word has LOG2N+1 bits of growth (the worst case of a radix-2
// transform) plus GB guard fraction bits, so nothing overflows inside; at the
// output the result is cast back to the DW-bit input format with convergent
// rounding and saturation (out_sat flags a clipped word).
// in_ready is high in LOAD; a word offered in another state is a protocol error.
// The transform sizes, the word growth and the cast to the input width follow
// the design text, which used a vendor FFT core; this memory-based architecture
// and the scaling split are this design's own. The one-cycle butterfly is the
// simplest form and is not pipelined for 250 MHz.
module fft_core
  import ofdm_pkg::*;
#(
  parameter int unsigned LOG2N   = 4,   // 4: 16-point, 5: 32-point
  parameter bit          INVERSE = 1'b1,
  parameter int unsigned DW      = 9,   // in/out word (s5Q3)
  parameter int unsigned GB      = 3    // guard fraction bits inside
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic signed [DW-1:0]   in_re,
  input  logic signed [DW-1:0]   in_im,
  output logic                   in_ready,
  output logic                   out_valid,
  output logic                   out_last,
  output logic [LOG2N-1:0]       out_idx,
  output logic signed [DW-1:0]   out_re,
  output logic signed [DW-1:0]   out_im,
  output logic                   out_sat
);
  localparam int unsigned N  = 1 << LOG2N;
  localparam int unsigned IW = DW + LOG2N + 1 + GB;
  localparam int unsigned OUT_SHIFT = INVERSE ? GB : GB + LOG2N;

  typedef enum logic [1:0] {S_LOAD, S_CALC, S_OUT} state_t;
  state_t state;

  logic signed [IW-1:0] m_re [N];
  logic signed [IW-1:0] m_im [N];

  logic [LOG2N-1:0]         cnt;
  logic [$clog2(LOG2N)-1:0] stage;
  logic [LOG2N-2:0]         bfly;

  // butterfly datapath (combinational)
  logic [LOG2N-1:0]     bi, bj;
  logic [4:0]           k32;
  logic signed [15:0]   w_re, w_im;
  logic signed [IW+16:0] p_re, p_im;
  wide_t                t_re, t_im;
  logic signed [IW-1:0] a_re, a_im, b_re, b_im;

  function automatic logic [LOG2N-1:0] bitrev(logic [LOG2N-1:0] v);
    for (int b = 0; b < LOG2N; b++) bitrev[b] = v[LOG2N-1-b];
  endfunction

  always_comb begin
    logic [LOG2N-1:0] half, pos, grp;
    half = LOG2N'(1) << stage;
    pos  = LOG2N'(bfly) & (half - 1'b1);
    grp  = LOG2N'(bfly) >> stage;
    bi   = (grp << (stage + 1)) | pos;
    bj   = bi | half;
    k32  = 5'(pos << (4 - stage));
    w_re = cos32(32'(k32));
    w_im = INVERSE ? sin32(32'(k32)) : -sin32(32'(k32));
    a_re = m_re[bi];
    a_im = m_im[bi];
    b_re = m_re[bj];
    b_im = m_im[bj];
    p_re = b_re * w_re - b_im * w_im;
    p_im = b_re * w_im + b_im * w_re;
    t_re = rshift_conv(wide_t'(p_re), 14);
    t_im = rshift_conv(wide_t'(p_im), 14);
  end

  wide_t o_re, o_im;
  always_comb begin
    o_re = rshift_conv(wide_t'(m_re[cnt]), OUT_SHIFT);
    o_im = rshift_conv(wide_t'(m_im[cnt]), OUT_SHIFT);
  end

  assign in_ready = (state == S_LOAD);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_LOAD;
      cnt       <= '0;
      stage     <= '0;
      bfly      <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_idx   <= '0;
      out_re    <= '0;
      out_im    <= '0;
      out_sat   <= 1'b0;
      for (int k = 0; k < N; k++) begin
        m_re[k] <= '0;
        m_im[k] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_sat   <= 1'b0;
      unique case (state)
        S_LOAD: if (in_valid) begin
          m_re[bitrev(cnt)] <= IW'(in_re) <<< GB;
          m_im[bitrev(cnt)] <= IW'(in_im) <<< GB;
          cnt <= cnt + 1'b1;
          if (cnt == LOG2N'(N - 1)) begin
            state <= S_CALC;
            stage <= '0;
            bfly  <= '0;
          end
        end
        S_CALC: begin
          m_re[bi] <= a_re + IW'(t_re);
          m_im[bi] <= a_im + IW'(t_im);
          m_re[bj] <= a_re - IW'(t_re);
          m_im[bj] <= a_im - IW'(t_im);
          bfly <= bfly + 1'b1;
          if (bfly == '1) begin
            if (stage == LOG2N - 1) begin
              state <= S_OUT;
              cnt   <= '0;
            end else begin
              stage <= stage + 1'b1;
            end
          end
        end
        S_OUT: begin
          out_valid <= 1'b1;
          out_idx   <= cnt;
          out_last  <= (cnt == LOG2N'(N - 1));
          out_re    <= DW'(sat(o_re, DW));
          out_im    <= DW'(sat(o_im, DW));
          out_sat   <= overflows(o_re, DW) || overflows(o_im, DW);
          cnt       <= cnt + 1'b1;
          if (cnt == LOG2N'(N - 1)) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (rst) in_valid |-> in_ready)
    else $error("fft_core: input word while busy");
endmodule
