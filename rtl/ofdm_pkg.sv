// ofdm_pkg - constants, types and fixed-point helpers shared by the OFDM/DMT
// baseband controller.
//
// The system runs from one 250 MHz clock (T_clk = 4 ns). Every slower rate
// (input bits every 20 ns, IFFT words every 16/8 ns, DAC samples every 56/28 ns)
// is made with clock enables derived from counters of this clock.
//
// Numbers: 16 subcarriers, 14 of them carrying 16-QAM (4 bits each), 56 bits
// per OFDM symbol, guard interval of a quarter of the FFT length, samples in the
// signed s5Q3 format (1 sign, 5 integer, 3 fractional bits = 9 bits). The
// subcarrier count, 16-QAM, the s5Q3 word and the rates follow the text the design
// is built from. Which FFT bins stay unused (0 = DC and 8) is this design's reading
// of the subcarrier plan. Values are quantised with convergent rounding
// (round half to even) and saturate on overflow, as the design requires.
package ofdm_pkg;

  // ---- system numbers --------------------------------------------------------
  localparam int unsigned N_SC        = 16;  // subcarriers (= OFDM FFT length)
  localparam int unsigned N_USED      = 14;  // subcarriers carrying data
  localparam int unsigned BITS_PER_SYM = 4;  // 16-QAM
  localparam int unsigned BITS_PER_FRAME = N_USED * BITS_PER_SYM;  // 56
  localparam int unsigned FRAME_CLKS  = 280; // 1120 ns OFDM symbol incl. GI / 4 ns
  localparam int unsigned BIT_DIV     = 5;   // T_b = 20 ns / T_clk = 4 ns

  // Unused subcarriers, given as FFT bin index (natural order, bin 0 = DC).
  localparam int unsigned UNUSED_BIN_A = 0;
  localparam int unsigned UNUSED_BIN_B = 8;

  function automatic bit is_used_bin(int unsigned k);
    return (k != UNUSED_BIN_A) && (k != UNUSED_BIN_B);
  endfunction

  // Bin that carries the c-th group of 4 bits (c = 0..13): bins 1..7, 9..15.
  function automatic int unsigned used_bin(int unsigned c);
    return (c < 7) ? c + 1 : c + 2;
  endfunction

  // Mode dependent sizes.
  function automatic int unsigned fft_len(bit dmt);
    return dmt ? 2 * N_SC : N_SC;
  endfunction
  function automatic int unsigned gi_len(bit dmt);
    return fft_len(dmt) / 4;
  endfunction
  // DAC/ADC sample period in clock cycles: 56 ns (OFDM) or 28 ns (DMT).
  function automatic int unsigned chan_down_fact(bit dmt);
    return dmt ? 7 : 14;
  endfunction
  // Word period at the IFFT input in clock cycles: 16 ns (OFDM) or 8 ns (DMT).
  function automatic int unsigned ifft_period(bit dmt);
    return dmt ? 2 : 4;
  endfunction

  // ---- fixed point helpers ------------------------------------------------------
  // Wide signed container used by the helpers below; all datapath words fit.
  typedef logic signed [47:0] wide_t;

  // x / 2**sh with convergent rounding (ties go to the even result).
  function automatic wide_t rshift_conv(wide_t x, int unsigned sh);
    wide_t q, r, half;
    if (sh == 0) return x;
    q    = x >>> sh;
    r    = x - (q <<< sh);                 // remainder, 0 .. 2**sh-1
    half = wide_t'(1) <<< (sh - 1);
    if (r > half || (r == half && q[0]))
      q = q + 1;
    return q;
  endfunction

  // Clamp x into the range of a signed w-bit word.
  function automatic wide_t sat(wide_t x, int unsigned w);
    wide_t maxv, minv;
    maxv = (wide_t'(1) <<< (w - 1)) - 1;
    minv = -(wide_t'(1) <<< (w - 1));
    if (x > maxv) return maxv;
    if (x < minv) return minv;
    return x;
  endfunction

  // True when x lies outside the range of a signed w-bit word.
  function automatic bit overflows(wide_t x, int unsigned w);
    return sat(x, w) != x;
  endfunction

  function automatic logic signed [15:0] cos32_quarter(int unsigned m);
    case (m)
      0: return 16'sd16384;
      1: return 16'sd16069;
      2: return 16'sd15137;
      3: return 16'sd13623;
      4: return 16'sd11585;
      5: return 16'sd9102;
      6: return 16'sd6270;
      7: return 16'sd3196;
      default: return 16'sd0;
    endcase
  endfunction

  // cos(2*pi*k/32) in Q1.14 (16384 = 1.0): the twiddle table of the FFT,
  // folded from the first quarter wave.
  function automatic logic signed [15:0] cos32(int unsigned k);
    int unsigned m;
    logic signed [15:0] q;
    m = k % 32;
    if (m > 16) m = 32 - m;                 // cos is even: fold to 0..16
    if (m > 8) begin                        // cos(pi - a) = -cos(a)
      q = cos32_quarter(16 - m);
      return -q;
    end
    return cos32_quarter(m);
  endfunction

  // sin(2*pi*k/32) = cos(2*pi*(k-8)/32)
  function automatic logic signed [15:0] sin32(int unsigned k);
    return cos32((k + 24) % 32);
  endfunction

  // ---- 16-QAM (Gray) ---------------------------------------------------------
  // bits {b3,b2,b1,b0}: b3 b2 choose I, b1 b0 choose Q.
  //   I: 00 -> -3, 01 -> -1, 11 -> +1, 10 -> +3
  //   Q: 00 -> +3, 01 -> +1, 11 -> -1, 10 -> -3
  function automatic logic signed [2:0] qam_level_i(logic [1:0] b);
    case (b)
      2'b00: return -3'sd3;
      2'b01: return -3'sd1;
      2'b11: return 3'sd1;
      default: return 3'sd3;
    endcase
  endfunction
  function automatic logic signed [2:0] qam_level_q(logic [1:0] b);
    case (b)
      2'b00: return 3'sd3;
      2'b01: return 3'sd1;
      2'b11: return -3'sd1;
      default: return -3'sd3;
    endcase
  endfunction

endpackage
