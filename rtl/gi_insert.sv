// gi_insert - guard interval insertion after the IFFT (Moore FSM).
//
// One IFFT frame of N samples enters on in_valid (one word per cycle or slower).
// Every sample is stored in a frame buffer. The last N_GI = N/4 samples are also
// sent straight to the output as they arrive: they form the cyclic guard
// interval. After the last input sample the FSM replays the stored frame
// s(0) .. s(N-1). The output sequence is therefore
//   s(N-N_GI) .. s(N-1), s(0) .. s(N-1)
// i.e. N + N/4 words: 20 from 16 in OFDM mode and 40 from 32 in DMT mode, which
// keeps the bandwidth efficiency at 0.8. out_valid (the design's pop) marks each
// output word, out_first the first guard sample of a frame. Outputs are registered.
// The sequence follows the design text; starting on the first input word instead
// of a separate frame-enable signal is this design's choice.
module gi_insert #(
  parameter int unsigned LOG2N = 4,
  parameter int unsigned DW    = 9
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 out_valid,
  output logic                 out_first,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im,
  output logic                 busy
);
  localparam int unsigned N   = 1 << LOG2N;
  localparam int unsigned NGI = N / 4;

  typedef enum logic {S_CAPTURE, S_REPLAY} state_t;
  state_t state;

  logic signed [DW-1:0] buf_re [N];
  logic signed [DW-1:0] buf_im [N];
  logic [LOG2N-1:0]     cnt;

  assign busy = (state == S_REPLAY);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_CAPTURE;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      for (int k = 0; k < N; k++) begin
        buf_re[k] <= '0;
        buf_im[k] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      unique case (state)
        S_CAPTURE: if (in_valid) begin
          buf_re[cnt] <= in_re;
          buf_im[cnt] <= in_im;
          if (cnt >= LOG2N'(N - NGI)) begin      // guard samples go out at once
            out_valid <= 1'b1;
            out_first <= (cnt == LOG2N'(N - NGI));
            out_re    <= in_re;
            out_im    <= in_im;
          end
          cnt <= cnt + 1'b1;
          if (cnt == LOG2N'(N - 1)) state <= S_REPLAY;
        end
        S_REPLAY: begin
          out_valid <= 1'b1;
          out_re    <= buf_re[cnt];
          out_im    <= buf_im[cnt];
          cnt       <= cnt + 1'b1;
          if (cnt == LOG2N'(N - 1)) state <= S_CAPTURE;
        end
        default: state <= S_CAPTURE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (rst) in_valid |-> state == S_CAPTURE)
    else $error("gi_insert: input word during replay");
endmodule
