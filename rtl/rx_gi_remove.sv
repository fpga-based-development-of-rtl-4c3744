// rx_gi_remove - receiver input FIFO and guard interval removal FSM.
//
// Samples from the ADC arrive on in_stb, one per 56 ns (OFDM) or 28 ns (DMT);
// in_mark flags the first guard sample of a channel frame. Since the link has no
// synchronisation yet, this marker is the frame timing of the transmitter. From
// the first marker on, every sample is written into the input FIFO together with
// its position in the frame; a frame is complete once its N + N_GI samples are
// stored. Then, as soon as the FFT can take a frame (fft_ready), the FSM pops
// the whole frame on consecutive clock cycles. It has two states:
//   DROP  the first N_GI words (the guard interval) are read and discarded;
//         the output carries zeros,
//   PASS  the next N words go to the FFT with out_valid.
// Collecting the complete frame first lets the FFT work at the system clock
// instead of the sample rate. Registers: state, loopCount (words read in this
// frame) and start (a frame is being read), as in the design text. The FIFO
// depth (two channel frames) and the marker interface are this design's choices.
module rx_gi_remove #(
  parameter int unsigned LOG2N = 4,
  parameter int unsigned DW    = 9,
  parameter int unsigned DEPTH = 128
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_stb,
  input  logic                 in_mark,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  input  logic                 fft_ready,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im,
  output logic                 overflow
);
  localparam int unsigned N    = 1 << LOG2N;
  localparam int unsigned NGI  = N / 4;
  localparam int unsigned NCHN = N + NGI;
  localparam int unsigned PW   = $clog2(NCHN);

  typedef enum logic [1:0] {S_WAIT, S_DROP, S_PASS} state_t;
  state_t state;

  logic            started;
  logic [PW-1:0]   wpos;             // position of the incoming sample
  logic [PW-1:0]   loop_count;
  logic            start;
  logic [3:0]      frames_avail;
  logic            push, pop, full;
  logic            frame_done;
  logic [2*DW-1:0] rd_data;

  assign push = in_stb && (started || in_mark);
  assign frame_done = push && ((in_mark ? '0 : wpos) == PW'(NCHN - 1));
  assign pop  = (state == S_DROP) || (state == S_PASS);

  sync_fifo #(.WIDTH(2 * DW), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst,
    .push(push && !full), .wr_data({in_re, in_im}),
    .pop, .rd_data,
    .empty(), .full, .count()
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      started      <= 1'b0;
      wpos         <= '0;
      state        <= S_WAIT;
      loop_count   <= '0;
      start        <= 1'b0;
      frames_avail <= '0;
      out_valid    <= 1'b0;
      out_re       <= '0;
      out_im       <= '0;
      overflow     <= 1'b0;
    end else begin
      // write side
      if (push) begin
        started  <= 1'b1;
        wpos     <= (in_mark ? '0 : wpos) + 1'b1;
        overflow <= overflow | full;
      end
      // read side
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      unique case (state)
        S_WAIT: if (frames_avail != 0 && fft_ready) begin
          state      <= S_DROP;
          start      <= 1'b1;
          loop_count <= '0;
        end
        S_DROP: begin                              // discard guard samples
          loop_count <= loop_count + 1'b1;
          if (loop_count == PW'(NGI - 1)) state <= S_PASS;
        end
        S_PASS: begin                              // pass the useful part
          out_valid  <= 1'b1;
          out_re     <= rd_data[2*DW-1:DW];
          out_im     <= rd_data[DW-1:0];
          loop_count <= loop_count + 1'b1;
          if (loop_count == PW'(NCHN - 1)) begin
            state <= S_WAIT;
            start <= 1'b0;
          end
        end
        default: state <= S_WAIT;
      endcase
      frames_avail <= frames_avail + (frame_done ? 1'b1 : 1'b0)
                      - ((state == S_WAIT && frames_avail != 0 && fft_ready) ? 1'b1 : 1'b0);
    end
  end

  assert property (@(posedge clk) disable iff (rst) out_valid |-> $past(state == S_PASS))
    else $error("rx_gi_remove: output outside a frame");
endmodule
