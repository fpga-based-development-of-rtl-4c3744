// tx_subc_alloc - transmitter input FIFO and subcarrier allocation FSM (serial
// to parallel).
//
// Payload bits arrive serially, one every BIT_DIV clock cycles (20 ns). The FSM
// pushes each bit once into a FIFO (in the middle of its bit period, counted by
// loopCount). A frame timer produces frameEn once every FRAME_CLKS cycles (one
// OFDM symbol including guard interval, 1120 ns). At frameEn the FSM checks
// whether a whole block of BITS_PER_FRAME = 56 bits is in the FIFO. If so it pops
// the 56 bits on 56 consecutive cycles (sel = 1) and hands bits 4c..4c+3 to the
// c-th used subcarrier, first bit as the MSB of the 4-bit symbol. If not, the
// multiplexer feeds zeros for that frame (sel = 0) so that a complete block,
// covering every subcarrier, still reaches the IFFT at the frame rate. Unused
// subcarriers get zeros as well.
//
// The four Moore states encode the FIFO controls as in the design text:
//   state 0: push 0 pop 0 sel 0     state 1: push 0 pop 1 sel 1
//   state 2: push 1 pop 0 sel 0     state 3: push 1 pop 1 sel 1
// frame_start (the design's Mealy frameStart) pulses one cycle after the last bit
// of a frame has been placed; sym_bits then holds the 16 symbols of the frame
// until the next frame_start. Everything resets to 0 (synchronous reset).
// The FIFO depth and the sampling phase are this design's choices.
module tx_subc_alloc
  import ofdm_pkg::*;
#(
  parameter int unsigned BIT_DIV_P    = BIT_DIV,     // clock cycles per input bit
  parameter int unsigned FRAME_CLKS_P = FRAME_CLKS,  // clock cycles per frame
  parameter int unsigned SAMPLE_PHASE = 2,           // cycle of the bit period to push in
  parameter int unsigned FIFO_DEPTH   = 128
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       inp_trans,                 // serial payload bit
  output logic [3:0] sym_bits [N_SC],           // per FFT bin, natural order
  output logic       frame_start,               // sym_bits complete for a new frame
  output logic       frame_real,                // that frame carried FIFO data
  output logic       push,
  output logic       pop,
  output logic       sel,
  output logic [$clog2(FIFO_DEPTH):0] num       // bits in the FIFO
);
  typedef enum logic [1:0] {
    S_IDLE     = 2'd0,   // push 0, pop 0
    S_POP      = 2'd1,   // push 0, pop 1
    S_PUSH     = 2'd2,   // push 1, pop 0
    S_PUSH_POP = 2'd3    // push 1, pop 1
  } state_t;

  state_t state, state_n;

  logic [$clog2(BIT_DIV_P)-1:0]    loop_count, loop_count_n;
  logic [$clog2(FRAME_CLKS_P)-1:0] frame_timer;
  logic                            frame_en;
  logic                            start, start_n;         // frame fill window
  logic                            real_f, real_n;         // window uses FIFO data
  logic [$clog2(BITS_PER_FRAME)-1:0] bit_count;
  logic [$clog2(N_USED)-1:0]       sub_car;
  logic [1:0]                      sub_car_count;
  logic                            fifo_bit;
  logic                            last_bit;

  // Moore outputs
  assign push = state[1];
  assign pop  = state[0];
  assign sel  = state[0];

  sync_fifo #(.WIDTH(1), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst,
    .push, .wr_data(inp_trans),
    .pop,  .rd_data(fifo_bit),
    .empty(), .full(), .count(num)
  );

  assign frame_en = (frame_timer == '0);
  assign last_bit = start && (bit_count == BITS_PER_FRAME - 1);

  // next-state logic (block A of the ASM chart)
  always_comb begin
    loop_count_n = (loop_count == BIT_DIV_P - 1) ? '0 : loop_count + 1'b1;
    if (frame_en) begin
      start_n = 1'b1;
      real_n  = (num >= BITS_PER_FRAME);
    end else begin
      start_n = start && !last_bit;
      real_n  = real_f;
    end
    state_n = state_t'({loop_count_n == SAMPLE_PHASE[$bits(loop_count)-1:0],   // conPush
                        start_n && real_n});                                   // conPop
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= S_IDLE;
      loop_count    <= '0;
      frame_timer   <= '0;
      start         <= 1'b0;
      real_f        <= 1'b0;
      bit_count     <= '0;
      sub_car       <= '0;
      sub_car_count <= '0;
      frame_start   <= 1'b0;
      frame_real    <= 1'b0;
      for (int k = 0; k < N_SC; k++) sym_bits[k] <= '0;
    end else begin
      state       <= state_n;
      loop_count  <= loop_count_n;
      frame_timer <= (frame_timer == FRAME_CLKS_P - 1) ? '0 : frame_timer + 1'b1;
      start       <= start_n;
      real_f      <= real_n;
      frame_start <= last_bit;
      if (frame_en) begin
        bit_count     <= '0;
        sub_car       <= '0;
        sub_car_count <= '0;
      end else if (start) begin
        // multiplexer: FIFO bit when sel, artificial zero otherwise
        sym_bits[used_bin(32'(sub_car))][3 - sub_car_count] <= sel ? fifo_bit : 1'b0;
        bit_count     <= bit_count + 1'b1;
        sub_car_count <= sub_car_count + 1'b1;
        if (sub_car_count == 2'd3) sub_car <= sub_car + 1'b1;
        if (last_bit) frame_real <= real_f;
      end
    end
  end

  // pop only inside a fill window, and only when data was there at frameEn
  assert property (@(posedge clk) disable iff (rst) pop |-> start)
    else $error("tx_subc_alloc: pop outside the fill window");
endmodule
