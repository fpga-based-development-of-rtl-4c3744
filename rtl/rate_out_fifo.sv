// rate_out_fifo - output FIFO with its control FSM: restores a fixed word rate.
//
// Words arrive in bursts at the system clock (push_en) and leave one every
// DOWN_FACT cycles: every 56 ns (14 cycles) for OFDM samples and every 28 ns
// (7 cycles) for DMT samples going to the DAC, every 20 ns (5 cycles) for the
// received bits. The Moore FSM registers the FIFO controls:
//   state 0: push 1 pop 0    state 1: push 1 pop 1
//   state 2: push 0 pop 1    state 3: push 0 pop 0
// The incoming word is registered together with the push state. popEn is set
// once the first word has been written; from then on loopCount runs through
// DOWN_FACT cycles and a pop is made each time it wraps. The popped word is held
// on out_data until the next pop; out_stb pulses with each new word. A pop on an
// empty FIFO outputs 0 and pulses underflow. Reset clears everything to 0.
// The FSM, its states and the rates follow the design text; the registered input
// word and the underflow behaviour are this design's choices.
module rate_out_fifo #(
  parameter int unsigned WIDTH     = 19,
  parameter int unsigned DEPTH     = 64,
  parameter int unsigned DOWN_FACT = 14
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic [WIDTH-1:0] out_data,
  output logic             out_stb,
  output logic             underflow,
  output logic [$clog2(DEPTH):0] level
);
  typedef enum logic [1:0] {
    S_PUSH     = 2'd0,
    S_PUSH_POP = 2'd1,
    S_POP      = 2'd2,
    S_IDLE     = 2'd3
  } state_t;

  state_t state, state_n;
  logic   push, pop, empty;
  logic   pop_en;
  logic [$clog2(DOWN_FACT)-1:0] loop_count;
  logic [WIDTH-1:0] wr_q, rd_data;
  logic   con_pop;

  assign push = (state == S_PUSH) || (state == S_PUSH_POP);
  assign pop  = ((state == S_POP) || (state == S_PUSH_POP)) && !empty;

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst,
    .push, .wr_data(wr_q),
    .pop,  .rd_data,
    .empty, .full(), .count(level)
  );

  // conPop: next cycle is a pop slot
  assign con_pop = (pop_en || push) && (loop_count == '0);

  always_comb begin
    unique case ({push_en, con_pop})
      2'b10:   state_n = S_PUSH;
      2'b11:   state_n = S_PUSH_POP;
      2'b01:   state_n = S_POP;
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      pop_en     <= 1'b0;
      loop_count <= '0;
      wr_q       <= '0;
      out_data   <= '0;
      out_stb    <= 1'b0;
      underflow  <= 1'b0;
    end else begin
      state     <= state_n;
      wr_q      <= wr_data;
      out_stb   <= 1'b0;
      underflow <= 1'b0;
      if (push) pop_en <= 1'b1;
      if (pop_en || push)
        loop_count <= (loop_count == DOWN_FACT - 1) ? '0 : loop_count + 1'b1;
      if (state == S_POP || state == S_PUSH_POP) begin
        out_stb <= 1'b1;
        if (empty) begin
          out_data  <= '0;
          underflow <= 1'b1;
        end else begin
          out_data  <= rd_data;
        end
      end
    end
  end
endmodule
