// sync_fifo - single-clock first-word-fall-through FIFO.
//
// The buffers in front of and behind the transmitter and receiver use it: data is
// written at one rate and read at another so that the guard interval and the
// block-wise FFT processing can run from one system clock. rd_data always shows
// the oldest word while the FIFO is not empty; a pop removes it at the clock edge.
// Push and pop in the same cycle are allowed (also when full, the pop makes room).
// count is the number of stored words. Pushing when full (without pop) or popping
// when empty is a protocol error caught by the assertions; the write or read is
// then ignored. Storage is a plain array so that synthesis can map it to RAM.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 64    // power of two
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       push,
  input  logic [WIDTH-1:0]           wr_data,
  input  logic                       pop,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH):0]     count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == DEPTH);
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
      count <= count + (do_push ? 1 : 0) - (do_pop ? 1 : 0);
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(pop && empty))
    else $error("sync_fifo: pop while empty");
  assert property (@(posedge clk) disable iff (rst) !(push && full && !pop))
    else $error("sync_fifo: push while full");
endmodule
