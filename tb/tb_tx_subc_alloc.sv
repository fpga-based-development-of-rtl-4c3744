// tb_tx_subc_alloc - drives a random bit stream at one bit per 5 cycles and
// checks the frames handed to the modulators: the first frame (FIFO not yet
// holding 56 bits) is the artificial all-zero frame, every later frame holds
// the next 56 input bits, 4 per used subcarrier (bins 1..7, 9..15, first bit as
// MSB), unused bins 0 and 8 stay 0, one frame every 280 cycles, pops only in
// 56-cycle windows, and push and pop happen in the same cycle.
//
// The frame rate, the zero frame and the FIFO control states follow the design;
// the bin order and the sampling phase of the input bit are this
// implementation's choices.
`timescale 1ns/1ps
module tb_tx_subc_alloc;
  import ofdm_pkg::*;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  logic inp = 0;
  logic [3:0] sym_bits [N_SC];
  logic frame_start, frame_real, push, pop, sel;
  logic [7:0] num;
  tx_subc_alloc dut (.clk, .rst, .inp_trans(inp), .sym_bits, .frame_start, .frame_real,
                     .push, .pop, .sel, .num);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit ref_q[$];
  int cyc = 0, last_fs = -1, frames = 0, n_pp = 0, pops_in_frame = 0;
  // input stream: a new random bit every 5 cycles, counted from reset release
  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      if (cyc % 5 == 4) begin
        inp <= 1'($urandom);
      end
      if (push && pop) n_pp++;
      if (pop) pops_in_frame++;
    end
  end
  // reference: record every bit as it becomes valid
  always @(posedge clk) if (!rst && cyc % 5 == 2) ref_q.push_back(inp);

  initial begin
    inp = 1'($urandom);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    while (frames < 12) begin
      @(posedge clk);
      if (frame_start) begin
        logic [3:0] exp_bits [N_SC];
        for (int k = 0; k < N_SC; k++) exp_bits[k] = '0;
        if (last_fs >= 0) check(cyc - last_fs == FRAME_CLKS, $sformatf("frame period %0d", cyc - last_fs));
        last_fs = cyc;
        if (frames == 0) begin
          check(frame_real == 0, "first frame is artificial");
          check(pops_in_frame == 0, "no pops for the artificial frame");
        end else begin
          check(frame_real == 1, $sformatf("frame %0d carries data", frames));
          check(pops_in_frame == BITS_PER_FRAME, $sformatf("56 pops (got %0d)", pops_in_frame));
          for (int c = 0; c < N_USED; c++)
            for (int b = 3; b >= 0; b--) exp_bits[used_bin(c)][b] = ref_q.pop_front();
        end
        pops_in_frame = 0;
        for (int k = 0; k < N_SC; k++)
          check(sym_bits[k] == exp_bits[k], $sformatf("frame %0d bin %0d: %h exp %h", frames, k, sym_bits[k], exp_bits[k]));
        frames++;
      end
    end
    check(n_pp > 0, "push and pop in the same cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
