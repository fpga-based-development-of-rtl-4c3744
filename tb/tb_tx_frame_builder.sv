// tb_tx_frame_builder - random symbol words, then the serial frame into the
// IFFT is checked word by word against a hand-written Gray map: OFDM instance
// (16 words, one every 4 cycles) and DMT instance (32 words, one every 2
// cycles, bin 16 zero, bin 32-k the conjugate of bin k). Unused bins 0 and 8
// must be 0 although their input word maps to -3+3i.
//
// Rates, zeroed unused bins and the Hermitian DMT frame follow the design;
// bin 16 = 0 is this implementation's reading.
`timescale 1ns/1ps
module tb_tx_frame_builder;
  import ofdm_pkg::*;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  logic [3:0] sym_bits [N_SC];
  logic fs = 0;
  logic v0, l0, v1, l1;
  logic signed [8:0] re0, im0, re1, im1;
  tx_frame_builder #(.DMT(1'b0)) dut_ofdm (.clk, .rst, .sym_bits, .frame_start(fs),
    .out_valid(v0), .out_last(l0), .out_re(re0), .out_im(im0));
  tx_frame_builder #(.DMT(1'b1)) dut_dmt (.clk, .rst, .sym_bits, .frame_start(fs),
    .out_valid(v1), .out_last(l1), .out_re(re1), .out_im(im1));

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

  int li [4] = '{-24, -8, 24, 8};    // I level *8 for bit pairs 00 01 10 11
  int lq [4] = '{24, 8, -24, -8};
  int er [32], ei [32];
  int cnt0, cnt1, cyc, t0 [$], t1 [$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && v0) begin
      check(re0 == er[cnt0] && im0 == ei[cnt0], $sformatf("OFDM word %0d: (%0d,%0d) exp (%0d,%0d)", cnt0, re0, im0, er[cnt0], ei[cnt0]));
      check(l0 == (cnt0 == 15), "OFDM last flag");
      t0.push_back(cyc);
      cnt0 <= cnt0 + 1;
    end
    if (!rst && v1) begin
      int k, er1, ei1;
      k = cnt1;
      if (k < 16) begin er1 = er[k]; ei1 = ei[k]; end
      else if (k == 16) begin er1 = 0; ei1 = 0; end
      else begin er1 = er[32 - k]; ei1 = -ei[32 - k]; end
      check(re1 == er1 && im1 == ei1, $sformatf("DMT word %0d", k));
      check(l1 == (k == 31), "DMT last flag");
      t1.push_back(cyc);
      cnt1 <= cnt1 + 1;
    end
  end

  initial begin
    cyc = 0;
    for (int k = 0; k < N_SC; k++) sym_bits[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 4; f++) begin
      @(negedge clk);
      for (int k = 0; k < N_SC; k++) begin
        sym_bits[k] = 4'($urandom);
        er[k] = (k == 0 || k == 8) ? 0 : li[sym_bits[k][3:2]];
        ei[k] = (k == 0 || k == 8) ? 0 : lq[sym_bits[k][1:0]];
      end
      cnt0 = 0; cnt1 = 0;
      t0.delete(); t1.delete();
      fs = 1;
      @(negedge clk) fs = 0;
      repeat (80) @(negedge clk);
      check(cnt0 == 16, $sformatf("16 OFDM words (got %0d)", cnt0));
      check(cnt1 == 32, $sformatf("32 DMT words (got %0d)", cnt1));
      for (int i = 1; i < t0.size(); i++) check(t0[i] - t0[i-1] == 4, "OFDM word every 4 cycles (16 ns)");
      for (int i = 1; i < t1.size(); i++) check(t1[i] - t1[i-1] == 2, "DMT word every 2 cycles (8 ns)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
