// tb_ofdm_ber - bit error ratio of the link over a noisy channel, for the
// mode and sample-word combinations of the design's precision evaluation.
//
// Seven links (ber_link) run side by side, each with its own ofdm_top, noise
// source and error counters: OFDM and DMT, each with the 9-bit s5Q3 word
// (the default), the 16-bit s8Q7 word and the 16-bit s12Q3 word, and DMT with
// the 10-bit s6Q3 word recommended for that mode, which is held against the
// double-precision reference values since it has no measurement of its own. Each link
// sends 209460 bits at 18 dB and again at 16 dB SNR, and its measured error
// ratio must lie within a factor of two of the reference value for that
// combination. The combinations, SNR points, bit count and reference values
// follow the design's evaluation; the tolerance is this testbench's own. The
// first link is ofdm_top at its default parameters. A watchdog ends the run
// with a failure if the links have not finished after 6 million cycles.
`timescale 1ns/1ps
module tb_ofdm_ber;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  localparam int NL = 7;
  logic done [NL];
  int   chk  [NL];
  int   fl   [NL];

  ber_link #(.DMT(0), .DW(9),  .FRAC(3), .REF_A(1.58e-3), .REF_B(7.8e-3))  u_ofdm_s5q3
    (.clk, .rst, .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  ber_link #(.DMT(0), .DW(16), .FRAC(7), .REF_A(1.04e-3), .REF_B(6.49e-3)) u_ofdm_s8q7
    (.clk, .rst, .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  ber_link #(.DMT(0), .DW(16), .FRAC(3), .REF_A(1.57e-3), .REF_B(7.8e-3))  u_ofdm_s12q3
    (.clk, .rst, .done(done[2]), .checks(chk[2]), .failures(fl[2]));
  ber_link #(.DMT(1), .DW(9),  .FRAC(3), .REF_A(1.21e-2), .REF_B(2.31e-2)) u_dmt_s5q3
    (.clk, .rst, .done(done[3]), .checks(chk[3]), .failures(fl[3]));
  ber_link #(.DMT(1), .DW(16), .FRAC(7), .REF_A(1.07e-3), .REF_B(6.6e-3))  u_dmt_s8q7
    (.clk, .rst, .done(done[4]), .checks(chk[4]), .failures(fl[4]));
  ber_link #(.DMT(1), .DW(16), .FRAC(3), .REF_A(1.65e-3), .REF_B(7.71e-3)) u_dmt_s12q3
    (.clk, .rst, .done(done[5]), .checks(chk[5]), .failures(fl[5]));
  ber_link #(.DMT(1), .DW(10), .FRAC(3), .REF_A(1.04e-3), .REF_B(6.59e-3)) u_dmt_s6q3
    (.clk, .rst, .done(done[6]), .checks(chk[6]), .failures(fl[6]));

  int checks = 0, failures = 0;
  task automatic finish_run();
    for (int i = 0; i < NL; i++) begin
      checks += chk[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (6000000) @(posedge clk);
    checks++; failures++;
    $display("FAIL: watchdog");
    finish_run();
  end

  initial begin
    repeat (5) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5] && done[6]);
    finish_run();
  end
endmodule
