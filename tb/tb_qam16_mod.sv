// tb_qam16_mod - all 16 words against the Gray constellation written out by
// hand (I from bits 3:2, Q from bits 1:0), in s5Q3.
//
// The Gray levels are this implementation's reading, chosen to match the
// demodulator's decisions.
`timescale 1ns/1ps
module tb_qam16_mod;
  logic [3:0] bits;
  logic signed [8:0] i_out, q_out;
  qam16_mod dut (.bits, .i_out, .q_out);
  int checks = 0, failures = 0;
  // expected levels: index = bit pair
  int lev_i [4] = '{-3, -1, 3, 1};     // 00 01 10 11
  int lev_q [4] = '{3, 1, -3, -1};
  initial begin
    for (int w = 0; w < 16; w++) begin
      bits = 4'(w);
      #1;
      checks++;
      if (i_out != lev_i[w >> 2] * 8 || q_out != lev_q[w & 3] * 8) begin
        failures++;
        $display("FAIL: word %b -> %0d %0d", bits, i_out, q_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
