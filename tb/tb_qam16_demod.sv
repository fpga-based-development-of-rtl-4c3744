// tb_qam16_demod - decisions over the whole input range against a reference
// that picks the nearest level (ties at 0 go positive, ties at +-2 go to the
// inner level +-1), then Gray-maps it; plus the ideal points round trip.
//
// The thresholds 0 and +-2 follow the design; the tie rule is read from its
// decisions.
`timescale 1ns/1ps
module tb_qam16_demod;
  logic signed [8:0] i_in, q_in;
  logic [3:0] bits;
  qam16_demod dut (.i_in, .q_in, .bits);
  int checks = 0, failures = 0;

  function automatic int nearest(int v8);      // v8 in 1/8 units
    if (v8 >= 0) return (v8 > 16) ? 3 : 1;
    return (v8 > -16) ? -1 : -3;
  endfunction
  function automatic logic [1:0] gray_i(int l);
    case (l) -3: return 2'b00; -1: return 2'b01; 1: return 2'b11; default: return 2'b10; endcase
  endfunction
  function automatic logic [1:0] gray_q(int l);
    case (l) 3: return 2'b00; 1: return 2'b01; -1: return 2'b11; default: return 2'b10; endcase
  endfunction

  initial begin
    for (int i = -256; i < 256; i += 3) begin
      for (int q = -256; q < 256; q += 7) begin
        i_in = 9'(i); q_in = 9'(q);
        #1;
        checks++;
        if (bits != {gray_i(nearest(i)), gray_q(nearest(q))}) begin
          failures++;
          if (failures < 10) $display("FAIL: I=%0d Q=%0d -> %b", i, q, bits);
        end
      end
    end
    // exact thresholds
    i_in = 16; q_in = 16; #1; checks++; if (bits != 4'b1101) begin failures++; $display("FAIL: +2/+2"); end
    i_in = -16; q_in = -16; #1; checks++; if (bits != 4'b0010) begin failures++; $display("FAIL: -2/-2"); end
    i_in = 0; q_in = 0; #1; checks++; if (bits != 4'b1101) begin failures++; $display("FAIL: 0/0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
