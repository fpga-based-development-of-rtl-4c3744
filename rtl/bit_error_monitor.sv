// bit_error_monitor - on-chip check of the received bit stream.
//
// The transmitted bit (inp_trans) is sampled on every bit strobe (one per
// 20 ns) into a delay line of DELAY bits, the transmission delay of the link.
// At the same strobe the received bit (out_recv) is compared with the delayed
// transmitted bit: diffsig is their XOR and stays high for one bit period on an
// error, for an oscilloscope on an output pin. sent_cnt and err_cnt count the
// compared bits and the errors, so that err_cnt / sent_cnt is the bit error
// ratio; clr sets both counters back to zero. The XOR output follows the design
// text; the counters are a hardware form of its bit error ratio calculation.
// The delay line starts at zero, which matches the all-zero frames the
// transmitter sends before the first data block.
module bit_error_monitor #(
  parameter int unsigned DELAY = 128     // bits, >= 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        bit_stb,
  input  logic        inp_trans,
  input  logic        out_recv,
  input  logic        clr,
  output logic        diffsig,
  output logic [31:0] sent_cnt,
  output logic [31:0] err_cnt
);
  logic [DELAY-1:0] dly;
  logic             d_sent;

  assign d_sent = dly[DELAY-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      dly      <= '0;
      diffsig  <= 1'b0;
      sent_cnt <= '0;
      err_cnt  <= '0;
    end else begin
      if (bit_stb) begin
        dly     <= {dly[DELAY-2:0], inp_trans};
        diffsig <= out_recv ^ d_sent;
      end
      if (clr) begin
        sent_cnt <= '0;
        err_cnt  <= '0;
      end else if (bit_stb) begin
        sent_cnt <= sent_cnt + 1'b1;
        err_cnt  <= err_cnt + ((out_recv ^ d_sent) ? 32'd1 : 32'd0);
      end
    end
  end
endmodule
