// tb_delay_line: self-checking test of the delay-line model: for a set of
// tap selections, a pulse's rising and falling edges must both come out
// sel x 200 ps later, with the pulse width unchanged.
`timescale 1ns / 1ps
module tb_delay_line;
  logic din = 0;
  logic [7:0] sel = 0;
  logic dout;

  delay_line dut (.din, .sel, .dout);

  int checks = 0, failures = 0;
  realtime t_in_r, t_in_f, t_out_r, t_out_f;

  always @(posedge dout) t_out_r = $realtime;
  always @(negedge dout) t_out_f = $realtime;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10;
    for (int k = 0; k < 40; k++) begin
      int s;
      real exp;
      s = (k < 4) ? k : (k == 4) ? 255 : $urandom_range(0, 255);
      sel = 8'(s);
      exp = s * 0.2;
      #10;
      t_in_r = $realtime; din = 1;
      #(55 + k);  // pulses longer than the longest delay (51 ns)
      t_in_f = $realtime; din = 0;
      #80;
      checks++;
      if ((t_out_r - t_in_r) < exp - 0.001 || (t_out_r - t_in_r) > exp + 0.001) begin
        failures++;
        $display("FAIL sel=%0d rise delay %0t expected %0f", s, t_out_r - t_in_r, exp);
      end
      checks++;
      if ((t_out_f - t_in_f) < exp - 0.001 || (t_out_f - t_in_f) > exp + 0.001) begin
        failures++;
        $display("FAIL sel=%0d fall delay %0t", s, t_out_f - t_in_f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
