`timescale 1ns/1ps
// tb_qpsk_mapper: checks all four QPSK points. b0 chooses the sign of I,
// b1 the sign of Q, a 1 gives +A and a 0 gives -A with A = 5793
// (sqrt(2)/2 in Q13), so every point has unit power. The mapper is
// combinational: each input is checked 1 ns after it is applied.
module tb_qpsk_mapper;
  import cofdm_pkg::*;
  logic [1:0] bits;
  cplx_t sym;
  int checks = 0, failures = 0;
  qpsk_mapper dut (.bits, .sym);
  initial begin
    for (int r = 0; r < 3; r++)
      for (int v = 0; v < 4; v++) begin
        int er, ei;
        bits = 2'(v);
        #1;
        er = v[0] ? 5793 : -5793;
        ei = v[1] ? 5793 : -5793;
        checks++;
        if (int'(sym.re) != er || int'(sym.im) != ei) begin
          failures++; $display("bits %b -> %0d %0d", bits, sym.re, sym.im);
        end
        checks++;   // unit power in Q13: re^2 + im^2 close to 8192^2
        if ((int'(sym.re) * int'(sym.re) + int'(sym.im) * int'(sym.im)) / 8192 < 8190 ||
            (int'(sym.re) * int'(sym.re) + int'(sym.im) * int'(sym.im)) / 8192 > 8194) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
