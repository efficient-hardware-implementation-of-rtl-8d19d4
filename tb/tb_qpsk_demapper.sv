`timescale 1ns/1ps
// tb_qpsk_demapper: checks the hard QPSK decision on 2000 random points
// and on the axes: b0 = 1 when I >= 0, b1 = 1 when Q >= 0 (zero counts as
// positive, the choice that makes the demapper the exact inverse of the
// mapper's +-A points). Combinational: checked 1 ns after each input.
module tb_qpsk_demapper;
  import cofdm_pkg::*;
  cplx_t sym;
  logic [1:0] bits;
  int checks = 0, failures = 0;
  qpsk_demapper dut (.sym, .bits);
  task automatic try(int re, int im);
    sym.re = 16'(re); sym.im = 16'(im);
    #1;
    checks++;
    if (bits[0] != (re >= 0) || bits[1] != (im >= 0)) begin
      failures++; $display("(%0d,%0d) -> %b", re, im, bits);
    end
  endtask
  initial begin
    try(0, 0); try(-1, 0); try(0, -1); try(32767, -32768); try(-32768, 32767);
    try(5793, 5793); try(-5793, 5793); try(5793, -5793); try(-5793, -5793);
    for (int n = 0; n < 2000; n++)
      try(int'($urandom_range(0, 65535)) - 32768, int'($urandom_range(0, 65535)) - 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
