`timescale 1ns/1ps
// tb_conv_encoder: checks the rate-1/2, constraint-length-7 encoder
// (generators 133 and 171 octal) against a model that keeps the input
// history in a plain array and applies the generator taps by delay:
// g0 = 1011011 (delays 0,2,3,5,6), g1 = 1111001 (delays 0,1,2,3,6).
// 600 random input bits are applied with a random enable; the outputs are
// combinational in the current bit, so each is checked in the cycle the
// bit is presented, and the state only moves when en is high.
module tb_conv_encoder;
  logic clk = 0, rst_n = 0, en = 0, bit_in = 0, a, b;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  conv_encoder dut (.clk, .rst_n, .en, .bit_in, .a, .b);

  bit hist [7];   // hist[d] = input d steps ago, hist[0] = current
  initial begin
    for (int i = 0; i < 7; i++) hist[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      bit ea, eb;
      @(negedge clk);
      bit_in = 1'($urandom_range(0, 1));
      en = ($urandom_range(0, 3) != 0);
      hist[0] = bit_in;
      ea = hist[0] ^ hist[2] ^ hist[3] ^ hist[5] ^ hist[6];
      eb = hist[0] ^ hist[1] ^ hist[2] ^ hist[3] ^ hist[6];
      #1;
      checks++;
      if (a !== ea || b !== eb) begin
        failures++;
        if (failures < 5) $display("step %0d: got %b%b expected %b%b", n, a, b, ea, eb);
      end
      if (en) for (int d = 6; d > 0; d--) hist[d] = hist[d-1];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
