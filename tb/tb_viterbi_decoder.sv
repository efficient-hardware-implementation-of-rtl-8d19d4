`timescale 1ns/1ps
// tb_viterbi_decoder: checks the hard-decision Viterbi decoder for the
// K = 7, 133/171 code on 12 frames of 48 bits (42 random, 6 zero tail
// bits, so each frame ends in state 0 as the decoder assumes). The coded
// pairs are made here by a reference encoder with the taps applied by
// delay, and up to three coded bits per frame, at least 14 pairs apart,
// are inverted; the decoder must still give back every bit. The first six
// frames arrive one pair per clock back to back (the rate the receiver
// needs), the rest with random idle cycles. Timing: each decoded frame
// comes out as 48 bits on consecutive cycles, and it must start within
// FRAME + 3 cycles of the frame's last input pair.
module tb_viterbi_decoder;
  logic clk = 0, rst_n = 0, in_valid = 0, a = 0, b = 0, out_valid, bit_out;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  viterbi_decoder #(.FRAME(48), .MW(8)) dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .bit_out);

  localparam int NF = 12;
  bit src [NF][48];
  int last_in [NF];
  int cyc = 0, nflip = 0;
  always @(posedge clk) cyc++;

  initial begin
    bit h [7];
    for (int i = 0; i < 7; i++) h[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      int fl [3];
      fl[0] = $urandom_range(0, 5); fl[1] = fl[0] + 14 + $urandom_range(0, 4); fl[2] = fl[1] + 14 + $urandom_range(0, 4);
      for (int n = 0; n < 48; n++) begin
        bit u, ea, eb;
        u = (n < 42) ? 1'($urandom_range(0, 1)) : 1'b0;
        src[f][n] = u;
        h[0] = u;
        ea = h[0] ^ h[2] ^ h[3] ^ h[5] ^ h[6];
        eb = h[0] ^ h[1] ^ h[2] ^ h[3] ^ h[6];
        for (int d = 6; d > 0; d--) h[d] = h[d-1];
        for (int e = 0; e < 3; e++) if (n == fl[e] && (f % 4) != 0) begin
          if (e[0]) ea = !ea; else eb = !eb;
          nflip++;
        end
        if (f >= 6) while ($urandom_range(0, 2) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; a = ea; b = eb;
        if (n == 47) last_in[f] = cyc;
        @(negedge clk);
      end
    end
    in_valid = 0;
  end

  int no = 0, prev_valid = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      int f;
      f = no / 48;
      checks++;
      if (bit_out != src[f][no % 48]) begin
        failures++;
        if (failures < 6) $display("frame %0d bit %0d wrong", f, no % 48);
      end
      if (no % 48 == 0) begin
        checks++;
        if (cyc - last_in[f] > 48 + 3) begin failures++; $display("frame %0d late by %0d", f, cyc - last_in[f]); end
      end else begin
        checks++;
        if (!prev_valid) failures++;
      end
      no++;
    end
    prev_valid <= out_valid;
  end

  initial begin
    repeat (NF * 48 * 3 + 300) @(posedge clk);
    checks++;
    if (no != NF * 48) begin failures++; $display("%0d bits out", no); end
    $display("%0d coded bits inverted", nflip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
