`timescale 1ns/1ps
// tb_interleaver: checks the block interleaver and its inverse.
// A forward instance (INVERSE = 0) is fed 5 frames of 96 random bits, two
// per cycle with random idle cycles; its output is compared with the model
// out[i(k)] = in[k], i(k) = 6 * (k mod 16) + floor(k / 16), and is fed
// into an inverse instance whose output must give back the input bits.
// Timing: each frame is read out as 48 pairs on consecutive cycles,
// starting the cycle after its last pair was written, with frame_start on
// the first pair.
module tb_interleaver;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [1:0] wr_bits = 0, f_bits, i_bits;
  logic f_valid, f_start, i_valid, i_start;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  interleaver #(.N_CBPS(96), .INVERSE(1'b0)) u_f (
    .clk, .rst_n, .wr_en, .wr_bits, .rd_valid(f_valid), .rd_bits(f_bits), .frame_start(f_start));
  interleaver #(.N_CBPS(96), .INVERSE(1'b1)) u_i (
    .clk, .rst_n, .wr_en(f_valid), .wr_bits(f_bits), .rd_valid(i_valid), .rd_bits(i_bits),
    .frame_start(i_start));

  localparam int NF = 5;
  bit src [NF][96];
  int last_wr [NF];
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    for (int f = 0; f < NF; f++) for (int k = 0; k < 96; k++) src[f][k] = 1'($urandom_range(0, 1));
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      for (int n = 0; n < 48; n++) begin
        while ($urandom_range(0, 3) == 0) begin wr_en = 0; @(negedge clk); end
        wr_en = 1; wr_bits = {src[f][2*n+1], src[f][2*n]};
        if (n == 47) last_wr[f] = cyc;
        @(negedge clk);
      end
      wr_en = 0;
      repeat (50) @(negedge clk);   // a frame must be read before the next one completes
    end
  end

  // forward output check
  int fo = 0, io = 0, frun = 0;
  always @(posedge clk) if (rst_n) begin
    if (f_valid) begin
      int f, j;
      f = fo / 48; j = 2 * (fo % 48);
      for (int b = 0; b < 2; b++) begin
        int k;
        k = 0;
        for (int kk = 0; kk < 96; kk++) if (6 * (kk % 16) + kk / 16 == j + b) k = kk;
        checks++;
        if (f_bits[b] != src[f][k]) failures++;
      end
      checks++;
      if (f_start != (fo % 48 == 0)) failures++;
      if (fo % 48 == 0) begin
        checks++;
        if (cyc != last_wr[f] + 2) begin failures++; $display("frame %0d read starts at +%0d", f, cyc - last_wr[f]); end
      end
      if (fo % 48 != 0) begin checks++; if (!frun) failures++; end   // no gap inside a frame
      fo++;
    end
    frun <= f_valid;
    if (i_valid) begin
      int f, j;
      f = io / 48; j = 2 * (io % 48);
      checks++;
      if (i_bits != {src[f][j+1], src[f][j]}) failures++;
      checks++;
      if (i_start != (io % 48 == 0)) failures++;
      io++;
    end
  end

  initial begin
    repeat (1500) @(posedge clk);
    checks++;
    if (fo != NF * 48 || io != NF * 48) begin failures++; $display("pairs out %0d %0d", fo, io); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
