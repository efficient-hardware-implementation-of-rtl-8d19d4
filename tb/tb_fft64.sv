// tb_fft64: checks the pipelined FFT against a direct DFT computed in the
// testbench. Random frames (and a fixed impulse frame) go through the
// forward transform with the first two stages scaled (the receiver's
// setting) and through the inverse transform with every stage scaled (the
// transmitter's setting); every bin must be within a small rounding error
// of the exact result. Also checks the 71-advance latency.
module tb_fft64;
  import cofdm_pkg::*;
  localparam int NF = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  in_valid, in_tag;
  cplx_t din;
  logic  ov_f, ot_f, ov_i, ot_i;
  cplx_t do_f, do_i;
  logic [5:0] ix_f, ix_i;

  fft64 #(.INVERSE(1'b0), .SCALE_MASK(6'b000011)) dut_f (.clk, .rst_n, .in_valid, .in_tag, .din,
    .out_valid(ov_f), .out_tag(ot_f), .dout(do_f), .out_idx(ix_f));
  fft64 #(.INVERSE(1'b1), .SCALE_MASK(6'b111111)) dut_i (.clk, .rst_n, .in_valid, .in_tag, .din,
    .out_valid(ov_i), .out_tag(ot_i), .dout(do_i), .out_idx(ix_i));

  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction
  real xr [NF][64], xi [NF][64];
  int  cyc, first_out, first_in = -1;

  function automatic void dft(int f, int k, bit inv, output real yr, output real yi);
    yr = 0; yi = 0;
    for (int n = 0; n < 64; n++) begin
      real ph; ph = (inv ? 2.0 : -2.0) * 3.14159265358979 * k * n / 64.0;
      yr += xr[f][n] * $cos(ph) - xi[f][n] * $sin(ph);
      yi += xr[f][n] * $sin(ph) + xi[f][n] * $cos(ph);
    end
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int outf_cnt = 0, outi_cnt = 0;
  always @(posedge clk) if (rst_n) begin
    real er, ei, s;
    int f;
    cyc++;
    if (in_valid && in_tag && first_in < 0) first_in = cyc;
    if (ov_f && ot_f) begin
      f = outf_cnt / 64;
      dft(f, ix_f, 1'b0, er, ei);
      er = er / 4.0; ei = ei / 4.0;
      checks++;
      if (rabs(er - do_f.re) > 12.0 || rabs(ei - do_f.im) > 12.0) begin
        failures++;
        if (failures < 10) $display("FFT frame %0d bin %0d got %0d,%0d exp %f,%f", f, ix_f, do_f.re, do_f.im, er, ei);
      end
      if (outf_cnt == 0) first_out = cyc;
      outf_cnt++;
    end
    if (ov_i && ot_i) begin
      f = outi_cnt / 64;
      dft(f, ix_i, 1'b1, er, ei);
      er = er / 64.0; ei = ei / 64.0;
      checks++;
      if (rabs(er - do_i.re) > 3.0 || rabs(ei - do_i.im) > 3.0) begin
        failures++;
        if (failures < 10) $display("IFFT frame %0d bin %0d got %0d,%0d exp %f,%f", f, ix_i, do_i.re, do_i.im, er, ei);
      end
      outi_cnt++;
    end
  end

  initial begin
    in_valid = 0; in_tag = 0; din = '0; cyc = 0;
    for (int f = 0; f < NF; f++)
      for (int n = 0; n < 64; n++) begin
        if (f == 0) begin xr[f][n] = (n == 3) ? 4000.0 : 0.0; xi[f][n] = 0.0; end
        else begin
          xr[f][n] = real'($signed($urandom_range(0, 6000)) - 3000);
          xi[f][n] = real'($signed($urandom_range(0, 6000)) - 3000);
        end
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int f = 0; f < NF + 2; f++) begin
      for (int n = 0; n < 64; n++) begin
        @(negedge clk);
        in_valid = 1; in_tag = (f < NF);
        din.re = (f < NF) ? 16'($rtoi(xr[f][n])) : '0;
        din.im = (f < NF) ? 16'($rtoi(xi[f][n])) : '0;
      end
      // an idle gap between frames: the pipeline must simply stall
      for (int i = 0; i < f; i++) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (outf_cnt != NF * 64 || outi_cnt != NF * 64) begin
      failures++; $display("output count %0d %0d", outf_cnt, outi_cnt);
    end
    // the first result leaves 71 advances after the first sample goes in
    checks++;
    if (first_out - first_in != 72) begin failures++; $display("latency: %0d", first_out - first_in); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
