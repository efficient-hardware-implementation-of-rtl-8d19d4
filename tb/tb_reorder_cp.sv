`timescale 1ns/1ps
// tb_reorder_cp: checks the output buffer of the FFT. Two instances: the
// default (CP = 16, no sign change) and the receiver's (CP = 0) with
// ALT_SIGN = 1. Five frames of 64 random samples are written in
// bit-reversed order (in_idx = bit-reversed count) with in_tag high,
// followed by one untagged frame that must not be stored. Each frame must
// come out in natural order, preceded by its last CP samples, the odd
// samples negated when ALT_SIGN is set, out_first on the first output and
// out_k the sample index. Timing: output starts two cycles after the
// frame's last sample was written (a bank swap, then the registered read)
// and runs 64 + CP cycles without a gap;
// frames are written one per 80 cycles.
module tb_reorder_cp;
  import cofdm_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_tag = 0;
  cplx_t din = '0;
  logic [5:0] in_idx = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  v0, f0, v1, f1;
  cplx_t d0, d1;
  logic [5:0] k0, k1;
  reorder_cp dut (.clk, .rst_n, .in_valid, .in_tag, .din, .in_idx,
                  .out_valid(v0), .out_first(f0), .dout(d0), .out_k(k0));
  reorder_cp #(.CP(0), .ALT_SIGN(1'b1)) dut2 (.clk, .rst_n, .in_valid, .in_tag, .din, .in_idx,
                  .out_valid(v1), .out_first(f1), .dout(d1), .out_k(k1));

  localparam int NF = 5;
  cplx_t frm [NF][64];
  int last_wr [NF];
  int cyc = 0;
  always @(posedge clk) cyc++;

  function automatic logic [5:0] br(logic [5:0] v);
    return {v[0], v[1], v[2], v[3], v[4], v[5]};
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f <= NF; f++) begin
      for (int n = 0; n < 64; n++) begin
        in_valid = 1; in_tag = (f < NF); in_idx = br(6'(n));
        din.re = 16'($urandom); din.im = 16'($urandom);
        if (f < NF) frm[f][br(6'(n))] = din;
        if (n == 63 && f < NF) last_wr[f] = cyc;
        @(negedge clk);
      end
      in_valid = 0;
      repeat (16) @(negedge clk);
    end
  end

  int n0 = 0, n1 = 0, p0 = 0;
  always @(posedge clk) if (rst_n) begin
    if (v0) begin
      int f, j, k;
      f = n0 / 80; j = n0 % 80; k = (j < 16) ? 48 + j : j - 16;
      checks++;
      if (d0 != frm[f][k] || int'(k0) != k || f0 != (j == 0)) begin
        failures++;
        if (failures < 6) $display("cp out %0d: k %0d", n0, k0);
      end
      if (j == 0) begin checks++; if (cyc != last_wr[f] + 3) begin failures++; $display("frame %0d at +%0d", f, cyc - last_wr[f]); end end
      else begin checks++; if (!p0) failures++; end
      n0++;
    end
    p0 <= v0;
    if (v1) begin
      int f, k;
      cplx_t e;
      f = n1 / 64; k = n1 % 64;
      e = frm[f][k];
      if (k % 2 == 1) begin e.re = -e.re; e.im = -e.im; end
      checks++;
      if (d1 != e || int'(k1) != k || f1 != (k == 0)) begin
        failures++;
        if (failures < 6) $display("alt out %0d", n1);
      end
      n1++;
    end
  end

  initial begin
    repeat ((NF + 1) * 80 + 200) @(posedge clk);
    checks++;
    if (n0 != NF * 80 || n1 != NF * 64) begin failures++; $display("outputs %0d %0d", n0, n1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
