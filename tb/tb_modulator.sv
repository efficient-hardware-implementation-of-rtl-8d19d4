// tb_modulator: feeds the modulator from a model FIFO with random QPSK
// symbols and checks every output sample against a direct inverse DFT of
// the expected sub-carrier vector (data, pilots with their polarity, and
// zeros), including the cyclic prefix. Also checks the start-to-output
// latency and that the 80-sample symbols follow each other without a gap.
module tb_modulator;
  import cofdm_pkg::*;
  localparam int NS = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction

  logic start, busy, fifo_rd, out_valid, out_first, underflow;
  cplx_t fifo_dout, dout;
  logic  fifo_empty;
  logic [15:0] n_syms = 16'(NS);

  modulator dut (.clk, .rst_n, .start, .n_syms, .busy, .fifo_dout, .fifo_empty, .fifo_rd,
                 .out_valid, .out_first, .dout, .underflow);

  cplx_t q [$];
  cplx_t sent [NS*48];
  int rd_ptr = 0;
  assign fifo_empty = (rd_ptr >= q.size());
  assign fifo_dout  = fifo_empty ? cplx_t'('0) : q[rd_ptr];
  always @(posedge clk) if (fifo_rd) rd_ptr <= rd_ptr + 1;

  // expected sub-carrier values, sc -32..31
  real Xr [NS][64], Xi [NS][64];
  int  pol [NS];

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ocount = 0, cyc = 0, t_start = -1, t_first = -1, last_t = -1, gaps = 0, uf = 0;
  always @(posedge clk) begin
    cyc++;
    if (start && t_start < 0) t_start = cyc;
    if (underflow) uf++;
    if (out_valid) begin
      int s, n; real er, ei;
      if (t_first < 0) t_first = cyc;
      if (last_t >= 0 && cyc != last_t + 1) gaps++;
      last_t = cyc;
      s = ocount / 80; n = ocount % 80;
      n = (n < 16) ? n + 48 : n - 16;
      er = 0; ei = 0;
      for (int k = 0; k < 64; k++) begin
        real ph; ph = 2.0 * 3.14159265358979 * (k - 32) * n / 64.0;
        er += Xr[s][k] * $cos(ph) - Xi[s][k] * $sin(ph);
        ei += Xr[s][k] * $sin(ph) + Xi[s][k] * $cos(ph);
      end
      er = er / 64.0; ei = ei / 64.0;
      checks++;
      if (rabs(er - dout.re) > 4.0 || rabs(ei - dout.im) > 4.0) begin
        failures++;
        if (failures < 10) $display("sym %0d n %0d got %0d,%0d exp %f,%f", s, n, dout.re, dout.im, er, ei);
      end
      checks++;
      if (out_first != (ocount % 80 == 0)) failures++;
      ocount++;
    end
  end

  initial begin
    logic [6:0] lf;
    start = 0;
    lf = '1;
    for (int s = 0; s < NS; s++) begin
      int d; d = 0;
      pol[s] = (lf[6] ^ lf[3]) ? -1 : 1;
      lf = {lf[5:0], lf[6] ^ lf[3]};
      for (int k = 0; k < 64; k++) begin
        int sc; sc = k - 32;
        Xr[s][k] = 0; Xi[s][k] = 0;
        if (is_data_sc(sc)) begin
          cplx_t v;
          v.re = $urandom_range(0, 1) ? 16'sd5793 : -16'sd5793;
          v.im = $urandom_range(0, 1) ? 16'sd5793 : -16'sd5793;
          q.push_back(v);
          Xr[s][k] = v.re; Xi[s][k] = v.im;
        end else if (is_pilot_sc(sc))
          Xr[s][k] = 8192.0 * pol[s] * (sc == 21 ? -1 : 1);
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    wait (!busy);
    repeat (300) @(negedge clk);
    checks++;
    if (ocount != NS * 80) begin failures++; $display("samples %0d", ocount); end
    checks++;
    if (t_first - t_start != 170) begin failures++; $display("latency %0d", t_first - t_start); end
    checks++;
    if (gaps != 0 || uf != 0) begin failures++; $display("gaps %0d underflows %0d", gaps, uf); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
