`timescale 1ns/1ps
// tb_cordic: checks both CORDIC modes against real arithmetic, with the
// default 12 iterations and 18-bit x/y.
// Vectoring: 600 random vectors of radius 500..20000; z_out must equal
// atan(y/x), the arctangent folded into (-pi/2, pi/2] (a vector with
// negative x gives the angle of its opposite), within 0.25 degree (12
// iterations and the rounding of small vectors).
// Rotation: 600 random vectors and random angles over the whole circle;
// (x_out, y_out) must equal the rotated vector times the CORDIC gain
// 1.6468 within 0.2 % of the radius plus 3 LSB. Inputs arrive one per clock
// with random gaps; every result must appear exactly 12 cycles after its
// input, with its tag.
module tb_cordic;
  logic clk = 0, rst_n = 0, vin = 0;
  logic signed [17:0] xin = 0, yin = 0;
  logic signed [15:0] zin = 0;
  logic [7:0] tin = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic vv, rv;
  logic signed [17:0] vx, vy, rx, ry;
  logic signed [15:0] vz, rz;
  logic [7:0] vt, rt;
  cordic #(.VECTORING(1'b1)) u_v (.clk, .rst_n, .valid_in(vin), .x_in(xin), .y_in(yin), .z_in(zin), .tag_in(tin),
    .valid_out(vv), .x_out(vx), .y_out(vy), .z_out(vz), .tag_out(vt));
  cordic #(.VECTORING(1'b0)) u_r (.clk, .rst_n, .valid_in(vin), .x_in(xin), .y_in(yin), .z_in(zin), .tag_in(tin),
    .valid_out(rv), .x_out(rx), .y_out(ry), .z_out(rz), .tag_out(rt));

  localparam real PI = 3.141592653589793;
  localparam int N = 600;
  real ex [N], ey [N], ez [N];
  int  at [N];
  int  cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      real r, a, z, g;
      while ($urandom_range(0, 3) == 0) begin vin = 0; @(negedge clk); end
      r = 500.0 + $urandom_range(0, 19500);
      a = ($urandom_range(0, 65535) / 65536.0 * 2.0 - 1.0) * PI;
      z = ($urandom_range(0, 65535) / 65536.0 * 2.0 - 1.0) * PI;
      xin = 18'($rtoi(r * $cos(a))); yin = 18'($rtoi(r * $sin(a)));
      zin = 16'($rtoi(z / PI * 32768.0));
      tin = 8'(n);
      g = 1.646760258;
      ex[n] = g * (real'(xin) * $cos(real'(zin) * PI / 32768.0) - real'(yin) * $sin(real'(zin) * PI / 32768.0));
      ey[n] = g * (real'(xin) * $sin(real'(zin) * PI / 32768.0) + real'(yin) * $cos(real'(zin) * PI / 32768.0));
      ez[n] = $atan(real'(yin) / real'(xin));
      at[n] = cyc;
      vin = 1;
      @(negedge clk);
    end
    vin = 0;
  end

  int nv = 0, nr = 0;
  always @(posedge clk) if (rst_n) begin
    if (vv) begin
      real d;
      d = real'(vz) * PI / 32768.0 - ez[nv];
      if (d > PI / 2) d -= PI;
      if (d < -PI / 2) d += PI;
      checks++;
      if (d > 0.25 * PI / 180 || d < -0.25 * PI / 180 || int'(vt) != (nv % 256)) begin
        failures++; if (failures < 6) $display("vectoring %0d: %f", nv, d);
      end
      checks++;
      if (cyc != at[nv] + 13) begin failures++; $display("latency %0d", cyc - at[nv]); end
      nv++;
    end
    if (rv) begin
      real e, rad;
      rad = $sqrt(ex[nr] * ex[nr] + ey[nr] * ey[nr]);
      e = $sqrt((real'(rx) - ex[nr]) ** 2 + (real'(ry) - ey[nr]) ** 2);
      checks++;
      if (e > 0.002 * rad + 3.0) begin
        failures++; if (failures < 6) $display("rotation %0d: error %f of %f", nr, e, rad);
      end
      nr++;
    end
  end

  initial begin
    repeat (N * 2 + 100) @(posedge clk);
    checks++;
    if (nv != N || nr != N) begin failures++; $display("results %0d %0d", nv, nr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
