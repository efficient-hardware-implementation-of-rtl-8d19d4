// cordic: pipelined CORDIC with one registered iteration per stage, so its
// latency is ITER cycles (12 by default). Angles are 16-bit, pi = 2^15.
//
// VECTORING = 1: drives y to zero and returns z = atan(y_in / x_in) in
// (-pi/2, pi/2]. A vector with negative x is first turned by pi, which
// leaves y/x unchanged; this gives the arctangent itself rather than the
// four-quadrant angle, which is what the pilot phase estimate needs.
// VECTORING = 0: rotates (x_in, y_in) by any z_in; when |z_in| > pi/2
// the vector is first negated and z_in turned by pi. Both modes scale the vector by the CORDIC gain (about 1.647);
// the receiver divides by a training symbol that went through the same
// rotation, so the gain cancels. tag_in travels alongside the data.
module cordic
  import cofdm_pkg::*;
#(
  parameter int ITER      = 12,
  parameter bit VECTORING = 1'b1,
  parameter int XW        = 18,
  parameter int TAGW      = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  valid_in,
  input  logic signed [XW-1:0]  x_in,
  input  logic signed [XW-1:0]  y_in,
  input  logic signed [15:0]    z_in,
  input  logic [TAGW-1:0]       tag_in,
  output logic                  valid_out,
  output logic signed [XW-1:0]  x_out,
  output logic signed [XW-1:0]  y_out,
  output logic signed [15:0]    z_out,
  output logic [TAGW-1:0]       tag_out
);
  function automatic logic [16*ITER-1:0] atans();
    logic [16*ITER-1:0] t;
    for (int i = 0; i < ITER; i++) t[16*i +: 16] = 16'(atan_tab(i));
    return t;
  endfunction
  localparam logic [16*ITER-1:0] ATAN = atans();

  logic signed [XW-1:0] xs [ITER+1], ys [ITER+1];
  logic signed [15:0]   zs [ITER+1];
  logic [ITER:0]        vs;
  logic [TAGW-1:0]      ts [ITER+1];

  always_comb begin
    xs[0] = x_in; ys[0] = y_in; zs[0] = z_in; vs[0] = valid_in; ts[0] = tag_in;
    if (VECTORING) begin
      zs[0] = '0;
      if (x_in < 0) begin xs[0] = -x_in; ys[0] = -y_in; end
    end else if (z_in > 16'sd16384 || z_in < -16'sd16384) begin
      xs[0] = -x_in; ys[0] = -y_in; zs[0] = {~z_in[15], z_in[14:0]};
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_it
    logic dir;   // 1: turn counter-clockwise
    assign dir = VECTORING ? (ys[i] < 0) : (zs[i] >= 0);
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        xs[i+1] <= '0; ys[i+1] <= '0; zs[i+1] <= '0; vs[i+1] <= 1'b0; ts[i+1] <= '0;
      end else begin
        vs[i+1] <= vs[i];
        ts[i+1] <= ts[i];
        if (dir) begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - ATAN[16*i +: 16];
        end else begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + ATAN[16*i +: 16];
        end
      end
  end

  assign valid_out = vs[ITER];
  assign x_out     = xs[ITER];
  assign y_out     = ys[ITER];
  assign z_out     = zs[ITER];
  assign tag_out   = ts[ITER];
endmodule
