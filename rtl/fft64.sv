// fft64: 64-point pipelined FFT (or IFFT with INVERSE = 1) of the radix-2^2
// single-path delay-feedback type. Three butterfly pairs (feedback delays
// 32/16, 8/4, 2/1) are separated by two twiddle multipliers; inside a pair
// the only factor is the trivial -j of the second butterfly. Every
// butterfly and multiplier output is registered.
//
// Interface: a frame is 64 consecutive in_valid samples in natural order.
// The whole pipeline advances only on in_valid, so a frame's results
// leave while the next frame enters; after the last frame of a burst two
// more frames (zeros) flush it out. Output is in bit-reversed order:
// out_idx is the bin carried by dout. in_tag travels with each sample and
// comes out as out_tag with the results of the frame it entered with.
// Latency is 71 advances from a frame's first input to its first output.
// SCALE_MASK[s] halves the output of butterfly s (0 = first), so with all
// bits set the transform is divided by 64.
module fft64
  import cofdm_pkg::*;
#(
  parameter bit       INVERSE    = 1'b0,
  parameter bit [5:0] SCALE_MASK = 6'b111111
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_tag,
  input  cplx_t      din,
  output logic       out_valid,
  output logic       out_tag,
  output cplx_t      dout,
  output logic [5:0] out_idx
);
  // input offsets of each element along the pipeline, in advances
  localparam int O_S0 = 0;
  localparam int O_S1 = O_S0 + 32 + 1;
  localparam int O_T0 = O_S1 + 16 + 1;
  localparam int O_S2 = O_T0 + 1;
  localparam int O_S3 = O_S2 + 8 + 1;
  localparam int O_T1 = O_S3 + 4 + 1;
  localparam int O_S4 = O_T1 + 1;
  localparam int O_S5 = O_S4 + 2 + 1;
  localparam int LAT  = O_S5 + 1 + 1;   // 71

  logic [5:0] g;  // advance counter, 0 at the first sample of each frame
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        g <= '0;
    else if (in_valid) g <= g + 1'b1;

  cplx_t s0, s1, t0, s2, s3, t1, s4, s5;

  sdf_stage #(.D(32), .JROT(1'b0), .INVERSE(INVERSE), .SCALE(SCALE_MASK[0])) u_s0 (
    .clk, .rst_n, .adv(in_valid), .cnt(g - 6'(O_S0)), .x(din), .y(s0));
  sdf_stage #(.D(16), .JROT(1'b1), .INVERSE(INVERSE), .SCALE(SCALE_MASK[1])) u_s1 (
    .clk, .rst_n, .adv(in_valid), .cnt(g - 6'(O_S1)), .x(s0), .y(s1));
  tw_mult   #(.L(64), .INVERSE(INVERSE)) u_t0 (
    .clk, .rst_n, .adv(in_valid), .cnt(g - 6'(O_T0)), .x(s1), .y(t0));
  sdf_stage #(.D(8),  .JROT(1'b0), .INVERSE(INVERSE), .SCALE(SCALE_MASK[2])) u_s2 (
    .clk, .rst_n, .adv(in_valid), .cnt(g - 6'(O_S2)), .x(t0), .y(s2));
  sdf_stage #(.D(4),  .JROT(1'b1), .INVERSE(INVERSE), .SCALE(SCALE_MASK[3])) u_s3 (
    .clk, .rst_n, .adv(in_valid), .cnt(g - 6'(O_S3)), .x(s2), .y(s3));
  tw_mult   #(.L(16), .INVERSE(INVERSE)) u_t1 (
    .clk, .rst_n, .adv(in_valid), .cnt(g - 6'(O_T1)), .x(s3), .y(t1));
  sdf_stage #(.D(2),  .JROT(1'b0), .INVERSE(INVERSE), .SCALE(SCALE_MASK[4])) u_s4 (
    .clk, .rst_n, .adv(in_valid), .cnt(g - 6'(O_S4)), .x(t1), .y(s4));
  sdf_stage #(.D(1),  .JROT(1'b1), .INVERSE(INVERSE), .SCALE(SCALE_MASK[5])) u_s5 (
    .clk, .rst_n, .adv(in_valid), .cnt(g - 6'(O_S5)), .x(s4), .y(s5));

  // tag pipeline: a sample's tag reaches the output with its results
  logic [LAT-1:0] tags;
  logic [5:0]     pos;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        tags <= '0;
    else if (in_valid) tags <= {tags[LAT-2:0], in_tag};

  assign pos = g - 6'(LAT);

  // output register: one result per advance
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0; out_tag <= 1'b0; dout <= '0; out_idx <= '0;
    end else begin
      out_valid <= in_valid;
      out_tag   <= tags[LAT-1];
      dout      <= s5;
      out_idx   <= {pos[0], pos[1], pos[2], pos[3], pos[4], pos[5]};
    end
endmodule
