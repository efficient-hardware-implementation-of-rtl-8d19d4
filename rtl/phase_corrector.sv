// phase_corrector: removes the phase error of each received OFDM symbol
// using its four pilot sub-carriers.
//
// Write side: the symbol's 64 bins arrive in natural order (in_k = bin)
// and are stored in one of two RAMs (RAMin1/RAMin2) while a vectoring
// CORDIC measures the phase (arctangent, modulo pi) of every bin. Twelve
// cycles later (the CORDIC latency, so the bin counter is compared after
// the same delay) the phases of the pilot bins 7, 21, 43 and 57 update
// registers Rp1..Rp4. My choice here, beyond the document: Rp is the
// pilot's phase relative to the long training symbol, not the raw
// arctangent. It is cleared by the training symbol (in_first) and
// afterwards grows by the change of the arctangent from symbol to symbol,
// taken modulo pi. That removes the pilots' 0/pi polarity, lets a slow
// phase drift build up past +-90 degrees without a sign slip, and makes
// the correction of the training symbol itself zero, so the channel
// estimate and every data symbol share one phase reference.
//
// Estimator: the slopes and intercepts of the three lines through
// (7, Rp1), (21, Rp2), (43, Rp3), (57, Rp4), with FR fractional bits:
// m = (Rp_next - Rp) / dk, b = Rp - m * k_pilot, the difference taken
// modulo 2*pi (16-bit wrap).
//
// Read side: RD_DLY cycles after a symbol is complete (when Rp4 is known)
// the coefficients are latched and the symbol is read back, one bin per
// clock, in sub-carrier order -32..31, while the next symbol is written
// into the other RAM. The evaluator gives the interpolated phase b + m*k
// of line 1, 2 or 3 (selects 1, 2, 4), or holds Rp1 below bin 7 and Rp4
// above bin 57; a rotation CORDIC turns the bin by minus that phase.
// Output is the rotated bin (18-bit parts, CORDIC gain included), its bin
// number, and out_first for the bins of a symbol written with in_first.
// Latency from the last input bin to the first output: RD_DLY + 14 cycles.
module phase_corrector
  import cofdm_pkg::*;
#(
  parameter int ITER   = 12,
  parameter int FR     = 10,
  parameter int RD_DLY = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               in_first,
  input  cplx_t              din,
  input  logic [5:0]         in_k,
  output logic               out_valid,
  output logic               out_first,
  output logic signed [17:0] out_re,
  output logic signed [17:0] out_im,
  output logic [5:0]         out_k
);
  localparam int KP1 = 7, KP2 = 21, KP3 = 43, KP4 = 57;
  typedef logic signed [39:0] fx_t;

  // ---------------- write side ----------------
  cplx_t      ram [2][64];
  logic       first_of [2];
  logic       wb;
  logic [6:0] wcnt;

  always_ff @(posedge clk)
    if (in_valid) ram[wb][in_k] <= din;

  logic               v_valid;
  logic signed [15:0] v_phase;
  logic [7:0]         co_d12;

  cordic #(.ITER(ITER), .VECTORING(1'b1), .XW(18), .TAGW(8)) u_vec (
    .clk, .rst_n, .valid_in(in_valid), .x_in(18'(din.re)), .y_in(18'(din.im)), .z_in(16'sd0),
    .tag_in({1'b0, in_first, in_k}), .valid_out(v_valid), .x_out(), .y_out(), .z_out(v_phase), .tag_out(co_d12));

  logic signed [15:0] rp1, rp2, rp3, rp4;   // pilot phase relative to the training symbol
  logic signed [15:0] pv1, pv2, pv3, pv4;   // last measured arctangent of each pilot
  logic               pend;
  logic [4:0]         dly;
  logic               v_first;
  assign v_first = co_d12[6];

  // change of a pilot's arctangent since the previous symbol, modulo pi
  function automatic logic signed [15:0] step(logic signed [15:0] now, logic signed [15:0] prev);
    logic signed [15:0] d;
    d = now - prev;
    if (d > 16'sd16384 || d <= -16'sd16384) d[15] = ~d[15];   // +-pi
    return d;
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wb <= 1'b0; wcnt <= '0; rp1 <= '0; rp2 <= '0; rp3 <= '0; rp4 <= '0;
      pv1 <= '0; pv2 <= '0; pv3 <= '0; pv4 <= '0;
      pend <= 1'b0; dly <= '0; first_of[0] <= 1'b0; first_of[1] <= 1'b0;
    end else begin
      if (v_valid) begin
        if (co_d12[5:0] == 6'(KP1)) begin rp1 <= v_first ? 16'sd0 : rp1 + step(v_phase, pv1); pv1 <= v_phase; end
        if (co_d12[5:0] == 6'(KP2)) begin rp2 <= v_first ? 16'sd0 : rp2 + step(v_phase, pv2); pv2 <= v_phase; end
        if (co_d12[5:0] == 6'(KP3)) begin rp3 <= v_first ? 16'sd0 : rp3 + step(v_phase, pv3); pv3 <= v_phase; end
        if (co_d12[5:0] == 6'(KP4)) begin rp4 <= v_first ? 16'sd0 : rp4 + step(v_phase, pv4); pv4 <= v_phase; end
      end
      if (pend) dly <= dly + 1'b1;
      if (pend && int'(dly) == RD_DLY - 1) pend <= 1'b0;
      if (in_valid) begin
        if (wcnt == 7'd63) begin
          wcnt <= '0; wb <= ~wb; pend <= 1'b1; dly <= '0;
          first_of[wb] <= in_first;
        end else
          wcnt <= wcnt + 1'b1;
      end
    end

  // ---------------- polynomial estimator ----------------
  // The steps between neighbouring pilots are taken modulo 2*pi (16-bit
  // wrap), so a phase common to all pilots never changes the line shapes.
  fx_t m1, m2, m3, b1, b2, b3;
  logic signed [15:0] d1, d2, d3;
  always_comb begin
    d1 = rp2 - rp1;
    d2 = rp3 - rp2;
    d3 = rp4 - rp3;
    m1 = (fx_t'(d1) <<< FR) / (KP2 - KP1);
    m2 = (fx_t'(d2) <<< FR) / (KP3 - KP2);
    m3 = (fx_t'(d3) <<< FR) / (KP4 - KP3);
    b1 = (fx_t'(rp1) <<< FR) - m1 * KP1;
    b2 = (fx_t'(rp2) <<< FR) - m2 * KP2;
    b3 = (fx_t'(rp3) <<< FR) - m3 * KP3;
  end

  // ---------------- read side ----------------
  fx_t                lm1, lm2, lm3, lb1, lb2, lb3;
  logic signed [15:0] lrp1, lrp4;
  logic               rbusy, rbank;
  logic [5:0]         rcnt;
  logic [5:0]         k;
  assign k = {~rcnt[5], rcnt[4:0]};   // sub-carrier order: bins 32..63, then 0..31

  // evaluator: selects 1, 2, 4 choose line 1, 2, 3; output select 2 = Rp1, 1 = Rp4, 0 = line
  logic [2:0]         lsel;
  logic [1:0]         osel;
  fx_t                mk, bk, line;
  logic signed [15:0] phi;
  always_comb begin
    lsel = (int'(k) < KP2) ? 3'd1 : (int'(k) < KP3) ? 3'd2 : 3'd4;
    osel = (int'(k) < KP1) ? 2'd2 : (int'(k) > KP4) ? 2'd1 : 2'd0;
    unique case (lsel)
      3'd1:    begin mk = lm1; bk = lb1; end
      3'd2:    begin mk = lm2; bk = lb2; end
      default: begin mk = lm3; bk = lb3; end
    endcase
    line = (bk + mk * fx_t'(k)) >>> FR;
    unique case (osel)
      2'd2:    phi = lrp1;
      2'd1:    phi = lrp4;
      default: phi = 16'(line);
    endcase
  end

  logic               s_valid, s_first;
  cplx_t              s_bin;
  logic signed [15:0] s_phi;
  logic [5:0]         s_k;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rbusy <= 1'b0; rbank <= 1'b0; rcnt <= '0;
      lm1 <= '0; lm2 <= '0; lm3 <= '0; lb1 <= '0; lb2 <= '0; lb3 <= '0; lrp1 <= '0; lrp4 <= '0;
      s_valid <= 1'b0; s_first <= 1'b0; s_bin <= '0; s_phi <= '0; s_k <= '0;
    end else begin
      if (pend && int'(dly) == RD_DLY - 1) begin
        rbusy <= 1'b1; rbank <= ~wb; rcnt <= '0;
        lm1 <= m1; lm2 <= m2; lm3 <= m3; lb1 <= b1; lb2 <= b2; lb3 <= b3;
        lrp1 <= rp1; lrp4 <= rp4;
      end else if (rbusy) begin
        rcnt <= rcnt + 1'b1;
        if (rcnt == 6'd63) rbusy <= 1'b0;
      end
      s_valid <= rbusy;
      s_first <= first_of[rbank];
      s_bin   <= ram[rbank][k];
      s_phi   <= phi;
      s_k     <= k;
    end

  logic [7:0] r_tag;
  cordic #(.ITER(ITER), .VECTORING(1'b0), .XW(18), .TAGW(8)) u_rot (
    .clk, .rst_n, .valid_in(s_valid), .x_in(18'(s_bin.re)), .y_in(18'(s_bin.im)), .z_in(-s_phi),
    .tag_in({1'b0, s_first, s_k}), .valid_out(out_valid), .x_out(out_re), .y_out(out_im), .z_out(),
    .tag_out(r_tag));

  assign out_first = r_tag[6];
  assign out_k     = r_tag[5:0];
endmodule
