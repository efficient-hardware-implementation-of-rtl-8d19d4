// viterbi_decoder: hard-decision Viterbi decoder for the K = 7, rate-1/2
// code (generators 133, 171 octal), decoding frames of FRAME = 48 bits that
// end in six zeros.
//
// Trellis: a state is the last six input bits, newest in bit 5. 32 ACS
// units each handle one butterfly: predecessors {x,0} and {x,1}, successors
// {0,x} and {1,x}. Every valid input pair advances the trellis by one step
// in one clock: Hamming branch metrics are added to the 64 x 8 metric
// register file, the smaller sum wins, and the winning predecessor of every
// state (64 x 6 bits) is written to the survivor memory at the step's
// address. Metrics restart at each frame (0 for state 0, 32 for the
// others); within 48 steps they stay below 256, so no normalisation is
// needed.
//
// When a frame's 48 steps are done its survivor bank is traced back from
// state 0 (the frame ends in zeros), one step per clock: the decoded bit
// of a step is bit 5 of the state reached, and the stored predecessor
// gives the next state. The bits go into one of two 48 x 1 decoded-bit
// memories and are then read out in order while the next frame is traced
// back. Survivor and decoded-bit memories are both double-buffered, so the
// decoder takes one pair and delivers one bit per clock; a frame's first
// bit leaves 50 clocks after its last input pair.
module viterbi_decoder #(
  parameter int FRAME = 48,
  parameter int MW    = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic a,        // coded bit of g0
  input  logic b,        // coded bit of g1
  output logic out_valid,
  output logic bit_out
);
  localparam int TW = $clog2(FRAME);

  function automatic logic [1:0] code_of(logic [5:0] p, logic u);
    // encoder outputs for a transition from state p with input u
    return {u ^ p[5] ^ p[4] ^ p[3] ^ p[0], u ^ p[4] ^ p[3] ^ p[1] ^ p[0]};
  endfunction

  // ---------------- ACS ----------------
  logic [MW-1:0]   pm [64];
  logic [TW-1:0]   step;
  logic            sbank;
  logic [64*6-1:0] surv [2][FRAME];
  logic [MW-1:0]   pm_nx [64];
  logic [64*6-1:0] pred;

  always_comb begin
    for (int x = 0; x < 32; x++) begin
      for (int u = 0; u < 2; u++) begin
        logic [5:0]    p0, p1;
        logic [MW-1:0] m0, m1, c0, c1;
        logic [1:0]    e0, e1;
        p0 = {x[4:0], 1'b0};
        p1 = {x[4:0], 1'b1};
        // at the first step of a frame the metrics restart
        m0 = (step == '0) ? ((p0 == 6'd0) ? MW'(0) : MW'(32)) : pm[p0];
        m1 = (step == '0) ? MW'(32) : pm[p1];
        e0 = code_of(p0, u[0]) ^ {b, a};
        e1 = code_of(p1, u[0]) ^ {b, a};
        c0 = m0 + MW'(e0[0]) + MW'(e0[1]);
        c1 = m1 + MW'(e1[0]) + MW'(e1[1]);
        pm_nx[{u[0], x[4:0]}]          = (c1 < c0) ? c1 : c0;
        pred[6*{u[0], x[4:0]} +: 6]    = (c1 < c0) ? p1 : p0;
      end
    end
  end

  logic frame_done;
  assign frame_done = in_valid && int'(step) == FRAME - 1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      step <= '0; sbank <= 1'b0;
      for (int s = 0; s < 64; s++) pm[s] <= '0;
    end else if (in_valid) begin
      for (int s = 0; s < 64; s++) pm[s] <= pm_nx[s];
      if (frame_done) begin step <= '0; sbank <= ~sbank; end
      else              step <= step + 1'b1;
    end

  always_ff @(posedge clk)
    if (in_valid) surv[sbank][step] <= pred;

  // ---------------- traceback ----------------
  logic          tb_busy, tb_bank, dbank;
  logic [TW-1:0] tb_t;
  logic [5:0]    state;
  logic          dec [2][FRAME];
  logic [5:0]    prev_state;
  logic          tb_done;

  assign prev_state = surv[tb_bank][tb_t][6*state +: 6];
  assign tb_done    = tb_busy && tb_t == '0;

  always_ff @(posedge clk)
    if (tb_busy) dec[dbank][tb_t] <= state[5];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      tb_busy <= 1'b0; tb_bank <= 1'b0; tb_t <= '0; state <= '0; dbank <= 1'b0;
    end else begin
      if (tb_busy) begin
        state <= prev_state;
        tb_t  <= tb_t - 1'b1;
        if (tb_done) begin tb_busy <= 1'b0; dbank <= ~dbank; end
      end
      if (frame_done) begin
        tb_busy <= 1'b1; tb_bank <= sbank; tb_t <= TW'(FRAME - 1); state <= '0;
      end
    end

  // ---------------- output ----------------
  logic          o_busy, o_bank;
  logic [TW-1:0] o_t;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      o_busy <= 1'b0; o_bank <= 1'b0; o_t <= '0; out_valid <= 1'b0; bit_out <= 1'b0;
    end else begin
      out_valid <= o_busy;
      bit_out   <= dec[o_bank][o_t];
      if (o_busy) begin
        o_t <= o_t + 1'b1;
        if (int'(o_t) == FRAME - 1) o_busy <= 1'b0;
      end
      if (tb_done) begin o_busy <= 1'b1; o_bank <= dbank; o_t <= '0; end
    end

  // a frame's traceback must be finished before the next frame is complete
  assert property (@(posedge clk) disable iff (!rst_n) frame_done |-> (!tb_busy || tb_done));
endmodule
