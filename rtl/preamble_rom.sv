// preamble_rom: read-only memory of the transmitter's training sequences.
// A packet starts with 320 samples: ten 16-sample periods of the short
// training symbol (samples 0..159), then a 32-sample guard (the last half
// of the long training symbol) and two 64-sample long training symbols
// (160..319). The ROM holds one short period and one long symbol; the
// address decoder repeats them. Both are the IEEE 802.11a sequences,
// generated at elaboration as the 1/64-scaled IDFT of their sub-carrier
// values so that they have the same level as the data symbols. The read
// is registered: dout follows addr by one clock.
module preamble_rom
  import cofdm_pkg::*;
(
  input  logic       clk,
  input  logic [8:0] addr,   // 0..319
  output cplx_t      dout
);
  function automatic logic [64*32-1:0] build(bit is_long);
    logic [64*32-1:0] t;
    t = '0;
    for (int n = 0; n < (is_long ? 64 : 16); n++) begin
      t[n*32 + 16 +: 16] = 16'(train_sample(is_long, n, 1'b0));
      t[n*32      +: 16] = 16'(train_sample(is_long, n, 1'b1));
    end
    return t;
  endfunction

  localparam logic [64*32-1:0] SHORT_T = build(1'b0);
  localparam logic [64*32-1:0] LONG_T  = build(1'b1);

  logic [5:0] la;
  logic       is_short;
  always_comb begin
    is_short = int'(addr) < SHORT_LEN;
    if (int'(addr) < SHORT_LEN + 32) la = 6'(int'(addr) - SHORT_LEN + 32);
    else                             la = 6'(int'(addr) - SHORT_LEN - 32);
  end

  always_ff @(posedge clk)
    dout <= is_short ? cplx_t'(SHORT_T[addr[3:0]*32 +: 32]) : cplx_t'(LONG_T[la*32 +: 32]);
endmodule
