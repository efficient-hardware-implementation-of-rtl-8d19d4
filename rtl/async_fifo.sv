// async_fifo: dual-clock FIFO that carries data between the 12 MHz and
// 20 MHz domains. Binary pointers one bit wider than the address are kept
// in each domain; their Gray-coded copies cross through two-flop
// synchronisers, so full and empty are exact in their own domain and
// pessimistic by the synchronisation delay across it.
//
// Write side: din is stored on a wr_clk edge with wr_en and not full.
// Read side: first-word fall-through; dout shows the oldest entry while
// empty is low and rd_en pops it. rd_count and wr_count are the fill level
// seen from the read and the write clock. Each side has its own active-low reset input, which must be
// released synchronously to its clock.
module async_fifo #(
  parameter int DW = 32,
  parameter int AW = 8
) (
  input  logic          wr_clk,
  input  logic          wr_rst_n,
  input  logic          wr_en,
  input  logic [DW-1:0] din,
  output logic          full,
  output logic [AW:0]   wr_count,
  input  logic          rd_clk,
  input  logic          rd_rst_n,
  input  logic          rd_en,
  output logic [DW-1:0] dout,
  output logic          empty,
  output logic [AW:0]   rd_count
);
  logic [DW-1:0] mem [2**AW];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wq1, wq2, rq1, rq2;   // wq*: read pointer in write domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] v);
    return v ^ (v >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] v;
    v[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) v[i] = v[i + 1] ^ g[i];
    return v;
  endfunction

  // write domain
  logic [AW:0] wbin_nx;
  assign full    = (wgray == {~wq2[AW:AW-1], wq2[AW-2:0]});
  assign wbin_nx = wbin + (AW + 1)'(wr_en && !full);
  assign wr_count = wbin - gray2bin(wq2);

  always_ff @(posedge wr_clk)
    if (wr_en && !full) mem[wbin[AW-1:0]] <= din;

  always_ff @(posedge wr_clk or negedge wr_rst_n)
    if (!wr_rst_n) begin
      wbin <= '0; wgray <= '0; wq1 <= '0; wq2 <= '0;
    end else begin
      wbin  <= wbin_nx;
      wgray <= bin2gray(wbin_nx);
      wq1   <= rgray;
      wq2   <= wq1;
    end

  // read domain
  logic [AW:0] rbin_nx;
  assign empty   = (rgray == rq2);
  assign rbin_nx = rbin + (AW + 1)'(rd_en && !empty);
  assign dout    = mem[rbin[AW-1:0]];
  assign rd_count = gray2bin(rq2) - rbin;

  always_ff @(posedge rd_clk or negedge rd_rst_n)
    if (!rd_rst_n) begin
      rbin <= '0; rgray <= '0; rq1 <= '0; rq2 <= '0;
    end else begin
      rbin  <= rbin_nx;
      rgray <= bin2gray(rbin_nx);
      rq1   <= wgray;
      rq2   <= rq1;
    end

  // a write to a full FIFO or a read from an empty one is a protocol error
  property no_overflow;  @(posedge wr_clk) disable iff (!wr_rst_n) wr_en |-> !full;  endproperty
  property no_underflow; @(posedge rd_clk) disable iff (!rd_rst_n) rd_en |-> !empty; endproperty
  assert property (no_overflow);
  assert property (no_underflow);
endmodule
