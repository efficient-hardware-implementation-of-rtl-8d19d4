`timescale 1ns/1ps
// tb_async_fifo: checks the dual-clock FIFO with unrelated clocks
// (write 7 ns, read 11 ns) at AW = 4 (16 words).
// 1. With reads held off, 16 writes must fill it: full rises after the
//    16th write, wr_count reads 16, and rd_count reaches 16 once the
//    pointer has crossed (two read clocks).
// 2. 3000 words are then written and read with random enables that obey
//    full/empty; every word read must be the next one written (first-word
//    fall-through: dout is valid whenever empty is low).
// 3. At the end the FIFO must be empty with both counts at zero.
module tb_async_fifo;
  localparam int DW = 16, AW = 4;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0, wr_en = 0, rd_en = 0;
  logic [DW-1:0] din = 0, dout;
  logic full, empty;
  logic [AW:0] wr_count, rd_count;
  always #3.5 wclk = ~wclk;
  always #5.5 rclk = ~rclk;
  int checks = 0, failures = 0;

  async_fifo #(.DW(DW), .AW(AW)) dut (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_en, .din, .full, .wr_count,
    .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_en, .dout, .empty, .rd_count);

  logic [DW-1:0] q [$];
  int nwr = 0, nrd = 0;
  localparam int TOTAL = 3000;
  bit phase1 = 1;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("%t %s", $time, what); end
  endtask

  // writer
  initial begin
    repeat (3) @(negedge wclk);
    wrst_n = 1; rrst_n = 1;
    repeat (3) @(negedge wclk);
    for (int i = 0; i < 16; i++) begin
      check(!full, "full too early");
      wr_en = 1; din = DW'($urandom); q.push_back(din); nwr++;
      @(negedge wclk);
    end
    wr_en = 0;
    check(full, "not full after 16 writes");
    check(wr_count == 16, "wr_count after 16 writes");
    repeat (4) @(negedge rclk);
    check(rd_count == 16, "rd_count after 16 writes");
    phase1 = 0;
    while (nwr < TOTAL) begin
      @(negedge wclk);
      wr_en = 0;
      if (!full && $urandom_range(0, 2) != 0) begin
        wr_en = 1; din = DW'($urandom); q.push_back(din); nwr++;
      end
    end
    @(negedge wclk);
    wr_en = 0;
  end

  // reader
  initial begin
    wait (!phase1);
    while (nrd < TOTAL) begin
      @(negedge rclk);
      rd_en = !empty && $urandom_range(0, 2) != 0;
      if (rd_en) begin
        logic [DW-1:0] e;
        e = q.pop_front();
        check(dout == e, "data order");
        nrd++;
      end
    end
    @(negedge rclk);
    rd_en = 0;
    repeat (4) @(negedge rclk);
    check(empty, "not empty at the end");
    check(rd_count == 0 && wr_count == 0, "counts at the end");
    check(nrd == TOTAL, "words read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
