// rst_sync: active-low reset synchroniser. Reset is applied asynchronously
// and released two clock edges after rst_in_n goes high, so every clock
// domain leaves reset synchronously to its own clock.
module rst_sync (
  input  logic clk,
  input  logic rst_in_n,
  output logic rst_out_n
);
  logic q1;
  always_ff @(posedge clk or negedge rst_in_n)
    if (!rst_in_n) begin q1 <= 1'b0; rst_out_n <= 1'b0; end
    else           begin q1 <= 1'b1; rst_out_n <= q1;   end
endmodule
