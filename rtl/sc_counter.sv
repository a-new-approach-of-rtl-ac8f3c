// sc_counter - stochastic-to-binary converter: counts the ones of a
// bit-stream.
//
// clr (priority) zeroes the count; while en is high each 1 on bit_i adds one.
// The count is registered: a bit sampled in cycle t shows in count from
// cycle t+1. The counter is W bits wide and does not wrap: it holds at
// 2^W - 1, so a window longer than 2^W - 1 cycles saturates instead of
// overflowing (the function units use a 255-cycle window with W = 8).
module sc_counter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic         bit_i,
  output logic [W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           count <= '0;
    else if (clr)                         count <= '0;
    else if (en && bit_i && count != '1)  count <= count + 1'b1;
  end

endmodule
