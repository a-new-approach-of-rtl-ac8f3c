// pwl_addsub - binary adder / subtractor that adds the offset b_i to the
// counted stochastic product (the addition is done on binary numbers, not on
// streams, to avoid the scaling error of a stochastic adder).
//
// SUB = 0: y = b + p (ln(1+x), tanh, sigmoid, sin, cos).
// SUB = 1: y = b - p (e^-x, where ROM-A holds |a_i|).
// The result saturates to [0, 2^W - 1]; saturation is this design's choice,
// the output being a W-bit fraction of one. Combinational.
module pwl_addsub #(
  parameter int unsigned W   = 8,
  parameter bit          SUB = 1'b0
) (
  input  logic [W-1:0] b,
  input  logic [W-1:0] p,
  output logic [W-1:0] y,
  output logic         sat
);

  logic [W:0] sum;

  always_comb begin
    if (SUB) begin
      sum = {1'b0, b} - {1'b0, p};
      sat = sum[W];                       // borrow: result below zero
      y   = sat ? '0 : sum[W-1:0];
    end else begin
      sum = {1'b0, b} + {1'b0, p};
      sat = sum[W];                       // carry: result above 2^W - 1
      y   = sat ? '1 : sum[W-1:0];
    end
  end

endmodule
