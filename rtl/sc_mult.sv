// sc_mult - stochastic multiplier of two unipolar bit-streams.
//
// With independent streams of densities p and q, an AND gate yields a stream
// of density p*q. With INVERT = 1 the gate is a NAND, yielding 1 - p*q, which
// the cos unit uses to form (1 - a*x). Combinational, one bit per cycle.
module sc_mult #(
  parameter bit INVERT = 1'b0
) (
  input  logic a,
  input  logic b,
  output logic y
);

  always_comb y = INVERT ? ~(a & b) : (a & b);

endmodule
