// sc_sng - stochastic number generator (SNG): converts an N-bit binary value
// v into a bit-stream whose fraction of ones approximates v / 2^N.
//
// An sc_lfsr supplies a pseudo-random N-bit number r each cycle; the output
// bit is 1 when r < v (unipolar coding). The comparator form and the seed are
// choices of this design; the LFSR polynomial follows the method (passed in
// through POLY). Two SNGs with different polynomials are used per function
// unit so that the two streams are decorrelated.
//
// Interface: load restarts the LFSR from SEED, en advances it. bit_o is
// combinational from the current LFSR state and v, so it is valid in every
// cycle; v may change at any time.
module sc_sng #(
  parameter int unsigned  N    = 8,
  parameter logic [N-1:0] POLY = 8'b1000_0001,
  parameter logic [N-1:0] SEED = 8'd33
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  input  logic [N-1:0] v,
  output logic         bit_o
);

  logic [N-1:0] r;

  sc_lfsr #(.N(N), .POLY(POLY), .SEED(SEED)) u_lfsr (
    .clk, .rst_n, .load, .en, .state(r)
  );

  always_comb bit_o = (r < v);

endmodule
