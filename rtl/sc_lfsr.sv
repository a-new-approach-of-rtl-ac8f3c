// sc_lfsr - loadable Fibonacci linear-feedback shift register, the random
// source of a stochastic number generator.
//
// Each enabled cycle the register shifts left by one; the new LSB is the XOR
// of the state bits selected by POLY, where bit k-1 of POLY stands for the
// term x^k of the feedback polynomial (x^8 -> bit 7). The defaults give the
// 8-bit x^8 + x + 1 register used for the input stream. Note that this
// polynomial and x^8 + x^2 + 1 are not primitive: from a nonzero seed they
// cycle through 63 and 30 states respectively (or 3 and 15 from a few
// seeds), not 255. They are kept because they are the polynomials of the
// method; any primitive polynomial can be passed through POLY instead.
//
// Interface: load (priority) copies SEED into the register; en advances it.
// state is the registered value, valid from the cycle after load.
module sc_lfsr #(
  parameter int unsigned     N    = 8,
  parameter logic [N-1:0]    POLY = 8'b1000_0001,
  parameter logic [N-1:0]    SEED = 8'd33
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  output logic [N-1:0] state
);

  logic fb;
  assign fb = ^(state & POLY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (load) state <= SEED;
    else if (en)   state <= {state[N-2:0], fb};
  end

  initial begin
    assert (SEED != '0) else $error("sc_lfsr: an all-zero seed locks the register");
  end

endmodule
