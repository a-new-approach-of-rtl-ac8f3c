// sc_pwl_top - bank of six stochastic piecewise-linear function units:
// ln(1+x), tanh(x), sigmoid(x), sin(x), cos(x) and e^-x, for x in [0,1).
//
// Every unit is an independent sc_pwl_unit (its own two SNGs, ROMs, gate,
// counter and adder/subtractor), as in the method, where each function is
// its own circuit; here they share the input x, the start strobe and the
// LFSR settings so that one evaluation yields all six values together.
//
// Interface: x is an unsigned fraction (x = value * 2^-8). A start pulse
// while busy is low begins an evaluation; all six units run in lock step, so
// done is one pulse, STREAM_LEN + 1 clock edges after the edge that sampled
// start, with all six results valid from then until the next done. Each
// result is an 8-bit fraction of one. sat[i] flags that result i (indexed by
// sc_func_e) was clipped to 0 or 255.
module sc_pwl_top
  import sc_pwl_pkg::*;
#(
  parameter int unsigned  STREAM_LEN = 255,
  parameter logic [W-1:0] POLY_X     = POLY_X_DEFAULT,
  parameter logic [W-1:0] POLY_A     = POLY_A_DEFAULT,
  parameter logic [W-1:0] SEED_X     = SEED_X_DEFAULT,
  parameter logic [W-1:0] SEED_A     = SEED_A_DEFAULT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [W-1:0]     x,
  output logic             busy,
  output logic             done,
  output logic [W-1:0]     f_ln1p,
  output logic [W-1:0]     f_tanh,
  output logic [W-1:0]     f_sigmoid,
  output logic [W-1:0]     f_sin,
  output logic [W-1:0]     f_cos,
  output logic [W-1:0]     f_expneg,
  output logic [NFUNC-1:0] sat
);

  logic [NFUNC-1:0]        busy_v, done_v;
  logic [NFUNC-1:0][W-1:0] f_v;

  for (genvar i = 0; i < NFUNC; i++) begin : g_fn
    sc_pwl_unit #(
      .FUNC(sc_func_e'(i)), .STREAM_LEN(STREAM_LEN),
      .POLY_X(POLY_X), .POLY_A(POLY_A), .SEED_X(SEED_X), .SEED_A(SEED_A)
    ) u_unit (
      .clk, .rst_n, .start, .x,
      .busy(busy_v[i]), .done(done_v[i]), .f(f_v[i]), .sat(sat[i])
    );
  end

  assign busy      = |busy_v;
  assign done      = &done_v;
  assign f_ln1p    = f_v[FN_LN1P];
  assign f_tanh    = f_v[FN_TANH];
  assign f_sigmoid = f_v[FN_SIGMOID];
  assign f_sin     = f_v[FN_SIN];
  assign f_cos     = f_v[FN_COS];
  assign f_expneg  = f_v[FN_EXPNEG];

  // The units share start and timing, so they must finish together (all
  // done flags are also low in reset).
  a_lockstep: assert property (@(posedge clk)
                                (done_v == '0 || done_v == '1))
    else $error("sc_pwl_top: units out of step");

endmodule
