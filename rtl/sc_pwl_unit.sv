// sc_pwl_unit - stochastic-computing evaluator of one arithmetic function
// f(x), x in [0,1), by 8-segment piecewise-linear (PWL) approximation.
//
// Datapath (one instance per function):
//   * the three MSBs of x pick segment i; ROM-A gives the slope a_i and ROM-B
//     the offset b_i (pwl_coef_rom, contents from sc_pwl_pkg);
//   * two SNGs with different LFSR polynomials (x^8+x+1 for x, x^8+x^2+1 for
//     a_i) turn x and a_i into bit-streams of densities x and a_i;
//   * a gate multiplies the streams: AND gives a_i*x; for cos a NAND gives
//     1 - |a_i|*x;
//   * an 8-bit counter accumulates the product stream over STREAM_LEN cycles,
//     turning it back into a binary number p ~ a_i*x*2^8;
//   * a binary adder forms f = b_i + p (subtractor f = b_i - p for e^-x).
// The choice of gate and adder/subtractor per function follows the method
// (FUNC selects it: AND and adder for ln(1+x), tanh, sigmoid, sin; NAND for
// cos; subtractor for e^-x).
//
// Control is this design's own: an IDLE/RUN/FINISH sequencer. A start pulse
// seen in IDLE or FINISH latches x, reloads both LFSRs with their seeds and
// clears the counter. RUN then lasts exactly STREAM_LEN cycles, one stream
// bit per cycle, with busy high. In the FINISH cycle that follows, b_i +/- count
// is formed; the clock edge ending FINISH registers it into f and raises done
// for one cycle. The default window of 255 cycles is one full period of a
// maximal 8-bit LFSR and the most ones an 8-bit counter can hold.
//
// Timing: if start is sampled at clock edge 0, done is high (and f valid)
// after edge STREAM_LEN + 1. FINISH is the first cycle with busy low; a start
// given then begins the next evaluation at once, so results can follow every
// STREAM_LEN + 1 cycles. f holds its value until the next result.
// sat reports that the last result was clipped to 0 or 255.
module sc_pwl_unit
  import sc_pwl_pkg::*;
#(
  parameter sc_func_e     FUNC       = FN_LN1P,
  parameter int unsigned  STREAM_LEN = 255,
  parameter logic [W-1:0] POLY_X     = POLY_X_DEFAULT,
  parameter logic [W-1:0] POLY_A     = POLY_A_DEFAULT,
  parameter logic [W-1:0] SEED_X     = SEED_X_DEFAULT,
  parameter logic [W-1:0] SEED_A     = SEED_A_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] x,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] f,
  output logic         sat
);

  localparam sc_comb_e  COMB = comb_of(FUNC);
  localparam int unsigned CW = $clog2(STREAM_LEN + 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FINISH} state_e;

  state_e          state;
  logic [W-1:0]    x_q;
  logic [CW-1:0]   cyc;
  logic            accept, running;
  logic [W-1:0]    a_coef, b_coef;
  logic            bit_x, bit_a, bit_p;
  logic [W-1:0]    count;
  logic [W-1:0]    y;
  logic            y_sat;

  assign accept  = start && (state != S_RUN);
  assign running = (state == S_RUN);
  assign busy    = running;

  // ---------------- sequencer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cyc   <= '0;
      x_q   <= '0;
    end else begin
      case (state)
        S_RUN: begin
          if (cyc == CW'(STREAM_LEN - 1)) state <= S_FINISH;
          cyc <= cyc + 1'b1;
        end
        S_FINISH: state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
      if (accept) begin
        state <= S_RUN;
        cyc   <= '0;
        x_q   <= x;
      end
    end
  end

  // ---------------- coefficient ROMs ----------------
  pwl_coef_rom #(.CONTENTS(rom_a_of(FUNC))) u_rom_a (
    .seg(x_q[W-1 -: SEGBITS]), .coef(a_coef)
  );
  pwl_coef_rom #(.CONTENTS(rom_b_of(FUNC))) u_rom_b (
    .seg(x_q[W-1 -: SEGBITS]), .coef(b_coef)
  );

  // ---------------- stochastic multiply ----------------
  sc_sng #(.N(W), .POLY(POLY_X), .SEED(SEED_X)) u_sng_x (
    .clk, .rst_n, .load(accept), .en(running), .v(x_q), .bit_o(bit_x)
  );
  sc_sng #(.N(W), .POLY(POLY_A), .SEED(SEED_A)) u_sng_a (
    .clk, .rst_n, .load(accept), .en(running), .v(a_coef), .bit_o(bit_a)
  );
  sc_mult #(.INVERT(COMB == COMB_NAND_ADD)) u_mult (
    .a(bit_x), .b(bit_a), .y(bit_p)
  );

  // ---------------- back to binary ----------------
  sc_counter #(.W(W)) u_cnt (
    .clk, .rst_n, .clr(accept), .en(running), .bit_i(bit_p), .count
  );

  pwl_addsub #(.W(W), .SUB(COMB == COMB_AND_SUB)) u_add (
    .b(b_coef), .p(count), .y, .sat(y_sat)
  );

  // ---------------- result register ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f    <= '0;
      sat  <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= (state == S_FINISH);
      if (state == S_FINISH) begin
        f   <= y;
        sat <= y_sat;
      end
    end
  end

  initial begin
    assert (STREAM_LEN >= 1 && STREAM_LEN <= (1 << W) - 1)
      else $error("sc_pwl_unit: STREAM_LEN must be 1 .. 2^W-1");
  end

endmodule
