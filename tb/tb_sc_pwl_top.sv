// tb_sc_pwl_top - end-to-end test of the six-function bank at its default
// parameters (8-bit data, 255-bit streams, LFSR polynomials x^8+x+1 and
// x^8+x^2+1). It evaluates all 256 input values back to back: each new start
// is given in the cycle the previous window ends, so results follow every
// STREAM_LEN + 1 cycles. For every evaluation it checks all six outputs
// bit-exactly against the reference model and checks the spacing of the
// done pulses; at the end it reports the mean absolute error of each
// function against the exact function next to the figure published for the
// method, and requires it below 0.016.
// Mechanisms counted (each must occur): AND-gate multiply with adder,
// NAND-gate multiply (cos), subtractor (e^-x), each of the 8 segments,
// back-to-back restart in the finishing cycle, start ignored while busy.
module tb_sc_pwl_top;
  import tb_sc_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [7:0] x = '0;
  logic [7:0] f [6];
  logic [5:0] sat;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sc_pwl_top dut (
    .clk, .rst_n, .start, .x, .busy, .done,
    .f_ln1p(f[0]), .f_tanh(f[1]), .f_sigmoid(f[2]), .f_sin(f[3]), .f_cos(f[4]), .f_expneg(f[5]),
    .sat
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // published MAE of the method, same function order
  localparam real MAE_PUB [6] = '{0.0026, 0.0029, 0.0024, 0.0026, 0.0035, 0.0027};
  localparam string NAME [6] = '{"ln(1+x)", "tanh(x)", "sigmoid(x)", "sin(x)", "cos(x)", "exp(-x)"};

  int  n_and_add = 0, n_nand = 0, n_sub = 0, n_b2b = 0, n_ignored = 0;
  int  seg_hits [8];
  real err [6];
  int  cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    automatic int last_start = 0;
    foreach (seg_hits[i]) seg_hits[i] = 0;
    foreach (err[i]) err[i] = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    x = 8'd0; start = 1;
    @(negedge clk);
    start = 0; last_start = cyc;
    for (int xi = 0; xi < 256; xi++) begin
      // wait for the finishing cycle of this window
      while (busy) begin
        if (cyc - last_start == 100 && xi % 32 == 5) begin
          x = 8'hA5; start = 1;                 // must be ignored
          @(negedge clk);
          start = 0; n_ignored++;
        end else @(negedge clk);
      end
      check(cyc - last_start == STREAM_LEN, $sformatf("x=%0d window %0d cycles", xi, cyc - last_start));
      if (xi < 255) begin
        x = 8'(xi + 1); start = 1;              // back-to-back restart
        n_b2b++;
      end
      @(negedge clk);
      start = 0; last_start = cyc;
      check(done, $sformatf("x=%0d no done", xi));
      for (int fn = 0; fn < 6; fn++) begin
        automatic int e = ref_f(fn, xi);
        automatic real d = f[fn] / 256.0 - true_f(fn, xi / 256.0);
        check(int'(f[fn]) == e, $sformatf("%s x=%0d f=%0d expected %0d", NAME[fn], xi, f[fn], e));
        err[fn] += (d < 0.0) ? -d : d;
      end
      n_and_add += 4; n_nand++; n_sub++;
      seg_hits[xi / 32]++;
    end
    @(negedge clk);
    check(!done && !busy, "idle after the last result");
    for (int fn = 0; fn < 6; fn++) begin
      $display("%-11s MAE %.4f (published %.4f)", NAME[fn], err[fn] / 256.0, MAE_PUB[fn]);
      check(err[fn] / 256.0 < 0.016, $sformatf("%s MAE too large", NAME[fn]));
    end
    $display("mechanisms: and+add %0d, nand %0d, subtract %0d, back-to-back %0d, ignored start %0d",
             n_and_add, n_nand, n_sub, n_b2b, n_ignored);
    check(n_and_add > 0, "AND/adder path never used");
    check(n_nand > 0, "NAND path never used");
    check(n_sub > 0, "subtractor path never used");
    check(n_b2b > 0, "no back-to-back start");
    check(n_ignored > 0, "no start while busy");
    foreach (seg_hits[s]) check(seg_hits[s] > 0, $sformatf("segment %0d never used", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
