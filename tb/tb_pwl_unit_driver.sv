// tb_pwl_unit_driver - drives one sc_pwl_unit through an evaluation for
// every x = 0, STEP, 2*STEP, ... < 256 and checks it against tb_sc_ref_pkg:
//   * f equals the bit-exact reference (same LFSRs, same window);
//   * done arrives STREAM_LEN + 1 clock edges after the edge that took start,
//     and busy is high during the window;
//   * a second start pulse in the middle of a run is ignored;
//   * the mean absolute error against the exact function stays below
//     MAE_LIMIT.
// It also counts how often each segment was used. finished rises when done.
module tb_pwl_unit_driver
  import sc_pwl_pkg::*;
  import tb_sc_ref_pkg::*;
#(
  parameter int  FN        = 0,
  parameter int  STEP      = 1,
  parameter real MAE_LIMIT = 0.016
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   seg_hits [8],
  output logic finished
);

  logic       start, busy, done, sat;
  logic [7:0] x, f;

  sc_pwl_unit #(.FUNC(sc_func_e'(FN))) dut (
    .clk, .rst_n, .start, .x, .busy, .done, .f, .sat
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL fn=%0d %s", FN, what);
    end
  endtask

  initial begin
    automatic real err_sum = 0.0;
    automatic int  n = 0;
    real mae;
    checks = 0; failures = 0; finished = 0;
    start = 0; x = '0;
    foreach (seg_hits[i]) seg_hits[i] = 0;
    wait (rst_n);
    @(negedge clk);
    for (int xi = 0; xi < 256; xi += STEP) begin
      automatic int lat = 0, busy_cycles = 0;
      int exp_f;
      x = 8'(xi); start = 1;
      @(posedge clk);
      @(negedge clk);
      start = 0;
      x = ~x;                                   // x only matters at start
      forever begin
        if (busy) busy_cycles++;
        if (lat == STREAM_LEN / 2 && (xi % 16) == 0) start = 1;  // must be ignored
        @(posedge clk); lat++;
        @(negedge clk); start = 0;
        if (done || lat > 2 * STREAM_LEN) break;
      end
      exp_f = ref_f(FN, xi);
      check(int'(f) == exp_f, $sformatf("x=%0d f=%0d expected %0d", xi, f, exp_f));
      check(lat == STREAM_LEN + 1, $sformatf("x=%0d latency %0d", xi, lat));
      check(busy_cycles == STREAM_LEN, $sformatf("x=%0d busy for %0d", xi, busy_cycles));
      seg_hits[xi / 32]++;
      err_sum += (f / 256.0 > true_f(FN, xi / 256.0)) ? f / 256.0 - true_f(FN, xi / 256.0)
                                                     : true_f(FN, xi / 256.0) - f / 256.0;
      n++;
      @(negedge clk);
    end
    mae = err_sum / n;
    $display("fn=%0d evaluations=%0d MAE=%f", FN, n, mae);
    check(mae < MAE_LIMIT, $sformatf("MAE %f above %f", mae, MAE_LIMIT));
    finished = 1;
  end

endmodule
