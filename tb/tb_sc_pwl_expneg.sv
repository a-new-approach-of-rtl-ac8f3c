// tb_sc_pwl_expneg - self-checking test of sc_pwl_unit configured for e^-x (AND gate, subtractor b - |a|x):
// every 8-bit x, bit-exact against the reference model, latency, busy,
// ignored restarts and mean absolute error against the exact function.
module tb_sc_pwl_expneg;
  logic clk = 0, rst_n = 0;
  int   checks, failures;
  int   hits [8];
  logic fin;

  always #5 clk = ~clk;

  tb_pwl_unit_driver #(.FN(5)) u_drv (
    .clk, .rst_n, .checks, .failures, .seg_hits(hits), .finished(fin)
  );

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  initial begin : watchdog
    repeat (300_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    automatic int segs = 0;
    wait (rst_n);
    wait (fin);
    foreach (hits[s]) if (hits[s] > 0) segs++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + (segs != 8));
    $finish;
  end
endmodule
