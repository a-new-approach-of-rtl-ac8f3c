// tb_sc_pwl_unit - self-checking test of sc_pwl_unit in its AND-gate /
// adder form (ln(1+x), tanh, sigmoid, sin): every 8-bit x for each function,
// bit-exact against the reference model, latency, busy, ignored restarts and
// mean absolute error against the exact function.
module tb_sc_pwl_unit;
  localparam int NU = 4;
  localparam int FNS [NU] = '{0, 1, 2, 3};

  logic clk = 0, rst_n = 0;
  int   chk [NU], fl [NU];
  int   hits [NU][8];
  logic fin [NU];
  int   checks, failures;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NU; i++) begin : g_u
    tb_pwl_unit_driver #(.FN(FNS[i])) u_drv (
      .clk, .rst_n, .checks(chk[i]), .failures(fl[i]), .seg_hits(hits[i]), .finished(fin[i])
    );
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  initial begin : watchdog
    repeat (300_000) @(posedge clk);
    $display("watchdog expired");
    checks = 0; failures = 1;
    foreach (chk[i]) begin checks += chk[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (rst_n);
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    checks = 0; failures = 0;
    foreach (chk[i]) begin checks += chk[i]; failures += fl[i]; end
    for (int i = 0; i < NU; i++)
      for (int s = 0; s < 8; s++) begin
        checks++;
        if (hits[i][s] == 0) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
