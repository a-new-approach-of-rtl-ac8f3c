// tb_sc_mult - self-checking test of sc_mult: truth tables of the AND form
// and the NAND form, and the density of the AND of two independent random
// streams (~ p*q).
module tb_sc_mult;
  logic a, b, y_and, y_nand;
  int checks = 0, failures = 0;

  sc_mult #(.INVERT(1'b0)) u_and  (.a, .b, .y(y_and));
  sc_mult #(.INVERT(1'b1)) u_nand (.a, .b, .y(y_nand));

  initial begin
    automatic int n = 0;
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks += 2;
      if (y_and  != (i == 3)) begin failures++; $display("FAIL AND %b", i); end
      if (y_nand != (i != 3)) begin failures++; $display("FAIL NAND %b", i); end
    end
    // p = 0.5, q = 0.25 -> product density 0.125
    for (int t = 0; t < 8000; t++) begin
      a = ($urandom_range(1) == 0);
      b = ($urandom_range(3) == 0);
      #1;
      n += y_and;
    end
    checks++;
    if (n < 850 || n > 1150) begin failures++; $display("FAIL product density %0d/8000", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
