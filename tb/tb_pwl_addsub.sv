// tb_pwl_addsub - self-checking test of pwl_addsub: every pair of 8-bit
// operands, for the adder (b + p, clipped at 255) and the subtractor (b - p,
// clipped at 0), including the saturation flag.
module tb_pwl_addsub;
  logic [7:0] b, p, y_add, y_sub;
  logic s_add, s_sub;
  int checks = 0, failures = 0;

  pwl_addsub #(.SUB(1'b0)) u_add (.b, .p, .y(y_add), .sat(s_add));
  pwl_addsub #(.SUB(1'b1)) u_sub (.b, .p, .y(y_sub), .sat(s_sub));

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        automatic int sum = i + j, dif = i - j;
        b = 8'(i); p = 8'(j);
        #1;
        checks += 2;
        if (int'(y_add) != (sum > 255 ? 255 : sum) || s_add != (sum > 255)) begin
          failures++; if (failures < 10) $display("FAIL %0d+%0d=%0d", i, j, y_add);
        end
        if (int'(y_sub) != (dif < 0 ? 0 : dif) || s_sub != (dif < 0)) begin
          failures++; if (failures < 10) $display("FAIL %0d-%0d=%0d", i, j, y_sub);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
