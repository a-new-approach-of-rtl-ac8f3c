// tb_pwl_coef_rom - self-checking test of pwl_coef_rom: builds ROM-A and
// ROM-B of all six functions from sc_pwl_pkg and checks every word, selected
// through the segment mux, against the signed coefficient table of the
// reference model converted to each ROM's storage convention.
module tb_pwl_coef_rom;
  import sc_pwl_pkg::*;
  import tb_sc_ref_pkg::*;

  logic [2:0] seg;
  logic [7:0] a_out [6], b_out [6];
  int checks = 0, failures = 0;

  for (genvar f = 0; f < 6; f++) begin : g_f
    pwl_coef_rom #(.CONTENTS(rom_a_of(sc_func_e'(f)))) u_a (.seg, .coef(a_out[f]));
    pwl_coef_rom #(.CONTENTS(rom_b_of(sc_func_e'(f)))) u_b (.seg, .coef(b_out[f]));
  end

  initial begin
    for (int s = 0; s < 8; s++) begin
      seg = 3'(s);
      #1;
      for (int f = 0; f < 6; f++) begin
        checks += 2;
        if (int'(a_out[f]) != rom_a(f, s)) begin
          failures++; $display("FAIL fn=%0d seg=%0d A=%0d expected %0d", f, s, a_out[f], rom_a(f, s));
        end
        if (int'(b_out[f]) != rom_b(f, s)) begin
          failures++; $display("FAIL fn=%0d seg=%0d B=%0d expected %0d", f, s, b_out[f], rom_b(f, s));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
