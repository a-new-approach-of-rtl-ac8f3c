// tb_sc_sng - self-checking test of sc_sng: for every 8-bit value v, the
// number of ones over a window equals the number of LFSR states below v
// (from the reference model). With a primitive polynomial the window of 255
// cycles gives exactly v - 1 ones for v >= 1, i.e. density ~ v/256.
module tb_sc_sng;
  import tb_sc_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [7:0] v;
  logic b_def, b_prim;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sc_sng #(.POLY(8'b1000_0001), .SEED(8'd33)) u_def  (.clk, .rst_n, .load, .en, .v, .bit_o(b_def));
  sc_sng #(.POLY(8'b1011_1000), .SEED(8'd1))  u_prim (.clk, .rst_n, .load, .en, .v, .bit_o(b_prim));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    v = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int val = 0; val < 256; val++) begin
      automatic int n_def = 0, n_prim = 0, exp_def = 0;
      automatic bit [7:0] r = 8'd33;
      v = 8'(val);
      load = 1;
      @(negedge clk);
      load = 0; en = 1;
      for (int t = 0; t < 255; t++) begin
        n_def  += b_def;
        n_prim += b_prim;
        exp_def += (int'(r) < val);
        r = lfsr_step(r, 1);
        @(negedge clk);
      end
      en = 0;
      check(n_def == exp_def, $sformatf("v=%0d ones %0d expected %0d", val, n_def, exp_def));
      check(n_prim == (val == 0 ? 0 : val - 1), $sformatf("v=%0d primitive ones %0d", val, n_prim));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
