// tb_sc_lfsr - self-checking test of sc_lfsr: the state sequence of the
// x^8 + x + 1 and x^8 + x^2 + 1 registers against a step model, their cycle
// lengths (63 and 30 from the default seeds), a primitive polynomial
// (x^8 + x^6 + x^5 + x^4 + 1, all 255 nonzero states), hold when en is low
// and reload on load.
module tb_sc_lfsr;
  import tb_sc_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [7:0] s1, s2, s3;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sc_lfsr #(.POLY(8'b1000_0001), .SEED(8'd33))  u1 (.clk, .rst_n, .load, .en, .state(s1));
  sc_lfsr #(.POLY(8'b1000_0010), .SEED(8'd176)) u2 (.clk, .rst_n, .load, .en, .state(s2));
  sc_lfsr #(.POLY(8'b1011_1000), .SEED(8'd1))   u3 (.clk, .rst_n, .load, .en, .state(s3));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // primitive reference: x^8 + x^6 + x^5 + x^4 + 1
  function automatic bit [7:0] step_prim(bit [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit [7:0] m1, m2, m3;
    int p1, p2, p3;
    bit seen [256];
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(s1 == 8'd33 && s2 == 8'd176 && s3 == 8'd1, "reset value");
    m1 = 8'd33; m2 = 8'd176; m3 = 8'd1;
    p1 = 0; p2 = 0; p3 = 0;
    foreach (seen[i]) seen[i] = 0;
    en = 1;
    for (int t = 1; t <= 300; t++) begin
      @(negedge clk);
      m1 = lfsr_step(m1, 1); m2 = lfsr_step(m2, 2); m3 = step_prim(m3);
      check(s1 == m1, $sformatf("t=%0d x^8+x+1 state %0d expected %0d", t, s1, m1));
      check(s2 == m2, $sformatf("t=%0d x^8+x^2+1 state %0d expected %0d", t, s2, m2));
      check(s3 == m3, $sformatf("t=%0d primitive state %0d expected %0d", t, s3, m3));
      if (p1 == 0 && s1 == 8'd33)  p1 = t;
      if (p2 == 0 && s2 == 8'd176) p2 = t;
      if (p3 == 0 && s3 == 8'd1)   p3 = t;
      if (t <= 255) seen[s3] = 1;
    end
    check(p1 == 63, $sformatf("period of x^8+x+1 is %0d", p1));
    check(p2 == 30, $sformatf("period of x^8+x^2+1 is %0d", p2));
    check(p3 == 255, $sformatf("period of primitive is %0d", p3));
    for (int v = 1; v < 256; v++) check(seen[v], $sformatf("state %0d never visited", v));
    // hold
    en = 0; m1 = s1;
    repeat (5) @(negedge clk);
    check(s1 == m1, "state changed with en low");
    // reload has priority over en
    en = 1; load = 1;
    @(negedge clk);
    load = 0;
    check(s1 == 8'd33 && s2 == 8'd176, "load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
