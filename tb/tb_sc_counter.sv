// tb_sc_counter - self-checking test of sc_counter: counts the ones of a
// random stream only while en is high, clears on clr, and holds at the
// maximum instead of wrapping (checked with an 8-bit and a 4-bit counter).
module tb_sc_counter;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, bit_i = 0;
  logic [7:0] count;
  logic [3:0] count4;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sc_counter #(.W(8)) u8 (.clk, .rst_n, .clr, .en, .bit_i, .count);
  sc_counter #(.W(4)) u4 (.clk, .rst_n, .clr, .en, .bit_i, .count(count4));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    automatic int m = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(count == 0, "reset");
    for (int run = 0; run < 20; run++) begin
      clr = 1; @(negedge clk); clr = 0;
      check(count == 0 && count4 == 0, "clear");
      m = 0;
      for (int t = 0; t < 255; t++) begin
        en = ($urandom_range(3) != 0);
        bit_i = (($urandom_range(255)) < run * 13);
        if (en && bit_i) m++;
        @(negedge clk);
        check(int'(count) == m, $sformatf("run %0d count %0d expected %0d", run, count, m));
        check(int'(count4) == (m > 15 ? 15 : m), $sformatf("4-bit count %0d", count4));
      end
      en = 0;
    end
    // all ones: the 8-bit counter stops at 255
    clr = 1; @(negedge clk); clr = 0;
    en = 1; bit_i = 1;
    repeat (300) @(negedge clk);
    check(count == 8'd255, "saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
