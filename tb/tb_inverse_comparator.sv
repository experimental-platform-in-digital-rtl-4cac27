// tb_inverse_comparator: checks the inverse wave C1_INV.
// For each (VALOR, SEPARACION) the counter is swept over a period: C1_INV
// must be low for the first VALOR+SEP slots after the coarse wave starts
// (the coarse pulse plus the trailing guard) and for the last SEP slots
// (the leading guard), high in between, one clock after the count.
`timescale 1ns/1ps
module tb_inverse_comparator;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] count = '0, valor = '0, sep = '0;
  logic       c1_inv;
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;

  inverse_comparator #(.CNT_W(8)) dut (.clk, .rst_n, .count, .valor, .sep, .c1_inv);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s v=%0d s=%0d c=%0d at %0t", what, valor, sep, count, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int highs, v, s, expect_highs;
    bit expected;
    repeat (2) @(negedge clk);
    check(c1_inv == 1'b0, "reset value");
    rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      case (t)
        0: begin v = 100; s = 0;   end
        1: begin v = 100; s = 5;   end
        2: begin v = 0;   s = 3;   end
        3: begin v = 255; s = 1;   end
        4: begin v = 200; s = 40;  end   // guard swallows the whole gap
        5: begin v = 128; s = 255; end
        default: begin v = int'($urandom_range(255)); s = int'($urandom_range(40)); end
      endcase
      valor = 8'(v);
      sep   = 8'(s);
      highs = 0;
      for (int c = 0; c < 256; c++) begin
        count = 8'(c);
        // low during [0, v) (coarse pulse), [v, v+s) and [256-s, 256) (guards)
        expected = !(c < v + s) && !(c >= 256 - s);
        @(negedge clk);
        check(c1_inv == expected, "slot value");
        highs += int'(c1_inv);
      end
      expect_highs = 256 - v - 2 * s;
      if (expect_highs < 0) expect_highs = 0;
      check(highs == expect_highs, "high slots per period");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
