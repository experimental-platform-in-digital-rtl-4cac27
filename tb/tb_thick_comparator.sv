// tb_thick_comparator: checks the coarse PWM wave C1.
// Random count/VALOR pairs: c1 must equal (count < VALOR) of the previous
// clock. A full counter sweep per VALOR must give exactly VALOR high slots.
`timescale 1ns/1ps
module tb_thick_comparator;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] count = '0, valor = '0;
  logic       c1;
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;

  thick_comparator #(.CNT_W(8)) dut (.clk, .rst_n, .count, .valor, .c1);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit expected;
    int highs;
    repeat (2) @(negedge clk);
    check(c1 == 1'b0, "reset value");
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      count = 8'($urandom);
      valor = 8'($urandom);
      expected = (int'(count) < int'(valor));
      @(negedge clk);
      check(c1 == expected, "random compare");
    end
    foreach (valor_list[k]) begin
      valor = valor_list[k];
      highs = 0;
      for (int c = 0; c < 256; c++) begin
        count = 8'(c);
        @(negedge clk);
        highs += int'(c1);
      end
      check(highs == int'(valor_list[k]), "high slots per period");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] valor_list [6] = '{8'd0, 8'd1, 8'd64, 8'd168, 8'd254, 8'd255};
endmodule
