// tb_fine_adjust: checks the serializer words built from C1 and the duty
// LSBs. C1 is driven as a coarse pulse of V slots per 256-slot period; the
// words of one period must hold 4*V + f ones (f = fine bits) when V > 0,
// the ones must be contiguous from the pulse start (MSB first), and the
// word one clock after each input must match the rule: C1 copied, or the
// thermometer pattern in the slot after C1 falls.
`timescale 1ns/1ps
module tb_fine_adjust;
  logic clk = 1'b0, rst_n = 1'b0;
  logic       c1 = 1'b0;
  logic [1:0] fine = '0;
  logic [3:0] word;
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;

  fine_adjust #(.SER_W(4), .FINE_W(2)) dut (.clk, .rst_n, .c1, .fine, .word);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, f, ones, runs;
    bit prev_c1, prev_bit, seen_fall;
    logic [3:0] expected;
    repeat (2) @(negedge clk);
    check(word == 4'b0000, "reset value");
    rst_n = 1'b1;
    prev_c1 = 1'b0;
    for (int t = 0; t < 40; t++) begin
      v = (t < 8) ? (t * 37) % 256 : int'($urandom_range(255));
      f = t % 4;
      fine = 2'(f);
      ones = 0; runs = 0; prev_bit = 1'b0; seen_fall = 1'b0;
      for (int c = 0; c < 256; c++) begin
        c1 = (c < v);
        if (prev_c1 && !c1) expected = (f == 0) ? 4'b0000 : (f == 1) ? 4'b1000 :
                                       (f == 2) ? 4'b1100 : 4'b1110;
        else                expected = {4{c1}};
        prev_c1 = c1;
        @(negedge clk);
        check(word == expected, "word rule");
        for (int b = 3; b >= 0; b--) begin
          ones += int'(word[b]);
          if (word[b] && !prev_bit) runs++;
          prev_bit = word[b];
        end
      end
      if (v > 0) begin
        check(ones == 4 * v + f, "ones per period");
        check(runs == 1, "single pulse");
      end else begin
        check(ones == 0, "zero coarse duty");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
