// tb_pwm_timebase: checks the PWM counter and its shifted copies.
// After reset, every clock: count[0] must step by one modulo 256, each
// count[p] must trail count[0] by p quarter periods, and wrap[p] must mark
// count[p] == 255. The period of wrap[0] must be 256 clocks (1.28 us).
`timescale 1ns/1ps
module tb_pwm_timebase;
  localparam int CNT_W = 8, NPHASE = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [CNT_W-1:0] count [NPHASE];
  logic             wrap  [NPHASE];
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;

  pwm_timebase #(.CNT_W(CNT_W), .NPHASE(NPHASE)) dut (.clk, .rst_n, .count, .wrap);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect0, last_wrap, nwrap;
    last_wrap = -1; nwrap = 0;
    repeat (3) @(negedge clk);
    check(count[0] == 0, "count after reset");
    rst_n = 1'b1;
    expect0 = 0;
    for (int cyc = 0; cyc < 778; cyc++) begin
      @(negedge clk);
      expect0 = (expect0 + 1) % 256;
      check(count[0] == CNT_W'(expect0), "count[0] step");
      for (int p = 0; p < NPHASE; p++) begin
        check(count[p] == CNT_W'((expect0 - 64 * p + 1024) % 256), "phase offset");
        check(wrap[p] == (count[p] == 8'hFF), "wrap flag");
      end
      if (wrap[0]) begin
        if (last_wrap >= 0) check(cyc - last_wrap == 256, "period 256 clocks");
        last_wrap = cyc;
        nwrap++;
      end
    end
    check(nwrap == 3, "number of periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
