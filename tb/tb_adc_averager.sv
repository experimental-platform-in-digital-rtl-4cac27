// tb_adc_averager: checks the block averages of four A/D channels.
// Random two's-complement samples (full range on some blocks, a narrow
// band around a level on others) are fed on strobes spaced a few clocks
// apart. After every 16th strobe, valid must pulse for exactly one clock
// and each avg must equal floor(sum / 16) of that block's samples; avg
// must hold between blocks.
`timescale 1ns/1ps
module tb_adc_averager;
  localparam int NCH = 4, W = 10, L2 = 4, N = 1 << L2;
  logic clk = 1'b0, rst_n = 1'b0, sample = 1'b0;
  logic signed [W-1:0] din [NCH];
  logic signed [W-1:0] avg [NCH];
  logic valid;
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;

  adc_averager #(.NCH(NCH), .ADC_W(W), .AVG_LOG2(L2)) dut (.clk, .rst_n, .sample, .din, .avg, .valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum [NCH];
    int level, expv, gap;
    foreach (din[c]) din[c] = '0;
    repeat (2) @(negedge clk);
    check(valid == 1'b0, "reset valid");
    rst_n = 1'b1;
    for (int b = 0; b < 60; b++) begin
      foreach (sum[c]) sum[c] = 0;
      for (int k = 0; k < N; k++) begin
        foreach (din[c]) begin
          if (b % 2 == 0) din[c] = W'($urandom);
          else begin
            level = (b * 37 + c * 101) % 900 - 450;
            din[c] = W'(level + int'($urandom_range(8)) - 4);
          end
          sum[c] += int'(din[c]);
        end
        sample = 1'b1;
        @(negedge clk);
        sample = 1'b0;
        check(valid == (k == N - 1), "valid after the 16th sample only");
        if (k == N - 1)
          foreach (avg[c]) begin
            expv = (sum[c] >= 0) ? sum[c] / N : -((-sum[c] + N - 1) / N);
            check(int'(avg[c]) == expv, "average value");
          end
        gap = int'($urandom_range(3));
        repeat (gap) begin
          foreach (din[c]) din[c] = W'($urandom);   // not sampled
          @(negedge clk);
          check(valid == 1'b0, "valid is one clock");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
