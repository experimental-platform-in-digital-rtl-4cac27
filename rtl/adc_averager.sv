// adc_averager: running block averages of the A/D converter readings.
//
// The board carries NCH A/D converters that read the converter's output
// voltage and current; the FPGA reports their readings as averages. Each
// channel adds its two's-complement sample into an accumulator on every
// sample strobe (a CLK_ADC rising edge). After 2^AVG_LOG2 samples the
// accumulators are divided by the sample count (an arithmetic shift, so the
// result rounds toward minus infinity), the averages are published on avg
// with a one-clock 'valid' pulse, and the accumulators restart.
// That the readings are averaged is taken from the design; the block
// length, the rounding and the interface are this implementation's choices.
//
// Timing: avg and valid change one clock after the strobe that completes a
// block; avg holds until the next block completes.
module adc_averager #(
  parameter int unsigned NCH      = 4,
  parameter int unsigned ADC_W    = 10,
  parameter int unsigned AVG_LOG2 = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    sample,
  input  logic signed [ADC_W-1:0] din   [NCH],
  output logic signed [ADC_W-1:0] avg   [NCH],
  output logic                    valid
);
  localparam int unsigned ACC_W = ADC_W + AVG_LOG2;

  logic [AVG_LOG2-1:0] n_q;
  logic                last;
  assign last = &n_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q   <= '0;
      valid <= 1'b0;
    end else begin
      valid <= sample && last;
      if (sample) n_q <= n_q + 1'b1;
    end
  end

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic signed [ACC_W-1:0] acc_q, acc_sum;
    assign acc_sum = acc_q + ACC_W'(din[c]);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        acc_q  <= '0;
        avg[c] <= '0;
      end else if (sample) begin
        if (last) begin
          avg[c] <= ADC_W'(acc_sum >>> AVG_LOG2);
          acc_q  <= '0;
        end else begin
          acc_q  <= acc_sum;
        end
      end
    end
  end
endmodule
