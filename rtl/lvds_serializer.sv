// lvds_serializer: W-to-1 serializer, most significant bit first.
//
// Each slot clock (clk) the parallel word tx_in is captured and a toggle bit
// flips. In the bit-clock domain (clk_ser, W times faster and phase aligned
// with clk, both from one PLL) a change of the toggle loads the captured word
// into a shift register, which then shifts out one bit per clk_ser cycle.
// The hardware this stands for is an FPGA LVDS transmitter clocked at
// 400 MHz on both edges; here a single-edge 800 MHz bit clock gives the same
// 1.25 ns bit time, which is this implementation's choice.
//
// Timing: a word entering on tx_in appears on tx_out a fixed number of bit
// clocks later and occupies exactly W consecutive bit times.
module lvds_serializer #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         clk_ser,
  input  logic         rst_n,
  input  logic [W-1:0] tx_in,
  output logic         tx_out
);
  logic [W-1:0] hold;
  logic         tog;
  logic         tog_s, tog_d;
  logic [W-1:0] shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold <= '0;
      tog  <= 1'b0;
    end else begin
      hold <= tx_in;
      tog  <= ~tog;
    end
  end

  always_ff @(posedge clk_ser or negedge rst_n) begin
    if (!rst_n) begin
      tog_s <= 1'b0;
      tog_d <= 1'b0;
      shreg <= '0;
    end else begin
      tog_s <= tog;
      tog_d <= tog_s;
      if (tog_s != tog_d) shreg <= hold;
      else                shreg <= {shreg[W-2:0], 1'b0};
    end
  end

  assign tx_out = shreg[W-1];
endmodule
