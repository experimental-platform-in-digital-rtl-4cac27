// thick_comparator: the coarse ("thickness adjustment") PWM wave.
//
// C1 is high while the slot counter is below VALOR, the eight most
// significant duty bits, so its width is VALOR slots of 5 ns. The compare is
// registered, as in the clocked comparator of the modulator, so C1 follows
// the counter by one clock. VALOR = 0 keeps C1 low for the whole period.
//
// Interface: count and valor are sampled on each rising clk edge; c1 is a
// registered output. Reset (asynchronous, active low) clears c1.
module thick_comparator #(
  parameter int unsigned CNT_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] count,
  input  logic [CNT_W-1:0] valor,
  output logic             c1
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c1 <= 1'b0;
    else        c1 <= (count < valor);
  end
endmodule
