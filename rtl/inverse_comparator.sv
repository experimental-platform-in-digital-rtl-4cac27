// inverse_comparator: the inverse wave C1_INV for the complementary switch.
//
// C1_INV is the complement of the coarse wave C1 (duty 1-d) pulled in by a
// guard time of SEPARACION slots on both sides: it goes low SEPARACION slots
// before C1 rises and comes back high SEPARACION slots after C1 falls, so the
// two switches are never driven on together. With C1 high for counts
// [0, VALOR), C1_INV is high for counts [VALOR+SEP, 2^CNT_W-SEP). The wave
// has 5 ns (one slot) resolution. The compare is done one bit wider than the
// counter so large VALOR+SEP values keep C1_INV low instead of wrapping.
//
// Interface: like thick_comparator, registered, one clock after count.
module inverse_comparator #(
  parameter int unsigned CNT_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] count,
  input  logic [CNT_W-1:0] valor,
  input  logic [CNT_W-1:0] sep,
  output logic             c1_inv
);
  logic [CNT_W:0] cnt_w, lo_edge, hi_edge;
  assign cnt_w   = {1'b0, count};
  assign lo_edge = {1'b0, valor} + {1'b0, sep};          // first high slot
  assign hi_edge = (CNT_W+1)'(1 << CNT_W) - {1'b0, sep}; // first low slot

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c1_inv <= 1'b0;
    else        c1_inv <= (cnt_w >= lo_edge) && (cnt_w < hi_edge);
  end
endmodule
