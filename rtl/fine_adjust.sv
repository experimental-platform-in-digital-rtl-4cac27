// fine_adjust: builds the word the serializer sends in each 5 ns slot.
//
// A flip-flop keeps last slot's C1. In the one slot where C1 has just fallen
// (previous C1 high, current C1 low) the word is a thermometer pattern chosen
// by the duty LSBs -- 0000, 1000, 1100 or 1110 for 0..3 -- so the pulse is
// stretched by that many 1.25 ns bits past the coarse edge. In every other
// slot the word is C1 copied into all bits. The word is registered.
// Because the extra bits are added at a falling edge of C1, a duty whose
// coarse part is zero (1..3) gives no pulse at all; this follows the
// structure of the modulator.
//
// Interface: c1 and fine sampled at each rising clk edge; word valid one
// clock later, MSB sent first.
module fine_adjust #(
  parameter int unsigned SER_W  = 4,
  parameter int unsigned FINE_W = $clog2(SER_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              c1,
  input  logic [FINE_W-1:0] fine,
  output logic [SER_W-1:0]  word
);
  logic             c1_q;
  logic             sel_fine;
  logic [SER_W-1:0] pattern;

  assign pattern  = ~({SER_W{1'b1}} >> fine);   // 'fine' leading ones
  assign sel_fine = c1_q & ~c1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1_q <= 1'b0;
      word <= '0;
    end else begin
      c1_q <= c1;
      word <= sel_fine ? pattern : {SER_W{c1}};
    end
  end
endmodule
