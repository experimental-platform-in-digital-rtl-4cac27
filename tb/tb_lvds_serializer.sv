// tb_lvds_serializer: checks the 4:1 serializer.
// A stream of random words is presented, one per 5 ns slot; tx_out is
// sampled in the middle of every 1.25 ns bit. Every word must come out MSB
// first as four consecutive bits, all at one fixed latency: the first bit
// starts two bit times (2.5 ns) after the slot clock edge that takes the
// word in.
`timescale 1ns/1ps
module tb_lvds_serializer;
  localparam int NW = 400;
  logic clk = 1'b0, clk_ser = 1'b1, rst_n = 1'b0;
  logic [3:0] tx_in = '0;
  logic       tx_out;
  int checks = 0, failures = 0;

  always #2.5   clk     = ~clk;
  always #0.625 clk_ser = ~clk_ser;   // rising edges coincide with clk's

  lvds_serializer #(.W(4)) dut (.clk, .clk_ser, .rst_n, .tx_in, .tx_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] words [NW];
  bit         bits  [4*NW + 64];
  int         nbits = 0;
  bit         capture = 1'b0;

  // sample every bit in its middle
  always @(negedge clk_ser) if (capture && nbits < 4*NW + 64) begin
    bits[nbits] = tx_out;
    nbits++;
  end

  initial begin
    int lat, best_lat, n_match;
    foreach (words[i]) words[i] = 4'($urandom);
    words[0] = 4'b1011;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    // present word i in the slot before rising clk edge number i; the bit
    // capture starts at that first edge, so bit 0 is the first bit after it
    tx_in = words[0];
    @(posedge clk);
    capture = 1'b1;
    for (int i = 1; i < NW; i++) begin
      @(negedge clk);
      tx_in = words[i];
    end
    @(negedge clk);
    tx_in = '0;
    repeat (12) @(negedge clk);
    // find the latency (in bits) at which the whole stream n_match
    best_lat = -1;
    for (lat = 0; lat < 16; lat++) begin
      n_match = 0;
      for (int i = 0; i < NW; i++)
        for (int b = 0; b < 4; b++)
          if (bits[lat + 4*i + b] == words[i][3-b]) n_match++;
      if (n_match == 4*NW) best_lat = lat;
    end
    check(best_lat == 2, "fixed latency of two bit times after capture");
    if (best_lat < 0) best_lat = 2;
    for (int i = 0; i < NW; i++)
      for (int b = 0; b < 4; b++)
        check(bits[best_lat + 4*i + b] == words[i][3-b], "serial bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
