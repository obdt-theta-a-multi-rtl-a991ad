// tdc_channel: edge finder and time encoder of one TDC channel.
//
// Each 25 ns the channel's deserializer delivers 32 samples (bit 0 earliest).
// A rising edge is a 0-to-1 step between two neighbouring samples; the step
// into bit 0 uses the last sample of the previous word, so an edge on the
// word boundary is neither lost nor counted twice. The position of the first
// rising edge is the 5-bit fine time (0.78 ns bins); together with the coarse
// time (bunch crossing counter) and the channel number it forms the 25-bit
// hit word. Later rising edges in the same 25 ns are not encoded; extra_edge
// reports that one was dropped.
//
// Interface: word and bx are taken at the same clk edge; hit_valid, hit and
// extra_edge follow one cycle later and are valid for one cycle.
//
// Following the board: rising-edge measurement, 5-bit fine and 12-bit coarse
// time, channel number, 25-bit word. This design's choice: one hit per
// channel per 25 ns and the field order of the word.
module tdc_channel
  import obdt_pkg::*;
#(
  parameter int CH_ID = 0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [SAMPLES-1:0]  word,
  input  logic [COARSE_W-1:0] bx,
  output logic                hit_valid,
  output hit_t                hit,
  output logic                extra_edge
);
  logic               last;    // last sample of the previous word
  logic [SAMPLES-1:0] rise;    // rise[i]: step 0 -> 1 into sample i
  logic [FINE_W-1:0]  first;
  logic               found, more;

  assign rise = word & ~{word[SAMPLES-2:0], last};

  // Priority encoder: lowest set bit of rise.
  always_comb begin
    first = '0;
    found = 1'b0;
    for (int i = SAMPLES - 1; i >= 0; i--) begin
      if (rise[i]) begin
        first = FINE_W'(i);
        found = 1'b1;
      end
    end
  end

  // More than one bit set: clearing the lowest leaves something.
  assign more = |(rise & (rise - 1'b1));

  always_ff @(posedge clk) begin
    if (rst) begin
      last       <= 1'b0;
      hit_valid  <= 1'b0;
      hit        <= '0;
      extra_edge <= 1'b0;
    end else begin
      last       <= word[SAMPLES-1];
      hit_valid  <= found;
      extra_edge <= more;
      if (found) hit <= '{ch: CH_W'(CH_ID), coarse: bx, fine: first};
    end
  end

endmodule
