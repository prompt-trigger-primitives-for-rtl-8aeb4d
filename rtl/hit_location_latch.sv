// hit_location_latch: the BC latch between the fast cluster finder and the
// serializer of one bank.
//
// The finder's word settles a few ns after the rising BC edge; this latch
// samples it on the falling BC edge, half a BC later, so the serializer can
// take a stable word on the next rising edge. While the serializer is still
// sending an older word (fast clocks slower than 640 MHz) it holds Ready
// low and the latch keeps its content: newer clusters are locked out rather
// than overwriting the word being sent, and accepted again as soon as the
// serializer can take a new word.
//
// Interface: d from the finder, ready from the serializer, q to the
// serializer. Timing: a flip-flop on the falling edge of bc_clk with an
// enable. Reset value FFFF (no clusters) is this design's choice.
module hit_location_latch
  import sstt_pkg::*;
(
  input  logic          bc_clk,
  input  logic          rst_n,
  input  logic          ready,
  input  cluster_word_t d,
  output cluster_word_t q
);

  always_ff @(negedge bc_clk or negedge rst_n) begin
    if (!rst_n)     q <= NULL_WORD;
    else if (ready) q <= d;
  end

endmodule
