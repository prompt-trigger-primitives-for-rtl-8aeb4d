// fast_cluster_finder: combinational prompt-cluster finder for one bank of
// 128 strips.
//
// A cluster is a run of 1 or 2 adjacent hit strips bounded by unhit strips
// or by the bank edge. Runs of 3 or more strips are vetoed: they are not
// reported and do not hide the clusters beyond them, so the finder prefers
// the narrow clusters of energetic tracks. The search runs from both ends
// of the bank towards the middle: the lowest-addressed cluster is reported
// in the upper byte of the word, the highest-addressed one in the lower
// byte. With a single cluster the lower byte is FF; with none the word is
// FFFF. Each cluster byte is {strip address of the lower strip, 2-strip
// flag}.
//
// Interface: hits[i] is strip i of the bank; word is the cluster word.
// Timing: pure combinational logic (the front-end target is about 6 ns),
// registered outside by the BC latch on the falling BC edge.
//
// The cluster rules, the FF null code and the byte order follow the design
// description; clusters more than two per bank are dropped (only the two
// outermost are kept), as described. Banks are independent, so a run
// touching the bank edge is closed by that edge.
module fast_cluster_finder
  import sstt_pkg::*;
#(
  parameter int unsigned N_STRIPS = STRIPS_PER_BANK
) (
  input  logic [N_STRIPS-1:0] hits,
  output cluster_word_t       word
);

  localparam int unsigned AW = $clog2(N_STRIPS);

  logic [N_STRIPS+1:0] h;        // hits with two unhit strips above the edge
  logic [N_STRIPS-1:0] one_strip;
  logic [N_STRIPS-1:0] two_strip;
  logic [N_STRIPS-1:0] start_ok;

  assign h = {2'b00, hits};

  always_comb begin
    for (int i = 0; i < N_STRIPS; i++) begin
      // strip i starts a run if it is hit and its lower neighbour is not
      if (i == 0) begin
        one_strip[i] = h[i] & ~h[i+1];
        two_strip[i] = h[i] & h[i+1] & ~h[i+2];
      end else begin
        one_strip[i] = h[i] & ~h[i-1] & ~h[i+1];
        two_strip[i] = h[i] & ~h[i-1] & h[i+1] & ~h[i+2];
      end
    end
    start_ok = one_strip | two_strip;
  end

  logic          found_lo, found_hi;
  logic [AW-1:0] lo_idx, hi_idx;

  // Search from the low end: the last assignment of the downward loop is
  // the lowest start.
  always_comb begin
    found_lo = 1'b0;
    lo_idx   = '0;
    for (int i = N_STRIPS - 1; i >= 0; i--) begin
      if (start_ok[i]) begin
        found_lo = 1'b1;
        lo_idx   = AW'(i);
      end
    end
  end

  // Search from the high end.
  always_comb begin
    found_hi = 1'b0;
    hi_idx   = '0;
    for (int i = 0; i < N_STRIPS; i++) begin
      if (start_ok[i]) begin
        found_hi = 1'b1;
        hi_idx   = AW'(i);
      end
    end
  end

  always_comb begin
    word = NULL_WORD;
    if (found_lo) begin
      word.lo.strip = STRIP_W'(lo_idx);
      word.lo.two   = two_strip[lo_idx];
    end
    if (found_hi && (hi_idx != lo_idx)) begin
      word.hi.strip = STRIP_W'(hi_idx);
      word.hi.two   = two_strip[hi_idx];
    end
  end

endmodule
