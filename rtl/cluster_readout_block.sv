// cluster_readout_block: the prompt-cluster path of one 128-strip bank,
// from the registered strip hits to one serial line.
//
// The bank's hits (registered on the rising BC edge in front of this block)
// go through the combinational fast cluster finder; the BC latch takes the
// 16-bit result on the falling BC edge if the serializer is ready; the
// serializer loads it on the next rising BC edge and sends it MSB first on
// the fast clock. At 640 MHz a hit pattern registered on BC edge k is sent
// during BC k+1, two BC edges after the crossing it belongs to.
//
// Interface: bank_hits (strip i = bit i), rate and training for the
// serializer; hit_word is the finder's combinational word, latched_word the
// BC latch content, sout the serial line. The chain of finder, latch and
// serializer with the Ready hand-back is the one of the design description.
module cluster_readout_block
  import sstt_pkg::*;
(
  input  logic                       bc_clk,
  input  logic                       fast_clk,
  input  logic                       rst_n,
  input  rate_e                      rate,
  input  logic                       training,
  input  logic [STRIPS_PER_BANK-1:0] bank_hits,
  output cluster_word_t              hit_word,
  output cluster_word_t              latched_word,
  output logic                       sout
);

  logic ready;

  fast_cluster_finder u_finder (
    .hits (bank_hits),
    .word (hit_word)
  );

  hit_location_latch u_latch (
    .bc_clk (bc_clk),
    .rst_n  (rst_n),
    .ready  (ready),
    .d      (hit_word),
    .q      (latched_word)
  );

  cluster_serializer u_ser (
    .bc_clk   (bc_clk),
    .fast_clk (fast_clk),
    .rst_n    (rst_n),
    .rate     (rate),
    .training (training),
    .word_in  (latched_word),
    .ready    (ready),
    .sout     (sout)
  );

endmodule
