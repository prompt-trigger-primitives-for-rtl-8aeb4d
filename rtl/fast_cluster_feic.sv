// fast_cluster_feic: the fast-cluster readout of one 256-channel front-end
// chip.
//
// The 256 strip hits of a crossing are stored in the pipeline input register
// on the rising BC edge; each half is one bank handled by its own cluster
// readout block and serial output. Bank 1 is strips 0..127, bank 2 strips
// 128..255 (strip 128+i is strip i of bank 2). hit_location and
// latched_hit_location show both banks' words side by side, bank 1 in the
// upper half, as {bank 1, bank 2}.
//
// Interface: hits_in (256 strips), rate selects the fast clock rate
// (160/320/640 MHz), training switches both serial lines to the BC-clock
// copy. sout[0] is the line of bank 1, sout[1] of bank 2.
// Timing: see cluster_readout_block; at 640 MHz the cluster word of the
// crossing registered on BC edge k goes out during BC k+1.
//
// The input register, the two independent banks and the two serial outputs
// follow the design description; which strips form bank 1 is this design's
// choice.
module fast_cluster_feic
  import sstt_pkg::*;
(
  input  logic                       bc_clk,
  input  logic                       fast_clk,
  input  logic                       rst_n,
  input  rate_e                      rate,
  input  logic                       training,
  input  logic [STRIPS_PER_CHIP-1:0] hits_in,
  output logic [2*WORD_W-1:0]        hit_location,
  output logic [2*WORD_W-1:0]        latched_hit_location,
  output logic [BANKS_PER_CHIP-1:0]  sout
);

  logic [STRIPS_PER_CHIP-1:0] pipe_q;

  always_ff @(posedge bc_clk or negedge rst_n) begin
    if (!rst_n) pipe_q <= '0;
    else        pipe_q <= hits_in;
  end

  cluster_word_t hit_word [BANKS_PER_CHIP];
  cluster_word_t lat_word [BANKS_PER_CHIP];

  for (genvar b = 0; b < BANKS_PER_CHIP; b++) begin : g_bank
    cluster_readout_block u_crb (
      .bc_clk       (bc_clk),
      .fast_clk     (fast_clk),
      .rst_n        (rst_n),
      .rate         (rate),
      .training     (training),
      .bank_hits    (pipe_q[b*STRIPS_PER_BANK +: STRIPS_PER_BANK]),
      .hit_word     (hit_word[b]),
      .latched_word (lat_word[b]),
      .sout         (sout[b])
    );
  end

  assign hit_location         = {hit_word[0], hit_word[1]};
  assign latched_hit_location = {lat_word[0], lat_word[1]};

endmodule
