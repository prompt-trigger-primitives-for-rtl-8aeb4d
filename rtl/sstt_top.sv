// sstt_top: prompt trigger primitives for one seeded-track hybrid pair.
//
// Ten front-end chips on the inner hybrid and ten on the outer hybrid each
// find up to two narrow clusters per 128-strip bank every beam crossing and
// send them on one serial line per bank, 40 lines in all. The hybrid
// correlator receives the 40 lines, looks the inner/outer cluster pairs of
// each of the 20 bank positions up in its tag memories and sends one stub
// per crossing on stub_sout. Chip c of a hybrid feeds bank positions 2c
// (its strips 0..127) and 2c+1 (its strips 128..255).
//
// Beside this chain stands the two-line correlator lookup, the first form
// of the correlator: it has its own serial inputs proto_sin[1:0], its own
// memory write port and its own outputs, and shares only the fast clock,
// reset and training control.
//
// Clocks: bc_clk is the 40 MHz crossing clock, fast_clk the 640 MHz
// serializer clock, 16 times bc_clk with aligned rising edges. The front
// ends run at the 640 MHz rate, the rate the correlator receives; training
// puts every serial line into the BC-clock-copy mode used for framing and
// must be held for a few BCs after reset before data is sent.
//
// Hit inputs: inner_hits[c][s] is strip s of inner chip c, likewise
// outer_hits. inner_hit_location[c] is chip c's cluster finder output
// {bank 1 word, bank 2 word} for the crossing registered on the last rising
// BC edge; inner_latched[c] is the same after the falling-edge BC latch.
// Memory loading: wr_pos selects the bank position, wr_addr is
// {inner cluster byte, outer cluster byte}; write after init_done.
//
// From the design description: 10 chips per hybrid, 2 banks per chip,
// 20 correlator inputs per hybrid side, one correlator per hybrid pair with
// one 640 Mbit/s output. This design's choices: the chip-to-position
// mapping, the fixed 640 MHz rate of the front ends, and placing the
// two-line lookup in the same top with its own ports.
module sstt_top
  import sstt_pkg::*;
#(
  parameter int unsigned N_CHIPS = 10
) (
  input  logic                       bc_clk,
  input  logic                       fast_clk,
  input  logic                       rst_n,
  input  logic                       training,
  input  logic [STRIPS_PER_CHIP-1:0] inner_hits [N_CHIPS],
  input  logic [STRIPS_PER_CHIP-1:0] outer_hits [N_CHIPS],
  input  logic                       wr_en,
  input  logic [POS_W-1:0]           wr_pos,
  input  logic [MEM_ADDR_W-1:0]      wr_addr,
  input  tag_entry_t                 wr_data,
  output logic                       init_done,
  output stub_t                      stub,
  output logic                       stub_valid,
  output logic                       stub_overflow,
  output logic                       stub_sout,
  output logic [2*WORD_W-1:0]        inner_hit_location [N_CHIPS],
  output logic [2*WORD_W-1:0]        outer_hit_location [N_CHIPS],
  output logic [2*WORD_W-1:0]        inner_latched [N_CHIPS],
  output logic [2*WORD_W-1:0]        outer_latched [N_CHIPS],
  // two-line correlator lookup
  input  logic [1:0]                 proto_sin,
  input  logic                       proto_wr_en,
  input  logic [MEM_ADDR_W-1:0]      proto_wr_addr,
  input  tag_entry_t                 proto_wr_data,
  output logic                       proto_init_done,
  output logic [WORD_W-1:0]          proto_par_out1,
  output logic [WORD_W-1:0]          proto_par_out2,
  output logic [MEM_ADDR_W-1:0]      proto_addr [4],
  output logic [TAG_W-1:0]           proto_trig_id,
  output logic                       proto_trig_flag
);

  localparam int unsigned N_POS = N_CHIPS * BANKS_PER_CHIP;

  logic [N_POS-1:0] inner_lines, outer_lines;

  for (genvar c = 0; c < N_CHIPS; c++) begin : g_chip
    fast_cluster_feic u_inner (
      .bc_clk               (bc_clk),
      .fast_clk             (fast_clk),
      .rst_n                (rst_n),
      .rate                 (RATE_640),
      .training             (training),
      .hits_in              (inner_hits[c]),
      .hit_location         (inner_hit_location[c]),
      .latched_hit_location (inner_latched[c]),
      .sout                 (inner_lines[2*c +: 2])
    );

    fast_cluster_feic u_outer (
      .bc_clk               (bc_clk),
      .fast_clk             (fast_clk),
      .rst_n                (rst_n),
      .rate                 (RATE_640),
      .training             (training),
      .hits_in              (outer_hits[c]),
      .hit_location         (outer_hit_location[c]),
      .latched_hit_location (outer_latched[c]),
      .sout                 (outer_lines[2*c +: 2])
    );
  end

  hybrid_correlator #(.N_POS(N_POS)) u_corr (
    .fast_clk      (fast_clk),
    .rst_n         (rst_n),
    .training      (training),
    .sin_inner     (inner_lines),
    .sin_outer     (outer_lines),
    .wr_en         (wr_en),
    .wr_pos        (wr_pos),
    .wr_addr       (wr_addr),
    .wr_data       (wr_data),
    .init_done     (init_done),
    .stub          (stub),
    .stub_valid    (stub_valid),
    .stub_overflow (stub_overflow),
    .stub_sout     (stub_sout)
  );

  correlator_lookup u_proto (
    .fast_clk  (fast_clk),
    .rst_n     (rst_n),
    .training  (training),
    .sin1      (proto_sin[0]),
    .sin2      (proto_sin[1]),
    .wr_en     (proto_wr_en),
    .wr_addr   (proto_wr_addr),
    .wr_data   (proto_wr_data),
    .init_done (proto_init_done),
    .par_out1  (proto_par_out1),
    .par_out2  (proto_par_out2),
    .addr      (proto_addr),
    .trig_id   (proto_trig_id),
    .trig_flag (proto_trig_flag)
  );

endmodule
