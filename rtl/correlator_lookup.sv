// correlator_lookup: two-line correlator lookup, the first form of the
// correlator chip.
//
// Two serial cluster lines (one bank each) are deserialized. When the words
// of both lines for a crossing have arrived they are taken together into
// par_out1 and par_out2. Four candidate memory addresses are formed from
// their bytes (the upper byte of a word is its first cluster, the lower byte
// its second):
//   addr[0] = {par_out1[15:8], par_out2[15:8]}
//   addr[1] = {par_out1[15:8], par_out2[7:0]}
//   addr[2] = {par_out2[15:8], par_out1[7:0]}
//   addr[3] = {par_out2[15:8], par_out1[15:8]}
// and looked up in the tag memory through four read ports. If any holds a
// tag, trig_flag is raised and trig_id carries the tag of the first hit in
// the order addr[0]..addr[3]. For example, 7E00 on line 1 and 007E on
// line 2 give the addresses 7E00, 7E7E, 0000 and 007E.
//
// Interface: sin1/sin2 serial lines; training frames them; the memory is
// loaded through wr_en/wr_addr/wr_data after init_done.
// Timing: one fast clock domain; the parallel words, addresses and lookup
// result all change on the fast clock edge after the later of the two words
// completes, and hold for one BC.
//
// The address pairing is taken from the example lookup of the design
// description and reproduces it; which tag wins when several addresses hit
// is this design's choice.
module correlator_lookup
  import sstt_pkg::*;
(
  input  logic                  fast_clk,
  input  logic                  rst_n,
  input  logic                  training,
  input  logic                  sin1,
  input  logic                  sin2,
  input  logic                  wr_en,
  input  logic [MEM_ADDR_W-1:0] wr_addr,
  input  tag_entry_t            wr_data,
  output logic                  init_done,
  output logic [WORD_W-1:0]     par_out1,
  output logic [WORD_W-1:0]     par_out2,
  output logic [MEM_ADDR_W-1:0] addr [4],
  output logic [TAG_W-1:0]      trig_id,
  output logic                  trig_flag
);

  logic [WORD_W-1:0] w1, w2;
  logic              v1, v2;

  cluster_deserializer u_des1 (
    .fast_clk (fast_clk), .rst_n (rst_n), .training (training),
    .sin (sin1), .word (w1), .word_valid (v1)
  );

  cluster_deserializer u_des2 (
    .fast_clk (fast_clk), .rst_n (rst_n), .training (training),
    .sin (sin2), .word (w2), .word_valid (v2)
  );

  // Pair the two lines' words of one crossing.
  logic              f1, f2;
  logic [WORD_W-1:0] h1, h2;
  logic              f1_n, f2_n;
  logic [WORD_W-1:0] h1_n, h2_n;

  always_comb begin
    f1_n = f1 | v1;
    f2_n = f2 | v2;
    h1_n = v1 ? w1 : h1;
    h2_n = v2 ? w2 : h2;
  end

  always_ff @(posedge fast_clk or negedge rst_n) begin
    if (!rst_n) begin
      f1 <= 1'b0; f2 <= 1'b0;
      h1 <= '0;   h2 <= '0;
      par_out1 <= '0;
      par_out2 <= '0;
    end else begin
      h1 <= h1_n;
      h2 <= h2_n;
      if (f1_n && f2_n) begin
        par_out1 <= h1_n;
        par_out2 <= h2_n;
        f1 <= 1'b0;
        f2 <= 1'b0;
      end else begin
        f1 <= f1_n;
        f2 <= f2_n;
      end
    end
  end

  always_comb begin
    addr[0] = {par_out1[15:8], par_out2[15:8]};
    addr[1] = {par_out1[15:8], par_out2[7:0]};
    addr[2] = {par_out2[15:8], par_out1[7:0]};
    addr[3] = {par_out2[15:8], par_out1[15:8]};
  end

  tag_entry_t rd [4];

  tag_memory #(.ADDR_W(MEM_ADDR_W), .N_RD(4)) u_mem (
    .clk       (fast_clk),
    .rst_n     (rst_n),
    .init_done (init_done),
    .wr_en     (wr_en),
    .wr_addr   (wr_addr),
    .wr_data   (wr_data),
    .rd_addr   (addr),
    .rd_data   (rd)
  );

  always_comb begin
    trig_flag = 1'b0;
    trig_id   = '0;
    for (int k = 3; k >= 0; k--) begin
      if (rd[k].valid) begin
        trig_flag = 1'b1;
        trig_id   = rd[k].tag;
      end
    end
  end

endmodule
