// hybrid_correlator: correlator chip for one pair of aligned hybrids, an
// inner and an outer one, in a seeded track layer.
//
// Each hybrid carries 10 front-end chips, 20 banks of 128 strips, so the
// chip receives 20 inner and 20 outer serial cluster lines. Bank position p
// (0..19) pairs inner bank p with the outer bank above it. Every line is
// deserialized; once the words of all 40 lines for a crossing have arrived,
// they are taken in together and the 20 bank positions are searched in
// parallel, each with its own tag memory.
//
// Clusters are numbered along the hybrid in order of strip address: bank p
// holds cluster n = 2p (its first, lower cluster) and n+1 = 2p+1 (its
// second). Stiff tracks connect an inner cluster with the outer cluster of
// the same number or a neighbouring one, so each position runs six
// sequential lookups, one per fast clock, in this order:
//   inner n+1 / outer n+2,  inner n+1 / outer n+1,  inner n+1 / outer n,
//   inner n   / outer n+1,  inner n   / outer n,    inner n   / outer n-1
// where outer n+2 is the first cluster of outer bank p+1 and outer n-1 the
// second cluster of outer bank p-1. The memory address is
// {inner cluster byte, outer cluster byte}. A lookup involving a missing
// cluster (FF) is ignored. The first tag found ends the position's search.
//
// After the six lookups the lowest bank position with a tag is sent as the
// crossing's 16-bit stub {position, tag}, MSB first at the fast clock on
// stub_sout, one stub per BC (FFFF when there is none). When more than one
// position found a tag, stub_overflow pulses: the others are dropped, as
// one 640 Mbps line carries one stub per crossing. In training mode the
// output carries FF00, a copy of the BC clock, like the front-end chips.
//
// Interface: sin_inner/sin_outer[p] lines of bank position p; training;
// memory of position wr_pos loaded through wr_en/wr_addr/wr_data after
// init_done; stub/stub_valid/stub_overflow show the stub chosen each BC.
// Timing: a single 640 MHz domain (16 fast clocks per BC). The stub leaves
// 7 fast clocks after the last input word of the crossing completes, so a
// hit reaches the stub line about 3 BC after its crossing is registered in
// the front end.
//
// The six-test order, the 16-bit address, the 5-bit position and 11-bit tag
// and the one-stub-per-BC output follow the design description. Edge
// positions have no neighbour correlator here and treat the missing
// neighbour's cluster as absent. Which stub wins, the FFFF idle word, the
// training output and the stub field order are this design's choices.
module hybrid_correlator
  import sstt_pkg::*;
#(
  parameter int unsigned N_POS = 20
) (
  input  logic                  fast_clk,
  input  logic                  rst_n,
  input  logic                  training,
  input  logic [N_POS-1:0]      sin_inner,
  input  logic [N_POS-1:0]      sin_outer,
  input  logic                  wr_en,
  input  logic [POS_W-1:0]      wr_pos,
  input  logic [MEM_ADDR_W-1:0] wr_addr,
  input  tag_entry_t            wr_data,
  output logic                  init_done,
  output stub_t                 stub,
  output logic                  stub_valid,
  output logic                  stub_overflow,
  output logic                  stub_sout
);

  localparam int unsigned N_LINES = 2 * N_POS;
  localparam int unsigned N_TESTS = 6;

  // ---------------------------------------------------------------- inputs
  logic [N_LINES-1:0] sin_all;
  assign sin_all = {sin_outer, sin_inner};

  logic [WORD_W-1:0] des_word [N_LINES];
  logic [N_LINES-1:0] des_valid;

  for (genvar l = 0; l < N_LINES; l++) begin : g_des
    cluster_deserializer u_des (
      .fast_clk   (fast_clk),
      .rst_n      (rst_n),
      .training   (training),
      .sin        (sin_all[l]),
      .word       (des_word[l]),
      .word_valid (des_valid[l])
    );
  end

  // Collect one word from every line, then start a search.
  logic [N_LINES-1:0] fresh;
  logic [N_LINES-1:0] fresh_n;
  logic [WORD_W-1:0]  hold [N_LINES];
  cluster_word_t      in_q  [N_POS];
  cluster_word_t      out_q [N_POS];
  logic               start;

  assign fresh_n = fresh | des_valid;
  assign start   = &fresh_n;

  always_ff @(posedge fast_clk or negedge rst_n) begin
    if (!rst_n) begin
      fresh <= '0;
      for (int l = 0; l < int'(N_LINES); l++) hold[l] <= '0;
      for (int p = 0; p < int'(N_POS); p++) begin
        in_q[p]  <= NULL_WORD;
        out_q[p] <= NULL_WORD;
      end
    end else begin
      for (int l = 0; l < int'(N_LINES); l++)
        if (des_valid[l]) hold[l] <= des_word[l];
      if (start) begin
        fresh <= '0;
        for (int p = 0; p < int'(N_POS); p++) begin
          in_q[p]  <= des_valid[p]       ? des_word[p]       : hold[p];
          out_q[p] <= des_valid[N_POS+p] ? des_word[N_POS+p] : hold[N_POS+p];
        end
      end else begin
        fresh <= fresh_n;
      end
    end
  end

  // ---------------------------------------------------------------- search
  logic       busy;
  logic [2:0] test;
  logic       done;

  always_ff @(posedge fast_clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      test <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      // Outside training the lines deliver one word per 16 fast clocks, so
      // a search (6 clocks) always ends before the next set of words.
      assert (!(start && busy) || training)
        else $error("hybrid_correlator: new words while a search is running");
      if (start) begin
        busy <= 1'b1;
        test <= '0;
      end else if (busy) begin
        if (test == 3'(N_TESTS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          test <= test + 3'd1;
        end
      end
    end
  end

  logic [N_POS-1:0] found;
  logic [TAG_W-1:0] found_tag [N_POS];
  logic [N_POS-1:0] mem_ready;

  for (genvar p = 0; p < N_POS; p++) begin : g_pos
    cluster_t out_next_lo, out_prev_hi;
    cluster_t in_c, out_c;
    logic [MEM_ADDR_W-1:0] rd_addr [1];
    tag_entry_t            rd_data [1];

    if (p < N_POS - 1) begin : g_next
      assign out_next_lo = out_q[p+1].lo;
    end else begin : g_no_next
      assign out_next_lo = NULL_CLUSTER;
    end
    if (p > 0) begin : g_prev
      assign out_prev_hi = out_q[p-1].hi;
    end else begin : g_no_prev
      assign out_prev_hi = NULL_CLUSTER;
    end

    always_comb begin
      case (test)
        3'd0:    begin in_c = in_q[p].hi; out_c = out_next_lo;  end
        3'd1:    begin in_c = in_q[p].hi; out_c = out_q[p].hi;  end
        3'd2:    begin in_c = in_q[p].hi; out_c = out_q[p].lo;  end
        3'd3:    begin in_c = in_q[p].lo; out_c = out_q[p].hi;  end
        3'd4:    begin in_c = in_q[p].lo; out_c = out_q[p].lo;  end
        default: begin in_c = in_q[p].lo; out_c = out_prev_hi;  end
      endcase
      rd_addr[0] = {in_c, out_c};
    end

    tag_memory #(.ADDR_W(MEM_ADDR_W), .N_RD(1)) u_mem (
      .clk       (fast_clk),
      .rst_n     (rst_n),
      .init_done (mem_ready[p]),
      .wr_en     (wr_en && (wr_pos == POS_W'(p))),
      .wr_addr   (wr_addr),
      .wr_data   (wr_data),
      .rd_addr   (rd_addr),
      .rd_data   (rd_data)
    );

    always_ff @(posedge fast_clk or negedge rst_n) begin
      if (!rst_n) begin
        found[p]     <= 1'b0;
        found_tag[p] <= '0;
      end else if (start) begin
        found[p]     <= 1'b0;
      end else if (busy && !found[p] && rd_data[0].valid &&
                   (in_c != NULL_CLUSTER) && (out_c != NULL_CLUSTER)) begin
        found[p]     <= 1'b1;
        found_tag[p] <= rd_data[0].tag;
      end
    end
  end

  assign init_done = &mem_ready;

  // ---------------------------------------------------------------- output
  stub_t      pick;
  logic       pick_valid;
  logic [5:0] n_found;

  always_comb begin
    pick       = NULL_STUB;
    pick_valid = 1'b0;
    n_found    = '0;
    for (int p = N_POS - 1; p >= 0; p--) begin
      if (found[p]) begin
        pick.pos   = POS_W'(p);
        pick.tag   = found_tag[p];
        pick_valid = 1'b1;
        n_found    = n_found + 6'd1;
      end
    end
  end

  logic [WORD_W-1:0] out_sh;

  always_ff @(posedge fast_clk or negedge rst_n) begin
    if (!rst_n) begin
      stub          <= NULL_STUB;
      stub_valid    <= 1'b0;
      stub_overflow <= 1'b0;
      out_sh        <= '0;
    end else begin
      stub_overflow <= 1'b0;
      if (done) begin
        stub          <= pick;
        stub_valid    <= pick_valid;
        stub_overflow <= (n_found > 6'd1);
        out_sh        <= training ? training_word(RATE_640) : pick;
      end else begin
        out_sh <= {out_sh[WORD_W-2:0], 1'b0};
      end
    end
  end

  assign stub_sout = out_sh[WORD_W-1];

endmodule
