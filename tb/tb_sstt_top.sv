// tb_sstt_top: end-to-end test of the full hybrid pair at its default size
// (10 inner and 10 outer chips, 40 serial lines, 20 tag memories).
//
// Random strip hits (runs of 1 to 4 strips, so some clusters are vetoed)
// are applied to all 20 chips every BC. The model computes each bank's
// cluster word with the run-length reference, stores tags for cluster
// pairs taken from random tests of random bank positions, and predicts the
// stub of every crossing. After the memories have cleared themselves, the
// memories are loaded, all lines are trained, and NSETS crossings are sent.
// The stub registers sampled at each boundary of the serial stub output
// must equal the predicted sequence, the serial stub words must equal the
// registers, the latched words of every chip must match the model, and the
// stub of a crossing must leave within 5 BCs. The two-line lookup is run
// beside it on the worked example (7E00 / 007E against a tag 03D at 7E7E).
// Each mechanism (training lock, veto, 1- and 2-cluster words, empty
// banks, 2-strip clusters, tag match, cross-bank match, overflow, two-line
// trigger) is counted and must occur.
// The finder outputs (hit_location) are checked against the model too.
// All parameters are at their defaults; the chip-to-position mapping, the
// lowest-position stub choice and FFFF for no stub checked here are this
// design's choices, the rest follows the design description.
module tb_sstt_top;
  import sstt_pkg::*;
  import tb_ref_pkg::*;

  localparam int NC = 10;
  localparam int NP = 2 * NC;
  localparam int NSETS = 120;

  logic [7:0] t = '0;
  logic bc_clk = 0, fast_clk = 1, rst_n = 0, training = 0;
  logic [255:0] inner_hits [NC], outer_hits [NC];
  logic wr_en = 0;
  logic [4:0]  wr_pos = '0;
  logic [15:0] wr_addr = '0;
  tag_entry_t  wr_data = '0;
  logic init_done;
  stub_t stub;
  logic stub_valid, stub_overflow, stub_sout;
  logic [31:0] inner_latched [NC], outer_latched [NC];
  logic [31:0] inner_hit_location [NC], outer_hit_location [NC];
  logic [1:0]  proto_sin = '0;
  logic proto_wr_en = 0;
  logic [15:0] proto_wr_addr = '0;
  tag_entry_t  proto_wr_data = '0;
  logic proto_init_done;
  logic [15:0] proto_par_out1, proto_par_out2;
  logic [15:0] proto_addr [4];
  logic [10:0] proto_trig_id;
  logic proto_trig_flag;

  int checks = 0, failures = 0;

  sstt_top dut (
    .bc_clk(bc_clk), .fast_clk(fast_clk), .rst_n(rst_n), .training(training),
    .inner_hits(inner_hits), .outer_hits(outer_hits),
    .wr_en(wr_en), .wr_pos(wr_pos), .wr_addr(wr_addr), .wr_data(wr_data),
    .init_done(init_done), .stub(stub), .stub_valid(stub_valid),
    .stub_overflow(stub_overflow), .stub_sout(stub_sout),
    .inner_hit_location(inner_hit_location), .outer_hit_location(outer_hit_location),
    .inner_latched(inner_latched), .outer_latched(outer_latched),
    .proto_sin(proto_sin), .proto_wr_en(proto_wr_en),
    .proto_wr_addr(proto_wr_addr), .proto_wr_data(proto_wr_data),
    .proto_init_done(proto_init_done), .proto_par_out1(proto_par_out1),
    .proto_par_out2(proto_par_out2), .proto_addr(proto_addr),
    .proto_trig_id(proto_trig_id), .proto_trig_flag(proto_trig_flag)
  );

  always #1 begin
    t = t + 8'd1;
    fast_clk = ~t[0];
    bc_clk   = t[4];
  end

  // ---------------------------------------------------------- stimulus
  logic [255:0] set_hin  [NSETS][NC];
  logic [255:0] set_hout [NSETS][NC];
  logic [15:0]  set_in  [NSETS][NP];
  logic [15:0]  set_out [NSETS][NP];
  tag_entry_t   mem_m [NP][logic [15:0]];

  int n_veto = 0, n_two_cl = 0, n_one_cl = 0, n_empty = 0, n_two_strip = 0;
  int n_hits = 0, n_ovf = 0, n_cross = 0, n_lock = 0, n_proto = 0;

  function automatic logic [7:0] in_byte(int s, int p, int k);
    logic [15:0] w = set_in[s][p];
    return (k < 3) ? w[7:0] : w[15:8];
  endfunction

  function automatic logic [7:0] out_byte(int s, int p, int k);
    case (k)
      0: return (p < NP - 1) ? set_out[s][p+1][15:8] : 8'hFF;
      1: return set_out[s][p][7:0];
      2: return set_out[s][p][15:8];
      3: return set_out[s][p][7:0];
      4: return set_out[s][p][15:8];
      default: return (p > 0) ? set_out[s][p-1][7:0] : 8'hFF;
    endcase
  endfunction

  // does a bank have a run of 3 or more strips
  function automatic bit has_long_run(logic [127:0] h);
    for (int i = 0; i < 126; i++) if (h[i] && h[i+1] && h[i+2]) return 1;
    return 0;
  endfunction

  task automatic count_word(logic [15:0] w, logic [127:0] h);
    if (w == 16'hFFFF) n_empty++;
    else if (w[7:0] == 8'hFF) n_one_cl++;
    else n_two_cl++;
    if ((w[15:8] != 8'hFF && w[8]) || (w[7:0] != 8'hFF && w[0])) n_two_strip++;
    if (has_long_run(h)) n_veto++;
  endtask

  logic [15:0] exp_stub [NSETS];
  logic        exp_valid [NSETS];
  logic        exp_ovf [NSETS];

  task automatic model();
    for (int s = 0; s < NSETS; s++) begin
      int nf;
      nf = 0;
      exp_stub[s] = 16'hFFFF; exp_valid[s] = 0;
      for (int p = NP - 1; p >= 0; p--) begin
        for (int k = 0; k < 6; k++) begin
          logic [15:0] a;
          a = {in_byte(s, p, k), out_byte(s, p, k)};
          if (a[15:8] != 8'hFF && a[7:0] != 8'hFF && mem_m[p].exists(a) && mem_m[p][a].valid) begin
            nf++;
            exp_stub[s] = {5'(p), mem_m[p][a].tag};
            exp_valid[s] = 1;
            if (k == 0 || k == 5) n_cross++;
            break;
          end
        end
      end
      exp_ovf[s] = (nf > 1);
      if (nf > 0) n_hits++;
      if (nf > 1) n_ovf++;
    end
  endtask

  // hits: applied after each rising BC edge; set s is registered on the
  // rising edge of BC number send_from + s + 1
  int bc_n = 0;
  int send_from = -1;
  always @(posedge bc_clk) begin
    bc_n++;
    @(negedge fast_clk);
    for (int c = 0; c < NC; c++) begin
      if (send_from >= 0 && bc_n >= send_from && bc_n < send_from + NSETS) begin
        inner_hits[c] <= set_hin[bc_n - send_from][c];
        outer_hits[c] <= set_hout[bc_n - send_from][c];
      end else begin
        inner_hits[c] <= '0;
        outer_hits[c] <= '0;
      end
    end
  end

  // finder and latched words: the set applied in BC k is registered on the
  // rising edge of BC k+1 and latched on its falling edge
  int lat_checks = 0;
  always @(negedge bc_clk) begin
    int s;
    s = bc_n - 1 - send_from;
    #1;
    if (send_from >= 0 && s >= 0 && s < NSETS && !training) begin
      for (int c = 0; c < NC; c++) begin
        checks++; lat_checks++;
        if (inner_latched[c] !== {set_in[s][2*c], set_in[s][2*c+1]} ||
            outer_latched[c] !== {set_out[s][2*c], set_out[s][2*c+1]}) begin
          failures++;
          $display("FAIL chip %0d set %0d latched %h/%h", c, s, inner_latched[c], outer_latched[c]);
        end
        checks++;
        if (inner_hit_location[c] !== {set_in[s][2*c], set_in[s][2*c+1]} ||
            outer_hit_location[c] !== {set_out[s][2*c], set_out[s][2*c+1]}) begin
          failures++;
          $display("FAIL chip %0d set %0d hit location %h/%h", c, s,
                   inner_hit_location[c], outer_hit_location[c]);
        end
      end
    end
  end

  // ---------------------------------------------------------- stub receiver
  int   out_phase = -1;    // fast cycle within the BC where stub words start
  int   fcyc = 0;
  logic prev_s = 0;
  logic [15:0] rx = '0;
  logic [15:0] seen_stub [$];
  logic        seen_valid [$];
  logic        seen_ovf [$];
  int          seen_bc [$];
  logic [15:0] start_stub;
  logic        rx_on = 0;

  always @(posedge bc_clk) fcyc = 0;
  always @(negedge fast_clk) begin
    // the stub line frames itself again while training: keep the phase of
    // the last rising step
    if (training && stub_sout && !prev_s) begin
      if (out_phase < 0) n_lock++;
      out_phase = fcyc;
    end
    prev_s = stub_sout;
    if (out_phase >= 0 && fcyc == out_phase) begin
      if (rx_on && !training) begin
        checks++;
        if (rx !== start_stub) begin
          failures++;
          $display("FAIL serial stub %h, register was %h", rx, start_stub);
        end
      end
      rx_on = !training;
      start_stub = stub;
      if (!training && send_from >= 0) begin
        seen_stub.push_back(stub);
        seen_valid.push_back(stub_valid);
        seen_ovf.push_back(stub_overflow);
        seen_bc.push_back(bc_n);
      end
    end
    rx = {rx[14:0], stub_sout};
    fcyc++;
  end

  // ---------------------------------------------------------- two-line lookup
  logic [15:0] p_cur1 = 16'hFF00, p_cur2 = 16'hFF00;
  logic [15:0] p_next1 = 16'hFFFF, p_next2 = 16'hFFFF;
  int          p_bit = 0;
  always @(posedge fast_clk) begin
    if (p_bit == 0) begin
      p_cur1 = training ? 16'hFF00 : p_next1;
      p_cur2 = training ? 16'hFF00 : p_next2;
      p_next1 = 16'hFFFF; p_next2 = 16'hFFFF;
    end
    proto_sin <= {p_cur2[15 - p_bit], p_cur1[15 - p_bit]};
    p_bit = (p_bit + 1) % 16;
  end
  always @(negedge fast_clk)
    if (proto_trig_flag && proto_par_out1 == 16'h7E00 && proto_par_out2 == 16'h007E) begin
      checks++;
      if (proto_trig_id !== 11'h03D || proto_addr[1] !== 16'h7E7E) begin
        failures++;
        $display("FAIL two-line lookup id %h", proto_trig_id);
      end else n_proto++;
    end

  // ---------------------------------------------------------- sequence
  task automatic mem_write(int p, logic [15:0] a, logic [10:0] tag);
    @(negedge fast_clk);
    wr_en = 1; wr_pos = 5'(p); wr_addr = a; wr_data = '{valid: 1'b1, tag: tag};
    mem_m[p][a] = wr_data;
    @(negedge fast_clk);
    wr_en = 0;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int match_at;
    for (int c = 0; c < NC; c++) begin inner_hits[c] = '0; outer_hits[c] = '0; end
    for (int s = 0; s < NSETS; s++)
      for (int c = 0; c < NC; c++) begin
        set_hin[s][c]  = {rand_bank(4), rand_bank(4)};
        set_hout[s][c] = {rand_bank(4), rand_bank(4)};
        for (int b = 0; b < 2; b++) begin
          set_in[s][2*c+b]  = ref_cluster_word(set_hin[s][c][b*128 +: 128]);
          set_out[s][2*c+b] = ref_cluster_word(set_hout[s][c][b*128 +: 128]);
          count_word(set_in[s][2*c+b], set_hin[s][c][b*128 +: 128]);
          count_word(set_out[s][2*c+b], set_hout[s][c][b*128 +: 128]);
        end
      end
    repeat (40) @(negedge fast_clk);
    rst_n = 1;
    wait (init_done && proto_init_done);
    for (int s = 0; s < NSETS; s++) begin
      if ($urandom_range(1, 0) == 0) begin
        int np;
        np = $urandom_range(4, 1);
        for (int k = 0; k < np; k++) begin
          int p, tt;
          logic [15:0] a;
          p = $urandom_range(NP - 1, 0);
          tt = $urandom_range(5, 0);
          a = {in_byte(s, p, tt), out_byte(s, p, tt)};
          if (a[15:8] != 8'hFF && a[7:0] != 8'hFF) mem_write(p, a, 11'($urandom));
        end
      end
    end
    @(negedge fast_clk);
    proto_wr_en = 1; proto_wr_addr = 16'h7E7E; proto_wr_data = '{valid: 1'b1, tag: 11'h03D};
    @(negedge fast_clk);
    proto_wr_en = 0;
    model();
    @(negedge bc_clk);
    training = 1;
    repeat (8) @(posedge bc_clk);
    @(negedge bc_clk);
    training = 0;
    send_from = bc_n + 3;
    wait (bc_n == send_from + 10);
    @(posedge fast_clk iff p_bit == 2);
    p_next1 = 16'h7E00; p_next2 = 16'h007E;
    wait (bc_n == send_from + NSETS + 8);
    // the stub of set s must be seen at entry match_at + s
    match_at = -1;
    for (int off = 0; off < 16 && match_at < 0; off++) begin
      bit ok;
      ok = 1;
      for (int s = 0; s < NSETS; s++)
        if (off + s >= seen_stub.size() || seen_stub[off + s] !== exp_stub[s] ||
            seen_valid[off + s] !== exp_valid[s] || seen_ovf[off + s] !== exp_ovf[s]) ok = 0;
      if (ok) match_at = off;
    end
    checks++;
    if (match_at < 0) begin
      failures++;
      $display("FAIL stub sequence does not match the model");
    end else begin
      checks += NSETS;
      // set s is registered on BC edge send_from+s+1; its stub register is
      // seen at the boundary sampled in BC seen_bc[match_at+s]
      checks++;
      if (seen_bc[match_at] - (send_from + 1) > 4) begin
        failures++;
        $display("FAIL latency %0d BC", seen_bc[match_at] - (send_from + 1));
      end
      $display("stub register of a crossing set %0d BC after its hits are registered",
               seen_bc[match_at] - (send_from + 1));
    end
    $display("lock %0d veto %0d two-cluster %0d one-cluster %0d empty %0d two-strip %0d",
             n_lock, n_veto, n_two_cl, n_one_cl, n_empty, n_two_strip);
    $display("tag hits %0d cross-bank %0d overflow %0d two-line triggers %0d latched checks %0d",
             n_hits, n_cross, n_ovf, n_proto, lat_checks);
    checks++;
    if (n_lock == 0 || n_veto == 0 || n_two_cl == 0 || n_one_cl == 0 || n_empty == 0 ||
        n_two_strip == 0 || n_hits == 0 || n_cross == 0 || n_ovf == 0 || n_proto == 0 ||
        lat_checks < NSETS * NC) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
