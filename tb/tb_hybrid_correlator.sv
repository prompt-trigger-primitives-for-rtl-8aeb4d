// tb_hybrid_correlator: 40 model transmitters send random cluster words
// (0, 1 or 2 clusters per bank, lower cluster first, FF when absent) to the
// correlator after a training phase. Tags are stored for cluster pairs
// picked from the six tests of random bank positions, including the
// cross-bank tests. A model runs the six tests per position in order,
// keeps the first tag, picks the lowest position and flags overflow when
// several positions found one. The stub, valid and overflow outputs seen
// at each output word boundary must equal the model's sequence, and the
// serial stub line must carry the same 16-bit words.
// The six-test order and the 2^16-entry memories follow the design
// description; the first-tag-wins, lowest-position and overflow rules
// checked here are this design's choices.
module tb_hybrid_correlator;
  import sstt_pkg::*;

  localparam int NP = 20;
  localparam int NSETS = 160;

  logic fast_clk = 0, rst_n = 0, training = 0;
  logic [NP-1:0] sin_inner = '0, sin_outer = '0;
  logic wr_en = 0;
  logic [4:0]  wr_pos = '0;
  logic [15:0] wr_addr = '0;
  tag_entry_t  wr_data = '0;
  logic init_done;
  stub_t stub;
  logic stub_valid, stub_overflow, stub_sout;
  int checks = 0, failures = 0;

  hybrid_correlator dut (
    .fast_clk(fast_clk), .rst_n(rst_n), .training(training),
    .sin_inner(sin_inner), .sin_outer(sin_outer), .wr_en(wr_en),
    .wr_pos(wr_pos), .wr_addr(wr_addr), .wr_data(wr_data),
    .init_done(init_done), .stub(stub), .stub_valid(stub_valid),
    .stub_overflow(stub_overflow), .stub_sout(stub_sout)
  );

  always #1 fast_clk = ~fast_clk;

  // ---------------------------------------------------------- stimulus
  logic [15:0] set_in  [NSETS][NP];
  logic [15:0] set_out [NSETS][NP];
  tag_entry_t  mem_m [NP][logic [15:0]];

  function automatic logic [15:0] gen_word();
    int n, a, b;
    logic [7:0] c0, c1;
    n = $urandom_range(2, 0);
    a = $urandom_range(120, 0);
    b = $urandom_range(127, a + 3);
    c0 = {7'(a), 1'($urandom)};
    c1 = {7'(b), 1'($urandom)};
    if (n == 0) return 16'hFFFF;
    if (n == 1) return {c0, 8'hFF};
    return {c0, c1};
  endfunction

  function automatic logic [7:0] in_byte(int s, int p, int t);
    logic [15:0] w = set_in[s][p];
    return (t < 3) ? w[7:0] : w[15:8];
  endfunction

  function automatic logic [7:0] out_byte(int s, int p, int t);
    case (t)
      0: return (p < NP - 1) ? set_out[s][p+1][15:8] : 8'hFF;
      1: return set_out[s][p][7:0];
      2: return set_out[s][p][15:8];
      3: return set_out[s][p][7:0];
      4: return set_out[s][p][15:8];
      default: return (p > 0) ? set_out[s][p-1][7:0] : 8'hFF;
    endcase
  endfunction

  logic [15:0] exp_stub [NSETS];
  logic        exp_valid [NSETS];
  logic        exp_ovf [NSETS];
  int          n_hits = 0, n_ovf = 0, n_cross = 0;

  task automatic model();
    for (int s = 0; s < NSETS; s++) begin
      int nf;
      nf = 0;
      exp_stub[s] = 16'hFFFF; exp_valid[s] = 0;
      for (int p = NP - 1; p >= 0; p--) begin
        for (int t = 0; t < 6; t++) begin
          logic [15:0] a;
          a = {in_byte(s, p, t), out_byte(s, p, t)};
          if (a[15:8] != 8'hFF && a[7:0] != 8'hFF && mem_m[p].exists(a) && mem_m[p][a].valid) begin
            nf++;
            exp_stub[s] = {5'(p), mem_m[p][a].tag};
            exp_valid[s] = 1;
            if (t == 0 || t == 5) n_cross++;
            break;
          end
        end
      end
      exp_ovf[s] = (nf > 1);
      if (nf > 0) n_hits++;
      if (nf > 1) n_ovf++;
    end
  endtask

  // ---------------------------------------------------------- transmitters
  int bitn = 0, frame = 0;
  int send_from = -1;
  logic [15:0] cur_in [NP], cur_out [NP];
  always @(posedge fast_clk) begin
    if (bitn == 0) begin
      for (int p = 0; p < NP; p++) begin
        if (training) begin
          cur_in[p] = 16'hFF00; cur_out[p] = 16'hFF00;
        end else if (send_from >= 0 && frame >= send_from && frame < send_from + NSETS) begin
          cur_in[p] = set_in[frame - send_from][p]; cur_out[p] = set_out[frame - send_from][p];
        end else begin
          cur_in[p] = 16'hFFFF; cur_out[p] = 16'hFFFF;
        end
      end
    end
    for (int p = 0; p < NP; p++) begin
      sin_inner[p] <= cur_in[p][15 - bitn];
      sin_outer[p] <= cur_out[p][15 - bitn];
    end
    bitn = (bitn + 1) % 16;
    if (bitn == 0) frame++;
  end

  // ---------------------------------------------------------- receiver
  int   out_phase = -1;
  logic prev_s = 0;
  logic [15:0] rx = '0;
  int   rx_bits = 0;
  logic [15:0] seen_stub [$];
  logic        seen_valid [$];
  logic        seen_ovf [$];
  logic [15:0] start_stub;
  logic        rx_on = 0;

  always @(negedge fast_clk) begin
    if (training && stub_sout && !prev_s) out_phase = bitn;
    prev_s = stub_sout;
    if (out_phase >= 0 && bitn == out_phase) begin
      if (rx_on && !training) begin
        checks++;
        if (rx !== start_stub) begin
          failures++;
          $display("FAIL serial stub %h, register was %h", rx, start_stub);
        end
      end
      rx_on = !training;
      start_stub = stub;
      if (!training) begin
        seen_stub.push_back(stub);
        seen_valid.push_back(stub_valid);
        seen_ovf.push_back(stub_overflow);
      end
    end
    rx = {rx[14:0], stub_sout};
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
    #3000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int match_at;
    for (int s = 0; s < NSETS; s++)
      for (int p = 0; p < NP; p++) begin
        set_in[s][p] = gen_word();
        set_out[s][p] = gen_word();
      end
    repeat (3) @(negedge fast_clk);
    rst_n = 1;
    wait (init_done);
    // tags: in half of the sets, one to four positions get a tag on a
    // random one of their six tests
    for (int s = 0; s < NSETS; s++) begin
      if ($urandom_range(1, 0) == 0) begin
        int np;
        np = $urandom_range(4, 1);
        for (int k = 0; k < np; k++) begin
          int p, t;
          logic [15:0] a;
          p = $urandom_range(NP - 1, 0);
          t = $urandom_range(5, 0);
          a = {in_byte(s, p, t), out_byte(s, p, t)};
          if (a[15:8] != 8'hFF && a[7:0] != 8'hFF) mem_write(p, a, 11'($urandom));
        end
      end
    end
    model();
    @(posedge fast_clk iff bitn == 0);
    training = 1;
    repeat (6 * 16) @(posedge fast_clk);
    @(posedge fast_clk iff bitn == 4);
    training = 0;
    send_from = frame + 3;
    wait (frame == send_from + NSETS + 6);
    // find where the expected sequence sits in what was seen
    match_at = -1;
    for (int off = 0; off < 12 && match_at < 0; off++) begin
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
      for (int s = 0; s < 8; s++)
        $display("  exp %h %b %b  seen %h %b %b", exp_stub[s], exp_valid[s], exp_ovf[s],
                 seen_stub[s+4], seen_valid[s+4], seen_ovf[s+4]);
    end else begin
      checks += NSETS;
      // latency: sets start 3 frames after release; the stub of a set must
      // come within 2 frames after the set's words were sent
      checks++;
      if (match_at > 3 + 2) begin
        failures++;
        $display("FAIL latency: match at %0d", match_at);
      end
    end
    checks++;
    if (n_hits < 20 || n_ovf < 3 || n_cross < 3) begin
      failures++;
      $display("FAIL too few cases: hits %0d overflow %0d cross-bank %0d", n_hits, n_ovf, n_cross);
    end
    $display("hits %0d overflow %0d cross-bank %0d match_at %0d", n_hits, n_ovf, n_cross, match_at);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
