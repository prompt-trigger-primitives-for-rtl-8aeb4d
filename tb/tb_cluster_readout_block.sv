// tb_cluster_readout_block: one bank from strip hits to the serial line.
// New random hits are applied every BC; a model of the BC latch (sample the
// reference cluster word on the falling BC edge while Ready is high) and a
// line receiver check every word that goes out, at 640 MHz (every BC sent)
// and at 160 MHz (the lockout: only the BC latched while Ready was high is
// sent, one word per 4 BCs). The latched_word output is checked against the
// latch model on every BC.
// The 2-BC latency at 640 MHz and the one-word-in-four lockout at 160 MHz
// follow the design description; the expected words come from the
// run-length reference in tb_ref_pkg, not from the finder's logic.
module tb_cluster_readout_block;
  import sstt_pkg::*;
  import tb_ref_pkg::*;

  logic [7:0] t = '0;
  int         fsh = 0;
  logic       bc_clk = 0, fast_clk = 1, rst_n = 0;
  rate_e      rate = RATE_640;
  logic       training = 0;
  logic [127:0] bank_hits = '0;
  logic [15:0]  hit_word, latched_word;
  logic       sout;

  int checks = 0, failures = 0;

  cluster_readout_block dut (
    .bc_clk(bc_clk), .fast_clk(fast_clk), .rst_n(rst_n), .rate(rate),
    .training(training), .bank_hits(bank_hits), .hit_word(hit_word),
    .latched_word(latched_word), .sout(sout)
  );

  always #1 begin
    t = t + 8'd1;
    fast_clk = ~t[fsh];
    bc_clk   = t[4];
  end

  int span;
  int bc_left_m = 0;        // model of the serializer's BC count
  logic [15:0] lat_m = 16'hFFFF;
  logic [15:0] exp_q [$];
  int          due_q [$];
  int          bc_idx = 0;
  bit          first_neg = 0;
  logic [15:0] sh = '0;
  int          words = 0, locked_out = 0;

  always @(negedge bc_clk) if (rst_n) begin
    if (bc_left_m == 0) lat_m = ref_cluster_word(bank_hits);
    else                locked_out++;
    #1;
    checks++;
    if (latched_word !== lat_m) begin
      failures++;
      $display("FAIL latch %h exp %h", latched_word, lat_m);
    end
  end

  always @(posedge bc_clk) if (rst_n) begin
    if (bc_left_m == 0) begin
      exp_q.push_back(lat_m);
      due_q.push_back(bc_idx + span + 1);
      bc_left_m = span - 1;
    end else bc_left_m--;
    bc_idx++;
    first_neg = 1;
  end

  always @(negedge fast_clk) begin
    sh = {sh[14:0], sout};
    if (first_neg) begin
      first_neg = 0;
      if (due_q.size() > 0 && due_q[0] == bc_idx) begin
        checks++;
        words++;
        if (sh !== exp_q[0]) begin
          failures++;
          $display("FAIL rate=%s line=%h exp=%h", rate.name(), sh, exp_q[0]);
        end
        void'(exp_q.pop_front());
        void'(due_q.pop_front());
      end
    end
  end

  always @(posedge bc_clk) begin
    @(negedge fast_clk);
    bank_hits <= rand_bank(6);
  end

  task automatic run_rate(rate_e r, int s, int sp, int n_bc);
    rst_n = 0;
    @(negedge fast_clk);
    rate = r; fsh = s; span = sp; bc_left_m = 0; lat_m = 16'hFFFF;
    exp_q.delete(); due_q.delete();
    repeat (40) @(negedge fast_clk);
    @(negedge bc_clk); #1;
    rst_n = 1;
    repeat (n_bc) @(posedge bc_clk);
  endtask

  initial begin
    #400000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_rate(RATE_640, 0, 1, 200);
    run_rate(RATE_160, 2, 4, 200);
    checks++;
    if (words < 230 || locked_out < 100) begin
      failures++;
      $display("FAIL words=%0d locked_out=%0d", words, locked_out);
    end
    $display("words=%0d locked_out=%0d", words, locked_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
