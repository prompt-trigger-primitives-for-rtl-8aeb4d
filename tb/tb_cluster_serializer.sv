// tb_cluster_serializer: runs the serializer at 640, 320 and 160 MHz (16,
// 8 and 4 fast clocks per BC) with a new random word offered every BC.
// A receiver model samples the line on falling fast edges and checks that
// every word taken while Ready was high arrives MSB first, complete on the
// first fast sample after the BC edge that ends its 1, 2 or 4 BCs, that
// Ready comes once per word (every BC, every 2nd, every 4th), and that
// training mode sends FF00, F0F0 and CCCC.
// The rates, words per BC and training words follow the design
// description; the arrival time checked is the one this design chose (first
// bit one fast clock after the loading BC edge).
module tb_cluster_serializer;
  import sstt_pkg::*;

  logic [7:0] t = '0;
  int         fsh = 0;          // fast clock = ~t[fsh]
  logic       bc_clk = 0, fast_clk = 1, rst_n = 0;
  rate_e      rate = RATE_640;
  logic       training = 0;
  logic [15:0] word_in = '0;
  logic       ready, sout;

  int checks = 0, failures = 0;

  cluster_serializer dut (
    .bc_clk(bc_clk), .fast_clk(fast_clk), .rst_n(rst_n), .rate(rate),
    .training(training), .word_in(word_in), .ready(ready), .sout(sout)
  );

  always #1 begin
    t = t + 8'd1;
    fast_clk = ~t[fsh];
    bc_clk   = t[4];
  end

  // receiver model
  logic [15:0] exp_q [$];
  int          due_q [$];
  int          bc_idx = 0;
  bit          first_neg = 0;
  logic [15:0] sh = '0;
  int          span;
  int          loads = 0, ready_bcs = 0;

  always @(posedge bc_clk) begin
    if (rst_n) begin
      if (ready) begin
        exp_q.push_back(training ? training_word(rate) : word_in);
        due_q.push_back(bc_idx + span + 1);
        ready_bcs++;
      end
      bc_idx++;
      first_neg = 1;
    end
  end

  always @(negedge fast_clk) begin
    sh = {sh[14:0], sout};
    if (first_neg) begin
      first_neg = 0;
      if (due_q.size() > 0 && due_q[0] == bc_idx) begin
        checks++;
        loads++;
        if (sh !== exp_q[0]) begin
          failures++;
          $display("FAIL rate=%s got=%h exp=%h", rate.name(), sh, exp_q[0]);
        end
        void'(exp_q.pop_front());
        void'(due_q.pop_front());
      end
    end
  end

  // a new word every BC, changed away from the clock edges
  always @(negedge bc_clk) word_in <= 16'($urandom);

  task automatic run_rate(rate_e r, int s, bit train, int n_bc);
    int bc0, r0;
    rst_n = 0;
    @(negedge fast_clk);
    rate = r; fsh = s; span = bits_per_bc(r) == 16 ? 1 : (bits_per_bc(r) == 8 ? 2 : 4);
    training = train;
    exp_q.delete(); due_q.delete();
    repeat (40) @(negedge fast_clk);
    @(negedge bc_clk);
    rst_n = 1;
    bc0 = bc_idx; r0 = ready_bcs;
    repeat (n_bc) @(posedge bc_clk);
    repeat (span + 1) @(posedge bc_clk);
    @(negedge fast_clk); @(negedge fast_clk);
    // one load per word span
    checks++;
    if ((ready_bcs - r0) != (n_bc + span + 1 + span - 1) / span) begin
      failures++;
      $display("FAIL rate=%s loads=%0d over %0d BCs", r.name(), ready_bcs - r0, n_bc + span + 1);
    end
    checks++;
    if (exp_q.size() > 1) begin
      failures++;
      $display("FAIL rate=%s %0d words never arrived", r.name(), exp_q.size());
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_rate(RATE_640, 0, 0, 100);
    run_rate(RATE_320, 1, 0, 100);
    run_rate(RATE_160, 2, 0, 100);
    run_rate(RATE_640, 0, 1, 20);
    run_rate(RATE_320, 1, 1, 20);
    run_rate(RATE_160, 2, 1, 20);
    checks++;
    if (loads < 150) begin
      failures++;
      $display("FAIL only %0d words checked", loads);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
