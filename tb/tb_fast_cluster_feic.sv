// tb_fast_cluster_feic: the fast-cluster readout of one 256-strip chip at
// 640 MHz. Random hits are applied every BC to both banks; the model
// registers them on the rising BC edge, computes each bank's reference
// word, and two line receivers check both serial outputs. Each word must
// be complete on the first fast sample after the second rising BC edge
// following the edge that registered its hits (the fixed 2-BC latency).
// hit_location and latched_hit_location are checked as {bank 1, bank 2}.
// A final phase checks the training pattern FF00 on both lines.
// The two banks, one line each, and the 2-BC latency follow the design
// description; bank 1 on sout[0] is this design's choice.
module tb_fast_cluster_feic;
  import sstt_pkg::*;
  import tb_ref_pkg::*;

  logic [7:0] t = '0;
  logic       bc_clk = 0, fast_clk = 1, rst_n = 0;
  logic       training = 0;
  logic [255:0] hits_in = '0;
  logic [31:0]  hit_location, latched_hit_location;
  logic [1:0]   sout;

  int checks = 0, failures = 0;

  fast_cluster_feic dut (
    .bc_clk(bc_clk), .fast_clk(fast_clk), .rst_n(rst_n), .rate(RATE_640),
    .training(training), .hits_in(hits_in), .hit_location(hit_location),
    .latched_hit_location(latched_hit_location), .sout(sout)
  );

  always #1 begin
    t = t + 8'd1;
    fast_clk = ~t[0];
    bc_clk   = t[4];
  end

  logic [255:0] reg_m = '0;
  logic [31:0]  lat_m = '1;
  logic [31:0]  exp_q [$];
  int           src_q [$];
  int           lat_src = 0, reg_src = 0;
  int           bc_idx = 0;
  bit           first_neg = 0;
  logic [15:0]  sh [2];
  int           words = 0;

  always @(posedge bc_clk) if (rst_n) begin
    // serializer load of the word latched on the last falling edge
    exp_q.push_back(training ? 32'hFF00FF00 : lat_m);
    src_q.push_back(lat_src);
    reg_m   = hits_in;
    reg_src = bc_idx;
    bc_idx++;
    first_neg = 1;
  end

  always @(negedge bc_clk) if (rst_n) begin
    #1;
    checks++;
    if (hit_location !== {ref_cluster_word(reg_m[127:0]), ref_cluster_word(reg_m[255:128])}) begin
      failures++;
      $display("FAIL hit_location %h", hit_location);
    end
    lat_m   = {ref_cluster_word(reg_m[127:0]), ref_cluster_word(reg_m[255:128])};
    lat_src = reg_src;
    checks++;
    if (latched_hit_location !== lat_m) begin
      failures++;
      $display("FAIL latched %h exp %h", latched_hit_location, lat_m);
    end
  end

  always @(negedge fast_clk) begin
    sh[0] = {sh[0][14:0], sout[0]};
    sh[1] = {sh[1][14:0], sout[1]};
    if (first_neg) begin
      first_neg = 0;
      // the word loaded on the previous rising edge is now complete
      if (exp_q.size() > 1) begin
        checks++;
        words++;
        if ({sh[0], sh[1]} !== exp_q[0]) begin
          failures++;
          $display("FAIL lines %h %h exp %h", sh[0], sh[1], exp_q[0]);
        end
        // latency: registered on edge src, complete after edge src+2
        checks++;
        if (!training && (bc_idx - 1 - src_q[0]) != 2 && src_q[0] != 0) begin
          failures++;
          $display("FAIL latency %0d", bc_idx - 1 - src_q[0]);
        end
        void'(exp_q.pop_front());
        void'(src_q.pop_front());
      end
    end
  end

  always @(posedge bc_clk) begin
    @(negedge fast_clk);
    hits_in <= {rand_bank(5), rand_bank(5)};
  end

  initial begin
    #400000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40) @(negedge fast_clk);
    @(negedge bc_clk); #1;
    rst_n = 1;
    repeat (300) @(posedge bc_clk);
    @(negedge bc_clk);
    training = 1;
    repeat (20) @(posedge bc_clk);
    checks++;
    if (words < 300) begin
      failures++;
      $display("FAIL only %0d words", words);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
