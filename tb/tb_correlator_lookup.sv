// tb_correlator_lookup: the two-line lookup. Two model transmitters send
// training words, then data, on the two lines. First the example case:
// 7E00 on line 1 and 007E on line 2 with a tag 03D stored at 7E7E must give
// the addresses 7E00, 7E7E, 0000, 007E, trigger flag and ID 03D; then 07C0
// and 0070 must give 0700, 0770, 00C0, 0007 and no trigger. Then random
// word pairs, with tags stored at some of their addresses, are checked
// against a model of the address pairing and the first-hit priority.
// The 7E00/007E example and its tag are the design description's own test
// case; the second directed case and the random pairs are this testbench's.
module tb_correlator_lookup;
  import sstt_pkg::*;

  logic fast_clk = 0, rst_n = 0, training = 1;
  logic sin1 = 0, sin2 = 0;
  logic wr_en = 0;
  logic [15:0] wr_addr = '0;
  tag_entry_t  wr_data = '0;
  logic init_done;
  logic [15:0] par_out1, par_out2;
  logic [15:0] addr [4];
  logic [10:0] trig_id;
  logic        trig_flag;
  int checks = 0, failures = 0;

  correlator_lookup dut (
    .fast_clk(fast_clk), .rst_n(rst_n), .training(training), .sin1(sin1),
    .sin2(sin2), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .init_done(init_done), .par_out1(par_out1), .par_out2(par_out2),
    .addr(addr), .trig_id(trig_id), .trig_flag(trig_flag)
  );

  always #1 fast_clk = ~fast_clk;

  // transmitters: one word per 16 clocks on each line
  logic [15:0] tx1 [$], tx2 [$];
  logic [15:0] cur1 = 16'hFF00, cur2 = 16'hFF00;
  int          bitn = 0;
  int          sent = 0;
  always @(posedge fast_clk) begin
    if (bitn == 0) begin
      cur1 = (!training && tx1.size() > 0) ? tx1.pop_front() : (training ? 16'hFF00 : 16'hFFFF);
      cur2 = (!training && tx2.size() > 0) ? tx2.pop_front() : (training ? 16'hFF00 : 16'hFFFF);
      if (!training) sent++;
    end
    sin1 <= cur1[15 - bitn];
    sin2 <= cur2[15 - bitn];
    bitn = (bitn + 1) % 16;
  end

  tag_entry_t model [logic [15:0]];

  task automatic mem_write(logic [15:0] a, logic [10:0] tag);
    @(negedge fast_clk);
    wr_en = 1; wr_addr = a; wr_data = '{valid: 1'b1, tag: tag};
    model[a] = wr_data;
    @(negedge fast_clk);
    wr_en = 0;
  endtask

  // wait for the pair of words and check everything
  task automatic send_and_check(logic [15:0] w1, logic [15:0] w2);
    logic [15:0] ea [4];
    logic        ef;
    logic [10:0] eid;
    tx1.push_back(w1); tx2.push_back(w2);
    wait (par_out1 == w1 && par_out2 == w2 && tx1.size() == 0);
    @(negedge fast_clk);
    ea[0] = {w1[15:8], w2[15:8]};
    ea[1] = {w1[15:8], w2[7:0]};
    ea[2] = {w2[15:8], w1[7:0]};
    ea[3] = {w2[15:8], w1[15:8]};
    ef = 0; eid = '0;
    for (int k = 3; k >= 0; k--)
      if (model.exists(ea[k]) && model[ea[k]].valid) begin ef = 1; eid = model[ea[k]].tag; end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (addr[k] !== ea[k]) begin
        failures++;
        $display("FAIL addr%0d %h exp %h", k + 1, addr[k], ea[k]);
      end
    end
    checks++;
    if (trig_flag !== ef || (ef && trig_id !== eid)) begin
      failures++;
      $display("FAIL %h/%h flag %b id %h exp %b %h", w1, w2, trig_flag, trig_id, ef, eid);
    end
  endtask

  int hits = 0;

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] w1, w2;
    repeat (3) @(negedge fast_clk);
    rst_n = 1;
    wait (init_done);
    mem_write(16'h7E7E, 11'h03D);
    @(posedge fast_clk iff bitn == 4);
    training = 0;
    send_and_check(16'h7E00, 16'h007E);
    checks++;
    if (trig_flag !== 1'b1 || trig_id !== 11'h03D) begin
      failures++;
      $display("FAIL example: flag %b id %h", trig_flag, trig_id);
    end
    send_and_check(16'h07C0, 16'h0070);
    checks++;
    if (trig_flag !== 1'b0 || addr[2] !== 16'h00C0 || addr[3] !== 16'h0007) begin
      failures++;
      $display("FAIL second example");
    end
    for (int k = 0; k < 300; k++) begin
      w1 = 16'($urandom); w2 = 16'($urandom);
      if (w1 == par_out1 && w2 == par_out2) w1 = ~w1;
      if ($urandom_range(2, 0) == 0) begin
        mem_write({w1[15:8], w2[7:0]}, 11'($urandom));
        hits++;
      end
      if ($urandom_range(3, 0) == 0) mem_write({w2[15:8], w1[15:8]}, 11'($urandom));
      send_and_check(w1, w2);
    end
    checks++;
    if (hits < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
