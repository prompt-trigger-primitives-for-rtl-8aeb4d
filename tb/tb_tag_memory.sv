// tb_tag_memory: after reset the memory must clear itself in 2^16 clocks
// (init_done), ignore writes until then, and afterwards return on both read
// ports exactly the entries written (checked against an associative-array
// model), with every other entry invalid.
// The memory keeps its 2^16-entry default; only the number of read ports
// is set (2). The 2^16 entries and 11-bit tags follow the design
// description; clearing after reset and the valid bit are this design's
// choices.
module tb_tag_memory;
  import sstt_pkg::*;

  logic clk = 0, rst_n = 0, init_done;
  logic wr_en = 0;
  logic [15:0] wr_addr = '0;
  tag_entry_t  wr_data = '0;
  logic [15:0] rd_addr [2];
  tag_entry_t  rd_data [2];
  int checks = 0, failures = 0;

  tag_memory #(.N_RD(2)) dut (
    .clk(clk), .rst_n(rst_n), .init_done(init_done), .wr_en(wr_en),
    .wr_addr(wr_addr), .wr_data(wr_data), .rd_addr(rd_addr), .rd_data(rd_data)
  );

  always #1 clk = ~clk;

  tag_entry_t model [logic [15:0]];
  int cyc;

  task automatic check_read(logic [15:0] a0, logic [15:0] a1);
    tag_entry_t e0, e1;
    rd_addr[0] = a0; rd_addr[1] = a1;
    #0.5;
    e0 = model.exists(a0) ? model[a0] : '0;
    e1 = model.exists(a1) ? model[a1] : '0;
    checks++;
    if (rd_data[0].valid !== e0.valid || (e0.valid && rd_data[0].tag !== e0.tag)) begin
      failures++;
      $display("FAIL port0 @%h got %h exp %h", a0, rd_data[0], e0);
    end
    checks++;
    if (rd_data[1].valid !== e1.valid || (e1.valid && rd_data[1].tag !== e1.tag)) begin
      failures++;
      $display("FAIL port1 @%h got %h exp %h", a1, rd_data[1], e1);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] keys [$];

  initial begin
    rd_addr[0] = '0; rd_addr[1] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // a write during clearing must be lost
    wr_en = 1; wr_addr = 16'h1234; wr_data = '{valid: 1'b1, tag: 11'h155};
    @(negedge clk);
    wr_en = 0;
    cyc = 1;
    while (!init_done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc < 65536 || cyc > 65540) begin
      failures++;
      $display("FAIL clearing took %0d clocks", cyc);
    end
    check_read(16'h1234, 16'h0000);
    // random writes
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      wr_en = 1;
      wr_addr = 16'($urandom);
      wr_data = '{valid: 1'($urandom_range(3, 0) != 0), tag: 11'($urandom)};
      model[wr_addr] = wr_data;
      keys.push_back(wr_addr);
    end
    @(negedge clk);
    wr_en = 0;
    foreach (keys[i]) check_read(keys[i], 16'($urandom));
    for (int k = 0; k < 200; k++) check_read(16'($urandom), keys[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
