// tb_hit_location_latch: the latch takes d on the falling BC edge only
// while ready is high, holds otherwise, and resets to FFFF.
//
// Reset is checked first. Then random words and random Ready levels are
// applied after each rising edge; a model that samples on the falling edge
// predicts the output, checked after each falling edge once d has changed
// again (a change away from the edge must not reach q). The falling-edge
// capture gated by Ready is the design description's; the FFFF reset value
// is this design's choice.
module tb_hit_location_latch;
  logic bc_clk = 0, rst_n = 1, ready = 0;
  logic [15:0] d = '0, q, model;
  int checks = 0, failures = 0;

  hit_location_latch dut (.bc_clk(bc_clk), .rst_n(rst_n), .ready(ready), .d(d), .q(q));

  always #8 bc_clk = ~bc_clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #2;
    checks++;
    if (q !== 16'hFFFF) begin failures++; $display("FAIL reset value %h", q); end
    model = 16'hFFFF;
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      @(posedge bc_clk); #2;
      d     = 16'($urandom);
      ready = ($urandom_range(2, 0) != 0);
      @(negedge bc_clk);
      if (ready) model = d;
      #2;
      d = 16'($urandom);   // changes away from the edge must not matter
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL k=%0d q=%h exp=%h", k, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
