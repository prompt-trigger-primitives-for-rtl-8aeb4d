// tb_fast_cluster_finder: checks the combinational cluster finder against
// a run-length reference model, on directed patterns (single strips, pairs,
// vetoed runs of three, clusters at both bank edges, the two worked
// examples 36/2-strip + 100/1-strip = 49C8 and 33/2-strip alone = 43FF)
// and on random patterns.
// The worked examples and the rules (1 or 2 strips, 3+ vetoed, lowest
// cluster first, FF for none) are the design description's; the random
// patterns and the reference model are this testbench's own.
module tb_fast_cluster_finder;
  import tb_ref_pkg::*;

  logic [127:0] hits;
  logic [15:0]  word;
  int checks = 0, failures = 0;

  fast_cluster_finder dut (.hits(hits), .word(word));

  task automatic check(logic [15:0] exp, string what);
    #1;
    checks++;
    if (word !== exp) begin
      failures++;
      $display("FAIL %s: hits=%h word=%h exp=%h", what, hits, word, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hits = '0;                               check(16'hFFFF, "empty");
    hits = '0; hits[36] = 1; hits[37] = 1; hits[100] = 1;
                                             check(16'h49C8, "36x2 + 100");
    hits = '0; hits[33] = 1; hits[34] = 1;   check(16'h43FF, "33x2 alone");
    hits = '0; hits[5] = 1; hits[6] = 1; hits[7] = 1;
                                             check(16'hFFFF, "veto 3");
    hits = '0; hits[5] = 1; hits[6] = 1; hits[7] = 1; hits[9] = 1;
                                             check(16'h12FF, "veto 3 then single");
    hits = '0; hits[0] = 1; hits[127] = 1;   check(16'h00FE, "edges");
    hits = '0; hits[126] = 1; hits[127] = 1; check(16'hFDFF, "pair at top edge");
    hits = '0; hits[10] = 1; hits[20] = 1; hits[30] = 1;
                                             check(16'h143C, "three singles");
    hits = '1;                               check(16'hFFFF, "all hit");
    for (int k = 0; k < 3000; k++) begin
      hits = rand_bank(k % 12);
      check(ref_cluster_word(hits), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
