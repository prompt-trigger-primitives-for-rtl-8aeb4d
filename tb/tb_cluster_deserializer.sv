// tb_cluster_deserializer: a model transmitter sends, after a random delay
// of 0..31 bit times, several FF00 training words (the BC-clock copy) and
// then random data words, MSB first, one bit per fast clock. Training is
// released while the last training word is on the line. The receiver must
// lock onto the word boundary: its words must be FF00 during training and
// then exactly the data words, one word_valid per 16 clocks.
// The FF00 training word and the 16 bits per BC at 640 MHz are those of the
// design description; the random delays and word counts are this
// testbench's own. Interface: the DUT runs on fast_clk only.
module tb_cluster_deserializer;
  logic fast_clk = 0, rst_n = 0, training = 1, sin = 0;
  logic [15:0] word;
  logic        word_valid;
  int checks = 0, failures = 0;

  cluster_deserializer dut (
    .fast_clk(fast_clk), .rst_n(rst_n), .training(training), .sin(sin),
    .word(word), .word_valid(word_valid)
  );

  always #1 fast_clk = ~fast_clk;

  bit          bits [$];
  logic [15:0] got [$];
  logic [15:0] data [$];
  int          last_valid = -1, cyc = 0;

  always @(posedge fast_clk) begin
    cyc++;
    sin <= (bits.size() > 0) ? bits.pop_front() : 1'b0;
    if (word_valid) begin
      got.push_back(word);
      if (last_valid >= 0 && training == 0) begin
        checks++;
        if (cyc - last_valid != 16) begin
          failures++;
          $display("FAIL word spacing %0d", cyc - last_valid);
        end
      end
      last_valid = cyc;
    end
  end

  task automatic push_word(logic [15:0] w);
    for (int i = 15; i >= 0; i--) bits.push_back(w[i]);
  endtask

  task automatic trial(int off, int n_train, int n_data);
    logic [15:0] w;
    rst_n = 0; training = 1;
    bits.delete(); got.delete(); data.delete();
    last_valid = -1;
    repeat (4) @(negedge fast_clk);
    rst_n = 1;
    for (int i = 0; i < off; i++) bits.push_back(1'b0);
    for (int i = 0; i < n_train; i++) push_word(16'hFF00);
    for (int i = 0; i < n_data; i++) begin
      w = 16'($urandom);
      data.push_back(w);
      push_word(w);
    end
    // release training while the last training word is being sent
    wait (bits.size() == n_data * 16 + 8);
    @(negedge fast_clk);
    training = 0;
    wait (bits.size() == 0);
    repeat (20) @(posedge fast_clk);
    checks++;
    if (got.size() < n_data + 2) begin
      failures++;
      $display("FAIL off=%0d only %0d words", off, got.size());
    end else begin
      for (int i = 0; i < n_data; i++) begin
        checks++;
        if (got[got.size() - n_data - 1 + i] !== data[i]) begin
          failures++;
          $display("FAIL off=%0d word %0d got %h exp %h", off, i,
                   got[got.size() - n_data - 1 + i], data[i]);
        end
      end
      checks++;
      if (got[got.size() - n_data - 2] !== 16'hFF00) begin
        failures++;
        $display("FAIL off=%0d training word %h", off, got[got.size() - n_data - 2]);
      end
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 32; k++) trial(k, 4, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
