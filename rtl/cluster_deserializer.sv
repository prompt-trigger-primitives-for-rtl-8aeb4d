// cluster_deserializer: correlator-side receiver of one serial cluster line.
//
// Bits are shifted in MSB first on every fast clock. A bit counter frames
// them into 16-bit words; when the 16th bit of a word arrives, the word is
// presented on word with a one-cycle word_valid pulse.
//
// Framing: the chips have no frame marker, so the counter's phase is set in
// training mode, when the line carries a copy of the BC clock (ones during
// the high half of the BC, zeros during the low half). A 0-to-1 step of the
// line marks the first bit of a word, and the counter is restarted there.
// Outside training mode the counter runs freely and keeps that phase.
//
// Interface: sin serial line, training, word/word_valid.
// Timing: fast_clk at the line rate (640 MHz in the target design); a word
// is available on the fast clock edge after its last bit.
//
// The use of a training pattern to frame the data follows the design
// description; the edge-detecting alignment is this design's own.
module cluster_deserializer
  import sstt_pkg::*;
(
  input  logic              fast_clk,
  input  logic              rst_n,
  input  logic              training,
  input  logic              sin,
  output logic [WORD_W-1:0] word,
  output logic              word_valid
);

  localparam int unsigned CW = $clog2(WORD_W);

  logic [WORD_W-2:0] shreg;
  logic [CW-1:0]     bit_cnt;   // index of the incoming bit within the word
  logic              sin_q;

  logic frame_start;
  assign frame_start = training && sin && !sin_q;

  always_ff @(posedge fast_clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg      <= '0;
      bit_cnt    <= '0;
      sin_q      <= 1'b0;
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      sin_q      <= sin;
      shreg      <= {shreg[WORD_W-3:0], sin};
      word_valid <= 1'b0;
      if (frame_start) begin
        // this bit is bit 0 of a new word
        bit_cnt <= CW'(1);
      end else begin
        bit_cnt <= bit_cnt + CW'(1);
        if (bit_cnt == CW'(WORD_W - 1)) begin
          word       <= {shreg, sin};
          word_valid <= 1'b1;
        end
      end
    end
  end

endmodule
