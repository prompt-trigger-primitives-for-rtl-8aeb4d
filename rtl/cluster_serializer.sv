// cluster_serializer: sends one bank's 16-bit cluster word on a serial line,
// most significant bit first, at the fast clock (160, 320 or 640 MHz).
//
// Two halves. The BC half (rising edge of bc_clk) takes a word from the BC
// latch when the previous word is complete and counts how many BCs the
// current word still occupies: 1 BC at 640 MHz, 2 at 320 MHz, 4 at 160 MHz.
// Ready is high during the last BC of a word, so the latch may take a new
// word on that BC's falling edge and the serializer loads it on the next
// rising edge. At 640 MHz Ready is always high and every BC is sent.
// The fast half (rising edge of fast_clk) sees the load through a toggle
// bit, copies the word into its shift register on the first fast edge after
// the BC edge, and shifts one bit per fast clock.
//
// In training mode the serializer sends, in place of cluster data, ones
// while the BC clock is high and zeros while it is low (FF00 at 640 MHz,
// F0F0 at 320, CCCC at 160), a copy of the BC clock that the receiver uses
// to frame the words.
//
// Clocks: fast_clk must be 4, 8 or 16 times bc_clk (per rate), with its
// rising edges aligned to those of bc_clk. The first bit of a word leaves
// one fast period after the BC edge. Interface: word_in from the latch,
// ready to the latch, sout to the line driver. An assertion checks that no
// word is loaded before the previous one has been shifted out.
//
// Loading on the rising BC edge only when the old word is out, the lockout
// through Ready, the three rates and the training pattern follow the design
// description; the toggle hand-over and the MSB-first order are this
// design's choices.
module cluster_serializer
  import sstt_pkg::*;
(
  input  logic          bc_clk,
  input  logic          fast_clk,
  input  logic          rst_n,
  input  rate_e         rate,
  input  logic          training,
  input  cluster_word_t word_in,
  output logic          ready,
  output logic          sout
);

  logic [1:0]        bc_left;   // BCs of the current word still to come
  logic [WORD_W-1:0] word_bc;   // word being sent
  logic              load_tgl;  // flips on every load

  logic [1:0] bcs_per_word;
  always_comb begin
    case (rate)
      RATE_160: bcs_per_word = 2'd3;   // 4 BCs, counted down to 0
      RATE_320: bcs_per_word = 2'd1;   // 2 BCs
      default:  bcs_per_word = 2'd0;   // 1 BC
    endcase
  end

  assign ready = (bc_left == 2'd0);

  always_ff @(posedge bc_clk or negedge rst_n) begin
    if (!rst_n) begin
      bc_left  <= 2'd0;
      word_bc  <= NULL_WORD;
      load_tgl <= 1'b0;
    end else if (bc_left == 2'd0) begin
      word_bc  <= training ? training_word(rate) : word_in;
      load_tgl <= ~load_tgl;
      bc_left  <= bcs_per_word;
    end else begin
      bc_left  <= bc_left - 2'd1;
    end
  end

  logic              tgl_seen;
  logic [WORD_W-1:0] shreg;

  always_ff @(posedge fast_clk or negedge rst_n) begin
    if (!rst_n) begin
      tgl_seen <= 1'b0;
      shreg    <= '0;
    end else if (tgl_seen != load_tgl) begin
      tgl_seen <= load_tgl;
      shreg    <= word_bc;
    end else begin
      shreg    <= {shreg[WORD_W-2:0], 1'b0};
    end
  end

  assign sout = shreg[WORD_W-1];

  // Handshake rule: a word reaches the shift register only after all bits
  // of the previous one have left (no overwrite, whatever the rate).
  logic [4:0] shifted;  // fast clocks since the last load, saturating at 16
  always_ff @(posedge fast_clk or negedge rst_n) begin
    if (!rst_n) begin
      shifted <= 5'(WORD_W);
    end else if (tgl_seen != load_tgl) begin
      assert (shifted >= 5'(WORD_W))
        else $error("cluster_serializer: word loaded after %0d bits", shifted);
      shifted <= 5'd1;
    end else if (shifted != 5'(WORD_W)) begin
      shifted <= shifted + 5'd1;
    end
  end

endmodule
