// sstt_pkg: shared types and constants of the self-seeded track trigger
// primitives.
//
// A front-end chip reads out 256 strips as two independent banks of 128.
// For every beam crossing (BC) each bank produces one 16-bit cluster word:
// two 8-bit clusters, each a 7-bit strip address followed by one bit that
// is set for a 2-strip cluster. Read as a number, the 8-bit cluster is the
// cluster centre in half-strip units (2*strip + two_strips), which is where
// the 40 um resolution comes from. The value FF marks "no cluster" and can
// never be a real cluster (it would need strip 128). A bank without any
// cluster therefore sends FFFF.
//
// The correlator looks pairs of clusters up in a memory addressed by two
// cluster bytes (2^16 addresses) that returns an 11-bit tag (2^11 tags).
// The stub it sends on per BC is 16 bits: a 5-bit bank position on the
// hybrid (20 positions) and the 11-bit tag.
//
// The field order of the stub (position in the upper bits) and the FFFF
// "no stub" word are choices of this design; the cluster format, the FF
// null code and the sizes follow the design description.
package sstt_pkg;

  localparam int unsigned STRIPS_PER_BANK = 128;
  localparam int unsigned BANKS_PER_CHIP  = 2;
  localparam int unsigned STRIPS_PER_CHIP = STRIPS_PER_BANK * BANKS_PER_CHIP;
  localparam int unsigned STRIP_W         = 7;
  localparam int unsigned CLUSTER_W       = 8;
  localparam int unsigned WORD_W          = 16;

  localparam int unsigned TAG_W      = 11;
  localparam int unsigned MEM_ADDR_W = 16;
  localparam int unsigned POS_W      = 5;

  // One cluster: strip address of the lower strip, and a 2-strip flag.
  typedef struct packed {
    logic [STRIP_W-1:0] strip;
    logic               two;
  } cluster_t;

  // One bank's BC word. The first (upper, sent first) byte always holds the
  // lower-addressed cluster.
  typedef struct packed {
    cluster_t lo;
    cluster_t hi;
  } cluster_word_t;

  localparam cluster_t      NULL_CLUSTER = '1;
  localparam cluster_word_t NULL_WORD    = '1;

  // Serializer fast clock: 160, 320 or 640 MHz against the 40 MHz BC.
  typedef enum logic [1:0] {
    RATE_160 = 2'd0,
    RATE_320 = 2'd1,
    RATE_640 = 2'd2
  } rate_e;

  // One tag-memory entry.
  typedef struct packed {
    logic             valid;
    logic [TAG_W-1:0] tag;
  } tag_entry_t;

  // Stub sent to the trigger processor.
  typedef struct packed {
    logic [POS_W-1:0] pos;
    logic [TAG_W-1:0] tag;
  } stub_t;

  localparam stub_t NULL_STUB = '1;

  // Serial bits sent per BC at a given fast clock rate.
  function automatic int unsigned bits_per_bc(rate_e r);
    case (r)
      RATE_160: return 4;
      RATE_320: return 8;
      default:  return 16;
    endcase
  endfunction

  // Training word: ones while the BC clock is high, zeros while it is low,
  // so that the serial line carries a copy of the BC clock.
  function automatic logic [WORD_W-1:0] training_word(rate_e r);
    logic [WORD_W-1:0] w;
    int unsigned b;
    b = bits_per_bc(r);
    for (int unsigned j = 0; j < WORD_W; j++)
      w[WORD_W-1-j] = ((j % b) < (b / 2));
    return w;
  endfunction

endpackage
