// tcc_pkg: constants and bus types shared by the TCC chip multiprocessor.
//
// The machine is a set of simple processors, each with a private transactional
// L1 data cache, sharing an on-chip L2 through two logical broadcast buses: a
// commit bus (processors -> everyone; refill requests and transaction commits)
// and a refill bus (L2 -> processors; line data). Sizes follow the main
// configuration of the design: 32-bit words, 32-byte lines (8 words), a 16-byte
// bus (4 words per beat), 3-cycle pipelined arbitration and transfer.
//
// Commit bus beat: a line commit is one or more beats that all carry the line
// address and the line's SM (speculatively modified) word mask on the address
// lines; the data lines carry the modified words packed in word order, four per
// beat (beat k carries the modified words of rank 4k..4k+3). A refill request is
// a single address-only beat. Each commit tenure ends with an END beat. These
// framing details are this design's own choice.
package tcc_pkg;

  localparam int unsigned WORD_BITS   = 32;
  localparam int unsigned LINE_WORDS  = 8;                    // 32-byte line
  localparam int unsigned BEAT_WORDS  = 4;                    // 16-byte bus
  localparam int unsigned LINE_BITS   = WORD_BITS * LINE_WORDS;
  localparam int unsigned LADDR_W     = 27;                   // 32-bit byte address / 32-byte line
  localparam int unsigned CPU_ID_W    = 4;                    // up to 16 processors
  localparam int unsigned REFILL_BEATS = LINE_WORDS / BEAT_WORDS;

  typedef logic [WORD_BITS-1:0]  word_t;
  typedef logic [LADDR_W-1:0]    laddr_t;
  typedef logic [LINE_WORDS-1:0] wmask_t;
  typedef logic [LINE_WORDS-1:0][WORD_BITS-1:0] line_t;
  typedef logic [BEAT_WORDS-1:0][WORD_BITS-1:0] beat_data_t;

  typedef enum logic [1:0] {
    CB_READ   = 2'd0,   // refill request, address only
    CB_COMMIT = 2'd1,   // committed line: address + SM mask + modified words
    CB_END    = 2'd2    // end of a commit tenure (no data)
  } cb_kind_e;

  typedef struct packed {
    logic                valid;
    cb_kind_e            kind;
    logic [CPU_ID_W-1:0] src;
    logic                first;     // first beat of a line (snoopers act on it)
    logic                last;      // last beat of the bus tenure
    logic [1:0]          beat;      // beat number within the line
    laddr_t              laddr;
    wmask_t              mask;      // SM mask of the line
    beat_data_t          data;
  } cbus_beat_t;

  typedef struct packed {
    logic                valid;
    logic [CPU_ID_W-1:0] dst;
    laddr_t              laddr;
    logic                beat;      // 0: words 0..3, 1: words 4..7
    beat_data_t          data;
  } rbus_beat_t;

  // A cache line with its speculative state, as held by the victim cache and
  // moved between it and the L1 arrays.
  typedef struct packed {
    logic   tv;      // line present
    laddr_t laddr;
    wmask_t v;       // per-word valid
    wmask_t sr;      // per-word speculatively read
    wmask_t sm;      // per-word speculatively modified
    line_t  data;
  } cline_t;

  // Number of set bits of m below position w.
  function automatic int unsigned rank_below(wmask_t m, int unsigned w);
    int unsigned r = 0;
    for (int unsigned i = 0; i < LINE_WORDS; i++)
      if (i < w && m[i]) r++;
    return r;
  endfunction

  function automatic int unsigned popcount(wmask_t m);
    int unsigned r = 0;
    for (int unsigned i = 0; i < LINE_WORDS; i++) r += int'(m[i]);
    return r;
  endfunction

  // Bus beats needed for a line commit with mask m (at least one, for the address).
  function automatic int unsigned commit_beats(wmask_t m);
    int unsigned n = popcount(m);
    return (n == 0) ? 1 : (n + BEAT_WORDS - 1) / BEAT_WORDS;
  endfunction

endpackage
