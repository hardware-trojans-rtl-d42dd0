// tr_pkg: shared types and constants of the Trojan-resilient framework
// (a trusted master talking to LAMBDA sets of three untrusted mini-circuits
// that jointly run a 3-party protocol on 128-bit values) and of the
// arrival-time-modulation Trojan placed in the mini-circuits.
//
// A 3-party share held by mini-circuit j is a pair (s0, s1) = (alpha_j,
// x_(j-1)): its own correlated random word and the masked value of its
// left neighbour. The structs are the per-mini-circuit bundles on the
// master's ports, split so that no bundle feeds itself through the
// combinational masking path; every mini-circuit talks only to the master.
// The trigger defaults below (25-bit counter, threshold 33,000,000 = 0.5 s
// at 66 MHz, the 80-bit pattern) are the values of the modelled Trojan and
// are read only as parameter defaults; a lint of a module that imports the
// package without the trigger reports them as unused, which is harmless.
package tr_pkg;

  localparam int W = 128;                     // data width: one cipher block
  typedef logic [W-1:0] word_t;

  // Trojan trigger defaults.
  localparam int          CNT_W_DEF  = 25;          // interval counter width
  localparam int unsigned THRESH_DEF = 33_000_000;  // 0.5 s at 66 MHz
  localparam int          SEQ_W_DEF  = 80;          // trigger sequence length
  localparam logic [79:0] SEQ_DEF    = 80'h1234_9876_dead_beef_1235;

  typedef struct packed {
    word_t s0;
    word_t s1;
  } share_t;

  // PRNG words of one mini-circuit (state mask, key mask). Sent to the
  // master, which relays them to the left-hand neighbour.
  typedef struct packed {
    word_t ra;
    word_t rb;
  } rnd_t;

  // Correlated randoms alpha_j (state) and beta_j (key) of mini-circuit j.
  typedef struct packed {
    word_t alpha;
    word_t beta;
  } corr_t;

  // Master -> mini-circuit j: masked inputs.
  typedef struct packed {
    logic  start;      // FSM_RST: a new plaintext has arrived, latch the shares
    word_t x;          // masked plaintext v ^ alpha_(j-1)
    word_t y;          // masked key       k ^ beta_(j-1)
  } m2s_t;

  // Mini-circuit j -> master: processed share.
  typedef struct packed {
    logic   done;      // processed share valid (one cycle)
    share_t res;       // processed share
  } s2m_t;

endpackage
