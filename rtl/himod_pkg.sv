// himod_pkg: sizes, types and the initial prime tables shared by the HIMOD
// database coprocessor (DBCP).
//
// The DBCP filters join tuples with five mapping hash coders.  Each coder turns
// a 16-character key into a K-bit bucket address by looking every character up
// in a 64-word table of primes and exclusive-ORing the 16 results together.
// Sixteen characters per key, 64 x 16-bit prime RAMs, 8-bit bucket addresses
// (256 buckets), five coders and five 256-bit bit array stores are the sizes
// the design was specified with.
//
// Initial RAM contents: the prime tables are built from seven rows of primes.
// Coder c takes, for word address a = 10*r + col, the entry PRIME_ROWS[r][col+c],
// so the five coders see the same rows shifted by one place each, which makes
// their hash functions statistically independent.  The first thirteen entries
// of each row are the published ones; the fourteenth (used only by coder 4 for
// columns it reaches) is a prime chosen for this design.  Bit 0 of every prime
// is 1, which would make bit 0 of a 16-way XOR always 0; as specified, 1 is
// added to the word at every even address so that bit 0 of the bucket address
// carries information too (ODD_FIX).
package himod_pkg;

  localparam int unsigned NUM_CODERS = 5;    // hash coders = bit array stores = stack levels
  localparam int unsigned KEY_CHARS  = 16;   // characters in a key (join attribute)
  localparam int unsigned CHAR_BITS  = 8;    // ASCII character width
  localparam int unsigned KEY_BITS   = KEY_CHARS * CHAR_BITS;  // 128
  localparam int unsigned RAM_ABITS  = 6;    // low six bits of a character address a prime RAM
  localparam int unsigned RAM_WORDS  = 1 << RAM_ABITS;          // 64
  localparam int unsigned PRIME_BITS = 16;   // 64 x 16-bit prime RAMs
  localparam int unsigned HASH_BITS  = 8;    // K: 2**K buckets
  localparam int unsigned SP_BITS    = 3;    // stack pointer 0..4
  localparam int unsigned WORD_BITS  = 32;   // host data bus / memory word

  // Layout of a tuple in memory (32-bit words, word addresses):
  //   +0..+3  join attribute, 16 characters, character 4*w+j in bits 8*j+7:8*j of word w
  //   +4      pointer to the next tuple of the list, 0 = end of list (nil)
  //   +5...   rest of the tuple, never touched by the coprocessor
  localparam int unsigned TUPLE_NEXT_OFS = 4;
  localparam logic [WORD_BITS-1:0] NIL = '0;

  typedef logic [KEY_BITS-1:0]   key_t;
  typedef logic [WORD_BITS-1:0]  word_t;

  // Operation applied to a key when its hash addresses are ready.
  typedef enum logic [0:0] {
    OP_MARK  = 1'b0,   // source key: set the addressed bits of the active stores
    OP_PROBE = 1'b1    // target key: test the addressed bits of the active stores
  } filter_op_e;

  // Event counters kept by the join controller (for the host and for tests).
  typedef struct packed {
    logic [15:0] pushes;      // lists divided one level further
    logic [15:0] pops;        // returns to a lower level
    logic [15:0] discards;    // target tuples dropped by the bit array filter
    logic [15:0] identicals;  // scans that ended in one bucket on every active coder
    logic [15:0] drains;      // scans at the fifth level sent on without further division
    logic [15:0] merges;      // list pairs sent to the host
    logic [15:0] stalls;      // cycles a list pair waited for the host
  } join_stats_t;

  // Prime rows (14 entries each).
  localparam int unsigned PRIME_COLS = 14;
  typedef int unsigned prime_row_t [PRIME_COLS];
  localparam prime_row_t PRIME_ROWS [7] = '{
    '{2729, 2063, 7927, 5087, 3583, 1307, 7687, 1523, 3643,  223, 7481, 5483,  401, 7001},
    '{ 103,  523, 7129, 5669, 3229, 7789, 8527, 4969, 2549, 1721, 3929, 1607, 6121, 7717},
    '{3469, 5189, 5563, 5981, 4021, 3187, 3167, 4409, 6827, 1109, 4241, 1123, 4129, 3011},
    '{ 461, 6323,  769, 4363, 4801, 1481, 6367, 7963, 1747, 2203, 1061, 3823, 6949, 5237},
    '{5081, 3083, 6547, 3727, 7069, 2887, 2221, 8009, 1987, 2161, 3301, 8167, 3449, 8111},
    '{2683, 4583, 4127, 7541, 6361,  967, 5627, 2309, 4787, 6581,  641,  443, 7349, 2477},
    '{8287,  743, 5347, 3709, 6763, 1021, 1949, 5449, 3041, 3907, 6689, 6067, 5521, 6133}
  };

  // Initial content of word 'addr' of every prime RAM of coder 'coder'.
  function automatic logic [PRIME_BITS-1:0] prime_init(int unsigned coder, int unsigned addr);
    int unsigned v;
    v = PRIME_ROWS[addr / 10][(addr % 10) + coder];
    if (addr % 2 == 0) v = v + 1;   // ODD_FIX: randomise bit 0
    return PRIME_BITS'(v);
  endfunction

endpackage
