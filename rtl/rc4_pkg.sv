// rc4_pkg: types and constants shared by the RC4 brute-force key search engine.
//
// The search tests 40-bit RC4 keys (5 key bytes, n = 8). A key is held as a
// 40-bit integer whose most significant byte is key byte K[0] and whose least
// significant byte is key byte K[4], so that counting the integer up varies the
// last key byte fastest; that byte ordering is this design's choice.
//
// The engine controller broadcasts one control word (ctrl_t) to every key
// tester of an engine each cycle, which is how all testers of an engine run in
// lock step and share a single sequencer.
package rc4_pkg;

  localparam int unsigned KEY_BYTES   = 5;                // L = 5 (40-bit key)
  localparam int unsigned KEY_BITS    = 8 * KEY_BYTES;
  localparam int unsigned MATCH_BYTES = 5;                // keystream bytes compared
  // Cycles to test one key once the pipeline runs: 256 KSA iterations of
  // 3 cycles plus 4 cycles for the first keystream byte.
  localparam int unsigned CYCLES_PER_KEY = 256 * 3 + 4;   // 772

  typedef logic [7:0]          byte_t;
  typedef logic [KEY_BITS-1:0] key_t;

  // Phase of the shared sequencer.
  typedef enum logic [3:0] {
    ST_IDLE,    // nothing happening, waiting for start
    ST_INIT,    // one-off fill of both S-box halves with the identity
    ST_KSA_RD,  // KSA: read S[i]
    ST_KSA_SJ,  // KSA: j += S[i] + K[i mod 5]; write S[j] <= S[i], old S[j] read out
    ST_KSA_SI,  // KSA: write S[i] <= old S[j]
    ST_KS_RD,   // keystream: read S[i]
    ST_KS_SJ,   // keystream: j += S[i]; write S[j] <= S[i], old S[j] read out
    ST_KS_SI,   // keystream: write S[i] <= old S[j]; t <= S[i] + S[j]
    ST_KS_RT,   // keystream: read S[t]
    ST_CHK,     // compare S[t] with the ciphertext byte; also reads S[0] of the next key
    ST_DONE     // key found or key range exhausted
  } phase_e;

  // Control word broadcast from the engine controller to every key tester.
  // It holds registered state only; the key load strobe travels beside it.
  typedef struct packed {
    phase_e                   phase;
    byte_t                    i;        // S-box index counter
    logic [2:0]               kidx;     // i mod 5: key byte selected for the j adder
    logic                     half;     // 0: scramble the high byte, 1: the low byte
    logic [2:0]               ks_byte;  // index of the keystream byte being checked
    logic [8*(KEY_BYTES-1)-1:0] k_hi;   // shared key bytes K[0..3] of the current pass
  } ctrl_t;

endpackage
