// l2ecc_pkg: types, constants and code functions shared by the L2 cache with
// non-uniform error protection.
//
// A cache line is 64 bytes, handled as eight 64-bit words. Every word carries
// one even-parity bit (stored in the parity array of its way). A dirty line
// additionally has eight SECDED check bytes, one per word, stored in the ECC
// array entry of its set. The 64-bit word, one parity bit per word and 8 ECC
// bits per word follow the document; the particular SECDED code is this
// design's choice: an extended Hamming (72,64) code whose 7 Hamming check bits
// sit at codeword positions 1,2,4,...,64, the 64 data bits fill the remaining
// positions 3..71 in order, and bit 7 of the check byte is the overall parity
// of the 71-bit Hamming codeword.
package l2ecc_pkg;

  localparam int unsigned WORD_W     = 64;
  localparam int unsigned LINE_WORDS = 8;
  localparam int unsigned LINE_W     = WORD_W * LINE_WORDS;  // 512
  localparam int unsigned CHK_W      = 8;                     // SECDED bits per word
  localparam int unsigned ECC_W      = CHK_W * LINE_WORDS;    // 64 bits = 8 bytes per set
  localparam int unsigned OFFSET_W   = 6;                     // 64-byte line
  localparam int unsigned WSEL_W     = 3;                     // word within a line

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [LINE_W-1:0] line_t;
  typedef logic [CHK_W-1:0]  chk_t;

  // Status of one cache line. written is set on the second and later
  // modifications of a dirty line; written implies dirty.
  typedef struct packed {
    logic valid;
    logic dirty;
    logic written;
  } line_status_t;

  // One-cycle event pulses from the cache (the write-back classes match the
  // three write-back causes the design has).
  typedef struct packed {
    logic ecc_wb;          // write-back forced by ECC entry eviction
    logic clean_wb;        // write-back by dirty-line cleaning
    logic repl_wb;         // write-back of a replaced dirty line
    logic clean_check;     // cleaning logic finished checking one set
    logic clean_deferred;  // cleaning request waited because an L1 request won
    logic written_set;     // a dirty line was modified again (written bit set)
    logic ecc_corrected;   // SECDED corrected a single-bit error
    logic uncorrectable;   // SECDED found a double-bit error
    logic parity_refetch;  // parity error in a clean line, line refetched
    logic tag_perr;        // parity error in a tag or status field
    logic miss;            // line fill from memory
  } l2_events_t;

  // Even parity of one word.
  function automatic logic word_parity(input word_t w);
    return ^w;
  endfunction

  // Codeword position (1..71) of data bit i: count i+1 positions, skipping
  // each power of two (a check-bit position) that is reached.
  function automatic logic [6:0] data_pos(input int unsigned i);
    int unsigned pos;
    pos = i + 1;
    for (int unsigned k = 0; k < 7; k++) begin
      if ((1 << k) <= pos) pos++;
    end
    return 7'(pos);
  endfunction

  // Check byte of one data word.
  function automatic chk_t secded_encode(input word_t d);
    chk_t c;
    logic [6:0] h;
    h = '0;
    for (int unsigned i = 0; i < WORD_W; i++) begin
      if (d[i]) h ^= data_pos(i);
    end
    c[6:0] = h;
    c[7]   = (^d) ^ (^h);
    return c;
  endfunction

endpackage
