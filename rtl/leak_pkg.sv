// leak_pkg: constants shared by the two leakage-reducing L1 cache designs.
//
// Both designs start from the same base L1: a direct-mapped 64 KB cache.
// The 64 KB size and direct mapping follow the base model of the design;
// the 32-bit byte address and the 32-byte line are this design's own
// choices (the line size is not specified). Lines are refilled from the
// next level in one beat of LINE_W bits; the CPU reads 32-bit words.
package leak_pkg;
  localparam int unsigned ADDR_W      = 32;
  localparam int unsigned WORD_W      = 32;
  localparam int unsigned LINE_BYTES  = 32;
  localparam int unsigned LINE_W      = LINE_BYTES * 8;
  localparam int unsigned OFF_W       = $clog2(LINE_BYTES);
  localparam int unsigned CACHE_BYTES = 65536;
  localparam int unsigned NUM_LINES   = CACHE_BYTES / LINE_BYTES;
  localparam int unsigned IDX_W       = $clog2(NUM_LINES);

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [LINE_W-1:0] line_t;

  // Picks a 32-bit word out of a line; woff is the word offset, address
  // bits [OFF_W-1:2].
  function automatic word_t line_word(line_t line, logic [OFF_W-3:0] woff);
    return line[woff*WORD_W +: WORD_W];
  endfunction

  // Returns the line with one 32-bit word replaced.
  function automatic line_t line_put(line_t line, logic [OFF_W-3:0] woff, word_t w);
    line_t l;
    l = line;
    l[woff*WORD_W +: WORD_W] = w;
    return l;
  endfunction
endpackage
