// v2fcc_pkg: constants and helpers shared by the variable-to-fixed (V2F)
// code decompression blocks.
//
// The coding scheme turns variable-length runs of program bits into fixed
// N-bit codewords. The defaults are the main configuration: N = 4-bit
// codewords, a 32x4 Markov model (128 states, 7-bit state address), decoded
// runs of at most 13 bits (4-bit count field), and 256-bit fetch packets as
// the unit of random access. A Markov decoder-table entry is 24 bits: the
// count in the top four bits, the decoded run in the middle thirteen bits and
// the next state in the low seven bits.
//
// The function iid_run() builds one entry of the static-iid codebook the
// same way the encoder builds it: start from the integer interval [0, 2^N),
// split each non-unit interval [lo, lo+size) into a left part (input bit 0)
// of size*P0 integer units, rounded to the nearest integer with halves
// rounded down and clamped to 1..size-1, and a right part (input bit 1) of
// the rest, until every part is a unit interval [w, w+1). The bit path
// leading to [w, w+1) is what codeword w decodes to, and codeword w is
// assigned to [w, w+1). P0 is given in 1/256 units. The exact rounding is
// not specified by the scheme; this one reproduces its worked examples
// (P0 = 0.75 with N = 2, and a Markov example with P0 = 0.8, 0.7, 0.1) and
// its published average run lengths for P0 = 0.75 and N = 2..8 (2.312,
// 3.488, 4.752, 5.973, 7.216, 8.442, 9.681 bits per codeword).
package v2fcc_pkg;

  localparam int unsigned PACKET_BITS = 256; // one TMS320C6x fetch packet
  localparam int unsigned CW_BITS     = 4;   // codeword length N
  localparam int unsigned STATE_BITS  = 7;   // 128 Markov states (32x4)
  localparam int unsigned SEQ_BITS    = 13;  // longest decoded run
  localparam int unsigned LEN_BITS    = 4;   // field holding the run length
  localparam int unsigned P0_Q8       = 192; // static-iid Prob(0) = 0.75

  // Markov decoder table entry, 24 bits at the defaults.
  typedef struct packed {
    logic [LEN_BITS-1:0]   len;        // number of decoded bits, 1..13
    logic [SEQ_BITS-1:0]   bits;       // decoded run, first bit at the MSB
    logic [STATE_BITS-1:0] next_state; // codebook to use for the next chunk
  } dec_entry_t;

  // A decoded run of up to 64 bits: length, and the run with its first bit
  // at bit 63 and unused low bits zero.
  typedef struct packed {
    int unsigned len;
    logic [63:0] bits;
  } run_t;

  // Size of the left (bit 0) sub-interval of an interval of `size` units.
  function automatic int unsigned left_size(int unsigned size, int unsigned p0_q8);
    int unsigned l;
    l = (size * p0_q8 + 127) / 256;   // nearest, halves round down
    if (l < 1) l = 1;
    if (l > size - 1) l = size - 1;
    return l;
  endfunction

  // Run decoded by codeword w of an iid codebook with cw_bits-bit codewords.
  function automatic run_t iid_run(int unsigned p0_q8, int unsigned cw_bits, int unsigned w);
    run_t        r;
    int unsigned lo, size, l;
    lo   = 0;
    size = 1 << cw_bits;
    r    = '0;
    while (size > 1 && r.len < 64) begin
      l = left_size(size, p0_q8);
      if (w < lo + l) begin
        size = l;                         // bit 0: left part
      end else begin
        r.bits[63 - r.len] = 1'b1;        // bit 1: right part
        lo   = lo + l;
        size = size - l;
      end
      r.len = r.len + 1;
    end
    return r;
  endfunction

  // Shortest and longest run of an iid codebook.
  function automatic int unsigned iid_min_run(int unsigned p0_q8, int unsigned cw_bits);
    int unsigned m;
    m = 64;
    for (int unsigned w = 0; w < (1 << cw_bits); w++)
      if (iid_run(p0_q8, cw_bits, w).len < m) m = iid_run(p0_q8, cw_bits, w).len;
    return m;
  endfunction

  function automatic int unsigned iid_max_run(int unsigned p0_q8, int unsigned cw_bits);
    int unsigned m;
    m = 0;
    for (int unsigned w = 0; w < (1 << cw_bits); w++)
      if (iid_run(p0_q8, cw_bits, w).len > m) m = iid_run(p0_q8, cw_bits, w).len;
    return m;
  endfunction

  // Most codewords one packet can need: packet length over the shortest run.
  function automatic int unsigned iid_worst_chunks(int unsigned pbits, int unsigned p0_q8,
                                                   int unsigned cw_bits);
    int unsigned m;
    m = iid_min_run(p0_q8, cw_bits);
    return (pbits + m - 1) / m;
  endfunction

endpackage
