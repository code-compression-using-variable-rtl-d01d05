// v2f_ref_pkg: reference model of the V2F code compressor, used by the
// testbenches to build decoder tables and compressed blocks independently of
// the RTL.
//
// Markov model: DEPTH layers of WIDTH nodes, state = layer*WIDTH + node,
// state 0 the initial state. From node n of layer d, input bit b leads to
// node (2n + b) mod WIDTH of layer (d+1) mod DEPTH, so each node remembers
// the last log2(WIDTH) bits. Every state has its own Prob(0), p0[s], in 1/256
// units. The static iid model is the same code with one state whose p0 never
// changes (set iid = 1).
//
// Codebook of state s: start from [0, 16); split [lo, lo+size) into a left
// part of round(size*p0/256) units (clamped to 1..size-1) for bit 0 and the
// rest for bit 1, moving to the Markov successor state at every bit, until a
// unit interval [u, u+1) is reached. Codeword perm[s][u] is sent for it, and
// the decoder-table entry at {s, perm[s][u]} holds the bit path, its length
// and the state reached. With perm the identity, codeword = u.
//
// Encoder: bits are taken MSB first from the packet; a codeword that the end
// of the packet leaves unfinished is completed with 1 bits; an odd number of
// codewords gets a 0 nibble for byte alignment; codeword 0 of a block sits in
// the high nibble of its first byte. Each block starts in state 0.
package v2f_ref_pkg;

  localparam int DEPTH = 32;
  localparam int WIDTH = 4;
  localparam int NSTATES = DEPTH * WIDTH;
  localparam int PKT = 256;

  int unsigned p0   [NSTATES];
  int unsigned perm [NSTATES][16];
  bit          iid;                    // 1: one state, p0[0] everywhere

  // statistics of the last encode() call
  int last_pad_bits;                   // 1 bits added at the packet end
  int last_pad_nibble;                 // 1 if an alignment nibble was added
  int last_chunks;

  function automatic int unsigned next_state(int unsigned s, bit b);
    int unsigned d, n;
    if (iid) return 0;
    d = s / WIDTH;
    n = s % WIDTH;
    return ((d + 1) % DEPTH) * WIDTH + ((2 * n + b) % WIDTH);
  endfunction

  function automatic int unsigned lsize(int unsigned size, int unsigned p);
    int unsigned l;
    l = (size * p + 127) / 256;
    if (l < 1) l = 1;
    if (l > size - 1) l = size - 1;
    return l;
  endfunction

  // Decoder-table word {len[4], bits[13], next[7]} for (state s, codeword cw).
  function automatic logic [23:0] table_word(int unsigned s, int unsigned cw);
    int unsigned u, lo, size, l, st, n;
    logic [12:0] bits;
    u = 0;
    for (int k = 0; k < 16; k++) if (perm[s][k] == cw) u = k;
    lo = 0; size = 16; st = s; n = 0; bits = '0;
    while (size > 1) begin
      l = lsize(size, p0[st]);
      if (u < lo + l) begin
        size = l;
        st = next_state(st, 1'b0);
      end else begin
        bits[12-n] = 1'b1;
        lo = lo + l; size = size - l;
        st = next_state(st, 1'b1);
      end
      n++;
    end
    if (n > 13) $fatal(1, "model gives a run longer than 13 bits");
    return {4'(n), bits, 7'(st)};
  endfunction

  // Compress one packet into bytes; returns the byte count.
  function automatic int encode(input logic [PKT-1:0] pkt, output logic [7:0] bytes []);
    int unsigned pos, lo, size, l, st, cs;
    bit b;
    logic [3:0] nib [$];
    st = 0; pos = 0;
    last_pad_bits = 0;
    while (pos < PKT) begin
      lo = 0; size = 16; cs = st;
      while (size > 1) begin
        if (pos < PKT) b = pkt[PKT-1-pos];
        else begin b = 1'b1; last_pad_bits++; end
        pos++;
        l = lsize(size, p0[st]);
        if (!b) size = l;
        else begin lo = lo + l; size = size - l; end
        st = next_state(st, b);
      end
      nib.push_back(4'(perm[cs][lo]));
    end
    last_chunks = nib.size();
    last_pad_nibble = nib.size() % 2;
    if (last_pad_nibble != 0) nib.push_back(4'h0);
    bytes = new[nib.size() / 2];
    foreach (bytes[i]) bytes[i] = {nib[2*i], nib[2*i+1]};
    return bytes.size();
  endfunction

  // Random Prob(0) per state in [lo_q8, hi_q8]; identity or random codeword
  // assignment per codebook.
  function automatic void make_model(bit is_iid, int unsigned lo_q8, int unsigned hi_q8,
                                     bit shuffle);
    iid = is_iid;
    for (int s = 0; s < NSTATES; s++) begin
      p0[s] = is_iid ? 192 : lo_q8 + ($urandom % (hi_q8 - lo_q8 + 1));
      for (int k = 0; k < 16; k++) perm[s][k] = k;
      if (shuffle)
        for (int k = 15; k > 0; k--) begin
          int j; int unsigned t;
          j = $urandom % (k + 1);
          t = perm[s][k]; perm[s][k] = perm[s][j]; perm[s][j] = t;
        end
    end
  endfunction

  // Random packet whose bits are 0 with probability about p0_q8/256.
  function automatic logic [PKT-1:0] random_packet(int unsigned p0_q8);
    logic [PKT-1:0] p;
    for (int i = 0; i < PKT; i++) p[i] = (($urandom % 256) >= p0_q8);
    return p;
  endfunction

  // Packet drawn from the Markov model itself, starting in state 0, so that
  // the codebooks fit its statistics as they would fit a profiled program.
  function automatic logic [PKT-1:0] model_packet();
    logic [PKT-1:0] p;
    int unsigned st;
    st = 0;
    for (int i = PKT - 1; i >= 0; i--) begin
      p[i] = (($urandom % 256) >= p0[st]);
      st = next_state(st, p[i]);
    end
    return p;
  endfunction

endpackage
