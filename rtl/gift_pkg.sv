// gift_pkg: constants and helper functions shared by the 1T1R GIFT cipher.
//
// The cipher keeps no key schedule in hardware. Instead, the round keys and
// round constants of every round are computed ahead of time and programmed
// once into the round-key/round-constant (RC/RK) crossbar of each nibble
// slice. Because a slice adds its key bits to the S-box output *before* the
// hardwired bit permutation, each stored bit is the GIFT add-mask bit of the
// position that the slice bit is permuted to. The functions below give the
// S-box, the bit permutation and that pre-permuted crossbar image, so that a
// host (or a testbench) can produce the programming data.
//
// GIFT-128 is the default configuration; GIFT-64 is supported by passing
// nbits = 64. The S-box, permutation, key schedule and constant schedule
// follow the GIFT specification; the crossbar image layout (three bits per
// slice: {bit 3 / round constant, upper key bit, lower key bit}) is this
// design's own choice.
package gift_pkg;

  localparam int unsigned MAX_BITS   = 128;
  localparam int unsigned MAX_SLICES = MAX_BITS / 4;
  localparam int unsigned RK_COLS    = 3;  // RC/RK crossbar columns per slice (max)

  // Number of rounds of the GIFT variant.
  function automatic int unsigned rounds_of(int unsigned nbits);
    return (nbits == 64) ? 28 : 40;
  endfunction

  // Lower of the two nibble bits that receive round-key bits:
  // bits 1 and 2 for GIFT-128, bits 0 and 1 for GIFT-64.
  function automatic int unsigned klo_of(int unsigned nbits);
    return (nbits == 64) ? 0 : 1;
  endfunction

  // GIFT 4-bit S-box.
  function automatic logic [3:0] sbox(logic [3:0] x);
    logic [3:0] t [16];
    t = '{4'h1, 4'hA, 4'h4, 4'hC, 4'h6, 4'hF, 4'h3, 4'h9,
          4'h2, 4'hD, 4'hB, 4'h7, 4'h5, 4'h0, 4'h8, 4'hE};
    return t[x];
  endfunction

  // GIFT bit permutation: bit i moves to position perm_pos(i).
  function automatic int unsigned perm_pos(int unsigned i, int unsigned nbits);
    int unsigned q;
    q = nbits / 4;
    return 4 * (i / 16) + q * ((3 * ((i % 16) / 4) + (i % 4)) % 4) + (i % 4);
  endfunction

  // Round constant of round r (0-based) from the 6-bit constant LFSR.
  function automatic logic [5:0] round_const(int unsigned r);
    logic [5:0] c;
    c = '0;
    for (int unsigned k = 0; k <= r; k++) c = {c[4:0], c[5] ^ c[4] ^ 1'b1};
    return c;
  endfunction

  // Key state after r updates of the GIFT key schedule.
  function automatic logic [127:0] key_state(logic [127:0] key, int unsigned r);
    logic [127:0] k;
    k = key;
    for (int unsigned n = 0; n < r; n++)
      k = {k[17:16], k[31:18], k[11:0], k[15:12], k[127:32]};
    return k;
  endfunction

  // Vector XORed into the state after SubCells+PermBits in round r.
  function automatic logic [MAX_BITS-1:0] add_mask(logic [127:0] key, int unsigned r,
                                                   int unsigned nbits);
    logic [MAX_BITS-1:0] m;
    logic [127:0] k;
    logic [5:0]   c;
    int unsigned  lo;
    m  = '0;
    k  = key_state(key, r);
    c  = round_const(r);
    lo = klo_of(nbits);
    for (int unsigned i = 0; i < nbits / 4; i++) begin
      if (nbits == 64) begin
        m[4*i + lo + 1] = k[16 + i];   // U = k1
        m[4*i + lo]     = k[i];        // V = k0
      end else begin
        m[4*i + lo + 1] = k[64 + i];   // U = k5||k4
        m[4*i + lo]     = k[i];        // V = k1||k0
      end
    end
    m[nbits-1] = m[nbits-1] ^ 1'b1;
    for (int unsigned j = 0; j < 6; j++) m[4*j + 3] = m[4*j + 3] ^ c[j];
    return m;
  endfunction

  // True when slice j stores round-constant bits (third RC/RK column).
  function automatic bit slice_has_rc(int unsigned j, int unsigned nbits);
    int unsigned p;
    p = perm_pos(4*j + 3, nbits);
    return (p == nbits - 1) || (p <= 23 && (p % 4) == 3);
  endfunction

  // Crossbar image of one round row for all slices: slice j occupies bits
  // [3j+2:3j] = {bit 3, bit klo+1, bit klo} of the pre-permuted add-mask.
  function automatic logic [RK_COLS*MAX_SLICES-1:0] rk_row(logic [127:0] key,
                                                           int unsigned r,
                                                           int unsigned nbits);
    logic [MAX_BITS-1:0]             m;
    logic [RK_COLS*MAX_SLICES-1:0]   row;
    int unsigned                     lo;
    m   = add_mask(key, r, nbits);
    lo  = klo_of(nbits);
    row = '0;
    for (int unsigned j = 0; j < nbits / 4; j++) begin
      row[3*j]     = m[perm_pos(4*j + lo, nbits)];
      row[3*j + 1] = m[perm_pos(4*j + lo + 1, nbits)];
      row[3*j + 2] = m[perm_pos(4*j + 3, nbits)];
    end
    return row;
  endfunction

endpackage
