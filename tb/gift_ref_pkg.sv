// gift_ref_pkg: plain round-by-round GIFT reference model for testbenches.
//
// Computes GIFT-64/128 encryption the textbook way: the key schedule and
// the round-constant LFSR run alongside the state, and each round applies
// SubCells, PermBits and AddRoundKey to the whole state. It shares no code
// with the design, whose crossbars hold pre-permuted key bits instead.
package gift_ref_pkg;

  function automatic logic [3:0] ref_sbox(logic [3:0] x);
    case (x)
      4'h0: return 4'h1;  4'h1: return 4'hA;  4'h2: return 4'h4;  4'h3: return 4'hC;
      4'h4: return 4'h6;  4'h5: return 4'hF;  4'h6: return 4'h3;  4'h7: return 4'h9;
      4'h8: return 4'h2;  4'h9: return 4'hD;  4'hA: return 4'hB;  4'hB: return 4'h7;
      4'hC: return 4'h5;  4'hD: return 4'h0;  4'hE: return 4'h8;  default: return 4'hE;
    endcase
  endfunction

  // Position of bit i after PermBits. Within a group of four nibbles,
  // bit b of nibble s goes to quarter (b - s) mod 4 of the state, keeping
  // its bit index b; the group number selects the nibble in that quarter.
  function automatic int ref_perm(int i, int nbits);
    int s, b, grp;
    grp = i / 16;            // which group of four nibbles
    s   = (i % 16) / 4;      // nibble inside the group
    b   = i % 4;             // bit inside the nibble
    return grp * 4 + ((b + 4 - s) % 4) * (nbits / 4) + b;
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [127:0] pt, logic [127:0] key,
                                               int nbits);
    logic [127:0] st, nx, k;
    logic [5:0]   c;
    int           rounds;
    rounds = (nbits == 64) ? 28 : 40;
    st = pt;
    k  = key;
    c  = 6'h00;
    for (int r = 0; r < rounds; r++) begin
      // SubCells
      for (int n = 0; n < nbits / 4; n++) st[4*n +: 4] = ref_sbox(st[4*n +: 4]);
      // PermBits
      nx = '0;
      for (int i = 0; i < nbits; i++) nx[ref_perm(i, nbits)] = st[i];
      st = nx;
      // AddRoundKey
      for (int i = 0; i < nbits / 4; i++) begin
        if (nbits == 64) begin
          st[4*i + 1] ^= k[16 + i];
          st[4*i]     ^= k[i];
        end else begin
          st[4*i + 2] ^= k[64 + i];
          st[4*i + 1] ^= k[i];
        end
      end
      c = {c[4:0], ~(c[5] ^ c[4])};
      st[nbits - 1] ^= 1'b1;
      st[3]  ^= c[0]; st[7]  ^= c[1]; st[11] ^= c[2];
      st[15] ^= c[3]; st[19] ^= c[4]; st[23] ^= c[5];
      // key update
      k = {k[17:16], k[31:18], k[11:0], k[15:12], k[127:32]};
    end
    if (nbits == 64) st[127:64] = '0;
    return st;
  endfunction

endpackage
