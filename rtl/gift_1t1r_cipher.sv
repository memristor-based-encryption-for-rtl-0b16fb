// gift_1t1r_cipher: read-only 1T1R-crossbar GIFT block cipher (top level).
//
// GIFT-128 (default) encrypts a 128-bit block with a 128-bit key in 40
// rounds of SubCells, PermBits and AddRoundKey. Here the state is cut into
// NSLICE = 32 nibble slices (gift_slice). Each slice holds the S-box and all
// of its round-key/round-constant bits in memristor crossbars that are
// programmed once per session, and performs a whole round - substitution
// plus key addition - with a single non-destructive read. There is no key
// schedule logic: the host programs every round's key and constant bits,
// already arranged through the bit permutation (gift_pkg::rk_row).
//
// Round loop: one round per clock. A 6-bit toggle-flip-flop counter
// (round_counter) and one shared 6-to-40 decoder (addr_dec_6to40) select the
// same round row in all 32 RC/RK crossbars. The slice output registers feed
// the next round through the hardwired permutation web; in
// round 1 the slices read the plaintext instead. The ciphertext is the
// permuted output register.
//
// Interface and timing:
//   * Programming (idle only): sb_we writes row sb_waddr of every slice's
//     S-box crossbar with sb_wdata; rk_we writes round row rk_waddr of all
//     RC/RK crossbars, 3 bits per slice in rk_wdata[3j+2:3j].
//   * start with pt valid in the same cycle begins an encryption (ignored
//     while busy). done pulses ROUNDS cycles later (40 cycles = 4 us at
//     10 MHz); ct is valid from then until the next start.
// BLOCK_BITS=64 gives GIFT-64 (16 slices, 28 rounds, key on the two LSBs
// of each nibble). The slice/crossbar organisation follows the document;
// the handshake, programming port and reset are this design's choices.
module gift_1t1r_cipher
  import gift_pkg::*;
#(
  parameter  int unsigned BLOCK_BITS = 128,
  localparam int unsigned NSLICE     = BLOCK_BITS / 4,
  localparam int unsigned ROUNDS     = rounds_of(BLOCK_BITS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // crossbar programming
  input  logic                   sb_we,
  input  logic [3:0]             sb_waddr,
  input  logic [3:0]             sb_wdata,
  input  logic                   rk_we,
  input  logic [5:0]             rk_waddr,
  input  logic [3*NSLICE-1:0]    rk_wdata,
  // encryption
  input  logic                   start,
  input  logic [BLOCK_BITS-1:0]  pt,
  output logic                   busy,
  output logic                   done,
  output logic [BLOCK_BITS-1:0]  ct,
  output logic [5:0]             round_idx
);
  localparam int unsigned KLO = klo_of(BLOCK_BITS);

  logic                  active, first;
  logic [ROUNDS-1:0]     rk_wl;
  logic [BLOCK_BITS-1:0] slice_in, slice_out, fed_back;

  round_counter #(.ROUNDS(ROUNDS)) u_cnt (
    .clk, .rst_n, .start, .cnt(round_idx), .active, .first, .busy, .done
  );

  addr_dec_6to40 #(.NOUT(ROUNDS)) u_rkdec (.en(active), .a(round_idx), .wl(rk_wl));

  // PermBits web: slice output bit i drives bit P(i) of the next round's
  // input. P keeps the bit's index inside its nibble and moves it to
  // another nibble (gift_pkg::perm_pos); these are wires only.
  for (genvar i = 0; i < int'(BLOCK_BITS); i++) begin : g_perm
    assign fed_back[perm_pos(i, BLOCK_BITS)] = slice_out[i];
  end

  assign slice_in = first ? pt : fed_back;
  assign ct       = fed_back;

  for (genvar j = 0; j < int'(NSLICE); j++) begin : g_slice
    gift_slice #(
      .ROUNDS(ROUNDS), .KLO(KLO), .HAS_RC(slice_has_rc(j, BLOCK_BITS))
    ) u_slice (
      .clk, .rst_n,
      .rd_en    (active),
      .nib_in   (slice_in[4*j +: 4]),
      .rk_wl,
      .sb_we    (sb_we && !active),
      .sb_waddr,
      .sb_wdata,
      .rk_we    (rk_we && !active),
      .rk_waddr,
      .rk_wdata (rk_wdata[3*j +: 3]),
      .nib_out  (slice_out[4*j +: 4])
    );
  end

  initial assert (BLOCK_BITS == 64 || BLOCK_BITS == 128)
    else $error("BLOCK_BITS must be 64 or 128");
  a_no_prog_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !(sb_we || rk_we));
endmodule
