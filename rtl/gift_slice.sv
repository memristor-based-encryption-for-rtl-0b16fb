// gift_slice: one nibble slice of the 1T1R GIFT cipher; one round per read.
//
// Datapath of a round (all in one read pulse, rd_en high for one cycle):
//   1. addr_dec_4to16 turns the input nibble into one S-box wordline.
//   2. The S-box crossbar (16 rows x 4 cells, programmed with the S-box)
//      puts the substituted nibble on its four bitlines.
//   3. The RC/RK crossbar (ROUNDS rows x 2 cells, x 3 when HAS_RC) sits on
//      the same bitlines; the shared round wordline rk_wl selects this
//      round's key bits (and round-constant bit).
//   4. Columns KLO and KLO+1 (bits 1 and 2 for GIFT-128) and, in a slice
//      with a round-constant bit, column 3 are sensed by XOR sense
//      amplifiers; the remaining columns by read-out amplifiers.
//   5. The 4-bit result is loaded into the output register at the clock
//      edge that ends the read.
// The key bits stored here are already arranged through the permutation
// (see gift_pkg::rk_row), so the slice output equals S(x) XOR P^-1(key).
//
// Programming: sb_* writes one S-box row, rk_* one round row; the 3-bit
// rk_wdata is {bit 3 (round constant), bit KLO+1, bit KLO}. Unused bits are
// ignored. The structure follows the document; the register's reset and
// enable and the programming port are this design's choices.
module gift_slice #(
  parameter int unsigned ROUNDS = 40,
  parameter int unsigned KLO    = 1,
  parameter bit          HAS_RC = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rd_en,
  input  logic [3:0]        nib_in,
  input  logic [ROUNDS-1:0] rk_wl,
  input  logic              sb_we,
  input  logic [3:0]        sb_waddr,
  input  logic [3:0]        sb_wdata,
  input  logic              rk_we,
  input  logic [5:0]        rk_waddr,
  input  logic [2:0]        rk_wdata,
  output logic [3:0]        nib_out
);
  localparam int unsigned RKC = HAS_RC ? 3 : 2;
  localparam int unsigned RAW = (ROUNDS > 1) ? $clog2(ROUNDS) : 1;

  logic [15:0]    sb_wl;
  logic [3:0]     sb_on;
  logic [RKC-1:0] rk_on;
  logic [RKC-1:0] rk_wd;
  logic [3:0]     bot;    // RC/RK cell seen by each nibble column
  logic [3:0]     sensed;

  addr_dec_4to16 u_dec (.en(rd_en), .a(nib_in), .wl(sb_wl));

  xbar_1t1r #(.ROWS(16), .COLS(4)) u_sbox (
    .clk, .we(sb_we), .waddr(sb_waddr), .wdata(sb_wdata),
    .wl(sb_wl), .rd_en, .col_on(sb_on)
  );

  assign rk_wd = rk_wdata[RKC-1:0];

  xbar_1t1r #(.ROWS(ROUNDS), .COLS(RKC)) u_rcrk (
    .clk, .we(rk_we && rk_waddr < 6'(ROUNDS)), .waddr(rk_waddr[RAW-1:0]), .wdata(rk_wd),
    .wl(rk_wl), .rd_en, .col_on(rk_on)
  );

  always_comb begin
    bot        = '0;
    bot[KLO]   = rk_on[0];
    bot[KLO+1] = rk_on[1];
    if (HAS_RC) bot[3] = rk_on[RKC-1];
  end

  for (genvar c = 0; c < 4; c++) begin : g_col
    localparam bit IS_XOR = (c == KLO) || (c == KLO + 1) || (HAS_RC && c == 3);
    logic sa_and, sa_nor;
    bl_sense_amp #(.XOR_MODE(IS_XOR)) u_sa (
      .en(rd_en), .cell_top(sb_on[c]), .cell_bot(bot[c]),
      .sa_and, .sa_nor, .q(sensed[c])
    );
  end

  // Output register: holds the round result that feeds the next round.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     nib_out <= '0;
    else if (rd_en) nib_out <= sensed;
  end

  initial assert (KLO <= 1) else $error("KLO must be 0 or 1");
endmodule
