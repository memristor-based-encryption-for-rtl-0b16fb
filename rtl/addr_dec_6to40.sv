// addr_dec_6to40: round wordline decoder shared by all RC/RK crossbars.
//
// The 6-bit round counter value selects one of the round rows. The address
// is split into three pairs, AB = a[1:0], CD = a[3:2] and EF = a[5:4]; each
// pair is predecoded from true and complement inputs by 2-input NAND gates
// (active-low one-hot). A NOR stage combines the AB and CD predecodes into
// 16 active-high lines, an inverter/NAND stage turns them back into
// active-low lines, and the final NOR stage combines them with the EF
// predecode. Only the first NOUT of the 64 possible outputs are built
// (40 for GIFT-128); addresses of NOUT and above drive no wordline.
//
// The enable input is this design's addition (no wordline outside a read).
// Purely combinational.
module addr_dec_6to40 #(
  parameter int unsigned NOUT = 40
) (
  input  logic            en,
  input  logic [5:0]      a,
  output logic [NOUT-1:0] wl
);
  logic [5:0]  an;
  logic [3:0]  ab_n, cd_n, ef_n;  // predecode, active low
  logic [15:0] abcd;              // first NOR stage, active high

  always_comb begin
    an = ~a;
    for (int k = 0; k < 4; k++) begin
      ab_n[k] = ~(en & (k[0] ? a[0] : an[0]) & (k[1] ? a[1] : an[1]));
      cd_n[k] = ~(      (k[0] ? a[2] : an[2]) & (k[1] ? a[3] : an[3]));
      ef_n[k] = ~(      (k[0] ? a[4] : an[4]) & (k[1] ? a[5] : an[5]));
    end
    for (int m = 0; m < 16; m++)
      abcd[m] = ~(cd_n[m / 4] | ab_n[m % 4]);
    for (int r = 0; r < int'(NOUT); r++)
      wl[r] = ~(ef_n[r / 16] | ~abcd[r % 16]);
  end

  initial assert (NOUT >= 1 && NOUT <= 64) else $error("NOUT must be 1..64");
endmodule
