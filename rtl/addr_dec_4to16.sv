// addr_dec_4to16: wordline decoder of one slice's S-box crossbar.
//
// The input nibble selects one of the 16 S-box rows. As in a static-CMOS
// SRAM row decoder, the nibble is split into an MSB pair (a[3:2]) and an LSB
// pair (a[1:0]). Each pair is predecoded from its true and complement inputs
// by four 2-input NAND gates (active-low one-hot). The final stage is a
// 2-input NOR per wordline, combining one MSB and one LSB predecode line;
// in silicon these final gates are upsized to drive the wordline.
//
// The enable input is this design's addition: with en low every predecode
// line stays high and no wordline is driven, so wordlines only rise during
// the read pulse. Purely combinational; wl[k] is high when en=1 and a=k.
module addr_dec_4to16 (
  input  logic        en,
  input  logic [3:0]  a,
  output logic [15:0] wl
);
  logic [3:0] an;        // complement inputs
  logic [3:0] pre_lo_n;  // LSB predecode, active low
  logic [3:0] pre_hi_n;  // MSB predecode, active low

  always_comb begin
    an = ~a;
    for (int k = 0; k < 4; k++) begin
      pre_lo_n[k] = ~(en & (k[0] ? a[0] : an[0]) & (k[1] ? a[1] : an[1]));
      pre_hi_n[k] = ~(en & (k[0] ? a[2] : an[2]) & (k[1] ? a[3] : an[3]));
    end
    for (int r = 0; r < 16; r++)
      wl[r] = ~(pre_hi_n[r / 4] | pre_lo_n[r % 4]);
  end
endmodule
