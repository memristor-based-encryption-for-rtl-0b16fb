// bl_sense_amp: dual-sense-amplifier (DSA) bitline sensing of a slice column.
//
// During a read, the selected S-box cell (cell_top) and the selected round-
// key cell (cell_bot) of a column share one bitline, so the bitline level
// depends on how many of them are in the low-resistance state: 0, 1 or 2.
// Two sense amplifiers compare it with fixed references: the AND SA fires
// when both cells conduct, the NOR SA when neither does. A NOR gate of the
// two yields XOR = NOR(AND, NOR), which is how the round-key bit is added
// to the S-box output without writing any cell.
//
// XOR_MODE=0 builds the read-out SA used on columns without a key bit: only
// the NOR-referenced amplifier is present and its inverted output is the
// stored bit (cell_bot should be tied to 0).
//
// The document gives the scheme and the reference voltages (0.45 V AND,
// 0.43 V NOR and read-out); here the analog level is abstracted to the
// count of conducting cells and the references to the thresholds "count ==
// 2" and "count == 0". All outputs are 0 when en (read pulse) is low.
// Combinational.
module bl_sense_amp #(
  parameter bit XOR_MODE = 1'b1
) (
  input  logic en,
  input  logic cell_top,
  input  logic cell_bot,
  output logic sa_and,
  output logic sa_nor,
  output logic q
);
  logic [1:0] level;  // number of conducting cells on the bitline

  always_comb begin
    level  = 2'(cell_top) + 2'(cell_bot);
    sa_and = en && XOR_MODE && (level == 2'd2);
    sa_nor = en && (level == 2'd0);
    if (XOR_MODE) q = en & ~(sa_and | sa_nor);
    else          q = en & ~sa_nor;
  end
endmodule
