// xbar_1t1r: 1T1R memristor crossbar, functional model of the cell array.
//
// ROWS x COLS cells, each a memristor in series with an NMOS access
// transistor. A cell in the low-resistance state (LRS) stores 1, the high-
// resistance state (HRS) stores 0. The same structure serves as the 16x4
// S-box lookup table and as the 40x2 / 40x3 round-key/round-constant unit
// of a slice.
//
// Read (non-destructive): the wordlines wl select one row (one-hot) and the
// read pulse rd_en is applied to the source lines; col_on[c] is high when
// the selected cell of column c conducts, i.e. is in LRS. Nothing is
// written during encryption. col_on is combinational in wl and rd_en.
//
// Program: when we is high at a clock edge, row waddr takes wdata. The
// document programs the cells once per encryption session; the separate
// write address is this design's abstraction of the write circuitry. Cells
// are not reset (non-volatile) and hold arbitrary values until programmed.
// Analog behaviour (resistance levels, wire R/C) is not modelled.
module xbar_1t1r #(
  parameter int unsigned ROWS = 16,
  parameter int unsigned COLS = 4,
  localparam int unsigned AW  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic            clk,
  input  logic            we,
  input  logic [AW-1:0]   waddr,
  input  logic [COLS-1:0] wdata,
  input  logic [ROWS-1:0] wl,
  input  logic            rd_en,
  output logic [COLS-1:0] col_on
);
  logic [COLS-1:0] mem [ROWS];

  always_ff @(posedge clk)
    if (we && 32'(waddr) < ROWS) mem[waddr] <= wdata;

  // Every column is a bitline shared by all rows: it conducts when any
  // selected cell on it is in LRS.
  always_comb begin
    col_on = '0;
    for (int r = 0; r < int'(ROWS); r++)
      if (rd_en && wl[r]) col_on |= mem[r];
  end

  a_onehot_wl: assert property (@(posedge clk) rd_en |-> $onehot0(wl));
endmodule
