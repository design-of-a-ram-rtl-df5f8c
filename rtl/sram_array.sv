// sram_array: ROWS x COLS array of six-transistor cells.
//
// Cells in one row share the row's select (word) line; cells in one column
// share the column's bit-line pair. The cell layout is drawn so that abutting
// cells connects both, which is all the array is: a grid of sram_cell
// instances. Each column's bit line is a wired-AND of the precharged line and
// every cell on it, so the per-column discharge requests of the cells are
// OR-ed here and handed to the column's precharge/write circuit. The 32 x 18
// size follows the design description.
//
// Interface: wl (one row select per row), drv_bit/drv_invbit (levels from the
// column write circuits), pd_bit/pd_invbit (per column, some selected cell
// discharges that line), q (every stored bit, row-major, for observation).
// Combinational apart from the cells' own storage, no clock.
`timescale 1ns / 1ps

module sram_array #(
  parameter int unsigned ROWS = 32,
  parameter int unsigned COLS = 18
) (
  input  logic [ROWS-1:0]           wl,
  input  logic [COLS-1:0]           drv_bit,
  input  logic [COLS-1:0]           drv_invbit,
  output logic [COLS-1:0]           pd_bit,
  output logic [COLS-1:0]           pd_invbit,
  output logic [ROWS-1:0][COLS-1:0] q
);

  logic [ROWS-1:0][COLS-1:0] cell_pd_bit;
  logic [ROWS-1:0][COLS-1:0] cell_pd_invbit;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      sram_cell u_cell (
        .sel        (wl[r]),
        .drv_bit    (drv_bit[c]),
        .drv_invbit (drv_invbit[c]),
        .pd_bit     (cell_pd_bit[r][c]),
        .pd_invbit  (cell_pd_invbit[r][c]),
        .q          (q[r][c])
      );
    end
  end

  always_comb begin
    pd_bit    = '0;
    pd_invbit = '0;
    for (int unsigned r = 0; r < ROWS; r++) begin
      pd_bit    = pd_bit    | cell_pd_bit[r];
      pd_invbit = pd_invbit | cell_pd_invbit[r];
    end
  end

endmodule
