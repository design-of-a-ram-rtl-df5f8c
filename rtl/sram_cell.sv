// sram_cell: logic model of one six-transistor static RAM cell.
//
// The cell is two cross-coupled inverters (the stored bit q and its
// complement) reached through two NMOS pass transistors that the row select
// line turns on. It behaves like a set/reset latch seen through its bit lines:
// with the row selected, a bit line pulled low by the write circuit forces that
// side of the cell to 0 (bit low writes 0, invbit low writes 1). With the row
// selected and both bit lines left at their precharge level, the cell does not
// change; instead the side holding 0 discharges its bit line, which is how the
// cell is read. This follows the design description.
//
// The analog bit-line pair is split here into the two directions in which
// current flows, which keeps the model free of combinational loops:
//   drv_bit, drv_invbit  level the column's write circuit puts on the lines
//                        (both 1 while it only precharges);
//   pd_bit, pd_invbit    1 where this cell pulls the line low during a read.
// The column circuit combines them into the bit-line levels. This split is a
// modelling choice of this design.
//
// Timing: level sensitive, no clock. The storage node is a latch, transparent
// while sel is high and one driven bit line is low; that latch is the cell
// itself and is intended. If both driven lines are low at once the cell is
// forced to 0, a case the write circuit never produces.
`timescale 1ns / 1ps

module sram_cell (
  input  logic sel,          // word line of this row
  input  logic drv_bit,      // write-circuit level on bit
  input  logic drv_invbit,   // write-circuit level on invbit
  output logic pd_bit,       // cell discharges bit (it holds 0)
  output logic pd_invbit,    // cell discharges invbit (it holds 1)
  output logic q             // stored value, for observation only
);

  logic write_through;   // pass transistors on and one line driven low

  assign write_through = sel & ~(drv_bit & drv_invbit);

  always_latch begin
    if (write_through) begin
      q = drv_bit;
    end
  end

  assign pd_bit    = sel & ~q;
  assign pd_invbit = sel &  q;

endmodule
