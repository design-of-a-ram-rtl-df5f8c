// ram_precharge_write: bit-line precharge and write circuit of one column.
//
// Each column of the RAM has a bit line (bit) and its complement (invbit).
// Two NMOS pull-ups hold both lines near VDD - VTN whenever nothing pulls them
// down, so an idle or read column sits at 1/1. The data input IN goes through
// two inverters, giving IN_BAR and a restored IN; while write is high two pass
// switches connect IN_BAR to invbit and IN to bit and overpower the pull-ups
// and the cells. Without write, the one selected cell of the column discharges
// the line on its 0 side, so bit carries the stored value and invbit its
// complement. All of that follows the design description.
//
// In this logic model the precharge is the default value 1 of both lines, the
// write switches produce drv_bit/drv_invbit for the cells, and the cells'
// discharge requests (OR of the whole column, see sram_array) pull the
// resolved lines low. While write is high the write circuit wins and the
// lines equal the driven values. dout is the bit line, which the chip buffers
// to full logic levels; that buffer has no logic function of its own.
//
// Interface: write, din (IN), cell_pd_bit/cell_pd_invbit from the column's
// cells; drv_bit/drv_invbit to the cells; bit/invbit/dout resolved levels.
// Combinational, no clock. read_upset flags the destructive-read condition
// (selected cell with both lines low), which the circuit is sized to avoid.
`timescale 1ns / 1ps

module ram_precharge_write (
  input  logic write,
  input  logic din,
  input  logic cell_pd_bit,
  input  logic cell_pd_invbit,
  output logic drv_bit,
  output logic drv_invbit,
  output logic bit_line,
  output logic invbit_line,
  output logic dout,
  output logic read_upset
);

  logic in_bar;      // first inverter
  logic in_buf;      // second inverter, restored IN

  assign in_bar = ~din;
  assign in_buf = ~in_bar;

  // write switches: closed -> driven level, open -> precharge level 1
  assign drv_bit    = write ? in_buf : 1'b1;
  assign drv_invbit = write ? in_bar : 1'b1;

  // strong write drive wins over the cells; otherwise the precharged line
  // falls where a selected cell discharges it
  assign bit_line    = write ? drv_bit    : ~cell_pd_bit;
  assign invbit_line = write ? drv_invbit : ~cell_pd_invbit;

  assign dout       = bit_line;
  assign read_upset = ~bit_line & ~invbit_line;

endmodule
