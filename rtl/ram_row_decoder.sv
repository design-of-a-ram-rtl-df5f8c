// ram_row_decoder: 5-to-32 word-line decoder made of NOR gates.
//
// Word line r is the NOR of the five address literals that are all 0 when the
// address equals r: the true address bit where bit k of r is 0 and the
// complemented bit where it is 1. Row 0 is therefore NOR(A0..A4) and row 31 is
// NOR(~A0..~A4), exactly one word line is high for every address, and in
// silicon each gate is a pseudo-NMOS NOR (one always-on PMOS load, one NMOS
// pull-down per input) laid out with a true and a complemented rail per
// address bit. Those equations follow the design description.
//
// The NOR gate of the schematic has one pull-down more than there are address
// bits; this design uses that input as the decoder disable: when en is low the
// extra pull-down is on, every word line is low, no cell is connected to its
// bit lines and the bit lines stay precharged. Using the extra input that way
// is this design's reading of the schematic.
//
// Interface: addr (ADDR_W bits), en (active high), wl (one-hot, 2**ADDR_W
// lines, wl[r] selects row r). Purely combinational, no clock.
`timescale 1ns / 1ps

module ram_row_decoder #(
  parameter int unsigned ADDR_W = 5
) (
  input  logic [ADDR_W-1:0]      addr,
  input  logic                   en,
  output logic [(1<<ADDR_W)-1:0] wl
);

  localparam int unsigned ROWS = 1 << ADDR_W;

  always_comb begin
    for (int unsigned r = 0; r < ROWS; r++) begin
      logic [ADDR_W-1:0] row_code;
      logic              pull_down;   // any NMOS of this NOR gate conducting
      row_code = ADDR_W'(r);
      pull_down = ~en;
      for (int unsigned k = 0; k < ADDR_W; k++) begin
        // gate input k is A_k when the row's bit is 0, ~A_k when it is 1
        pull_down = pull_down | (row_code[k] ? ~addr[k] : addr[k]);
      end
      wl[r] = ~pull_down;
    end
  end

endmodule
