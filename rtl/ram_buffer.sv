// ram_buffer: 32-location by 18-bit static RAM for on-chip ADC results.
//
// The address goes to a NOR-gate row decoder that raises one of 32 word lines.
// Each of the 18 columns has a precharge/write circuit on its bit-line pair,
// and the 32 x 18 cell array sits between the word lines and the columns.
// Writing: with write high, each column drives inp[c] onto its bit line (and
// the complement onto invbit) and the selected row's cells take those values.
// Reading: with write low, the lines stay precharged high and the selected
// cells discharge the line on their 0 side, so out carries the stored word.
// With dec_en low no row is selected: the lines stay precharged, out reads
// all ones and a write reaches no cell. This structure follows the design
// description; the separate dec_en pin and the all-ones idle output are this
// design's reading of it.
//
// Timing: asynchronous, no clock. out follows addr combinationally when
// reading and follows inp while writing. A write takes effect while write,
// dec_en and the address are steady; change the address only with write low,
// or keep the data steady across the address change as the reference test
// sequence does (new address, then new data, one word per 200 ns = 5 MHz).
//
// Ports: addr[ADDR_W-1:0], dec_en, write, inp[WIDTH-1:0], out[WIDTH-1:0],
// read_upset (some column has both lines low while reading; stays 0 in normal
// use), bit_lines/invbit_lines (the resolved bit-line levels) and cells
// (every stored bit, row-major); the last three are for observation and test.
`timescale 1ns / 1ps

module ram_buffer #(
  parameter int unsigned WORDS = ram_pkg::WORDS,
  parameter int unsigned WIDTH = ram_pkg::WIDTH,
  localparam int unsigned ADDR_W = $clog2(WORDS)
) (
  input  logic [ADDR_W-1:0]             addr,
  input  logic                          dec_en,
  input  logic                          write,
  input  logic [WIDTH-1:0]              inp,
  output logic [WIDTH-1:0]              out,
  output logic                          read_upset,
  output logic [WIDTH-1:0]              bit_lines,
  output logic [WIDTH-1:0]              invbit_lines,
  output logic [WORDS-1:0][WIDTH-1:0]   cells
);

  logic [(1<<ADDR_W)-1:0] wl_all;
  logic [WORDS-1:0]       wl;
  logic [WIDTH-1:0]       drv_bit, drv_invbit;
  logic [WIDTH-1:0]       pd_bit, pd_invbit;
  logic [WIDTH-1:0]       upset;

  ram_row_decoder #(.ADDR_W(ADDR_W)) u_decoder (
    .addr (addr),
    .en   (dec_en),
    .wl   (wl_all)
  );

  // a non-power-of-two depth simply leaves the top decoder outputs unused
  assign wl = wl_all[WORDS-1:0];

  sram_array #(.ROWS(WORDS), .COLS(WIDTH)) u_array (
    .wl         (wl),
    .drv_bit    (drv_bit),
    .drv_invbit (drv_invbit),
    .pd_bit     (pd_bit),
    .pd_invbit  (pd_invbit),
    .q          (cells)
  );

  for (genvar c = 0; c < WIDTH; c++) begin : g_column
    ram_precharge_write u_column (
      .write          (write),
      .din            (inp[c]),
      .cell_pd_bit    (pd_bit[c]),
      .cell_pd_invbit (pd_invbit[c]),
      .drv_bit        (drv_bit[c]),
      .drv_invbit     (drv_invbit[c]),
      .bit_line       (bit_lines[c]),
      .invbit_line    (invbit_lines[c]),
      .dout           (out[c]),
      .read_upset     (upset[c])
    );
  end

  assign read_upset = |upset;

endmodule
