// sram_array_tb: write and read every row of a 32 x 18 cell array.
//
// The testbench plays the decoder and the column circuits: it raises one word
// line at a time, drives the bit-line levels for a write (bit = data,
// invbit = ~data) or leaves both at 1 for a read, and compares the column
// discharge outputs with a copy of the contents it keeps itself. A read of a
// row must discharge bit where the stored bit is 0 and invbit where it is 1;
// with no row selected nothing may be discharged.
`timescale 1ns / 1ps

module sram_array_tb;

  localparam int unsigned ROWS = 32;
  localparam int unsigned COLS = 18;

  logic [ROWS-1:0]           wl;
  logic [COLS-1:0]           drv_bit, drv_invbit, pd_bit, pd_invbit;
  logic [ROWS-1:0][COLS-1:0] q;
  logic [COLS-1:0]           model [ROWS];

  int checks   = 0;
  int failures = 0;

  sram_array #(.ROWS(ROWS), .COLS(COLS)) dut (
    .wl(wl), .drv_bit(drv_bit), .drv_invbit(drv_invbit),
    .pd_bit(pd_bit), .pd_invbit(pd_invbit), .q(q)
  );

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_row(int r, logic [COLS-1:0] d);
    wl = '0;
    #5;
    drv_bit    = d;
    drv_invbit = ~d;
    #5;
    wl[r] = 1'b1;
    #10;
    wl = '0;
    #5;
    drv_bit    = '1;
    drv_invbit = '1;
    model[r] = d;
  endtask

  task automatic read_row(int r);
    wl = '0;
    drv_bit    = '1;
    drv_invbit = '1;
    #5;
    wl[r] = 1'b1;
    #10;
    checks++;
    if (pd_bit !== ~model[r] || pd_invbit !== model[r] || q[r] !== model[r]) begin
      failures++;
      $display("row %0d: pd=%h/%h q=%h expected data %h", r, pd_bit, pd_invbit, q[r], model[r]);
    end
    wl = '0;
    #5;
  endtask

  initial begin
    wl = '0; drv_bit = '1; drv_invbit = '1;
    for (int r = 0; r < ROWS; r++) write_row(r, COLS'($urandom));
    for (int r = 0; r < ROWS; r++) read_row(r);
    // overwrite in a shuffled order, then read back in reverse
    for (int i = 0; i < 3 * ROWS; i++) write_row(int'($urandom_range(ROWS - 1)), COLS'($urandom));
    for (int r = ROWS - 1; r >= 0; r--) read_row(r);
    // a write with no row selected must change nothing
    drv_bit = '0; drv_invbit = '1;
    #10;
    drv_bit = '1;
    #10;
    checks++;
    if (pd_bit !== '0 || pd_invbit !== '0) begin
      failures++;
      $display("lines discharged with no row selected");
    end
    for (int r = 0; r < ROWS; r++) read_row(r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
