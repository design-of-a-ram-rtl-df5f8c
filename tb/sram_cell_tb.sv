// sram_cell_tb: directed test of the six-transistor cell model.
//
// Drives the row select and the write-circuit levels of the bit-line pair and
// compares the stored bit and the read discharge outputs with values kept by
// the testbench: a selected cell takes the value of a bit line pair that has
// one line low, keeps its value while deselected or while both lines are at
// the precharge level, and discharges the line on its 0 side only while
// selected. A random sequence of operations follows the directed steps.
`timescale 1ns / 1ps

module sram_cell_tb;

  logic sel, drv_bit, drv_invbit;
  logic pd_bit, pd_invbit, q;

  int checks   = 0;
  int failures = 0;
  logic model_q;

  sram_cell dut (
    .sel(sel), .drv_bit(drv_bit), .drv_invbit(drv_invbit),
    .pd_bit(pd_bit), .pd_invbit(pd_invbit), .q(q)
  );

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== model_q || pd_bit !== (sel & ~model_q) || pd_invbit !== (sel & model_q)) begin
      failures++;
      $display("%s: sel=%0b drv=%0b/%0b q=%0b pd=%0b/%0b expected q=%0b",
               what, sel, drv_bit, drv_invbit, q, pd_bit, pd_invbit, model_q);
    end
  endtask

  // apply one operation; sel rises after the lines settle, as in a real access
  task automatic op(logic s, logic b, logic ib, string what);
    sel = 1'b0;
    #5;
    drv_bit    = b;
    drv_invbit = ib;
    #5;
    sel = s;
    #10;
    if (s && !(b && ib)) model_q = b;
    check(what);
  endtask

  initial begin
    sel = 1'b0; drv_bit = 1'b1; drv_invbit = 1'b1;
    // put the cell in a known state
    op(1'b1, 1'b0, 1'b1, "write 0");
    op(1'b1, 1'b1, 1'b1, "read 0");
    op(1'b1, 1'b1, 1'b0, "write 1");
    op(1'b1, 1'b1, 1'b1, "read 1");
    op(1'b0, 1'b0, 1'b1, "deselected, lines drive 0");
    op(1'b0, 1'b1, 1'b1, "deselected idle");
    op(1'b1, 1'b0, 1'b1, "write 0 again");
    op(1'b0, 1'b1, 1'b0, "deselected, lines drive 1");
    op(1'b1, 1'b1, 1'b1, "read 0 again");
    for (int i = 0; i < 200; i++) begin
      logic s, d, w;
      s = 1'($urandom);
      d = 1'($urandom);
      w = 1'($urandom);
      if (w) op(s, d, ~d, "random write");
      else   op(s, 1'b1, 1'b1, "random read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
