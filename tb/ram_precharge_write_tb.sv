// ram_precharge_write_tb: exhaustive test of the column precharge/write circuit.
//
// All 16 combinations of write, data input and the two cell discharge inputs
// are applied. Expected values: while writing, bit = din and invbit = ~din
// whatever the cells do; otherwise both lines sit at the precharge level 1
// unless a cell discharges them, and dout follows bit. The drive levels handed
// to the cells are 1/1 when not writing. read_upset flags both lines low.
`timescale 1ns / 1ps

module ram_precharge_write_tb;

  logic write, din, cell_pd_bit, cell_pd_invbit;
  logic drv_bit, drv_invbit, bit_line, invbit_line, dout, read_upset;

  int checks   = 0;
  int failures = 0;

  ram_precharge_write dut (
    .write(write), .din(din), .cell_pd_bit(cell_pd_bit), .cell_pd_invbit(cell_pd_invbit),
    .drv_bit(drv_bit), .drv_invbit(drv_invbit), .bit_line(bit_line),
    .invbit_line(invbit_line), .dout(dout), .read_upset(read_upset)
  );

  initial begin : watchdog
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_drv_b, exp_drv_ib, exp_b, exp_ib;
      {write, din, cell_pd_bit, cell_pd_invbit} = 4'(v);
      #10;
      if (write) begin
        exp_drv_b  = din;
        exp_drv_ib = !din;
        exp_b      = din;
        exp_ib     = !din;
      end else begin
        exp_drv_b  = 1'b1;
        exp_drv_ib = 1'b1;
        exp_b      = !cell_pd_bit;
        exp_ib     = !cell_pd_invbit;
      end
      checks++;
      if ({drv_bit, drv_invbit, bit_line, invbit_line, dout, read_upset} !==
          {exp_drv_b, exp_drv_ib, exp_b, exp_ib, exp_b, (!exp_b && !exp_ib)}) begin
        failures++;
        $display("w=%0b din=%0b pd=%0b/%0b: drv=%0b/%0b line=%0b/%0b dout=%0b upset=%0b",
                 write, din, cell_pd_bit, cell_pd_invbit, drv_bit, drv_invbit,
                 bit_line, invbit_line, dout, read_upset);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
