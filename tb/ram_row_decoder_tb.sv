// ram_row_decoder_tb: exhaustive test of the 5-to-32 NOR row decoder.
//
// Every address is applied with the decoder enabled and disabled. The expected
// word lines are worked out here from the address alone (a single 1 at the
// addressed row, none while disabled), independently of the NOR equations in
// the decoder. Also checks that exactly one line is high when enabled.
`timescale 1ns / 1ps

module ram_row_decoder_tb;

  localparam int unsigned ADDR_W = 5;
  localparam int unsigned ROWS   = 1 << ADDR_W;

  logic [ADDR_W-1:0] addr;
  logic              en;
  logic [ROWS-1:0]   wl;

  int checks   = 0;
  int failures = 0;

  ram_row_decoder #(.ADDR_W(ADDR_W)) dut (.addr(addr), .en(en), .wl(wl));

  initial begin : watchdog
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int a = 0; a < ROWS; a++) begin
        logic [ROWS-1:0] expected;
        addr = ADDR_W'(a);
        en   = 1'(e);
        #10;
        expected = '0;
        if (e == 1) expected[a] = 1'b1;
        checks++;
        if (wl !== expected) begin
          failures++;
          $display("addr=%0d en=%0d wl=%h expected %h", a, e, wl, expected);
        end
        checks++;
        if ($countones(wl) != e) begin
          failures++;
          $display("addr=%0d en=%0d: %0d word lines high", a, e, $countones(wl));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
