// ram_buffer_tb: end-to-end test of the 32 x 18 RAM at its default size.
//
// The sequence follows the way the RAM is meant to be exercised: pseudo-random
// 18-bit words from a linear-feedback shift register are written to all 32
// locations with an up-counting address, one word every 200 ns (5 MHz) while
// write stays high, the address changing first and the data 40 ns later. Then
// write and the decoder are switched off so the bit lines only precharge,
// and the contents are read back with a down-counting address. After that come
// writes with the decoder disabled (they must change nothing) and a random mix
// of overwrites and reads.
//
// Expected values come from a copy of the memory kept here. Checked on every
// step: out equals inp while writing, out equals the stored word while
// reading, out is all ones while nothing is selected, the bit-line pair is
// complementary whenever a row is read and no read upset occurs. The time
// taken by the 32-word fill is checked against 32 x 200 ns. Each mechanism
// (write, write-through, precharge idle, read, down-count read, blocked write,
// overwrite) is counted, and one that never happened counts as a failure.
`timescale 1ns / 1ps

module ram_buffer_tb;

  import ram_pkg::*;

  localparam time T_WORD = 200ns;   // one location per 200 ns, 5 MHz
  localparam time T_DATA = 40ns;    // data follows the address by this much

  logic [ADDR_W-1:0]             addr;
  logic                          dec_en, write;
  logic [WIDTH-1:0]              inp, out, bit_lines, invbit_lines;
  logic                          read_upset;
  logic [WORDS-1:0][WIDTH-1:0]   cells;

  logic [WIDTH-1:0] model [WORDS];
  logic [WORDS-1:0] written;
  logic [WIDTH-1:0] lfsr;

  int checks   = 0;
  int failures = 0;
  int n_write = 0, n_through = 0, n_idle = 0, n_read = 0, n_down = 0;
  int n_blocked = 0, n_overwrite = 0;

  ram_buffer dut (
    .addr(addr), .dec_en(dec_en), .write(write), .inp(inp), .out(out),
    .read_upset(read_upset), .bit_lines(bit_lines), .invbit_lines(invbit_lines),
    .cells(cells)
  );

  initial begin : watchdog
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 18-bit Fibonacci LFSR, taps 18 and 11 (x^18 + x^11 + 1, maximal length)
  function automatic logic [WIDTH-1:0] lfsr_next(logic [WIDTH-1:0] s);
    return {s[WIDTH-2:0], s[17] ^ s[10]};
  endfunction

  task automatic expect_eq(string what, logic [WIDTH-1:0] got, logic [WIDTH-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%t %s: got %h expected %h (addr %0d)", $time, what, got, exp, addr);
    end
  endtask

  task automatic check_lines(string what);
    checks++;
    if (read_upset || (bit_lines !== ~invbit_lines)) begin
      failures++;
      $display("%t %s: bit %h invbit %h upset %0b", $time, what, bit_lines, invbit_lines, read_upset);
    end
  endtask

  task automatic check_cells(string what);
    checks++;
    for (int r = 0; r < WORDS; r++) begin
      if (written[r] && cells[r] !== model[r]) begin
        failures++;
        $display("%t %s: location %0d holds %h expected %h", $time, what, r, cells[r], model[r]);
        break;
      end
    end
  endtask

  // one read access: address with write low, sample late in the cycle
  task automatic read_word(int a);
    write = 1'b0;
    dec_en = 1'b1;
    addr = ADDR_W'(a);
    #(T_WORD / 2);
    expect_eq("read", out, model[a]);
    check_lines("read");
    n_read++;
    #(T_WORD / 2);
  endtask

  // one write access with write pulsed around steady address and data
  task automatic write_word(int a, logic [WIDTH-1:0] d);
    write = 1'b0;
    dec_en = 1'b1;
    addr = ADDR_W'(a);
    inp = d;
    #(T_DATA);
    write = 1'b1;
    #(T_DATA);
    expect_eq("write-through", out, d);
    n_through++;
    #(T_DATA);
    write = 1'b0;
    if (written[a]) n_overwrite++;
    model[a] = d;
    written[a] = 1'b1;
    n_write++;
    #(T_WORD - 3 * T_DATA);
  endtask

  initial begin
    time t_start, t_fill;
    written = '0;
    lfsr    = 18'h2A5F3;
    write   = 1'b0;
    dec_en  = 1'b0;
    addr    = '0;
    inp     = '0;
    #100ns;

    // fill: write held high, address counts up, data follows the address
    dec_en = 1'b1;
    write  = 1'b1;
    t_start = $time;
    for (int a = 0; a < WORDS; a++) begin
      addr = ADDR_W'(a);
      #(T_DATA);
      lfsr = lfsr_next(lfsr);
      inp  = lfsr;
      model[a]   = lfsr;
      written[a] = 1'b1;
      #(T_WORD / 2);
      expect_eq("fill write-through", out, inp);
      n_through++;
      n_write++;
      #(T_WORD - T_DATA - T_WORD / 2);
    end
    t_fill = $time - t_start;
    checks++;
    if (t_fill != WORDS * T_WORD) begin
      failures++;
      $display("fill took %0t, expected %0t", t_fill, WORDS * T_WORD);
    end

    // write and decoder off: bit lines precharged, nothing selected
    write  = 1'b0;
    dec_en = 1'b0;
    for (int i = 0; i < 4; i++) begin
      #(T_WORD / 2);
      addr = ADDR_W'($urandom);
      #(T_WORD / 2);
      expect_eq("precharge idle", out, '1);
      n_idle++;
    end
    check_cells("after fill");

    // read back with the address counting down
    for (int a = WORDS - 1; a >= 0; a--) begin
      read_word(a);
      n_down++;
    end

    // writes with the decoder disabled reach no cell
    for (int i = 0; i < 8; i++) begin
      dec_en = 1'b0;
      addr   = ADDR_W'($urandom);
      inp    = WIDTH'($urandom);
      #(T_DATA);
      write = 1'b1;
      #(T_DATA);
      expect_eq("blocked write-through", out, inp);
      #(T_DATA);
      write = 1'b0;
      #(T_DATA);
      check_cells("blocked write");
      n_blocked++;
    end

    // random overwrites and reads
    for (int i = 0; i < 400; i++) begin
      int a;
      a = int'($urandom_range(WORDS - 1));
      if ($urandom_range(1) == 1) write_word(a, WIDTH'($urandom));
      else                        read_word(a);
    end
    check_cells("end");
    for (int a = 0; a < WORDS; a++) read_word(a);

    if (n_write == 0)     begin failures++; $display("no write happened");          end
    if (n_through == 0)   begin failures++; $display("no write-through seen");      end
    if (n_idle == 0)      begin failures++; $display("no precharge idle seen");     end
    if (n_read == 0)      begin failures++; $display("no read happened");           end
    if (n_down == 0)      begin failures++; $display("no down-count read");         end
    if (n_blocked == 0)   begin failures++; $display("no blocked write");           end
    if (n_overwrite == 0) begin failures++; $display("no overwrite happened");      end
    $display("writes=%0d write_through=%0d idle=%0d reads=%0d down_reads=%0d blocked=%0d overwrites=%0d",
             n_write, n_through, n_idle, n_read, n_down, n_blocked, n_overwrite);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
