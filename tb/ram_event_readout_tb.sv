// ram_event_readout_tb: one detector event stored and read back per chip type.
//
// Two loads that the 32-location RAM is sized for are written as ram_word_t
// records, one word per 200 ns, and read back in address order:
//   - an 8-channel pulse-shape chip: per channel three gated-integrator
//     results and one time-to-voltage converter result, 8 x 4 = 32 records,
//     channel numbers 0..7 (spare channel bit 0);
//   - a 16-channel chip with an energy and a timing pulse train per channel,
//     16 x 2 = 32 records, channel numbers 0..15 using the spare bit, energy
//     coded as sub-channel A and timing as sub-channel B.
// Samples are random 12-bit values. Each record read back is decoded and its
// channel, sub-channel and sample compared with what was written. The fill
// time is checked: 32 words at 200 ns take 6.4 us, less than the 16 us a
// 2 MSample/s converter needs for 32 conversions, so the RAM keeps up.
`timescale 1ns / 1ps

module ram_event_readout_tb;

  import ram_pkg::*;

  localparam time T_WORD = 200ns;
  localparam time T_ADC  = 500ns;   // 2 MSample/s conversion period

  logic [ADDR_W-1:0]           addr;
  logic                        dec_en, write;
  ram_word_t                   inp_w, out_w;
  logic                        read_upset;
  logic [WIDTH-1:0]            bit_lines, invbit_lines;
  logic [WORDS-1:0][WIDTH-1:0] cells;
  ram_word_t                   sent [WORDS];

  int checks   = 0;
  int failures = 0;

  ram_buffer dut (
    .addr(addr), .dec_en(dec_en), .write(write), .inp(inp_w), .out(out_w),
    .read_upset(read_upset), .bit_lines(bit_lines), .invbit_lines(invbit_lines),
    .cells(cells)
  );

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic store(int a, ram_word_t w);
    write = 1'b0;
    addr  = ADDR_W'(a);
    inp_w = w;
    #50ns;
    write = 1'b1;
    #100ns;
    write = 1'b0;
    #50ns;
    sent[a] = w;
  endtask

  task automatic read_all(string load);
    for (int a = 0; a < WORDS; a++) begin
      addr = ADDR_W'(a);
      #100ns;
      checks++;
      if (out_w.channel !== sent[a].channel || out_w.subch !== sent[a].subch ||
          out_w.sample !== sent[a].sample || read_upset) begin
        failures++;
        $display("%s addr %0d: read ch=%0d sub=%s sample=%h, wrote ch=%0d sub=%s sample=%h",
                 load, a, out_w.channel, out_w.subch.name(), out_w.sample,
                 sent[a].channel, sent[a].subch.name(), sent[a].sample);
      end
      #100ns;
    end
  endtask

  initial begin
    time t0, t_fill;
    dec_en = 1'b1;
    write  = 1'b0;
    addr   = '0;
    inp_w  = '0;
    #100ns;

    // 8-channel pulse-shape chip: channel-major order
    t0 = $time;
    for (int ch = 0; ch < 8; ch++) begin
      for (int s = 0; s < 4; s++) begin
        ram_word_t w;
        w.channel = CHANNEL_W'(ch);
        w.subch   = subch_e'(s);
        w.sample  = SAMPLE_W'($urandom);
        store(ch * 4 + s, w);
      end
    end
    t_fill = $time - t0;
    checks++;
    if (t_fill != WORDS * T_WORD || t_fill > WORDS * T_ADC) begin
      failures++;
      $display("fill took %0t, expected %0t (converter needs %0t)", t_fill, WORDS * T_WORD, WORDS * T_ADC);
    end
    read_all("8-channel");

    // 16-channel chip: energy and timing per channel
    for (int ch = 0; ch < 16; ch++) begin
      for (int s = 0; s < 2; s++) begin
        ram_word_t w;
        w.channel = CHANNEL_W'(ch);
        w.subch   = (s == 0) ? SUB_INT_A : SUB_INT_B;
        w.sample  = SAMPLE_W'($urandom);
        store(ch * 2 + s, w);
      end
    end
    read_all("16-channel");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
