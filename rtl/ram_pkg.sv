// ram_pkg: shared sizes and the record format of the 32 x 18 readout RAM.
//
// The RAM stores digitized pulse-train samples of a multi-channel detector
// front-end chip. Each location holds one 18-bit record: the channel number,
// the sub-channel number and the 12-bit ADC result. Eight channels need a
// 3-bit channel number; one more bit is kept so that a 16-channel version of
// the chip fits without a wider memory, so the channel field is 4 bits wide
// and its top bit is 0 for an 8-channel chip. The sizes (32 words, 18 bits,
// 12-bit samples, 3+1 channel bits, 2 sub-channel bits) follow the design
// description; the order of the fields inside the word and the sub-channel
// codes are this design's own choice.
`timescale 1ns / 1ps

package ram_pkg;

  localparam int unsigned WORDS  = 32;              // memory locations
  localparam int unsigned WIDTH  = 18;              // bits per location
  localparam int unsigned ADDR_W = $clog2(WORDS);   // 5 address bits

  localparam int unsigned SAMPLE_W  = 12;           // ADC resolution
  localparam int unsigned CHANNEL_W = 4;            // 3 bits + 1 spare
  localparam int unsigned SUBCH_W   = 2;

  // Sub-channel field: the three gated integrators of a channel and the
  // channel's time-to-voltage converter output.
  typedef enum logic [SUBCH_W-1:0] {
    SUB_INT_A = 2'd0,
    SUB_INT_B = 2'd1,
    SUB_INT_C = 2'd2,
    SUB_TVC   = 2'd3
  } subch_e;

  // One RAM record, most significant field first: {channel, sub-channel, sample}.
  typedef struct packed {
    logic [CHANNEL_W-1:0] channel;
    subch_e               subch;
    logic [SAMPLE_W-1:0]  sample;
  } ram_word_t;

endpackage
