// haven_pkg -- types and constants shared by the accelerated verification core.
//
// Every stream in the core is a FrameLink stream: a 64-bit data word, a 3-bit REM
// field giving the index of the last valid byte on an end-of-part word, and the four
// active-low delimiters SOF_N, EOF_N, SOP_N, EOP_N.  The handshake (SRC_RDY_N from
// the source, DST_RDY_N from the destination, both active low) travels beside the
// word as separate signals.  The 64-bit width and the 3-bit REM follow the
// FrameLink description and the captured waveforms; the packet kinds exchanged with
// the host and the bit assignment of the assertion mask are this design's own.
// The package also holds the Lookup2 mixing function used by the hash generator.
package haven_pkg;

  localparam int unsigned FL_DATA_W = 64;
  localparam int unsigned FL_REM_W  = $clog2(FL_DATA_W / 8);
  localparam int unsigned FL_BYTES  = FL_DATA_W / 8;

  // One FrameLink word with its delimiters (all delimiters active low).
  typedef struct packed {
    logic [FL_DATA_W-1:0] data;
    logic [FL_REM_W-1:0]  rem;
    logic                 sof_n;
    logic                 eof_n;
    logic                 sop_n;
    logic                 eop_n;
  } fl_word_t;

  localparam int unsigned FL_WORD_W = $bits(fl_word_t);

  // Kind of a host packet, carried in bits [63:56] of its first word.
  typedef enum logic [7:0] {
    PK_TRANS   = 8'h00,  // host -> core: one input transaction for the driver
    PK_CONFIG  = 8'h01,  // host -> core: monitor configuration
    PK_MONITOR = 8'h10,  // core -> host: one output transaction seen by the monitor
    PK_ASSERT  = 8'h20,  // core -> host: assertion violation report
    PK_OBSERVE = 8'h30   // core -> host: signal value change record
  } pkt_kind_t;

  // Bits of the FrameLink assertion mask.
  localparam int unsigned A_RESET          = 0;  // handshake active while in reset
  localparam int unsigned A_SOF_SOP        = 1;  // SOF_N without SOP_N
  localparam int unsigned A_EOF_EOP        = 2;  // EOF_N without EOP_N
  localparam int unsigned A_DATA_AFTER_EOP = 3;  // data between EOP_N and SOP_N
  localparam int unsigned A_EOP_MATCH_SOP  = 4;  // no EOP_N before SOP_N
  localparam int unsigned A_EOF_MATCH_SOF  = 5;  // no EOF_N before SOF_N, or data outside a frame
  localparam int unsigned A_BITS           = 8;

  // Bob Jenkins' Lookup2 mix of the three 32-bit state words {a, b, c}.
  function automatic logic [95:0] lookup2_mix(input logic [31:0] a_i,
                                              input logic [31:0] b_i,
                                              input logic [31:0] c_i);
    logic [31:0] a, b, c;
    a = a_i; b = b_i; c = c_i;
    a = a - b; a = a - c; a = a ^ (c >> 13);
    b = b - c; b = b - a; b = b ^ (a << 8);
    c = c - a; c = c - b; c = c ^ (b >> 13);
    a = a - b; a = a - c; a = a ^ (c >> 12);
    b = b - c; b = b - a; b = b ^ (a << 16);
    c = c - a; c = c - b; c = c ^ (b >> 5);
    a = a - b; a = a - c; a = a ^ (c >> 3);
    b = b - c; b = b - a; b = b ^ (a << 10);
    c = c - a; c = c - b; c = c ^ (b >> 15);
    return {a, b, c};
  endfunction

  // Which of the evaluated designs sits in the DUT clock domain of haven_top.
  typedef enum logic {DUT_FIFO, DUT_HGEN} dut_kind_t;

  // Host output channels of the core.
  localparam int unsigned CH_MONITOR = 0;
  localparam int unsigned CH_RX_ASSERT = 1;
  localparam int unsigned CH_TX_ASSERT = 2;
  localparam int unsigned CH_RX_OBSERVE = 3;
  localparam int unsigned CH_TX_OBSERVE = 4;
  localparam int unsigned N_CH = 5;

  localparam logic [31:0] LOOKUP2_GOLDEN = 32'h9e3779b9;

endpackage
