// signal_observer -- records value changes of a group of DUT signals for a waveform.
//
// Samples the W-bit vector `sig` on every DUT cycle (ce = 1).  On the first DUT cycle
// after reset, and on every later cycle where the vector differs from the last one
// recorded, it pushes one change record to the output buffer, which the host turns
// into a Value Change Dump:
//   word 0:          {PK_OBSERVE, OBSERVER_ID[7:0], DUT cycle[47:0]}
//   words 1..NW:     the vector, 64 bits per word, least significant word first
// NW = ceil(W/64).  The record is one FrameLink frame and one part.
// Timing: sampling and the push happen on the same DUT cycle; the output buffer's
// stall stops the DUT clock when it could not take a whole record.
// Observing signals during an accelerated run and writing them as a VCD follows the
// source design; recording only changes and the record layout are this design's own.
module signal_observer
  import haven_pkg::*;
#(
  parameter int unsigned W           = 73,
  parameter logic [7:0]  OBSERVER_ID = 8'd1,
  localparam int unsigned NW         = (W + FL_DATA_W - 1) / FL_DATA_W
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  logic [63:0] cycle,
  input  logic [W-1:0] sig,
  output logic [$clog2(NW+2)-1:0] push_n,
  output fl_word_t    push_words [NW+1],
  output logic [31:0] records
);
  logic [W-1:0]          last;
  logic                  primed;   // a value has been recorded since reset
  logic                  change;
  logic [NW*FL_DATA_W-1:0] wide;

  assign change = ce && (!primed || sig != last);
  assign wide   = (NW*FL_DATA_W)'(sig);

  always_comb begin
    for (int i = 0; i <= NW; i++) begin
      push_words[i]       = '0;
      push_words[i].rem   = FL_REM_W'(FL_BYTES - 1);
      push_words[i].sof_n = (i != 0);
      push_words[i].sop_n = (i != 0);
      push_words[i].eof_n = (i != NW);
      push_words[i].eop_n = (i != NW);
      if (i == 0) push_words[i].data = {PK_OBSERVE, OBSERVER_ID, cycle[47:0]};
      else        push_words[i].data = wide[(i-1)*FL_DATA_W +: FL_DATA_W];
    end
    push_n = change ? ($clog2(NW+2))'(NW + 1) : '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      primed  <= 1'b0;
      last    <= '0;
      records <= '0;
    end else if (change) begin
      primed  <= 1'b1;
      last    <= sig;
      records <= records + 1'b1;
    end
  end

endmodule
