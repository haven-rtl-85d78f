// fl_monitor -- hardware monitor: takes the DUT's FrameLink output and sends each
// output frame to the host as one transaction.
//
// DST_RDY_N towards the DUT follows a 16-bit Fibonacci LFSR (taps 16,14,13,11) that
// steps once per DUT cycle: the DUT may send when the LFSR value is <= the ready
// threshold.  Threshold 0xFFFF (the reset value) means always ready; a smaller value
// gives pseudo-random back-pressure that is the same on every run with the same
// seed, which keeps runs reproducible cycle by cycle.  A cfg_we pulse loads
// cfg_data[15:0] as the threshold and cfg_data[31:16] as the LFSR seed (0 becomes 1).
//
// Every DUT output frame becomes one host frame: a header part of one word
// {PK_MONITOR, 24'b0, transaction number counted from 1}, then the DUT frame's own
// words with their REM, SOP_N, EOP_N and EOF_N.  On the DUT cycle that carries SOF
// the header and the first word are pushed together (push_n = 2), otherwise one word.
//
// Timing: all DUT-facing state changes only when ce = 1.  `stall` comes from the
// output buffer and stops the DUT clock while it could not take two more words.
// The split into a software and a hardware monitor follows the source design; the
// back-pressure generator and the packet layout are this design's own.
module fl_monitor
  import haven_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  // from the DUT output
  input  fl_word_t    dut_word,
  input  logic        dut_src_rdy_n,
  output logic        dut_dst_rdy_n,
  // configuration from the driver
  input  logic        cfg_we,
  input  logic [31:0] cfg_data,
  // to the output buffer
  output logic [1:0]  push_n,
  output fl_word_t    push_words [2],
  output logic [31:0] trans_seen
);
  logic [15:0] lfsr, threshold;
  logic        xfer;
  fl_word_t    hdr, body;

  assign dut_dst_rdy_n = rst || !(lfsr <= threshold);
  assign xfer          = ce && !dut_src_rdy_n && !dut_dst_rdy_n;

  always_comb begin
    hdr       = '0;
    hdr.data  = {PK_MONITOR, 24'h0, trans_seen + 32'd1};
    hdr.rem   = FL_REM_W'(FL_BYTES - 1);
    hdr.sof_n = 1'b0;
    hdr.eof_n = 1'b1;
    hdr.sop_n = 1'b0;
    hdr.eop_n = 1'b0;
    body       = dut_word;
    body.sof_n = 1'b1;
    push_words[0] = dut_word.sof_n ? body : hdr;
    push_words[1] = body;
    push_n = !xfer ? 2'd0 : (dut_word.sof_n ? 2'd1 : 2'd2);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr       <= 16'hACE1;
      threshold  <= 16'hFFFF;
      trans_seen <= '0;
    end else begin
      if (cfg_we) begin
        threshold <= cfg_data[15:0];
        lfsr      <= (cfg_data[31:16] == 16'h0) ? 16'h1 : cfg_data[31:16];
      end else if (ce) begin
        lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      end
      if (xfer && !dut_word.eof_n) trans_seen <= trans_seen + 1'b1;
    end
  end

endmodule
