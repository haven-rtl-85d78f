// fl_driver -- hardware driver: replays host transactions onto the DUT's FrameLink input.
//
// The host sends packets through the input buffer.  Each packet is one FrameLink
// frame whose first part is a single header word:
//   header[63:56] = PK_TRANS:  header[31:0] = idle gap in DUT cycles; the following
//                              parts of the same frame are the DUT frame to send.
//                              A header-only frame just idles the DUT for the gap.
//   header[63:56] = PK_CONFIG: header[31:0] is passed to cfg_data with a cfg_we
//                              pulse (used to program the monitor); header only.
// After the gap the payload words are offered to the DUT with their REM, SOP_N and
// EOP_N unchanged, SOF_N set on the first payload word and EOF_N taken from the
// host frame's last word.  While no word is offered the DUT sees an all-zero word
// with every delimiter inactive.
//
// Timing and cycle accuracy: the driver's DUT-facing state advances only on cycles
// with ce = 1 (one DUT clock).  Reading a header takes one core clock with the DUT
// stopped.  Whenever the driver needs a word the input buffer does not yet hold it
// raises `stall`, which stops the DUT clock, so a late host never changes what the
// DUT sees cycle by cycle.  A payload word is removed from the buffer only on a DUT
// cycle where the DUT accepts it.
// The packet layout and the gap mechanism are this design's own; the source design
// says only that drivers are split into a software and a hardware part that talk
// through a generic protocol and that random delays are part of the stimulus.
module fl_driver
  import haven_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  // from the input transaction buffer
  input  fl_word_t    in_word,
  input  logic        in_src_rdy_n,
  output logic        in_dst_rdy_n,
  // to the DUT input
  output fl_word_t    dut_word,
  output logic        dut_src_rdy_n,
  input  logic        dut_dst_rdy_n,
  // configuration for the monitor
  output logic        cfg_we,
  output logic [31:0] cfg_data,
  // DUT clock must not run this cycle
  output logic        stall,
  output logic [31:0] trans_sent
);
  typedef enum logic [1:0] {D_HDR, D_GAP, D_DATA} dstate_t;

  dstate_t     state;
  logic [31:0] gap;
  logic        payload;   // header was followed by payload parts
  logic        first;     // next payload word is the first of the DUT frame
  logic        hdr_take, dut_xfer;
  pkt_kind_t   kind;

  assign kind     = pkt_kind_t'(in_word.data[63:56]);
  assign hdr_take = (state == D_HDR) && !in_src_rdy_n;
  assign dut_xfer = (state == D_DATA) && ce && !in_src_rdy_n && !dut_dst_rdy_n;

  always_comb begin
    dut_src_rdy_n  = !(state == D_DATA && !in_src_rdy_n);
    if (dut_src_rdy_n) begin
      // nothing offered: a fixed idle word, so the DUT's inputs never depend on
      // what the host happens to have sent ahead
      dut_word       = '0;
      dut_word.sof_n = 1'b1;
      dut_word.eof_n = 1'b1;
      dut_word.sop_n = 1'b1;
      dut_word.eop_n = 1'b1;
    end else begin
      dut_word       = in_word;
      dut_word.sof_n = !first;
    end
    in_dst_rdy_n   = !(hdr_take || dut_xfer);
    stall          = (state == D_HDR) || (state == D_DATA && in_src_rdy_n);
    cfg_we         = hdr_take && kind == PK_CONFIG;
    cfg_data       = in_word.data[31:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= D_HDR;
      gap        <= '0;
      payload    <= 1'b0;
      first      <= 1'b1;
      trans_sent <= '0;
    end else begin
      case (state)
        D_HDR: if (hdr_take && kind == PK_TRANS) begin
          gap     <= in_word.data[31:0];
          payload <= in_word.eof_n;
          first   <= 1'b1;
          if (in_word.data[31:0] != 0) state <= D_GAP;
          else if (in_word.eof_n)      state <= D_DATA;
        end
        D_GAP: if (ce) begin
          gap <= gap - 1'b1;
          if (gap == 32'd1) state <= payload ? D_DATA : D_HDR;
        end
        D_DATA: if (dut_xfer) begin
          first <= 1'b0;
          if (!in_word.eof_n) begin
            state      <= D_HDR;
            trans_sent <= trans_sent + 1'b1;
          end
        end
        default: state <= D_HDR;
      endcase
    end
  end

endmodule
