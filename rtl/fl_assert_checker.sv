// fl_assert_checker -- synthesised FrameLink protocol assertions for one interface.
//
// Watches one FrameLink interface of the DUT and checks, on every word transfer
// (SRC_RDY_N and DST_RDY_N both low on a DUT clock):
//   SOF_SOP         SOF_N active without SOP_N
//   EOF_EOP         EOF_N active without EOP_N
//   DATA_AFTER_EOP  a word inside a frame, after EOP_N, that does not carry SOP_N
//   EOP_MATCH_SOP   SOP_N inside a part, i.e. no EOP_N before the next SOP_N
//   EOF_MATCH_SOF   SOF_N inside a frame, or a word outside any frame without SOF_N
//   RESET           the checked ready signal (SRC_RDY_N, or DST_RDY_N when
//                   CHECK_DST = 1) active on the last cycle of reset
// Each property is a small state machine (frame open, part open), the hardware form
// of the corresponding temporal assertion.  Violations are gathered over a frame and
// reported once per erroneous frame, on the DUT cycle that closes it (or at once when
// the word is outside any frame), as a two-word packet to the output buffer:
//   word 0: {PK_ASSERT, CHECKER_ID[15:0], mask[7:0], transaction number}
//   word 1: DUT cycle of the first violation (64 bits)
// The transaction number counts frames from 1.  Bits of the mask: see haven_pkg.
// Timing: state changes only when ce = 1; the report is pushed on that same cycle.
// The assertion names, the once-per-frame reporting and the reported items (checker
// number, time, transaction number) follow the source design; the exact rules
// behind each name and the packet encoding are this design's reading of them.
module fl_assert_checker
  import haven_pkg::*;
#(
  parameter logic [15:0] CHECKER_ID = 16'd170,
  parameter bit          CHECK_DST  = 1'b0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  logic [63:0] cycle,
  input  fl_word_t    word,
  input  logic        src_rdy_n,
  input  logic        dst_rdy_n,
  output logic [1:0]  push_n,
  output fl_word_t    push_words [2],
  output logic [31:0] reports
);
  logic              in_frame, in_part;
  logic              rst_viol;
  logic [A_BITS-1:0] acc, v, acc_n;
  logic [63:0]       first_cycle;
  logic [31:0]       frame_no, frame_no_n, viol_txn;
  logic              xfer, sof, eof, sop, eop, in_frame_n, in_part_n, report;
  logic [63:0]       rep_time;
  logic [31:0]       rep_txn;

  assign xfer = !src_rdy_n && !dst_rdy_n;
  assign sof  = !word.sof_n;
  assign eof  = !word.eof_n;
  assign sop  = !word.sop_n;
  assign eop  = !word.eop_n;

  always_comb begin
    v          = '0;
    in_frame_n = in_frame;
    in_part_n  = in_part;
    frame_no_n = frame_no;
    v[A_RESET] = rst_viol;
    if (xfer) begin
      v[A_SOF_SOP]        = sof && !sop;
      v[A_EOF_EOP]        = eof && !eop;
      v[A_DATA_AFTER_EOP] = in_frame && !in_part && !sop;
      v[A_EOP_MATCH_SOP]  = in_part && sop;
      v[A_EOF_MATCH_SOF]  = (in_frame && sof) || (!in_frame && !sof);
      in_frame_n = (in_frame || sof) && !eof;
      in_part_n  = (in_part || sop) && !eop;
      if (sof) frame_no_n = frame_no + 1'b1;
    end
    acc_n    = acc | v;
    report   = ce && (acc_n != '0) && !in_frame_n;
    rep_time = (acc == '0) ? cycle : first_cycle;
    rep_txn  = (acc == '0) ? frame_no_n : viol_txn;

    push_words[0]       = '0;
    push_words[0].data  = {PK_ASSERT, CHECKER_ID, acc_n, rep_txn};
    push_words[0].rem   = FL_REM_W'(FL_BYTES - 1);
    push_words[0].sof_n = 1'b0;
    push_words[0].sop_n = 1'b0;
    push_words[0].eof_n = 1'b1;
    push_words[0].eop_n = 1'b1;
    push_words[1]       = '0;
    push_words[1].data  = rep_time;
    push_words[1].rem   = FL_REM_W'(FL_BYTES - 1);
    push_words[1].sof_n = 1'b1;
    push_words[1].sop_n = 1'b1;
    push_words[1].eof_n = 1'b0;
    push_words[1].eop_n = 1'b0;
    push_n = report ? 2'd2 : 2'd0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      in_frame    <= 1'b0;
      in_part     <= 1'b0;
      acc         <= '0;
      first_cycle <= '0;
      frame_no    <= '0;
      viol_txn    <= '0;
      reports     <= '0;
      rst_viol    <= CHECK_DST ? !dst_rdy_n : !src_rdy_n;
    end else if (ce) begin
      in_frame <= in_frame_n;
      in_part  <= in_part_n;
      frame_no <= frame_no_n;
      rst_viol <= 1'b0;
      if (acc == '0 && v != '0) begin
        first_cycle <= cycle;
        viol_txn    <= frame_no_n;
      end
      if (report) begin
        acc     <= '0;
        reports <= reports + 1'b1;
      end else begin
        acc <= acc_n;
      end
    end
  end

endmodule
