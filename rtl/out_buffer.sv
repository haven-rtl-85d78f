// out_buffer -- output transaction buffer towards the host.
//
// A FrameLink FIFO whose write side accepts up to PUSH_MAX words in one clock, so a
// reporter can deposit a header and a data word, or a whole record, within one DUT
// cycle.  The read side is an ordinary FrameLink source, one word per clock.
// `stall` is high when a push of PUSH_MAX words might not fit after this clock's
// read; the core then keeps the DUT clock stopped, which is how a full output buffer
// pauses the DUT instead of losing data.
//
// Interface: push_n words (0..PUSH_MAX) from push_words[0..push_n-1], oldest first,
// written on the rising edge; FrameLink source tx_* (active-low handshake).
// The source design stops the DUT clock according to the state of the input and
// output buffers; the multi-word write port and the stall rule are this design's.
module out_buffer
  import haven_pkg::*;
#(
  parameter int unsigned DEPTH    = 64,
  parameter int unsigned PUSH_MAX = 2
) (
  input  logic     clk,
  input  logic     rst,
  input  logic [$clog2(PUSH_MAX+1)-1:0] push_n,
  input  fl_word_t push_words [PUSH_MAX],
  output logic     stall,
  output fl_word_t tx_word,
  output logic     tx_src_rdy_n,
  input  logic     tx_dst_rdy_n
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  fl_word_t mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [CW-1:0] count;
  logic          do_rd;

  assign tx_src_rdy_n = (count == '0);
  assign tx_word      = mem[rd_ptr];
  assign do_rd        = !tx_src_rdy_n && !tx_dst_rdy_n;
  assign stall        = (32'(DEPTH) - 32'(count) + (do_rd ? 32'd1 : 32'd0)) < 32'(PUSH_MAX);

  always_ff @(posedge clk) begin
    for (int i = 0; i < PUSH_MAX; i++)
      if (i < int'(push_n)) mem[AW'((32'(wr_ptr) + 32'(i)) % DEPTH)] <= push_words[i];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      wr_ptr <= AW'((32'(wr_ptr) + 32'(push_n)) % DEPTH);
      if (do_rd) rd_ptr <= AW'((32'(rd_ptr) + 1) % DEPTH);
      count <= count + CW'(push_n) - (do_rd ? CW'(1) : CW'(0));
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
    32'(count) + 32'(push_n) - (do_rd ? 32'd1 : 32'd0) <= DEPTH);

endmodule
