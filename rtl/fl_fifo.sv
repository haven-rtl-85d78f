// fl_fifo -- FrameLink FIFO buffer.
//
// Stores whole FrameLink words (data, REM and the four delimiters) in a circular
// buffer of DEPTH entries and replays them in order.  It is the simple FIFO the
// framework is evaluated with as a design under test, and the core also uses it as
// the input transaction buffer between the host stream and the hardware driver.
//
// Interface: FrameLink sink (rx_*) and source (tx_*), all handshakes active low; a
// word moves when SRC_RDY_N and DST_RDY_N are both low on a rising clock edge.
// rx_dst_rdy_n is low while the buffer has room, tx_src_rdy_n is low while it holds a
// word, and tx_word shows the oldest word (first-word fall-through).  A word written
// into an empty buffer is visible on tx one cycle later.  `level` is the number of
// words held.  Reset is synchronous and active high and empties the buffer.
// The buffer's depth is not given by the source design and is chosen here.
module fl_fifo
  import haven_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic     clk,
  input  logic     rst,
  input  fl_word_t rx_word,
  input  logic     rx_src_rdy_n,
  output logic     rx_dst_rdy_n,
  output fl_word_t tx_word,
  output logic     tx_src_rdy_n,
  input  logic     tx_dst_rdy_n,
  output logic [$clog2(DEPTH+1)-1:0] level
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  fl_word_t mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic do_wr, do_rd;

  assign rx_dst_rdy_n = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign tx_src_rdy_n = (count == '0);
  assign tx_word      = mem[rd_ptr];
  assign level        = count;
  assign do_wr        = !rx_src_rdy_n && !rx_dst_rdy_n;
  assign do_rd        = !tx_src_rdy_n && !tx_dst_rdy_n;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= rx_word;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // FrameLink rule: a source that offers a word keeps offering it until it is taken.
  a_tx_hold: assert property (@(posedge clk) disable iff (rst)
    (!tx_src_rdy_n && tx_dst_rdy_n) |=> (!tx_src_rdy_n && $stable(tx_word)));

endmodule
