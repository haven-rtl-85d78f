// hgen_multi -- N hash generators working in parallel behind one FrameLink port.
//
// Input frames are handed to the N_UNITS hgen units in strict rotation, one whole
// frame per unit, and the one-word results are collected in the same rotation, so
// the answers leave in the order the frames arrived.  While one unit hashes a frame
// the next frame already streams into the next unit, so up to N_UNITS frames are in
// flight.  With N_UNITS = 1 this is a single hgen.
//
// Interface: FrameLink sink rx_* and source tx_*, handshakes active low, same word
// format as hgen.  The input selector is combinational (rx of the selected unit is
// wired straight through), and so is the output selector.
// The 2, 4, 8 and 16 unit configurations are those the framework was evaluated
// with; how frames are spread over the units and put back in order is this
// design's own choice.
module hgen_multi
  import haven_pkg::*;
#(
  parameter int unsigned N_UNITS = 16,
  parameter logic [31:0] INITVAL = 32'h0
) (
  input  logic     clk,
  input  logic     rst,
  input  fl_word_t rx_word,
  input  logic     rx_src_rdy_n,
  output logic     rx_dst_rdy_n,
  output fl_word_t tx_word,
  output logic     tx_src_rdy_n,
  input  logic     tx_dst_rdy_n
);
  localparam int unsigned SW = (N_UNITS > 1) ? $clog2(N_UNITS) : 1;

  logic [SW-1:0] sel_in, sel_out;
  logic     u_rx_src_rdy_n [N_UNITS];
  logic     u_rx_dst_rdy_n [N_UNITS];
  fl_word_t u_tx_word      [N_UNITS];
  logic     u_tx_src_rdy_n [N_UNITS];
  logic     u_tx_dst_rdy_n [N_UNITS];

  for (genvar g = 0; g < N_UNITS; g++) begin : g_unit
    assign u_rx_src_rdy_n[g] = !(sel_in == SW'(g) && !rx_src_rdy_n);
    assign u_tx_dst_rdy_n[g] = !(sel_out == SW'(g) && !tx_dst_rdy_n);
    hgen #(.INITVAL(INITVAL)) u_hgen (
      .clk, .rst,
      .rx_word,
      .rx_src_rdy_n (u_rx_src_rdy_n[g]),
      .rx_dst_rdy_n (u_rx_dst_rdy_n[g]),
      .tx_word      (u_tx_word[g]),
      .tx_src_rdy_n (u_tx_src_rdy_n[g]),
      .tx_dst_rdy_n (u_tx_dst_rdy_n[g])
    );
  end

  assign rx_dst_rdy_n = u_rx_dst_rdy_n[sel_in];
  assign tx_word      = u_tx_word[sel_out];
  assign tx_src_rdy_n = u_tx_src_rdy_n[sel_out];

  function automatic logic [SW-1:0] next_sel(input logic [SW-1:0] s);
    return (s == SW'(N_UNITS - 1)) ? '0 : s + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      sel_in  <= '0;
      sel_out <= '0;
    end else begin
      if (!rx_src_rdy_n && !rx_dst_rdy_n && !rx_word.eof_n) sel_in  <= next_sel(sel_in);
      if (!tx_src_rdy_n && !tx_dst_rdy_n && !tx_word.eof_n) sel_out <= next_sel(sel_out);
    end
  end

endmodule
