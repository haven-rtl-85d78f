// haven_top -- accelerated verification core with its design under test.
//
// Puts one of the two designs the framework was evaluated with into the DUT clock
// domain of haven_core: the FrameLink FIFO (DUT_KIND = DUT_FIFO) or HGEN_UNITS
// parallel Lookup2 hash generators (DUT_KIND = DUT_HGEN, the default, with 16 units,
// the largest evaluated system).  Everything the host sees is brought out: the
// input packet stream, the five output channels, and status counters.
// See haven_core for the packet formats and the clock gating.
module haven_top
  import haven_pkg::*;
#(
  parameter dut_kind_t   DUT_KIND   = DUT_HGEN,
  parameter int unsigned HGEN_UNITS = 16,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned IN_DEPTH   = 64,
  parameter int unsigned OUT_DEPTH  = 64
) (
  input  logic                clk,
  input  logic                rst,
  input  fl_word_t            host_rx_word,
  input  logic                host_rx_src_rdy_n,
  output logic                host_rx_dst_rdy_n,
  output fl_word_t [N_CH-1:0] host_tx_word,
  output logic     [N_CH-1:0] host_tx_src_rdy_n,
  input  logic     [N_CH-1:0] host_tx_dst_rdy_n,
  output logic [63:0]         dut_cycle,
  output logic [31:0]         trans_sent,
  output logic [31:0]         trans_seen,
  output logic [31:0]         rx_assert_reports,
  output logic [31:0]         tx_assert_reports,
  output logic [31:0]         rx_obs_records,
  output logic [31:0]         tx_obs_records
);
  logic     dut_clk, dut_rst;
  fl_word_t dut_rx_word, dut_tx_word;
  logic     dut_rx_src_rdy_n, dut_rx_dst_rdy_n, dut_tx_src_rdy_n, dut_tx_dst_rdy_n;

  haven_core #(.IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH)) u_core (
    .clk, .rst,
    .host_rx_word, .host_rx_src_rdy_n, .host_rx_dst_rdy_n,
    .host_tx_word, .host_tx_src_rdy_n, .host_tx_dst_rdy_n,
    .dut_clk, .dut_rst,
    .dut_rx_word, .dut_rx_src_rdy_n, .dut_rx_dst_rdy_n,
    .dut_tx_word, .dut_tx_src_rdy_n, .dut_tx_dst_rdy_n,
    .dut_cycle, .trans_sent, .trans_seen,
    .rx_assert_reports, .tx_assert_reports, .rx_obs_records, .tx_obs_records
  );

  if (DUT_KIND == DUT_FIFO) begin : g_fifo
    fl_fifo #(.DEPTH(FIFO_DEPTH)) u_dut (
      .clk (dut_clk), .rst (dut_rst),
      .rx_word (dut_rx_word), .rx_src_rdy_n (dut_rx_src_rdy_n), .rx_dst_rdy_n (dut_rx_dst_rdy_n),
      .tx_word (dut_tx_word), .tx_src_rdy_n (dut_tx_src_rdy_n), .tx_dst_rdy_n (dut_tx_dst_rdy_n),
      .level ()
    );
  end else begin : g_hgen
    hgen_multi #(.N_UNITS(HGEN_UNITS)) u_dut (
      .clk (dut_clk), .rst (dut_rst),
      .rx_word (dut_rx_word), .rx_src_rdy_n (dut_rx_src_rdy_n), .rx_dst_rdy_n (dut_rx_dst_rdy_n),
      .tx_word (dut_tx_word), .tx_src_rdy_n (dut_tx_src_rdy_n), .tx_dst_rdy_n (dut_tx_dst_rdy_n)
    );
  end

endmodule
