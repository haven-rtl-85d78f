// haven_core -- the FPGA part of the accelerated verification environment.
//
// Sits between the host link and one design under test (DUT) with a FrameLink input
// and a FrameLink output.  Host packets arrive on host_rx and pass through the input
// transaction buffer to the hardware driver, which replays them on the DUT input.
// The hardware monitor takes the DUT output and returns each output frame on host
// channel CH_MONITOR.  Two assertion checkers watch the DUT input (RX) and output
// (TX) interfaces and report protocol violations on their own channels, and two
// signal observers send value-change records of the whole RX and TX bundles.
// Each host channel has its own output buffer, so a report never waits behind a
// half-sent monitor frame.
//
// The DUT runs on dut_clk, a gated copy of clk.  A DUT cycle is spent only when the
// driver holds the input it needs and every output buffer has room (see
// dut_clock_ctrl), so the DUT's waveform does not depend on the host's speed.
// dut_rst is the core reset; the DUT clock runs during reset.
//
// Host ports: host_rx is a FrameLink sink; host_tx[CH] are FrameLink sources, one
// per channel (CH_* in haven_pkg).  All handshakes active low.
// The component set and their roles follow the source design's architecture of the
// accelerated version; buffer sizes, channel split and packet layouts are this
// design's own.
module haven_core
  import haven_pkg::*;
#(
  parameter int unsigned   IN_DEPTH     = 64,
  parameter int unsigned   OUT_DEPTH    = 64,
  parameter logic [15:0]   RX_CHECKER_ID = 16'd169,
  parameter logic [15:0]   TX_CHECKER_ID = 16'd170
) (
  input  logic                  clk,
  input  logic                  rst,
  // host link
  input  fl_word_t              host_rx_word,
  input  logic                  host_rx_src_rdy_n,
  output logic                  host_rx_dst_rdy_n,
  output fl_word_t [N_CH-1:0]   host_tx_word,
  output logic     [N_CH-1:0]   host_tx_src_rdy_n,
  input  logic     [N_CH-1:0]   host_tx_dst_rdy_n,
  // DUT clock domain
  output logic                  dut_clk,
  output logic                  dut_rst,
  output fl_word_t              dut_rx_word,
  output logic                  dut_rx_src_rdy_n,
  input  logic                  dut_rx_dst_rdy_n,
  input  fl_word_t              dut_tx_word,
  input  logic                  dut_tx_src_rdy_n,
  output logic                  dut_tx_dst_rdy_n,
  // status
  output logic [63:0]           dut_cycle,
  output logic [31:0]           trans_sent,
  output logic [31:0]           trans_seen,
  output logic [31:0]           rx_assert_reports,
  output logic [31:0]           tx_assert_reports,
  output logic [31:0]           rx_obs_records,
  output logic [31:0]           tx_obs_records
);
  localparam int unsigned OBS_W  = FL_WORD_W + 2;
  localparam int unsigned OBS_NW = (OBS_W + FL_DATA_W - 1) / FL_DATA_W;

  logic        ce;
  logic [N_CH:0] stall;   // [0] driver, [1+CH] output buffer of channel CH

  // ---------------- input side ----------------
  fl_word_t    ib_word;
  logic        ib_src_rdy_n, ib_dst_rdy_n;
  logic        cfg_we;
  logic [31:0] cfg_data;

  fl_fifo #(.DEPTH(IN_DEPTH)) u_in_buf (
    .clk, .rst,
    .rx_word (host_rx_word), .rx_src_rdy_n (host_rx_src_rdy_n), .rx_dst_rdy_n (host_rx_dst_rdy_n),
    .tx_word (ib_word),      .tx_src_rdy_n (ib_src_rdy_n),      .tx_dst_rdy_n (ib_dst_rdy_n),
    .level   ()
  );

  fl_driver u_driver (
    .clk, .rst, .ce,
    .in_word (ib_word), .in_src_rdy_n (ib_src_rdy_n), .in_dst_rdy_n (ib_dst_rdy_n),
    .dut_word (dut_rx_word), .dut_src_rdy_n (dut_rx_src_rdy_n), .dut_dst_rdy_n (dut_rx_dst_rdy_n),
    .cfg_we, .cfg_data,
    .stall (stall[0]),
    .trans_sent
  );

  // ---------------- output side ----------------
  logic [1:0] mon_n, rxa_n, txa_n;
  fl_word_t   mon_w [2];
  fl_word_t   rxa_w [2];
  fl_word_t   txa_w [2];
  logic [$clog2(OBS_NW+2)-1:0] rxo_n, txo_n;
  fl_word_t   rxo_w [OBS_NW+1];
  fl_word_t   txo_w [OBS_NW+1];

  fl_monitor u_monitor (
    .clk, .rst, .ce,
    .dut_word (dut_tx_word), .dut_src_rdy_n (dut_tx_src_rdy_n), .dut_dst_rdy_n (dut_tx_dst_rdy_n),
    .cfg_we, .cfg_data,
    .push_n (mon_n), .push_words (mon_w),
    .trans_seen
  );

  fl_assert_checker #(.CHECKER_ID(RX_CHECKER_ID), .CHECK_DST(1'b0)) u_rx_checker (
    .clk, .rst, .ce, .cycle (dut_cycle),
    .word (dut_rx_word), .src_rdy_n (dut_rx_src_rdy_n), .dst_rdy_n (dut_rx_dst_rdy_n),
    .push_n (rxa_n), .push_words (rxa_w), .reports (rx_assert_reports)
  );

  fl_assert_checker #(.CHECKER_ID(TX_CHECKER_ID), .CHECK_DST(1'b1)) u_tx_checker (
    .clk, .rst, .ce, .cycle (dut_cycle),
    .word (dut_tx_word), .src_rdy_n (dut_tx_src_rdy_n), .dst_rdy_n (dut_tx_dst_rdy_n),
    .push_n (txa_n), .push_words (txa_w), .reports (tx_assert_reports)
  );

  signal_observer #(.W(OBS_W), .OBSERVER_ID(8'd1)) u_rx_observer (
    .clk, .rst, .ce, .cycle (dut_cycle),
    .sig ({dut_rx_word, dut_rx_src_rdy_n, dut_rx_dst_rdy_n}),
    .push_n (rxo_n), .push_words (rxo_w), .records (rx_obs_records)
  );

  signal_observer #(.W(OBS_W), .OBSERVER_ID(8'd2)) u_tx_observer (
    .clk, .rst, .ce, .cycle (dut_cycle),
    .sig ({dut_tx_word, dut_tx_src_rdy_n, dut_tx_dst_rdy_n}),
    .push_n (txo_n), .push_words (txo_w), .records (tx_obs_records)
  );

  out_buffer #(.DEPTH(OUT_DEPTH), .PUSH_MAX(2)) u_ob_mon (
    .clk, .rst, .push_n (mon_n), .push_words (mon_w), .stall (stall[1+CH_MONITOR]),
    .tx_word (host_tx_word[CH_MONITOR]), .tx_src_rdy_n (host_tx_src_rdy_n[CH_MONITOR]),
    .tx_dst_rdy_n (host_tx_dst_rdy_n[CH_MONITOR])
  );
  out_buffer #(.DEPTH(OUT_DEPTH), .PUSH_MAX(2)) u_ob_rxa (
    .clk, .rst, .push_n (rxa_n), .push_words (rxa_w), .stall (stall[1+CH_RX_ASSERT]),
    .tx_word (host_tx_word[CH_RX_ASSERT]), .tx_src_rdy_n (host_tx_src_rdy_n[CH_RX_ASSERT]),
    .tx_dst_rdy_n (host_tx_dst_rdy_n[CH_RX_ASSERT])
  );
  out_buffer #(.DEPTH(OUT_DEPTH), .PUSH_MAX(2)) u_ob_txa (
    .clk, .rst, .push_n (txa_n), .push_words (txa_w), .stall (stall[1+CH_TX_ASSERT]),
    .tx_word (host_tx_word[CH_TX_ASSERT]), .tx_src_rdy_n (host_tx_src_rdy_n[CH_TX_ASSERT]),
    .tx_dst_rdy_n (host_tx_dst_rdy_n[CH_TX_ASSERT])
  );
  out_buffer #(.DEPTH(OUT_DEPTH), .PUSH_MAX(OBS_NW+1)) u_ob_rxo (
    .clk, .rst, .push_n (rxo_n), .push_words (rxo_w), .stall (stall[1+CH_RX_OBSERVE]),
    .tx_word (host_tx_word[CH_RX_OBSERVE]), .tx_src_rdy_n (host_tx_src_rdy_n[CH_RX_OBSERVE]),
    .tx_dst_rdy_n (host_tx_dst_rdy_n[CH_RX_OBSERVE])
  );
  out_buffer #(.DEPTH(OUT_DEPTH), .PUSH_MAX(OBS_NW+1)) u_ob_txo (
    .clk, .rst, .push_n (txo_n), .push_words (txo_w), .stall (stall[1+CH_TX_OBSERVE]),
    .tx_word (host_tx_word[CH_TX_OBSERVE]), .tx_src_rdy_n (host_tx_src_rdy_n[CH_TX_OBSERVE]),
    .tx_dst_rdy_n (host_tx_dst_rdy_n[CH_TX_OBSERVE])
  );

  // ---------------- DUT clock domain ----------------
  dut_clock_ctrl #(.N_STALL(N_CH + 1)) u_clk_ctrl (
    .clk, .rst, .stall, .ce, .dut_clk, .cycle (dut_cycle)
  );
  assign dut_rst = rst;

endmodule
