// tb_workloads -- the evaluated systems run side by side on the same stimulus.
//
// Six copies of haven_top, one per evaluated system: the FrameLink FIFO and 1, 2,
// 4, 8 and 16 parallel hash generators.  Each copy has its own tb_host_model, all
// with the same seed, so every system receives the same NTRANS transactions of
// 1..36 random bytes with no idle gaps.  NTRANS is the smallest run size of the
// evaluation (50,000); the larger sizes differ only in this number.  Every result
// is checked (the frame itself for the FIFO, the Lookup2 hash otherwise).  The
// testbench prints the DUT clock cycles each system needed and checks that
// parallel hash units are faster than one and that more units never cost more
// than 5 % over two units (round-robin slack).  Watchdog: NTRANS * 40 cycles.
module tb_workloads;
  import haven_pkg::*;

  localparam int NTRANS = 50000;
  localparam int NSYS = 6;
  localparam int UNITS [NSYS] = '{0, 1, 2, 4, 8, 16};   // 0: the FIFO

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        done [NSYS];
  int          chk [NSYS], fail [NSYS];
  logic [63:0] cyc [NSYS];
  logic [63:0] cyc_at_done [NSYS];

  for (genvar s = 0; s < NSYS; s++) begin : g_sys
    fl_word_t            host_rx_word;
    logic                host_rx_src_rdy_n, host_rx_dst_rdy_n;
    fl_word_t [N_CH-1:0] host_tx_word;
    logic     [N_CH-1:0] host_tx_src_rdy_n, host_tx_dst_rdy_n;
    logic [31:0] trans_sent, trans_seen, rx_assert_reports, tx_assert_reports,
                 rx_obs_records, tx_obs_records;

    haven_top #(
      .DUT_KIND   (UNITS[s] == 0 ? DUT_FIFO : DUT_HGEN),
      .HGEN_UNITS (UNITS[s] == 0 ? 1 : UNITS[s])
    ) u_sys (
      .clk, .rst,
      .host_rx_word, .host_rx_src_rdy_n, .host_rx_dst_rdy_n,
      .host_tx_word, .host_tx_src_rdy_n, .host_tx_dst_rdy_n,
      .dut_cycle (cyc[s]), .trans_sent, .trans_seen,
      .rx_assert_reports, .tx_assert_reports, .rx_obs_records, .tx_obs_records
    );

    tb_host_model #(.NTRANS(NTRANS), .HASH(UNITS[s] != 0), .SEED(11)) u_host (
      .clk, .rst,
      .host_rx_word, .host_rx_src_rdy_n, .host_rx_dst_rdy_n,
      .host_tx_word, .host_tx_src_rdy_n, .host_tx_dst_rdy_n,
      .done (done[s]), .checks (chk[s]), .failures (fail[s])
    );

    always @(posedge clk) if (done[s] && cyc_at_done[s] == 0) cyc_at_done[s] <= cyc[s];
  end

  initial begin
    int checks, failures;
    bit all;
    foreach (cyc_at_done[s]) cyc_at_done[s] = 0;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    do begin
      @(posedge clk);
      all = 1;
      foreach (done[s]) if (!done[s]) all = 0;
    end while (!all);
    repeat (2) @(posedge clk);
    checks = 0; failures = 0;
    foreach (done[s]) begin
      checks += chk[s]; failures += fail[s];
      $display("system %s: %0d transactions, %0d DUT cycles, %0.2f cycles per transaction",
               UNITS[s] == 0 ? "FIFO" : $sformatf("HGENx%0d", UNITS[s]), NTRANS, cyc_at_done[s],
               real'(cyc_at_done[s]) / NTRANS);
    end
    // every system gets the same stimulus; parallel units must beat a single one,
    // and adding units must not cost more than a few cycles of round-robin slack
    for (int s = 2; s < NSYS; s++) begin
      checks++;
      if (cyc_at_done[s] >= cyc_at_done[1]) begin
        failures++; $display("HGENx%0d not faster than HGENx1", UNITS[s]);
      end
      checks++;
      if (real'(cyc_at_done[s]) > 1.05 * real'(cyc_at_done[2])) begin
        failures++; $display("HGENx%0d much slower than HGENx2", UNITS[s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NTRANS * 40) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
