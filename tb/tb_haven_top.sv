// tb_haven_top -- end-to-end test of the verification core with 16 hash generators.
//
// Plays the host: builds a packet stream (one monitor configuration packet, NTRANS
// transactions of 1..36 random bytes with random idle gaps, one deliberately
// malformed transaction whose first word lacks SOP_N, and a final idle packet),
// feeds it to haven_top at default parameters and reads all five output channels.
// Checks:
//   * every monitor packet carries the next transaction number and the Lookup2 hash
//     of the corresponding input (reference model in tb_pkg);
//   * the RX assertion checker reports exactly the malformed frame, with checker
//     number 169, the SOF-without-SOP bit and the right transaction number, and the
//     TX checker reports nothing;
//   * observer record counts match the core's counters;
//   * cycle accuracy: the whole stream is run twice, once with a fast host and once
//     with a slow, bursty host that also stalls the output channels, and the two
//     runs must produce identical observer records (same DUT cycle, same values)
//     and the same number of DUT cycles.
// It also counts how often each mechanism occurred (input-starved DUT clock stop,
// output-full DUT clock stop, DUT back-pressure from the monitor, idle gap cycles,
// configuration, assertion report) and fails if one never happened.
module tb_haven_top;
  import haven_pkg::*;
  import tb_pkg::*;

  localparam int NTRANS = 120;
  localparam int BAD    = 37;    // index (from 0) of the malformed transaction

  logic clk = 1'b0, rst = 1'b1;
  fl_word_t            host_rx_word;
  logic                host_rx_src_rdy_n, host_rx_dst_rdy_n;
  fl_word_t [N_CH-1:0] host_tx_word;
  logic     [N_CH-1:0] host_tx_src_rdy_n, host_tx_dst_rdy_n;
  logic [63:0] dut_cycle;
  logic [31:0] trans_sent, trans_seen, rx_assert_reports, tx_assert_reports,
               rx_obs_records, tx_obs_records;

  int checks = 0, failures = 0;
  int run_no = 0;
  bit slow_host = 1'b0;
  bit running = 1'b0;

  always #5 clk = ~clk;

  haven_top dut (.*);

  // ---------------- stimulus ----------------
  fl_word_t    hq [$];        // host packet words, built once
  logic [31:0] exp_hash [NTRANS];
  int          sent;

  function automatic fl_word_t mk(input logic [63:0] d, input int rem, input bit sof,
                                  input bit eof, input bit sop, input bit eop);
    fl_word_t w;
    w.data = d; w.rem = 3'(rem);
    w.sof_n = !sof; w.eof_n = !eof; w.sop_n = !sop; w.eop_n = !eop;
    return w;
  endfunction

  task automatic build_stream();
    logic [7:0] k [];
    int n;
    // monitor back-pressure: ready when LFSR <= 0xB000, seed 0x1234
    hq.push_back(mk({PK_CONFIG, 24'h0, 16'h1234, 16'hB000}, 7, 1, 1, 1, 1));
    for (int t = 0; t < NTRANS; t++) begin
      n = $urandom_range(1, 36);
      k = new[n];
      foreach (k[i]) k[i] = 8'($urandom);
      exp_hash[t] = lookup2_ref(k, n, 32'h0);
      hq.push_back(mk({PK_TRANS, 24'h0, 32'($urandom_range(0, 3) == 0 ? $urandom_range(1, 6) : 0)},
                      7, 1, 0, 1, 1));
      for (int w = 0; w * 8 < n; w++) begin
        logic [63:0] d = '0;
        for (int i = 0; i < 8; i++) if (w*8 + i < n) d[8*i +: 8] = k[w*8+i];
        hq.push_back(mk(d, (n - 1 - w*8 > 7) ? 7 : n - 1 - w*8, 0, (w+1)*8 >= n,
                        (w == 0) && (t != BAD), (w+1)*8 >= n));
      end
    end
    hq.push_back(mk({PK_TRANS, 24'h0, 32'd300}, 7, 1, 1, 1, 1));   // drain
  endtask

  // host -> core.  The core's outputs are sampled at the falling edge, where they are
  // settled; the host's own signals change by nonblocking assignment at the rising edge.
  logic rx_take;
  always @(negedge clk) rx_take = running && !host_rx_src_rdy_n && !host_rx_dst_rdy_n;
  always @(posedge clk) begin
    if (running && rx_take) sent <= sent + 1;
  end
  always_comb begin
    host_rx_word = (sent < hq.size()) ? hq[sent] : '0;
  end
  always @(posedge clk) begin
    if (!running) host_rx_src_rdy_n <= 1'b1;
    else begin
      automatic int nxt = sent + (rx_take ? 1 : 0);
      host_rx_src_rdy_n <= !(nxt < hq.size() && (!slow_host || $urandom_range(0, 3) == 0));
    end
  end

  // ---------------- core -> host ----------------
  fl_word_t frame [N_CH][$];
  int mon_frames, rx_reports, tx_reports;
  longint obs_rec [2][$];      // run-0 records of both observers, as hashed words
  int obs_cnt [2];
  int obs_mismatch;

  always @(negedge clk) begin
    for (int ch = 0; ch < N_CH; ch++) begin
      if (!rst && !host_tx_src_rdy_n[ch] && !host_tx_dst_rdy_n[ch]) begin
        frame[ch].push_back(host_tx_word[ch]);
        if (!host_tx_word[ch].eof_n) begin
          take_frame(ch);
          frame[ch].delete();
        end
      end
    end
  end
  always @(posedge clk) begin
    for (int ch = 0; ch < N_CH; ch++) begin
      host_tx_dst_rdy_n[ch] <= !( !slow_host ||
                                 (ch == CH_MONITOR ? ($urandom_range(0, 9) == 0) : ($urandom_range(0, 1) == 0)));
    end
  end

  task automatic take_frame(input int ch);
    fl_word_t f [$] = frame[ch];
    case (ch)
      CH_MONITOR: begin
        checks++;
        if (f.size() != 2 || f[0].data[63:56] != PK_MONITOR || f[0].data[31:0] != 32'(mon_frames + 1)
            || mon_frames >= NTRANS || f[1].data != {32'h0, exp_hash[mon_frames]} || f[1].rem != 3'd3) begin
          failures++;
          $display("run %0d monitor packet %0d wrong: %h %h", run_no, mon_frames, f[0].data, f[1].data);
        end
        mon_frames++;
      end
      CH_RX_ASSERT, CH_TX_ASSERT: begin
        checks++;
        if (ch == CH_TX_ASSERT) begin
          failures++; $display("unexpected TX assertion report %h", f[0].data);
        end else if (f.size() != 2 || f[0].data[63:56] != PK_ASSERT || f[0].data[55:40] != 16'd169
                 || f[0].data[32 + A_SOF_SOP] != 1'b1 || f[0].data[31:0] != 32'(BAD + 1)) begin
          failures++; $display("RX assertion report wrong: %h %h", f[0].data, f[1].data);
        end
        if (ch == CH_RX_ASSERT) rx_reports++; else tx_reports++;
      end
      default: begin
        automatic int o = ch - CH_RX_OBSERVE;
        automatic longint h = 0;
        foreach (f[i]) h = h * 1000003 + longint'(f[i].data);
        if (f.size() != 3 || f[0].data[63:56] != PK_OBSERVE || f[0].data[55:48] != 8'(o + 1)) begin
          checks++; failures++; $display("observer record malformed");
        end
        if (run_no == 0) obs_rec[o].push_back(h);
        else if (obs_cnt[o] >= obs_rec[o].size() || obs_rec[o][obs_cnt[o]] != h) begin
          if (obs_mismatch < 3) $display("observer %0d record %0d differs: %h %h %h", o, obs_cnt[o], f[0].data, f[1].data, f[2].data);
          obs_mismatch++;
        end
        obs_cnt[o]++;
      end
    endcase
  endtask

  // ---------------- mechanism counters ----------------
  int n_in_stall, n_out_stall, n_backpressure, n_gap, n_cfg, n_block_mix;
  always @(posedge clk) if (!rst) begin
    if (dut.u_core.stall[0] && dut.u_core.u_driver.state != 0) n_in_stall++;
    if (|dut.u_core.stall[N_CH:1]) n_out_stall++;
    if (dut.u_core.ce && !dut.u_core.dut_tx_src_rdy_n && dut.u_core.dut_tx_dst_rdy_n) n_backpressure++;
    if (dut.u_core.ce && dut.u_core.u_driver.state == 1) n_gap++;
    if (dut.u_core.cfg_we) n_cfg++;
  end
  for (genvar g = 0; g < 16; g++) begin : g_mix
    always @(posedge dut.g_hgen.u_dut.g_unit[g].u_hgen.clk)
      if (!rst && dut.g_hgen.u_dut.g_unit[g].u_hgen.state == 0 && dut.g_hgen.u_dut.g_unit[g].u_hgen.cnt >= 12)
        n_block_mix++;
  end

  task automatic do_run(input bit slow, output longint cycles);
    slow_host = slow;
    rst <= 1'b1; running = 1'b0;
    sent = 0; mon_frames = 0; rx_reports = 0; tx_reports = 0;
    obs_cnt[0] = 0; obs_cnt[1] = 0;
    for (int ch = 0; ch < N_CH; ch++) frame[ch].delete();
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    running = 1'b1;
    wait (sent == hq.size() && mon_frames == NTRANS && trans_seen == NTRANS);
    // let the drain gap finish and the reports leave
    while (dut.u_core.u_driver.state != 0 || !dut.u_core.u_in_buf.tx_src_rdy_n) @(posedge clk);
    repeat (400) @(posedge clk);
    cycles = dut_cycle;
    checks++;
    if (rx_reports != 1 || tx_reports != 0 || rx_assert_reports != 1) begin
      failures++; $display("run %0d: %0d RX and %0d TX assertion reports", run_no, rx_reports, tx_reports);
    end
    checks++;
    if (obs_cnt[0] != int'(rx_obs_records) || obs_cnt[1] != int'(tx_obs_records)) begin
      failures++; $display("observer record counts differ from the core's counters");
    end
    checks++;
    if (trans_sent != NTRANS) begin failures++; $display("trans_sent %0d", trans_sent); end
  endtask

  initial begin
    longint c0, c1;
    host_rx_src_rdy_n = 1'b1;
    host_tx_dst_rdy_n = '1;
    build_stream();
    do_run(1'b0, c0);
    run_no = 1;
    do_run(1'b1, c1);
    checks++;
    if (c0 != c1) begin failures++; $display("DUT cycles differ: %0d vs %0d", c0, c1); end
    checks++;
    if (obs_mismatch != 0 || obs_cnt[0] != obs_rec[0].size() || obs_cnt[1] != obs_rec[1].size()) begin
      failures++; $display("observer records differ between runs (%0d mismatches)", obs_mismatch);
    end
    $display("mechanisms: input stall %0d, output stall %0d, back-pressure %0d, gap %0d, config %0d, block mix %0d, DUT cycles %0d",
             n_in_stall, n_out_stall, n_backpressure, n_gap, n_cfg, n_block_mix, c0);
    checks += 6;
    if (n_in_stall == 0)     begin failures++; $display("no input-starved clock stop"); end
    if (n_out_stall == 0)    begin failures++; $display("no output-full clock stop"); end
    if (n_backpressure == 0) begin failures++; $display("no back-pressure"); end
    if (n_gap == 0)          begin failures++; $display("no idle gap"); end
    if (n_cfg == 0)          begin failures++; $display("no configuration"); end
    if (n_block_mix == 0)    begin failures++; $display("no full Lookup2 block"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
