// tb_haven_core -- test of the verification core with the FrameLink FIFO as DUT.
//
// The testbench plays the host and provides the DUT (a 16-word fl_fifo clocked by
// the core's dut_clk).  It sends NTRANS transactions of 1..5 random words with
// random gaps; transaction BAD has its single word marked SOF_N/EOF_N/EOP_N but not
// SOP_N, the situation of the classic FIFO example where data lies outside any part.
// The FIFO passes it through, so both checkers must report it once: RX checker 169
// and TX checker 170, mask bit SOF_SOP, transaction number BAD+1.
// Also checked: every monitor packet returns the transaction number and exactly the
// words sent (SOF_N on the first word); the RX observer's records replay to the
// value of the DUT input bundle sampled by the testbench on every DUT clock edge.
module tb_haven_core;
  import haven_pkg::*;

  localparam int NTRANS = 80;
  localparam int BAD    = 23;

  logic clk = 1'b0, rst = 1'b1;
  fl_word_t            host_rx_word;
  logic                host_rx_src_rdy_n, host_rx_dst_rdy_n;
  fl_word_t [N_CH-1:0] host_tx_word;
  logic     [N_CH-1:0] host_tx_src_rdy_n, host_tx_dst_rdy_n;
  logic dut_clk, dut_rst;
  fl_word_t dut_rx_word, dut_tx_word;
  logic dut_rx_src_rdy_n, dut_rx_dst_rdy_n, dut_tx_src_rdy_n, dut_tx_dst_rdy_n;
  logic [63:0] dut_cycle;
  logic [31:0] trans_sent, trans_seen, rx_assert_reports, tx_assert_reports,
               rx_obs_records, tx_obs_records;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  haven_core dut (.*);

  fl_fifo #(.DEPTH(16)) u_fifo (
    .clk (dut_clk), .rst (dut_rst),
    .rx_word (dut_rx_word), .rx_src_rdy_n (dut_rx_src_rdy_n), .rx_dst_rdy_n (dut_rx_dst_rdy_n),
    .tx_word (dut_tx_word), .tx_src_rdy_n (dut_tx_src_rdy_n), .tx_dst_rdy_n (dut_tx_dst_rdy_n),
    .level ()
  );

  fl_word_t hq [$];
  fl_word_t expf [NTRANS][$];
  int sent = 0;

  function automatic fl_word_t mk(input logic [63:0] d, input int rem, input bit sof,
                                  input bit eof, input bit sop, input bit eop);
    fl_word_t w;
    w.data = d; w.rem = 3'(rem);
    w.sof_n = !sof; w.eof_n = !eof; w.sop_n = !sop; w.eop_n = !eop;
    return w;
  endfunction

  // host -> core
  always_comb host_rx_word = (sent < hq.size()) ? hq[sent] : '0;
  // the core's outputs are sampled at the falling edge, where they are settled;
  // the testbench's own signals change by nonblocking assignment at the rising edge
  logic rx_take;
  always @(negedge clk) rx_take = !host_rx_src_rdy_n && !host_rx_dst_rdy_n;
  always @(posedge clk) begin
    automatic int nxt = sent + (rx_take ? 1 : 0);
    sent <= nxt;
    host_rx_src_rdy_n <= rst || !(nxt < hq.size() && $urandom_range(0, 2) != 0);
  end

  // core -> host
  fl_word_t frame [N_CH][$];
  int mon_frames = 0, rx_rep = 0, tx_rep = 0, obs_rec = 0;
  logic [FL_WORD_W+1:0] obs_val;
  logic [FL_WORD_W+1:0] sampled [$];   // DUT input bundle on every DUT clock

  // the bundle as it stood before each rising DUT clock edge (it only changes on
  // rising edges of clk, so its value at the preceding falling edge is that value)
  logic [FL_WORD_W+1:0] pre_edge;
  always @(negedge clk) pre_edge = {dut_rx_word, dut_rx_src_rdy_n, dut_rx_dst_rdy_n};
  always @(posedge dut_clk) if (!rst) sampled.push_back(pre_edge);

  always @(negedge clk) begin
    for (int ch = 0; ch < N_CH; ch++) begin
      if (!rst && !host_tx_src_rdy_n[ch] && !host_tx_dst_rdy_n[ch]) begin
        frame[ch].push_back(host_tx_word[ch]);
        if (!host_tx_word[ch].eof_n) begin
          take(ch);
          frame[ch].delete();
        end
      end
    end
  end
  always @(posedge clk) begin
    for (int ch = 0; ch < N_CH; ch++) begin
      host_tx_dst_rdy_n[ch] <= (ch == CH_MONITOR) ? ($urandom_range(0, 3) == 0) : 1'b0;
    end
  end

  // observer records are replayed against the sampled waveform
  int replay_pos = 0;
  logic [63:0] rec_cycle [$];
  logic [FL_WORD_W+1:0] rec_val [$];

  task automatic take(input int ch);
    fl_word_t f [$] = frame[ch];
    checks++;
    case (ch)
      CH_MONITOR: begin
        bit bad = (f.size() != expf[mon_frames].size() + 1) || f[0].data != {PK_MONITOR, 24'h0, 32'(mon_frames + 1)};
        if (!bad) foreach (expf[mon_frames][i]) begin
          fl_word_t e = expf[mon_frames][i];
          e.sof_n = 1'b1;
          if (f[i+1] != e) bad = 1;
        end
        if (bad) begin failures++; $display("monitor packet %0d wrong", mon_frames); end
        mon_frames++;
      end
      CH_RX_ASSERT, CH_TX_ASSERT: begin
        logic [15:0] id = (ch == CH_RX_ASSERT) ? 16'd169 : 16'd170;
        if (f.size() != 2 || f[0].data != {PK_ASSERT, id, 8'(1 << A_SOF_SOP), 32'(BAD + 1)}) begin
          failures++; $display("assertion report on channel %0d wrong: %h", ch, f[0].data);
        end
        if (ch == CH_RX_ASSERT) rx_rep++; else tx_rep++;
      end
      CH_RX_OBSERVE: begin
        if (f.size() != 3 || f[0].data[63:48] != {PK_OBSERVE, 8'd1}) begin failures++; $display("RX record malformed"); end
        rec_cycle.push_back({16'h0, f[0].data[47:0]});
        rec_val.push_back((FL_WORD_W+2)'({f[2].data, f[1].data}));
        obs_rec++;
      end
      default: if (f.size() != 3) begin failures++; $display("TX record malformed"); end
    endcase
  endtask

  initial begin
    int n, gap;
    for (int t = 0; t < NTRANS; t++) begin
      gap = ($urandom_range(0, 2) == 0) ? $urandom_range(1, 5) : 0;
      n = (t == BAD) ? 1 : $urandom_range(1, 5);
      hq.push_back(mk({PK_TRANS, 24'h0, 32'(gap)}, 7, 1, 0, 1, 1));
      for (int w = 0; w < n; w++) begin
        fl_word_t hw;
        hw = mk({$urandom, $urandom}, $urandom_range(0, 7), 0, w == n-1, (w == 0) && (t != BAD), w == n-1);
        hq.push_back(hw);
        hw.sof_n = (w != 0);
        expf[t].push_back(hw);
      end
    end
    hq.push_back(mk({PK_TRANS, 24'h0, 32'd100}, 7, 1, 1, 1, 1));
    host_rx_src_rdy_n = 1'b1;
    host_tx_dst_rdy_n = '1;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    wait (sent == hq.size() && mon_frames == NTRANS);
    repeat (300) @(posedge clk);
    checks += 4;
    if (rx_rep != 1 || tx_rep != 1) begin failures++; $display("reports RX %0d TX %0d", rx_rep, tx_rep); end
    if (trans_sent != NTRANS || trans_seen != NTRANS) begin failures++; $display("counters %0d %0d", trans_sent, trans_seen); end
    if (obs_rec != int'(rx_obs_records)) begin failures++; $display("observer count"); end
    // replay: value at each DUT cycle is the last record at or before it
    begin
      int r = 0, bad = 0;
      logic [FL_WORD_W+1:0] cur = '0;
      for (int c = 0; c < sampled.size(); c++) begin
        while (r < rec_cycle.size() && rec_cycle[r] == 64'(c)) begin cur = rec_val[r]; r++; end
        if (cur != sampled[c]) bad++;
      end
      if (bad != 0 || r != rec_cycle.size() || sampled.size() != int'(dut_cycle)) begin
        failures++; $display("observer replay: %0d cycles differ, %0d of %0d records used, %0d samples, %0d cycles",
                             bad, r, rec_cycle.size(), sampled.size(), dut_cycle);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
