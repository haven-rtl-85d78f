// tb_host_model -- behavioural model of the host side of one haven_top.
//
// Plays the software half of the framework for one DUT: generates NTRANS input
// transactions of 1..36 random bytes (seeded by SEED, no idle gaps), streams them to
// the core as fast as the core takes them, reads the five output channels with no
// back-pressure, and checks every returned transaction against the expected result:
// the frame itself when the DUT is the FIFO (HASH = 0), or its Lookup2 hash when
// the DUT is a hash generator (HASH = 1).  Any assertion report is an error.
// `done` rises when all results are back; `checks`/`failures` are running totals.
module tb_host_model
  import haven_pkg::*;
  import tb_pkg::*;
#(
  parameter int NTRANS = 1000,
  parameter bit HASH   = 1'b1,
  parameter int SEED   = 1
) (
  input  logic                clk,
  input  logic                rst,
  output fl_word_t            host_rx_word,
  output logic                host_rx_src_rdy_n,
  input  logic                host_rx_dst_rdy_n,
  input  fl_word_t [N_CH-1:0] host_tx_word,
  input  logic     [N_CH-1:0] host_tx_src_rdy_n,
  output logic     [N_CH-1:0] host_tx_dst_rdy_n,
  output logic                done,
  output int                  checks,
  output int                  failures
);
  fl_word_t    tx_words [$];          // words still to send
  logic [63:0] expq [$];              // expected result words, per transaction
  int          exp_len [$];           // words per expected result
  int          got = 0, generated = 0, widx = 0;
  fl_word_t    cur [$];

  function automatic fl_word_t mk(input logic [63:0] d, input int rem, input bit sof,
                                  input bit eof, input bit sop, input bit eop);
    fl_word_t w;
    w.data = d; w.rem = 3'(rem);
    w.sof_n = !sof; w.eof_n = !eof; w.sop_n = !sop; w.eop_n = !eop;
    return w;
  endfunction

  // generate one transaction into the send queue and the expectation queues
  task automatic gen_one();
    logic [7:0] k [];
    int n;
    n = $urandom_range(1, 36);
    k = new[n];
    foreach (k[i]) k[i] = 8'($urandom);
    tx_words.push_back(mk({PK_TRANS, 56'h0}, 7, 1, 0, 1, 1));
    if (HASH) begin
      expq.push_back({32'h0, lookup2_ref(k, n, 32'h0)});
      exp_len.push_back(1);
    end else exp_len.push_back((n + 7) / 8);
    for (int w = 0; w * 8 < n; w++) begin
      logic [63:0] d;
      d = '0;
      for (int i = 0; i < 8; i++) if (w*8 + i < n) d[8*i +: 8] = k[w*8+i];
      tx_words.push_back(mk(d, (n - 1 - w*8 > 7) ? 7 : n - 1 - w*8, 0, (w+1)*8 >= n, w == 0, (w+1)*8 >= n));
      if (!HASH) expq.push_back(d);
    end
    generated++;
  endtask

  initial begin
    process::self().srandom(SEED);
    checks = 0; failures = 0; done = 1'b0;
    // keep a few transactions ahead of the core
    forever begin
      while (generated < NTRANS && tx_words.size() < 64) gen_one();
      if (generated == NTRANS && tx_words.size() == 0) begin
        // final idle packet lets the DUT run until the last result is out
        tx_words.push_back(mk({PK_TRANS, 24'h0, 32'd200}, 7, 1, 1, 1, 1));
        generated++;
      end
      @(posedge clk);
    end
  end

  // All sampling of the core's outputs is done at the falling edge, where every
  // signal is settled, and the host's own outputs change only through nonblocking
  // assignments at the rising edge: the model never races the core's registers.
  fl_word_t rx_w;
  logic     rx_v, rx_take;

  assign host_rx_word      = rx_w;
  assign host_rx_src_rdy_n = !rx_v;
  assign host_tx_dst_rdy_n = '0;

  always @(negedge clk) rx_take = !rst && rx_v && !host_rx_dst_rdy_n;

  always @(posedge clk) begin
    if (rst) begin
      rx_v <= 1'b0;
      rx_w <= '0;
    end else if (!rx_v || rx_take) begin
      if (tx_words.size() != 0) begin
        rx_w <= tx_words.pop_front();
        rx_v <= 1'b1;
      end else rx_v <= 1'b0;
    end
  end

  always @(negedge clk) begin
    if (!rst) for (int ch = 0; ch < N_CH; ch++) if (!host_tx_src_rdy_n[ch]) begin
      if (ch == CH_MONITOR) begin
        cur.push_back(host_tx_word[ch]);
        if (!host_tx_word[ch].eof_n) begin
          checks++;
          if (exp_len.size() == 0 || cur.size() != exp_len[0] + 1
              || cur[0].data != {PK_MONITOR, 24'h0, 32'(got + 1)}) begin
            failures++; $display("%m transaction %0d: wrong packet", got);
          end else begin
            for (int i = 1; i < cur.size(); i++) begin
              if (cur[i].data != expq[0]) begin
                failures++; $display("%m transaction %0d: got %h expected %h", got, cur[i].data, expq[0]);
              end
              void'(expq.pop_front());
            end
          end
          if (exp_len.size() != 0) void'(exp_len.pop_front());
          cur.delete();
          got++;
          if (got == NTRANS) done = 1'b1;
        end
      end else if (ch == CH_RX_ASSERT || ch == CH_TX_ASSERT) begin
        if (!host_tx_word[ch].sof_n) begin
          failures++; $display("%m unexpected assertion report %h", host_tx_word[ch].data);
        end
      end
    end
  end
endmodule
