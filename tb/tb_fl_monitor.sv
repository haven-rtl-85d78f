// tb_fl_monitor -- self-checking testbench of the hardware monitor.
//
// A model DUT output sends random frames (1..4 words, random REM) with random source
// gaps; ce is random.  The monitor is first left at its reset configuration (always
// ready), then programmed through cfg_we with a threshold and seed.  Checked:
//   * DST_RDY_N follows an independent model of the 16-bit LFSR and threshold,
//     stepping once per DUT cycle, and is inactive during reset;
//   * each DUT frame becomes one header word {PK_MONITOR, transaction number} pushed
//     together with the first data word, followed by the data words with SOF_N
//     cleared from them;
//   * nothing is pushed on cycles without ce, and trans_seen counts the frames.
module tb_fl_monitor;
  import haven_pkg::*;

  localparam int NFRAMES = 150;

  logic clk = 1'b0, rst = 1'b1, ce, cfg_we;
  fl_word_t dut_word;
  logic dut_src_rdy_n, dut_dst_rdy_n;
  logic [31:0] cfg_data, trans_seen;
  logic [1:0] push_n;
  fl_word_t push_words [2];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fl_monitor dut (.*);

  // reference LFSR
  logic [15:0] m_lfsr, m_thr;
  fl_word_t expq [$];
  int sent = 0, frames_pushed = 0;
  bit rst_seen_inactive = 1'b0;

  always @(posedge clk) begin
    if (rst) begin
      m_lfsr <= 16'hACE1; m_thr <= 16'hFFFF;
      if (dut_dst_rdy_n) rst_seen_inactive = 1'b1;
    end else begin
      checks++;
      if (dut_dst_rdy_n != !(m_lfsr <= m_thr)) begin
        failures++; $display("dst_rdy_n %0d, model lfsr %h thr %h", dut_dst_rdy_n, m_lfsr, m_thr);
      end
      if (cfg_we) begin m_thr <= cfg_data[15:0]; m_lfsr <= cfg_data[31:16]; end
      else if (ce) m_lfsr <= {m_lfsr[14:0], m_lfsr[15] ^ m_lfsr[13] ^ m_lfsr[12] ^ m_lfsr[10]};
      // pushes
      if (!ce && push_n != 0) begin failures++; $display("push without ce"); end
      for (int i = 0; i < int'(push_n); i++) begin
        fl_word_t e;
        checks++;
        if (expq.size() == 0) begin failures++; $display("unexpected push"); end
        else begin
          e = expq.pop_front();
          if (push_words[i] != e) begin failures++; $display("push %h expected %h", push_words[i], e); end
          if (push_words[i].data[63:56] == PK_MONITOR && !push_words[i].sof_n) frames_pushed++;
        end
      end
    end
  end

  // DUT output model: holds a word until taken
  fl_word_t srcq [$];
  always @(posedge clk) begin
    if (!rst && ce && !dut_src_rdy_n && !dut_dst_rdy_n) begin
      void'(srcq.pop_front());
      sent++;
    end
  end
  logic gap_r;
  always @(posedge clk) gap_r <= ($urandom_range(0, 3) == 0);
  always_comb begin
    dut_word      = (srcq.size() != 0) ? srcq[0] : '0;
    dut_src_rdy_n = (srcq.size() == 0) || gap_r;
  end

  initial begin
    int n, tn;
    fl_word_t w, h;
    tn = 0;
    for (int f = 0; f < NFRAMES; f++) begin
      n = $urandom_range(1, 4);
      tn++;
      h = '0;
      h.data = {PK_MONITOR, 24'h0, 32'(tn)};
      h.rem = 3'd7; h.sof_n = 0; h.eof_n = 1; h.sop_n = 0; h.eop_n = 0;
      expq.push_back(h);
      for (int i = 0; i < n; i++) begin
        w.data = {$urandom, $urandom}; w.rem = 3'($urandom);
        w.sof_n = (i != 0); w.sop_n = (i != 0); w.eof_n = (i != n-1); w.eop_n = (i != n-1);
        srcq.push_back(w);
        w.sof_n = 1'b1;
        expq.push_back(w);
      end
    end
    ce = 1'b0; cfg_we = 1'b0; cfg_data = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    fork
      forever begin @(posedge clk); ce <= ($urandom_range(0, 4) != 0); end
      begin
        wait (sent >= 60);
        @(posedge clk);
        cfg_we <= 1'b1; cfg_data <= {16'h5A5A, 16'h8000};
        @(posedge clk);
        cfg_we <= 1'b0;
      end
    join_none
    wait (srcq.size() == 0);
    repeat (4) @(posedge clk);
    checks += 3;
    if (expq.size() != 0 || frames_pushed != NFRAMES) begin failures++; $display("%0d pushes missing", expq.size()); end
    if (trans_seen != NFRAMES) begin failures++; $display("trans_seen %0d", trans_seen); end
    if (!rst_seen_inactive) begin failures++; $display("dst_rdy_n active in reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
