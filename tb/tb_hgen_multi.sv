// tb_hgen_multi -- self-checking testbench of four parallel hash generators.
//
// Sends NFRAMES random frames of 1..40 bytes (the evaluation used 1..36 B; a few
// longer ones add a third 12-byte block) with random source gaps, takes the results
// under random back-pressure and compares each hash with the reference model in
// tb_pkg, so results must come back in frame order.  Also checks the result word
// format, that a pending result never takes more than 200 cycles, and, for an
// uninterrupted 8-byte frame, the latency from the input word to the result.
// Watchdog: 100,000 cycles.
module tb_hgen_multi;
  import haven_pkg::*;
  import tb_pkg::*;

  localparam int NFRAMES = 300;

  logic clk = 1'b0, rst = 1'b1;
  fl_word_t rx_word, tx_word;
  logic rx_src_rdy_n, rx_dst_rdy_n, tx_src_rdy_n, tx_dst_rdy_n;
  int checks = 0, failures = 0;
  logic [31:0] expq [$];
  int rx_done = 0;
  bit bp_on = 1'b1;

  always #5 clk = ~clk;

  hgen_multi #(.N_UNITS(4)) dut (.*);

  task automatic send_frame(input logic [7:0] k [], input bit gaps);
    int n = k.size();
    fl_word_t wd;
    for (int w = 0; w * 8 < n; w++) begin
      while (gaps && ($urandom_range(0, 3) == 0)) begin
        rx_src_rdy_n <= 1'b1; @(posedge clk);
      end
      wd = '0;
      for (int i = 0; i < 8; i++) if (w*8 + i < n) wd.data[8*i +: 8] = k[w*8+i];
      wd.rem   = 3'((n - 1 - w*8 > 7) ? 7 : n - 1 - w*8);
      wd.sof_n = (w != 0);
      wd.sop_n = (w != 0);
      wd.eof_n = ((w+1)*8 < n);
      wd.eop_n = ((w+1)*8 < n);
      rx_word <= wd;
      rx_src_rdy_n  <= 1'b0;
      forever begin
        bit ok;
        @(negedge clk); ok = !rx_dst_rdy_n;
        @(posedge clk); if (ok) break;
      end
    end
  endtask

  // result checker
  always @(posedge clk) begin
    logic [31:0] e;
    if (!rst) tx_dst_rdy_n <= bp_on ? ($urandom_range(0, 2) == 0) : 1'b0;
    if (!rst && !tx_src_rdy_n && !tx_dst_rdy_n) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected result"); end
      else begin
        e = expq.pop_front();
        if (tx_word.data != {32'h0, e} || tx_word.rem != 3'd3 || tx_word.sof_n || tx_word.eof_n
            || tx_word.sop_n || tx_word.eop_n) begin
          failures++; $display("hash mismatch: got %h expected %h", tx_word.data, e);
        end
      end
      rx_done++;
    end
  end

  // progress: a pending result must appear within 200 cycles
  int idle = 0;
  always @(posedge clk) begin
    if (rst || expq.size() == 0 || (!tx_src_rdy_n && !tx_dst_rdy_n)) idle <= 0;
    else if (idle == 199) begin
      idle <= 0; checks++; failures++; $display("no result for 200 cycles");
    end else idle <= idle + 1;
  end

  initial begin
    logic [7:0] k [];
    int n, t0, lat;
    rx_src_rdy_n = 1'b1; rx_word = '0; tx_dst_rdy_n = 1'b1;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      n = (f < 40) ? f + 1 : $urandom_range(1, 36);
      k = new[n];
      foreach (k[i]) k[i] = 8'($urandom);
      expq.push_back(lookup2_ref(k, n, 32'h0));
      send_frame(k, 1'b1);
    end
    rx_src_rdy_n <= 1'b1;
    wait (rx_done == NFRAMES);
    // latency of an 8-byte frame with the output always ready
    bp_on = 1'b0;
    repeat (3) @(posedge clk);
    k = new[8];
    foreach (k[i]) k[i] = 8'(i * 17 + 3);
    expq.push_back(lookup2_ref(k, 8, 32'h0));
    t0 = $time;
    send_frame(k, 1'b0);
    rx_src_rdy_n <= 1'b1;
    while (tx_src_rdy_n) @(posedge clk);
    lat = ($time - t0) / 10;
    checks++;
    // word taken at edge 1, final mix at edge 2; the result is seen valid by the
    // sampling loop at edge 3
    if (lat != 3) begin failures++; $display("latency %0d, expected 3", lat); end
    wait (rx_done == NFRAMES + 1);
    repeat (2) @(posedge clk);
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
