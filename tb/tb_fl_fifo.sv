// tb_fl_fifo -- self-checking testbench of the FrameLink FIFO.
//
// Pushes random FrameLink words (random data, REM and delimiters) with random source
// gaps and random destination back-pressure, and checks that every word comes out
// unchanged and in order, that the buffer takes DEPTH words (each offered for at most
// 20 cycles) and then reports full when nothing is read, and that a word written to
// an empty buffer appears one cycle later.  Watchdog: 50,000 cycles.
module tb_fl_fifo;
  import haven_pkg::*;

  localparam int DEPTH = 8;
  localparam int NWORDS = 2000;

  logic clk = 1'b0, rst = 1'b1;
  fl_word_t rx_word, tx_word;
  logic rx_src_rdy_n, rx_dst_rdy_n, tx_src_rdy_n, tx_dst_rdy_n;
  logic [$clog2(DEPTH+1)-1:0] level;
  int checks = 0, failures = 0, got = 0, refused = 0;
  fl_word_t expq [$];
  bit rd_en = 1'b0;

  always #5 clk = ~clk;

  fl_fifo #(.DEPTH(DEPTH)) dut (.*);

  always @(posedge clk) begin
    tx_dst_rdy_n <= rd_en ? ($urandom_range(0, 2) == 0) : 1'b1;
    if (!rst && !tx_src_rdy_n && !tx_dst_rdy_n) begin
      checks++; got++;
      if (expq.size() == 0 || tx_word != expq[0]) begin
        failures++; $display("word mismatch at %0d", got);
      end
      if (expq.size() != 0) void'(expq.pop_front());
    end
  end

  task automatic put(input fl_word_t w);
    rx_word <= w; rx_src_rdy_n <= 1'b0;
    expq.push_back(w);
    forever begin
      bit ok;
      @(negedge clk); ok = !rx_dst_rdy_n;
      @(posedge clk); if (ok) break;
    end
  endtask

  // offer one word for at most `limit` cycles; returns whether it was taken
  task automatic put_bounded(input fl_word_t w, input int limit, output bit taken);
    rx_word <= w; rx_src_rdy_n <= 1'b0;
    taken = 1'b0;
    for (int c = 0; c < limit && !taken; c++) begin
      @(negedge clk); taken = !rx_dst_rdy_n;
      @(posedge clk);
    end
    if (taken) expq.push_back(w);
  endtask

  initial begin
    fl_word_t w;
    bit taken;
    rx_src_rdy_n = 1'b1; rx_word = '0; tx_dst_rdy_n = 1'b1;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // fill with nothing read: full after DEPTH words
    for (int i = 0; i < DEPTH; i++) begin
      w = fl_word_t'({$urandom, $urandom, $urandom});
      put_bounded(w, 20, taken);
      checks++;
      if (!taken) begin failures++; refused++; $display("word %0d of %0d refused while filling", i + 1, DEPTH); end
    end
    rx_src_rdy_n <= 1'b1;
    @(negedge clk);
    checks++;
    if (!rx_dst_rdy_n || level != DEPTH) begin failures++; $display("not full after DEPTH words"); end
    rd_en = 1'b1;
    for (int i = 0; i < NWORDS; i++) begin
      w = fl_word_t'({$urandom, $urandom, $urandom});
      if ($urandom_range(0, 3) == 0) begin rx_src_rdy_n <= 1'b1; @(posedge clk); end
      put(w);
    end
    rx_src_rdy_n <= 1'b1;
    wait (expq.size() == 0);
    // fall-through latency: write into the empty buffer, visible after one edge
    rd_en = 1'b0;
    repeat (3) @(posedge clk);
    put(fl_word_t'(71'h5A5A));
    rx_src_rdy_n <= 1'b1;
    @(negedge clk);
    checks++;
    if (tx_src_rdy_n || tx_word != fl_word_t'(71'h5A5A)) begin failures++; $display("latency wrong"); end
    rd_en = 1'b1;
    wait (expq.size() == 0);
    checks++;
    if (got != NWORDS + DEPTH + 1 - refused) begin failures++; $display("count %0d", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
