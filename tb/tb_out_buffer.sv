// tb_out_buffer -- self-checking testbench of the output transaction buffer.
//
// Pushes 0..PUSH_MAX words per clock (only when `stall` is low, as the core does)
// while the reader applies random back-pressure, and checks that every word comes
// out once and in order, that `stall` rises exactly when fewer than PUSH_MAX places
// would be free after this clock's read, and that the buffer then really fills up to
// DEPTH words without losing any.
module tb_out_buffer;
  import haven_pkg::*;

  localparam int DEPTH = 8;
  localparam int PM = 3;

  logic clk = 1'b0, rst = 1'b1;
  logic [1:0] push_n;
  fl_word_t push_words [PM];
  logic stall;
  fl_word_t tx_word;
  logic tx_src_rdy_n, tx_dst_rdy_n;
  int checks = 0, failures = 0, in_cnt = 0, out_cnt = 0, level = 0, stalls = 0, max_level = 0;
  fl_word_t expq [$];
  bit reader_slow = 1'b0;
  bit force_idle = 1'b0;

  always #5 clk = ~clk;

  out_buffer #(.DEPTH(DEPTH), .PUSH_MAX(PM)) dut (.*);

  always @(posedge clk) begin
    if (!rst) begin
      automatic int rd = (!tx_src_rdy_n && !tx_dst_rdy_n) ? 1 : 0;
      checks++;
      if (stall != ((DEPTH - level + rd) < PM)) begin
        failures++; $display("stall %0d with level %0d read %0d", stall, level, rd);
      end
      if (tx_src_rdy_n != (level == 0)) begin failures++; $display("tx_src_rdy_n wrong"); end
      if (rd) begin
        checks++;
        if (expq.size() == 0 || tx_word != expq[0]) begin failures++; $display("word %0d wrong", out_cnt); end
        if (expq.size() != 0) void'(expq.pop_front());
        out_cnt++;
      end
      for (int i = 0; i < int'(push_n); i++) expq.push_back(push_words[i]);
      level = level + int'(push_n) - rd;
      if (level > max_level) max_level = level;
      if (stall) stalls++;
      in_cnt += int'(push_n);
    end
    tx_dst_rdy_n <= reader_slow ? ($urandom_range(0, 5) != 0) : ($urandom_range(0, 3) == 0);
  end

  // pusher: a new random burst after each clock, suppressed while stalled
  always @(negedge clk) begin
    if (rst || stall || force_idle) push_n = 0;
    else push_n = 2'($urandom_range(0, PM));
    for (int i = 0; i < PM; i++) push_words[i] = fl_word_t'({$urandom, $urandom, $urandom});
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (1500) @(posedge clk);
    reader_slow = 1'b1;
    repeat (1500) @(posedge clk);
    reader_slow = 1'b0;
    @(negedge clk);
    force_idle = 1'b1;
    repeat (100) @(posedge clk);
    checks += 3;
    if (expq.size() != 0 || out_cnt != in_cnt) begin failures++; $display("in %0d out %0d", in_cnt, out_cnt); end
    if (stalls == 0) begin failures++; $display("never stalled"); end
    if (max_level < DEPTH - PM + 1) begin failures++; $display("max level %0d", max_level); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
