// tb_signal_observer -- self-checking testbench of the signal observer.
//
// Observes a 73-bit vector that changes at random (often several cycles unchanged)
// under a random ce.  Checks that a record is pushed on the first DUT cycle after
// reset and on exactly those DUT cycles where the vector differs from the last
// recorded value, that each record is header {PK_OBSERVE, id, cycle} plus the value
// split into 64-bit words, least significant first, with correct delimiters, and
// that replaying the records rebuilds the vector on every DUT cycle.
module tb_signal_observer;
  import haven_pkg::*;

  localparam int W = 73;
  localparam int NW = 2;

  logic clk = 1'b0, rst = 1'b1, ce;
  logic [63:0] cycle;
  logic [W-1:0] sig;
  logic [1:0] push_n;
  fl_word_t push_words [NW+1];
  logic [31:0] records;
  int checks = 0, failures = 0, nrec = 0, ncycles = 0;

  always #5 clk = ~clk;

  signal_observer #(.W(W), .OBSERVER_ID(8'h42)) dut (.*);

  logic [W-1:0] rebuilt, history [$];
  logic [47:0]  last_cyc;

  always @(posedge clk) begin
    if (rst) cycle <= 0;
    else begin
      if (!ce && push_n != 0) begin failures++; $display("push without ce"); end
      if (ce) begin
        history.push_back(sig);
        if (push_n != 0) begin
          checks++;
          if (push_n != NW + 1 || push_words[0].data != {PK_OBSERVE, 8'h42, cycle[47:0]}
              || push_words[0].sof_n || !push_words[1].sof_n || push_words[2].eof_n || !push_words[0].eof_n) begin
            failures++; $display("record header wrong at cycle %0d: %h", cycle, push_words[0].data);
          end
          rebuilt = W'({push_words[2].data, push_words[1].data});
          nrec++;
        end
        // after replaying, the rebuilt vector must equal the current value
        checks++;
        if (rebuilt != sig) begin failures++; $display("value lost at cycle %0d", cycle); end
        ncycles++;
        cycle <= cycle + 1;
      end
    end
  end

  int expect_rec;
  logic rnd_ce;
  always @(posedge clk) begin
    rnd_ce <= ($urandom_range(0, 3) != 0);
    if (!rst && ce && $urandom_range(0, 2) == 0) sig <= {$urandom, $urandom, 9'($urandom)};
  end
  assign ce = rnd_ce && !rst;

  initial begin
    sig = '0; rebuilt = '1;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (3000) @(posedge clk);
    // expected record count: first sample plus each change between DUT cycles
    expect_rec = (history.size() != 0) ? 1 : 0;
    for (int i = 1; i < history.size(); i++) if (history[i] != history[i-1]) expect_rec++;
    checks += 2;
    if (nrec != expect_rec) begin failures++; $display("records %0d expected %0d", nrec, expect_rec); end
    if (records != 32'(nrec)) begin failures++; $display("records counter %0d", records); end
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
