// tb_dut_clock_ctrl -- self-checking testbench of the DUT clock gate.
//
// Raises random stall requests (also changing them in the middle of the low clock
// phase) and checks that ce is high exactly when no request is raised and reset is
// low, that a counter clocked by dut_clk advances on exactly those clocks (plus the
// reset clocks, when the DUT clock runs freely), that dut_clk is never high while clk
// is low (no glitches), and that the cycle output counts the ce clocks.
module tb_dut_clock_ctrl;

  localparam int N = 4;

  logic clk = 1'b0, rst = 1'b1;
  logic [N-1:0] stall;
  logic ce, dut_clk;
  logic [63:0] cycle;
  int checks = 0, failures = 0, exp_edges = 0, ce_cnt = 0, glitches = 0;
  int gated_edges = 0;

  always #5 clk = ~clk;

  dut_clock_ctrl #(.N_STALL(N)) dut (.*);

  always @(posedge dut_clk) gated_edges++;
  always @(posedge dut_clk or negedge dut_clk) if (!clk && dut_clk) glitches++;

  always @(posedge clk) begin
    checks++;
    if (ce != (!rst && stall == '0)) begin failures++; $display("ce wrong"); end
    if (ce || rst) exp_edges++;
    if (ce) ce_cnt++;
  end

  // stall changes shortly after the rising edge and again inside the low phase
  always @(posedge clk) begin
    #1 stall = ($urandom_range(0, 2) == 0) ? N'($urandom) : '0;
  end
  always @(negedge clk) begin
    #2 if ($urandom_range(0, 3) == 0) stall = N'($urandom);
  end

  initial begin
    stall = '0;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    repeat (2000) @(posedge clk);
    #3;
    checks += 3;
    if (gated_edges != exp_edges) begin failures++; $display("gated edges %0d expected %0d", gated_edges, exp_edges); end
    if (glitches != 0) begin failures++; $display("%0d glitches", glitches); end
    if (cycle != 64'(ce_cnt)) begin failures++; $display("cycle %0d expected %0d", cycle, ce_cnt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
