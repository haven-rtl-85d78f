// dut_clock_ctrl -- clock of the DUT's own clock domain and the DUT cycle counter.
//
// The DUT gets a gated copy of the core clock.  A DUT cycle happens only on core
// clocks where no stall request is raised: the driver has the input word it needs
// and every output buffer can take what the cycle may produce.  So the DUT sees the
// same sequence of cycles however fast or slow the host link is.  `ce` marks those
// core clocks for the logic that runs beside the DUT (driver, monitor, checkers,
// observers), and `cycle` counts them: it is the DUT time used in reports.
// During reset the DUT clock runs freely so that a synchronously reset DUT is reset.
//
// The gate is the usual latch-and-AND cell: the enable is captured while the clock
// is low, so the gated clock never has a glitch.  The latch (a deliberate circuit
// element, not an inference error) is reported by lint tools as such.  On an FPGA it
// would map to a global clock buffer with enable.
// Placing the DUT in its own clock domain and enabling the clock according to the
// buffers follows the source design; the stall vector and counter are this design's.
module dut_clock_ctrl #(
  parameter int unsigned N_STALL = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [N_STALL-1:0] stall,
  output logic               ce,
  output logic               dut_clk,
  output logic [63:0]        cycle
);
  logic en, en_lat;

  assign ce = !rst && (stall == '0);
  assign en = ce || rst;

  always_latch begin
    if (!clk) en_lat = en;
  end

  assign dut_clk = clk & en_lat;

  always_ff @(posedge clk) begin
    if (rst)     cycle <= '0;
    else if (ce) cycle <= cycle + 64'd1;
  end

endmodule
