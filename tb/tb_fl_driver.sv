// tb_fl_driver -- self-checking testbench of the hardware driver.
//
// A model input buffer feeds host packets (configuration, transactions with gaps,
// one header-only idle packet) to the driver; ce is toggled at random, and the
// DUT side applies random back-pressure.  Checked: the configuration pulse and
// value, the exact number of DUT cycles with SRC_RDY_N inactive before each frame
// (the gap), every delivered word with its SOF_N/EOF_N/SOP_N/EOP_N/REM, the stall
// output whenever a word is needed but the buffer is empty, and trans_sent.
module tb_fl_driver;
  import haven_pkg::*;

  localparam int NTRANS = 60;

  logic clk = 1'b0, rst = 1'b1, ce, ce_rand;
  fl_word_t in_word, dut_word;
  logic in_src_rdy_n, in_dst_rdy_n, dut_src_rdy_n, dut_dst_rdy_n;
  logic cfg_we, stall;
  logic [31:0] cfg_data, trans_sent;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fl_driver dut (.*);

  fl_word_t hq [$];          // host words
  fl_word_t expw [$];        // expected DUT words
  int       expgap [$];      // expected idle DUT cycles before each frame
  int       hp = 0;          // host words delivered to the buffer model
  bit       host_avail;
  int       idle_run = 0, frames = 0, cfgs = 0, stall_checks = 0;

  function automatic fl_word_t mk(input logic [63:0] d, input int rem, input bit sof,
                                  input bit eof, input bit sop, input bit eop);
    fl_word_t w;
    w.data = d; w.rem = 3'(rem);
    w.sof_n = !sof; w.eof_n = !eof; w.sop_n = !sop; w.eop_n = !eop;
    return w;
  endfunction

  // input buffer model: head word valid when the host "has sent" it
  // as in the core, a DUT cycle happens only when the driver does not stall
  assign ce = ce_rand && !stall && !rst;

  always_comb begin
    in_word      = (hp < hq.size()) ? hq[hp] : '0;
    in_src_rdy_n = !(hp < hq.size() && host_avail);
  end

  always @(posedge clk) begin
    if (!rst) begin
      // stall must be raised exactly when a word is needed and none is there
      if (dut.state == 2 || dut.state == 0) begin
        stall_checks++;
        if (dut.state == 2 && stall != in_src_rdy_n) begin failures++; $display("stall wrong in DATA"); end
        if (dut.state == 0 && !stall) begin failures++; $display("no stall in HDR"); end
      end
      if (!in_src_rdy_n && !in_dst_rdy_n) hp <= hp + 1;
      if (cfg_we) begin
        checks++; cfgs++;
        if (cfg_data != 32'hCAFE_0042) begin failures++; $display("cfg data %h", cfg_data); end
      end
      if (ce) begin
        if (dut_src_rdy_n) idle_run++;
        else if (!dut_dst_rdy_n) begin
          fl_word_t e;
          checks++;
          if (expw.size() == 0) begin failures++; $display("unexpected word"); end
          else begin
            e = expw.pop_front();
            if (dut_word != e) begin failures++; $display("word %h expected %h", dut_word, e); end
            if (!dut_word.sof_n) begin
              checks++;
              if (idle_run != expgap[0]) begin
                failures++; $display("frame %0d gap %0d expected %0d", frames, idle_run, expgap[0]);
              end
              void'(expgap.pop_front());
            end
            if (!dut_word.eof_n) frames++;
          end
          idle_run = 0;
        end
      end
    end
    host_avail    <= ($urandom_range(0, 2) != 0);
    ce_rand       <= ($urandom_range(0, 3) != 0);
    dut_dst_rdy_n <= ($urandom_range(0, 3) == 0);
  end

  initial begin
    int n, gap, extra;
    extra = 0;
    hq.push_back(mk({PK_CONFIG, 24'h0, 32'hCAFE_0042}, 7, 1, 1, 1, 1));
    for (int t = 0; t < NTRANS; t++) begin
      gap = ($urandom_range(0, 1) == 0) ? 0 : $urandom_range(1, 9);
      n = $urandom_range(1, 4);
      if (t == 20) begin
        // header-only packet: idles the DUT for 7 cycles, adds to the next gap
        hq.push_back(mk({PK_TRANS, 24'h0, 32'd7}, 7, 1, 1, 1, 1));
        extra = 7;
      end
      hq.push_back(mk({PK_TRANS, 24'h0, 32'(gap)}, 7, 1, 0, 1, 1));
      expgap.push_back(gap + extra);
      extra = 0;
      for (int w = 0; w < n; w++) begin
        fl_word_t hw, ew;
        hw = mk({$urandom, $urandom}, $urandom_range(0, 7), 0, w == n-1, w == 0, w == n-1);
        ew = hw;
        ew.sof_n = (w != 0);
        hq.push_back(hw);
        expw.push_back(ew);
      end
    end
    ce_rand = 1'b0; host_avail = 1'b0; dut_dst_rdy_n = 1'b1;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (hp == hq.size() && expw.size() == 0);
    repeat (3) @(posedge clk);
    checks += 3;
    if (frames != NTRANS || trans_sent != NTRANS) begin failures++; $display("frames %0d sent %0d", frames, trans_sent); end
    if (cfgs != 1) begin failures++; $display("cfg pulses %0d", cfgs); end
    if (stall_checks == 0) failures++;
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
