// tb_fl_assert_checker -- self-checking testbench of the FrameLink assertion checker.
//
// Drives a stream of FrameLink words shaped as legal multi-part frames, with one
// delimiter flipped in about one word in twelve, random handshakes and a random ce.
// A procedural reference model in the testbench tracks frame and part state, gathers
// the violated rules of each frame and predicts every report: checker number, rule
// mask, transaction number and the DUT cycle of the first violation, issued once
// per frame when it closes.  Directed cases first: a clean frame, the Fig.-style
// frame whose first word has SOF_N without SOP_N, and a source that is ready during
// reset.
module tb_fl_assert_checker;
  import haven_pkg::*;

  localparam logic [15:0] ID = 16'd170;

  logic clk = 1'b0, rst = 1'b1, ce;
  logic [63:0] cycle;
  fl_word_t word;
  logic src_rdy_n, dst_rdy_n;
  logic [1:0] push_n;
  fl_word_t push_words [2];
  logic [31:0] reports;
  int checks = 0, failures = 0, nrep = 0;

  always #5 clk = ~clk;

  fl_assert_checker #(.CHECKER_ID(ID), .CHECK_DST(1'b0)) dut (.*);

  // ---- reference model ----
  bit m_frame, m_part, m_rst;
  logic [7:0] m_acc;
  logic [63:0] m_time;
  int m_fno, m_vtx;
  logic [63:0] expq [$];

  always @(posedge clk) begin
    if (rst) begin
      m_frame = 0; m_part = 0; m_acc = 0; m_fno = 0; m_vtx = 0; m_time = 0;
      m_rst = !src_rdy_n;
      cycle <= 0;
    end else if (ce) begin
      logic [7:0] v;
      v = 0;
      if (m_rst) v[0] = 1;
      m_rst = 0;
      if (!src_rdy_n && !dst_rdy_n) begin
        bit sof, eof, sop, eop;
        sof = !word.sof_n; eof = !word.eof_n; sop = !word.sop_n; eop = !word.eop_n;
        if (sof) m_fno++;
        if (sof && !sop) v[1] = 1;
        if (eof && !eop) v[2] = 1;
        if (m_frame && !m_part && !sop) v[3] = 1;
        if (m_part && sop) v[4] = 1;
        if (m_frame == sof) v[5] = 1;
        m_frame = (m_frame || sof) && !eof;
        m_part  = (m_part || sop) && !eop;
      end
      if (m_acc == 0 && v != 0) begin m_time = cycle; m_vtx = m_fno; end
      m_acc |= v;
      if (m_acc != 0 && !m_frame) begin
        expq.push_back({PK_ASSERT, ID, m_acc, 32'(m_vtx)});
        expq.push_back(m_time);
        m_acc = 0;
      end
      cycle <= cycle + 1;
    end
    // compare pushes
    if (!rst) begin
      if (push_n != 0 && push_n != 2) begin failures++; $display("push_n %0d", push_n); end
      for (int i = 0; i < int'(push_n); i++) begin
        checks++;
        if (expq.size() == 0) begin failures++; $display("unexpected report %h", push_words[i].data); end
        else begin
          logic [63:0] e;
          e = expq.pop_front();
          if (push_words[i].data != e || push_words[i].sof_n != (i != 0) || push_words[i].eof_n != (i == 0)) begin
            failures++; $display("report word %0d: %h expected %h", i, push_words[i].data, e);
          end
        end
        if (i == 0) nrep++;
      end
    end
  end

  // ---- stimulus ----
  fl_word_t q [$];
  task automatic legal_frame(input int parts);
    fl_word_t w;
    int n;
    for (int p = 0; p < parts; p++) begin
      n = $urandom_range(1, 3);
      for (int i = 0; i < n; i++) begin
        w.data = {$urandom, $urandom}; w.rem = 3'($urandom);
        w.sof_n = !(p == 0 && i == 0);
        w.eof_n = !(p == parts-1 && i == n-1);
        w.sop_n = (i != 0);
        w.eop_n = (i != n-1);
        q.push_back(w);
      end
    end
  endtask

  logic rnd_ce, rnd_src, rnd_dst;
  always @(posedge clk) begin
    rnd_ce  <= ($urandom_range(0, 4) != 0);
    rnd_src <= ($urandom_range(0, 3) == 0);
    rnd_dst <= ($urandom_range(0, 3) == 0);
    if (!rst && ce && !src_rdy_n && !dst_rdy_n) void'(q.pop_front());
  end
  bit run_en = 1'b0;
  bit force_src = 1'b0;
  always_comb begin
    ce        = run_en && rnd_ce;
    word      = (q.size() != 0) ? q[0] : '0;
    src_rdy_n = force_src ? 1'b0 : ((q.size() == 0) || rnd_src);
    dst_rdy_n = rnd_dst;
  end

  initial begin
    fl_word_t w;
    // source ready on the last reset cycle
    repeat (2) @(posedge clk);
    force_src = 1'b1;
    @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    force_src = 1'b0;
    run_en = 1'b1;
    // clean frame, then SOF_N without SOP_N on the first word
    legal_frame(2);
    legal_frame(1);
    begin
      int first;
      first = q.size() - 1;
      while (first > 0 && q[first].sof_n) first--;
      q[first].sop_n = 1'b1;
    end
    wait (q.size() == 0);
    repeat (5) @(posedge clk);
    checks++;
    if (nrep != 2) begin failures++; $display("directed part: %0d reports, expected 2", nrep); end
    // random part
    for (int f = 0; f < 400; f++) begin
      legal_frame($urandom_range(1, 3));
      if ($urandom_range(0, 2) == 0) begin
        int j;
        j = q.size() - $urandom_range(1, 3);
        if (j < 0) j = 0;
        case ($urandom_range(0, 3))
          0: q[j].sof_n = !q[j].sof_n;
          1: q[j].eof_n = !q[j].eof_n;
          2: q[j].sop_n = !q[j].sop_n;
          default: q[j].eop_n = !q[j].eop_n;
        endcase
      end
    end
    // close whatever is open with a legal frame end so the last report comes out
    w = '1; w.eof_n = 0; w.eop_n = 0;
    q.push_back(w);
    wait (q.size() == 0);
    repeat (5) @(posedge clk);
    checks += 2;
    if (expq.size() != 0) begin failures++; $display("%0d report words missing", expq.size()); end
    if (reports != 32'(nrep)) begin failures++; $display("reports %0d vs %0d", reports, nrep); end
    $display("reports seen: %0d", nrep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
