// tb_tcc_l2_cache: self-checking test of the shared L2 at 8 MB.
// Commits (lines with sparse and full SM masks, one and two beats) are driven
// on its commit-bus input and must be written word by word; refill requests
// must be answered with the two beats of the line, addressed to the
// requester, 6 cycles after the request reaches the L2 (later only while the
// reply of an earlier request still occupies the refill bus) (5-cycle array access
// plus the reply queue; with 1 + 3 arbitration + 3 + 3 bus transfer cycles
// this makes the 16-cycle hit time). Back-to-back requests are answered in
// order, and a request after a commit sees the committed words.
module tb_tcc_l2_cache;
  import tcc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cbus_beat_t cb; rbus_beat_t rb;
  logic [31:0] reads, ww;
  tcc_l2_cache dut (.clk, .rst_n, .cb, .rb_out(rb), .reads, .words_written(ww));
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  line_t ref_m [laddr_t];
  task automatic commit_line(laddr_t a, wmask_t m, line_t d);
    int nb = commit_beats(m);
    for (int b = 0; b < nb; b++) begin
      cb = '0; cb.valid = 1; cb.kind = CB_COMMIT; cb.src = 4'd1; cb.first = (b == 0);
      cb.beat = 2'(b); cb.laddr = a; cb.mask = m;
      for (int w = 0; w < 8; w++)
        if (m[w] && rank_below(m, w) / 4 == b) cb.data[rank_below(m, w) % 4] = d[w];
      @(negedge clk);
    end
    cb = '0;
    for (int w = 0; w < 8; w++) if (m[w]) ref_m[a][w] = d[w];
  endtask
  task automatic read_req(int src, laddr_t a);
    cb = '0; cb.valid = 1; cb.kind = CB_READ; cb.src = 4'(src); cb.first = 1; cb.last = 1; cb.laddr = a;
    @(negedge clk); cb = '0;
  endtask
  int t_req [$]; laddr_t a_req [$]; int s_req [$];
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // reply checker
  int replies = 0, last_t = -100;
  always @(negedge clk) if (rst_n && rb.valid) begin
    if (a_req.size() == 0) check(0, "unexpected reply");
    else begin
      check(rb.dst == 4'(s_req[0]) && rb.laddr == a_req[0], "reply addressed to requester");
      for (int w = 0; w < 4; w++)
        check(rb.data[w] == ref_m[a_req[0]][int'(rb.beat) * 4 + w], "reply data");
      if (!rb.beat) begin
        automatic int exp_t = (t_req[0] + 6 > last_t + 1) ? t_req[0] + 6 : last_t + 1;
        check(cyc == exp_t, $sformatf("reply after %0d cycles, expected %0d", cyc - t_req[0], exp_t - t_req[0]));
      end
      if (rb.beat) begin
        last_t = cyc; void'(a_req.pop_front()); void'(s_req.pop_front()); void'(t_req.pop_front()); replies++; end
    end
  end
  initial begin
    line_t d;
    cb = '0;
    for (int a = 0; a < 8; a++) begin
      dut.mem[a] = '0; ref_m[27'(a)] = '0;
      dut.mem[a + 200000] = '0; ref_m[27'(a + 200000)] = '0;
    end
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      for (int w = 0; w < 8; w++) d[w] = $urandom;
      commit_line(27'(i), (i == 3) ? 8'hFF : 8'($urandom), d);
    end
    for (int w = 0; w < 8; w++) d[w] = $urandom;
    commit_line(27'(200001), 8'b0101_1010, d);
    for (int i = 0; i < 8; i++) begin
      t_req.push_back(cyc); a_req.push_back(27'(i)); s_req.push_back(i % 8);
      read_req(i % 8, 27'(i));
    end
    t_req.push_back(cyc); a_req.push_back(27'(200001)); s_req.push_back(2);
    read_req(2, 27'(200001));
    repeat (40) @(negedge clk);
    check(replies == 9 && reads == 9, "all requests answered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
