// tb_tcc_commit_control: self-checking test of the commit engine.
// The store address FIFO, the L1 lines and the victim cache are modelled
// here. The FIFO holds pointers to a line with 4 modified words (one beat),
// a fully modified line (two beats), a repeated pointer and a pointer to a
// line without SM bits; one victim-cache entry holds a modified line. The
// test checks every beat (address, mask, first flag, words packed in order),
// the END beat, the SM clears, the cycle count of the commit
// (1 cycle per pointer + beats, 1 to see the FIFO empty, 1 per victim entry
// + beats, 1 for END), abort on a violation while waiting for the bus, and
// the hold flag of an early commit.
module tb_tcc_commit_control;
  import tcc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, early = 0, viol = 0, busy, breq, bhold, grant = 0;
  cbus_beat_t beat;
  logic saf_empty, saf_pop, clr_sm, vc_clr, flash, done, edone;
  logic [9:0] saf_ptr, lptr;
  logic [2:0] vidx;
  cline_t line;
  cline_t lines [16];
  cline_t [7:0] vcl;
  logic [31:0] lsent, wsent;
  logic [9:0] saf_q [$];
  tcc_commit_control dut (.clk, .rst_n, .start, .early, .violate(viol), .busy, .bus_req(breq),
    .bus_hold(bhold), .grant, .beat, .saf_empty, .saf_ptr, .saf_pop, .line_ptr(lptr), .line,
    .line_clr_sm(clr_sm), .vc_lines(vcl), .vc_clr_sm(vc_clr), .vc_idx(vidx), .flash_commit(flash),
    .done, .early_done(edone), .lines_sent(lsent), .words_sent(wsent));
  assign saf_empty = (saf_q.size() == 0);
  assign saf_ptr   = saf_empty ? '0 : saf_q[0];
  assign line      = lines[lptr[3:0]];
  always @(posedge clk) begin
    if (saf_pop) void'(saf_q.pop_front());
    if (clr_sm) lines[lptr[3:0]].sm <= '0;
    if (vc_clr) vcl[vidx].sm <= '0;
  end
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  cbus_beat_t got [$];
  int active = 0;
  initial begin
    for (int i = 0; i < 16; i++) lines[i] = '0;
    vcl = '0;
    lines[1].tv = 1; lines[1].laddr = 27'h111; lines[1].sm = 8'b1011_0001;
    lines[2].tv = 1; lines[2].laddr = 27'h222; lines[2].sm = 8'hFF;
    lines[3].tv = 1; lines[3].laddr = 27'h333; lines[3].sm = 8'h00;
    for (int i = 0; i < 16; i++) for (int w = 0; w < 8; w++) lines[i].data[w] = 32'(i * 16 + w);
    vcl[5].tv = 1; vcl[5].laddr = 27'h555; vcl[5].sm = 8'h40; vcl[5].data[6] = 32'hCAFE;
    saf_q = '{10'd1, 10'd2, 10'd1, 10'd3};
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    // abort on violation while waiting for the bus
    start = 1; @(negedge clk); start = 0;
    check(breq && !bhold, "requests the bus");
    viol = 1; @(negedge clk); viol = 0;
    check(!busy && !breq, "violation while waiting abandons the commit");
    // regular commit
    start = 1; @(negedge clk); start = 0;
    repeat (3) @(negedge clk);
    grant = 1;
    while (!done) begin
      #1 if (beat.valid) got.push_back(beat);
      if (grant && breq) active++;
      @(negedge clk);
      #1;
    end
    @(negedge clk); grant = 0;
    check(got.size() == 5, $sformatf("5 beats sent, got %0d", got.size()));
    if (got.size() == 5) begin
      check(got[0].kind == CB_COMMIT && got[0].first && got[0].laddr == 27'h111 && got[0].mask == 8'b1011_0001 &&
            got[0].data == {32'h17, 32'h15, 32'h14, 32'h10}, "line with 4 modified words: one packed beat");
      check(got[1].first && !got[2].first && got[1].laddr == 27'h222 && got[2].laddr == 27'h222 &&
            got[1].data == {32'h23, 32'h22, 32'h21, 32'h20} && got[2].data == {32'h27, 32'h26, 32'h25, 32'h24},
            "fully modified line: two beats in word order");
      check(got[3].laddr == 27'h555 && got[3].mask == 8'h40 && got[3].data[0] == 32'hCAFE, "victim cache line sent");
      check(got[4].kind == CB_END && got[4].last, "END beat closes the tenure");
    end
    check(active == 4 + 3 + 1 + 8 + 1 + 1, $sformatf("commit takes %0d bus cycles, expected 18", active));
    check(lines[1].sm == 0 && lines[2].sm == 0 && vcl[5].sm == 0, "SM cleared once sent");
    check(lsent == 3 && wsent == 13, "lines and words counted");
    check(saf_q.size() == 0, "FIFO walked to the end");
    // early commit: hold flag and early_done
    early = 1; @(negedge clk); early = 0;
    check(bhold, "early commit asks to keep commit permission");
    grant = 1;
    begin
      int n = 0;
      while (!edone && n < 50) begin @(negedge clk); #1; n++; end
      check(edone && !done, "early commit ends with early_done");
    end
    @(negedge clk); grant = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
