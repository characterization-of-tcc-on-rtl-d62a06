// tb_tcc_l1_dcache: self-checking test of one transactional L1 data cache
// (processor 0, default 32-KB 4-way organization) with the buses modelled
// here: the arbiter grants a request 2 cycles after it is raised and keeps
// the grant until the last beat; refill requests are answered 10 cycles later
// from a memory model; commits of other processors are injected as snoops.
// Checked:
//   * load miss: one refill request, correct data; then a hit in 1 cycle;
//   * stores allocate without a refill; read-own-write; one pointer per line;
//   * commit: one packed beat group per modified line, END beat, SR/SM clear;
//   * snoop of a speculatively read word: violation, modified lines dropped;
//   * snoop of an unread word: no violation, the word is invalidated and
//     refetched; snoop of a locally modified word: kept (renaming);
//   * 5 lines in one set: a speculative line moves to the victim cache and
//     is swapped back on access; 13 lines: overflow, early commit with hold;
//   * a violation while waiting for the bus abandons the commit.
module tb_tcc_l1_dcache;
  import tcc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req = 0, we = 0, done, cmt = 0, cmt_done, viol;
  logic [31:0] addr = 0; word_t wdata = 0, rdata;
  logic breq, bcommit, bhold, gnt = 0;
  cbus_beat_t bbeat, cb_in, snp;
  rbus_beat_t rb;
  logic [31:0] n_miss, n_viol, n_ovf, n_move, n_swap, n_com, n_ren;
  tcc_l1_dcache dut (.clk, .rst_n, .cpu_req(req), .cpu_we(we), .cpu_addr(addr), .cpu_wdata(wdata),
    .cpu_done(done), .cpu_rdata(rdata), .cpu_commit(cmt), .cpu_commit_done(cmt_done),
    .cpu_violation(viol), .bus_req(breq), .bus_commit(bcommit), .bus_hold(bhold), .bus_gnt(gnt),
    .bus_beat(bbeat), .cb_in(cb_in), .rb_in(rb), .n_load_miss(n_miss), .n_violations(n_viol),
    .n_overflows(n_ovf), .n_vc_moves(n_move), .n_vc_swaps(n_swap), .n_commits(n_com), .n_renamed(n_ren));

  int checks = 0, failures = 0, cyc = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic word_t memval(laddr_t a, int w);
    return {a[23:0], 8'(w)};
  endfunction

  // ---- bus model
  cbus_beat_t sent [$];
  int wait_c = 0, reads = 0;
  laddr_t rq_a [$]; int rq_t [$];
  int holds_seen = 0;
  always @(posedge clk) begin
    cyc++;
    if (gnt && bbeat.valid) begin
      sent.push_back(bbeat);
      if (bbeat.kind == CB_READ) begin rq_a.push_back(bbeat.laddr); rq_t.push_back(cyc + 10); reads++; end
      if (bhold && bbeat.last) holds_seen++;
    end
    if (gnt && (!breq || (bbeat.valid && bbeat.last))) begin gnt <= 0; wait_c <= 0; end
    else if (!gnt && breq) begin
      wait_c <= wait_c + 1;
      if (wait_c == 1) gnt <= 1;
    end else if (!breq) wait_c <= 0;
  end
  int rb_phase = 0;
  always @(posedge clk) begin
    rb <= '0;
    if (rq_a.size() > 0 && cyc >= rq_t[0]) begin
      rb.valid <= 1; rb.dst <= 0; rb.laddr <= rq_a[0]; rb.beat <= 1'(rb_phase);
      for (int w = 0; w < 4; w++) rb.data[w] <= memval(rq_a[0], rb_phase * 4 + w);
      if (rb_phase == 1) begin void'(rq_a.pop_front()); void'(rq_t.pop_front()); rb_phase <= 0; end
      else rb_phase <= 1;
    end
  end
  assign cb_in = snp;

  // ---- processor primitives
  int lat;
  task automatic access(bit w, logic [31:0] a, word_t d, output word_t r, output bit v);
    req = 1; we = w; addr = a; wdata = d; v = 0; lat = 0;
    forever begin
      #1;
      if (viol) begin v = 1; req = 0; @(negedge clk); return; end
      if (done) begin r = rdata; @(negedge clk); req = 0; return; end
      @(negedge clk); lat++;
    end
  endtask
  task automatic do_commit(output bit v);
    cmt = 1; v = 0;
    forever begin
      #1;
      if (viol) begin v = 1; cmt = 0; @(negedge clk); return; end
      if (cmt_done) begin @(negedge clk); cmt = 0; return; end
      @(negedge clk);
    end
  endtask
  task automatic snoop(laddr_t a, wmask_t m);
    snp = '0; snp.valid = 1; snp.kind = CB_COMMIT; snp.src = 4'd5; snp.first = 1; snp.laddr = a; snp.mask = m;
    @(negedge clk); snp = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam logic [31:0] A = 32'h0000_1000, B = 32'h0000_2000, C = 32'h0003_0000;
  initial begin
    word_t r; bit v; int n0;
    snp = '0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    // load miss then hit
    access(0, A + 8, 0, r, v);
    check(!v && r == memval(A >> 5, 2) && reads == 1, "load miss returns refill data");
    access(0, A + 12, 0, r, v);
    check(r == memval(A >> 5, 3) && lat == 0 && reads == 1, "load hit in one cycle, no new request");
    // stores: no refill, read own write
    access(1, B, 32'h1111, r, v); access(1, B + 4, 32'h2222, r, v); access(1, B + 28, 32'h3333, r, v);
    check(reads == 1, "stores allocate without refill");
    access(0, B + 4, 0, r, v);
    check(r == 32'h2222 && lat == 0, "load returns own speculative store");
    check(dut.u_saf.count == 1, "one pointer for the modified line");
    // commit
    sent.delete();
    do_commit(v);
    check(!v && sent.size() == 2, $sformatf("commit sends 1 data beat + END, got %0d", sent.size()));
    if (sent.size() == 2) begin
      check(sent[0].kind == CB_COMMIT && sent[0].laddr == (B >> 5) && sent[0].mask == 8'b1000_0011 &&
            sent[0].data == {32'h0, 32'h3333, 32'h2222, 32'h1111}, "committed line address, mask, packed words");
      check(sent[1].kind == CB_END && sent[1].last, "END beat");
    end
    check(dut.u_saf.count == 0 && n_com == 1, "FIFO emptied, commit counted");
    // violation: read word 2 of A, then a foreign commit of it
    access(0, A + 8, 0, r, v);            // sets SR
    access(1, B + 8, 32'h4444, r, v);     // speculative store
    snoop(A >> 5, 8'b0000_0100);
    #1 check(viol, "foreign commit of a read word violates");
    @(negedge clk);
    check(n_viol == 1 && dut.u_saf.count == 0, "violation counted, FIFO emptied");
    n0 = reads;
    access(0, B + 8, 0, r, v);
    check(reads == n0 + 1 && r == memval(B >> 5, 2), "speculatively modified line was dropped and is refetched");
    // unread word: invalidated, no violation, refetched
    access(0, A + 12, 0, r, v);          // A line was refilled? (word 3 valid)
    n0 = reads;
    snoop(A >> 5, 8'b0010_0000);
    #1 check(!viol, "foreign commit of an unread word does not violate");
    access(0, A + 20, 0, r, v);
    check(reads == n0 + 1 && r == memval(A >> 5, 5), "invalidated word is refetched");
    // renaming
    access(1, A + 24, 32'h7777, r, v);
    snoop(A >> 5, 8'b0100_0000);
    #1 check(!viol, "foreign commit of a locally modified word does not violate");
    access(0, A + 24, 0, r, v);
    check(r == 32'h7777 && n_ren > 0, "locally modified word kept (renamed)");
    do_commit(v);
    // victim cache: 5 speculative lines in one set, then read them back
    for (int l = 0; l < 5; l++) access(1, C + 32'(l * 8192), 32'(100 + l), r, v);
    check(n_move == 1, "fifth line in a set moves a speculative line to the victim cache");
    for (int l = 0; l < 5; l++) begin
      access(0, C + 32'(l * 8192), 0, r, v);
      check(r == 32'(100 + l), "lines in the set and in the victim cache read back");
    end
    check(n_swap > 0, "victim cache line swapped back on access");
    // overflow: 13 lines in one set
    sent.delete();
    for (int l = 5; l < 13; l++) access(1, C + 32'(l * 8192), 32'(100 + l), r, v);
    check(n_ovf == 1 && holds_seen == 1, "13th line overflows: early commit with hold");
    n0 = 0;
    foreach (sent[i]) if (sent[i].kind == CB_COMMIT) n0++;
    check(n0 == 12, $sformatf("early commit sends the 12 buffered lines, got %0d", n0));
    do_commit(v);
    check(!v && n_com == 3, "regular commit after overflow");
    // violation while waiting for the bus
    access(0, A + 12, 0, r, v);
    access(1, B, 32'h9, r, v);
    fork
      begin do_commit(v); end
      begin #2 snp = '0; snp.valid = 1; snp.kind = CB_COMMIT; snp.src = 4'd5; snp.first = 1;
            snp.laddr = A >> 5; snp.mask = 8'b0000_1000; @(negedge clk); snp = '0; end
    join
    check(v && n_com == 3, "violation while waiting for the bus abandons the commit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
