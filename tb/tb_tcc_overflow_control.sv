// tb_tcc_overflow_control: self-checking test of the replacement and overflow
// decision. All 256 combinations of way state (present, speculative) are
// applied with and without a free victim-cache entry and compared with a
// reference: empty way first, then a clean way, then a move to the victim
// cache, else overflow. Also checks the capacity overflow input, the
// round-robin advance, and the "commit permission held" state.
module tb_tcc_overflow_control;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic need = 0, vcf = 0, safo = 0, fire = 0, ed = 0, rd = 0, vio = 0;
  logic [3:0] tv, spec;
  logic [1:0] kind, way;
  logic ovf, holding;
  logic [31:0] cnt;
  tcc_overflow_control dut (.clk, .rst_n, .need_alloc(need), .way_tv(tv), .way_spec(spec),
    .vc_has_free(vcf), .saf_overflow(safo), .alloc_fire(fire), .early_done(ed),
    .regular_done(rd), .violate(vio), .alloc_kind(kind), .alloc_way(way), .overflow(ovf),
    .holding(holding), .overflow_count(cnt));
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    tv = '0; spec = '0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int rr = 0; rr < 4; rr++) begin
      for (int m = 0; m < 512; m++) begin
        logic has_e, has_c; int ew, cw;
        tv = m[3:0]; spec = m[7:4] & m[3:0]; vcf = m[8]; need = 1;
        has_e = 0; has_c = 0; ew = 0; cw = 0;
        for (int k = 0; k < 4; k++) begin
          automatic int w = (rr + k) % 4;
          if (!tv[w] && !has_e) begin has_e = 1; ew = w; end
          if (tv[w] && !spec[w] && !has_c) begin has_c = 1; cw = w; end
        end
        #1;
        if (has_e)      check(kind == 0 && way == 2'(ew), "empty way chosen");
        else if (has_c) check(kind == 1 && way == 2'(cw), "clean way evicted");
        else            check(kind == 2 && way == 2'(rr), $sformatf("speculative way moved to victim cache m=%0d rr=%0d kind=%0d way=%0d", m, rr, kind, way));
        check(ovf == (!has_e && !has_c && !vcf), "associativity overflow");
      end
      @(negedge clk);
      fire = 1; @(negedge clk); fire = 0;
    end
    @(negedge clk);
    need = 0; tv = '1; spec = '1; vcf = 0; #1 check(!ovf, "no overflow without allocation");
    safo = 1; #1 check(ovf, "capacity overflow"); safo = 0;
    ed = 1; @(negedge clk); ed = 0;
    check(holding && cnt == 1, "early commit holds commit permission");
    @(negedge clk); check(holding, "held until regular commit");
    rd = 1; @(negedge clk); rd = 0;
    check(!holding, "regular commit releases");
    ed = 1; @(negedge clk); ed = 0; vio = 1; @(negedge clk); vio = 0;
    check(!holding && cnt == 2, "violation releases; overflows counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
