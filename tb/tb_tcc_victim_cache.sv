// tb_tcc_victim_cache: self-checking test of the 8-entry fully associative
// victim cache: fills every entry, checks lookup and the free-entry search
// (an entry holding no speculative state counts as free), the snoop valid
// write-back, per-entry SM clear, and the commit and violation flash
// operations (a violation drops lines with SM bits).
module tb_tcc_victim_cache;
  import tcc_pkg::*;
  localparam int E = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  laddr_t lk; logic lk_hit, has_free; logic [2:0] lk_idx, free_idx;
  logic wr_en = 0; logic [2:0] wr_idx = 0; cline_t wr_line;
  logic [E-1:0] snp_we = 0; wmask_t [E-1:0] snp_v;
  logic clr = 0; logic [2:0] clr_idx = 0; logic fc = 0, fv = 0;
  cline_t [E-1:0] ent;
  tcc_victim_cache dut (.clk, .rst_n, .lk_laddr(lk), .lk_hit, .lk_idx, .has_free, .free_idx,
    .wr_en, .wr_idx, .wr_line, .snp_we, .snp_v, .clr_sm_en(clr), .clr_sm_idx(clr_idx),
    .flash_commit(fc), .flash_violate(fv), .entries(ent));
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    snp_v = '0; wr_line = '0; lk = '0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    check(has_free && !lk_hit, "empty after reset");
    for (int i = 0; i < E; i++) begin
      wr_line = '0; wr_line.tv = 1; wr_line.laddr = 27'(100 + i); wr_line.v = 8'hFF;
      wr_line.sr = (i % 2 == 0) ? 8'h01 : 8'h00; wr_line.sm = (i % 2 == 1) ? 8'h10 : 8'h00;
      wr_line.data = {8{32'(i)}};
      wr_en = 1; wr_idx = 3'(i); @(negedge clk);
    end
    wr_en = 0;
    check(!has_free, "no free entry when all hold speculative lines");
    for (int i = 0; i < E; i++) begin
      lk = 27'(100 + i); #1;
      check(lk_hit && lk_idx == 3'(i) && ent[lk_idx].data[0] == 32'(i), $sformatf("lookup %0d", i));
    end
    lk = 27'd7; #1 check(!lk_hit, "miss on absent line");
    @(negedge clk);
    snp_we = 8'h04; snp_v[2] = 8'h0F; @(negedge clk); snp_we = 0;
    check(ent[2].v == 8'h0F, "snoop valid write-back");
    clr = 1; clr_idx = 3'd1; @(negedge clk); clr = 0;
    check(ent[1].sm == 8'h00, "per-entry SM clear");
    #1 check(has_free && free_idx == 3'd1, "entry without speculative state is free");
    fv = 1; @(negedge clk); fv = 0;
    check(ent[3].tv == 0 && ent[5].tv == 0 && ent[7].tv == 0, "violation drops lines with SM");
    check(ent[0].tv == 1 && ent[0].sr == 0, "violation keeps read-only lines, clears SR");
    wr_line.tv = 1; wr_line.laddr = 27'd55; wr_line.sr = 8'hF0; wr_line.sm = 8'h0F;
    wr_en = 1; wr_idx = 3'd6; @(negedge clk); wr_en = 0;
    fc = 1; @(negedge clk); fc = 0;
    check(ent[6].tv == 1 && ent[6].sr == 0 && ent[6].sm == 0, "commit flash clears SR/SM, keeps line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
