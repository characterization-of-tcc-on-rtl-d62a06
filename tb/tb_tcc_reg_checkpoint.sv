// tb_tcc_reg_checkpoint: self-checking test of the register checkpoint:
// a copy is taken at transaction start, survives register changes, is handed
// back on restore, and restores are counted.
module tb_tcc_reg_checkpoint;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic take = 0, restore = 0, restore_valid;
  logic [31:0][31:0] regs, ckpt, snap;
  logic [31:0] restores;
  tcc_reg_checkpoint dut (.clk, .rst_n, .take, .regs_in(regs), .restore, .restore_valid, .ckpt, .restores);
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
    regs = '0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int t = 0; t < 5; t++) begin
      for (int r = 0; r < 32; r++) regs[r] = $urandom;
      snap = regs; take = 1; @(negedge clk); take = 0;
      for (int r = 0; r < 32; r++) regs[r] = $urandom;
      repeat (3) @(negedge clk);
      restore = 1; #1;
      check(restore_valid && ckpt == snap, "restore returns the copy taken at transaction start");
      @(negedge clk); restore = 0;
    end
    check(restores == 5, "restores counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
