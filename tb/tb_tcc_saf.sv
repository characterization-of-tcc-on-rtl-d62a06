// tb_tcc_saf: self-checking test of the store address FIFO at its full depth
// (1024 pointers of 10 bits). Fills it with pseudo-random pointers, checks
// full and count, reads all pointers back in push order, then checks that
// clear empties it and that pushing resumes from the start.
module tb_tcc_saf;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0, clear = 0;
  logic [9:0] push_ptr = '0, rd_ptr;
  logic empty, full;
  logic [10:0] count;
  tcc_saf dut (.clk, .rst_n, .push, .push_ptr, .pop, .clear, .rd_ptr, .empty, .full, .count);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic [9:0] ref_q [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    check(empty && !full && count == 0, "empty after reset");
    for (int i = 0; i < 1024; i++) begin
      push = 1; push_ptr = 10'($urandom); ref_q.push_back(push_ptr); @(negedge clk);
    end
    push = 0;
    check(full && count == 1024, "full after 1024 pushes");
    push = 1; push_ptr = 10'h3FF; @(negedge clk); push = 0;
    check(count == 1024, "push when full is ignored");
    for (int i = 0; i < 1024; i++) begin
      check(rd_ptr == ref_q[i], $sformatf("pointer %0d read back in order", i));
      pop = 1; @(negedge clk); pop = 0;
    end
    check(empty, "empty after reading all");
    for (int i = 0; i < 5; i++) begin push = 1; push_ptr = 10'(i + 7); @(negedge clk); end
    push = 0;
    check(count == 5 && rd_ptr == 10'd7, "partial fill");
    clear = 1; @(negedge clk); clear = 0;
    check(empty && count == 0, "clear empties the FIFO");
    push = 1; push_ptr = 10'd99; @(negedge clk); push = 0;
    check(rd_ptr == 10'd99 && count == 1, "push after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
