// tb_tcc_commit_arbiter: self-checking test of the commit arbiter.
// Checks the arbitration latency (grant 1 + 3 cycles after a request on an
// idle bus), that a grant lasts until the last beat and is one-hot,
// round-robin fairness among simultaneous requesters, withdrawal of a
// request, and the commit permission kept after an early (hold) commit:
// other processors' commits wait while refill requests still pass, until the
// holder's regular commit.
module tb_tcc_commit_arbiter;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req = 0, commit = 0, hold = 0, gnt;
  logic last = 0, th;
  logic [2:0] towner;
  logic [31:0] ten, busy;
  tcc_commit_arbiter dut (.clk, .rst_n, .req, .commit, .hold, .last, .gnt, .token_held(th),
    .token_owner(towner), .tenures(ten), .busy_cycles(busy));
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  // wait for a grant; return the winner and the cycles waited
  task automatic wait_gnt(output int who, output int cyc);
    cyc = 0;
    while (gnt == 0 && cyc < 100) begin @(negedge clk); cyc++; end
    who = -1;
    for (int i = 0; i < N; i++) if (gnt[i]) who = i;
  endtask
  task automatic finish_tenure(int who, int beats);
    repeat (beats - 1) @(negedge clk);
    last = 1; @(negedge clk); last = 0; req[who] = 0; commit[who] = 0; hold[who] = 0;
  endtask
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int who, cyc; int order[$];
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    req[3] = 1;
    wait_gnt(who, cyc);
    check(who == 3 && cyc == 4, $sformatf("grant after %0d cycles, expected 1 + 3", cyc));
    repeat (5) begin @(negedge clk); check(gnt == 8'h08, "grant held until last beat"); end
    finish_tenure(3, 1);
    check(gnt == 0, "released after last beat");
    // all request: round robin order
    req = '1;
    for (int k = 0; k < N; k++) begin
      wait_gnt(who, cyc);
      order.push_back(who);
      check($onehot(gnt), "one-hot grant");
      finish_tenure(who, 2);
    end
    for (int k = 0; k < N; k++) check(order[k] == (4 + k) % N, $sformatf("round robin %0d", k));
    // withdrawal while granted
    req[1] = 1; wait_gnt(who, cyc); req[1] = 0; @(negedge clk);
    check(gnt == 0, "grant withdrawn when request drops");
    // early commit by 2 with hold
    req[2] = 1; commit[2] = 1; hold[2] = 1;
    wait_gnt(who, cyc); check(who == 2, "early commit granted");
    finish_tenure(2, 3);
    check(th && towner == 2, "commit permission kept after early commit");
    req[5] = 1; commit[5] = 1;
    req[6] = 1;
    wait_gnt(who, cyc);
    check(who == 6, "refill request passes while permission held");
    finish_tenure(6, 1);
    repeat (10) @(negedge clk);
    check(gnt == 0, "other commit waits while permission held");
    req[2] = 1; commit[2] = 1;
    wait_gnt(who, cyc); check(who == 2, "holder's regular commit granted");
    finish_tenure(2, 2);
    check(!th, "permission released by regular commit");
    wait_gnt(who, cyc); check(who == 5, "waiting commit granted afterwards");
    finish_tenure(5, 1);
    check(ten == 14, $sformatf("tenures counted: %0d", ten));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
