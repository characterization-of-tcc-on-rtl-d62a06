// tb_tcc_commit_bus: self-checking test of the commit bus: only the granted
// processor's beat is carried, it appears on the broadcast output 3 cycles
// later, last is passed to the arbiter without delay, and beats are counted
// by kind.
module tb_tcc_commit_bus;
  import tcc_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cbus_beat_t [N-1:0] bin;
  logic [N-1:0] gnt;
  logic last;
  cbus_beat_t bout, exp_b;
  cbus_beat_t hist [$];
  logic [31:0] ncb, nrd;
  tcc_commit_bus dut (.clk, .rst_n, .beats_in(bin), .gnt, .last, .bus_out(bout),
                      .commit_beats(ncb), .read_beats(nrd));
  int checks = 0, failures = 0, ecb = 0, erd = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    bin = '0; gnt = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      @(negedge clk);
      if (t >= 3) check(bout == hist[t-3], $sformatf("beat %0d broadcast after 3 cycles", t - 3));
      for (int i = 0; i < N; i++) begin
        bin[i] = '0;
        bin[i].valid = 1'($urandom); bin[i].kind = cb_kind_e'($urandom_range(0, 2));
        bin[i].src = 4'(i); bin[i].last = 1'($urandom); bin[i].laddr = 27'($urandom);
        bin[i].mask = 8'($urandom); bin[i].data = {$urandom, $urandom, $urandom, $urandom};
      end
      gnt = '0;
      exp_b = '0;
      if (t < 50 && $urandom_range(0, 3) != 0) begin
        automatic int g = $urandom_range(0, N - 1);
        gnt[g] = 1'b1;
        if (bin[g].valid) exp_b = bin[g];
      end
      if (exp_b.valid && exp_b.kind == CB_COMMIT) ecb++;
      if (exp_b.valid && exp_b.kind == CB_READ) erd++;
      #1 check(last == (exp_b.valid && exp_b.last), "last flag undelayed");
      hist.push_back(exp_b);
    end
    check(ncb == 32'(ecb) && nrd == 32'(erd), "beats counted by kind");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
