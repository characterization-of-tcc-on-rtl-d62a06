// tb_tcc_refill_bus: self-checking test of the refill bus: every beat comes
// out unchanged exactly 3 cycles after it went in, and beats are counted.
module tb_tcc_refill_bus;
  import tcc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  rbus_beat_t bin, bout;
  rbus_beat_t hist [$];
  logic [31:0] beats;
  tcc_refill_bus dut (.clk, .rst_n, .beat_in(bin), .bus_out(bout), .beats);
  int checks = 0, failures = 0, sent = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    bin = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      if (t >= 3) check(bout == hist[t-3], $sformatf("beat %0d delayed by 3", t - 3));
      bin = '0;
      if (t < 30) begin
        bin.valid = 1'($urandom); bin.dst = 4'($urandom); bin.laddr = 27'($urandom);
        bin.beat = 1'($urandom); bin.data = {$urandom, $urandom, $urandom, $urandom};
        sent += int'(bin.valid);
      end
      hist.push_back(bin);
    end
    check(beats == 32'(sent), "beats counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
