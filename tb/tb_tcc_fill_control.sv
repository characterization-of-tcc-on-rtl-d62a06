// tb_tcc_fill_control: self-checking test of the MSHR / refill receiver.
// Opens a miss, sends the two refill beats (with beats for other processors
// and other lines in between, which must be ignored), and checks the
// assembled line; commits by other processors to the pending line must be
// recorded as stale words, commits by itself must not.
module tb_tcc_fill_control;
  import tcc_pkg::*;
  localparam int ME = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, ack = 0, pending, fvalid;
  laddr_t sla = '0, mla;
  cbus_beat_t cb; rbus_beat_t rb;
  line_t fdata, exp_line; wmask_t stale;
  tcc_fill_control #(.MY_ID(ME)) dut (.clk, .rst_n, .start, .start_laddr(sla), .cb, .rb,
    .fill_ack(ack), .pending, .mshr_laddr(mla), .fill_valid(fvalid), .fill_data(fdata), .stale);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic send(int dst, laddr_t a, bit b, beat_data_t d);
    rb = '0; rb.valid = 1; rb.dst = 4'(dst); rb.laddr = a; rb.beat = b; rb.data = d;
    @(negedge clk); rb = '0;
  endtask
  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    cb = '0; rb = '0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int w = 0; w < 8; w++) exp_line[w] = $urandom;
    start = 1; sla = 27'h123; @(negedge clk); start = 0;
    check(pending && mla == 27'h123 && !fvalid, "miss opened");
    // foreign commit to the pending line, own commit, commit to another line
    cb = '0; cb.valid = 1; cb.first = 1; cb.kind = CB_COMMIT; cb.src = 4'(ME + 1); cb.laddr = 27'h123; cb.mask = 8'h05;
    @(negedge clk);
    cb.src = 4'(ME); cb.mask = 8'h80; @(negedge clk);
    cb.src = 4'(ME + 1); cb.laddr = 27'h124; cb.mask = 8'h40; @(negedge clk);
    cb = '0;
    send(ME + 1, 27'h123, 0, '{default: 32'hDEAD});
    send(ME, 27'h124, 0, '{default: 32'hBEEF});
    send(ME, 27'h123, 1, exp_line[7:4]);
    check(!fvalid, "one beat is not a line");
    send(ME, 27'h123, 0, exp_line[3:0]);
    check(fvalid && fdata == exp_line, "line assembled from the two beats");
    check(stale == 8'h05, "only foreign commits to the pending line are stale");
    ack = 1; @(negedge clk); ack = 0;
    check(!pending && !fvalid, "MSHR released on acknowledge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
