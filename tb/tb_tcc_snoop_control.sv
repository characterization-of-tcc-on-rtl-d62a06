// tb_tcc_snoop_control: self-checking test of the snoop checker against a
// reference written here. Random candidate lines and commit-bus beats are
// applied (with line addresses drawn from a small pool so that matches are
// frequent); hit, the new valid bits and the violation flag are compared.
// Directed cases check that the own processor's commits, non-first beats,
// refill requests and END beats are ignored, and that a word modified
// locally (SM) is kept while a speculatively read word (SR) violates.
module tb_tcc_snoop_control;
  import tcc_pkg::*;
  localparam int NL = 12, ME = 3;
  cbus_beat_t cb;
  logic   [NL-1:0] tv, hit;
  laddr_t [NL-1:0] la;
  wmask_t [NL-1:0] v, sr, sm, nv;
  logic snoop, viol;
  tcc_snoop_control #(.NLINES(NL), .MY_ID(ME)) dut (.cb, .tv, .laddr(la), .v, .sr, .sm,
    .snoop, .hit, .new_v(nv), .violation(viol));
  int checks = 0, failures = 0, nviol = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic compare();
    logic e_snoop, e_viol; logic e_hit; wmask_t e_nv;
    e_snoop = cb.valid && cb.first && cb.kind == CB_COMMIT && cb.src != 4'(ME);
    e_viol = 0;
    check(snoop == e_snoop, "snoop qualifier");
    for (int i = 0; i < NL; i++) begin
      e_hit = e_snoop && tv[i] && la[i] == cb.laddr;
      e_nv = v[i];
      for (int w = 0; w < 8; w++)
        if (e_hit && cb.mask[w]) begin
          if (!sm[i][w]) e_nv[w] = 1'b0;
          if (sr[i][w]) e_viol = 1;
        end
      check(hit[i] == e_hit && nv[i] == e_nv, $sformatf("line %0d hit/new V", i));
    end
    check(viol == e_viol, "violation flag");
    nviol += int'(e_viol);
  endtask
  initial begin
    for (int t = 0; t < 2000; t++) begin
      cb = '0;
      cb.valid = ($urandom_range(0, 9) != 0); cb.first = ($urandom_range(0, 5) != 0);
      cb.kind = cb_kind_e'($urandom_range(0, 2)); cb.src = 4'($urandom_range(0, 7));
      cb.laddr = 27'($urandom_range(0, 5)); cb.mask = 8'($urandom);
      for (int i = 0; i < NL; i++) begin
        tv[i] = 1'($urandom); la[i] = 27'($urandom_range(0, 5));
        v[i] = 8'($urandom); sr[i] = 8'($urandom) & 8'($urandom); sm[i] = 8'($urandom) & ~sr[i];
      end
      #1 compare();
    end
    // directed: own commit ignored; SM word kept; SR word violates
    tv = '0; tv[0] = 1; la[0] = 27'd42; v[0] = 8'hFF; sr[0] = 8'h01; sm[0] = 8'h02;
    cb = '0; cb.valid = 1; cb.first = 1; cb.kind = CB_COMMIT; cb.src = 4'(ME); cb.laddr = 27'd42; cb.mask = 8'h03;
    #1 check(!snoop && !viol && nv[0] == 8'hFF, "own commit ignored");
    cb.src = 4'(ME + 1);
    #1 check(snoop && viol && nv[0] == 8'hFE, "SR word violates, SM word kept, other committed word invalidated");
    cb.mask = 8'h02;
    #1 check(!viol && nv[0] == 8'hFF, "commit of a locally modified word only: no violation, renamed");
    check(nviol > 0, "random violations seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
