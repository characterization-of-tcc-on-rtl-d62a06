// tcc_snoop_control: snoop checker for committed lines (invalidate protocol,
// word-level speculative state).
//
// Every processor watches the commit bus. On the first beat of a line that
// another processor commits, the committed line address and its SM mask are
// compared with the candidate lines that could hold it (the ways of the
// indexed L1 set, read through the second tag port, and the victim cache
// entries). For a matching line:
//   * a committed word that this transaction has speculatively read (SR=1) is
//     a dependency violation;
//   * committed words are invalidated, except words this transaction has
//     modified itself (SM=1): those are kept, which renames them and avoids
//     write-after-write and write-after-read violations.
// The check is purely combinational; the caller writes new_v back.
//
// Interface: cb is the commit bus beat, MY_ID the own processor number.
// Candidates are given as arrays of tag-valid, line address, V, SR and SM.
module tcc_snoop_control
  import tcc_pkg::*;
#(
  parameter int unsigned NLINES = 12,
  parameter int unsigned MY_ID  = 0
) (
  input  cbus_beat_t cb,
  input  logic   [NLINES-1:0] tv,
  input  laddr_t [NLINES-1:0] laddr,
  input  wmask_t [NLINES-1:0] v,
  input  wmask_t [NLINES-1:0] sr,
  input  wmask_t [NLINES-1:0] sm,
  output logic                snoop,     // a foreign line commit is on the bus
  output logic   [NLINES-1:0] hit,
  output wmask_t [NLINES-1:0] new_v,
  output logic                violation
);
  always_comb begin
    snoop = cb.valid && cb.first && (cb.kind == CB_COMMIT) &&
            (cb.src != CPU_ID_W'(MY_ID));
    violation = 1'b0;
    for (int unsigned i = 0; i < NLINES; i++) begin
      hit[i]   = snoop && tv[i] && (laddr[i] == cb.laddr);
      new_v[i] = v[i];
      if (hit[i]) begin
        new_v[i] = v[i] & ~(cb.mask & ~sm[i]);
        if ((cb.mask & sr[i]) != '0) violation = 1'b1;
      end
    end
  end
endmodule
