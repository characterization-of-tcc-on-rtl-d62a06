// tcc_victim_cache: small fully associative victim cache for speculative lines.
//
// When a line must be allocated in an L1 set whose ways all hold speculative
// state (SR or SM bits set), one of those lines is moved here instead of
// causing an associativity overflow. Each entry has the same format as an L1
// line: line address, per-word V, SR, SM bits and the data. The document's
// main configuration has 8 entries.
//
// A line found here on an access is swapped back into the L1 set by the owner
// (this design's choice), so the victim cache itself only needs: an
// associative lookup, a free-entry search (an entry is free when it is empty
// or holds no speculative state), a whole-entry write port, the snoop V
// write-back, per-entry SM clear at commit, and two flash operations:
// commit (clear all SR/SM) and violation (drop lines with SM, clear SR/SM).
// Timing: lookups are combinational, all writes take one clock. Within a
// clock the flash operations are applied last.
module tcc_victim_cache
  import tcc_pkg::*;
#(
  parameter int unsigned ENTRIES = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  laddr_t lk_laddr,
  output logic   lk_hit,
  output logic [$clog2(ENTRIES)-1:0] lk_idx,
  output logic   has_free,
  output logic [$clog2(ENTRIES)-1:0] free_idx,
  input  logic   wr_en,
  input  logic [$clog2(ENTRIES)-1:0] wr_idx,
  input  cline_t wr_line,
  input  logic   [ENTRIES-1:0] snp_we,
  input  wmask_t [ENTRIES-1:0] snp_v,
  input  logic   clr_sm_en,
  input  logic [$clog2(ENTRIES)-1:0] clr_sm_idx,
  input  logic   flash_commit,
  input  logic   flash_violate,
  output cline_t [ENTRIES-1:0] entries
);
  localparam int unsigned IW = $clog2(ENTRIES);
  cline_t e_q [ENTRIES];

  always_comb begin
    lk_hit = 1'b0; lk_idx = '0; has_free = 1'b0; free_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      entries[i] = e_q[i];
      if (e_q[i].tv && e_q[i].laddr == lk_laddr) begin lk_hit = 1'b1; lk_idx = IW'(i); end
      if (!e_q[i].tv || (e_q[i].sr | e_q[i].sm) == '0) begin has_free = 1'b1; free_idx = IW'(i); end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) e_q[i] <= '0;
    end else begin
      for (int i = 0; i < ENTRIES; i++)
        if (snp_we[i]) e_q[i].v <= snp_v[i];
      if (wr_en) e_q[wr_idx] <= wr_line;
      if (clr_sm_en) e_q[clr_sm_idx].sm <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        if (flash_violate && e_q[i].sm != '0) e_q[i].tv <= 1'b0;
        if (flash_commit || flash_violate) begin
          e_q[i].sr <= '0;
          e_q[i].sm <= '0;
        end
      end
    end
  end
endmodule
