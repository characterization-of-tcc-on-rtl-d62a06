// tcc_cmp_top: chip multiprocessor with Transactional Coherence and
// Consistency (TCC).
//
// N_CPU processors (8 in the main configuration) run continuous transactions.
// Each has a transactional L1 data cache (with its store address FIFO, victim
// cache, snoop, fill, overflow and commit control) and a register checkpoint.
// The processors share an L2 through two logical broadcast buses: the commit
// bus, granted by the system-wide commit arbiter, carries refill requests and
// committed write-sets; the refill bus carries line data from the L2. All
// processors snoop every commit, so they see commits in one global order.
//
// The processor cores are not part of this design; their interface to the
// memory system is brought out as ports (one set per processor):
//   cpu_req/cpu_we/cpu_addr/cpu_wdata -> cpu_done/cpu_rdata  word load/store
//   cpu_commit -> cpu_commit_done                            end of transaction
//   cpu_violation                                            restart request
//   cpu_regs/cpu_tx_begin -> ckpt_regs                      register checkpoint
// The checkpoint is taken when cpu_tx_begin is raised and handed back on a
// violation (ckpt_restore). Event counters are brought out for measurement.
module tcc_cmp_top
  import tcc_pkg::*;
#(
  parameter int unsigned N_CPU      = 8,
  parameter int unsigned L1_BYTES   = 32 * 1024,
  parameter int unsigned L1_WAYS    = 4,
  parameter int unsigned VC_ENTRIES = 8,
  parameter int unsigned SAF_DEPTH  = 1024,
  parameter int unsigned L2_BYTES   = 8 * 1024 * 1024,
  parameter int unsigned L2_HIT_LAT = 16,
  parameter int unsigned ARB_LAT    = 3,
  parameter int unsigned XFER_LAT   = 3,
  parameter int unsigned NREGS      = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic  [N_CPU-1:0]       cpu_req,
  input  logic  [N_CPU-1:0]       cpu_we,
  input  logic  [N_CPU-1:0][31:0] cpu_addr,
  input  word_t [N_CPU-1:0]       cpu_wdata,
  output logic  [N_CPU-1:0]       cpu_done,
  output word_t [N_CPU-1:0]       cpu_rdata,
  input  logic  [N_CPU-1:0]       cpu_commit,
  output logic  [N_CPU-1:0]       cpu_commit_done,
  output logic  [N_CPU-1:0]       cpu_violation,
  input  logic  [N_CPU-1:0]       cpu_tx_begin,
  input  logic  [N_CPU-1:0][NREGS-1:0][31:0] cpu_regs,
  output logic  [N_CPU-1:0]       ckpt_restore,
  output logic  [N_CPU-1:0][NREGS-1:0][31:0] ckpt_regs,
  // event counters
  output logic [N_CPU-1:0][31:0]  n_load_miss,
  output logic [N_CPU-1:0][31:0]  n_violations,
  output logic [N_CPU-1:0][31:0]  n_overflows,
  output logic [N_CPU-1:0][31:0]  n_vc_moves,
  output logic [N_CPU-1:0][31:0]  n_vc_swaps,
  output logic [N_CPU-1:0][31:0]  n_commits,
  output logic [N_CPU-1:0][31:0]  n_renamed,
  output logic [31:0]             n_bus_tenures,
  output logic [31:0]             n_bus_busy,
  output logic [31:0]             n_commit_beats,
  output logic [31:0]             n_read_beats,
  output logic [31:0]             n_refill_beats,
  output logic                    token_held
);
  logic [N_CPU-1:0] bus_req, bus_commit, bus_hold, gnt;
  cbus_beat_t [N_CPU-1:0] beats;
  cbus_beat_t cb;
  rbus_beat_t rb_l2, rb;
  logic last;

  for (genvar i = 0; i < N_CPU; i++) begin : g_cpu
    tcc_l1_dcache #(
      .MY_ID(i), .SIZE_BYTES(L1_BYTES), .WAYS(L1_WAYS),
      .VC_ENTRIES(VC_ENTRIES), .SAF_DEPTH(SAF_DEPTH)
    ) u_l1 (
      .clk, .rst_n,
      .cpu_req(cpu_req[i]), .cpu_we(cpu_we[i]), .cpu_addr(cpu_addr[i]),
      .cpu_wdata(cpu_wdata[i]), .cpu_done(cpu_done[i]), .cpu_rdata(cpu_rdata[i]),
      .cpu_commit(cpu_commit[i]), .cpu_commit_done(cpu_commit_done[i]),
      .cpu_violation(cpu_violation[i]),
      .bus_req(bus_req[i]), .bus_commit(bus_commit[i]), .bus_hold(bus_hold[i]),
      .bus_gnt(gnt[i]), .bus_beat(beats[i]), .cb_in(cb), .rb_in(rb),
      .n_load_miss(n_load_miss[i]), .n_violations(n_violations[i]),
      .n_overflows(n_overflows[i]), .n_vc_moves(n_vc_moves[i]),
      .n_vc_swaps(n_vc_swaps[i]), .n_commits(n_commits[i]), .n_renamed(n_renamed[i]));

    tcc_reg_checkpoint #(.NREGS(NREGS), .XLEN(32)) u_ckpt (
      .clk, .rst_n, .take(cpu_tx_begin[i]), .regs_in(cpu_regs[i]),
      .restore(cpu_violation[i]), .restore_valid(ckpt_restore[i]),
      .ckpt(ckpt_regs[i]), .restores());
  end

  tcc_commit_arbiter #(.N(N_CPU), .ARB_LAT(ARB_LAT)) u_arb (
    .clk, .rst_n, .req(bus_req), .commit(bus_commit), .hold(bus_hold),
    .last(last), .gnt(gnt), .token_held(token_held), .token_owner(),
    .tenures(n_bus_tenures), .busy_cycles(n_bus_busy));

  tcc_commit_bus #(.N(N_CPU), .XFER_LAT(XFER_LAT)) u_cbus (
    .clk, .rst_n, .beats_in(beats), .gnt(gnt), .last(last), .bus_out(cb),
    .commit_beats(n_commit_beats), .read_beats(n_read_beats));

  tcc_l2_cache #(
    .SIZE_BYTES(L2_BYTES), .HIT_LAT(L2_HIT_LAT), .ARB_LAT(ARB_LAT), .XFER_LAT(XFER_LAT)
  ) u_l2 (
    .clk, .rst_n, .cb(cb), .rb_out(rb_l2), .reads(), .words_written());

  tcc_refill_bus #(.XFER_LAT(XFER_LAT)) u_rbus (
    .clk, .rst_n, .beat_in(rb_l2), .bus_out(rb), .beats(n_refill_beats));
endmodule
