// tcc_l1_dcache: transactional L1 data cache of one TCC processor.
//
// The cache buffers the running transaction's read-set and write-set. Each
// line has, per 32-bit word, a valid bit (V), a speculatively-read bit (SR)
// and a speculatively-modified bit (SM). Loads set SR unless the word already
// has SM (a word the transaction wrote itself is renamed, so later commits of
// other processors to it cause no violation). Stores write the word, set V
// and SM, and on the first speculative store to a line push the line's
// pointer ({set, way}) into the store address FIFO. At the end of the
// transaction the commit control broadcasts the write-set on the commit bus,
// then all SR/SM bits are cleared. Other processors' commits are snooped
// through a second tag port: a committed word with SR set is a violation
// (speculatively modified lines are invalidated, SR/SM cleared, the FIFO
// emptied and the processor told to restart); committed words without SM are
// invalidated (invalidate protocol with per-word valid bits).
//
// Organization (document's main configuration): 32 KB, 32-byte lines, 4-way,
// 1-cycle hit, single data port, 8-entry victim cache, 1024-entry FIFO. Lines
// with only clean or no data are evicted silently (committed data already is
// in the L2); speculative lines go to the victim cache, and when it is full
// the overflow control forces an early commit that keeps commit permission.
//
// This design's own choices (the document is silent on them): the processor
// side is one blocking 32-bit word access at a time; a store to an absent
// line or word allocates it without fetching the line (every store writes a
// whole word); a line found in the victim cache is swapped back into its set
// before use; a load miss first reserves a way, then fetches the line through
// the fill control, which fills only words that are invalid, not SM and not
// committed by others while the miss was pending. Processor accesses, fills
// and victim moves wait one cycle whenever a snoop is being processed, so a
// snoop is never lost against a local update.
//
// Processor interface: cpu_req with cpu_we/cpu_addr/cpu_wdata is held until
// cpu_done (combinational in the access cycle on a hit; cpu_rdata valid with
// it). cpu_commit is held until cpu_commit_done. cpu_violation pulses once
// per violation; the processor must then drop its request and restart the
// transaction. Bus interface: bus_req/bus_commit/bus_hold/bus_gnt to the
// arbiter, bus_beat to the commit bus, cb_in and rb_in the two broadcast buses.
module tcc_l1_dcache
  import tcc_pkg::*;
#(
  parameter int unsigned MY_ID      = 0,
  parameter int unsigned SIZE_BYTES = 32 * 1024,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned VC_ENTRIES = 8,
  parameter int unsigned SAF_DEPTH  = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor
  input  logic        cpu_req,
  input  logic        cpu_we,
  input  logic [31:0] cpu_addr,
  input  word_t       cpu_wdata,
  output logic        cpu_done,
  output word_t       cpu_rdata,
  input  logic        cpu_commit,
  output logic        cpu_commit_done,
  output logic        cpu_violation,
  // commit bus
  output logic        bus_req,
  output logic        bus_commit,
  output logic        bus_hold,
  input  logic        bus_gnt,
  output cbus_beat_t  bus_beat,
  input  cbus_beat_t  cb_in,
  input  rbus_beat_t  rb_in,
  // event counters
  output logic [31:0] n_load_miss,
  output logic [31:0] n_violations,
  output logic [31:0] n_overflows,
  output logic [31:0] n_vc_moves,
  output logic [31:0] n_vc_swaps,
  output logic [31:0] n_commits,
  output logic [31:0] n_renamed
);
  localparam int unsigned SETS  = SIZE_BYTES / (LINE_BITS / 8) / WAYS;
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned WAY_W = $clog2(WAYS);
  localparam int unsigned PTR_W = SET_W + WAY_W;
  localparam int unsigned TAG_W = LADDR_W - SET_W;
  localparam int unsigned VC_W  = $clog2(VC_ENTRIES);
  localparam int unsigned NCAND = WAYS + VC_ENTRIES;

  typedef enum logic [1:0] {L_IDLE, L_MISS_REQ, L_MISS_WAIT, L_COMMIT} lst_e;

  // ---------------------------------------------------------------- arrays
  logic [TAG_W-1:0] tag_q  [SETS][WAYS];
  line_t            data_q [SETS][WAYS];
  logic             tv_q   [SETS][WAYS];
  wmask_t           v_q    [SETS][WAYS];
  wmask_t           sr_q   [SETS][WAYS];
  wmask_t           sm_q   [SETS][WAYS];

  function automatic cline_t rd_line(logic [SET_W-1:0] s, logic [WAY_W-1:0] w);
    cline_t c;
    c.tv    = tv_q[s][w];
    c.laddr = {tag_q[s][w], s};
    c.v     = v_q[s][w];
    c.sr    = sr_q[s][w];
    c.sm    = sm_q[s][w];
    c.data  = data_q[s][w];
    return c;
  endfunction

  lst_e st_q;
  logic viol_q;

  // ---------------------------------------------------------------- processor lookup
  laddr_t            la;
  logic [SET_W-1:0]  set_i;
  logic [TAG_W-1:0]  tag_i;
  logic [2:0]        wd;
  assign la    = cpu_addr[31:5];
  assign set_i = la[SET_W-1:0];
  assign tag_i = la[LADDR_W-1:SET_W];
  assign wd    = cpu_addr[4:2];

  logic             way_hit;
  logic [WAY_W-1:0] hw;
  logic [WAYS-1:0]  way_tv, way_spec;
  always_comb begin
    way_hit = 1'b0; hw = '0;
    for (int w = 0; w < WAYS; w++) begin
      way_tv[w]   = tv_q[set_i][w];
      way_spec[w] = tv_q[set_i][w] && ((sr_q[set_i][w] | sm_q[set_i][w]) != '0);
      if (tv_q[set_i][w] && tag_q[set_i][w] == tag_i) begin way_hit = 1'b1; hw = WAY_W'(w); end
    end
  end

  // ---------------------------------------------------------------- submodules
  // victim cache
  logic vc_hit, vc_free; logic [VC_W-1:0] vc_hidx, vc_fidx;
  logic vc_wr; logic [VC_W-1:0] vc_widx; cline_t vc_wline;
  logic [VC_ENTRIES-1:0] vc_snp_we; wmask_t [VC_ENTRIES-1:0] vc_snp_v;
  logic vc_clr_sm; logic [VC_W-1:0] vc_cidx;
  logic flash_commit, flash_violate;
  cline_t [VC_ENTRIES-1:0] vc_lines;

  tcc_victim_cache #(.ENTRIES(VC_ENTRIES)) u_vc (
    .clk, .rst_n, .lk_laddr(la), .lk_hit(vc_hit), .lk_idx(vc_hidx),
    .has_free(vc_free), .free_idx(vc_fidx), .wr_en(vc_wr), .wr_idx(vc_widx),
    .wr_line(vc_wline), .snp_we(vc_snp_we), .snp_v(vc_snp_v),
    .clr_sm_en(vc_clr_sm), .clr_sm_idx(vc_cidx), .flash_commit(flash_commit),
    .flash_violate(flash_violate), .entries(vc_lines));

  // snoop control: the ways of the snooped set and the victim cache entries
  logic [SET_W-1:0] sset;
  assign sset = cb_in.laddr[SET_W-1:0];
  logic   [NCAND-1:0] c_tv, s_hit;
  laddr_t [NCAND-1:0] c_la;
  wmask_t [NCAND-1:0] c_v, c_sr, c_sm, s_newv;
  logic snoop, viol_now;
  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      c_tv[w] = tv_q[sset][w]; c_la[w] = {tag_q[sset][w], sset};
      c_v[w] = v_q[sset][w]; c_sr[w] = sr_q[sset][w]; c_sm[w] = sm_q[sset][w];
    end
    for (int e = 0; e < VC_ENTRIES; e++) begin
      c_tv[WAYS+e] = vc_lines[e].tv; c_la[WAYS+e] = vc_lines[e].laddr;
      c_v[WAYS+e] = vc_lines[e].v; c_sr[WAYS+e] = vc_lines[e].sr; c_sm[WAYS+e] = vc_lines[e].sm;
      vc_snp_we[e] = s_hit[WAYS+e];
      vc_snp_v[e]  = s_newv[WAYS+e];
    end
  end
  tcc_snoop_control #(.NLINES(NCAND), .MY_ID(MY_ID)) u_snoop (
    .cb(cb_in), .tv(c_tv), .laddr(c_la), .v(c_v), .sr(c_sr), .sm(c_sm),
    .snoop(snoop), .hit(s_hit), .new_v(s_newv), .violation(viol_now));

  // store address FIFO
  logic saf_push, saf_pop, saf_clear, saf_empty, saf_full;
  logic [PTR_W-1:0] saf_wptr, saf_rptr;
  tcc_saf #(.DEPTH(SAF_DEPTH), .PTR_W(PTR_W)) u_saf (
    .clk, .rst_n, .push(saf_push), .push_ptr(saf_wptr), .pop(saf_pop),
    .clear(saf_clear), .rd_ptr(saf_rptr), .empty(saf_empty), .full(saf_full), .count());

  // fill control
  logic fill_start, fill_pend, fill_valid, fill_ack;
  laddr_t fill_la; line_t fill_data; wmask_t fill_stale;
  tcc_fill_control #(.MY_ID(MY_ID)) u_fill (
    .clk, .rst_n, .start(fill_start), .start_laddr(la), .cb(cb_in), .rb(rb_in),
    .fill_ack(fill_ack), .pending(fill_pend), .mshr_laddr(fill_la),
    .fill_valid(fill_valid), .fill_data(fill_data), .stale(fill_stale));

  // overflow control
  logic need_alloc, saf_ovf, alloc_fire, ovf, holding;
  logic [1:0] akind; logic [WAY_W-1:0] aw;
  logic cc_done, cc_early_done;
  tcc_overflow_control #(.WAYS(WAYS)) u_ovf (
    .clk, .rst_n, .need_alloc(need_alloc), .way_tv(way_tv), .way_spec(way_spec),
    .vc_has_free(vc_free), .saf_overflow(saf_ovf), .alloc_fire(alloc_fire),
    .early_done(cc_early_done), .regular_done(cc_done), .violate(viol_q),
    .alloc_kind(akind), .alloc_way(aw), .overflow(ovf), .holding(holding),
    .overflow_count(n_overflows));

  // commit control
  logic cc_start, cc_early, cc_busy, cc_req, cc_pop, cc_clr_sm;
  logic [PTR_W-1:0] cc_ptr;
  cbus_beat_t cc_beat;
  cline_t cc_line;
  assign cc_line = rd_line(cc_ptr[PTR_W-1:WAY_W], cc_ptr[WAY_W-1:0]);
  tcc_commit_control #(.MY_ID(MY_ID), .PTR_W(PTR_W), .VC_ENTRIES(VC_ENTRIES)) u_cc (
    .clk, .rst_n, .start(cc_start), .early(cc_early), .violate(viol_now),
    .busy(cc_busy), .bus_req(cc_req), .bus_hold(bus_hold), .grant(bus_gnt && st_q == L_COMMIT),
    .beat(cc_beat), .saf_empty(saf_empty), .saf_ptr(saf_rptr), .saf_pop(cc_pop),
    .line_ptr(cc_ptr), .line(cc_line), .line_clr_sm(cc_clr_sm), .vc_lines(vc_lines),
    .vc_clr_sm(vc_clr_sm), .vc_idx(vc_cidx), .flash_commit(flash_commit),
    .done(cc_done), .early_done(cc_early_done), .lines_sent(), .words_sent());

  // fill target: the reserved way of the pending line, if it is still there
  logic [SET_W-1:0] fset;
  logic             f_hit;
  logic [WAY_W-1:0] fw;
  wmask_t           f_mask;
  assign fset = fill_la[SET_W-1:0];
  always_comb begin
    f_hit = 1'b0; fw = '0;
    for (int w = 0; w < WAYS; w++)
      if (tv_q[fset][w] && tag_q[fset][w] == fill_la[LADDR_W-1:SET_W]) begin
        f_hit = 1'b1; fw = WAY_W'(w);
      end
    f_mask = ~(v_q[fset][fw] | sm_q[fset][fw] | fill_stale);
  end

  // ---------------------------------------------------------------- control
  logic act;          // processor access may act this cycle
  logic ld_hit, st_hit, ld_miss, do_swap, do_alloc, go_ovf;
  logic first_sm;
  cline_t way_line, vc_line;
  assign way_line = rd_line(set_i, aw);
  assign vc_line  = vc_lines[vc_hidx];

  always_comb begin
    act      = (st_q == L_IDLE) && !snoop && !viol_q && cpu_req && !cpu_commit;
    first_sm = (sm_q[set_i][hw] == '0);
    ld_hit   = act && way_hit && !cpu_we && v_q[set_i][hw][wd];
    ld_miss  = act && way_hit && !cpu_we && !v_q[set_i][hw][wd];
    need_alloc = act && !way_hit && !vc_hit;
    saf_ovf  = (act && way_hit && cpu_we && first_sm && saf_full) ||
               (act && !way_hit && vc_hit && vc_line.sm != '0 && saf_full);
  end

  always_comb begin
    st_hit   = act && way_hit && cpu_we && !saf_ovf;
    do_swap  = act && !way_hit && vc_hit && !saf_ovf;
    do_alloc = need_alloc && !ovf;
    go_ovf   = act && ovf;
    alloc_fire = do_swap || do_alloc;

    cpu_done  = ld_hit || st_hit;
    cpu_rdata = data_q[set_i][hw][wd];

    saf_push  = (st_hit && first_sm) || (do_swap && vc_line.sm != '0);
    saf_wptr  = {set_i, st_hit ? hw : aw};
    saf_pop   = cc_pop;
    saf_clear = flash_commit || viol_q;

    vc_wr    = do_swap || (do_alloc && akind == 2'd2);
    vc_widx  = do_swap ? vc_hidx : vc_fidx;
    vc_wline = way_line;
    if (!way_line.tv) vc_wline.tv = 1'b0;

    cc_start = (st_q == L_IDLE) && cpu_commit && !viol_q && !snoop;
    cc_early = go_ovf;

    fill_start = (st_q == L_MISS_REQ) && bus_gnt;
    fill_ack   = (st_q == L_MISS_WAIT) && fill_valid && !snoop;

    flash_violate   = viol_q;
    cpu_violation   = viol_q;
    cpu_commit_done = cc_done;

    bus_req    = (st_q == L_MISS_REQ) || (st_q == L_COMMIT && cc_req);
    bus_commit = (st_q == L_COMMIT);
    bus_beat   = '0;
    if (st_q == L_COMMIT) bus_beat = cc_beat;
    else if (st_q == L_MISS_REQ && bus_gnt) begin
      bus_beat.valid = 1'b1;
      bus_beat.kind  = CB_READ;
      bus_beat.src   = CPU_ID_W'(MY_ID);
      bus_beat.first = 1'b1;
      bus_beat.last  = 1'b1;
      bus_beat.laddr = la;
    end
  end

  // state machine
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= L_IDLE; viol_q <= 1'b0;
    end else begin
      viol_q <= viol_now && !viol_q;
      unique case (st_q)
        L_IDLE: begin
          if (cc_start || go_ovf) st_q <= L_COMMIT;
          else if (ld_miss)       st_q <= L_MISS_REQ;
        end
        L_MISS_REQ: begin
          if (bus_gnt)       st_q <= L_MISS_WAIT;
          else if (viol_now) st_q <= L_IDLE;
        end
        L_MISS_WAIT: if (fill_ack) st_q <= L_IDLE;
        L_COMMIT: if (!cc_busy) st_q <= L_IDLE;
        default: st_q <= L_IDLE;
      endcase
    end
  end

  // tag and data arrays (no reset; guarded by the line-present bits)
  always_ff @(posedge clk) begin
    if (st_hit) data_q[set_i][hw][wd] <= cpu_wdata;
    if (do_swap) begin
      tag_q[set_i][aw]  <= vc_line.laddr[LADDR_W-1:SET_W];
      data_q[set_i][aw] <= vc_line.data;
    end else if (do_alloc) begin
      tag_q[set_i][aw] <= tag_i;
    end
    if (fill_ack && f_hit)
      for (int w = 0; w < LINE_WORDS; w++)
        if (f_mask[w]) data_q[fset][fw][w] <= fill_data[w];
  end

  // state bits
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) begin
          tv_q[s][w] <= 1'b0; v_q[s][w] <= '0; sr_q[s][w] <= '0; sm_q[s][w] <= '0;
        end
    end else begin
      // snoop: invalidate committed words
      for (int w = 0; w < WAYS; w++)
        if (s_hit[w]) v_q[sset][w] <= s_newv[w];
      // processor access
      if (ld_hit && !sm_q[set_i][hw][wd]) sr_q[set_i][hw][wd] <= 1'b1;
      if (st_hit) begin
        v_q[set_i][hw][wd]  <= 1'b1;
        sm_q[set_i][hw][wd] <= 1'b1;
      end
      if (do_swap) begin
        tv_q[set_i][aw] <= 1'b1;
        v_q[set_i][aw]  <= vc_line.v;
        sr_q[set_i][aw] <= vc_line.sr;
        sm_q[set_i][aw] <= vc_line.sm;
      end else if (do_alloc) begin
        tv_q[set_i][aw] <= 1'b1;
        v_q[set_i][aw]  <= '0;
        sr_q[set_i][aw] <= '0;
        sm_q[set_i][aw] <= '0;
      end
      // fill merge (dropped if the line has gone meanwhile, after a violation)
      if (fill_ack && f_hit) v_q[fset][fw] <= v_q[fset][fw] | f_mask;
      // commit: clear SM of a line once sent
      if (cc_clr_sm) sm_q[cc_ptr[PTR_W-1:WAY_W]][cc_ptr[WAY_W-1:0]] <= '0;
      // flash operations
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) begin
          if (flash_violate && sm_q[s][w] != '0) tv_q[s][w] <= 1'b0;
          if (flash_violate || flash_commit) begin
            sr_q[s][w] <= '0;
            sm_q[s][w] <= '0;
          end
        end
    end
  end

  // ---------------------------------------------------------------- counters
  logic unused_ok;
  assign unused_ok = fill_pend | holding | (|cpu_addr[1:0]);

  logic [31:0] c_miss, c_viol, c_move, c_swap, c_com, c_ren;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_miss <= '0; c_viol <= '0; c_move <= '0; c_swap <= '0; c_com <= '0; c_ren <= '0;
    end else begin
      if (fill_start) c_miss <= c_miss + 1;
      if (viol_q)     c_viol <= c_viol + 1;
      if (do_alloc && akind == 2'd2) c_move <= c_move + 1;
      if (do_swap)    c_swap <= c_swap + 1;
      if (cc_done)    c_com  <= c_com + 1;
      for (int w = 0; w < WAYS; w++)
        if (s_hit[w] && ((cb_in.mask & c_sm[w]) != '0)) c_ren <= c_ren + 1;
    end
  end
  assign n_load_miss  = c_miss;
  assign n_violations = c_viol;
  assign n_vc_moves   = c_move;
  assign n_vc_swaps   = c_swap;
  assign n_commits    = c_com;
  assign n_renamed    = c_ren;

  // The processor holds one request at a time.
  assert property (@(posedge clk) disable iff (!rst_n) !(cpu_req && cpu_commit));
endmodule
