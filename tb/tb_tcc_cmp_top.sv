// tb_tcc_cmp_top: end-to-end test of the TCC chip multiprocessor at its
// default size (8 processors, 32-KB 4-way L1s, 8-entry victim caches,
// 1024-entry store address FIFOs, 8-MB L2, 3-cycle arbitration and transfer).
//
// Each processor is modelled by a small driver that runs transactions as
// sequences of word loads and stores followed by a commit, and re-executes a
// transaction from its start whenever the cache reports a violation. The
// workloads exercise every mechanism of the design and are checked against
// values worked out here:
//   A. shared counter: every processor increments one shared word in
//      transactions (read-modify-write) while writing private words; the
//      final count must equal the number of increments (atomicity, snoop
//      violations and restarts).
//   B. false sharing: processors write different words of one line; no
//      update may be lost and no violation is needed.
//   C. renaming: processors write then re-read one shared word; each must
//      read its own value back although others commit the same word.
//   D. overflow: processor 0 writes 16 lines that map to one L1 set, more
//      than 4 ways plus 8 victim entries; it must overflow, commit early,
//      keep commit permission, and all 16 values must reach the L2.
// It also checks the L2 refill latency (16 cycles from request to data) and
// counts how often each mechanism happened; one that never happened is a
// failure.
module tb_tcc_cmp_top;
  import tcc_pkg::*;
  localparam int N = 8;
  localparam logic [31:0] CNT  = 32'h0000_1000;
  localparam logic [31:0] FS   = 32'h0000_2000;
  localparam logic [31:0] RN   = 32'h0000_3000;
  localparam logic [31:0] PRIV = 32'h0000_4000;
  localparam logic [31:0] OVF  = 32'h0010_0000;
  localparam int INC_PER_CPU = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  [N-1:0] cpu_req, cpu_we, cpu_done, cpu_commit, cpu_commit_done, cpu_violation;
  logic  [N-1:0][31:0] cpu_addr;
  word_t [N-1:0] cpu_wdata, cpu_rdata;
  logic  [N-1:0] tx_begin, ckpt_restore;
  logic  [N-1:0][31:0][31:0] regs, ckpt_regs;
  logic [N-1:0][31:0] n_load_miss, n_violations, n_overflows, n_vc_moves, n_vc_swaps, n_commits, n_renamed;
  logic [31:0] n_bus_tenures, n_bus_busy, n_commit_beats, n_read_beats, n_refill_beats;
  logic token_held;

  // per-processor driver variables, gathered into the packed ports
  logic d_req[N], d_we[N], d_commit[N], d_begin[N];
  logic [31:0] d_addr[N], d_wdata[N];
  always_comb
    for (int i = 0; i < N; i++) begin
      cpu_req[i] = d_req[i]; cpu_we[i] = d_we[i]; cpu_addr[i] = d_addr[i];
      cpu_wdata[i] = d_wdata[i]; cpu_commit[i] = d_commit[i]; tx_begin[i] = d_begin[i];
      for (int r = 0; r < 32; r++) regs[i][r] = 32'(i * 1000 + r) ^ n_commits[i];
    end

  tcc_cmp_top dut (
    .clk, .rst_n, .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_done, .cpu_rdata,
    .cpu_commit, .cpu_commit_done, .cpu_violation, .cpu_tx_begin(tx_begin),
    .cpu_regs(regs), .ckpt_restore, .ckpt_regs,
    .n_load_miss, .n_violations, .n_overflows, .n_vc_moves, .n_vc_swaps, .n_commits,
    .n_renamed, .n_bus_tenures, .n_bus_busy, .n_commit_beats, .n_read_beats,
    .n_refill_beats, .token_held);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- processor driver primitives (inputs change at the falling edge)
  task automatic access(int c, bit we, logic [31:0] a, logic [31:0] wd,
                        output logic [31:0] rd, output bit viol);
    d_req[c] = 1; d_we[c] = we; d_addr[c] = a; d_wdata[c] = wd; viol = 0; rd = '0;
    forever begin
      #1;
      if (cpu_violation[c]) begin viol = 1; d_req[c] = 0; @(negedge clk); return; end
      if (cpu_done[c]) begin rd = cpu_rdata[c]; @(negedge clk); d_req[c] = 0; return; end
      @(negedge clk);
    end
  endtask

  task automatic commit(int c, output bit viol);
    d_commit[c] = 1; viol = 0;
    forever begin
      #1;
      if (cpu_violation[c]) begin viol = 1; d_commit[c] = 0; @(negedge clk); return; end
      if (cpu_commit_done[c]) begin @(negedge clk); d_commit[c] = 0; return; end
      @(negedge clk);
    end
  endtask

  task automatic begin_tx(int c);
    d_begin[c] = 1; @(negedge clk); d_begin[c] = 0;
  endtask

  // ---- workloads
  int renamed_ok[N];
  task automatic wl_counter(int c);
    logic [31:0] v; bit viol;
    for (int k = 0; k < INC_PER_CPU; k++) begin
      do begin
        begin_tx(c);
        access(c, 0, CNT, 0, v, viol);                    if (viol) continue;
        access(c, 1, PRIV + 32'(c * 256 + k * 4), 32'(c * 100 + k), v, viol); if (viol) continue;
        repeat ((c * 7 + k * 3) % 11) @(negedge clk);
        access(c, 0, CNT, 0, v, viol);                    if (viol) continue;
        access(c, 1, CNT, v + 1, v, viol);                if (viol) continue;
        commit(c, viol);
      end while (viol);
    end
  endtask

  task automatic wl_false_share(int c);
    logic [31:0] v; bit viol;
    do begin
      begin_tx(c);
      access(c, 1, FS + 32'(c * 4), 32'hF000 + 32'(c), v, viol); if (viol) continue;
      commit(c, viol);
    end while (viol);
  endtask

  task automatic wl_rename(int c);
    logic [31:0] v; bit viol;
    do begin
      begin_tx(c);
      access(c, 1, RN, 32'hA000 + 32'(c), v, viol);  if (viol) continue;
      repeat (20 + c * 9) @(negedge clk);
      access(c, 0, RN, 0, v, viol);                  if (viol) continue;
      renamed_ok[c] = (v == 32'hA000 + 32'(c));
      commit(c, viol);
    end while (viol);
  endtask

  task automatic wl_overflow(int c);
    logic [31:0] v; bit viol = 0; bit ok;
    do begin
      viol = 0;
      begin_tx(c);
      ok = 1;
      for (int l = 0; l < 6 && !viol; l++) access(c, 1, OVF + 32'(l * 8192), 32'h5000 + 32'(l), v, viol);
      if (viol) continue;
      for (int l = 0; l < 6 && !viol; l++) begin
        access(c, 0, OVF + 32'(l * 8192), 0, v, viol);
        if (!viol && v != 32'h5000 + 32'(l)) ok = 0;
      end
      if (viol) continue;
      for (int l = 6; l < 16 && !viol; l++) access(c, 1, OVF + 32'(l * 8192), 32'h5000 + 32'(l), v, viol);
      if (viol) continue;
      check(ok, "overflow transaction reads back its own speculative lines");
      repeat (40) @(negedge clk);
      commit(c, viol);
    end while (viol);
  endtask

  // ---- mechanism and latency monitors
  int hold_wait_cycles = 0, mshr_stale = 0;
  int lat_start = -1, lat_meas = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (token_held && (dut.u_arb.req & dut.u_arb.commit & ~(N'(1) << dut.u_arb.tok_q)) != '0)
      hold_wait_cycles++;
    if (lat_start < 0 && dut.g_cpu[0].u_l1.bus_req && !dut.g_cpu[0].u_l1.bus_commit) lat_start = cyc;
    if (lat_start >= 0 && lat_meas < 0 && dut.rb.valid && dut.rb.dst == 0) lat_meas = cyc - lat_start;
  end

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int done_cnt = 0;
  logic [31:0] rdv; bit vv;
  initial begin
    for (int i = 0; i < N; i++) begin
      d_req[i] = 0; d_we[i] = 0; d_commit[i] = 0; d_begin[i] = 0; d_addr[i] = 0; d_wdata[i] = 0;
      renamed_ok[i] = 0;
    end
    // L2 contents of the lines used
    for (int l = 0; l < 4096; l++) dut.u_l2.mem[l] = '0;
    for (int l = 0; l < 16; l++)   dut.u_l2.mem[(OVF >> 5) + l * 256] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // A: latency probe (idle system), then the shared counter
    access(0, 0, CNT, 0, rdv, vv);
    check(rdv == 0 && !vv, "first load of the counter returns 0");
    check(lat_meas == 16, $sformatf("L2 hit time %0d cycles, expected 16", lat_meas));
    for (int i = 0; i < N; i++) begin
      automatic int c = i;
      fork begin wl_counter(c); done_cnt++; end join_none
    end
    wait (done_cnt == N);

    // B: false sharing
    for (int i = 0; i < N; i++) begin
      automatic int c = i;
      fork begin wl_false_share(c); done_cnt++; end join_none
    end
    wait (done_cnt == 2 * N);

    // C: renaming
    for (int i = 0; i < N; i++) begin
      automatic int c = i;
      fork begin wl_rename(c); done_cnt++; end join_none
    end
    wait (done_cnt == 3 * N);

    // D: overflow on processor 0 while the others keep committing counters
    fork
      begin wl_overflow(0); done_cnt++; end
      begin
        wait (token_held);
        @(negedge clk);
        for (int i = 1; i < N; i++) begin
          automatic int c = i;
          fork begin wl_false_share(c); done_cnt++; end join_none
        end
      end
    join_none
    wait (done_cnt == 4 * N);
    repeat (40) @(negedge clk);

    // ---- results in the L2
    check(dut.u_l2.mem[CNT >> 5][0] == 32'(N * INC_PER_CPU),
          $sformatf("shared counter %0d, expected %0d", dut.u_l2.mem[CNT >> 5][0], N * INC_PER_CPU));
    for (int c = 0; c < N; c++)
      for (int k = 0; k < INC_PER_CPU; k++)
        check(dut.u_l2.mem[(PRIV + 32'(c * 256 + k * 4)) >> 5][k] == 32'(c * 100 + k), "private word");
    for (int c = 0; c < N; c++)
      check(dut.u_l2.mem[FS >> 5][c] == 32'hF000 + 32'(c), "false-shared word kept");
    for (int c = 0; c < N; c++) check(renamed_ok[c] == 1, "renamed word reads own value");
    check(dut.u_l2.mem[RN >> 5][0][31:4] == 28'hA00, "renamed word holds one committed value");
    for (int l = 0; l < 16; l++)
      check(dut.u_l2.mem[(OVF >> 5) + l * 256][0] == 32'h5000 + 32'(l), $sformatf("overflow line %0d", l));
    // coherence: processor 5 re-reads the counter it had cached
    access(5, 0, CNT, 0, rdv, vv);
    check(rdv == 32'(N * INC_PER_CPU), $sformatf("processor 5 reads counter %0d", rdv));

    // ---- mechanisms
    begin
      int s_miss = 0, s_viol = 0, s_ovf = 0, s_move = 0, s_swap = 0, s_com = 0, s_ren = 0;
      for (int i = 0; i < N; i++) begin
        s_miss += n_load_miss[i]; s_viol += n_violations[i]; s_ovf += n_overflows[i];
        s_move += n_vc_moves[i]; s_swap += n_vc_swaps[i]; s_com += n_commits[i]; s_ren += n_renamed[i];
      end
      $display("load misses %0d, violations %0d, overflows %0d, victim moves %0d, victim swaps %0d",
               s_miss, s_viol, s_ovf, s_move, s_swap);
      $display("commits %0d, renamed-word snoops %0d, cycles others waited on held commit permission %0d",
               s_com, s_ren, hold_wait_cycles);
      $display("bus tenures %0d, busy cycles %0d, commit beats %0d, read beats %0d, refill beats %0d, cycles %0d",
               n_bus_tenures, n_bus_busy, n_commit_beats, n_read_beats, n_refill_beats, cyc);
      check(s_miss > 0, "load misses happened");
      check(s_viol > 0, "violations happened");
      check(s_ovf > 0, "overflow happened");
      check(s_move > 0, "victim cache moves happened");
      check(s_swap > 0, "victim cache swaps happened");
      check(s_ren > 0, "renamed words were skipped by snoops");
      check(hold_wait_cycles > 0, "a commit waited for held commit permission");
      check(n_refill_beats > 0 && n_commit_beats > 0, "both buses carried beats");
      check(dut.g_cpu[0].u_ckpt.restores == n_violations[0], "checkpoint restored on every violation");
      check(s_com == N * INC_PER_CPU + N + N + 1 + (N - 1), $sformatf("commit count %0d", s_com));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
