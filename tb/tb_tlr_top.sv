// tb_tlr_top: end-to-end test of the redundant 16-core system.
//
// What it does: 8 program threads run twice, once on the computing
// wavefront and once on the verification wavefront, and the testbench plays
// the cores and L1 caches around tlr_top. Each thread has a deterministic
// program (a function of thread number and instruction count): a branch
// every 4 instructions, a full-line store every 8, and, every 64, a store to
// and a load of one of two lines shared by all threads. The private store
// footprint changes by phase so that epochs end for all three reasons:
//   phase A (many lines, sharing)  -> sections fill up, L1 evictions;
//   phase B (4 lines, sharing)     -> races, epochs end on the subepoch limit;
//   phase C (4 lines, no sharing)  -> epochs end on the instruction count;
//   phase D = phase A again under the selective and then the blind policy.
// How: per core a direct-mapped L1 model sends miss, eviction, store and
// snoop events; snoops to the other cores of the same wavefront are sent for
// the shared lines. A register file model returns r0 = committed instruction
// count and a hash of (thread, count) in the other registers, so a restored
// checkpoint puts the thread back to the right instruction. A store's commit
// completes in the cycle its support logic answers.
// Injected faults: a corrupted register read on one verification core (must
// give a verification-only rollback), the same on one computing core (must
// give a second mismatch in the strict replay and a full rollback), and one
// wrong branch outcome on a verification core after that full rollback.
// Checks: every counted mechanism happened; exactly one full rollback; every
// line written back to the L2 model carries data that the program stored at
// that address, and private lines never go back to an older version.
// Runs with the top's default (paper-sized) parameters. Timing: 10 ns clock,
// cycle watchdog.
`timescale 1ns/1ps
module tb_tlr_top;
  import tlr_pkg::*;

  localparam int TOTAL = 6000;        // instructions per thread
  localparam int PA = 1600, PB = 3000, PC = 4200;
  localparam int CW = $clog2(COMMIT_WIDTH + 1);

  logic clk = 0, rst_n = 0, enable = 0;
  order_policy_e policy = POL_STRICT;
  always #5 clk = ~clk;

  logic [NCORES-1:0] c_ev_valid, c_ev_ready, c_acc_en, c_acc_write, c_ld_commit;
  core_ev_t [NCORES-1:0] c_ev;
  core_resp_t [NCORES-1:0] c_resp;
  logic [NCORES-1:0][SET_W-1:0] c_acc_set, v_acc_set;
  logic [NCORES-1:0][WAY_W-1:0] c_acc_way, v_acc_way;
  logic [NCORES-1:0][CW-1:0] c_commit_cnt, v_commit_cnt, v_budget;
  sen_t [NCORES-1:0] c_ld_reply_sen, c_sen, v_sen;
  logic [NCORES-1:0] c_freeze, c_l1_flush, c_rf_wr_en, v_rf_wr_en;
  logic [NCORES-1:0][$clog2(NREGS)-1:0] c_rf_rd_idx, c_rf_wr_idx, v_rf_rd_idx, v_rf_wr_idx;
  logic [NCORES-1:0][REGS_PER_CYCLE-1:0][REG_W-1:0] c_rf_rd_data, c_rf_wr_data;
  logic [NCORES-1:0][REGS_PER_CYCLE-1:0][REG_W-1:0] v_rf_rd_data, v_rf_wr_data;
  logic [NCORES-1:0] c_br_valid, c_br_taken, v_br_valid, v_br_taken;
  logic [NCORES-1:0][15:0] c_br_seq, v_br_seq;
  logic [NCORES-1:0][46:0] c_br_target, v_br_target;
  logic [NCORES-1:0] v_ev_valid, v_ev_ready, v_acc_en, v_acc_write, v_l1_flush;
  core_ev_t [NCORES-1:0] v_ev;
  core_resp_t [NCORES-1:0] v_resp;
  wb_t [NCORES-1:0] v_wb;
  logic [NCORES-1:0] v_wb_ready;
  epoch_t cur_epoch, val_epoch;
  logic validate, rollback_v, rollback_all, sub_adv, epoch_adv, force_strict, br_mismatch;
  logic [NCORES-1:0] v_epoch_adv, c_sig_valid, v_sig_valid, v_waiting;
  logic [31:0] n_subepochs, n_epochs, n_ep_insns, n_ep_pcb, n_ep_subs;
  logic [31:0] n_stall_cycles, n_releases, n_validated, n_v_rollbacks;
  logic [31:0] n_errors, n_strict_waits, n_tight_waits, n_replayed;
  logic [31:0] n_ptr_access, n_bloom_filtered, n_assoc_search;

  tlr_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- shared state of the core / L1 models ------------------
  int  nn [2][NCORES];                 // committed instructions per thread
  int  rbc[2][NCORES];                 // rollbacks seen per core
  bit  lk [2][NCORES];                 // event port lock
  bit  l1v[2][NCORES][L1_SETS];
  bit  l1d[2][NCORES][L1_SETS];
  line_addr_t l1a[2][NCORES][L1_SETS];
  bit  inj_c = 0, inj_v = 0, inj_br = 0;
  int  inj_stage = 0;
  int  n_wb = 0, n_evict = 0, n_snoop_rd = 0, n_snoop_inv = 0, n_tight = 0;
  int  n_brmis = 0, n_restore_c = 0, n_restore_v = 0, n_pcb_supply = 0;
  longint last_p[line_addr_t];

  function automatic logic [REG_W-1:0] rf_val(input int t, input int n, input int i);
    if (i == 0) return REG_W'(n);
    return (64'(n) * 64'h9E3779B97F4A7C15) ^ (64'(i) << 40) ^ (64'(t) << 56);
  endfunction

  // r0 is the instruction count; a restore sets it back
  for (genvar c = 0; c < NCORES; c++) begin : g_rf
    always_comb
      for (int l = 0; l < REGS_PER_CYCLE; l++) begin
        c_rf_rd_data[c][l] = rf_val(c, nn[0][c], int'(c_rf_rd_idx[c]) + l)
                             ^ ((inj_c && c == 2 && l == 1) ? 64'h10 : 64'h0);
        v_rf_rd_data[c][l] = rf_val(c, nn[1][c], int'(v_rf_rd_idx[c]) + l)
                             ^ ((inj_v && c == 3 && l == 1) ? 64'h10 : 64'h0);
      end
    always @(posedge clk) if (rst_n) begin
      if (c_rf_wr_en[c] && c_rf_wr_idx[c] == 0) begin
        nn[0][c] = int'(c_rf_wr_data[c][0]); n_restore_c++;
      end
      if (v_rf_wr_en[c] && v_rf_wr_idx[c] == 0) begin
        nn[1][c] = int'(v_rf_wr_data[c][0]); n_restore_v++;
      end
      if (c_l1_flush[c]) begin
        rbc[0][c]++;
        for (int s = 0; s < L1_SETS; s++) l1v[0][c][s] = 0;
      end
      if (v_l1_flush[c]) begin
        rbc[1][c]++;
        for (int s = 0; s < L1_SETS; s++) l1v[1][c][s] = 0;
      end
    end
  end

  // ---------------- program ------------------------------------------------
  function automatic line_addr_t priv_addr(input int t, input int p);
    int lines = (p < PA || p >= PC) ? 300 : 4;
    return line_addr_t'(32'h1000 * (t + 1) + (p / 8) % lines);
  endfunction
  function automatic line_t sdata(input int t, input int p, input line_addr_t a);
    return {4'hA, 28'(t), 32'(p), 64'(a)};
  endfunction
  function automatic bit shared_phase(input int p);
    return (p >= PA && p < PB) || (p >= PC && p < TOTAL);
  endfunction

  // ---------------- event port ---------------------------------------------
  // returns 0 if a rollback of the wavefront interrupted the event
  task automatic send(input int w, input int u, input int src, input core_ev_e k,
                      input line_addr_t a, input bit hit, input bit shr,
                      input bit dirty, input line_t d, output core_resp_t r);
    int rb0 = rbc[w][u];
    core_ev_t e;
    r = '0;
    while (lk[w][u]) @(posedge clk);
    lk[w][u] = 1;
    e = '0; e.kind = k; e.addr = a; e.set = SET_W'(a); e.way = '0;
    e.l1_hit = hit; e.l1_shared = shr; e.dirty = dirty; e.src = 3'(src); e.line = d;
    if (w == 0) begin c_ev[u] = e; c_ev_valid[u] = 1; end
    else        begin v_ev[u] = e; v_ev_valid[u] = 1; end
    do @(posedge clk);
    while (!(w == 0 ? c_ev_ready[u] : v_ev_ready[u]) && rbc[w][u] == rb0);
    #1;
    if (w == 0) c_ev_valid[u] = 0; else v_ev_valid[u] = 0;
    while (rbc[w][u] == rb0 && !(w == 0 ? c_resp[u].valid : v_resp[u].valid)) begin
      @(posedge clk); #1;
    end
    if (rbc[w][u] == rb0) r = (w == 0) ? c_resp[u] : v_resp[u];
    lk[w][u] = 0;
  endtask

  function automatic bit may_commit(input int w, input int t);
    return w == 0 ? !c_freeze[t] : v_budget[t] != 0;
  endfunction

  task automatic wait_commit(input int w, input int t, input int rb0);
    while (!may_commit(w, t) && rbc[w][t] == rb0 && !stop_all) begin
      @(posedge clk); #1;
    end
  endtask

  // one coherent access of thread t (store or load) to line a
  task automatic access(input int w, input int t, input line_addr_t a,
                        input bit st, input line_t d, input int rb0);
    int s = int'(a[SET_W-1:0]);
    core_resp_t r;
    bit sh = a < 60'h100;
    if (!(l1v[w][t][s] && l1a[w][t][s] == a)) begin
      if (l1v[w][t][s]) begin
        send(w, t, t, EV_EVICT, l1a[w][t][s], 1, 0, l1d[w][t][s], '0, r);
        l1v[w][t][s] = 0; n_evict++;
      end
      if (sh && !st)
        for (int u = 0; u < NCORES; u++)
          if (u != t && rbc[w][t] == rb0) begin
            bit h = l1v[w][u][s] && l1a[w][u][s] == a;
            send(w, u, t, EV_SNOOP_RD, a, h, h && !l1d[w][u][s], 0, '0, r);
            if (r.hit) n_pcb_supply++;
            if (h) l1d[w][u][s] = 0;
            n_snoop_rd++;
          end
      if (rbc[w][t] != rb0) return;
      send(w, t, t, EV_MISS, a, 0, 0, 0, '0, r);
      l1v[w][t][s] = 1; l1a[w][t][s] = a; l1d[w][t][s] = 0;
    end
    if (st) begin
      if (sh)
        for (int u = 0; u < NCORES; u++)
          if (u != t && rbc[w][t] == rb0) begin
            bit h = l1v[w][u][s] && l1a[w][u][s] == a;
            send(w, u, t, EV_SNOOP_INV, a, h, 0, 0, '0, r);
            if (h) l1v[w][u][s] = 0;
            n_snoop_inv++;
          end
      while (!may_commit(w, t) && rbc[w][t] == rb0) begin @(posedge clk); #1; end
      if (rbc[w][t] != rb0) return;
      send(w, t, t, EV_STORE, a, 1, 0, 0, d, r);
      l1d[w][t][s] = 1;
    end
    if (rbc[w][t] != rb0) return;
    if (w == 0) begin
      c_acc_en[t] = 1; c_acc_set[t] = SET_W'(s); c_acc_way[t] = '0; c_acc_write[t] = st;
    end else begin
      v_acc_en[t] = 1; v_acc_set[t] = SET_W'(s); v_acc_way[t] = '0; v_acc_write[t] = st;
    end
  endtask

  task automatic commit_one(input int w, input int t, input int k);
    if (w == 0) c_commit_cnt[t] = CW'(k); else v_commit_cnt[t] = CW'(k);
    @(posedge clk);
    nn[w][t] += k;
    #1;
    if (w == 0) begin c_commit_cnt[t] = '0; c_acc_en[t] = 0; c_br_valid[t] = 0; end
    else        begin v_commit_cnt[t] = '0; v_acc_en[t] = 0; v_br_valid[t] = 0; end
  endtask

  bit done_v[NCORES];
  bit stop_all = 0;

  task automatic run_thread(input int w, input int t);
    while (!stop_all) begin
      int rb0 = rbc[w][t];
      int p = (nn[w][t] / 4 + 1) * 4;
      int k;
      bit brt;
      if (w == 1 && nn[w][t] >= TOTAL + 2 * EPOCH_INSNS) done_v[t] = 1;
      // instructions before p
      while (nn[w][t] < p - 1 && rbc[w][t] == rb0 && !stop_all) begin
        k = 0;
        if (may_commit(w, t)) begin
          k = 1 + $urandom_range(0, 3);
          if (k > p - 1 - nn[w][t]) k = p - 1 - nn[w][t];
          if (w == 1 && k > int'(v_budget[t])) k = int'(v_budget[t]);
        end
        commit_one(w, t, k);
      end
      wait_commit(w, t, rb0);
      if (rbc[w][t] != rb0 || stop_all) continue;
      // memory operations of instruction p; its own store waits until
      // commit is allowed and the commit completes with the store's answer
      if (shared_phase(p) && p % 64 == 20)
        access(w, t, line_addr_t'(60'h50 + (p / 64) % 2), 0, '0, rb0);
      if (shared_phase(p) && p % 64 == 36)
        access(w, t, line_addr_t'(60'h50 + (p / 64) % 2), 1,
               sdata(t, p, line_addr_t'(60'h50 + (p / 64) % 2)), rb0);
      else if (p < TOTAL && p % 8 == 0)
        access(w, t, priv_addr(t, p), 1, sdata(t, p, priv_addr(t, p)), rb0);
      if (rbc[w][t] != rb0) continue;
      if (!(p < TOTAL && p % 8 == 0) && !(shared_phase(p) && p % 64 == 36))
        wait_commit(w, t, rb0);
      else  // a store's commit ignores only the computing commit stall
        while ((w == 0 ? dut.c_freeze_core[t] : v_budget[t] == 0) &&
               rbc[w][t] == rb0) begin
          @(posedge clk); #1;
        end
      if (rbc[w][t] != rb0 || stop_all) continue;
      // branch of instruction p, checked or pushed as it commits
      brt = ^(p * 7 + t);
      if (w == 0) begin
        c_br_valid[t] = 1; c_br_seq[t] = 16'(p / 4); c_br_taken[t] = brt;
        c_br_target[t] = 47'(p * 13 + t);
      end else begin
        if (inj_br && t == 1) begin brt = !brt; inj_br = 0; end
        v_br_valid[t] = 1; v_br_seq[t] = 16'(p / 4); v_br_taken[t] = brt;
        v_br_target[t] = 47'(p * 13 + t);
      end
      commit_one(w, t, 1);
    end
  endtask

  // ---------------- observers ----------------------------------------------
  always @(posedge clk) if (rst_n) begin
    if (br_mismatch) n_brmis++;
    if (dut.rec_valid && |dut.rec.winner) n_tight++;
    for (int c = 0; c < NCORES; c++) begin
      if (c_sig_valid[c] && c == 2 && inj_c) inj_c = 0;
      if (v_sig_valid[c] && c == 3 && inj_v) inj_v = 0;
      if (v_wb[c].valid && v_wb_ready[c]) begin
        line_addr_t a;
        line_t d;
        int tt, pp;
        a = v_wb[c].addr; d = v_wb[c].data;
        tt = int'(d[123:96]); pp = int'(d[95:64]);
        n_wb++;
        checks++;
        if (d[127:124] != 4'hA || d[63:0] != 64'(a) ||
            (a >= 60'h100 && priv_addr(tt, pp) != a) ||
            (a < 60'h100 && !(shared_phase(pp) && pp % 64 == 36))) begin
          failures++;
          $display("FAIL: write-back of %h carries data %h not stored there", a, d);
        end
        if (a >= 60'h100) begin
          checks++;
          if (last_p.exists(a) && longint'(pp) <= last_p[a]) begin
            failures++;
            $display("FAIL: line %h went back from version %0d to %0d", a, last_p[a], pp);
          end
          last_p[a] = longint'(pp);
        end
      end
    end
    // fault injection schedule
    case (inj_stage)
      0: if (nn[1][3] > 700)  begin inj_v = 1; inj_stage = 1; end
      1: if (!inj_v && nn[1][3] > 1200 && nn[0][2] > 1000) begin inj_c = 1; inj_stage = 2; end
      2: if (rollback_all) inj_stage = 3;
      3: begin inj_br = 1; inj_stage = 4; end
      default: ;
    endcase
    if (nn[1][0] >= PC && policy == POL_STRICT) policy = POL_SELECTIVE;
    if (nn[1][0] >= (PC + TOTAL) / 2 && policy == POL_SELECTIVE) policy = POL_BLIND;
  end

  task automatic report();
    $display("cycles=%0d subepochs=%0d epochs=%0d (insns %0d, pcb %0d, subs %0d) stall=%0d releases=%0d",
             cyc, n_subepochs, n_epochs, n_ep_insns, n_ep_pcb, n_ep_subs, n_stall_cycles, n_releases);
    $display("validated=%0d v_rollbacks=%0d errors=%0d strict_waits=%0d tight_waits=%0d replayed=%0d",
             n_validated, n_v_rollbacks, n_errors, n_strict_waits, n_tight_waits, n_replayed);
    $display("ptr=%0d bloom_filtered=%0d assoc=%0d wb=%0d evict=%0d snoop_rd=%0d snoop_inv=%0d supply=%0d tight=%0d brmis=%0d restores c=%0d v=%0d",
             n_ptr_access, n_bloom_filtered, n_assoc_search, n_wb, n_evict, n_snoop_rd,
             n_snoop_inv, n_pcb_supply, n_tight, n_brmis, n_restore_c, n_restore_v);
    check(n_subepochs > 0, "subepoch transitions happened");
    check(n_ep_insns > 0, "an epoch ended on the instruction limit");
    check(n_ep_pcb > 0, "an epoch ended on a full PCB section");
    check(n_ep_subs > 0, "an epoch ended on the subepoch limit");
    check(n_stall_cycles > 0, "commit stalled waiting for an epoch boundary");
    check(n_releases > 0, "sections were released");
    check(n_wb > 0, "validated lines were written back to L2");
    check(n_validated > 0, "epochs were validated");
    check(n_v_rollbacks >= 3, "verification-only rollbacks (fault, branch, first try of the error)");
    check(n_errors == 1, "exactly one full rollback (the computing-core fault)");
    check(n_restore_c > 0 && n_restore_v > 0, "checkpoints were restored on both wavefronts");
    check(n_strict_waits > 0, "strict ordering made a verification core wait");
    check(n_tight_waits > 0, "selective ordering enforced a tight race");
    check(n_tight > 0, "tight races were recorded");
    check(n_replayed > 0, "subepochs were replayed after a rollback");
    check(n_brmis > 0, "a branch outcome mismatch was detected");
    check(n_ptr_access > 0, "index pointers located PCB entries");
    check(n_bloom_filtered > 0, "the bloom filter avoided searches");
    check(n_assoc_search > 0, "associative PCB searches happened");
    check(n_evict > 0 && n_snoop_rd > 0 && n_snoop_inv > 0, "L1 evictions and snoops happened");
    check(n_pcb_supply > 0, "the PCB supplied a line to another core");
  endtask

  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (cyc % 20000 == 0)
      $display("progress cycle %0d: c %0d %0d v %0d %0d epochs %0d validated %0d vrb %0d err %0d",
               cyc, nn[0][0], nn[0][5], nn[1][0], nn[1][5], n_epochs, n_validated, n_v_rollbacks, n_errors);
    if (cyc > 150_000) begin
      $display("FAIL: watchdog at cycle %0d (v progress %0d %0d)", cyc, nn[1][0], nn[1][7]);
      failures++;
      report();
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    c_ev_valid = '0; v_ev_valid = '0; c_ev = '0; v_ev = '0;
    c_acc_en = '0; v_acc_en = '0; c_acc_write = '0; v_acc_write = '0;
    c_acc_set = '0; v_acc_set = '0; c_acc_way = '0; v_acc_way = '0;
    c_commit_cnt = '0; v_commit_cnt = '0; c_ld_commit = '0; c_ld_reply_sen = '0;
    c_br_valid = '0; v_br_valid = '0; c_br_seq = '0; v_br_seq = '0;
    c_br_taken = '0; v_br_taken = '0; c_br_target = '0; v_br_target = '0;
    v_wb_ready = '1;
    for (int w = 0; w < 2; w++)
      for (int c = 0; c < NCORES; c++) begin
        nn[w][c] = 0; rbc[w][c] = 0; lk[w][c] = 0;
        for (int s = 0; s < L1_SETS; s++) begin l1v[w][c][s] = 0; l1d[w][c][s] = 0; end
      end
    for (int c = 0; c < NCORES; c++) done_v[c] = 0;
    repeat (5) @(posedge clk);
    #1 rst_n = 1; enable = 1;
    for (int c = 0; c < NCORES; c++) begin
      fork
        automatic int cc = c;
        begin run_thread(0, cc); end
        begin run_thread(1, cc); end
      join_none
    end
    wait (done_v[0] && done_v[1] && done_v[2] && done_v[3] &&
          done_v[4] && done_v[5] && done_v[6] && done_v[7]);
    repeat (200) @(posedge clk);
    stop_all = 1;
    repeat (20) @(posedge clk);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

