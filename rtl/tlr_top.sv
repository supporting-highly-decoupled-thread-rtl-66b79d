// tlr_top: thread-level redundancy support for a 16-core chip multiprocessor.
//
// Every thread of a parallel program runs twice: once on a core of the
// computing wavefront (cores c0..c7) and, trailing behind, once on a core of
// the verification wavefront (cores v0..v7). Each wavefront has its own
// private L1 caches and coherence, so the memory logic is exercised twice;
// only validated data reaches the shared L2. This block holds everything the
// redundancy adds around the (unmodified) cores and caches:
//   - one tlr_core_support per core: post-commit buffer, bloom filter, index
//     pointers, race tracker, checkpoint unit and epoch signature;
//   - epoch_controller: epoch and subepoch boundaries of the computing
//     wavefront and the release (write-back) of old PCB sections;
//   - order_enforcer: makes the verification cores replay the subepoch order
//     recorded by the computing wavefront (strict, selective or blind);
//   - epoch_validator: compares per-thread signatures, validates epochs and
//     orders verification-only or full rollbacks;
//   - one branch_info_queue per thread pair: branch outcomes flow from the
//     computing to the verification copy and an early divergence aborts the
//     epoch.
// The cores, L1 controllers and L2 are outside: their side of every
// connection is a port. Per-core buses are arrays indexed by thread number.
// Core side, per cycle: the L1 controller of each core offers one event
// (ev_valid/ev, accepted with ev_ready, answered on resp three cycles later),
// reports local accesses (acc_*), committed instructions (commit_cnt) and
// committed loads with the subepoch number of their data reply. Computing
// cores must not commit while c_freeze is high; verification cores may commit
// at most v_budget instructions per cycle. *_l1_flush asks the L1 to drop all
// lines after a rollback. The register file port (rf_*) serves checkpoints.
// Verification cores write validated lines to the L2 through v_wb.
module tlr_top
  import tlr_pkg::*;
(
  input  logic                                         clk,
  input  logic                                         rst_n,
  input  logic                                         enable,
  input  order_policy_e                                policy,
  // computing wavefront cores
  input  logic       [NCORES-1:0]                      c_ev_valid,
  input  core_ev_t   [NCORES-1:0]                      c_ev,
  output logic       [NCORES-1:0]                      c_ev_ready,
  output core_resp_t [NCORES-1:0]                      c_resp,
  input  logic       [NCORES-1:0]                      c_acc_en,
  input  logic       [NCORES-1:0][SET_W-1:0]           c_acc_set,
  input  logic       [NCORES-1:0][WAY_W-1:0]           c_acc_way,
  input  logic       [NCORES-1:0]                      c_acc_write,
  input  logic       [NCORES-1:0][$clog2(COMMIT_WIDTH+1)-1:0] c_commit_cnt,
  input  logic       [NCORES-1:0]                      c_ld_commit,
  input  sen_t       [NCORES-1:0]                      c_ld_reply_sen,
  output logic       [NCORES-1:0]                      c_freeze,
  output logic       [NCORES-1:0]                      c_l1_flush,
  output sen_t       [NCORES-1:0]                      c_sen,
  output logic       [NCORES-1:0][$clog2(NREGS)-1:0]   c_rf_rd_idx,
  input  logic       [NCORES-1:0][REGS_PER_CYCLE-1:0][REG_W-1:0] c_rf_rd_data,
  output logic       [NCORES-1:0]                      c_rf_wr_en,
  output logic       [NCORES-1:0][$clog2(NREGS)-1:0]   c_rf_wr_idx,
  output logic       [NCORES-1:0][REGS_PER_CYCLE-1:0][REG_W-1:0] c_rf_wr_data,
  input  logic       [NCORES-1:0]                      c_br_valid,
  input  logic       [NCORES-1:0][15:0]                c_br_seq,
  input  logic       [NCORES-1:0]                      c_br_taken,
  input  logic       [NCORES-1:0][46:0]                c_br_target,
  // verification wavefront cores
  input  logic       [NCORES-1:0]                      v_ev_valid,
  input  core_ev_t   [NCORES-1:0]                      v_ev,
  output logic       [NCORES-1:0]                      v_ev_ready,
  output core_resp_t [NCORES-1:0]                      v_resp,
  input  logic       [NCORES-1:0]                      v_acc_en,
  input  logic       [NCORES-1:0][SET_W-1:0]           v_acc_set,
  input  logic       [NCORES-1:0][WAY_W-1:0]           v_acc_way,
  input  logic       [NCORES-1:0]                      v_acc_write,
  input  logic       [NCORES-1:0][$clog2(COMMIT_WIDTH+1)-1:0] v_commit_cnt,
  output logic       [NCORES-1:0][$clog2(COMMIT_WIDTH+1)-1:0] v_budget,
  output logic       [NCORES-1:0]                      v_l1_flush,
  output sen_t       [NCORES-1:0]                      v_sen,
  output logic       [NCORES-1:0][$clog2(NREGS)-1:0]   v_rf_rd_idx,
  input  logic       [NCORES-1:0][REGS_PER_CYCLE-1:0][REG_W-1:0] v_rf_rd_data,
  output logic       [NCORES-1:0]                      v_rf_wr_en,
  output logic       [NCORES-1:0][$clog2(NREGS)-1:0]   v_rf_wr_idx,
  output logic       [NCORES-1:0][REGS_PER_CYCLE-1:0][REG_W-1:0] v_rf_wr_data,
  input  logic       [NCORES-1:0]                      v_br_valid,
  input  logic       [NCORES-1:0][15:0]                v_br_seq,
  input  logic       [NCORES-1:0]                      v_br_taken,
  input  logic       [NCORES-1:0][46:0]                v_br_target,
  // L2 write-back of validated lines (verification wavefront)
  output wb_t        [NCORES-1:0]                      v_wb,
  input  logic       [NCORES-1:0]                      v_wb_ready,
  // status
  output epoch_t                                       cur_epoch,
  output epoch_t                                       val_epoch,
  output logic                                         validate,
  output logic                                         rollback_v,
  output logic                                         rollback_all,
  output logic                                         sub_adv,
  output logic                                         epoch_adv,
  output logic       [NCORES-1:0]                      v_epoch_adv,
  output logic       [NCORES-1:0]                      c_sig_valid,
  output logic       [NCORES-1:0]                      v_sig_valid,
  output logic                                         force_strict,
  output logic       [NCORES-1:0]                      v_waiting,
  output logic                                         br_mismatch,
  output logic [31:0] n_subepochs, n_epochs, n_ep_insns, n_ep_pcb, n_ep_subs,
  output logic [31:0] n_stall_cycles, n_releases, n_validated, n_v_rollbacks,
  output logic [31:0] n_errors, n_strict_waits, n_tight_waits, n_replayed,
  output logic [31:0] n_ptr_access, n_bloom_filtered, n_assoc_search
);

  // ---------------- computing wavefront -----------------------------------
  logic [NCORES-1:0]             c_trans_req, c_trans_tight, c_epoch_req;
  logic [NCORES-1:0][NCORES-1:0] c_trans_loser;
  logic [NCORES-1:0][CNT_W-1:0]  c_sub_count;
  logic [NCORES-1:0]             c_core_busy, c_next_free, c_rel_done;
  logic [NCORES-1:0]             c_insns_full;
  epoch_t [NCORES-1:0]           c_cur, c_val, c_rel, v_cur, v_val, v_rel;
  logic [NCORES-1:0][SIG_W-1:0]  c_sig, v_sig;
  epoch_t [NCORES-1:0]           c_sig_ep, v_sig_ep;
  logic [NCORES-1:0][IDX_W:0]    c_used, v_used;
  logic [NCORES-1:0][31:0]       c_np, c_nb, c_ns, v_np, v_nb, v_ns;
  wb_t  [NCORES-1:0]             c_wb;
  logic                          c_release_req, v_release_req, commit_stall;
  logic                          rec_valid;
  sub_rec_t                      rec;
  logic [NCORES-1:0]             c_freeze_core, c_ep_busy, v_ep_busy;
  logic [NCORES-1:0]             v_rel_done, v_freeze_core;

  for (genvar c = 0; c < NCORES; c++) begin : g_c
    tlr_core_support #(.IS_VERIF(1'b0)) u_sup (
      .clk, .rst_n,
      .ev_valid(c_ev_valid[c]), .ev(c_ev[c]), .ev_ready(c_ev_ready[c]),
      .resp(c_resp[c]),
      .acc_en(c_acc_en[c]), .acc_set(c_acc_set[c]), .acc_way(c_acc_way[c]),
      .acc_write(c_acc_write[c]), .commit_cnt(c_commit_cnt[c]),
      .ld_commit(c_ld_commit[c]), .ld_reply_sen(c_ld_reply_sen[c]),
      .sub_adv, .epoch_adv, .validate, .release_req(c_release_req),
      .rollback(rollback_all),
      .trans_req(c_trans_req[c]), .trans_tight(c_trans_tight[c]),
      .trans_loser(c_trans_loser[c]), .sub_count(c_sub_count[c]),
      .epoch_req(c_epoch_req[c]), .sen(c_sen[c]), .freeze(c_freeze_core[c]), .ep_busy(c_ep_busy[c]),
      .l1_flush(c_l1_flush[c]),
      .cur_epoch(c_cur[c]), .val_epoch(c_val[c]), .rel_epoch(c_rel[c]),
      .next_free(c_next_free[c]), .pcb_used(c_used[c]),
      .release_done(c_rel_done[c]),
      .wb(c_wb[c]), .wb_ready(1'b1),
      .rf_rd_idx(c_rf_rd_idx[c]), .rf_rd_data(c_rf_rd_data[c]),
      .rf_wr_en(c_rf_wr_en[c]), .rf_wr_idx(c_rf_wr_idx[c]),
      .rf_wr_data(c_rf_wr_data[c]),
      .sig_valid(c_sig_valid[c]), .sig(c_sig[c]), .sig_epoch(c_sig_ep[c]),
      .n_ptr_access(c_np[c]), .n_bloom_filtered(c_nb[c]),
      .n_assoc_search(c_ns[c])
    );
    assign c_core_busy[c]  = c_ep_busy[c];
    assign c_freeze[c]     = c_freeze_core[c] || commit_stall;
    // an epoch that ends on instruction count (rather than a full section)
    assign c_insns_full[c] = c_epoch_req[c] && c_used[c] != (IDX_W+1)'(PCB_ENTRIES);
  end

  epoch_controller u_ectl (
    .clk, .rst_n, .enable,
    .trans_req(c_trans_req), .trans_tight(c_trans_tight),
    .trans_loser(c_trans_loser), .sub_count(c_sub_count),
    .epoch_req(c_epoch_req), .insns_full(c_insns_full),
    .core_busy(c_core_busy), .next_free(&c_next_free),
    .cur_epoch(c_cur[0]), .val_epoch(c_val[0]), .rel_epoch(c_rel[0]),
    .rollback_all, .v_release_done(v_rel_done), .c_release_done(c_rel_done),
    .sub_adv, .epoch_adv, .commit_stall, .rec_valid, .rec,
    .v_release_req, .c_release_req,
    .n_subepochs, .n_epochs, .n_ep_insns, .n_ep_pcb, .n_ep_subs,
    .n_stall_cycles, .n_releases
  );

  // ---------------- verification wavefront --------------------------------
  logic [NCORES-1:0] v_unused_tr, v_unused_er;
  logic [NCORES-1:0] v_unused_nf, v_unused_tt;
  logic [NCORES-1:0][NCORES-1:0] v_unused_tl;
  logic [NCORES-1:0][CNT_W-1:0]  v_unused_sc;
  logic [NCORES-1:0][$clog2(COMMIT_WIDTH+1)-1:0] v_budget_raw;
  logic rollback_vwf;
  assign rollback_vwf = rollback_v || rollback_all;

  for (genvar c = 0; c < NCORES; c++) begin : g_v
    tlr_core_support #(.IS_VERIF(1'b1)) u_sup (
      .clk, .rst_n,
      .ev_valid(v_ev_valid[c]), .ev(v_ev[c]), .ev_ready(v_ev_ready[c]),
      .resp(v_resp[c]),
      .acc_en(v_acc_en[c]), .acc_set(v_acc_set[c]), .acc_way(v_acc_way[c]),
      .acc_write(v_acc_write[c]), .commit_cnt(v_commit_cnt[c]),
      .ld_commit(1'b0), .ld_reply_sen('0),
      .sub_adv(v_epoch_adv[c]), .epoch_adv(v_epoch_adv[c]), .validate,
      .release_req(v_release_req), .rollback(rollback_vwf),
      .trans_req(v_unused_tr[c]), .trans_tight(v_unused_tt[c]),
      .trans_loser(v_unused_tl[c]), .sub_count(v_unused_sc[c]),
      .epoch_req(v_unused_er[c]), .sen(v_sen[c]), .freeze(v_freeze_core[c]), .ep_busy(v_ep_busy[c]),
      .l1_flush(v_l1_flush[c]),
      .cur_epoch(v_cur[c]), .val_epoch(v_val[c]), .rel_epoch(v_rel[c]),
      .next_free(v_unused_nf[c]), .pcb_used(v_used[c]),
      .release_done(v_rel_done[c]),
      .wb(v_wb[c]), .wb_ready(v_wb_ready[c]),
      .rf_rd_idx(v_rf_rd_idx[c]), .rf_rd_data(v_rf_rd_data[c]),
      .rf_wr_en(v_rf_wr_en[c]), .rf_wr_idx(v_rf_wr_idx[c]),
      .rf_wr_data(v_rf_wr_data[c]),
      .sig_valid(v_sig_valid[c]), .sig(v_sig[c]), .sig_epoch(v_sig_ep[c]),
      .n_ptr_access(v_np[c]), .n_bloom_filtered(v_nb[c]),
      .n_assoc_search(v_ns[c])
    );
    assign v_budget[c] = v_freeze_core[c] ? '0 : v_budget_raw[c];
  end

  logic log_full;
  order_enforcer u_ord (
    .clk, .rst_n, .policy, .force_strict,
    .rec_valid, .rec, .hold(v_ep_busy), .commit_cnt(v_commit_cnt),
    .commit_budget(v_budget_raw), .v_epoch_adv,
    .validate, .rollback_v, .rollback_all,
    .log_full, .waiting(v_waiting),
    .n_strict_waits, .n_tight_waits, .n_replayed
  );

  // ---------------- branch outcome queues ---------------------------------
  logic [NCORES-1:0] bq_mis, bq_chk;
  logic [NCORES-1:0][$clog2(16):0] bq_cnt;
  logic [NCORES-1:0][15:0]         bq_drop;
  for (genvar c = 0; c < NCORES; c++) begin : g_bq
    branch_info_queue u_bq (
      .clk, .rst_n, .flush(rollback_all),
      .push(c_br_valid[c]), .push_seq(c_br_seq[c]),
      .push_taken(c_br_taken[c]), .push_target(c_br_target[c]),
      .chk(v_br_valid[c] && !v_freeze_core[c]), .chk_seq(v_br_seq[c]),
      .chk_taken(v_br_taken[c]), .chk_target(v_br_target[c]),
      .mismatch(bq_mis[c]), .checked(bq_chk[c]),
      .count(bq_cnt[c]), .dropped(bq_drop[c])
    );
  end
  assign br_mismatch = |bq_mis;

  // ---------------- validation --------------------------------------------
  logic c_buf_full;
  epoch_validator u_val (
    .clk, .rst_n,
    .c_sig_valid, .c_sig, .v_sig_valid, .v_sig, .br_mismatch,
    .validate, .rollback_v, .rollback_all, .force_strict, .c_buf_full,
    .n_validated, .n_v_rollbacks, .n_errors
  );

  assign cur_epoch = c_cur[0];
  assign val_epoch = c_val[0];

  always_comb begin
    n_ptr_access = '0; n_bloom_filtered = '0; n_assoc_search = '0;
    for (int c = 0; c < NCORES; c++) begin
      n_ptr_access     = n_ptr_access + c_np[c] + v_np[c];
      n_bloom_filtered = n_bloom_filtered + c_nb[c] + v_nb[c];
      n_assoc_search   = n_assoc_search + c_ns[c] + v_ns[c];
    end
  end

  // signals kept for observation only
  logic unused;
  assign unused = ^{c_wb, c_sig_ep, v_sig_ep, v_cur, v_val, v_rel, c_val,
                    c_rel, c_cur, v_used, v_unused_tr, v_unused_er,
                    v_unused_nf, v_unused_tt, v_unused_tl, v_unused_sc,
                    bq_chk, log_full, c_buf_full, bq_cnt, bq_drop};

endmodule
