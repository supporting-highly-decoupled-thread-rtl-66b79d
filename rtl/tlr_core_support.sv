// tlr_core_support: the redundancy support attached to one core.
//
// It sits beside the core and its L1 data cache and never on their critical
// path. It holds the core's post-commit buffer (pcb), the bloom filter in
// front of it, the index pointers from L1 lines to PCB copies, the subepoch
// race tracker, the checkpoint unit and the epoch signature. The L1
// controller reports one event at a time (ev/ev_valid/ev_ready):
//   EV_STORE     committed store: follow the index pointer, or allocate a new
//                PCB entry (superseding an older-epoch copy); stalls with
//                ev_ready low while the current section is full.
//   EV_MISS      local refill: if the bloom filter allows, search the PCB;
//                a hit re-establishes the pointer and supplies the newest data.
//   EV_EVICT     L1 eviction: unmap the PCB copy, save the current subepoch
//                number in it and set its bloom bit; else mark the set evicted.
//   EV_SNOOP_INV remote invalidation: through the pointer when the L1 has the
//                line, else a filtered associative search; Valid copies of the
//                current section become Invalid, older ones Superseded.
//   EV_SNOOP_RD  remote read: for a shared L1 line the pointer tells whether
//                this core still owns the data in its PCB; for an L1 miss a
//                filtered search; the PCB copy is returned on resp.
// Each event takes three cycles (latch, PCB request, PCB response) and its
// answer appears on resp. Snoops also go to the race tracker.
// At epoch_adv the core checkpoints its registers (commit frozen for 16
// cycles, freeze high), then walks the closed PCB section in the background
// (ep_busy stays high until the signature is out; no new epoch may start); registers, lines
// and the line count form the epoch signature (sig_valid/sig/sig_epoch).
// On rollback the unvalidated PCB sections are discarded, the registers are
// reloaded from the checkpoint of the oldest unvalidated epoch, the L1 is
// flushed (l1_flush) and all index pointers are nulled. One checkpoint is
// taken after reset so that epoch 0 can be rolled back.
// IS_VERIF selects the verification role: only that wavefront writes
// validated lines back to the L2 (wb).
// The event format and the three-cycle event sequence are this design's
// choices; the actions per event follow the described PCB protocol.
module tlr_core_support
  import tlr_pkg::*;
#(
  parameter bit IS_VERIF = 1'b0
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // L1 controller events
  input  logic                                 ev_valid,
  input  core_ev_t                             ev,
  output logic                                 ev_ready,
  output core_resp_t                           resp,
  // local access and commit information
  input  logic                                 acc_en,
  input  logic [SET_W-1:0]                     acc_set,
  input  logic [WAY_W-1:0]                     acc_way,
  input  logic                                 acc_write,
  input  logic [$clog2(COMMIT_WIDTH+1)-1:0]    commit_cnt,
  input  logic                                 ld_commit,
  input  sen_t                                 ld_reply_sen,
  // wavefront control
  input  logic                                 sub_adv,
  input  logic                                 epoch_adv,
  input  logic                                 validate,
  input  logic                                 release_req,
  input  logic                                 rollback,
  output logic                                 trans_req,
  output logic                                 trans_tight,
  output logic [NCORES-1:0]                    trans_loser,
  output logic [CNT_W-1:0]                     sub_count,
  output logic                                 epoch_req,
  output sen_t                                 sen,
  output logic                                 freeze,
  output logic                                 ep_busy,
  output logic                                 l1_flush,
  // status
  output epoch_t                               cur_epoch,
  output epoch_t                               val_epoch,
  output epoch_t                               rel_epoch,
  output logic                                 next_free,
  output logic [IDX_W:0]                       pcb_used,
  output logic                                 release_done,
  // L2 write-back
  output wb_t                                  wb,
  input  logic                                 wb_ready,
  // register file port of the core
  output logic [$clog2(NREGS)-1:0]             rf_rd_idx,
  input  logic [REGS_PER_CYCLE-1:0][REG_W-1:0] rf_rd_data,
  output logic                                 rf_wr_en,
  output logic [$clog2(NREGS)-1:0]             rf_wr_idx,
  output logic [REGS_PER_CYCLE-1:0][REG_W-1:0] rf_wr_data,
  // epoch signature
  output logic                                 sig_valid,
  output logic [SIG_W-1:0]                     sig,
  output epoch_t                               sig_epoch,
  // activity counters (for observation)
  output logic [31:0]                          n_ptr_access,
  output logic [31:0]                          n_bloom_filtered,
  output logic [31:0]                          n_assoc_search
);

  // ---------------- sub-blocks -------------------------------------------
  pcb_req_t  preq;
  logic      preq_valid;
  pcb_resp_t presp;
  logic      cur_full, busy_bg;
  logic      walk_req, walk_valid, walk_done;
  line_addr_t walk_addr;
  line_t     walk_data;
  epoch_t    walk_epoch;

  pcb u_pcb (
    .clk, .rst_n,
    .req_valid(preq_valid), .req(preq), .resp(presp),
    .epoch_adv, .validate, .release_req, .rollback,
    .wb_en(IS_VERIF), .wb, .wb_ready, .release_done,
    .walk_req, .walk_epoch, .walk_valid, .walk_addr, .walk_data, .walk_done,
    .cur_epoch, .val_epoch, .rel_epoch, .cur_full, .cur_used(pcb_used),
    .next_free, .busy_bg
  );

  line_addr_t              bq_addr, bs_addr;
  logic                    bq_hit, bs_en, bc_en;
  logic [PCB_SECTIONS-1:0] bq_bits, bsat;
  logic [SEC_W-1:0]        bs_sec, bc_sec;

  pcb_bloom_filter u_bloom (
    .clk, .rst_n,
    .q_addr(bq_addr), .q_hit(bq_hit), .q_bits(bq_bits),
    .set_en(bs_en), .set_addr(bs_addr), .set_sec(bs_sec),
    .clr_en(bc_en), .clr_sec(bc_sec), .sat_mask(bsat)
  );

  pcb_ptr_t ip_rd, ip_wr;
  logic     ip_we;

  core_ev_t ev_q;

  index_pointer_table u_ipt (
    .clk, .rst_n,
    .rd_set(ev_q.set), .rd_way(ev_q.way), .rd_ptr(ip_rd),
    .wr_en(ip_we), .wr_set(ev_q.set), .wr_way(ev_q.way), .wr_ptr(ip_wr),
    .clr_all(rollback)
  );

  logic tr_snp_en, tr_ev_en, tr_ev_has_pcb, line_accessed, ep_insns_full;

  subepoch_tracker u_trk (
    .clk, .rst_n,
    .acc_en, .acc_set, .acc_way, .acc_write,
    .snp_en(tr_snp_en), .snp_write(ev_q.kind == EV_SNOOP_INV),
    .snp_l1_hit(ev_q.l1_hit), .snp_set(ev_q.set), .snp_way(ev_q.way),
    .snp_src(ev_q.src), .snp_pcb_senv(presp.sen_valid && presp.hit),
    .snp_pcb_sen(presp.sen),
    .ev_en(tr_ev_en), .ev_set(ev_q.set), .ev_way(ev_q.way),
    .ev_has_pcb(tr_ev_has_pcb),
    .commit_cnt, .ld_commit, .ld_reply_sen,
    .sub_adv, .epoch_adv, .sen, .trans_req, .trans_tight, .trans_loser,
    .sub_count, .epoch_insns_full(ep_insns_full), .line_accessed
  );

  logic ck_save, ck_restore, ck_busy, ck_done, ck_sig_valid;
  logic [$clog2(CKPT_SLOTS)-1:0] ck_slot;
  logic [REGS_PER_CYCLE-1:0][REG_W-1:0] ck_sig_words;

  checkpoint_unit u_ckpt (
    .clk, .rst_n,
    .save_start(ck_save), .restore_start(ck_restore), .slot(ck_slot),
    .busy(ck_busy), .done(ck_done),
    .rf_rd_idx, .rf_rd_data, .rf_wr_en, .rf_wr_idx, .rf_wr_data,
    .sig_valid(ck_sig_valid), .sig_words(ck_sig_words)
  );

  logic sg_clear, sg_valid;
  logic [REGS_PER_CYCLE-1:0][REG_W-1:0] sg_words;

  epoch_signature u_sig (
    .clk, .rst_n, .clear(sg_clear), .in_valid(sg_valid),
    .in_words(sg_words), .sig
  );

  // ---------------- epoch boundary / rollback sequencer -------------------
  typedef enum logic [2:0] {
    SQ_INIT, SQ_RUN, SQ_CKPT, SQ_WALK, SQ_FINAL, SQ_RESTORE
  } sq_e;
  sq_e       sq;
  logic [15:0] line_cnt;
  logic      restore_go;

  function automatic logic [$clog2(CKPT_SLOTS)-1:0] slot_of(input epoch_t e);
    return ($clog2(CKPT_SLOTS))'(e % EPOCH_W'(CKPT_SLOTS));
  endfunction

  always_comb begin
    ck_save    = 1'b0;
    ck_restore = 1'b0;
    ck_slot    = slot_of(cur_epoch);
    sg_clear   = 1'b0;
    sg_valid   = 1'b0;
    sg_words   = '0;
    walk_req   = 1'b0;
    walk_epoch = cur_epoch - 1'b1;
    if (rollback) begin
      ck_slot = slot_of(val_epoch);
    end else if (sq == SQ_INIT) begin
      ck_save = 1'b1;
      ck_slot = '0;
    end else if (restore_go && !ck_busy) begin
      ck_restore = 1'b1;
      ck_slot    = slot_of(cur_epoch);  // equals the validated epoch now
    end else if (epoch_adv) begin
      ck_save  = 1'b1;
      ck_slot  = slot_of(cur_epoch + 1'b1);
      sg_clear = 1'b1;
    end
    if (sq == SQ_CKPT) begin
      sg_valid = ck_sig_valid;
      sg_words = ck_sig_words;
      walk_req = ck_done;
    end else if (sq == SQ_WALK && walk_valid) begin
      sg_valid    = 1'b1;
      sg_words[0] = REG_W'(walk_addr);
      sg_words[1] = walk_data[LINE_BITS-1 -: 64];
      sg_words[2] = walk_data[63:0];
    end else if (sq == SQ_FINAL) begin
      sg_valid    = 1'b1;
      sg_words[0] = REG_W'(line_cnt);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sq         <= SQ_INIT;
      line_cnt   <= '0;
      sig_valid  <= 1'b0;
      sig_epoch  <= '0;
      restore_go <= 1'b0;
      l1_flush   <= 1'b0;
    end else begin
      sig_valid  <= 1'b0;
      l1_flush   <= 1'b0;
      if (restore_go && !ck_busy) restore_go <= 1'b0;
      if (rollback) begin
        sq         <= SQ_RESTORE;
        restore_go <= 1'b1;
        l1_flush   <= 1'b1;
      end else begin
        unique case (sq)
          SQ_INIT:  if (ck_busy) sq <= SQ_RESTORE;  // reuse: wait for done
          SQ_RUN: if (epoch_adv) begin
            sq        <= SQ_CKPT;
            sig_epoch <= cur_epoch;
            line_cnt  <= '0;
          end
          SQ_CKPT:  if (ck_done) sq <= SQ_WALK;
          SQ_WALK: begin
            if (walk_valid) line_cnt <= line_cnt + 1'b1;
            if (walk_done) sq <= SQ_FINAL;
          end
          SQ_FINAL: begin
            sq        <= SQ_RUN;
            sig_valid <= 1'b1;
          end
          SQ_RESTORE: if (!ck_busy && !restore_go) sq <= SQ_RUN;
          default: sq <= SQ_RUN;
        endcase
      end
    end
  end

  // bloom filter maintenance
  always_comb begin
    bc_en  = release_done;
    bc_sec = SEC_W'(rel_epoch - 1'b1);
    bsat   = '0;
    if (l1_flush)
      for (int s = 0; s < PCB_SECTIONS; s++)
        bsat[s] = EPOCH_W'(SEC_W'(s) - rel_epoch[SEC_W-1:0]) <
                  EPOCH_W'(val_epoch - rel_epoch);
  end

  // ---------------- event sequencer ---------------------------------------
  typedef enum logic [1:0] {EV_IDLE, EV_EXEC, EV_WAIT, EV_RETRY} evs_e;
  evs_e evs;
  logic op_issued;
  pcb_resp_t pr;
  assign pr = op_issued ? presp : '0;

  assign ev_ready  = evs == EV_IDLE && sq == SQ_RUN && !rollback;
  assign epoch_req = ep_insns_full || cur_full;
  assign freeze    = sq == SQ_INIT || sq == SQ_RESTORE || ck_busy;
  // a store between acceptance and its PCB write also holds the epoch
  assign ep_busy   = sq != SQ_RUN || ck_busy ||
                     (ev_q.kind == EV_STORE && (evs == EV_EXEC || evs == EV_WAIT)) ||
                     (ev_valid && ev.kind == EV_STORE && evs == EV_IDLE);
  assign bq_addr   = ev_q.addr;

  always_comb begin
    preq       = '0;
    preq.addr  = ev_q.addr;
    preq.ptr   = ip_rd;
    preq.data  = ev_q.line;
    preq.sen   = sen;
    preq_valid = 1'b0;
    if (evs == EV_EXEC) begin
      unique case (ev_q.kind)
        EV_STORE: preq.op = PCB_OP_STORE;
        EV_MISS:  if (bq_hit) begin preq.op = PCB_OP_SEARCH; preq.act = SA_MAP; end
        EV_EVICT: if (ip_rd.valid) preq.op = PCB_OP_UNMAP;
        EV_SNOOP_INV:
          if (ev_q.l1_hit) begin
            if (ip_rd.valid) preq.op = PCB_OP_INV_PTR;
          end else if (bq_hit) begin
            preq.op = PCB_OP_SEARCH; preq.act = SA_INV;
          end
        EV_SNOOP_RD:
          if (ev_q.l1_hit) begin
            if (ev_q.l1_shared && ip_rd.valid) preq.op = PCB_OP_RD_PTR;
          end else if (bq_hit) begin
            preq.op = PCB_OP_SEARCH; preq.act = SA_NONE;
          end
        default: ;
      endcase
      preq_valid = preq.op != PCB_OP_NONE;
    end
  end

  // actions when the PCB answer is back
  logic store_full;
  assign store_full = evs == EV_WAIT && ev_q.kind == EV_STORE && pr.full;
  always_comb begin
    ip_we         = 1'b0;
    ip_wr         = '0;
    bs_en         = 1'b0;
    bs_addr       = ev_q.addr;
    bs_sec        = pr.ptr.sec;
    tr_snp_en     = 1'b0;
    tr_ev_en      = 1'b0;
    tr_ev_has_pcb = pr.hit;
    if (evs == EV_WAIT) begin
      unique case (ev_q.kind)
        EV_STORE: if (!pr.full) begin ip_we = 1'b1; ip_wr = pr.ptr; end
        EV_MISS:  begin ip_we = 1'b1; ip_wr = pr.hit ? pr.ptr : '0; end
        EV_EVICT: begin
          ip_we    = 1'b1;
          ip_wr    = '0;
          bs_en    = pr.hit;
          tr_ev_en = 1'b1;
        end
        EV_SNOOP_INV: begin
          tr_snp_en = 1'b1;
          if (ev_q.l1_hit) ip_we = 1'b1;   // the L1 drops the line
        end
        EV_SNOOP_RD: tr_snp_en = 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      evs              <= EV_IDLE;
      ev_q             <= '0;
      op_issued        <= 1'b0;
      resp             <= '0;
      n_ptr_access     <= '0;
      n_bloom_filtered <= '0;
      n_assoc_search   <= '0;
    end else begin
      resp <= '0;
      unique case (evs)
        EV_IDLE: if (ev_valid && ev_ready) begin
          ev_q <= ev;
          evs  <= EV_EXEC;
        end
        EV_EXEC: begin
          op_issued <= preq_valid;
          evs       <= EV_WAIT;
          if (preq_valid && preq.op == PCB_OP_SEARCH)
            n_assoc_search <= n_assoc_search + 1'b1;
          else if (preq_valid)
            n_ptr_access <= n_ptr_access + 1'b1;
          else if (ev_q.kind == EV_MISS ||
                   (!ev_q.l1_hit && (ev_q.kind == EV_SNOOP_INV ||
                                     ev_q.kind == EV_SNOOP_RD)))
            n_bloom_filtered <= n_bloom_filtered + 1'b1;
        end
        EV_WAIT: begin
          if (store_full) begin
            evs <= EV_RETRY;
          end else begin
            evs       <= EV_IDLE;
            resp.valid <= 1'b1;
            resp.hit   <= pr.hit && ev_q.kind != EV_STORE &&
                          ev_q.kind != EV_EVICT && ev_q.kind != EV_SNOOP_INV;
            resp.data  <= pr.data;
            resp.sen   <= sen;
          end
        end
        EV_RETRY:
          // section full: retry once the next epoch has opened
          if (!cur_full) evs <= EV_EXEC;
        default: evs <= EV_IDLE;
      endcase
      if (rollback) evs <= EV_IDLE;
    end
  end

  // epoch boundaries are only signalled while the core is running
  assert property (@(posedge clk) disable iff (!rst_n) epoch_adv |-> !ep_busy);

  // unused status of the bloom query (per-section bits) and background flag
  logic unused;
  assign unused = ^{bq_bits, busy_bg, line_accessed};

endmodule
