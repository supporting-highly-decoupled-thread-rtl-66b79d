// order_enforcer: replays the computing wavefront's subepoch order in the
// verification wavefront.
//
// The computing side records, for every wavefront-wide subepoch, how many
// instructions each core committed in it, which cores won and lost a tight
// race at its end, and whether it closed an epoch (rec_valid/rec). The
// records are kept in a ring of DEPTH entries until their epoch is validated,
// so that a rolled-back epoch can be replayed. Each verification core walks
// the ring at its own pace: it may commit only the instructions left in its
// current subepoch (commit_budget, at most COMMIT_WIDTH per cycle; 0 freezes
// its commit stage) and, having finished subepoch k, starts k+1 only when the
// policy allows:
//   POL_STRICT    every verification core has finished k;
//   POL_SELECTIVE a core that lost a tight race at the end of k waits until
//                 every winner of that race has finished k; others go on;
//   POL_BLIND     no waiting (a wrong race outcome is caught by the epoch
//                 comparison or a branch mismatch and the epoch replayed).
// force_strict (set for the replay of an epoch after a verification-only
// rollback) selects strict enforcement regardless of policy. Finishing a
// record that closed an epoch pulses v_epoch_adv for that core.
// hold (checkpoint or restore in progress) pauses a core's walk.
// validate frees the records of the oldest unvalidated epoch; rollback_v
// restarts every verification core at the oldest unvalidated record;
// rollback_all also discards the unvalidated records.
// The ring size (8 epochs of at most 8 subepochs) is derived from the PCB
// depth; the exact wait rules follow the described policies.
module order_enforcer
  import tlr_pkg::*;
#(
  parameter int unsigned DEPTH = PCB_SECTIONS * EPOCH_SUBEPOCHS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  order_policy_e            policy,
  input  logic                     force_strict,
  input  logic                     rec_valid,
  input  sub_rec_t                 rec,
  input  logic [NCORES-1:0]        hold,
  input  logic [NCORES-1:0][$clog2(COMMIT_WIDTH+1)-1:0] commit_cnt,
  output logic [NCORES-1:0][$clog2(COMMIT_WIDTH+1)-1:0] commit_budget,
  output logic [NCORES-1:0]        v_epoch_adv,
  input  logic                     validate,
  input  logic                     rollback_v,
  input  logic                     rollback_all,
  output logic                     log_full,
  output logic [NCORES-1:0]        waiting,
  output logic [31:0]              n_strict_waits,
  output logic [31:0]              n_tight_waits,
  output logic [31:0]              n_replayed
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned PW = 16;           // absolute record numbers
  localparam int unsigned CW = $clog2(COMMIT_WIDTH+1);

  sub_rec_t ring [DEPTH];
  logic [PW-1:0] wr, base;
  logic [PW-1:0] idx [NCORES];
  logic [CNT_W:0] remain [NCORES];
  logic [NCORES-1:0] loaded;
  // epoch boundaries (record number after each epoch's last record)
  logic [PW-1:0] bnd [PCB_SECTIONS];
  logic [$clog2(PCB_SECTIONS):0] bnd_cnt;
  logic [$clog2(PCB_SECTIONS)-1:0] bnd_rd, bnd_wr;

  order_policy_e pol;
  assign pol      = force_strict ? POL_STRICT : policy;
  assign log_full = (wr - base) >= PW'(DEPTH);

  // may core c start record idx[c]?
  logic [NCORES-1:0] allow, avail, strict_block, tight_block;
  always_comb begin
    for (int c = 0; c < NCORES; c++) begin
      sub_rec_t prev;
      prev            = ring[AW'(idx[c] - 1'b1)];
      avail[c]        = idx[c] != wr;
      strict_block[c] = 1'b0;
      tight_block[c]  = 1'b0;
      if (idx[c] != base) begin
        for (int o = 0; o < NCORES; o++) begin
          if (idx[o] < idx[c]) begin
            strict_block[c] = 1'b1;
            if (prev.loser[c] && prev.winner[o]) tight_block[c] = 1'b1;
          end
        end
      end
      unique case (pol)
        POL_STRICT:    allow[c] = !strict_block[c];
        POL_SELECTIVE: allow[c] = !tight_block[c];
        default:       allow[c] = 1'b1;
      endcase
      waiting[c] = !loaded[c] && avail[c] && !allow[c];
      commit_budget[c] = '0;
      if (loaded[c] && !hold[c])
        commit_budget[c] = (remain[c] > (CNT_W+1)'(COMMIT_WIDTH)) ?
                           CW'(COMMIT_WIDTH) : CW'(remain[c]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr <= '0; base <= '0; loaded <= '0; v_epoch_adv <= '0;
      bnd_cnt <= '0; bnd_rd <= '0; bnd_wr <= '0;
      n_strict_waits <= '0; n_tight_waits <= '0; n_replayed <= '0;
      for (int c = 0; c < NCORES; c++) begin
        idx[c] <= '0; remain[c] <= '0;
      end
      for (int i = 0; i < DEPTH; i++) ring[i] <= '0;
      for (int i = 0; i < PCB_SECTIONS; i++) bnd[i] <= '0;
    end else begin
      v_epoch_adv <= '0;
      if (rec_valid) begin
        ring[AW'(wr)] <= rec;
        wr <= wr + 1'b1;
        if (rec.epoch_end) begin
          bnd[bnd_wr] <= wr + 1'b1;
          bnd_wr      <= bnd_wr + 1'b1;
        end
      end
      for (int c = 0; c < NCORES; c++) begin
        if (hold[c]) begin
          // the core is checkpointing or restoring
        end else if (!loaded[c]) begin
          if (avail[c] && allow[c]) begin
            loaded[c] <= 1'b1;
            remain[c] <= (CNT_W+1)'(ring[AW'(idx[c])].count[c]);
          end else if (waiting[c]) begin
            if (pol == POL_STRICT) n_strict_waits <= n_strict_waits + 1'b1;
            else                   n_tight_waits  <= n_tight_waits + 1'b1;
          end
        end else begin
          if (remain[c] == (CNT_W+1)'(commit_cnt[c])) begin
            loaded[c] <= 1'b0;
            idx[c]    <= idx[c] + 1'b1;
            if (ring[AW'(idx[c])].epoch_end) v_epoch_adv[c] <= 1'b1;
          end
          remain[c] <= remain[c] - (CNT_W+1)'(commit_cnt[c]);
        end
      end
      if (rec_valid && rec.epoch_end) bnd_cnt <= bnd_cnt + 1'b1;
      if (validate && bnd_cnt != 0) begin
        base   <= bnd[bnd_rd];
        bnd_rd <= bnd_rd + 1'b1;
        bnd_cnt <= bnd_cnt - 1'b1 + ($clog2(PCB_SECTIONS)+1)'(rec_valid && rec.epoch_end);
      end
      if (rollback_v || rollback_all) begin
        loaded <= '0;
        for (int c = 0; c < NCORES; c++) idx[c] <= base;
        if (rollback_v) n_replayed <= n_replayed + 1'b1;
      end
      if (rollback_all) begin
        wr      <= base;
        bnd_cnt <= '0;
        bnd_wr  <= bnd_rd;
      end
    end
  end

  // a verification core never commits past its subepoch (commits in a
  // rollback cycle are discarded anyway)
  for (genvar c = 0; c < NCORES; c++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n || rollback_v || rollback_all)
                     commit_cnt[c] <= commit_budget[c]);
  end

endmodule
