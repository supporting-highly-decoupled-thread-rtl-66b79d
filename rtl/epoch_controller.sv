// epoch_controller: epoch and subepoch control of the computing wavefront.
//
// Subepoch transitions: whenever any computing core reports a race
// (trans_req), every core of the wavefront is told to close its subepoch
// (sub_adv); this is only bookkeeping and never stalls a core. One cycle
// later the controller gathers the instructions each core committed in the
// closed subepoch, the tight-race winners and losers, and whether it also
// closed the epoch, and pushes this record (rec_valid/rec) to the
// verification side.
// Epoch transitions: an epoch ends when any core has committed EPOCH_INSNS
// instructions or filled its current PCB section (epoch_req), or when a race
// would open subepoch number EPOCH_SUBEPOCHS. The transition (epoch_adv plus
// sub_adv) waits until no core is busy with a checkpoint and the next PCB
// section has been released; while it waits, commit_stall freezes the cores.
// PCB release: when fewer than RELEASE_THRESHOLD sections are free and an
// older epoch is validated, the verification cores are asked to release
// (write back) their oldest section (v_release_req); once all of them have
// done so, the computing cores drop the same section (c_release_req). Lines
// therefore stay buffered as long as space allows, which lets superseded
// versions be skipped at write-back.
// The thresholds in sections and the one-cycle record delay are this
// design's choices; the three epoch-ending conditions follow the evaluated
// configuration.
module epoch_controller
  import tlr_pkg::*;
#(
  parameter int unsigned RELEASE_THRESHOLD = 2,
  parameter int unsigned MAX_SUBEPOCHS     = EPOCH_SUBEPOCHS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          enable,
  input  logic [NCORES-1:0]             trans_req,
  input  logic [NCORES-1:0]             trans_tight,
  input  logic [NCORES-1:0][NCORES-1:0] trans_loser,
  input  logic [NCORES-1:0][CNT_W-1:0]  sub_count,
  input  logic [NCORES-1:0]             epoch_req,
  input  logic [NCORES-1:0]             insns_full,
  input  logic [NCORES-1:0]             core_busy,
  input  logic                          next_free,
  input  epoch_t                        cur_epoch,
  input  epoch_t                        val_epoch,
  input  epoch_t                        rel_epoch,
  input  logic                          rollback_all,
  input  logic [NCORES-1:0]             v_release_done,
  input  logic [NCORES-1:0]             c_release_done,
  output logic                          sub_adv,
  output logic                          epoch_adv,
  output logic                          commit_stall,
  output logic                          rec_valid,
  output sub_rec_t                      rec,
  output logic                          v_release_req,
  output logic                          c_release_req,
  // event counters
  output logic [31:0]                   n_subepochs,
  output logic [31:0]                   n_epochs,
  output logic [31:0]                   n_ep_insns,
  output logic [31:0]                   n_ep_pcb,
  output logic [31:0]                   n_ep_subs,
  output logic [31:0]                   n_stall_cycles,
  output logic [31:0]                   n_releases
);

  logic [$clog2(MAX_SUBEPOCHS+1)-1:0] sub_n;
  logic ep_pending, want_ep, any_trans, can_ep;
  logic rec_pend, rec_ep;
  logic [NCORES-1:0] rec_win, rec_los;
  logic rel_active;
  logic [NCORES-1:0] v_done_seen, c_done_seen;
  logic c_req_sent;
  epoch_t free_secs;

  assign any_trans = |trans_req;
  assign want_ep   = enable && (|epoch_req || ep_pending ||
                     (any_trans && sub_n == ($clog2(MAX_SUBEPOCHS+1))'(MAX_SUBEPOCHS - 1)));
  assign can_ep    = !(|core_busy) && next_free;
  assign epoch_adv = want_ep && can_ep && !rollback_all;
  assign sub_adv   = epoch_adv || (enable && any_trans && !want_ep && !rollback_all);
  assign commit_stall = want_ep && !can_ep;
  assign free_secs = EPOCH_W'(PCB_SECTIONS) - (cur_epoch + 1'b1 - rel_epoch);
  assign v_release_req = enable && !rel_active && rel_epoch < val_epoch &&
                         free_secs < EPOCH_W'(RELEASE_THRESHOLD) && !rollback_all;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sub_n <= '0; ep_pending <= 1'b0;
      rec_pend <= 1'b0; rec_ep <= 1'b0; rec_win <= '0; rec_los <= '0;
      rec_valid <= 1'b0; rec <= '0;
      rel_active <= 1'b0; v_done_seen <= '0; c_release_req <= 1'b0;
      c_done_seen <= '0; c_req_sent <= 1'b0;
      n_subepochs <= '0; n_epochs <= '0; n_ep_insns <= '0; n_ep_pcb <= '0;
      n_ep_subs <= '0; n_stall_cycles <= '0; n_releases <= '0;
    end else begin
      rec_valid     <= 1'b0;
      c_release_req <= 1'b0;
      // the record is completed one cycle after the transition
      rec_pend <= sub_adv;
      if (rec_pend) begin
        rec_valid     <= 1'b1;
        rec.count     <= sub_count;
        rec.epoch_end <= rec_ep;
        rec.winner    <= rec_win;
        rec.loser     <= rec_los;
      end
      if (sub_adv) begin
        rec_ep  <= epoch_adv;
        rec_win <= trans_tight;
        n_subepochs <= n_subepochs + 1'b1;
      end
      // tight races only: collect losers from all tight detectors
      if (sub_adv) begin
        logic [NCORES-1:0] l;
        l = '0;
        for (int c = 0; c < NCORES; c++)
          if (trans_tight[c]) l = l | trans_loser[c];
        rec_los <= l & ~trans_tight;
      end

      if (epoch_adv) begin
        sub_n      <= '0;
        ep_pending <= 1'b0;
        n_epochs   <= n_epochs + 1'b1;
        if (|insns_full)                         n_ep_insns <= n_ep_insns + 1'b1;
        else if (|(epoch_req & ~insns_full))     n_ep_pcb   <= n_ep_pcb + 1'b1;
        else                                     n_ep_subs  <= n_ep_subs + 1'b1;
      end else if (sub_adv) begin
        sub_n <= sub_n + 1'b1;
      end else if (want_ep) begin
        ep_pending <= 1'b1;
      end
      if (commit_stall) n_stall_cycles <= n_stall_cycles + 1'b1;

      // release handshake
      if (v_release_req) begin
        rel_active  <= 1'b1;
        v_done_seen <= '0;
        c_done_seen <= '0;
        c_req_sent  <= 1'b0;
      end else if (rel_active) begin
        v_done_seen <= v_done_seen | v_release_done;
        c_done_seen <= c_done_seen | c_release_done;
        if (&(v_done_seen | v_release_done) && !c_req_sent) begin
          c_release_req <= 1'b1;
          c_req_sent    <= 1'b1;
        end
        if (c_req_sent && &(c_done_seen | c_release_done)) begin
          rel_active <= 1'b0;
          n_releases <= n_releases + 1'b1;
        end
      end

      if (rollback_all) begin
        sub_n      <= '0;
        ep_pending <= 1'b0;
      end
    end
  end

endmodule
