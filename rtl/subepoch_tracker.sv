// subepoch_tracker: race tracking of one computing core.
//
// A memory race always shows up as a coherence action (an invalidation or a
// downgrade of a dirty line). Instead of recording each race, the wavefront
// is cut into subepochs so that no two racing accesses fall in the same
// subepoch; the verification wavefront later replays the subepochs in order.
// This block keeps, per L1 line, a read bit and a written bit for "accessed in
// the current subepoch", one eviction bit per L1 set and a recently-accessed
// (R) bit per line that a timer clears every TIGHT_WINDOW cycles. It asks for a
// wavefront-wide subepoch transition (trans_req, held until sub_adv) when:
//   - a remote read hits a line written in this subepoch, or a remote
//     invalidation hits a line read or written in this subepoch;
//   - a remote invalidation misses the L1 but its set has the eviction bit
//     (a line accessed in this subepoch was evicted without a PCB entry);
//   - a remote request finds an unmapped PCB copy whose saved subepoch
//     number equals the current one (the line was evicted this subepoch);
//   - a load commits whose data reply carried a subepoch number not older
//     than the current one.
// A race on a line whose R bit is set is tight: the request then names this
// core as winner and the requester (snoop source) as loser.
// On sub_adv the core's subepoch number (SEN) increments, the access and
// eviction bits clear and, from the next cycle, the number of instructions
// committed in the closed subepoch (commits of the sub_adv cycle included) is
// presented on sub_count. The block also counts instructions of
// the epoch (epoch_insns_full at EPOCH_INSNS).
// All checks take effect at the clock edge of the event. Two access bits (not
// one) and the load-commit rule follow the description; the event format is
// this design's own.
module subepoch_tracker
  import tlr_pkg::*;
#(
  parameter int unsigned WINDOW = TIGHT_WINDOW
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // local L1 access
  input  logic                      acc_en,
  input  logic [SET_W-1:0]          acc_set,
  input  logic [WAY_W-1:0]          acc_way,
  input  logic                      acc_write,
  // remote request seen by this core
  input  logic                      snp_en,
  input  logic                      snp_write,
  input  logic                      snp_l1_hit,
  input  logic [SET_W-1:0]          snp_set,
  input  logic [WAY_W-1:0]          snp_way,
  input  logic [$clog2(NCORES)-1:0] snp_src,
  input  logic                      snp_pcb_senv,
  input  sen_t                      snp_pcb_sen,
  // local eviction
  input  logic                      ev_en,
  input  logic [SET_W-1:0]          ev_set,
  input  logic [WAY_W-1:0]          ev_way,
  input  logic                      ev_has_pcb,
  // commit
  input  logic [$clog2(COMMIT_WIDTH+1)-1:0] commit_cnt,
  input  logic                      ld_commit,
  input  sen_t                      ld_reply_sen,
  // wavefront-wide transitions
  input  logic                      sub_adv,
  input  logic                      epoch_adv,
  output sen_t                      sen,
  output logic                      trans_req,
  output logic                      trans_tight,
  output logic [NCORES-1:0]         trans_loser,
  output logic [CNT_W-1:0]          sub_count,
  output logic                      epoch_insns_full,
  output logic                      line_accessed   // ev line was accessed
);

  logic rd_b [L1_SETS][L1_WAYS];
  logic wr_b [L1_SETS][L1_WAYS];
  logic r_b  [L1_SETS][L1_WAYS];
  logic ev_b [L1_SETS];
  logic [$clog2(WINDOW+1)-1:0] timer;
  logic [CNT_W:0] ep_cnt;
  logic [CNT_W-1:0] run_cnt;

  // race checks for this cycle's events
  logic snp_race, snp_tight, ld_race;
  always_comb begin
    snp_race  = 1'b0;
    snp_tight = 1'b0;
    if (snp_en) begin
      if (snp_l1_hit) begin
        snp_race  = snp_write ? (rd_b[snp_set][snp_way] | wr_b[snp_set][snp_way])
                              : wr_b[snp_set][snp_way];
        snp_tight = snp_race && r_b[snp_set][snp_way];
      end else begin
        snp_race = (snp_write && ev_b[snp_set]) ||
                   (snp_pcb_senv && snp_pcb_sen == sen);
      end
    end
    ld_race = ld_commit && !(ld_reply_sen < sen);
  end
  assign line_accessed = rd_b[ev_set][ev_way] | wr_b[ev_set][ev_way];
  assign epoch_insns_full = ep_cnt >= (CNT_W+1)'(EPOCH_INSNS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < L1_SETS; s++) begin
        ev_b[s] <= 1'b0;
        for (int w = 0; w < L1_WAYS; w++) begin
          rd_b[s][w] <= 1'b0;
          wr_b[s][w] <= 1'b0;
          r_b[s][w]  <= 1'b0;
        end
      end
      timer       <= '0;
      sen         <= '0;
      trans_req   <= 1'b0;
      trans_tight <= 1'b0;
      trans_loser <= '0;
      sub_count   <= '0;
      run_cnt     <= '0;
      ep_cnt      <= '0;
    end else begin
      // R-bit timer
      if (timer == ($clog2(WINDOW+1))'(WINDOW - 1)) begin
        timer <= '0;
        for (int s = 0; s < L1_SETS; s++)
          for (int w = 0; w < L1_WAYS; w++) r_b[s][w] <= 1'b0;
      end else begin
        timer <= timer + 1'b1;
      end

      if (sub_adv) begin
        sen         <= sen + 1'b1;
        sub_count   <= run_cnt + CNT_W'(commit_cnt);
        run_cnt     <= '0;
        trans_req   <= 1'b0;
        trans_tight <= 1'b0;
        trans_loser <= '0;
        for (int s = 0; s < L1_SETS; s++) begin
          ev_b[s] <= 1'b0;
          for (int w = 0; w < L1_WAYS; w++) begin
            rd_b[s][w] <= 1'b0;
            wr_b[s][w] <= 1'b0;
          end
        end
      end else begin
        run_cnt <= run_cnt + CNT_W'(commit_cnt);
        if (snp_race || ld_race) trans_req <= 1'b1;
        if (snp_tight) begin
          trans_tight          <= 1'b1;
          trans_loser[snp_src] <= 1'b1;
        end
        if (snp_en && snp_l1_hit && snp_write) begin
          rd_b[snp_set][snp_way] <= 1'b0;
          wr_b[snp_set][snp_way] <= 1'b0;
        end
        if (ev_en) begin
          if (line_accessed && !ev_has_pcb) ev_b[ev_set] <= 1'b1;
          rd_b[ev_set][ev_way] <= 1'b0;
          wr_b[ev_set][ev_way] <= 1'b0;
        end
        if (acc_en) begin
          if (acc_write) wr_b[acc_set][acc_way] <= 1'b1;
          else           rd_b[acc_set][acc_way] <= 1'b1;
        end
      end
      if (acc_en) r_b[acc_set][acc_way] <= 1'b1;

      if (epoch_adv) ep_cnt <= '0;
      else           ep_cnt <= ep_cnt + (CNT_W+1)'(commit_cnt);
    end
  end

endmodule
