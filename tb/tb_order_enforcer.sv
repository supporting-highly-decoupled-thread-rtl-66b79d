// tb_order_enforcer: subepoch replay in the verification wavefront.
// Two epochs of records are pushed; model verification cores commit as much
// as their budget allows at individual speeds (core 0 slowest). Checks: no
// core commits past a record; with strict policy no core starts record k+1
// before all finished k; with selective policy only the recorded loser waits
// for the winner; with blind policy nobody waits; epoch ends pulse
// v_epoch_adv; rollback_v replays from the oldest unvalidated record and
// validate frees one epoch.
module tb_order_enforcer;
  import tlr_pkg::*;
  localparam int CW = $clog2(COMMIT_WIDTH + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  order_policy_e policy;
  logic force_strict, rec_valid, validate, rollback_v, rollback_all, log_full;
  sub_rec_t rec;
  logic [NCORES-1:0] hold, v_epoch_adv, waiting;
  logic [NCORES-1:0][CW-1:0] commit_cnt, commit_budget;
  logic [31:0] n_strict_waits, n_tight_waits, n_replayed;
  order_enforcer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model cores: core c commits up to (c+1) per cycle, core 0 one per cycle
  int done_ins [NCORES];
  int ep_ends [NCORES];
  bit go;
  always_comb
    for (int c = 0; c < NCORES; c++)
      commit_cnt[c] = go ? CW'((int'(commit_budget[c]) < c + 1) ? int'(commit_budget[c]) : c + 1) : '0;
  always @(posedge clk) if (rst_n) for (int c = 0; c < NCORES; c++) begin
    done_ins[c] += int'(commit_cnt[c]);
    if (v_epoch_adv[c]) ep_ends[c]++;
  end

  // records: 4 per epoch, 2 epochs, counts 20 each; record 1 has a tight race
  // won by core 0 and lost by core 7
  sub_rec_t recs [8];
  task automatic push_all();
    for (int k = 0; k < 8; k++) begin
      rec_valid = 1; rec = recs[k]; @(posedge clk); #1;
    end
    rec_valid = 0;
  endtask
  function automatic int prefix(input int k); return 20 * k; endfunction

  // ordering observer: instructions of core c when core o first passes k
  int maxdiff = 0;
  task automatic run_until_done(input int total);
    int cyc = 0;
    go = 1;
    while (!(done_ins[0] >= total && done_ins[7] >= total) && cyc < 5000) begin
      @(posedge clk); #1; cyc++;
    end
    go = 0;
  endtask

  initial begin
    policy = POL_STRICT; force_strict = 0; rec_valid = 0; rec = '0;
    validate = 0; rollback_v = 0; rollback_all = 0; hold = '0; go = 0;
    for (int c = 0; c < NCORES; c++) begin done_ins[c] = 0; ep_ends[c] = 0; end
    for (int k = 0; k < 8; k++) begin
      recs[k] = '0;
      for (int c = 0; c < NCORES; c++) recs[k].count[c] = 20;
      recs[k].epoch_end = (k % 4 == 3);
    end
    recs[1].winner = 8'b0000_0001;
    recs[1].loser  = 8'b1000_0000;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    push_all();

    // ---- strict: fast core 7 must wait for slow core 0 at each record ----
    fork
      run_until_done(160);
      begin
        // while running, core 7 never gets more than one record ahead
        for (int i = 0; i < 400; i++) begin
          @(posedge clk); #1;
          if (done_ins[7] > (done_ins[0] / 20 + 1) * 20) maxdiff++;
        end
      end
    join
    check(done_ins[0] == 160 && done_ins[7] == 160, "all records committed exactly");
    check(maxdiff == 0, "strict: no core starts k+1 before all finish k");
    check(n_strict_waits > 0, "strict waits happened");
    check(ep_ends[0] == 2 && ep_ends[5] == 2, "two epoch ends per core");

    // ---- replay under selective policy after a verification rollback ----
    pulse_rb();
    check(n_replayed == 1, "rollback counted");
    for (int c = 0; c < NCORES; c++) done_ins[c] = 0;
    policy = POL_SELECTIVE;
    go = 1;
    // core 7 (loser of record 1) must not start record 2 before core 0
    // (winner) finished record 1; core 6 (not involved) runs freely
    begin
      bit seen_free = 0, viol = 0;
      for (int i = 0; i < 400; i++) begin
        @(posedge clk); #1;
        if (done_ins[7] > 40 && done_ins[0] < 40) viol = 1;
        if (done_ins[6] > 40 && done_ins[0] < 40) seen_free = 1;
      end
      check(!viol, "selective: loser waits for winner");
      check(seen_free, "selective: uninvolved core runs ahead");
      check(n_tight_waits > 0, "tight waits happened");
    end
    go = 0;
    check(done_ins[0] == 160, "selective replay complete");

    // ---- validate epoch 0, rollback: replay only epoch 1 ----
    validate = 1; @(posedge clk); #1; validate = 0;
    pulse_rb();
    for (int c = 0; c < NCORES; c++) done_ins[c] = 0;
    policy = POL_BLIND;
    go = 1; repeat (300) @(posedge clk); #1; go = 0;
    check(done_ins[0] == 80 && done_ins[7] == 80, "only the unvalidated epoch is replayed");
    check(waiting == '0, "blind: nobody waits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic pulse_rb();
    rollback_v = 1; @(posedge clk); #1; rollback_v = 0;
  endtask
endmodule
