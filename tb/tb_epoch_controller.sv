// tb_epoch_controller: subepoch records, the three epoch-ending causes,
// commit stall while a core checkpoints or the next PCB section is in use,
// tight-race winner/loser recording and the two-phase PCB release.
module tb_epoch_controller;
  import tlr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable, next_free, rollback_all;
  logic [NCORES-1:0] trans_req, trans_tight, epoch_req, insns_full, core_busy;
  logic [NCORES-1:0] v_release_done, c_release_done;
  logic [NCORES-1:0][NCORES-1:0] trans_loser;
  logic [NCORES-1:0][CNT_W-1:0] sub_count;
  epoch_t cur_epoch, val_epoch, rel_epoch;
  logic sub_adv, epoch_adv, commit_stall, rec_valid, v_release_req, c_release_req;
  sub_rec_t rec;
  logic [31:0] n_subepochs, n_epochs, n_ep_insns, n_ep_pcb, n_ep_subs, n_stall_cycles, n_releases;
  epoch_controller dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic tick(); @(posedge clk); #1; endtask

  int nrec = 0; sub_rec_t last;
  always @(posedge clk) if (rst_n && rec_valid) begin nrec++; last = rec; end

  initial begin
    enable = 1; next_free = 1; rollback_all = 0;
    trans_req = '0; trans_tight = '0; epoch_req = '0; insns_full = '0;
    core_busy = '0; v_release_done = '0; c_release_done = '0; trans_loser = '0;
    for (int c = 0; c < NCORES; c++) sub_count[c] = CNT_W'(c * 10 + 1);
    cur_epoch = '0; val_epoch = '0; rel_epoch = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;

    // a tight race detected by core 2 against requester 4
    trans_req[2] = 1; trans_tight[2] = 1; trans_loser[2] = 8'b0001_0000; #1;
    check(sub_adv && !epoch_adv, "race closes a subepoch");
    tick(); trans_req = '0; trans_tight = '0; trans_loser = '0;
    tick(); tick();
    check(nrec == 1 && last.count[5] == 51 && !last.epoch_end &&
          last.winner == 8'b100 && last.loser == 8'b1_0000, "subepoch record");
    // six more plain transitions, then the eighth subepoch closes the epoch
    for (int k = 0; k < 6; k++) begin trans_req[0] = 1; tick(); trans_req = '0; tick(); end
    trans_req[1] = 1; #1;
    check(epoch_adv && sub_adv, "8 subepochs end the epoch");
    tick(); trans_req = '0; tick(); tick();
    check(nrec == 8 && last.epoch_end && n_ep_subs == 1, "epoch-end record");

    // instruction limit while a core checkpoints: stall until it is free
    epoch_req[3] = 1; insns_full[3] = 1; core_busy[5] = 1; #1;
    check(commit_stall && !epoch_adv, "stall while a core is busy");
    tick(); tick();
    core_busy = '0; #1;
    check(epoch_adv && !commit_stall, "transition once free");
    tick(); epoch_req = '0; insns_full = '0;
    check(n_ep_insns == 1, "cause: instruction count");
    // full PCB section while the next section is still in use
    epoch_req[6] = 1; next_free = 0; #1;
    check(commit_stall, "stall until next section released");
    tick(); next_free = 1; #1;
    check(epoch_adv, "epoch after release");
    tick(); epoch_req = '0;
    check(n_ep_pcb == 1 && n_stall_cycles >= 2, "cause: PCB full; stalls counted");

    // release: only one section free, an older epoch validated
    cur_epoch = 6; rel_epoch = 0; val_epoch = 2; #1;
    check(v_release_req, "verification release requested");
    tick(); #1;
    check(!v_release_req, "one release at a time");
    v_release_done = 8'h0F; tick(); v_release_done = 8'hF0; tick(); v_release_done = '0;
    check(c_release_req, "computing release after all verification cores");
    tick();
    check(!c_release_req, "single pulse");
    c_release_done = 8'hFF; tick(); c_release_done = '0;
    check(n_releases == 1, "release completed");
    cur_epoch = 3; #1;
    check(!v_release_req, "enough free sections: writeback delayed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
