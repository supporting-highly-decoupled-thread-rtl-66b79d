// tb_subepoch_tracker: race detection rules of the subepoch tracker.
// Checks: remote read of a line only read locally is no race; remote read of
// a written line is; remote invalidation of a read line is; an eviction
// without PCB entry sets the set's eviction bit, which a later missing
// invalidation turns into a race; a saved PCB subepoch number equal to the
// current one is a race; load commit with a current-subepoch reply is a race;
// tight races (R bit) name winner/loser, and after TIGHT_WINDOW cycles the R
// bit is gone; sub_adv increments SEN, clears bits and reports the count of
// committed instructions; the epoch instruction limit.
module tb_subepoch_tracker;
  import tlr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic acc_en, acc_write, snp_en, snp_write, snp_l1_hit, snp_pcb_senv;
  logic [SET_W-1:0] acc_set, snp_set, ev_set;
  logic [WAY_W-1:0] acc_way, snp_way, ev_way;
  logic [$clog2(NCORES)-1:0] snp_src;
  sen_t snp_pcb_sen, ld_reply_sen, sen;
  logic ev_en, ev_has_pcb, ld_commit, sub_adv, epoch_adv;
  logic [$clog2(COMMIT_WIDTH+1)-1:0] commit_cnt;
  logic trans_req, trans_tight, epoch_insns_full, line_accessed;
  logic [NCORES-1:0] trans_loser;
  logic [CNT_W-1:0] sub_count;
  subepoch_tracker #(.WINDOW(20)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(); @(posedge clk); #1; endtask
  task automatic access(input int s, input bit w);
    acc_en = 1; acc_set = SET_W'(s); acc_way = 0; acc_write = w; tick(); acc_en = 0;
  endtask
  task automatic snoop(input int s, input bit w, input bit hit, input int src);
    snp_en = 1; snp_set = SET_W'(s); snp_way = 0; snp_write = w; snp_l1_hit = hit;
    snp_src = 3'(src); tick(); snp_en = 0;
  endtask
  task automatic advance();
    sub_adv = 1; tick(); sub_adv = 0;
  endtask

  initial begin
    {acc_en, acc_write, snp_en, snp_write, snp_l1_hit, snp_pcb_senv, ev_en,
     ev_has_pcb, ld_commit, sub_adv, epoch_adv} = '0;
    acc_set = '0; snp_set = '0; ev_set = '0; acc_way = '0; snp_way = '0;
    ev_way = '0; snp_src = '0; snp_pcb_sen = '0; ld_reply_sen = '0;
    commit_cnt = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;

    access(5, 0);
    snoop(5, 0, 1, 2);
    check(!trans_req, "read-read is no race");
    snoop(5, 1, 1, 2);
    check(trans_req && trans_tight && trans_loser == 8'b100, "write after read: tight race, loser 2");
    commit_cnt = 7; tick(); tick(); commit_cnt = 0;
    advance();
    check(sen == 1 && !trans_req, "SEN incremented, request cleared");
    tick();
    check(sub_count == 14, "14 instructions in closed subepoch");

    access(6, 1);
    repeat (25) tick();             // R bit expires (window 20)
    snoop(6, 0, 1, 3);
    check(trans_req && !trans_tight, "read of written line: race, not tight");
    advance();
    snoop(6, 0, 1, 3);
    check(!trans_req, "bits cleared at subepoch transition");

    access(9, 0);
    ev_en = 1; ev_set = 9; ev_way = 0; ev_has_pcb = 0; #1;
    check(line_accessed, "evicted line was accessed");
    tick(); ev_en = 0;
    snoop(9, 1, 0, 1);
    check(trans_req, "invalidation to set with eviction bit is a race");
    advance();
    snoop(9, 1, 0, 1);
    check(!trans_req, "eviction bit cleared");

    snp_pcb_senv = 1; snp_pcb_sen = sen;
    snoop(11, 0, 0, 1);
    snp_pcb_senv = 0;
    check(trans_req, "PCB copy evicted in this subepoch");
    advance();

    ld_commit = 1; ld_reply_sen = sen - 1'b1; tick();
    check(!trans_req, "load data from an older subepoch");
    ld_reply_sen = sen; tick(); ld_commit = 0;
    check(trans_req, "load data from the current subepoch");
    advance();

    epoch_adv = 1; tick(); epoch_adv = 0;
    commit_cnt = 12;
    repeat (170) tick();
    check(!epoch_insns_full, "2040 instructions: epoch not full");
    tick();
    check(epoch_insns_full, "2052 instructions: epoch full");
    commit_cnt = 0; epoch_adv = 1; tick(); epoch_adv = 0;
    check(!epoch_insns_full, "epoch count restarts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
