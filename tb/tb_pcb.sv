// tb_pcb: self-checking test of the post-commit buffer.
// Walks through allocation, pointer writes, unmapping and associative search,
// supersession across epochs, invalidation in the current and an older
// section, a full section, delayed write-back that skips lines superseded by a
// validated epoch, the signature walk and a rollback. Expected values are
// worked out by hand from the PCB rules.
module tb_pcb;
  import tlr_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid;
  pcb_req_t req;
  pcb_resp_t resp;
  logic epoch_adv, validate, release_req, rollback, wb_ready;
  wb_t wb;
  logic release_done, walk_req, walk_valid, walk_done, cur_full, next_free, busy_bg;
  epoch_t walk_epoch, cur_epoch, val_epoch, rel_epoch;
  line_addr_t walk_addr;
  line_t walk_data;
  logic [IDX_W:0] cur_used;

  pcb dut (.*, .wb_en(1'b1));

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  pcb_resp_t r;
  task automatic op(input pcb_op_e o, input search_act_e a, input line_addr_t ad,
                    input pcb_ptr_t p, input line_t d);
    req_valid = 1; req.op = o; req.act = a; req.addr = ad; req.ptr = p;
    req.data = d; req.sen = 16'h55;
    @(posedge clk); #1;
    req_valid = 0; req = '0;
    r = resp;
  endtask
  task automatic pulse(ref logic s);
    s = 1; @(posedge clk); #1; s = 0;
  endtask

  pcb_ptr_t pa0, pa1, pb, nul;
  int wbs = 0, walks = 0;
  line_addr_t wb_addr_seen;
  always @(posedge clk) begin
    if (wb.valid && wb_ready) begin wbs++; wb_addr_seen = wb.addr; end
    if (walk_valid) walks++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nul = '0;
    req_valid = 0; req = '0; epoch_adv = 0; validate = 0; release_req = 0;
    rollback = 0; wb_ready = 1; walk_req = 0; walk_epoch = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;

    // first write in epoch 0 allocates
    op(PCB_OP_STORE, SA_NONE, 60'hA, nul, 128'h1111);
    check(r.valid && r.hit && r.ptr == '{1'b1, 3'd0, 5'd0}, "alloc A");
    pa0 = r.ptr;
    op(PCB_OP_STORE, SA_NONE, 60'hA, pa0, 128'h2222);
    check(r.hit && r.ptr == pa0 && cur_used == 1, "write through pointer");
    op(PCB_OP_RD_PTR, SA_NONE, 60'hA, pa0, '0);
    check(r.hit && r.data == 128'h2222, "read through pointer");
    // mapped lines never match a search
    op(PCB_OP_SEARCH, SA_NONE, 60'hA, nul, '0);
    check(!r.hit, "mapped line hidden from search");
    op(PCB_OP_UNMAP, SA_NONE, 60'hA, pa0, '0);
    check(r.hit, "unmap");
    op(PCB_OP_SEARCH, SA_MAP, 60'hA, nul, '0);
    check(r.hit && r.ptr == pa0 && r.data == 128'h2222 && r.sen_valid &&
          r.sen == 16'h55, "search finds unmapped line, sen saved");
    op(PCB_OP_SEARCH, SA_NONE, 60'hA, nul, '0);
    check(!r.hit, "search with map re-mapped the line");
    // stale/wrong pointer: address check fails
    op(PCB_OP_RD_PTR, SA_NONE, 60'hB, pa0, '0);
    check(!r.hit, "pointer sanity check");

    // epoch 1: the write supersedes the epoch-0 copy
    pulse(epoch_adv);
    check(cur_epoch == 1, "epoch advanced");
    op(PCB_OP_STORE, SA_NONE, 60'hA, pa0, 128'h3333);
    check(r.hit && r.ptr == '{1'b1, 3'd1, 5'd0}, "new copy in section 1");
    pa1 = r.ptr;
    op(PCB_OP_RD_PTR, SA_NONE, 60'hA, pa0, '0);
    check(!r.hit, "old copy superseded");
    // invalidation of a current-section copy supersedes it in place
    op(PCB_OP_INV_PTR, SA_NONE, 60'hA, pa1, '0);
    check(r.hit && cur_used == 1, "current copy superseded, slot kept");
    op(PCB_OP_STORE, SA_NONE, 60'hB, nul, 128'hBBBB);
    pb = r.ptr;
    check(pb == '{1'b1, 3'd1, 5'd1}, "next free entry used");
    pulse(epoch_adv);   // epoch 2
    op(PCB_OP_UNMAP, SA_NONE, 60'hB, pb, '0);
    op(PCB_OP_SEARCH, SA_INV, 60'hB, nul, '0);
    check(r.hit && r.ptr == pb, "remote invalidation by search");
    op(PCB_OP_SEARCH, SA_NONE, 60'hB, nul, '0);
    check(!r.hit, "older copy is superseded, not supplied");

    // fill section 2
    for (int i = 0; i < PCB_ENTRIES; i++)
      op(PCB_OP_STORE, SA_NONE, 60'h100 + 60'(i), nul, 128'(i));
    check(cur_full && cur_used == PCB_ENTRIES, "section full");
    op(PCB_OP_STORE, SA_NONE, 60'h200, nul, '0);
    check(r.full && !r.hit, "store refused when full");

    // validate epochs 0 and 1, then release them
    pulse(validate); pulse(validate);
    check(val_epoch == 2, "two epochs validated");
    wbs = 0;
    pulse(release_req);
    wait (release_done); @(posedge clk); #1;
    check(wbs == 0, "epoch-0 copy of A skipped: superseded by validated epoch 1");
    check(rel_epoch == 1, "section 0 released");
    wbs = 0;
    pulse(release_req);
    wait (release_done); @(posedge clk); #1;
    check(wbs == 1 && wb_addr_seen == 60'hB,
          "superseded B written back: its superseder is unvalidated");

    // signature walk of section 2
    walks = 0;
    walk_epoch = 2;
    pulse(walk_req);
    wait (walk_done); @(posedge clk); #1;
    check(walks == PCB_ENTRIES, "walk streamed every line");

    // rollback discards epoch 2 (unvalidated)
    pulse(rollback);
    check(cur_epoch == 2 && cur_used == 0 && !cur_full, "rollback");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
