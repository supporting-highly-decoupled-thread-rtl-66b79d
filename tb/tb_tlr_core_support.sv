// tb_tlr_core_support: one core's redundancy support, driven as its L1
// controller would drive it. Checks each event flow (miss filtered by the
// bloom filter, allocation, write through the pointer, ownership through the
// pointer, eviction/unmap, filtered search hit, refill re-mapping, remote
// invalidation with race detection), the epoch boundary (16-cycle commit
// freeze and an epoch signature equal to an independently computed CRC of
// registers, buffered lines and line count), a store stalled by a full PCB
// section until the next epoch, and a rollback that reloads the registers
// checkpointed after reset.
module tb_tlr_core_support;
  import tlr_pkg::*;
  localparam int CW = $clog2(COMMIT_WIDTH + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ev_valid, ev_ready, acc_en, acc_write, ld_commit;
  core_ev_t ev;
  core_resp_t resp;
  logic [SET_W-1:0] acc_set;
  logic [WAY_W-1:0] acc_way;
  logic [CW-1:0] commit_cnt;
  sen_t ld_reply_sen, sen;
  logic sub_adv, epoch_adv, validate, release_req, rollback;
  logic trans_req, trans_tight, epoch_req, freeze, ep_busy, l1_flush, next_free, release_done;
  logic [NCORES-1:0] trans_loser;
  logic [CNT_W-1:0] sub_count;
  epoch_t cur_epoch, val_epoch, rel_epoch, sig_epoch;
  logic [IDX_W:0] pcb_used;
  wb_t wb;
  logic wb_ready;
  logic [$clog2(NREGS)-1:0] rf_rd_idx, rf_wr_idx;
  logic [REGS_PER_CYCLE-1:0][REG_W-1:0] rf_rd_data, rf_wr_data;
  logic rf_wr_en, sig_valid;
  logic [SIG_W-1:0] sig;
  logic [31:0] n_ptr_access, n_bloom_filtered, n_assoc_search;

  tlr_core_support #(.IS_VERIF(1'b1)) dut (.*);

  logic [REG_W-1:0] rf [NREGS];
  always_comb
    for (int l = 0; l < REGS_PER_CYCLE; l++) rf_rd_data[l] = rf[rf_rd_idx + l];
  always @(posedge clk)
    if (rf_wr_en)
      for (int l = 0; l < REGS_PER_CYCLE; l++) rf[rf_wr_idx + l] <= rf_wr_data[l];

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  core_resp_t r;
  task automatic send(input core_ev_e k, input line_addr_t a, input int s,
                      input int w, input bit hit, input bit shr, input line_t d);
    ev_valid = 1;
    ev = '0; ev.kind = k; ev.addr = a; ev.set = SET_W'(s); ev.way = WAY_W'(w);
    ev.l1_hit = hit; ev.l1_shared = shr; ev.line = d; ev.src = 3'd6;
    do @(posedge clk); while (!ev_ready);
    #1 ev_valid = 0;
    while (!resp.valid) begin @(posedge clk); #1; end
    r = resp;
    if (k == EV_STORE) begin
      acc_en = 1; acc_set = SET_W'(s); acc_way = WAY_W'(w); acc_write = 1;
      @(posedge clk); #1 acc_en = 0;
    end
  endtask

  // independent CRC-32 reference (byte-wise)
  function automatic logic [31:0] ref_crc(input logic [31:0] c, input logic [63:0] d);
    for (int b = 7; b >= 0; b--) begin
      c = c ^ {d[b*8 +: 8], 24'd0};
      for (int k = 0; k < 8; k++) c = c[31] ? ((c << 1) ^ 32'h04C11DB7) : (c << 1);
    end
    return c;
  endfunction

  logic [REG_W-1:0] rf0 [NREGS];
  logic [3:0][31:0] exp_sig;
  int fz, blocked;
  initial begin
    ev_valid = 0; ev = '0; acc_en = 0; acc_write = 0; acc_set = '0; acc_way = '0;
    commit_cnt = '0; ld_commit = 0; ld_reply_sen = '0; sub_adv = 0; epoch_adv = 0;
    validate = 0; release_req = 0; rollback = 0; wb_ready = 1;
    for (int i = 0; i < NREGS; i++) begin rf[i] = 64'(i) * 64'h0101 + 64'h77; rf0[i] = rf[i]; end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    while (freeze) begin @(posedge clk); #1; end   // checkpoint after reset

    send(EV_MISS, 60'hA0, 1, 0, 0, 0, '0);
    check(!r.hit && n_bloom_filtered == 1 && n_assoc_search == 0, "miss filtered by bloom");
    send(EV_STORE, 60'hA0, 1, 0, 1, 0, 128'hD1);
    check(pcb_used == 1, "store allocated");
    send(EV_STORE, 60'hA0, 1, 0, 1, 0, 128'hD2);
    check(pcb_used == 1, "second store through pointer");
    send(EV_SNOOP_RD, 60'hA0, 1, 0, 1, 1, '0);
    check(r.hit && r.data == 128'hD2, "shared line still owned: PCB supplies");
    send(EV_SNOOP_RD, 60'hA0, 1, 0, 1, 0, '0);
    check(!r.hit, "modified line: L1 supplies");
    send(EV_EVICT, 60'hA0, 1, 0, 1, 0, '0);
    send(EV_SNOOP_RD, 60'hA0, 1, 0, 0, 0, '0);
    check(r.hit && r.data == 128'hD2 && n_assoc_search == 1, "search after eviction hits");
    send(EV_MISS, 60'hA0, 1, 1, 0, 0, '0);
    check(r.hit && r.data == 128'hD2, "refill from PCB");
    send(EV_SNOOP_RD, 60'hA0, 1, 1, 1, 1, '0);
    check(r.hit, "pointer re-established on refill");
    check(trans_req, "remote access to a line evicted in this subepoch: race");
    sub_adv = 1; @(posedge clk); #1 sub_adv = 0;
    send(EV_STORE, 60'hB0, 2, 0, 1, 0, 128'hBB);
    check(!trans_req, "no race yet");
    send(EV_STORE, 60'hA0, 1, 1, 1, 0, 128'hD3);
    check(pcb_used == 2, "store through re-established pointer");
    send(EV_SNOOP_INV, 60'hA0, 1, 1, 1, 0, '0);
    check(trans_req && pcb_used == 2, "invalidation of line written this subepoch: race");
    sub_adv = 1; @(posedge clk); #1 sub_adv = 0;
    check(!trans_req, "subepoch closed");

    // epoch boundary: registers + line B + count go into the signature
    for (int l = 0; l < 4; l++) begin
      exp_sig[l] = '1;
      for (int s = 0; s < NREGS / 4; s++) exp_sig[l] = ref_crc(exp_sig[l], rf[s * 4 + l]);
    end
    // entry 0: A0 (superseded by the invalidation, still walked), entry 1: B0
    exp_sig[0] = ref_crc(exp_sig[0], 64'hA0);
    exp_sig[1] = ref_crc(exp_sig[1], 64'h0);
    exp_sig[2] = ref_crc(exp_sig[2], 64'hD3);
    exp_sig[3] = ref_crc(exp_sig[3], 64'h0);
    exp_sig[0] = ref_crc(exp_sig[0], 64'hB0);
    exp_sig[1] = ref_crc(exp_sig[1], 64'h0);
    exp_sig[2] = ref_crc(exp_sig[2], 64'hBB);
    exp_sig[3] = ref_crc(exp_sig[3], 64'h0);
    exp_sig[0] = ref_crc(exp_sig[0], 64'd2);
    for (int l = 1; l < 4; l++) exp_sig[l] = ref_crc(exp_sig[l], 64'd0);
    epoch_adv = 1; @(posedge clk); #1 epoch_adv = 0;
    fz = 0;
    while (freeze) begin fz++; @(posedge clk); #1; end
    check(fz == 16, $sformatf("commit frozen 16 cycles (%0d)", fz));
    while (!sig_valid) begin @(posedge clk); #1; end
    check(sig_epoch == 0 && sig == exp_sig && sig_valid, "epoch signature");
    @(posedge clk); #1;
    check(!ep_busy, "signature done");

    // fill section 1, the 33rd new line stalls until the next epoch
    for (int i = 0; i < PCB_ENTRIES; i++)
      send(EV_STORE, 60'h1000 + 60'(i), 10 + i, 0, 1, 0, 128'(i));
    check(epoch_req, "full section requests an epoch");
    fork
      send(EV_STORE, 60'h2000, 100, 0, 1, 0, 128'h5);
      begin
        blocked = 0;
        repeat (30) begin @(posedge clk); #1; if (!resp.valid) blocked++; end
        epoch_adv = 1; @(posedge clk); #1 epoch_adv = 0;
      end
    join
    check(blocked == 30, $sformatf("store waited (%0d)", blocked));
    check(cur_epoch == 2 && pcb_used == 1, "store placed in the new section");
    while (ep_busy) begin @(posedge clk); #1; end

    // rollback to epoch 0: registers come back from the reset checkpoint
    for (int i = 0; i < NREGS; i++) rf[i] = '0;
    rollback = 1; @(posedge clk); #1 rollback = 0;
    check(l1_flush, "L1 flush requested");
    while (freeze) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    begin
      bit ok = 1;
      for (int i = 0; i < NREGS; i++) if (rf[i] != rf0[i]) ok = 0;
      check(ok, "registers restored");
    end
    check(cur_epoch == 0 && pcb_used == 0, "PCB rolled back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
