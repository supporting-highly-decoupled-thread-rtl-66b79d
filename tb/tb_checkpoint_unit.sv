// tb_checkpoint_unit: saves a model register file into two slots, corrupts
// the model, restores each slot and compares with the saved contents. Checks
// the 16-cycle duration (64 registers, 4 per cycle) and the signature stream.
module tb_checkpoint_unit;
  import tlr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic save_start, restore_start, busy, done, rf_wr_en, sig_valid;
  logic [$clog2(CKPT_SLOTS)-1:0] slot;
  logic [$clog2(NREGS)-1:0] rf_rd_idx, rf_wr_idx;
  logic [REGS_PER_CYCLE-1:0][REG_W-1:0] rf_rd_data, rf_wr_data, sig_words;
  checkpoint_unit dut (.*);

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
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [REG_W-1:0] img [2][NREGS];
  int cyc = 0, nsig = 0;
  always @(posedge clk) if (sig_valid) nsig++;

  task automatic run(input bit sv, input int s);
    slot = ($clog2(CKPT_SLOTS))'(s);
    if (sv) save_start = 1; else restore_start = 1;
    @(posedge clk); #1; save_start = 0; restore_start = 0;
    cyc = 0;
    while (!done) begin @(posedge clk); #1; cyc++; end
  endtask

  initial begin
    save_start = 0; restore_start = 0; slot = '0;
    for (int i = 0; i < NREGS; i++) rf[i] = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < 2; k++) begin
      for (int i = 0; i < NREGS; i++) begin
        rf[i] = {$urandom, $urandom};
        img[k][i] = rf[i];
      end
      nsig = 0;
      run(1, k + 3);
      check(cyc == 16, $sformatf("save takes 16 cycles (%0d)", cyc));
      check(nsig == 16, "16 signature beats");
    end
    for (int i = 0; i < NREGS; i++) rf[i] = '1;
    for (int k = 0; k < 2; k++) begin
      run(0, k + 3);
      check(cyc == 16, "restore takes 16 cycles");
      @(posedge clk); #1;
      for (int i = 0; i < NREGS; i++)
        check(rf[i] == img[k][i], $sformatf("slot %0d reg %0d restored", k + 3, i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
