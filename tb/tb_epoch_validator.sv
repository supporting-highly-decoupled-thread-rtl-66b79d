// tb_epoch_validator: signature comparison and the two-step recovery.
// Computing signatures for three epochs are delivered; verification cores
// deliver theirs at different times (one before its computing counterpart).
// Checks: validate only when every thread matched the oldest epoch; a
// mismatch first causes a verification-only rollback with strict replay; a
// second mismatch in the replay causes a full rollback; a branch mismatch
// acts like a signature mismatch.
module tb_epoch_validator;
  import tlr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NCORES-1:0] c_sig_valid, v_sig_valid;
  logic [NCORES-1:0][SIG_W-1:0] c_sig, v_sig;
  logic br_mismatch, validate, rollback_v, rollback_all, force_strict, c_buf_full;
  logic [31:0] n_validated, n_v_rollbacks, n_errors;
  epoch_validator dut (.*);

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
  function automatic logic [SIG_W-1:0] S(input int c, input int e);
    return {4{32'(c * 1000 + e * 7 + 1)}};
  endfunction
  int nval = 0, nrbv = 0, nrba = 0;
  always @(posedge clk) if (rst_n) begin
    nval += validate; nrbv += rollback_v; nrba += rollback_all;
  end
  task automatic csig(input int c, input int e);
    c_sig_valid = '0; c_sig_valid[c] = 1; c_sig[c] = S(c, e); @(posedge clk); #1; c_sig_valid = '0;
  endtask
  task automatic vsig(input int c, input logic [SIG_W-1:0] s);
    v_sig_valid = '0; v_sig_valid[c] = 1; v_sig[c] = s; @(posedge clk); #1; v_sig_valid = '0;
  endtask

  initial begin
    c_sig_valid = '0; v_sig_valid = '0; c_sig = '0; v_sig = '0; br_mismatch = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // core 3's verification copy reports epoch 0 before the computing copy
    vsig(3, S(3, 0));
    for (int c = 0; c < NCORES; c++) csig(c, 0);
    for (int c = 0; c < NCORES; c++) csig(c, 1);
    repeat (2) @(posedge clk); #1;
    // verification: everyone but core 5 reports epoch 0; core 2 also epoch 1
    for (int c = 0; c < NCORES; c++) if (c != 3 && c != 5) vsig(c, S(c, 0));
    vsig(2, S(2, 1));
    repeat (2) @(posedge clk); #1;
    check(nval == 0, "no validation while a thread is missing");
    vsig(5, S(5, 0)); #1;
    repeat (1) @(posedge clk); #1;
    check(nval == 1 && n_validated == 1, "epoch 0 validated");
    // epoch 1: core 4 mismatches -> verification-only rollback
    vsig(4, S(4, 1) ^ 1);
    check(nrbv == 1 && force_strict && nrba == 0, "first mismatch: replay verification strictly");
    // replay: all match
    for (int c = 0; c < NCORES; c++) vsig(c, S(c, 1));
    @(posedge clk); #1;
    check(nval == 2 && !force_strict, "replayed epoch validated");
    // epoch 2: branch mismatch then persistent signature mismatch
    for (int c = 0; c < NCORES; c++) csig(c, 2);
    br_mismatch = 1; @(posedge clk); #1; br_mismatch = 0;
    check(nrbv == 2 && force_strict, "branch mismatch aborts verification");
    vsig(0, S(0, 2) ^ 2);
    check(nrba == 1 && n_errors == 1 && !force_strict, "second mismatch: full rollback");
    // after a full rollback both wavefronts re-execute epoch 2
    for (int c = 0; c < NCORES; c++) csig(c, 2);
    for (int c = 0; c < NCORES; c++) vsig(c, S(c, 2));
    @(posedge clk); #1;
    check(nval == 3, "re-executed epoch validated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
