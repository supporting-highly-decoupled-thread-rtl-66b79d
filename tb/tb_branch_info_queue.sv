// tb_branch_info_queue: pushes branch outcomes and checks them from the
// verification side: matching outcomes raise no mismatch, a different
// direction or target does, stale heads are skipped by sequence number, and
// pushes beyond DEPTH are dropped and counted.
module tb_branch_info_queue;
  import tlr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush, push, push_taken, chk, chk_taken, mismatch, checked;
  logic [15:0] push_seq, chk_seq, dropped;
  logic [46:0] push_target, chk_target;
  logic [4:0] count;
  branch_info_queue #(.DEPTH(16)) dut (.*);

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

  function automatic logic [46:0] tgt(input int n); return 47'(n * 36 + 4096); endfunction
  function automatic bit tkn(input int n); return (n % 3) != 0; endfunction

  task automatic do_push(input int n);
    push = 1; push_seq = 16'(n); push_taken = tkn(n); push_target = tgt(n);
    @(posedge clk); #1; push = 0;
  endtask
  task automatic do_chk(input int n, input bit t, input logic [46:0] g);
    chk = 1; chk_seq = 16'(n); chk_taken = t; chk_target = g;
    @(posedge clk); #1; chk = 0;
  endtask

  initial begin
    {flush, push, push_taken, chk, chk_taken} = '0;
    push_seq = '0; chk_seq = '0; push_target = '0; chk_target = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 20; n++) do_push(n);
    check(count == 16 && dropped == 4, "16 kept, 4 dropped");
    for (int n = 0; n < 5; n++) begin
      do_chk(n, tkn(n), tgt(n));
      check(checked && !mismatch, "same outcome");
    end
    do_chk(5, !tkn(5), tgt(5));
    check(checked && mismatch, "different direction");
    do_chk(7, tkn(7), tgt(7) + 1); // pops the stale head 6
    do_chk(7, tkn(7), tgt(7) + 1); // 7 is a taken branch
    check(checked && mismatch, "different target");
    do_chk(9, tkn(9), tgt(9));   // head 8 is stale
    check(!checked, "stale head skipped first");
    do_chk(9, tkn(9), tgt(9));
    check(checked && !mismatch, "aligned again by sequence number");
    do_chk(30, 1'b1, '0);        // beyond the dropped ones: never compared
    flush = 1; @(posedge clk); #1; flush = 0;
    check(count == 0, "flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
