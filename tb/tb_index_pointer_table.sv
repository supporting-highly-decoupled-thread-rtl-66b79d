// tb_index_pointer_table: writes pointers to random L1 lines, reads them back
// against a reference array, and checks that clr_all nulls every pointer.
module tb_index_pointer_table;
  import tlr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [SET_W-1:0] rd_set, wr_set;
  logic [WAY_W-1:0] rd_way, wr_way;
  pcb_ptr_t rd_ptr, wr_ptr;
  logic wr_en, clr_all;
  index_pointer_table dut (.*);

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

  pcb_ptr_t ref_p [L1_SETS][L1_WAYS];
  initial begin
    wr_en = 0; clr_all = 0; rd_set = '0; rd_way = '0; wr_set = '0; wr_way = '0;
    wr_ptr = '0;
    for (int s = 0; s < L1_SETS; s++) for (int w = 0; w < L1_WAYS; w++) ref_p[s][w] = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      wr_en = 1; wr_set = SET_W'($urandom); wr_way = WAY_W'($urandom);
      wr_ptr = pcb_ptr_t'($urandom);
      ref_p[wr_set][wr_way] = wr_ptr;
      @(posedge clk); #1;
    end
    wr_en = 0;
    for (int s = 0; s < L1_SETS; s++)
      for (int w = 0; w < L1_WAYS; w++) begin
        rd_set = SET_W'(s); rd_way = WAY_W'(w); #1;
        check(rd_ptr == ref_p[s][w], "pointer read back");
      end
    clr_all = 1; @(posedge clk); #1; clr_all = 0;
    for (int s = 0; s < L1_SETS; s += 17) begin
      rd_set = SET_W'(s); rd_way = 0; #1;
      check(!rd_ptr.valid, "cleared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
