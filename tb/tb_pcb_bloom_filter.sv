// tb_pcb_bloom_filter: checks the mod-257 hash against a reference computed
// with plain arithmetic, setting and querying bits, clearing one section's
// column and saturating columns.
module tb_pcb_bloom_filter;
  import tlr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  line_addr_t q_addr, set_addr;
  logic q_hit, set_en, clr_en;
  logic [PCB_SECTIONS-1:0] q_bits, sat_mask;
  logic [SEC_W-1:0] set_sec, clr_sec;
  pcb_bloom_filter dut (.*);

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

  line_addr_t a [16];
  initial begin
    q_addr = '0; set_addr = '0; set_en = 0; clr_en = 0; set_sec = '0;
    clr_sec = '0; sat_mask = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // hash reference: the address taken modulo 257
    for (int i = 0; i < 200; i++) begin
      line_addr_t x;
      x = {$urandom, $urandom};
      check(bloom_hash(x) == 9'(x % 60'd257), "hash is addr mod 257");
    end
    check(!q_hit, "empty filter");
    for (int i = 0; i < 16; i++) a[i] = line_addr_t'(i * 1000 + 7);
    for (int i = 0; i < 16; i++) begin
      set_en = 1; set_addr = a[i]; set_sec = SEC_W'(i % 4);
      @(posedge clk); #1;
    end
    set_en = 0;
    for (int i = 0; i < 16; i++) begin
      q_addr = a[i]; #1;
      check(q_hit && q_bits[i % 4], "member hits in its section");
    end
    q_addr = 60'd3; #1;          // 3 mod 257 = 3, no member hashes there
    check(!q_hit, "non-member misses");
    q_addr = a[0] + 60'd257; #1; // aliases with a[0]
    check(q_hit, "alias hits (false positive by design)");
    clr_en = 1; clr_sec = 0; @(posedge clk); #1; clr_en = 0;
    q_addr = a[0]; #1;
    check(!q_bits[0], "section column cleared");
    q_addr = a[1]; #1;
    check(q_bits[1], "other columns kept");
    sat_mask = 8'h80; @(posedge clk); #1; sat_mask = '0;
    q_addr = 60'd3; #1;
    check(q_bits == 8'h80, "saturated column hits everywhere");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
