// tb_epoch_signature: compares every lane against a reference CRC-32 written
// independently (byte-oriented, table-free) over random words, and checks
// that clear restarts the lanes.
module tb_epoch_signature;
  import tlr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, in_valid;
  logic [REGS_PER_CYCLE-1:0][REG_W-1:0] in_words;
  logic [SIG_W-1:0] sig;
  epoch_signature dut (.*);

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

  // reference: non-reflected CRC-32, processed one byte at a time, MSB first
  function automatic logic [31:0] ref_crc(input logic [31:0] c, input logic [63:0] d);
    for (int b = 7; b >= 0; b--) begin
      c = c ^ {d[b*8 +: 8], 24'd0};
      for (int k = 0; k < 8; k++)
        c = c[31] ? ((c << 1) ^ 32'h04C11DB7) : (c << 1);
    end
    return c;
  endfunction

  logic [REGS_PER_CYCLE-1:0][31:0] exp_l;
  initial begin
    clear = 0; in_valid = 0; in_words = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    exp_l = '1;
    check(sig == '1, "initial value");
    for (int n = 0; n < 40; n++) begin
      in_valid = 1;
      for (int l = 0; l < REGS_PER_CYCLE; l++) begin
        in_words[l] = {$urandom, $urandom};
        exp_l[l] = ref_crc(exp_l[l], in_words[l]);
      end
      @(posedge clk); #1;
      check(sig == exp_l, "lanes match reference CRC");
    end
    in_valid = 0;
    // a known vector: CRC-32/MPEG-2 of "123456789" is 0x0376E6E7
    begin
      logic [31:0] c;
      c = 32'hFFFFFFFF;
      c = ref_crc(c, 64'h3132333435363738);
      for (int k = 0; k < 8; k++) begin
        c = c ^ (k == 0 ? 32'h39000000 : 32'h0);
        c = c[31] ? ((c << 1) ^ 32'h04C11DB7) : (c << 1);
      end
      check(c == 32'h0376E6E7, "reference CRC known answer");
    end
    clear = 1; @(posedge clk); #1; clear = 0;
    check(sig == '1, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
