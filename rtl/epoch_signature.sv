// epoch_signature: compresses the state an epoch produces into a checksum.
//
// At the end of an epoch each core folds its architectural registers, then
// every Valid or Superseded line of the closed PCB section (address and data)
// and finally the number of such lines into a signature; the two redundant
// copies of a thread validate the epoch when their signatures agree. The
// signature is four CRC-32 lanes (polynomial 0x04C11DB7), one per 64-bit
// word accepted per cycle, 128 bits in all, which makes the per-core buffer
// of eight epochs' signatures 128 bytes. The choice of CRC-32 lanes is this
// design's; the checksum-over-state idea follows the description.
//
// Interface: clear restarts all lanes at 0xFFFFFFFF; in_valid folds one word
// into each lane at the clock edge; sig shows the current value.
module epoch_signature
  import tlr_pkg::*;
(
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                clear,
  input  logic                                in_valid,
  input  logic [REGS_PER_CYCLE-1:0][REG_W-1:0] in_words,
  output logic [SIG_W-1:0]                    sig
);

  logic [REGS_PER_CYCLE-1:0][31:0] lane;
  assign sig = lane;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lane <= '1;
    end else if (clear) begin
      lane <= '1;
    end else if (in_valid) begin
      for (int l = 0; l < REGS_PER_CYCLE; l++)
        lane[l] <= crc32_word(lane[l], in_words[l]);
    end
  end

endmodule
