// branch_info_queue: branch outcomes from a computing thread to its
// verification copy.
//
// The computing core pushes each resolved branch (sequence number, taken
// flag, target). The verification copy uses them as predictions; in an
// error-free run they are always right, so when the verification core
// resolves a branch differently its control flow has diverged, most likely
// because a race played out differently, and the epoch can be aborted early
// (mismatch) instead of waiting for the signature comparison.
// Entries are 64 bits {seq[15:0], taken, target[46:0]} and the queue holds
// DEPTH of them (16 x 8 bytes = 128 bytes). When it is full new outcomes are
// dropped (counted in dropped); the sequence numbers keep the two sides
// aligned: the verification side only compares when the head carries its own
// branch number and discards older heads. This drop policy and the entry
// format are this design's choices.
//
// Interface: push/push_seq/push_taken/push_target (computing); chk/chk_seq/
// chk_taken/chk_target (verification); mismatch and checked pulse one cycle
// after chk. flush empties the queue.
module branch_info_queue
  import tlr_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  logic        push,
  input  logic [15:0] push_seq,
  input  logic        push_taken,
  input  logic [46:0] push_target,
  input  logic        chk,
  input  logic [15:0] chk_seq,
  input  logic        chk_taken,
  input  logic [46:0] chk_target,
  output logic        mismatch,
  output logic        checked,
  output logic [$clog2(DEPTH):0] count,
  output logic [15:0] dropped
);

  typedef struct packed {
    logic [15:0] seq;
    logic        taken;
    logic [46:0] target;
  } bi_t;

  bi_t q [DEPTH];
  logic [$clog2(DEPTH)-1:0] rd, wr;
  bi_t head;
  logic empty, full, older, same, do_pop, do_push;
  logic signed [15:0] diff;

  assign head    = q[rd];
  assign empty   = count == 0;
  assign full    = count == ($clog2(DEPTH)+1)'(DEPTH);
  assign diff    = signed'(head.seq - chk_seq);
  assign older   = !empty && chk && diff < 0;
  assign same    = !empty && chk && diff == 0;
  assign do_pop  = older || same;
  assign do_push = push && !full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; wr <= '0; count <= '0; dropped <= '0;
      mismatch <= 1'b0; checked <= 1'b0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else if (flush) begin
      rd <= '0; wr <= '0; count <= '0;
      mismatch <= 1'b0; checked <= 1'b0;
    end else begin
      mismatch <= same && (head.taken != chk_taken ||
                           (chk_taken && head.target != chk_target));
      checked  <= same;
      if (do_push) begin
        q[wr] <= '{seq: push_seq, taken: push_taken, target: push_target};
        wr    <= wr + 1'b1;
      end
      if (push && full) dropped <= dropped + 1'b1;
      if (do_pop) rd <= rd + 1'b1;
      count <= count + ($clog2(DEPTH)+1)'(do_push) - ($clog2(DEPTH)+1)'(do_pop);
    end
  end

endmodule
