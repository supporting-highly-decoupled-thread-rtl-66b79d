// epoch_validator: compares the two wavefronts epoch by epoch and decides
// validation and rollback.
//
// Each computing core delivers one signature per epoch (c_sig_valid/c_sig);
// they wait in a per-core buffer of PCB_SECTIONS entries (8 x 128 bits =
// 128 bytes per core). When the verification copy of that thread delivers its
// signature for the same epoch (v_sig_valid/v_sig) the two are compared; the
// verification copy may run several epochs ahead of its neighbours, so each
// core keeps a count of epochs already matched. When every thread has matched
// the oldest epoch, validate pulses: the PCB sections of that epoch may be
// written back and its order records freed.
// A mismatch, or a branch that the verification copy resolves differently
// from the computing copy (br_mismatch), is first taken to be a race that
// played out differently: only the verification wavefront rolls back
// (rollback_v) and replays the epoch with strict ordering (force_strict). If
// the replay also disagrees, an error is declared and both wavefronts roll
// back to the last validated epoch (rollback_all).
// A verification signature that arrives before its computing counterpart is
// held (one per core) until that arrives. This is this design's choice; the
// two-step recovery follows the described policy.
module epoch_validator
  import tlr_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [NCORES-1:0]            c_sig_valid,
  input  logic [NCORES-1:0][SIG_W-1:0] c_sig,
  input  logic [NCORES-1:0]            v_sig_valid,
  input  logic [NCORES-1:0][SIG_W-1:0] v_sig,
  input  logic                         br_mismatch,
  output logic                         validate,
  output logic                         rollback_v,
  output logic                         rollback_all,
  output logic                         force_strict,
  output logic                         c_buf_full,
  output logic [31:0]                  n_validated,
  output logic [31:0]                  n_v_rollbacks,
  output logic [31:0]                  n_errors
);

  localparam int unsigned D  = PCB_SECTIONS;
  localparam int unsigned AW = $clog2(D);

  logic [SIG_W-1:0] cbuf [NCORES][D];
  logic [AW-1:0]    rd;
  logic [AW-1:0]    wr   [NCORES];
  logic [AW:0]      cnt  [NCORES];
  logic [AW:0]      vok  [NCORES];
  logic [NCORES-1:0]            pend;
  logic [NCORES-1:0][SIG_W-1:0] pend_sig;

  // comparison of the incoming (or held) verification signature
  logic [NCORES-1:0] cmp_en, cmp_ok, all_ok;
  logic mismatch, do_val;
  always_comb begin
    for (int c = 0; c < NCORES; c++) begin
      logic [SIG_W-1:0] vs;
      vs        = pend[c] ? pend_sig[c] : v_sig[c];
      cmp_en[c] = (pend[c] || v_sig_valid[c]) && cnt[c] > vok[c];
      cmp_ok[c] = vs == cbuf[c][AW'(rd + AW'(vok[c]))];
      all_ok[c] = vok[c] != 0 || (cmp_en[c] && cmp_ok[c]);
    end
    mismatch = |(cmp_en & ~cmp_ok) || br_mismatch;
    do_val   = &all_ok && !mismatch;
  end

  always_comb begin
    c_buf_full = 1'b0;
    for (int c = 0; c < NCORES; c++)
      if (cnt[c] == (AW+1)'(D)) c_buf_full = 1'b1;
  end

  assign validate     = do_val;
  assign rollback_v   = mismatch && !force_strict;
  assign rollback_all = mismatch && force_strict;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; pend <= '0; pend_sig <= '0; force_strict <= 1'b0;
      n_validated <= '0; n_v_rollbacks <= '0; n_errors <= '0;
      for (int c = 0; c < NCORES; c++) begin
        wr[c] <= '0; cnt[c] <= '0; vok[c] <= '0;
        for (int i = 0; i < D; i++) cbuf[c][i] <= '0;
      end
    end else begin
      for (int c = 0; c < NCORES; c++) begin
        logic [AW:0] n, v;
        n = cnt[c];
        v = vok[c];
        if (c_sig_valid[c]) begin
          cbuf[c][wr[c]] <= c_sig[c];
          wr[c] <= wr[c] + 1'b1;
          n = n + 1'b1;
        end
        if (cmp_en[c]) begin
          pend[c] <= 1'b0;
          if (cmp_ok[c]) v = v + 1'b1;
        end else if (v_sig_valid[c]) begin
          pend[c]     <= 1'b1;
          pend_sig[c] <= v_sig[c];
        end
        if (do_val) begin
          n = n - 1'b1;
          v = v - 1'b1;
        end
        cnt[c] <= n;
        vok[c] <= v;
      end
      if (do_val) begin
        rd           <= rd + 1'b1;
        force_strict <= 1'b0;
        n_validated  <= n_validated + 1'b1;
      end
      if (mismatch) begin
        pend <= '0;
        for (int c = 0; c < NCORES; c++) vok[c] <= '0;
        if (force_strict) begin
          n_errors     <= n_errors + 1'b1;
          force_strict <= 1'b0;
          rd           <= '0;
          for (int c = 0; c < NCORES; c++) begin
            wr[c] <= '0; cnt[c] <= '0;
          end
        end else begin
          n_v_rollbacks <= n_v_rollbacks + 1'b1;
          force_strict  <= 1'b1;
        end
      end
    end
  end

endmodule
