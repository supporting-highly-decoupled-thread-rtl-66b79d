// checkpoint_unit: register checkpoints of one core.
//
// At every epoch boundary the core's commit stage is frozen while this unit
// copies the NREGS architectural registers, REGS_PER_CYCLE per cycle (64
// registers, 4 per cycle: 16 cycles), into one of CKPT_SLOTS checkpoint
// slots; the same words are streamed out (sig_valid/sig_words) so that the
// epoch signature is built on the way. On a rollback the unit loads a slot
// back into the register file at the same rate.
//
// Interface: save_start/restore_start with slot pick an operation (ignored
// while busy); the unit drives rf_rd_idx (first of four consecutive
// registers, data returned combinationally on rf_rd_data) or rf_wr_en/
// rf_wr_idx/rf_wr_data; busy is high for the 16 cycles, done pulses after.
// Nine slots (4608 bytes) follow the storage budget given for the design;
// slot management is left to the caller.
module checkpoint_unit
  import tlr_pkg::*;
(
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 save_start,
  input  logic                                 restore_start,
  input  logic [$clog2(CKPT_SLOTS)-1:0]        slot,
  output logic                                 busy,
  output logic                                 done,
  // register file port of the core
  output logic [$clog2(NREGS)-1:0]             rf_rd_idx,
  input  logic [REGS_PER_CYCLE-1:0][REG_W-1:0] rf_rd_data,
  output logic                                 rf_wr_en,
  output logic [$clog2(NREGS)-1:0]             rf_wr_idx,
  output logic [REGS_PER_CYCLE-1:0][REG_W-1:0] rf_wr_data,
  // words for the signature
  output logic                                 sig_valid,
  output logic [REGS_PER_CYCLE-1:0][REG_W-1:0] sig_words
);

  localparam int unsigned STEPS = NREGS / REGS_PER_CYCLE;
  localparam int unsigned ST_W  = $clog2(STEPS);

  logic [REGS_PER_CYCLE-1:0][REG_W-1:0] mem [CKPT_SLOTS][STEPS];

  typedef enum logic [1:0] {CK_IDLE, CK_SAVE, CK_RESTORE} ck_e;
  ck_e ck;
  logic [ST_W-1:0] step;
  logic [$clog2(CKPT_SLOTS)-1:0] slot_q;

  assign busy       = ck != CK_IDLE;
  assign rf_rd_idx  = {step, {$clog2(REGS_PER_CYCLE){1'b0}}};
  assign rf_wr_idx  = rf_rd_idx;
  assign rf_wr_en   = ck == CK_RESTORE;
  assign rf_wr_data = mem[slot_q][step];
  assign sig_valid  = ck == CK_SAVE;
  assign sig_words  = rf_rd_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ck     <= CK_IDLE;
      step   <= '0;
      slot_q <= '0;
      done   <= 1'b0;
      for (int s = 0; s < CKPT_SLOTS; s++)
        for (int i = 0; i < STEPS; i++) mem[s][i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (ck)
        CK_IDLE: begin
          step   <= '0;
          slot_q <= slot;
          if (save_start)         ck <= CK_SAVE;
          else if (restore_start) ck <= CK_RESTORE;
        end
        CK_SAVE, CK_RESTORE: begin
          if (ck == CK_SAVE) mem[slot_q][step] <= rf_rd_data;
          step <= step + 1'b1;
          if (step == ST_W'(STEPS - 1)) begin
            ck   <= CK_IDLE;
            done <= 1'b1;
          end
        end
        default: ck <= CK_IDLE;
      endcase
    end
  end

endmodule
