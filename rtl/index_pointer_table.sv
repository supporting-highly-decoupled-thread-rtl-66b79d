// index_pointer_table: one index pointer per L1 data-cache line.
//
// The pointer names the PCB entry (section, index) holding the shadow copy of
// the L1 line written in the current or an earlier epoch, or is null. It lets
// stores, invalidations and ownership checks reach the PCB copy directly,
// without an associative search. The table sits beside the L1 rather than in
// it, and is looked up with the L1 set and way of the line. Stale pointers
// (to a section since recycled) are not cleared proactively: every use is
// checked against the address held in the PCB entry.
//
// Interface: combinational read port (rd_set, rd_way -> rd_ptr); one write
// port (wr_en, wr_set, wr_way, wr_ptr) taking effect at the clock edge;
// clr_all nulls every pointer (rollback flushes the L1).
// Sizes follow the evaluated 8 KB, 2-way, 16-byte-line L1 (512 pointers).
module index_pointer_table
  import tlr_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SET_W-1:0] rd_set,
  input  logic [WAY_W-1:0] rd_way,
  output pcb_ptr_t         rd_ptr,
  input  logic             wr_en,
  input  logic [SET_W-1:0] wr_set,
  input  logic [WAY_W-1:0] wr_way,
  input  pcb_ptr_t         wr_ptr,
  input  logic             clr_all
);

  pcb_ptr_t ptr_q [L1_SETS][L1_WAYS];

  assign rd_ptr = ptr_q[rd_set][rd_way];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < L1_SETS; s++)
        for (int w = 0; w < L1_WAYS; w++) ptr_q[s][w] <= '0;
    end else if (clr_all) begin
      for (int s = 0; s < L1_SETS; s++)
        for (int w = 0; w < L1_WAYS; w++) ptr_q[s][w].valid <= 1'b0;
    end else if (wr_en) begin
      ptr_q[wr_set][wr_way] <= wr_ptr;
    end
  end

endmodule
