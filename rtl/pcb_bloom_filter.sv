// pcb_bloom_filter: filters associative searches of the post-commit buffer.
//
// The filter has BLOOM_ENTRIES rows of PCB_SECTIONS bits: one bit column per
// PCB section, so a released section is forgotten by clearing its column in
// one cycle. A row is selected by hashing the line address (line address mod
// 257, computed from the address bytes because 256 == -1 mod 257). A bit is
// set only when a Valid PCB line stops being mapped, i.e. when the L1 evicts
// a line whose index pointer still names the right PCB copy; lines still in
// the L1 are reached through their pointer and never need a search, which
// keeps the filter sparse. A query with no bit set in its row proves that no
// unmapped Valid line of that address is in the PCB.
//
// Interface: combinational query (q_addr -> q_hit, q_bits); set_en/set_addr/
// set_sec set one bit at the clock edge; clr_en/clr_sec clear a column;
// sat_mask sets every bit of the selected columns (used after a rollback,
// when the L1 is flushed and every buffered line becomes unmapped).
// The sizes follow the evaluated configuration (257 entries x 8 bits); the
// hash and the saturation on rollback are this design's choices.
module pcb_bloom_filter
  import tlr_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  line_addr_t              q_addr,
  output logic                    q_hit,
  output logic [PCB_SECTIONS-1:0] q_bits,
  input  logic                    set_en,
  input  line_addr_t              set_addr,
  input  logic [SEC_W-1:0]        set_sec,
  input  logic                    clr_en,
  input  logic [SEC_W-1:0]        clr_sec,
  input  logic [PCB_SECTIONS-1:0] sat_mask
);

  logic [PCB_SECTIONS-1:0] rows [BLOOM_ENTRIES];
  logic [8:0] q_h, s_h;

  assign q_h    = bloom_hash(q_addr);
  assign s_h    = bloom_hash(set_addr);
  assign q_bits = rows[q_h];
  assign q_hit  = |q_bits;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < BLOOM_ENTRIES; r++) rows[r] <= '0;
    end else begin
      for (int r = 0; r < BLOOM_ENTRIES; r++) begin
        logic [PCB_SECTIONS-1:0] v;
        v = rows[r] | sat_mask;
        if (clr_en) v[clr_sec] = 1'b0;
        if (set_en && s_h == 9'(r)) v[set_sec] = 1'b1;
        rows[r] <= v;
      end
    end
  end

endmodule
