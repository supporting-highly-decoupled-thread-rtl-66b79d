// tlr_pkg: types and constants shared by the thread-level-redundancy (TLR)
// support logic. The sizes follow the evaluated configuration: 16 cores split
// into an 8-core computing wavefront and an 8-core verification wavefront,
// 8 KB 2-way L1 data caches with 16-byte lines, a post-commit buffer (PCB) of
// 8 sections x 32 line entries, epochs of at most 2048 instructions, 8
// subepochs or one full PCB section, 64 architectural registers checkpointed
// 4 per cycle, and a 257-entry bloom filter with one bit per PCB section.
// Widths that the configuration leaves open (epoch and subepoch numbers,
// pointer encoding, event format) are this design's own choices.
package tlr_pkg;

  // ---- configuration -----------------------------------------------------
  localparam int unsigned NCORES          = 8;     // cores per wavefront
  localparam int unsigned ADDR_W          = 64;    // Alpha virtual address
  localparam int unsigned LINE_BYTES      = 16;
  localparam int unsigned LINE_BITS       = LINE_BYTES * 8;
  localparam int unsigned OFS_W           = $clog2(LINE_BYTES);
  localparam int unsigned LA_W            = ADDR_W - OFS_W;  // line address
  localparam int unsigned PCB_SECTIONS    = 8;
  localparam int unsigned PCB_ENTRIES     = 32;    // entries per section
  localparam int unsigned SEC_W           = $clog2(PCB_SECTIONS);
  localparam int unsigned IDX_W           = $clog2(PCB_ENTRIES);
  localparam int unsigned L1_SETS         = 256;   // 8 KB / 16 B / 2 ways
  localparam int unsigned L1_WAYS         = 2;
  localparam int unsigned SET_W           = $clog2(L1_SETS);
  localparam int unsigned WAY_W           = (L1_WAYS > 1) ? $clog2(L1_WAYS) : 1;
  localparam int unsigned BLOOM_ENTRIES   = 257;
  localparam int unsigned EPOCH_INSNS     = 2048;
  localparam int unsigned EPOCH_SUBEPOCHS = 8;
  localparam int unsigned COMMIT_WIDTH    = 12;
  localparam int unsigned CNT_W           = 12;    // instructions per subepoch
  localparam int unsigned EPOCH_W         = 16;    // epoch number
  localparam int unsigned SEN_W           = 16;    // subepoch number
  localparam int unsigned NREGS           = 64;    // 32 int + 32 fp
  localparam int unsigned REGS_PER_CYCLE  = 4;
  localparam int unsigned REG_W           = 64;
  localparam int unsigned CKPT_SLOTS      = 9;
  localparam int unsigned SIG_W           = 32 * REGS_PER_CYCLE; // 4 CRC-32 lanes
  localparam int unsigned TIGHT_WINDOW    = 100;   // cycles

  typedef logic [LA_W-1:0]      line_addr_t;
  typedef logic [LINE_BITS-1:0] line_t;
  typedef logic [EPOCH_W-1:0]   epoch_t;
  typedef logic [SEN_W-1:0]     sen_t;

  // ---- PCB ---------------------------------------------------------------
  typedef enum logic [1:0] {
    PCB_INVALID    = 2'd0,
    PCB_VALID      = 2'd1,
    PCB_SUPERSEDED = 2'd2
  } pcb_state_e;

  // Index pointer from an L1 line to its shadow copy in the PCB.
  typedef struct packed {
    logic             valid;
    logic [SEC_W-1:0] sec;
    logic [IDX_W-1:0] idx;
  } pcb_ptr_t;

  typedef enum logic [2:0] {
    PCB_OP_NONE    = 3'd0,
    PCB_OP_STORE   = 3'd1,  // committed store: follow pointer or allocate
    PCB_OP_INV_PTR = 3'd2,  // invalidation through the index pointer
    PCB_OP_SEARCH  = 3'd3,  // associative search of every section
    PCB_OP_RD_PTR  = 3'd4,  // ownership check through the index pointer
    PCB_OP_UNMAP   = 3'd5   // L1 evicted the mapped line
  } pcb_op_e;

  typedef enum logic [1:0] {
    SA_NONE = 2'd0,   // search only (remote read)
    SA_MAP  = 2'd1,   // local miss refill: mark the hit mapped
    SA_INV  = 2'd2    // remote invalidation: invalidate or supersede the hit
  } search_act_e;

  typedef struct packed {
    pcb_op_e     op;
    search_act_e act;
    line_addr_t  addr;
    pcb_ptr_t    ptr;
    line_t       data;
    sen_t        sen;
  } pcb_req_t;

  typedef struct packed {
    logic       valid;   // one cycle after an accepted request
    logic       hit;     // a valid (not superseded) copy was found/used
    logic       full;    // STORE needed a new entry but the section is full
    pcb_ptr_t   ptr;     // location of the copy (new pointer for STORE)
    line_t      data;
    logic       sen_valid;
    sen_t       sen;     // subepoch number saved when the line was unmapped
  } pcb_resp_t;

  typedef struct packed {
    logic       valid;
    line_addr_t addr;
    line_t      data;
  } wb_t;

  // ---- events from the (baseline) L1 controller to the support logic ------
  typedef enum logic [2:0] {
    EV_NONE      = 3'd0,
    EV_STORE     = 3'd1,  // store committed; line = merged L1 line
    EV_MISS      = 3'd2,  // local L1 miss being refilled into (set, way)
    EV_EVICT     = 3'd3,  // L1 evicts (set, way)
    EV_SNOOP_INV = 3'd4,  // invalidation from another core of the wavefront
    EV_SNOOP_RD  = 3'd5   // read request from another core of the wavefront
  } core_ev_e;

  typedef struct packed {
    core_ev_e             kind;
    line_addr_t           addr;
    logic [SET_W-1:0]     set;
    logic [WAY_W-1:0]     way;
    logic                 l1_hit;     // snoops: the line is present in L1
    logic                 l1_shared;  // snoops: ... and is in shared state
    logic                 dirty;      // evictions: the line was modified
    logic [$clog2(NCORES)-1:0] src;   // snoops: requesting core
    line_t                line;
  } core_ev_t;

  typedef struct packed {
    logic  valid;
    logic  hit;      // the PCB supplies the line (owner)
    line_t data;
    sen_t  sen;      // responder's subepoch number for the data reply
  } core_resp_t;

  // One global subepoch record: what each computing core committed in it.
  typedef struct packed {
    logic                          epoch_end;
    logic [NCORES-1:0]             winner;   // tight-race winners
    logic [NCORES-1:0]             loser;    // tight-race losers
    logic [NCORES-1:0][CNT_W-1:0]  count;
  } sub_rec_t;

  typedef enum logic [1:0] {
    POL_BLIND     = 2'd0,
    POL_STRICT    = 2'd1,
    POL_SELECTIVE = 2'd2
  } order_policy_e;

  // Bloom hash: line address mod 257, computed with 256 == -1 (mod 257).
  function automatic logic [8:0] bloom_hash(input line_addr_t a);
    int signed acc;
    logic [LA_W+7:0] ext;
    acc = 0;
    ext = {8'd0, a};
    for (int b = 0; b < (LA_W + 7) / 8; b++) begin
      if (b % 2 == 0) acc = acc + int'(ext[b*8 +: 8]);
      else            acc = acc - int'(ext[b*8 +: 8]);
    end
    acc = acc % 257;
    if (acc < 0) acc = acc + 257;
    return 9'(acc);
  endfunction

  // Bitwise CRC-32 (poly 0x04C11DB7, MSB first) of one 64-bit word.
  function automatic logic [31:0] crc32_word(input logic [31:0] crc,
                                             input logic [63:0] d);
    logic [31:0] c;
    c = crc;
    for (int i = 63; i >= 0; i--) begin
      if (c[31] ^ d[i]) c = (c << 1) ^ 32'h04C1_1DB7;
      else              c = c << 1;
    end
    return c;
  endfunction

endpackage
