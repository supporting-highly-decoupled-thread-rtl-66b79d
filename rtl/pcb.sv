// pcb: post-commit buffer of one core.
//
// Committed stores are written both to the L1 and here; the PCB keeps every
// line dirtied in an epoch until that epoch has been validated by comparing
// the two redundant wavefronts. It is divided into PCB_SECTIONS sections, one
// per epoch in flight (epoch e uses section e mod PCB_SECTIONS), each a small
// fully associative store of PCB_ENTRIES cache lines. Each entry is Invalid,
// Valid (newest copy: supplied to requesters and written back) or Superseded
// (a newer version exists: never supplied, but written back when its epoch is
// released, unless the superseding epoch is already validated, in which case
// the write-back is dropped to save L2 bandwidth). At most one Valid copy of a
// line exists, so the associative search combines the hits with an OR and
// needs no priority encoder. An explicit mapped bit marks Valid lines that are
// also in the L1; they are found through the L1's index pointer and are
// excluded from associative searches.
//
// Interface: one request port (req_valid/req, response in resp one cycle
// later, always accepted). Epoch control pulses: epoch_adv opens the next
// section, validate marks the oldest unvalidated epoch validated, release_req
// asks to release (drain) the oldest validated section, rollback discards all
// unvalidated sections. Draining (write-back on wb/wb_ready when wb_en is set)
// and the section walk used to build the epoch signature (walk_*) run in the
// background, only in cycles with no request, so the buffer needs one port.
//
// Choices of this design: entries are allocated at the lowest free index;
// an epoch's section counts as full when no entry is free; a rollback turns
// lines superseded by a discarded epoch back to Valid and clears all mapped
// bits (the L1 is flushed); epoch numbers are 16-bit counters. An
// invalidation from another core marks the copy Superseded even when it is
// in the current section (the published scheme frees it): the entry keeps
// its slot, so allocation and the section signature do not depend on when
// the invalidation arrived, which differs between the two wavefronts.
module pcb
  import tlr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // request port
  input  logic        req_valid,
  input  pcb_req_t    req,
  output pcb_resp_t   resp,
  // epoch control
  input  logic        epoch_adv,
  input  logic        validate,
  input  logic        release_req,
  input  logic        rollback,
  input  logic        wb_en,
  output wb_t         wb,
  input  logic        wb_ready,
  output logic        release_done,
  // section walk for the signature
  input  logic        walk_req,
  input  epoch_t      walk_epoch,
  output logic        walk_valid,
  output line_addr_t  walk_addr,
  output line_t       walk_data,
  output logic        walk_done,
  // status
  output epoch_t      cur_epoch,
  output epoch_t      val_epoch,
  output epoch_t      rel_epoch,
  output logic        cur_full,
  output logic [IDX_W:0] cur_used,
  output logic        next_free,
  output logic        busy_bg
);

  pcb_state_e st      [PCB_SECTIONS][PCB_ENTRIES];
  logic       mapped  [PCB_SECTIONS][PCB_ENTRIES];
  line_addr_t addr_q  [PCB_SECTIONS][PCB_ENTRIES];
  line_t      data_q  [PCB_SECTIONS][PCB_ENTRIES];
  epoch_t     sup_ep  [PCB_SECTIONS][PCB_ENTRIES];
  logic       senv_q  [PCB_SECTIONS][PCB_ENTRIES];
  sen_t       sen_q   [PCB_SECTIONS][PCB_ENTRIES];

  epoch_t cur_e, val_e, rel_e;
  logic [SEC_W-1:0] cur_sec;
  assign cur_sec   = cur_e[SEC_W-1:0];
  assign cur_epoch = cur_e;
  assign val_epoch = val_e;
  assign rel_epoch = rel_e;

  // ---- free entry of the current section ---------------------------------
  logic             has_free;
  logic [IDX_W-1:0] free_idx;
  always_comb begin
    has_free = 1'b0;
    free_idx = '0;
    cur_used = '0;
    for (int i = PCB_ENTRIES - 1; i >= 0; i--) begin
      if (st[cur_sec][i] == PCB_INVALID) begin
        has_free = 1'b1;
        free_idx = IDX_W'(i);
      end else begin
        cur_used = cur_used + 1'b1;
      end
    end
  end
  assign cur_full  = !has_free;
  assign next_free = (EPOCH_W'(cur_e + 1'b1 - rel_e) < EPOCH_W'(PCB_SECTIONS));

  // ---- pointer sanity check: the pointed entry holds a Valid copy of addr -
  logic ptr_ok;
  assign ptr_ok = req.ptr.valid &&
                  st[req.ptr.sec][req.ptr.idx] == PCB_VALID &&
                  addr_q[req.ptr.sec][req.ptr.idx] == req.addr;

  // ---- associative search (Valid, unmapped lines only) -------------------
  logic [PCB_SECTIONS*PCB_ENTRIES-1:0] match;
  logic       s_hit;
  pcb_ptr_t   s_ptr;
  line_t      s_data;
  logic       s_senv;
  sen_t       s_sen;
  always_comb begin
    s_ptr  = '0;
    s_data = '0;
    s_senv = 1'b0;
    s_sen  = '0;
    for (int s = 0; s < PCB_SECTIONS; s++)
      for (int i = 0; i < PCB_ENTRIES; i++) begin
        match[s*PCB_ENTRIES+i] = st[s][i] == PCB_VALID && !mapped[s][i] &&
                                 addr_q[s][i] == req.addr;
        if (match[s*PCB_ENTRIES+i]) begin
          // at most one entry matches, so OR-combining is exact
          s_ptr.sec = s_ptr.sec | SEC_W'(s);
          s_ptr.idx = s_ptr.idx | IDX_W'(i);
          s_data    = s_data | data_q[s][i];
          s_senv    = s_senv | senv_q[s][i];
          s_sen     = s_sen | sen_q[s][i];
        end
      end
    s_hit       = |match;
    s_ptr.valid = s_hit;
  end

  // ---- background engine: drain (release) and walk -----------------------
  typedef enum logic [1:0] {BG_IDLE, BG_DRAIN, BG_WALK} bg_e;
  bg_e              bg;
  logic [IDX_W:0]   bg_i;
  logic [SEC_W-1:0] bg_sec;
  logic             drain_pend, walk_pend;
  epoch_t           walk_ep_q;

  logic             bg_slot;     // the port is free this cycle
  logic             bg_entry_wb; // current drain entry needs a write-back
  logic [IDX_W-1:0] bg_idx;
  assign bg_slot = !(req_valid && req.op != PCB_OP_NONE);
  assign bg_idx  = bg_i[IDX_W-1:0];
  assign busy_bg = (bg != BG_IDLE) || drain_pend || walk_pend;

  always_comb begin
    bg_entry_wb = 1'b0;
    if (bg == BG_DRAIN && !bg_i[IDX_W]) begin
      if (st[bg_sec][bg_idx] == PCB_VALID)
        bg_entry_wb = 1'b1;
      else if (st[bg_sec][bg_idx] == PCB_SUPERSEDED)
        bg_entry_wb = !(sup_ep[bg_sec][bg_idx] < val_e);
    end
  end

  assign wb.valid = bg_slot && bg_entry_wb && wb_en;
  assign wb.addr  = addr_q[bg_sec][bg_idx];
  assign wb.data  = data_q[bg_sec][bg_idx];

  always_comb begin
    walk_valid = 1'b0;
    if (bg == BG_WALK && !bg_i[IDX_W] && bg_slot)
      walk_valid = st[bg_sec][bg_idx] != PCB_INVALID;
  end
  assign walk_addr = addr_q[bg_sec][bg_idx];
  assign walk_data = data_q[bg_sec][bg_idx];

  // ---- state update --------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < PCB_SECTIONS; s++)
        for (int i = 0; i < PCB_ENTRIES; i++) begin
          st[s][i]     <= PCB_INVALID;
          mapped[s][i] <= 1'b0;
          addr_q[s][i] <= '0;
          data_q[s][i] <= '0;
          sup_ep[s][i] <= '0;
          senv_q[s][i] <= 1'b0;
          sen_q[s][i]  <= '0;
        end
      cur_e        <= '0;
      val_e        <= '0;
      rel_e        <= '0;
      resp         <= '0;
      bg           <= BG_IDLE;
      bg_i         <= '0;
      bg_sec       <= '0;
      drain_pend   <= 1'b0;
      walk_pend    <= 1'b0;
      walk_ep_q    <= '0;
      release_done <= 1'b0;
      walk_done    <= 1'b0;
    end else begin
      resp         <= '0;
      release_done <= 1'b0;
      walk_done    <= 1'b0;

      // ---------------- request port ----------------
      if (req_valid) begin
        resp.valid <= (req.op != PCB_OP_NONE);
        unique case (req.op)
          PCB_OP_STORE: begin
            if (ptr_ok && req.ptr.sec == cur_sec) begin
              data_q[req.ptr.sec][req.ptr.idx] <= req.data;
              resp.hit <= 1'b1;
              resp.ptr <= req.ptr;
            end else if (!has_free) begin
              resp.full <= 1'b1;
            end else begin
              if (ptr_ok) begin
                // first write of this epoch to a line buffered earlier
                st[req.ptr.sec][req.ptr.idx]     <= PCB_SUPERSEDED;
                sup_ep[req.ptr.sec][req.ptr.idx] <= cur_e;
              end
              st[cur_sec][free_idx]     <= PCB_VALID;
              mapped[cur_sec][free_idx] <= 1'b1;
              addr_q[cur_sec][free_idx] <= req.addr;
              data_q[cur_sec][free_idx] <= req.data;
              senv_q[cur_sec][free_idx] <= 1'b0;
              resp.hit <= 1'b1;
              resp.ptr <= '{valid: 1'b1, sec: cur_sec, idx: free_idx};
            end
          end
          PCB_OP_INV_PTR: begin
            if (ptr_ok) begin
              // also in the current section: the entry keeps its place so
              // that the epoch signature does not depend on when the
              // invalidation arrived
              st[req.ptr.sec][req.ptr.idx]     <= PCB_SUPERSEDED;
              sup_ep[req.ptr.sec][req.ptr.idx] <= cur_e;
              mapped[req.ptr.sec][req.ptr.idx] <= 1'b0;
              resp.hit <= 1'b1;
              resp.ptr <= req.ptr;
            end
          end
          PCB_OP_SEARCH: begin
            resp.hit       <= s_hit;
            resp.ptr       <= s_ptr;
            resp.data      <= s_data;
            resp.sen_valid <= s_senv;
            resp.sen       <= s_sen;
            if (s_hit) begin
              if (req.act == SA_MAP)
                mapped[s_ptr.sec][s_ptr.idx] <= 1'b1;
              else if (req.act == SA_INV) begin
                st[s_ptr.sec][s_ptr.idx]     <= PCB_SUPERSEDED;
                sup_ep[s_ptr.sec][s_ptr.idx] <= cur_e;
              end
            end
          end
          PCB_OP_RD_PTR: begin
            resp.hit  <= ptr_ok;
            resp.ptr  <= ptr_ok ? req.ptr : '0;
            resp.data <= ptr_ok ? data_q[req.ptr.sec][req.ptr.idx] : '0;
          end
          PCB_OP_UNMAP: begin
            if (ptr_ok) begin
              mapped[req.ptr.sec][req.ptr.idx] <= 1'b0;
              senv_q[req.ptr.sec][req.ptr.idx] <= 1'b1;
              sen_q[req.ptr.sec][req.ptr.idx]  <= req.sen;
              resp.hit <= 1'b1;
              resp.ptr <= req.ptr;
            end
          end
          default: ;
        endcase
      end

      // ---------------- background engine ----------------
      if (release_req) drain_pend <= 1'b1;
      if (walk_req) begin
        walk_pend <= 1'b1;
        walk_ep_q <= walk_epoch;
      end
      unique case (bg)
        BG_IDLE: begin
          if ((drain_pend || release_req) && rel_e < val_e) begin
            bg         <= BG_DRAIN;
            bg_sec     <= rel_e[SEC_W-1:0];
            bg_i       <= '0;
            drain_pend <= 1'b0;
          end else if (walk_pend && !walk_req) begin
            bg        <= BG_WALK;
            bg_sec    <= walk_ep_q[SEC_W-1:0];
            bg_i      <= '0;
            walk_pend <= 1'b0;
          end else if (drain_pend && !(rel_e < val_e)) begin
            drain_pend <= 1'b0;   // nothing validated to release
          end
        end
        BG_DRAIN: begin
          if (bg_i[IDX_W]) begin
            bg           <= BG_IDLE;
            rel_e        <= rel_e + 1'b1;
            release_done <= 1'b1;
          end else if (bg_slot && (!bg_entry_wb || !wb_en || wb_ready)) begin
            st[bg_sec][bg_idx]     <= PCB_INVALID;
            mapped[bg_sec][bg_idx] <= 1'b0;
            bg_i <= bg_i + 1'b1;
          end
        end
        BG_WALK: begin
          if (bg_i[IDX_W]) begin
            bg        <= BG_IDLE;
            walk_done <= 1'b1;
          end else if (bg_slot) begin
            bg_i <= bg_i + 1'b1;
          end
        end
        default: bg <= BG_IDLE;
      endcase

      // ---------------- epoch control ----------------
      if (validate) val_e <= val_e + 1'b1;
      if (epoch_adv) cur_e <= cur_e + 1'b1;
      if (rollback) begin
        cur_e <= val_e;
        for (int s = 0; s < PCB_SECTIONS; s++)
          for (int i = 0; i < PCB_ENTRIES; i++) begin
            mapped[s][i] <= 1'b0;
            if (EPOCH_W'(SEC_W'(s) - val_e[SEC_W-1:0]) <=
                EPOCH_W'(cur_e - val_e))
              st[s][i] <= PCB_INVALID;
            else if (st[s][i] == PCB_SUPERSEDED && !(sup_ep[s][i] < val_e))
              st[s][i] <= PCB_VALID;
          end
        if (bg == BG_WALK) bg <= BG_IDLE;
        walk_pend <= 1'b0;
      end
    end
  end

  // at most one Valid, unmapped copy of a line may exist
  assert property (@(posedge clk) disable iff (!rst_n)
                   req_valid && req.op == PCB_OP_SEARCH |-> $onehot0(match));

endmodule
