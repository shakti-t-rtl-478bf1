// BnBCache: base and bounds cached at register level, reached by one-level
// indexing from each GPR.
//
// Two tables, as in the source's figures:
//   BnBIndex  - one {index, v} per GPR: which BnBLookUp row holds the
//               bounds of the pointer in that register.
//   BnBLookUp - BNB_ENTRIES rows of {base, bound, ptr_id, v}.
// Aliased pointers (several GPRs holding pointers to the same object) share
// one BnBLookUp row, so bounds are never duplicated.
//
// Read ports (execute stage, combinational): register ra -> its bounds,
// bv = 1 when both its index and the row it names are valid. A query port
// (memory stage) looks up a ptr_id. The write-back port, on the rising edge:
//   BIND rd to {ptr_id, base, bound}: if a valid row holds that ptr_id it is
//     reused (and refreshed), else the first free row, else the row under a
//     round-robin pointer is evicted; every GPR that pointed at an evicted
//     row loses its binding.
//   UNBIND rd: clears rd's index valid bit; the row stays (the source's
//     example keeps a row whose register was overwritten, to be found again
//     when the pointer is restored).
//   inval ptr_id (wrplm): every row with that ptr_id is invalidated, and the
//     GPRs that pointed at it lose binding and tag (tag_clr, combinational),
//     as the source shows for free().
// The table layout and sizes follow the source; the allocation order,
// eviction policy and the coherence with wrplm are this design's own.
module bnb_cache
  import shakti_t_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  reg_idx_t ra [2],
  output meta_t    rmeta [2],
  input  xlen_t    q_pid,
  output logic     q_hit,
  output meta_t    q_meta,
  input  logic     w_en,
  input  bnb_op_e  w_op,
  input  reg_idx_t w_rd,
  input  meta_t    w_meta,
  input  logic     inval,
  input  xlen_t    inval_pid,
  output logic [NREGS-1:0] tag_clr,
  output logic     ev_hit,
  output logic     ev_alloc,
  output logic     ev_evict,
  // inspection
  input  reg_idx_t dbg_reg,
  output logic     dbg_iv,
  output logic [BNB_IW-1:0] dbg_idx,
  input  logic [BNB_IW-1:0] dbg_row,
  output meta_t    dbg_meta
);
  typedef logic [BNB_IW-1:0] row_t;

  logic [NREGS-1:0] idx_v;
  row_t             idx   [NREGS];
  logic [BNB_ENTRIES-1:0] lu_v;
  xlen_t            lu_pid   [BNB_ENTRIES];
  xlen_t            lu_base  [BNB_ENTRIES];
  xlen_t            lu_bound [BNB_ENTRIES];
  row_t             rr;

  function automatic meta_t row_meta(row_t r, logic v);
    meta_t x;
    x.bv    = v;
    x.pid   = lu_pid[r];
    x.base  = lu_base[r];
    x.bound = lu_bound[r];
    return x;
  endfunction

  always_comb begin
    for (int p = 0; p < 2; p++)
      rmeta[p] = row_meta(idx[ra[p]], (ra[p] != '0) && idx_v[ra[p]] && lu_v[idx[ra[p]]]);
  end

  // query port
  row_t q_row;
  always_comb begin
    q_hit = 1'b0;
    q_row = '0;
    for (int i = 0; i < BNB_ENTRIES; i++)
      if (!q_hit && lu_v[i] && lu_pid[i] == q_pid) begin
        q_hit = 1'b1;
        q_row = row_t'(i);
      end
    q_meta = row_meta(q_row, q_hit);
  end

  // write-back: choose the row for a BIND
  logic w_bind, hit, has_free;
  row_t hit_row, free_row, row;
  always_comb begin
    w_bind   = w_en && (w_op == BNB_BIND) && (w_rd != '0);
    hit      = 1'b0;
    hit_row  = '0;
    has_free = 1'b0;
    free_row = '0;
    for (int i = 0; i < BNB_ENTRIES; i++) begin
      if (!hit && lu_v[i] && lu_pid[i] == w_meta.pid) begin
        hit = 1'b1; hit_row = row_t'(i);
      end
      if (!has_free && !lu_v[i]) begin
        has_free = 1'b1; free_row = row_t'(i);
      end
    end
    row = hit ? hit_row : (has_free ? free_row : rr);
  end

  assign ev_hit   = w_bind && hit;
  assign ev_alloc = w_bind && !hit;
  assign ev_evict = w_bind && !hit && !has_free;

  // rows and registers dropped by an invalidation
  logic [BNB_ENTRIES-1:0] inv_rows;
  always_comb begin
    for (int i = 0; i < BNB_ENTRIES; i++)
      inv_rows[i] = inval && lu_v[i] && (lu_pid[i] == inval_pid);
    for (int r = 0; r < NREGS; r++)
      tag_clr[r] = idx_v[r] && inv_rows[idx[r]];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx_v <= '0;
      lu_v  <= '0;
      rr    <= '0;
      for (int r = 0; r < NREGS; r++) idx[r] <= '0;
      for (int i = 0; i < BNB_ENTRIES; i++) begin
        lu_pid[i] <= '0; lu_base[i] <= '0; lu_bound[i] <= '0;
      end
    end else begin
      for (int i = 0; i < BNB_ENTRIES; i++)
        if (inv_rows[i]) lu_v[i] <= 1'b0;
      for (int r = 0; r < NREGS; r++) begin
        if (tag_clr[r]) idx_v[r] <= 1'b0;
        if (ev_evict && idx_v[r] && idx[r] == rr) idx_v[r] <= 1'b0;
      end
      if (w_bind) begin
        lu_v[row]     <= 1'b1;
        lu_pid[row]   <= w_meta.pid;
        lu_base[row]  <= w_meta.base;
        lu_bound[row] <= w_meta.bound;
        idx[w_rd]     <= row;
        idx_v[w_rd]   <= 1'b1;
        if (ev_evict) rr <= rr + 1'b1;
      end else if (w_en && w_op == BNB_UNBIND && w_rd != '0) begin
        idx_v[w_rd] <= 1'b0;
      end
    end
  end

  assign dbg_iv   = idx_v[dbg_reg];
  assign dbg_idx  = idx[dbg_reg];
  assign dbg_meta = row_meta(dbg_row, lu_v[dbg_row]);
endmodule
