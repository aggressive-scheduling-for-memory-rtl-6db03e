// lsu_dep_check: B-stage dependency check and forwarding control for one load.
//
// After a load's data is back from the data cache, its linear address is
// compared with the address of every older store still in the UMAB: one
// 32-bit range comparator per UMAB entry, all in parallel. The outcome:
//   DC_STALE   - the load's cache data was overtaken by a store write; it must
//                be re-issued (checked first).
//   DC_WAIT    - an older store's address is still unsolved; the check is
//                repeated later.
//   DC_NONE    - no older store touches the load's bytes: the cache data
//                stands.
//   DC_FORWARD - the youngest older store that touches the load's bytes holds
//                all of them: its data is forwarded (fwd_data).
//   DC_PARTIAL - the youngest overlapping older store holds only some of the
//                bytes: the load is re-issued once every older store has
//                completed.
// Purely combinational; the outcome feeds the result bus arbitration and the
// UMAB in the same cycle. Checking after the cache access, forwarding whole
// data from a conflicting store and re-issuing otherwise follow the document;
// the byte-range overlap test and the youngest-store priority are this
// design's way of doing it for x86 accesses of 1, 2 and 4 bytes.
module lsu_dep_check
  import lsu_pkg::*;
#(
  parameter int unsigned N  = 32,
  localparam int unsigned IW = $clog2(N)
)(
  input  umab_entry_t   ent [N],
  input  logic [IW-1:0] head,
  input  logic [IW-1:0] ld_idx,
  output dc_outcome_e   outcome,
  output data_t         fwd_data
);

  function automatic int age_of(int i, int h);
    return (i >= h) ? i - h : i + int'(N) - h;
  endfunction

  // comparator per UMAB entry
  logic [N-1:0] older_st, unsolved, hit, full;
  always_comb begin
    for (int j = 0; j < N; j++) begin
      older_st[j] = ent[j].valid && ent[j].is_store &&
                    age_of(j, int'(head)) < age_of(int'(ld_idx), int'(head));
      unsolved[j] = older_st[j] && ent[j].st == U_WAIT_ADDR;
      hit[j]      = older_st[j] && !unsolved[j] &&
                    overlaps(ent[j].addr, ent[j].size, ent[ld_idx].addr, ent[ld_idx].size);
      full[j]     = covers(ent[j].addr, ent[j].size, ent[ld_idx].addr, ent[ld_idx].size);
    end
  end

  // youngest overlapping older store and the resulting outcome
  always_comb begin
    logic          found;
    logic [IW-1:0] fwd_idx;
    found    = 1'b0;
    fwd_idx  = '0;
    for (int a = 0; a < N; a++) begin
      logic [IW-1:0] j;
      j = IW'((int'(head) + a) % N);
      if (hit[j]) begin
        found   = 1'b1;
        fwd_idx = j;
      end
    end
    fwd_data = fwd_extract(ent[fwd_idx].addr[1:0], ent[fwd_idx].data, ent[ld_idx].addr[1:0], ent[ld_idx].size);
    if (ent[ld_idx].stale)  outcome = DC_STALE;
    else if (|unsolved)     outcome = DC_WAIT;
    else if (!found)        outcome = DC_NONE;
    else if (full[fwd_idx]) outcome = DC_FORWARD;
    else                    outcome = DC_PARTIAL;
  end

endmodule
