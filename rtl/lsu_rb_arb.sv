// lsu_rb_arb: result bus arbitration and result multiplexer of the load/store unit.
//
// In the B-stage it picks, oldest first, up to NP loads whose data is back
// from the cache and that can be checked now (no older store address is
// unsolved, or the data is known to be stale) and hands slot p to the p-th
// oldest. Slot p's load goes to dependency checker p; the checkers' outcomes
// come back in the same cycle, so the check, the forwarding and the request
// for the result bus happen in parallel within one cycle. A load with outcome
// DC_NONE or DC_FORWARD requests result bus slot p, carrying either the data
// read from the cache or the data forwarded from the store (the result MUX).
// The bus owner answers with rb_grant[p] in the same cycle; a load that is
// refused stays in the UMAB and tries again next cycle.
//
// One result bus slot per load/store port and the external per-slot grant are
// this design's choices; the document names the arbitration and the
// multiplexer and places them in the B-stage.
module lsu_rb_arb
  import lsu_pkg::*;
#(
  parameter int unsigned N  = 32,
  parameter int unsigned NP = 3,
  localparam int unsigned IW = $clog2(N),
  localparam int unsigned AW = $clog2(N + 1)
)(
  input  umab_entry_t   ent [N],
  input  logic [IW-1:0] head,
  input  logic [AW-1:0] oldest_unsolved_age,
  // to / from the dependency checkers
  output logic [NP-1:0] chk_valid,
  output logic [IW-1:0] chk_idx  [NP],
  input  dc_outcome_e   outcome  [NP],
  input  data_t         fwd_data [NP],
  // result bus
  output rb_slot_t      rb_out [NP],
  input  logic [NP-1:0] rb_grant,
  output logic [NP-1:0] deliver,
  // events
  output logic [3:0]    n_forward,
  output logic [3:0]    n_partial,
  output logic [3:0]    n_stale,
  output logic [3:0]    n_rb_stall
);

  always_comb begin
    int cnt;
    cnt = 0;
    chk_valid = '0;
    for (int p = 0; p < NP; p++) chk_idx[p] = '0;
    for (int a = 0; a < N; a++) begin
      logic [IW-1:0] i;
      i = IW'((int'(head) + a) % N);
      if (ent[i].valid && !ent[i].is_store && ent[i].st == U_LOADED &&
          (ent[i].stale || AW'(a) < oldest_unsolved_age) && cnt < NP) begin
        chk_valid[cnt] = 1'b1;
        chk_idx[cnt]   = i;
        cnt++;
      end
    end
  end

  always_comb begin
    n_forward  = '0;
    n_partial  = '0;
    n_stale    = '0;
    n_rb_stall = '0;
    for (int p = 0; p < NP; p++) begin
      rb_out[p].valid = chk_valid[p] && (outcome[p] == DC_NONE || outcome[p] == DC_FORWARD);
      rb_out[p].tag   = ent[chk_idx[p]].tag;
      rb_out[p].data  = (outcome[p] == DC_FORWARD) ? fwd_data[p] : ent[chk_idx[p]].data;
      deliver[p]      = rb_out[p].valid && rb_grant[p];
      if (deliver[p] && outcome[p] == DC_FORWARD)       n_forward  = n_forward + 1'b1;
      if (rb_out[p].valid && !rb_grant[p])              n_rb_stall = n_rb_stall + 1'b1;
      if (chk_valid[p] && outcome[p] == DC_PARTIAL)     n_partial  = n_partial + 1'b1;
      if (chk_valid[p] && outcome[p] == DC_STALE)       n_stale    = n_stale + 1'b1;
    end
  end

endmodule
