// lsu: load/store unit with the preload scheduling policy for a CISC (x86)
// superscalar processor.
//
// Loads and stores go through five stages:
//   R  registration: dispatched in order into the reservation station (RS)
//      and, in the same cycle, into the Unified Memory Access Buffer (UMAB),
//      which keeps their program order;
//   A  linear address generation in one of NP AGUs, once the RS finds all
//      operands present (issue from the RS is out of order);
//   S  scheduling control: up to NP executable accesses go to the NP data
//      cache ports, oldest first. Under preload a load needs only its
//      address: it may pass older stores whose addresses are still unsolved.
//      A store needs its address, the head of the UMAB and its retirement
//      permission from the reorder buffer;
//   I  data cache access (one cycle);
//   B  dependency check of the loaded load against all older stores,
//      forwarding of store data, result bus arbitration, or re-issue.
// With REDUCED = 1 the S-stage is merged into the A-stage (reduced
// pipeline), saving a cycle of load latency.
//
// Latency with no conflicts and a free result bus: a load dispatched in
// cycle 0 with its operands present drives the result bus in cycle 4
// (cycle 3 with REDUCED = 1). A store reports address generation on
// st_done in cycle 1 and writes the cache in the first cycle that it is at
// the UMAB head with its permission.
//
// Interfaces:
//   dispatch     disp_valid/disp_op, up to DISP_W per cycle, lane 0 oldest.
//                disp_accept marks the lanes taken this cycle: the valid
//                lanes in order, as many as fit in both the free RS and the
//                free UMAB entries. It depends on disp_valid; the dispatcher
//                offers the rest again next cycle (free RS and UMAB
//                entries for the valid ones).
//   result bus   rb_ext: results of the other units (operand wakeup);
//                rb_out/rb_grant: one slot per port, granted in the same
//                cycle. Granted load results also wake up the RS.
//   reorder buf. st_done: a store's address and data are in (it may retire);
//                commit_valid/commit_tag: retirement permission for a store.
//   data cache   NP ports; request in cycle t, taken at the clock edge,
//                read data in cycle t+1. Reads see the contents before any
//                write of the same edge. Cache misses are not modelled.
//   perf         per-cycle event counts.
// The document fixes the policy, the stages and their order, the UMAB, the
// issue rules and the main sizes (32-entry UMAB, 3 ports, 16-entry RS,
// 8 micro-operations dispatched per cycle). Widths, handshakes, tag size,
// result bus slots and the stale-data re-issue are this design's choices.
module lsu
  import lsu_pkg::*;
#(
  parameter int unsigned UMAB_N  = 32,
  parameter int unsigned RS_N    = 16,
  parameter int unsigned NP      = 3,
  parameter int unsigned DISP_W  = 8,
  parameter int unsigned RB_EXT  = 4,
  parameter bit          REDUCED = 1'b0,
  localparam int unsigned IW     = $clog2(UMAB_N)
)(
  input  logic              clk,
  input  logic              rst_n,
  // dispatch
  input  logic [DISP_W-1:0] disp_valid,
  input  mop_t              disp_op [DISP_W],
  output logic [DISP_W-1:0] disp_accept,
  // result bus
  input  rb_slot_t          rb_ext [RB_EXT],
  output rb_slot_t          rb_out [NP],
  input  logic [NP-1:0]     rb_grant,
  // reorder buffer
  output logic [NP-1:0]     st_done_valid,
  output tag_t              st_done_tag [NP],
  input  logic [NP-1:0]     commit_valid,
  input  tag_t              commit_tag [NP],
  // data cache
  output logic [NP-1:0]     dc_req_valid,
  output logic [NP-1:0]     dc_req_we,
  output addr_t             dc_req_addr  [NP],
  output size_e             dc_req_size  [NP],
  output data_t             dc_req_wdata [NP],
  input  data_t             dc_rdata     [NP],
  // events
  output perf_t             perf
);

  localparam int unsigned AW  = $clog2(UMAB_N + 1);
  localparam int unsigned RCW = $clog2(RS_N + 1);
  localparam int unsigned RBW = RB_EXT + NP;

  // ---------------- R-stage: dispatch acceptance ----------------
  logic [AW-1:0]  umab_free;
  logic [RCW-1:0] rs_free;
  logic [IW-1:0]  alloc_idx [DISP_W];
  logic [IW-1:0]  head;
  logic           disp_fire;
  int unsigned    nvalid, ntake;

  always_comb begin
    nvalid = 0;
    ntake  = 0;
    for (int d = 0; d < DISP_W; d++) begin
      disp_accept[d] = 1'b0;
      if (disp_valid[d]) begin
        nvalid++;
        if (nvalid <= int'(rs_free) && nvalid <= int'(umab_free)) begin
          disp_accept[d] = 1'b1;
          ntake++;
        end
      end
    end
    disp_fire = (ntake != 0);
  end

  // ---------------- result bus seen by the RS ----------------
  rb_slot_t rb_all [RBW];
  logic [NP-1:0] deliver;
  always_comb begin
    for (int k = 0; k < RB_EXT; k++) rb_all[k] = rb_ext[k];
    for (int p = 0; p < NP; p++) begin
      rb_all[RB_EXT + p]       = rb_out[p];
      rb_all[RB_EXT + p].valid = deliver[p];
    end
  end

  // ---------------- reservation station ----------------
  logic [NP-1:0] rs_iss_valid;
  mop_t          rs_iss_op   [NP];
  logic [IW-1:0] rs_iss_uidx [NP];

  lsu_rs #(.N_RS(RS_N), .UMAB_N(UMAB_N), .DISP_W(DISP_W), .NP(NP), .RB_W(RBW)) u_rs (
    .clk, .rst_n,
    .disp_fire, .disp_valid(disp_accept), .disp_op, .disp_uidx(alloc_idx),
    .free_cnt(rs_free),
    .umab_head(head),
    .rb(rb_all),
    .iss_valid(rs_iss_valid), .iss_op(rs_iss_op), .iss_uidx(rs_iss_uidx)
  );

  // ---------------- A-stage: address generation ----------------
  addr_t agu_addr  [NP];
  data_t agu_sdata [NP];
  for (genvar p = 0; p < NP; p++) begin : g_agu
    lsu_agu u_agu (
      .seg(rs_iss_op[p].seg), .base(rs_iss_op[p].base.val), .index(rs_iss_op[p].index.val),
      .scale(rs_iss_op[p].scale), .disp(rs_iss_op[p].disp), .lin_addr(agu_addr[p])
    );
    assign agu_sdata[p]     = rs_iss_op[p].sdata.val;
    assign st_done_valid[p] = rs_iss_valid[p] && rs_iss_op[p].is_store;
    assign st_done_tag[p]   = rs_iss_op[p].tag;
  end

  // ---------------- UMAB ----------------
  umab_entry_t   ent [UMAB_N];
  logic [AW-1:0] oldest_unsolved_age, oldest_store_age;
  logic [NP-1:0] sch_valid;
  logic [IW-1:0] sch_idx [NP];
  logic          st_wr_valid;
  addr_t         st_wr_addr;
  size_e         st_wr_size;
  logic [NP-1:0] cap_valid;
  logic [IW-1:0] cap_idx [NP];
  logic [NP-1:0] chk_valid;
  logic [IW-1:0] chk_idx [NP];
  dc_outcome_e   outcome [NP];
  data_t         fwd_data [NP];

  lsu_umab #(.N(UMAB_N), .DISP_W(DISP_W), .NP(NP)) u_umab (
    .clk, .rst_n,
    .disp_fire, .disp_valid(disp_accept), .disp_op, .alloc_idx, .free_cnt(umab_free),
    .agu_valid(rs_iss_valid), .agu_uidx(rs_iss_uidx), .agu_addr, .agu_sdata,
    .commit_valid, .commit_tag,
    .iss_valid(sch_valid), .iss_idx(sch_idx), .st_wr_valid, .st_wr_addr, .st_wr_size,
    .cap_valid, .cap_idx, .cap_data(dc_rdata),
    .chk_valid, .chk_idx, .chk_outcome(outcome), .deliver,
    .ent, .head, .oldest_unsolved_age, .oldest_store_age
  );

  // ---------------- S-stage: speculative scheduling control ----------------
  logic [3:0] n_preload;
  lsu_sched #(.N(UMAB_N), .NP(NP), .REDUCED(REDUCED)) u_sched (
    .ent, .head, .oldest_unsolved_age,
    .agu_valid(rs_iss_valid), .agu_uidx(rs_iss_uidx), .agu_addr, .agu_sdata,
    .iss_valid(sch_valid), .iss_idx(sch_idx),
    .dc_req_valid, .dc_req_we, .dc_req_addr, .dc_req_size, .dc_req_wdata,
    .st_wr_valid, .st_wr_addr, .st_wr_size, .n_preload
  );

  // ---------------- I-stage: loads in the data cache ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_valid <= '0;
      for (int p = 0; p < NP; p++) cap_idx[p] <= '0;
    end else begin
      for (int p = 0; p < NP; p++) begin
        cap_valid[p] <= dc_req_valid[p] && !dc_req_we[p];
        cap_idx[p]   <= sch_idx[p];
      end
    end
  end

  // ---------------- B-stage: dependency check and result bus ----------------
  for (genvar p = 0; p < NP; p++) begin : g_chk
    lsu_dep_check #(.N(UMAB_N)) u_chk (
      .ent, .head, .ld_idx(chk_idx[p]),
      .outcome(outcome[p]), .fwd_data(fwd_data[p])
    );
  end

  logic [3:0] n_forward, n_partial, n_stale, n_rb_stall;
  lsu_rb_arb #(.N(UMAB_N), .NP(NP)) u_rb (
    .ent, .head, .oldest_unsolved_age,
    .chk_valid, .chk_idx, .outcome, .fwd_data,
    .rb_out, .rb_grant, .deliver,
    .n_forward, .n_partial, .n_stale, .n_rb_stall
  );

  always_comb begin
    perf.preload         = n_preload;
    perf.forward         = n_forward;
    perf.reissue_partial = n_partial;
    perf.reissue_stale   = n_stale;
    perf.rb_stall        = n_rb_stall;
    perf.rs_issue        = '0;
    for (int p = 0; p < NP; p++) if (rs_iss_valid[p]) perf.rs_issue = perf.rs_issue + 1'b1;
    perf.disp_stall      = (ntake != nvalid);
  end

  // ---------------- rules ----------------
  // only the UMAB head store may write the cache, so at most one write per cycle
  a_one_store_write: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(dc_req_we) <= 1) else $error("more than one store write in a cycle");
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !disp_fire || ntake <= int'(umab_free)) else $error("UMAB overflow");

endmodule
