// lsu_umab: Unified Memory Access Buffer.
//
// One circular buffer holds every load and store of the load/store unit that
// has not yet left it, in program order, so that the order between loads and
// stores is kept in a single structure. Entries are registered in order at
// dispatch (R-stage, up to DISP_W per cycle) and leave in order from the
// head: a store when it writes the data cache (which it may only do at the
// head), a load once its result has been delivered on the result bus.
//
// Each entry holds the tag, kind and size of the access, its linear address
// once generated, store data or the data a load read from the cache, the
// store's retirement permission, and a state (see lsu_pkg::ustate_e). The
// buffer applies, at each clock edge, the events reported by the other parts
// of the unit: address generation, retirement permission, issue to the data
// cache, data returned by the cache and the outcome of the B-stage
// dependency check. A load waiting for re-issue after a partial overlap
// returns to the issuable state once no older store is left in the buffer.
//
// Store write snooping (this design's addition, needed for correct data with
// a data cache that returns the old contents when a location is written in
// the same cycle it is read): when the store at the head writes the cache,
// every load that has already read or is reading the cache and overlaps the
// store is marked stale and will be re-issued.
//
// Outputs are the entry registers, the head index, the number of free
// entries, the indices given to the operations dispatched this cycle, and the
// ages (distance from the head) of the oldest store with an unsolved address
// and of the oldest store; N when there is none.
// The 32-entry default is the document's main configuration.
module lsu_umab
  import lsu_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter int unsigned DISP_W = 8,
  parameter int unsigned NP     = 3,
  localparam int unsigned IW    = $clog2(N),
  localparam int unsigned AW    = $clog2(N + 1)
)(
  input  logic              clk,
  input  logic              rst_n,
  // registration (R-stage)
  input  logic              disp_fire,
  input  logic [DISP_W-1:0] disp_valid,
  input  mop_t              disp_op   [DISP_W],
  output logic [IW-1:0]     alloc_idx [DISP_W],
  output logic [AW-1:0]     free_cnt,
  // address generation (A-stage)
  input  logic [NP-1:0]     agu_valid,
  input  logic [IW-1:0]     agu_uidx  [NP],
  input  addr_t             agu_addr  [NP],
  input  data_t             agu_sdata [NP],
  // retirement permission from the reorder buffer
  input  logic [NP-1:0]     commit_valid,
  input  tag_t              commit_tag [NP],
  // issue to the data cache (S-stage, or A-stage with the reduced pipeline)
  input  logic [NP-1:0]     iss_valid,
  input  logic [IW-1:0]     iss_idx [NP],
  input  logic              st_wr_valid,   // the head store writes the cache this cycle
  input  addr_t             st_wr_addr,
  input  size_e             st_wr_size,
  // load data from the cache (I-stage)
  input  logic [NP-1:0]     cap_valid,
  input  logic [IW-1:0]     cap_idx  [NP],
  input  data_t             cap_data [NP],
  // dependency check (B-stage)
  input  logic [NP-1:0]     chk_valid,
  input  logic [IW-1:0]     chk_idx     [NP],
  input  dc_outcome_e       chk_outcome [NP],
  input  logic [NP-1:0]     deliver,
  // state
  output umab_entry_t       ent [N],
  output logic [IW-1:0]     head,
  output logic [AW-1:0]     oldest_unsolved_age,
  output logic [AW-1:0]     oldest_store_age
);

  umab_entry_t     ent_q [N];
  logic [IW-1:0]   head_q;
  logic [AW-1:0]   cnt_q;

  function automatic logic [IW-1:0] wrap_add(logic [IW-1:0] a, int unsigned b);
    return IW'((int'(a) + b) % N);
  endfunction

  function automatic logic [AW-1:0] age_of(logic [IW-1:0] i, logic [IW-1:0] h);
    return (i >= h) ? AW'(i - h) : AW'(int'(i) + N - int'(h));
  endfunction

  assign ent      = ent_q;
  assign head     = head_q;
  assign free_cnt = AW'(N) - cnt_q;

  // indices of this cycle's registrations
  always_comb begin
    int m;
    m = 0;
    for (int d = 0; d < DISP_W; d++) begin
      alloc_idx[d] = wrap_add(head_q, int'(cnt_q) + m);
      if (disp_valid[d]) m++;
    end
  end

  // ages of the oldest unsolved store and the oldest store
  always_comb begin
    oldest_unsolved_age = AW'(N);
    oldest_store_age    = AW'(N);
    for (int a = N - 1; a >= 0; a--) begin
      logic [IW-1:0] i;
      i = wrap_add(head_q, a);
      if (a < int'(cnt_q) && ent_q[i].valid && ent_q[i].is_store) begin
        oldest_store_age = AW'(a);
        if (ent_q[i].st == U_WAIT_ADDR) oldest_unsolved_age = AW'(a);
      end
    end
  end

  // entries that leave from the head this cycle
  logic [AW-1:0] n_free;
  always_comb begin
    logic stop;
    stop   = 1'b0;
    n_free = '0;
    for (int a = 0; a < N; a++) begin
      logic [IW-1:0] i;
      i = wrap_add(head_q, a);
      if (!stop && a < int'(cnt_q) &&
          ((!ent_q[i].is_store && ent_q[i].st == U_DONE) ||
           (a == 0 && ent_q[i].is_store && st_wr_valid)))
        n_free = n_free + 1'b1;
      else
        stop = 1'b1;
    end
  end

  // snoop: loads overlapping the store that writes the cache this cycle
  logic [N-1:0] snoop_hit;
  always_comb begin
    for (int e = 0; e < N; e++)
      snoop_hit[e] = st_wr_valid && ent_q[e].valid && !ent_q[e].is_store &&
                     overlaps(ent_q[e].addr, ent_q[e].size, st_wr_addr, st_wr_size);
  end

  // addresses as they will be at this edge (a load may be issued in the cycle its
  // address is generated when the S-stage is merged into the A-stage)
  logic [N-1:0] snoop_new;
  always_comb begin
    for (int e = 0; e < N; e++) begin
      snoop_new[e] = snoop_hit[e];
      for (int p = 0; p < NP; p++)
        if (agu_valid[p] && int'(agu_uidx[p]) == e)
          snoop_new[e] = st_wr_valid && !ent_q[e].is_store &&
                         overlaps(agu_addr[p], ent_q[e].size, st_wr_addr, st_wr_size);
    end
  end

  // number of registrations this cycle
  logic [AW-1:0] nalloc;
  always_comb begin
    nalloc = '0;
    if (disp_fire)
      for (int d = 0; d < DISP_W; d++)
        if (disp_valid[d]) nalloc = nalloc + 1'b1;
  end

  logic [N-1:0] issued_now;
  always_comb begin
    issued_now = '0;
    for (int p = 0; p < NP; p++)
      if (iss_valid[p]) issued_now[iss_idx[p]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < N; e++) ent_q[e] <= '0;
      head_q <= '0;
      cnt_q  <= '0;
    end else begin
      // A-stage: linear address (and store data) written
      for (int p = 0; p < NP; p++)
        if (agu_valid[p]) begin
          ent_q[agu_uidx[p]].addr <= agu_addr[p];
          ent_q[agu_uidx[p]].st   <= U_ADDR_RDY;
          if (ent_q[agu_uidx[p]].is_store)
            ent_q[agu_uidx[p]].data <= size_mask(agu_sdata[p], ent_q[agu_uidx[p]].size);
        end
      // retirement permission of stores
      for (int e = 0; e < N; e++)
        for (int p = 0; p < NP; p++)
          if (commit_valid[p] && ent_q[e].valid && ent_q[e].is_store &&
              ent_q[e].tag == commit_tag[p])
            ent_q[e].permit <= 1'b1;
      // stale marking of loads that have read, or are reading, the cache
      for (int e = 0; e < N; e++) begin
        if ((ent_q[e].st == U_ISSUED || ent_q[e].st == U_LOADED) && snoop_hit[e])
          ent_q[e].stale <= 1'b1;
        if (issued_now[e] && !ent_q[e].is_store)
          ent_q[e].stale <= snoop_new[e];
      end
      // S-stage: loads issued to the data cache
      for (int p = 0; p < NP; p++)
        if (iss_valid[p] && !ent_q[iss_idx[p]].is_store)
          ent_q[iss_idx[p]].st <= U_ISSUED;
      // I-stage: data returned
      for (int p = 0; p < NP; p++)
        if (cap_valid[p]) begin
          ent_q[cap_idx[p]].st   <= U_LOADED;
          ent_q[cap_idx[p]].data <= cap_data[p];
        end
      // B-stage: outcome of the dependency check
      for (int p = 0; p < NP; p++)
        if (chk_valid[p])
          case (chk_outcome[p])
            DC_NONE, DC_FORWARD:
              if (deliver[p]) ent_q[chk_idx[p]].st <= U_DONE;
            DC_PARTIAL: ent_q[chk_idx[p]].st <= U_WAIT_REISSUE;
            DC_STALE: begin
              ent_q[chk_idx[p]].st    <= U_ADDR_RDY;
              ent_q[chk_idx[p]].stale <= 1'b0;
            end
            default: ;
          endcase
      // re-issue once every older store has completed
      for (int e = 0; e < N; e++)
        if (ent_q[e].valid && ent_q[e].st == U_WAIT_REISSUE &&
            age_of(IW'(e), head_q) < oldest_store_age)
          ent_q[e].st <= U_ADDR_RDY;
      // leave from the head
      for (int a = 0; a < N; a++)
        if (a < int'(n_free)) ent_q[wrap_add(head_q, a)].valid <= 1'b0;
      // R-stage: registration
      if (disp_fire)
        for (int d = 0; d < DISP_W; d++)
          if (disp_valid[d]) begin
            ent_q[alloc_idx[d]].valid    <= 1'b1;
            ent_q[alloc_idx[d]].is_store <= disp_op[d].is_store;
            ent_q[alloc_idx[d]].tag      <= disp_op[d].tag;
            ent_q[alloc_idx[d]].size     <= disp_op[d].size;
            ent_q[alloc_idx[d]].st       <= U_WAIT_ADDR;
            ent_q[alloc_idx[d]].addr     <= '0;
            ent_q[alloc_idx[d]].data     <= '0;
            ent_q[alloc_idx[d]].permit   <= 1'b0;
            ent_q[alloc_idx[d]].stale    <= 1'b0;
          end
      head_q <= wrap_add(head_q, int'(n_free));
      cnt_q  <= cnt_q - n_free + nalloc;
    end
  end

endmodule
