// lsu_env: parameterized processor environment around one preload load/store
// unit, used by the configuration sweep testbench (testbench only).
//
// It runs the same kind of program as the end-to-end bench, but generates it
// from its own xorshift generator seeded by SEED. Instances with the same
// SEED and program parameters therefore run exactly the same program, so their
// cycle counts can be compared. The surrounding processor is modelled as
// follows:
//  - ALU operations take 1 to ALU_LAT_MAX cycles and appear on the external
//    result bus (at most 4 results per cycle: 3 ALUs and a branch unit);
//  - about half of the micro-operations are loads and stores (LD_PCT, ST_PCT).
//    Address operands come from earlier ALU results or from earlier loads
//    (pointer chasing), so store addresses are often still unsolved;
//  - a dispatcher sends up to 8 micro-operations per cycle in order;
//  - a 64-entry reorder buffer retires up to 4 per cycle and gives stores
//    their retirement permission;
//  - accesses fall in the first REGION bytes of a 256-byte memory;
//  - the result bus grants every request unless RANDOM_GRANT is set;
//  - dcache_model is the one-cycle cache.
// Every load value and tag, the final memory and complete retirement are
// checked, as is the unloaded load latency (4 cycles, 3 with REDUCED).
// When the run ends, done goes high and the counters hold the results:
// cycles, cache reads, loads delivered, and how often each mechanism happened.
module lsu_env
  import lsu_pkg::*;
#(
  parameter int unsigned UMAB_N       = 32,
  parameter int unsigned RS_N         = 16,
  parameter int unsigned NP           = 3,
  parameter bit          REDUCED      = 1'b0,
  parameter int unsigned N_OPS        = 4000,
  parameter int unsigned SEED         = 1,
  parameter int unsigned LD_PCT       = 32,
  parameter int unsigned ST_PCT       = 18,
  parameter int unsigned ALU_LAT_MAX  = 2,
  parameter bit          RANDOM_GRANT = 1'b0,
  parameter int unsigned REGION       = 48
)(
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   cycles,
  output int   dc_reads,
  output int   loads_done,
  output int   ev_preload,
  output int   ev_forward,
  output int   ev_partial,
  output int   ev_stale
);

  localparam int unsigned DISP_W   = 8;
  localparam int unsigned RB_EXT   = 4;
  localparam int unsigned ROB_N    = 64;
  localparam int unsigned MEMB     = 256;
  localparam int unsigned LIMIT    = 100000;

  typedef enum logic [1:0] {K_ALU, K_LD, K_ST} kind_e;

  logic [DISP_W-1:0] disp_valid;
  mop_t              disp_op [DISP_W];
  logic [DISP_W-1:0] disp_accept;
  rb_slot_t          rb_ext [RB_EXT];
  rb_slot_t          rb_out [NP];
  logic [NP-1:0]     rb_grant;
  logic [NP-1:0]     st_done_valid;
  tag_t              st_done_tag [NP];
  logic [NP-1:0]     commit_valid;
  tag_t              commit_tag [NP];
  logic [NP-1:0]     dc_req_valid, dc_req_we;
  addr_t             dc_req_addr [NP];
  size_e             dc_req_size [NP];
  data_t             dc_req_wdata [NP];
  data_t             dc_rdata [NP];
  perf_t             perf;

  lsu #(.UMAB_N(UMAB_N), .RS_N(RS_N), .NP(NP), .REDUCED(REDUCED)) dut (.*);

  dcache_model #(.NP(NP), .MEM_BYTES(MEMB)) u_dc (
    .clk, .req_valid(dc_req_valid), .req_we(dc_req_we), .req_addr(dc_req_addr),
    .req_size(dc_req_size), .req_wdata(dc_req_wdata), .rdata(dc_rdata)
  );

  // ---------------- deterministic random numbers ----------------
  logic [31:0] rng;

  function automatic int unsigned rnd();
    rng = rng ^ (rng << 13);
    rng = rng ^ (rng >> 17);
    rng = rng ^ (rng << 5);
    return rng;
  endfunction

  function automatic int rnd_range(int lo, int hi);
    return lo + int'(rnd() % 32'(hi - lo + 1));
  endfunction

  // ---------------- program ----------------
  kind_e      p_kind  [N_OPS];
  size_e      p_size  [N_OPS];
  addr_t      p_seg   [N_OPS], p_disp [N_OPS];
  data_t      p_base  [N_OPS], p_index [N_OPS], p_val [N_OPS];
  logic [1:0] p_scale [N_OPS];
  int         p_base_src [N_OPS];
  int         p_data_src [N_OPS];
  int         p_alu_lat  [N_OPS];
  logic [7:0] ref_mem [MEMB];

  int  next_seq, retire_seq;
  bit  completed [N_OPS];
  int  alu_ready_at [N_OPS];
  int  disp_cycle [N_OPS];
  int  lat_first;

  function automatic void gen_program();
    int last_alu, last_ld;
    last_alu = -1;
    last_ld  = -1;
    for (int i = 0; i < MEMB; i++) ref_mem[i] = 8'(7 * i + 3);
    for (int i = 0; i < N_OPS; i++) begin
      int r, t, rem, rem2, nb, src;
      r = rnd_range(0, 99);
      p_base_src[i] = -1;
      p_data_src[i] = -1;
      p_alu_lat[i]  = 0;
      if (i == 0)                        p_kind[i] = K_LD;
      else if (r < int'(LD_PCT))          p_kind[i] = K_LD;
      else if (r < int'(LD_PCT + ST_PCT)) p_kind[i] = K_ST;
      else                               p_kind[i] = K_ALU;
      if (p_kind[i] == K_ALU) begin
        p_alu_lat[i] = rnd_range(1, int'(ALU_LAT_MAX));
        p_val[i]     = rnd();
        last_alu     = i;
        continue;
      end
      p_size[i] = size_e'(rnd_range(0, 2));
      nb = int'(nbytes(p_size[i]));
      t  = rnd_range(0, REGION - 4);
      p_seg[i]   = addr_t'(rnd_range(0, t));
      rem        = t - int'(p_seg[i]);
      p_scale[i] = 2'(rnd_range(0, 3));
      p_index[i] = data_t'(rnd_range(0, rem >> p_scale[i]));
      rem2       = rem - (int'(p_index[i]) << p_scale[i]);
      p_base[i]  = data_t'(rnd_range(0, rem2));
      p_disp[i]  = addr_t'(rem2 - int'(p_base[i]));
      // base register from a recent ALU result or loaded value; the
      // displacement absorbs its value so the address stays t
      src = (rnd_range(0, 1) == 0) ? last_alu : last_ld;
      if (src >= 0 && i - src < 24 &&
          rnd_range(0, 99) < ((p_kind[i] == K_ST) ? 60 : 25)) begin
        p_base_src[i] = src;
        p_base[i]     = p_val[src];
        p_disp[i]     = addr_t'(rem2) - p_base[i];
      end
      if (p_kind[i] == K_ST) begin
        if (last_ld >= 0 && i - last_ld < 30 && rnd_range(0, 99) < 30) begin
          p_data_src[i] = last_ld;
          p_val[i] = p_val[last_ld];
        end else
          p_val[i] = rnd();
        p_val[i] = size_mask(p_val[i], p_size[i]);
        for (int b = 0; b < nb; b++) ref_mem[(t + b) % MEMB] = p_val[i][8*b +: 8];
      end else begin
        data_t v;
        v = '0;
        for (int b = 0; b < nb; b++) v[8*b +: 8] = ref_mem[(t + b) % MEMB];
        p_val[i] = v;
        last_ld  = i;
      end
    end
  endfunction

  function automatic operand_t mk_operand(int src, data_t v);
    operand_t o;
    o.val = v;
    o.tag = '0;
    o.rdy = 1'b1;
    if (src >= 0 && !completed[src]) begin
      o.rdy = 1'b0;
      o.tag = tag_t'(src % ROB_N);
    end
    return o;
  endfunction

  function automatic int find_seq(tag_t t);
    for (int s = retire_seq; s < next_seq; s++)
      if (tag_t'(s % ROB_N) == t) return s;
    return -1;
  endfunction

  function automatic void fail(string msg);
    failures++;
    $display("FAIL [UMAB %0d RS %0d ports %0d reduced %0d]: %s", UMAB_N, RS_N, NP, REDUCED, msg);
  endfunction

  int grp_seq [DISP_W];
  int grp_n;
  int lane_seq [DISP_W];

  // operations dispatched when the unit takes only some lanes: the group ends
  // before the first memory operation that was not taken
  function automatic int taken_ops();
    int first;
    first = -1;
    for (int d = DISP_W - 1; d >= 0; d--)
      if (disp_valid[d] && !disp_accept[d]) first = lane_seq[d];
    for (int g = 0; g < grp_n; g++)
      if (grp_seq[g] == first) return g;
    return grp_n;
  endfunction

  initial begin
    done = 1'b0;
    checks = 0; failures = 0; cycles = 0; dc_reads = 0; loads_done = 0;
    ev_preload = 0; ev_forward = 0; ev_partial = 0; ev_stale = 0;
    lat_first = -1; next_seq = 0; retire_seq = 0;
    rng = 32'h9E37_79B9 ^ 32'(SEED);
    disp_valid = '0; rb_grant = '0; commit_valid = '0;
    for (int d = 0; d < DISP_W; d++) disp_op[d] = '0;
    for (int k = 0; k < RB_EXT; k++) rb_ext[k] = '0;
    for (int p = 0; p < NP; p++) commit_tag[p] = '0;
    gen_program();
    for (int i = 0; i < N_OPS; i++) begin completed[i] = 1'b0; alu_ready_at[i] = -1; disp_cycle[i] = -1; end
    @(posedge rst_n);

    while (retire_seq < N_OPS && cycles < int'(LIMIT)) begin
      int nalu, ncommit, nd, nret;
      @(negedge clk);
      cycles++;
      nalu = 0;
      for (int k = 0; k < RB_EXT; k++) rb_ext[k] = '0;
      for (int s = retire_seq; s < next_seq && nalu < int'(RB_EXT); s++)
        if (p_kind[s] == K_ALU && !completed[s] && alu_ready_at[s] >= 0 && alu_ready_at[s] <= cycles) begin
          rb_ext[nalu].valid = 1'b1;
          rb_ext[nalu].tag   = tag_t'(s % ROB_N);
          rb_ext[nalu].data  = p_val[s];
          nalu++;
        end
      commit_valid = '0;
      ncommit = 0;
      nret = 0;
      while (retire_seq < next_seq && completed[retire_seq] && nret < 4) begin
        if (p_kind[retire_seq] == K_ST) begin
          if (ncommit == int'(NP)) break;
          commit_valid[ncommit] = 1'b1;
          commit_tag[ncommit]   = tag_t'(retire_seq % ROB_N);
          ncommit++;
        end
        retire_seq++;
        nret++;
      end
      disp_valid = '0;
      grp_n = 0;
      nd = 0;
      for (int s = next_seq; s < int'(N_OPS) && grp_n < int'(DISP_W) &&
                             next_seq - retire_seq + grp_n < int'(ROB_N); s++) begin
        if (p_kind[s] != K_ALU) begin
          disp_valid[nd] = 1'b1;
          disp_op[nd].is_store = (p_kind[s] == K_ST);
          disp_op[nd].tag      = tag_t'(s % ROB_N);
          disp_op[nd].size     = p_size[s];
          disp_op[nd].base     = mk_operand(p_base_src[s], p_base[s]);
          disp_op[nd].index    = mk_operand(-1, p_index[s]);
          disp_op[nd].scale    = p_scale[s];
          disp_op[nd].disp     = p_disp[s];
          disp_op[nd].seg      = p_seg[s];
          disp_op[nd].sdata    = mk_operand(p_data_src[s], (p_kind[s] == K_ST) ? p_val[s] : '0);
          lane_seq[nd]         = s;
          nd++;
        end
        grp_seq[grp_n] = s;
        grp_n++;
      end
      // the first load goes alone to measure the unloaded latency
      if (next_seq == 0) begin
        disp_valid = 1;
        grp_n = 1;
      end
      rb_grant = '1;
      if (RANDOM_GRANT && cycles >= 40) rb_grant = NP'(rnd()) | NP'(rnd());
      #1;
      if (disp_accept != disp_valid) begin
        grp_n = taken_ops();
      end
      begin
        for (int g = 0; g < grp_n; g++) begin
          disp_cycle[grp_seq[g]] = cycles;
          if (p_kind[grp_seq[g]] == K_ALU) alu_ready_at[grp_seq[g]] = cycles + p_alu_lat[grp_seq[g]];
        end
        next_seq = next_seq + grp_n;
      end
      for (int k = 0; k < int'(RB_EXT); k++)
        if (rb_ext[k].valid) completed[find_seq(rb_ext[k].tag)] = 1'b1;
      for (int p = 0; p < int'(NP); p++) begin
        if (dc_req_valid[p] && !dc_req_we[p]) dc_reads++;
        if (st_done_valid[p]) completed[find_seq(st_done_tag[p])] = 1'b1;
        if (rb_out[p].valid && rb_grant[p]) begin
          int s;
          s = find_seq(rb_out[p].tag);
          checks++;
          if (s < 0 || p_kind[s] != K_LD || completed[s])
            fail($sformatf("unexpected result tag %0d at cycle %0d", rb_out[p].tag, cycles));
          else begin
            if (rb_out[p].data != p_val[s])
              fail($sformatf("load %0d got %h expected %h", s, rb_out[p].data, p_val[s]));
            completed[s] = 1'b1;
            loads_done++;
            if (s == 0) lat_first = cycles - disp_cycle[0];
          end
        end
      end
      ev_preload += int'(perf.preload);
      ev_forward += int'(perf.forward);
      ev_partial += int'(perf.reissue_partial);
      ev_stale   += int'(perf.reissue_stale);
    end

    repeat (20) @(negedge clk);
    checks++;
    if (lat_first != (REDUCED ? 3 : 4))
      fail($sformatf("lone load latency %0d cycles, expected %0d", lat_first, REDUCED ? 3 : 4));
    checks++;
    if (retire_seq != int'(N_OPS))
      fail($sformatf("only %0d of %0d operations retired", retire_seq, N_OPS));
    for (int i = 0; i < int'(MEMB); i++) begin
      checks++;
      if (u_dc.peek(i) != ref_mem[i])
        fail($sformatf("memory byte %0d is %h expected %h", i, u_dc.peek(i), ref_mem[i]));
    end
    done = 1'b1;
  end

endmodule
