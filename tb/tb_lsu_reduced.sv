// tb_lsu_reduced: end-to-end self-checking testbench of the load/store unit
// with the reduced pipeline (REDUCED = 1: scheduling merged into address
// generation), other parameters at their defaults. Same program generator,
// surrounding processor model and checks as tb_lsu, except that a lone load
// must reach the result bus 3 cycles after dispatch instead of 4.
module tb_lsu_reduced;
  import lsu_pkg::*;

  localparam int unsigned NP       = 3;
  localparam int unsigned DISP_W   = 8;
  localparam int unsigned RB_EXT   = 4;
  localparam int unsigned N_OPS    = 6000;
  localparam int unsigned ROB_N    = 64;
  localparam int unsigned MEMB     = 256;
  localparam int unsigned REGION   = 48;
  localparam int unsigned WATCHDOG = 200000;

  typedef enum logic [1:0] {K_ALU, K_LD, K_ST} kind_e;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

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

  lsu #(.REDUCED(1'b1)) dut (.*);

  dcache_model #(.NP(NP), .MEM_BYTES(MEMB)) u_dc (
    .clk, .req_valid(dc_req_valid), .req_we(dc_req_we), .req_addr(dc_req_addr),
    .req_size(dc_req_size), .req_wdata(dc_req_wdata), .rdata(dc_rdata)
  );

  // ---------------- program ----------------
  kind_e      p_kind  [N_OPS];
  size_e      p_size  [N_OPS];
  addr_t      p_seg   [N_OPS], p_disp [N_OPS];
  data_t      p_base  [N_OPS], p_index [N_OPS], p_val [N_OPS];
  logic [1:0] p_scale [N_OPS];
  int         p_base_src [N_OPS];  // producer seq of the base operand, -1 if none
  int         p_data_src [N_OPS];  // producer seq of the store data, -1 if none
  int         p_alu_lat  [N_OPS];
  logic [7:0] ref_mem [MEMB];

  // ---------------- run state ----------------
  int  next_seq, retire_seq, cycle;
  bit  completed [N_OPS];
  int  alu_ready_at [N_OPS];
  int  disp_cycle [N_OPS];
  int  checks, failures;
  int  ev_preload, ev_forward, ev_partial, ev_stale, ev_rb_stall, ev_disp_stall;
  int  lat_first;
  int  n_loads_done;

  function automatic void gen_program();
    int last_alu, last_ld;
    last_alu = -1;
    last_ld  = -1;
    for (int i = 0; i < MEMB; i++) ref_mem[i] = 8'(7 * i + 3);
    for (int i = 0; i < N_OPS; i++) begin
      int r, t, rem, rem2, nb;
      r = $urandom_range(0, 99);
      p_base_src[i] = -1;
      p_data_src[i] = -1;
      p_alu_lat[i]  = 0;
      if (i == 0)       p_kind[i] = K_LD;
      else if (r < 20)  p_kind[i] = K_ALU;
      else if (r < 60)  p_kind[i] = K_LD;
      else              p_kind[i] = K_ST;
      if (p_kind[i] == K_ALU) begin
        p_alu_lat[i] = $urandom_range(1, 12);
        p_val[i]     = $urandom;
        last_alu     = i;
        continue;
      end
      p_size[i] = size_e'($urandom_range(0, 2));
      nb = int'(nbytes(p_size[i]));
      t  = $urandom_range(0, REGION - 4);
      p_seg[i]   = $urandom_range(0, t);
      rem        = t - int'(p_seg[i]);
      p_scale[i] = 2'($urandom_range(0, 3));
      p_index[i] = $urandom_range(0, rem >> p_scale[i]);
      rem2       = rem - (int'(p_index[i]) << p_scale[i]);
      p_base[i]  = $urandom_range(0, rem2);
      p_disp[i]  = rem2 - int'(p_base[i]);
      // address operand from a slow ALU producer (stores more often); the
      // displacement absorbs the producer's value so the address stays t
      if (i > 0 && last_alu >= 0 && i - last_alu < 20 &&
          $urandom_range(0, 99) < ((p_kind[i] == K_ST) ? 60 : 20)) begin
        p_base_src[i] = last_alu;
        p_base[i]     = p_val[last_alu];
        p_disp[i]     = addr_t'(rem2) - p_base[i];
      end
      if (p_kind[i] == K_ST) begin
        if (last_ld >= 0 && i - last_ld < 30 && $urandom_range(0, 99) < 30) begin
          p_data_src[i] = last_ld;
          p_val[i] = p_val[last_ld];
        end else
          p_val[i] = $urandom;
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

  // ---------------- per-cycle driver and checker ----------------
  int grp_seq [DISP_W + 8];
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
    checks = 0; failures = 0; cycle = 0;
    ev_preload = 0; ev_forward = 0; ev_partial = 0; ev_stale = 0;
    ev_rb_stall = 0; ev_disp_stall = 0; lat_first = -1; n_loads_done = 0;
    next_seq = 0; retire_seq = 0;
    disp_valid = '0; rb_grant = '0; commit_valid = '0;
    for (int d = 0; d < DISP_W; d++) disp_op[d] = '0;
    for (int k = 0; k < RB_EXT; k++) rb_ext[k] = '0;
    for (int p = 0; p < NP; p++) commit_tag[p] = '0;
    gen_program();
    for (int i = 0; i < N_OPS; i++) begin completed[i] = 1'b0; alu_ready_at[i] = -1; disp_cycle[i] = -1; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    while (retire_seq < N_OPS) begin
      int nalu, ncommit, nd, ninflight;
      @(negedge clk);
      cycle++;
      // ALU results on the external result bus
      nalu = 0;
      for (int k = 0; k < RB_EXT; k++) rb_ext[k] = '0;
      for (int s = retire_seq; s < next_seq && nalu < RB_EXT; s++)
        if (p_kind[s] == K_ALU && !completed[s] && alu_ready_at[s] >= 0 && alu_ready_at[s] <= cycle) begin
          rb_ext[nalu].valid = 1'b1;
          rb_ext[nalu].tag   = tag_t'(s % ROB_N);
          rb_ext[nalu].data  = p_val[s];
          nalu++;
        end
      // in-order retirement and store permissions
      commit_valid = '0;
      ncommit = 0;
      begin
        int nret;
        nret = 0;
        while (retire_seq < next_seq && completed[retire_seq] && nret < 4) begin
          if (p_kind[retire_seq] == K_ST) begin
            if (ncommit == NP) break;
            commit_valid[ncommit] = 1'b1;
            commit_tag[ncommit]   = tag_t'(retire_seq % ROB_N);
            ncommit++;
          end
          retire_seq++;
          nret++;
        end
      end
      // dispatch group: in order, up to DISP_W memory operations, ROB space permitting
      disp_valid = '0;
      grp_n = 0;
      nd = 0;
      ninflight = next_seq - retire_seq;
      for (int s = next_seq; s < N_OPS && grp_n < DISP_W && ninflight + grp_n < int'(ROB_N); s++) begin
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
      // the very first load is sent alone to measure the unloaded latency
      if (next_seq == 0) begin
        disp_valid = 1'b1;
        grp_n = 1;
      end
      rb_grant = NP'($urandom) | ((cycle < 40) ? '1 : '0);
      rb_grant = rb_grant | NP'($urandom);
      #1;
      // sample outputs that act at the coming edge
      if (disp_accept != disp_valid) begin
        ev_disp_stall++;
        grp_n = taken_ops();
      end
      begin
        for (int g = 0; g < grp_n; g++) begin
          disp_cycle[grp_seq[g]] = cycle;
          if (p_kind[grp_seq[g]] == K_ALU) alu_ready_at[grp_seq[g]] = cycle + p_alu_lat[grp_seq[g]];
        end
        next_seq = next_seq + grp_n;
      end
      for (int k = 0; k < RB_EXT; k++)
        if (rb_ext[k].valid) completed[find_seq(rb_ext[k].tag)] = 1'b1;
      for (int p = 0; p < NP; p++) begin
        if (st_done_valid[p]) completed[find_seq(st_done_tag[p])] = 1'b1;
        if (rb_out[p].valid && rb_grant[p]) begin
          int s;
          s = find_seq(rb_out[p].tag);
          checks++;
          if (s < 0 || p_kind[s] != K_LD || completed[s]) begin
            failures++;
            $display("FAIL: unexpected result tag %0d at cycle %0d", rb_out[p].tag, cycle);
          end else begin
            if (rb_out[p].data !== p_val[s]) begin
              failures++;
              $display("FAIL: load seq %0d got %h expected %h (cycle %0d)", s, rb_out[p].data, p_val[s], cycle);
            end
            completed[s] = 1'b1;
            n_loads_done++;
            if (s == 0) lat_first = cycle - disp_cycle[0];
          end
        end
      end
      ev_preload  += int'(perf.preload);
      ev_forward  += int'(perf.forward);
      ev_partial  += int'(perf.reissue_partial);
      ev_stale    += int'(perf.reissue_stale);
      ev_rb_stall += int'(perf.rb_stall);
      if (cycle > WATCHDOG) break;
    end

    // let the last stores drain into the cache
    repeat (20) @(negedge clk);
    checks++;
    if (lat_first != 3) begin
      failures++;
      $display("FAIL: lone load latency %0d cycles, expected 3", lat_first);
    end
    checks++;
    if (retire_seq != N_OPS) begin
      failures++;
      $display("FAIL: only %0d of %0d operations retired", retire_seq, N_OPS);
    end
    for (int i = 0; i < MEMB; i++) begin
      checks++;
      if (u_dc.peek(i) !== ref_mem[i]) begin
        failures++;
        $display("FAIL: memory byte %0d is %h expected %h", i, u_dc.peek(i), ref_mem[i]);
      end
    end
    $display("cycles=%0d loads=%0d preload=%0d forward=%0d partial_reissue=%0d stale_reissue=%0d rb_refused=%0d disp_stall=%0d",
             cycle, n_loads_done, ev_preload, ev_forward, ev_partial, ev_stale, ev_rb_stall, ev_disp_stall);
    check_event("preload past an unsolved store", ev_preload);
    check_event("store-to-load forwarding", ev_forward);
    check_event("partial-overlap re-issue", ev_partial);
    check_event("stale-data re-issue", ev_stale);
    check_event("result bus refusal", ev_rb_stall);
    check_event("dispatch stall", ev_disp_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check_event(string name, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: %s never happened", name);
    end
  endfunction

  // sequence number of an in-flight operation from its tag
  function automatic int find_seq(tag_t t);
    for (int s = retire_seq; s < next_seq; s++)
      if (tag_t'(s % ROB_N) == t) return s;
    return -1;
  endfunction

  // watchdog
  initial begin
    repeat (WATCHDOG + 1000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
