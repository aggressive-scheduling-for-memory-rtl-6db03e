// tb_lsu_umab: self-checking, directed testbench of the Unified Memory
// Access Buffer (32 entries, 8-wide registration, 3 ports).
// It walks loads and stores through their life and checks the entry states
// and the buffer's bookkeeping after each clock edge: in-order registration
// indices, address generation, the oldest unsolved store / oldest store ages,
// retirement permission, store write and in-order release from the head, a
// load made stale by an overlapping store write and re-issued, a result the
// bus refused staying in place, a partial overlap waiting until every older
// store has written, then filling the buffer to full and draining it across
// the index wrap-around.
module tb_lsu_umab;
  import lsu_pkg::*;

  localparam int unsigned N = 32, DISP_W = 8, NP = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              disp_fire;
  logic [DISP_W-1:0] disp_valid;
  mop_t              disp_op   [DISP_W];
  logic [4:0]        alloc_idx [DISP_W];
  logic [5:0]        free_cnt;
  logic [NP-1:0]     agu_valid;
  logic [4:0]        agu_uidx  [NP];
  addr_t             agu_addr  [NP];
  data_t             agu_sdata [NP];
  logic [NP-1:0]     commit_valid;
  tag_t              commit_tag [NP];
  logic [NP-1:0]     iss_valid;
  logic [4:0]        iss_idx [NP];
  logic              st_wr_valid;
  addr_t             st_wr_addr;
  size_e             st_wr_size;
  logic [NP-1:0]     cap_valid;
  logic [4:0]        cap_idx  [NP];
  data_t             cap_data [NP];
  logic [NP-1:0]     chk_valid;
  logic [4:0]        chk_idx     [NP];
  dc_outcome_e       chk_outcome [NP];
  logic [NP-1:0]     deliver;
  umab_entry_t       ent [N];
  logic [4:0]        head;
  logic [5:0]        oldest_unsolved_age, oldest_store_age;

  lsu_umab dut (.*);

  int checks = 0, failures = 0, cyc = 0;

  task automatic expect_eq(string what, longint got, longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL (cycle %0d): %s = %0d, expected %0d", cyc, what, got, want);
    end
  endtask

  task automatic idle();
    disp_fire = 0; disp_valid = '0; agu_valid = '0; commit_valid = '0; iss_valid = '0;
    st_wr_valid = 0; st_wr_addr = '0; st_wr_size = SZ_BYTE; cap_valid = '0; chk_valid = '0; deliver = '0;
    for (int d = 0; d < DISP_W; d++) disp_op[d] = '0;
    for (int p = 0; p < NP; p++) begin
      agu_uidx[p] = '0; agu_addr[p] = '0; agu_sdata[p] = '0; commit_tag[p] = '0;
      iss_idx[p] = '0; cap_idx[p] = '0; cap_data[p] = '0; chk_idx[p] = '0; chk_outcome[p] = DC_NONE;
    end
  endtask

  // apply the inputs set since the last step at one clock edge
  task automatic step();
    @(posedge clk);
    @(negedge clk);
    cyc++;
    idle();
  endtask

  task automatic disp(int lane, bit st, int tag, size_e sz);
    disp_fire = 1'b1;
    disp_valid[lane] = 1'b1;
    disp_op[lane].is_store = st;
    disp_op[lane].tag = tag_t'(tag);
    disp_op[lane].size = sz;
  endtask

  task automatic agu(int p, int idx, addr_t a, data_t d);
    agu_valid[p] = 1'b1; agu_uidx[p] = 5'(idx); agu_addr[p] = a; agu_sdata[p] = d;
  endtask

  task automatic chk(int p, int idx, dc_outcome_e o, bit del);
    chk_valid[p] = 1'b1; chk_idx[p] = 5'(idx); chk_outcome[p] = o; deliver[p] = del;
  endtask

  // address, issue, data, check+deliver for one load already registered
  task automatic complete_load(int idx, addr_t a);
    agu(0, idx, a, '0); step();
    iss_valid[0] = 1'b1; iss_idx[0] = 5'(idx); step();
    cap_valid[0] = 1'b1; cap_idx[0] = 5'(idx); cap_data[0] = 32'(idx); step();
    chk(0, idx, DC_NONE, 1'b1); step();
    expect_eq("state DONE", ent[idx].st, U_DONE);
  endtask

  initial begin
    idle();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    expect_eq("free after reset", free_cnt, 32);
    expect_eq("head after reset", head, 0);
    expect_eq("unsolved age empty", oldest_unsolved_age, 32);

    // registration: ST1 LD2 LD3 ST4 LD5 in lanes 0,1,3,4,6 (gaps between lanes)
    disp(0, 1, 1, SZ_DWORD); disp(1, 0, 2, SZ_DWORD); disp(3, 0, 3, SZ_WORD);
    disp(4, 1, 4, SZ_WORD);  disp(6, 0, 5, SZ_BYTE);
    #1;
    expect_eq("alloc lane0", alloc_idx[0], 0);
    expect_eq("alloc lane1", alloc_idx[1], 1);
    expect_eq("alloc lane3", alloc_idx[3], 2);
    expect_eq("alloc lane4", alloc_idx[4], 3);
    expect_eq("alloc lane6", alloc_idx[6], 4);
    step();
    expect_eq("free after 5", free_cnt, 27);
    for (int i = 0; i < 5; i++) expect_eq("registered state", ent[i].st, U_WAIT_ADDR);
    expect_eq("ST4 is store", ent[3].is_store, 1);
    expect_eq("LD3 tag", ent[2].tag, 3);
    expect_eq("unsolved age", oldest_unsolved_age, 0);
    expect_eq("store age", oldest_store_age, 0);

    // addresses of LD2 and LD5, then ST1
    agu(0, 1, 32'h10, '0); agu(1, 4, 32'h21, '0); step();
    expect_eq("LD2 addr ready", ent[1].st, U_ADDR_RDY);
    expect_eq("LD2 addr", ent[1].addr, 32'h10);
    agu(2, 0, 32'h10, 32'hAABBCCDD); step();
    expect_eq("ST1 data", ent[0].data, 32'hAABBCCDD);
    expect_eq("unsolved age moves to ST4", oldest_unsolved_age, 3);
    expect_eq("store age", oldest_store_age, 0);

    // LD2 preloads ahead of the unsolved ST4; data back
    iss_valid[1] = 1'b1; iss_idx[1] = 5'd1; step();
    expect_eq("LD2 issued", ent[1].st, U_ISSUED);
    cap_valid[2] = 1'b1; cap_idx[2] = 5'd1; cap_data[2] = 32'h11111111; step();
    expect_eq("LD2 loaded", ent[1].st, U_LOADED);
    expect_eq("LD2 data", ent[1].data, 32'h11111111);
    expect_eq("LD2 not stale", ent[1].stale, 0);

    // permission for ST1, then it writes the cache: LD2 overlaps and goes stale
    commit_valid[1] = 1'b1; commit_tag[1] = tag_t'(1); step();
    expect_eq("ST1 permit", ent[0].permit, 1);
    iss_valid[0] = 1'b1; iss_idx[0] = 5'd0; st_wr_valid = 1'b1; st_wr_addr = 32'h10; st_wr_size = SZ_DWORD;
    #1;
    step();
    expect_eq("ST1 left", ent[0].valid, 0);
    expect_eq("head after store", head, 1);
    expect_eq("free after store", free_cnt, 28);
    expect_eq("LD2 stale", ent[1].stale, 1);
    chk(0, 1, DC_STALE, 1'b0); step();
    expect_eq("LD2 back to issuable", ent[1].st, U_ADDR_RDY);
    expect_eq("LD2 stale cleared", ent[1].stale, 0);

    // re-issue; first result refused by the bus, then delivered
    iss_valid[0] = 1'b1; iss_idx[0] = 5'd1; step();
    cap_valid[0] = 1'b1; cap_idx[0] = 5'd1; cap_data[0] = 32'h22; step();
    chk(1, 1, DC_NONE, 1'b0); step();
    expect_eq("refused result stays", ent[1].st, U_LOADED);
    chk(1, 1, DC_FORWARD, 1'b1); step();
    expect_eq("LD2 done", ent[1].st, U_DONE);
    step();
    expect_eq("head after LD2", head, 2);

    // ST4 solved, LD5 partially overlaps it and waits
    agu(0, 3, 32'h20, 32'h5566); step();
    expect_eq("no unsolved store", oldest_unsolved_age, 32);
    expect_eq("ST4 age", oldest_store_age, 1);
    iss_valid[0] = 1'b1; iss_idx[0] = 5'd4; step();
    cap_valid[0] = 1'b1; cap_idx[0] = 5'd4; cap_data[0] = 32'h77; step();
    chk(2, 4, DC_PARTIAL, 1'b0); step();
    expect_eq("LD5 waits", ent[4].st, U_WAIT_REISSUE);
    step(); step();
    expect_eq("LD5 still waits", ent[4].st, U_WAIT_REISSUE);
    // LD3 completes, ST4 reaches the head and writes
    complete_load(2, 32'h40);
    step();
    expect_eq("head at ST4", head, 3);
    commit_valid[0] = 1'b1; commit_tag[0] = tag_t'(4); step();
    iss_valid[0] = 1'b1; iss_idx[0] = 5'd3; st_wr_valid = 1'b1; st_wr_addr = 32'h20; st_wr_size = SZ_WORD; step();
    expect_eq("head after ST4", head, 4);
    expect_eq("no store left", oldest_store_age, 32);
    step();
    expect_eq("LD5 released for re-issue", ent[4].st, U_ADDR_RDY);
    iss_valid[0] = 1'b1; iss_idx[0] = 5'd4; step();
    cap_valid[0] = 1'b1; cap_idx[0] = 5'd4; cap_data[0] = 32'h88; step();
    chk(0, 4, DC_NONE, 1'b1); step(); step();
    expect_eq("empty again", free_cnt, 32);
    expect_eq("head at 5", head, 5);

    // fill to full across the wrap-around: 32 loads, 8 per cycle
    for (int g = 0; g < 4; g++) begin
      for (int d = 0; d < 8; d++) disp(d, 0, 8 * g + d, SZ_BYTE);
      #1;
      expect_eq("alloc wrap", alloc_idx[7], (5 + 8 * g + 7) % 32);
      step();
    end
    expect_eq("full", free_cnt, 0);
    for (int a = 0; a < 32; a++) complete_load((5 + a) % 32, 32'(a));
    step();
    expect_eq("drained", free_cnt, 32);
    expect_eq("head wrapped", head, 5);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
