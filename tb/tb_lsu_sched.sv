// tb_lsu_sched: self-checking testbench of the speculative scheduling control.
// Two instances see the same random UMAB contents: one with a separate
// scheduling stage (REDUCED = 0) and one with the reduced pipeline
// (REDUCED = 1), which may also issue accesses whose address the AGUs
// produce in the same cycle. Expected: the up to 3 oldest executable
// entries (a load with its address; a store with its address, at the head,
// with permission), oldest on port 0, their cache requests, the store write
// and the count of loads issued past an unsolved older store.
module tb_lsu_sched;
  import lsu_pkg::*;

  localparam int unsigned N = 32, NP = 3;
  umab_entry_t   ent [N];
  logic [4:0]    head;
  logic [5:0]    oua;
  logic [NP-1:0] agu_valid;
  logic [4:0]    agu_uidx [NP];
  addr_t         agu_addr [NP];
  data_t         agu_sdata [NP];

  logic [NP-1:0] iss_valid [2];
  logic [4:0]    iss_idx [2][NP];
  logic [NP-1:0] req_valid [2], req_we [2];
  addr_t         req_addr [2][NP];
  size_e         req_size [2][NP];
  data_t         req_wdata [2][NP];
  logic          st_wr_valid [2];
  addr_t         st_wr_addr [2];
  size_e         st_wr_size [2];
  logic [3:0]    n_preload [2];

  for (genvar r = 0; r < 2; r++) begin : g_dut
    lsu_sched #(.N(N), .NP(NP), .REDUCED(r)) dut (
      .ent, .head, .oldest_unsolved_age(oua),
      .agu_valid, .agu_uidx, .agu_addr, .agu_sdata,
      .iss_valid(iss_valid[r]), .iss_idx(iss_idx[r]),
      .dc_req_valid(req_valid[r]), .dc_req_we(req_we[r]), .dc_req_addr(req_addr[r]),
      .dc_req_size(req_size[r]), .dc_req_wdata(req_wdata[r]),
      .st_wr_valid(st_wr_valid[r]), .st_wr_addr(st_wr_addr[r]), .st_wr_size(st_wr_size[r]),
      .n_preload(n_preload[r])
    );
  end

  int checks = 0, failures = 0, n_store_wr = 0, n_bypass = 0, n_full = 0;

  task automatic fail(string m);
    failures++;
    if (failures < 10) $display("FAIL: %s", m);
  endtask

  initial begin
    for (int n = 0; n < 10000; n++) begin
      int cnt;
      int used [32];
      head = 5'($urandom);
      cnt  = $urandom_range(0, N);
      for (int i = 0; i < N; i++) begin ent[i] = '0; used[i] = 0; end
      oua = 6'(N);
      for (int a = 0; a < cnt; a++) begin
        int i;
        i = (int'(head) + a) % N;
        ent[i].valid    = 1'b1;
        ent[i].is_store = ($urandom_range(0, 99) < 40);
        ent[i].size     = size_e'($urandom_range(0, 2));
        ent[i].addr     = $urandom;
        ent[i].data     = $urandom;
        ent[i].permit   = $urandom_range(0, 1);
        if (ent[i].is_store) ent[i].st = ($urandom_range(0, 1)) ? U_WAIT_ADDR : U_ADDR_RDY;
        else ent[i].st = ustate_e'($urandom_range(0, 5));
        if (ent[i].is_store && ent[i].st == U_WAIT_ADDR && oua == 6'(N)) oua = 6'(a);
      end
      // this cycle's AGU results, to entries still waiting for their address
      agu_valid = '0;
      for (int p = 0; p < NP; p++) begin
        int i;
        agu_uidx[p] = '0; agu_addr[p] = $urandom; agu_sdata[p] = $urandom;
        if (cnt > 0) begin
          i = (int'(head) + $urandom_range(0, cnt - 1)) % N;
          if (ent[i].st == U_WAIT_ADDR && !used[i] && $urandom_range(0, 1)) begin
            agu_valid[p] = 1'b1; agu_uidx[p] = 5'(i); used[i] = 1;
          end
        end
      end
      #1;
      for (int r = 0; r < 2; r++) begin
        int k, npre, byp;
        logic wr;
        k = 0; npre = 0; wr = 1'b0;
        for (int a = 0; a < cnt && k < int'(NP); a++) begin
          int i;
          logic ok;
          addr_t ea;
          data_t ed;
          i = (int'(head) + a) % N;
          ea = ent[i].addr; ed = ent[i].data;
          ok = (ent[i].st == U_ADDR_RDY);
          byp = -1;
          for (int p = 0; p < NP; p++) if (agu_valid[p] && int'(agu_uidx[p]) == i) byp = p;
          if (r == 1 && byp >= 0) begin ok = 1'b1; ea = agu_addr[byp]; ed = size_mask(agu_sdata[byp], ent[i].size); end
          if (ent[i].is_store) ok = ok && (a == 0) && ent[i].permit;
          if (ok) begin
            checks++;
            if (!iss_valid[r][k] || int'(iss_idx[r][k]) != i || !req_valid[r][k] ||
                req_we[r][k] != ent[i].is_store || req_addr[r][k] != ea || req_size[r][k] != ent[i].size ||
                (ent[i].is_store && req_wdata[r][k] != ed))
              fail($sformatf("n=%0d R=%0d port %0d: got idx %0d v=%0d, expected %0d", n, r, k, iss_idx[r][k], iss_valid[r][k], i));
            if (ent[i].is_store) begin
              wr = 1'b1;
              checks++;
              if (!st_wr_valid[r] || st_wr_addr[r] != ea) fail("store write not reported");
              if (r == 0) n_store_wr++;
            end
            if (r == 1 && byp >= 0) n_bypass++;
            if (!ent[i].is_store && a > int'(oua)) npre++;
            k++;
          end
        end
        if (k == int'(NP) && r == 0) n_full++;
        for (int p = k; p < int'(NP); p++) begin
          checks++;
          if (iss_valid[r][p] || req_valid[r][p]) fail($sformatf("n=%0d R=%0d port %0d busy with nothing to issue", n, r, p));
        end
        checks++;
        if (!wr && st_wr_valid[r]) fail("spurious store write");
        if (int'(n_preload[r]) != npre) fail($sformatf("n=%0d preload count %0d expected %0d", n, n_preload[r], npre));
      end
    end
    checks++;
    if (n_store_wr == 0 || n_bypass == 0 || n_full == 0) fail("a case was never exercised");
    $display("store_writes=%0d bypass_issues=%0d all_ports_busy=%0d", n_store_wr, n_bypass, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
