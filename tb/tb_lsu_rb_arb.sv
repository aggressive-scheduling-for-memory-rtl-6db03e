// tb_lsu_rb_arb: self-checking testbench of the result bus arbitration.
// Random UMAB contents, random checker outcomes and forwarded data, random
// bus grants. Expected: slots go to the up to 3 oldest loaded loads that can
// be checked (data stale, or older than the oldest unsolved store); a slot
// drives the bus only for a no-conflict or forwarding outcome, with the
// forwarded data or the cache data; a granted slot delivers; event counts.
module tb_lsu_rb_arb;
  import lsu_pkg::*;

  localparam int unsigned N = 32, NP = 3;
  umab_entry_t   ent [N];
  logic [4:0]    head;
  logic [5:0]    oldest_unsolved_age;
  logic [NP-1:0] chk_valid;
  logic [4:0]    chk_idx [NP];
  dc_outcome_e   outcome [NP];
  data_t         fwd_data [NP];
  rb_slot_t      rb_out [NP];
  logic [NP-1:0] rb_grant, deliver;
  logic [3:0]    n_forward, n_partial, n_stale, n_rb_stall;

  lsu_rb_arb dut (.*);

  int checks = 0, failures = 0, n_del = 0, n_fw = 0, n_refused = 0;

  task automatic fail(string m);
    failures++;
    if (failures < 10) $display("FAIL: %s", m);
  endtask

  initial begin
    for (int n = 0; n < 10000; n++) begin
      int cnt, k, e_fw, e_pa, e_st, e_rs;
      head = 5'($urandom);
      cnt  = $urandom_range(0, N);
      oldest_unsolved_age = 6'(N);
      for (int i = 0; i < N; i++) ent[i] = '0;
      for (int a = 0; a < cnt; a++) begin
        int i;
        i = (int'(head) + a) % N;
        ent[i].valid    = 1'b1;
        ent[i].is_store = ($urandom_range(0, 99) < 30);
        ent[i].tag      = tag_t'($urandom);
        ent[i].data     = $urandom;
        ent[i].stale    = ($urandom_range(0, 99) < 10);
        ent[i].st       = ent[i].is_store ? ustate_e'($urandom_range(0, 1)) :
                          (($urandom_range(0, 1)) ? U_LOADED : ustate_e'($urandom_range(0, 5)));
        if (ent[i].is_store && ent[i].st == U_WAIT_ADDR && oldest_unsolved_age == 6'(N) &&
            $urandom_range(0, 1))
          oldest_unsolved_age = 6'(a);
      end
      for (int p = 0; p < NP; p++) begin
        outcome[p]  = dc_outcome_e'($urandom_range(0, 4));
        fwd_data[p] = $urandom;
      end
      rb_grant = NP'($urandom);
      #1;
      k = 0; e_fw = 0; e_pa = 0; e_st = 0; e_rs = 0;
      for (int a = 0; a < cnt && k < int'(NP); a++) begin
        int i;
        logic bus;
        i = (int'(head) + a) % N;
        if (!ent[i].is_store && ent[i].st == U_LOADED && (ent[i].stale || a < int'(oldest_unsolved_age))) begin
          bus = (outcome[k] == DC_NONE || outcome[k] == DC_FORWARD);
          checks++;
          if (!chk_valid[k] || int'(chk_idx[k]) != i)
            fail($sformatf("n=%0d slot %0d checks %0d, expected %0d", n, k, chk_idx[k], i));
          checks++;
          if (rb_out[k].valid != bus || deliver[k] != (bus && rb_grant[k]) ||
              (bus && (rb_out[k].tag != ent[i].tag ||
                       rb_out[k].data != ((outcome[k] == DC_FORWARD) ? fwd_data[k] : ent[i].data))))
            fail($sformatf("n=%0d slot %0d result bus wrong", n, k));
          if (bus && rb_grant[k]) begin n_del++; if (outcome[k] == DC_FORWARD) begin e_fw++; n_fw++; end end
          if (bus && !rb_grant[k]) begin e_rs++; n_refused++; end
          if (outcome[k] == DC_PARTIAL) e_pa++;
          if (outcome[k] == DC_STALE) e_st++;
          k++;
        end
      end
      for (int p = k; p < int'(NP); p++) begin
        checks++;
        if (chk_valid[p] || rb_out[p].valid || deliver[p]) fail($sformatf("n=%0d slot %0d busy", n, p));
      end
      checks++;
      if (int'(n_forward) != e_fw || int'(n_partial) != e_pa || int'(n_stale) != e_st || int'(n_rb_stall) != e_rs)
        fail($sformatf("n=%0d event counts", n));
    end
    checks++;
    if (n_del == 0 || n_fw == 0 || n_refused == 0) fail("a case was never exercised");
    $display("delivered=%0d forwarded=%0d refused=%0d", n_del, n_fw, n_refused);
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
