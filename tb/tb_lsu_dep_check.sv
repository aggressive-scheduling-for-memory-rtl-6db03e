// tb_lsu_dep_check: self-checking testbench of the B-stage dependency check.
// Random UMAB contents (a small address window so that accesses collide)
// and a random loaded load; the expected outcome is worked out byte by byte:
// stale data first, then any unsolved older store, else the set of older
// stores that touch any byte of the load; if the youngest of them holds every
// byte its data is forwarded, otherwise the load must be re-issued.
module tb_lsu_dep_check;
  import lsu_pkg::*;

  localparam int unsigned N = 32;
  umab_entry_t ent [N];
  logic [4:0]  head, ld_idx;
  dc_outcome_e outcome;
  data_t       fwd_data;
  int checks = 0, failures = 0;
  int seen [5];

  lsu_dep_check dut (.*);

  initial begin
    for (int k = 0; k < 5; k++) seen[k] = 0;
    for (int n = 0; n < 20000; n++) begin
      int cnt, lda, youngest, nb;
      dc_outcome_e exp_o;
      data_t exp_d;
      bit unsolved, all_cov;
      head = 5'($urandom);
      cnt  = $urandom_range(1, N);
      for (int i = 0; i < N; i++) ent[i] = '0;
      for (int a = 0; a < cnt; a++) begin
        int i;
        i = (int'(head) + a) % N;
        ent[i].valid    = 1'b1;
        ent[i].is_store = ($urandom_range(0, 99) < 50);
        ent[i].tag      = tag_t'($urandom);
        ent[i].size     = size_e'($urandom_range(0, 2));
        ent[i].addr     = $urandom_range(0, 12);
        ent[i].data     = size_mask($urandom, ent[i].size);
        if (ent[i].is_store)
          ent[i].st = ($urandom_range(0, 99) < ((n % 2) ? 3 : 20)) ? U_WAIT_ADDR : U_ADDR_RDY;
        else
          ent[i].st = U_LOADED;
        ent[i].stale = ($urandom_range(0, 99) < 5);
      end
      // pick a load
      lda = $urandom_range(0, cnt - 1);
      ld_idx = 5'((int'(head) + lda) % N);
      ent[ld_idx].is_store = 1'b0;
      ent[ld_idx].st = U_LOADED;
      nb = int'(nbytes(ent[ld_idx].size));
      // reference
      unsolved = 1'b0;
      youngest = -1;
      for (int a = 0; a < lda; a++) begin
        int j;
        j = (int'(head) + a) % N;
        if (ent[j].is_store) begin
          if (ent[j].st == U_WAIT_ADDR) unsolved = 1'b1;
          else
            for (int b = 0; b < nb; b++) begin
              int ba;
              ba = int'(ent[ld_idx].addr) + b;
              if (ba >= int'(ent[j].addr) && ba < int'(ent[j].addr) + int'(nbytes(ent[j].size)))
                youngest = j;
            end
        end
      end
      exp_d = '0;
      all_cov = 1'b0;
      if (youngest >= 0) begin
        all_cov = 1'b1;
        for (int b = 0; b < nb; b++) begin
          int ba, off;
          ba  = int'(ent[ld_idx].addr) + b;
          off = ba - int'(ent[youngest].addr);
          if (off < 0 || off >= int'(nbytes(ent[youngest].size))) all_cov = 1'b0;
          else exp_d[8*b +: 8] = ent[youngest].data[8*off +: 8];
        end
      end
      if (ent[ld_idx].stale) exp_o = DC_STALE;
      else if (unsolved)     exp_o = DC_WAIT;
      else if (youngest < 0) exp_o = DC_NONE;
      else if (all_cov)      exp_o = DC_FORWARD;
      else                   exp_o = DC_PARTIAL;
      #1;
      checks++;
      seen[int'(exp_o)]++;
      if (outcome != exp_o || (exp_o == DC_FORWARD && fwd_data != exp_d)) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d: outcome %s data %h, expected %s %h", n, outcome.name(), fwd_data, exp_o.name(), exp_d);
      end
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL: outcome %0d never exercised", k);
      end
    end
    $display("none=%0d forward=%0d partial=%0d wait=%0d stale=%0d", seen[0], seen[1], seen[2], seen[3], seen[4]);
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
