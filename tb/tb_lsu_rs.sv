// tb_lsu_rs: self-checking testbench of the load/store reservation station
// at its default size (16 entries, 8-wide dispatch, 3 issue ports).
// A queue model in the bench holds what the station should contain. Each
// cycle the bench dispatches a random number of operations whose operands
// are present or wait for a random producer tag, broadcasts random tags on
// the result bus, and checks: the free count, that exactly the up to 3
// oldest operations with all operands present are issued, oldest on port 0,
// with the operand values captured from the bus.
module tb_lsu_rs;
  import lsu_pkg::*;

  localparam int unsigned N_RS = 16, UMAB_N = 32, DISP_W = 8, NP = 3, RB_W = 7;
  localparam int unsigned CYCLES = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              disp_fire;
  logic [DISP_W-1:0] disp_valid;
  mop_t              disp_op   [DISP_W];
  logic [4:0]        disp_uidx [DISP_W];
  logic [4:0]        free_cnt;
  logic [4:0]        umab_head;
  rb_slot_t          rb [RB_W];
  logic [NP-1:0]     iss_valid;
  mop_t              iss_op   [NP];
  logic [4:0]        iss_uidx [NP];

  lsu_rs dut (.*);

  typedef struct {
    int       seq;
    operand_t o [3];
    mop_t     op;
  } ment_t;

  ment_t  model [$];
  data_t  tagval [64];
  int     next_seq = 0;
  int     checks = 0, failures = 0, n_issued = 0, n_woken = 0;

  function automatic operand_t rnd_operand();
    operand_t o;
    if ($urandom_range(0, 99) < 35) begin
      o.rdy = 1'b0; o.tag = tag_t'($urandom_range(0, 63)); o.val = $urandom;
    end else begin
      o.rdy = 1'b1; o.tag = tag_t'($urandom); o.val = $urandom;
    end
    return o;
  endfunction

  function automatic operand_t model_wake(operand_t o);
    for (int k = 0; k < RB_W; k++)
      if (!o.rdy && rb[k].valid && rb[k].tag == o.tag) begin
        o.rdy = 1'b1; o.val = rb[k].data;
      end
    return o;
  endfunction

  function automatic bit all_rdy(ment_t m);
    return m.o[0].rdy && m.o[1].rdy && m.o[2].rdy;
  endfunction

  initial begin
    for (int t = 0; t < 64; t++) tagval[t] = $urandom;
    disp_fire = 0; disp_valid = '0; umab_head = '0;
    for (int d = 0; d < DISP_W; d++) begin disp_op[d] = '0; disp_uidx[d] = '0; end
    for (int k = 0; k < RB_W; k++) rb[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < CYCLES; c++) begin
      int nd, ne, exp_i;
      ment_t newm [$];
      @(negedge clk);
      newm.delete();
      // stimulus
      umab_head = (model.size() > 0) ? 5'(model[0].seq % UMAB_N) : 5'(next_seq % UMAB_N);
      for (int k = 0; k < RB_W; k++) begin
        rb[k].valid = ($urandom_range(0, 99) < 30);
        rb[k].tag   = tag_t'($urandom_range(0, 63));
        rb[k].data  = tagval[rb[k].tag];
      end
      ne = N_RS - model.size();
      begin
        // as in the unit, no more than UMAB_N operations in flight
        int room;
        room = int'(UMAB_N) - (next_seq - ((model.size() > 0) ? model[0].seq : next_seq));
        nd = $urandom_range(0, (ne < int'(DISP_W)) ? ne : DISP_W);
        if (nd > room) nd = room;
      end
      disp_valid = '0;
      for (int d = 0; d < nd; d++) begin
        int lane;
        ment_t m;
        lane = d;  // packed from lane 0
        m.seq  = next_seq + d;
        m.op   = '0;
        m.op.is_store = $urandom_range(0, 1);
        m.op.tag   = tag_t'($urandom);
        m.op.size  = size_e'($urandom_range(0, 2));
        m.op.base  = rnd_operand();
        m.op.index = rnd_operand();
        m.op.sdata = m.op.is_store ? rnd_operand() : '{rdy: 1'b1, tag: '0, val: '0};
        m.op.scale = 2'($urandom);
        m.op.disp  = $urandom;
        m.op.seg   = $urandom;
        disp_valid[lane] = 1'b1;
        disp_op[lane]    = m.op;
        disp_uidx[lane]  = 5'(m.seq % UMAB_N);
        m.o[0] = m.op.base; m.o[1] = m.op.index; m.o[2] = m.op.sdata;
        newm.push_back(m);
      end
      disp_fire = (nd > 0);
      #1;
      // checks
      checks++;
      if (int'(free_cnt) != ne) begin
        failures++;
        $display("FAIL c%0d: free_cnt %0d expected %0d", c, free_cnt, ne);
      end
      exp_i = 0;
      for (int i = 0; i < model.size() && exp_i < int'(NP); i++)
        if (all_rdy(model[i])) begin
          checks++;
          if (!iss_valid[exp_i] || int'(iss_uidx[exp_i]) != model[i].seq % int'(UMAB_N) ||
              iss_op[exp_i].base.val != model[i].o[0].val || iss_op[exp_i].index.val != model[i].o[1].val ||
              iss_op[exp_i].sdata.val != model[i].o[2].val || iss_op[exp_i].tag != model[i].op.tag) begin
            failures++;
            $display("FAIL c%0d: port %0d issued v=%0d uidx=%0d, expected seq %0d", c, exp_i, iss_valid[exp_i], iss_uidx[exp_i], model[i].seq);
          end
          model[i].seq = -1 - model[i].seq;  // mark issued
          exp_i++;
          n_issued++;
        end
      for (int p = exp_i; p < int'(NP); p++) begin
        checks++;
        if (iss_valid[p]) begin
          failures++;
          $display("FAIL c%0d: port %0d issued with nothing ready", c, p);
        end
      end
      // model update
      for (int i = model.size() - 1; i >= 0; i--)
        if (model[i].seq < 0) model.delete(i);
      foreach (model[i]) for (int k = 0; k < 3; k++) begin
        operand_t w;
        w = model_wake(model[i].o[k]);
        if (w.rdy && !model[i].o[k].rdy) n_woken++;
        model[i].o[k] = w;
      end
      foreach (newm[i]) begin
        for (int k = 0; k < 3; k++) newm[i].o[k] = model_wake(newm[i].o[k]);
        model.push_back(newm[i]);
      end
      next_seq += nd;
    end
    checks++;
    if (n_issued < 1000 || n_woken < 100) begin
      failures++;
      $display("FAIL: too little activity: issued %0d woken %0d", n_issued, n_woken);
    end
    $display("issued=%0d woken=%0d", n_issued, n_woken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
