// lsu_rs: reservation station of the load/store unit.
//
// Loads and stores arrive in program order from the dispatcher (R-stage), up
// to DISP_W per cycle, each with the UMAB index that the unit registered it
// under. An entry waits here until its address operands (base, index) and,
// for a store, its data operand are present; operands that are not yet
// present are captured from the result bus by tag. Each cycle up to NP
// entries whose operands are all present are issued out of order to the NP
// address generation units, the oldest (closest to the UMAB head) first.
//
// Timing: an entry written at a clock edge can issue in the next cycle; an
// operand seen on the result bus in cycle t makes its entry issuable in t+1.
// Issue outputs are combinational from the entry registers. The caller
// dispatches only when free_cnt covers the number of valid operations.
// The 16 entries follow the document's limited front end; the oldest-first
// issue order, the single-cycle wakeup and the tag matching are this
// design's choices (the document only says that ready operations with an
// available address generation unit are issued out of order).
module lsu_rs
  import lsu_pkg::*;
#(
  parameter int unsigned N_RS   = 16,
  parameter int unsigned UMAB_N = 32,
  parameter int unsigned DISP_W = 8,
  parameter int unsigned NP     = 3,
  parameter int unsigned RB_W   = 7,
  localparam int unsigned UIW   = $clog2(UMAB_N),
  localparam int unsigned CW    = $clog2(N_RS + 1)
)(
  input  logic               clk,
  input  logic               rst_n,
  // dispatch
  input  logic               disp_fire,
  input  logic [DISP_W-1:0]  disp_valid,
  input  mop_t               disp_op   [DISP_W],
  input  logic [UIW-1:0]     disp_uidx [DISP_W],
  output logic [CW-1:0]      free_cnt,
  // age reference
  input  logic [UIW-1:0]     umab_head,
  // result bus (operand wakeup)
  input  rb_slot_t           rb [RB_W],
  // issue to the AGUs
  output logic [NP-1:0]      iss_valid,
  output mop_t               iss_op   [NP],
  output logic [UIW-1:0]     iss_uidx [NP]
);

  logic              v_q    [N_RS];
  mop_t              op_q   [N_RS];
  logic [UIW-1:0]    uidx_q [N_RS];

  function automatic operand_t wake(operand_t o, rb_slot_t bus [RB_W]);
    operand_t r;
    r = o;
    for (int k = 0; k < RB_W; k++)
      if (!r.rdy && bus[k].valid && bus[k].tag == r.tag) begin
        r.rdy = 1'b1;
        r.val = bus[k].data;
      end
    return r;
  endfunction

  function automatic logic [UIW:0] age_of(logic [UIW-1:0] i, logic [UIW-1:0] h);
    return (i >= h) ? ({1'b0, i} - {1'b0, h}) : ({1'b0, i} + (UIW+1)'(UMAB_N) - {1'b0, h});
  endfunction

  // ready entries and oldest-first selection of up to NP
  logic [N_RS-1:0] rdy;
  logic [N_RS-1:0] taken;
  always_comb begin
    for (int e = 0; e < N_RS; e++)
      rdy[e] = v_q[e] && op_q[e].base.rdy && op_q[e].index.rdy && op_q[e].sdata.rdy;
  end

  always_comb begin
    int best;
    taken = '0;
    for (int p = 0; p < NP; p++) begin
      best = -1;
      for (int e = 0; e < N_RS; e++)
        if (rdy[e] && !taken[e] &&
            (best < 0 || age_of(uidx_q[e], umab_head) < age_of(uidx_q[best], umab_head)))
          best = e;
      iss_valid[p] = (best >= 0);
      iss_op[p]    = (best >= 0) ? op_q[best]   : '0;
      iss_uidx[p]  = (best >= 0) ? uidx_q[best] : '0;
      if (best >= 0) taken[best] = 1'b1;
    end
  end

  always_comb begin
    free_cnt = '0;
    for (int e = 0; e < N_RS; e++)
      if (!v_q[e]) free_cnt = free_cnt + 1'b1;
  end

  // slot for each dispatched operation: the m-th free entry for the m-th valid operation
  int slot_of [DISP_W];
  always_comb begin
    int m, f;
    m = 0;
    for (int d = 0; d < DISP_W; d++) begin
      slot_of[d] = -1;
      f = 0;
      if (disp_valid[d]) begin
        for (int e = 0; e < N_RS; e++)
          if (!v_q[e]) begin
            if (f == m && slot_of[d] < 0) slot_of[d] = e;
            f++;
          end
        m++;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < N_RS; e++) begin
        v_q[e]    <= 1'b0;
        op_q[e]   <= '0;
        uidx_q[e] <= '0;
      end
    end else begin
      for (int e = 0; e < N_RS; e++) begin
        if (v_q[e]) begin
          op_q[e].base  <= wake(op_q[e].base,  rb);
          op_q[e].index <= wake(op_q[e].index, rb);
          op_q[e].sdata <= wake(op_q[e].sdata, rb);
        end
        if (taken[e]) v_q[e] <= 1'b0;
      end
      if (disp_fire)
        for (int d = 0; d < DISP_W; d++)
          if (disp_valid[d] && slot_of[d] >= 0) begin
            v_q[slot_of[d]]    <= 1'b1;
            uidx_q[slot_of[d]] <= disp_uidx[d];
            op_q[slot_of[d]]   <= disp_op[d];
            op_q[slot_of[d]].base  <= wake(disp_op[d].base,  rb);
            op_q[slot_of[d]].index <= wake(disp_op[d].index, rb);
            op_q[slot_of[d]].sdata <= wake(disp_op[d].sdata, rb);
          end
    end
  end

endmodule
