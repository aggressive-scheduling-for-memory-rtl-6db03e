// lsu_sched: speculative scheduling control of the preload load/store unit.
//
// Each cycle it selects up to NP loads/stores from the UMAB and issues them
// to the NP data cache ports; when more are executable than there are ports,
// the oldest win (port 0 gets the oldest). Issue rules, as the document
// gives them for preload:
//   load  - its linear address has been generated. Nothing else is checked:
//           a load may go ahead of older stores whose addresses are still
//           unsolved; conflicts are found after the data is back (B-stage).
//   store - its linear address has been generated, it is at the head of the
//           UMAB, and its retirement permission has arrived from the reorder
//           buffer.
// With REDUCED = 1 the scheduling stage is merged into the address stage
// (reduced pipeline): an access whose address the AGUs produce in this cycle
// is already a candidate, using the AGU output directly. With REDUCED = 0 the
// address must first be written into the UMAB (separate S-stage).
//
// Cache requests are combinational outputs; the cache is expected to take
// them at the next clock edge and return load data one cycle later.
// The preload output counts loads issued this cycle while an older store's
// address was still unsolved.
module lsu_sched
  import lsu_pkg::*;
#(
  parameter int unsigned N       = 32,
  parameter int unsigned NP      = 3,
  parameter bit          REDUCED = 1'b0,
  localparam int unsigned IW     = $clog2(N),
  localparam int unsigned AW     = $clog2(N + 1)
)(
  input  umab_entry_t    ent [N],
  input  logic [IW-1:0]  head,
  input  logic [AW-1:0]  oldest_unsolved_age,
  // AGU results of this cycle (used only when REDUCED)
  input  logic [NP-1:0]  agu_valid,
  input  logic [IW-1:0]  agu_uidx  [NP],
  input  addr_t          agu_addr  [NP],
  input  data_t          agu_sdata [NP],
  // selection
  output logic [NP-1:0]  iss_valid,
  output logic [IW-1:0]  iss_idx [NP],
  // data cache ports
  output logic [NP-1:0]  dc_req_valid,
  output logic [NP-1:0]  dc_req_we,
  output addr_t          dc_req_addr  [NP],
  output size_e          dc_req_size  [NP],
  output data_t          dc_req_wdata [NP],
  // store written this cycle
  output logic           st_wr_valid,
  output addr_t          st_wr_addr,
  output size_e          st_wr_size,
  output logic [3:0]     n_preload
);

  // effective address view: UMAB contents plus this cycle's AGU results when merged
  logic [N-1:0] byp;
  addr_t        eaddr [N];
  data_t        edata [N];
  always_comb begin
    for (int e = 0; e < N; e++) begin
      byp[e]   = 1'b0;
      eaddr[e] = ent[e].addr;
      edata[e] = ent[e].data;
      if (REDUCED)
        for (int p = 0; p < NP; p++)
          if (agu_valid[p] && int'(agu_uidx[p]) == e) begin
            byp[e]   = 1'b1;
            eaddr[e] = agu_addr[p];
            edata[e] = size_mask(agu_sdata[p], ent[e].size);
          end
    end
  end

  logic [N-1:0] execable;
  always_comb begin
    for (int e = 0; e < N; e++) begin
      logic addr_ok;
      addr_ok = (ent[e].st == U_ADDR_RDY) || (ent[e].st == U_WAIT_ADDR && byp[e]);
      if (!ent[e].valid)
        execable[e] = 1'b0;
      else if (ent[e].is_store)
        execable[e] = addr_ok && ent[e].permit && (IW'(e) == head);
      else
        execable[e] = addr_ok;
    end
  end

  // oldest-first selection
  always_comb begin
    int cnt;
    cnt = 0;
    iss_valid = '0;
    n_preload = '0;
    for (int p = 0; p < NP; p++) iss_idx[p] = '0;
    for (int a = 0; a < N; a++) begin
      logic [IW-1:0] i;
      i = IW'((int'(head) + a) % N);
      if (execable[i] && cnt < NP) begin
        iss_valid[cnt] = 1'b1;
        iss_idx[cnt]   = i;
        if (!ent[i].is_store && AW'(a) > oldest_unsolved_age) n_preload = n_preload + 1'b1;
        cnt++;
      end
    end
  end

  always_comb begin
    st_wr_valid = 1'b0;
    st_wr_addr  = '0;
    st_wr_size  = SZ_BYTE;
    for (int p = 0; p < NP; p++) begin
      dc_req_valid[p] = iss_valid[p];
      dc_req_we[p]    = iss_valid[p] && ent[iss_idx[p]].is_store;
      dc_req_addr[p]  = eaddr[iss_idx[p]];
      dc_req_size[p]  = ent[iss_idx[p]].size;
      dc_req_wdata[p] = ent[iss_idx[p]].is_store ? edata[iss_idx[p]] : '0;
      if (dc_req_we[p]) begin
        st_wr_valid = 1'b1;
        st_wr_addr  = eaddr[iss_idx[p]];
        st_wr_size  = ent[iss_idx[p]].size;
      end
    end
  end

endmodule
