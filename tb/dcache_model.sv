// dcache_model: behavioural model of the ideal data cache seen by the
// load/store unit (testbench only; not synthesizable design content).
//
// NP ports, every access hits, one-cycle latency: a request presented in
// cycle t is taken at the clock edge and a load's data is on rdata[p] during
// cycle t+1. Reads return the contents before any write taken at the same
// edge. Accesses are 1, 2 or 4 bytes at any byte address; load data is
// zero-extended, little-endian. The array holds MEM_BYTES bytes and the
// address is taken modulo MEM_BYTES. Initial contents: byte i = (7*i + 3) mod 256.
module dcache_model
  import lsu_pkg::*;
#(
  parameter int unsigned NP        = 3,
  parameter int unsigned MEM_BYTES = 256
)(
  input  logic          clk,
  input  logic [NP-1:0] req_valid,
  input  logic [NP-1:0] req_we,
  input  addr_t         req_addr  [NP],
  input  size_e         req_size  [NP],
  input  data_t         req_wdata [NP],
  output data_t         rdata     [NP]
);

  logic [7:0] mem [MEM_BYTES];
  int unsigned n_reads, n_writes;

  initial begin
    for (int i = 0; i < MEM_BYTES; i++) mem[i] = 8'(7 * i + 3);
    for (int p = 0; p < NP; p++) rdata[p] = '0;
    n_reads  = 0;
    n_writes = 0;
  end

  function automatic logic [7:0] peek(int unsigned a);
    return mem[a % MEM_BYTES];
  endfunction

  always @(posedge clk) begin
    logic [7:0] nxt [MEM_BYTES];
    nxt = mem;
    for (int p = 0; p < NP; p++) begin
      if (req_valid[p] && !req_we[p]) begin
        data_t d;
        d = '0;
        for (int b = 0; b < int'(nbytes(req_size[p])); b++)
          d[8*b +: 8] = mem[(int'(req_addr[p]) + b) % MEM_BYTES];
        rdata[p] <= d;
        n_reads++;
      end
      if (req_valid[p] && req_we[p]) begin
        for (int b = 0; b < int'(nbytes(req_size[p])); b++)
          nxt[(int'(req_addr[p]) + b) % MEM_BYTES] = req_wdata[p][8*b +: 8];
        n_writes++;
      end
    end
    mem = nxt;
  end

endmodule
