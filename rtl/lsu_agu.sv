// lsu_agu: address generation unit (A-stage) of the load/store unit.
//
// Computes the x86 linear address of one load or store:
//   linear = segment_base + base + (index << scale) + displacement   (mod 2^32)
// The computation is purely combinational; the result is written into the
// UMAB entry of the micro-operation at the end of the A-stage (or, with the
// reduced pipeline, also used directly by the scheduling control in the same
// cycle). The unit has one operation per cycle per instance; the load/store
// unit has one instance per port.
// Generating a linear address in an extra pipeline stage is what the design
// is built around; the x86 address formula with the segment base as an
// input operand is this design's reading of "linear address".
module lsu_agu
  import lsu_pkg::*;
(
  input  addr_t      seg,
  input  data_t      base,
  input  data_t      index,
  input  logic [1:0] scale,
  input  addr_t      disp,
  output addr_t      lin_addr
);

  always_comb begin
    lin_addr = seg + base + (index << scale) + disp;
  end

endmodule
