// hmtlb_ea: effective virtual address of a load/store.
//
// The virtual address is the base register value plus the sign-extended
// offset field of the instruction. In the hybrid mapped TLB this add runs
// in parallel with the master TLB read when the master is indexed by the
// instruction's register identifier and offset, and feeds the virtual page
// number compare. Purely combinational.
//
// Ports: base (VA_W), off (OFF_W, two's complement) -> va (VA_W).
// The offset width (13, SPARC simm13) is this design's choice.
module hmtlb_ea #(
  parameter int unsigned VA_W  = hmtlb_pkg::VA_W_DEF,
  parameter int unsigned OFF_W = hmtlb_pkg::OFF_W_DEF
) (
  input  logic [VA_W-1:0]  base,
  input  logic [OFF_W-1:0] off,
  output logic [VA_W-1:0]  va
);

  logic [VA_W-1:0] off_sx;

  always_comb begin
    off_sx = {{(VA_W-OFF_W){off[OFF_W-1]}}, off};
    va     = base + off_sx;
  end

endmodule
