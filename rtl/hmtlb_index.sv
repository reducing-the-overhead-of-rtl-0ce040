// hmtlb_index: master TLB index generator.
//
// Two ways of indexing the direct-mapped master TLB are supported, chosen by
// the MODE parameter:
//   IDX_VPN : the index is the low IDX_W bits of the virtual page number.
//   IDX_LS  : the index is a function f of the load/store instruction's own
//             fields, so the master can be read before the address add is
//             done. Here f is an XOR fold of the concatenation
//             {register identifier, offset} into IDX_W bits (chunks of IDX_W
//             bits taken from the least significant end, the last chunk
//             zero-padded). The fold is this design's choice; only the
//             inputs of f (base register identifier and offset) come from
//             the design description.
// Purely combinational.
module hmtlb_index #(
  parameter hmtlb_pkg::index_mode_e MODE = hmtlb_pkg::IDX_VPN,
  parameter int unsigned VPN_W = hmtlb_pkg::VA_W_DEF - hmtlb_pkg::PAGE_BITS_DEF,
  parameter int unsigned IDX_W = $clog2(hmtlb_pkg::MASTER_ENTRIES_DEF),
  parameter int unsigned REG_W = hmtlb_pkg::REG_W_DEF,
  parameter int unsigned OFF_W = hmtlb_pkg::OFF_W_DEF
) (
  input  logic [VPN_W-1:0] vpn,     // virtual page number (IDX_VPN)
  input  logic [REG_W-1:0] reg_id,  // base register identifier (IDX_LS)
  input  logic [OFF_W-1:0] off,     // load/store offset field (IDX_LS)
  output logic [IDX_W-1:0] idx
);

  localparam int unsigned LS_W    = REG_W + OFF_W;
  localparam int unsigned NCHUNK  = (LS_W + IDX_W - 1) / IDX_W;
  localparam int unsigned PAD_W   = NCHUNK * IDX_W;

  logic [PAD_W-1:0] ls_pad;
  logic [IDX_W-1:0] ls_fold;

  always_comb begin
    ls_pad  = PAD_W'({reg_id, off});
    ls_fold = '0;
    for (int unsigned c = 0; c < NCHUNK; c++) begin
      ls_fold = ls_fold ^ ls_pad[c*IDX_W +: IDX_W];
    end
    if (MODE == hmtlb_pkg::IDX_LS) idx = ls_fold;
    else                           idx = vpn[IDX_W-1:0];
  end

endmodule
