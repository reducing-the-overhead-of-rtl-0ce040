// hmtlb_master: direct-mapped master TLB with its virtual page compare.
//
// Each of ENTRIES entries holds a valid bit, a full virtual page number and
// a real page number. A lookup reads exactly one entry, the one at rd_idx,
// with no associative search. The entry's real page number is available at
// once, so the data cache can start with it while the stored virtual page
// number is compared with the incoming one. hit is that compare: when it is
// low the speculative cache access must be cancelled and the pipeline
// stalled. The read port is combinational (asynchronous array read); the
// write port updates one entry on the rising clock edge. Only the valid bits
// are reset; the page numbers are not.
//
// The read entry (rd_valid/rd_vpn/rd_rpn) also serves as the entry that a
// write to the same index displaces, which the access sequencer moves into
// the slave TLB.
//
// The direct mapping, the stored pair of page numbers and the compare that
// produces the stall follow the design description; the valid bit and the
// port timing are this design's choice.
module hmtlb_master #(
  parameter int unsigned ENTRIES = hmtlb_pkg::MASTER_ENTRIES_DEF,
  parameter int unsigned VPN_W   = hmtlb_pkg::VA_W_DEF - hmtlb_pkg::PAGE_BITS_DEF,
  parameter int unsigned RPN_W   = hmtlb_pkg::PA_W_DEF - hmtlb_pkg::PAGE_BITS_DEF,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup
  input  logic [IDX_W-1:0] rd_idx,
  input  logic [VPN_W-1:0] cmp_vpn,   // incoming virtual page number
  output logic             rd_valid,
  output logic [VPN_W-1:0] rd_vpn,
  output logic [RPN_W-1:0] rd_rpn,
  output logic             hit,
  // write
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_idx,
  input  logic [VPN_W-1:0] wr_vpn,
  input  logic [RPN_W-1:0] wr_rpn
);

  logic [ENTRIES-1:0] valid_q;
  logic [VPN_W-1:0]   vpn_mem [ENTRIES];
  logic [RPN_W-1:0]   rpn_mem [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     valid_q         <= '0;
    else if (wr_en) valid_q[wr_idx] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      vpn_mem[wr_idx] <= wr_vpn;
      rpn_mem[wr_idx] <= wr_rpn;
    end
  end

  always_comb begin
    rd_valid = valid_q[rd_idx];
    rd_vpn   = vpn_mem[rd_idx];
    rd_rpn   = rpn_mem[rd_idx];
    hit      = rd_valid && (rd_vpn == cmp_vpn);
  end

endmodule
