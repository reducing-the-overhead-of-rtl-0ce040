// hmtlb_slave: small fully-associative slave TLB.
//
// ENTRIES entries, each a valid bit, a virtual page number and a real page
// number, hold only translations displaced from the master TLB, so no
// translation needs to be in both tables. All entries are compared with
// lk_vpn at once; lk_hit, lk_way and lk_rpn give the result, combinationally.
//
// A second compare port picks where a displaced master entry (ins_vpn) goes
// when it has to be inserted: the way already holding that virtual page
// number if there is one (possible when the master is indexed by
// instruction fields, where one page can sit at two master indices), else
// an invalid way, else the least recently used way (hmtlb_lru). ins_dup
// reports that the page is already held, so that a swap can drop the
// displaced copy instead of storing it twice.
//
// One write port: on wr_en the entry at wr_way is replaced by
// {wr_valid, wr_vpn, wr_rpn} at the clock edge. Writing wr_valid=0 empties
// the way (used when a slave entry moves to the master and the master had
// nothing to give back). Every valid write marks its way most recently used.
// Only valid bits are reset.
//
// The full associativity, the four-entry default and LRU replacement follow
// the design description; the insertion preference (same page, then empty,
// then LRU) is this design's choice.
module hmtlb_slave #(
  parameter int unsigned ENTRIES = hmtlb_pkg::SLAVE_ENTRIES_DEF,
  parameter int unsigned VPN_W   = hmtlb_pkg::VA_W_DEF - hmtlb_pkg::PAGE_BITS_DEF,
  parameter int unsigned RPN_W   = hmtlb_pkg::PA_W_DEF - hmtlb_pkg::PAGE_BITS_DEF,
  localparam int unsigned WAY_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // associative lookup
  input  logic [VPN_W-1:0] lk_vpn,
  output logic             lk_hit,
  output logic [WAY_W-1:0] lk_way,
  output logic [RPN_W-1:0] lk_rpn,
  // insertion way for a displaced master entry
  input  logic [VPN_W-1:0] ins_vpn,
  output logic [WAY_W-1:0] ins_way,
  output logic             ins_dup,   // ins_vpn is already held
  // write
  input  logic             wr_en,
  input  logic [WAY_W-1:0] wr_way,
  input  logic             wr_valid,
  input  logic [VPN_W-1:0] wr_vpn,
  input  logic [RPN_W-1:0] wr_rpn
);

  logic [ENTRIES-1:0] valid_q;
  logic [VPN_W-1:0]   vpn_q [ENTRIES];
  logic [RPN_W-1:0]   rpn_q [ENTRIES];
  logic [ENTRIES-1:0] lk_match, ins_match;
  logic [WAY_W-1:0]   lru_way;
  logic               ins_free;
  logic [WAY_W-1:0]   dup_way, free_way;

  hmtlb_lru #(.N(ENTRIES)) u_lru (
    .clk       (clk),
    .rst_n     (rst_n),
    .touch_en  (wr_en && wr_valid),
    .touch_way (wr_way),
    .lru_way   (lru_way)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     valid_q         <= '0;
    else if (wr_en) valid_q[wr_way] <= wr_valid;
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      vpn_q[wr_way] <= wr_vpn;
      rpn_q[wr_way] <= wr_rpn;
    end
  end

  always_comb begin
    lk_hit   = 1'b0;
    lk_way   = '0;
    lk_rpn   = '0;
    ins_dup  = 1'b0;
    dup_way  = '0;
    ins_free = 1'b0;
    free_way = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      lk_match[i]  = valid_q[i] && (vpn_q[i] == lk_vpn);
      ins_match[i] = valid_q[i] && (vpn_q[i] == ins_vpn);
      if (lk_match[i]) begin
        lk_hit = 1'b1;
        lk_way = WAY_W'(i);
        lk_rpn = rpn_q[i];
      end
      if (ins_match[i]) begin
        ins_dup = 1'b1;
        dup_way = WAY_W'(i);
      end
      if (!valid_q[i] && !ins_free) begin
        ins_free = 1'b1;
        free_way = WAY_W'(i);
      end
    end
    if (ins_dup)       ins_way = dup_way;
    else if (ins_free) ins_way = free_way;
    else               ins_way = lru_way;
  end

  // A page number is never held twice, so at most one way can match.
  always_comb begin
    if (rst_n) assert ($onehot0(lk_match)) else $error("slave TLB: multiple hits");
  end

endmodule
