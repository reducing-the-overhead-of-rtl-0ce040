// hmtlb_top: hybrid mapped data TLB.
//
// Translates the virtual address of a load/store into the real address of a
// real-address data cache. A direct-mapped master TLB (hmtlb_master) is read
// at a single index, and its real page number goes to the cache together
// with the page offset in the same cycle, before it is known whether the
// entry belongs to this page. The compare of the stored virtual page number
// with the incoming one then confirms the access (resp_valid) or cancels it
// and stalls. A small fully-associative slave TLB (hmtlb_slave) holds the
// entries the master has displaced; on a master miss it is searched in the
// next cycle and, on a hit, the cache access is restarted with its real
// page number (one stall cycle), and the two entries change places. If both
// miss, the missing translation is reloaded through the walk_* port and
// written into the master, and the master's displaced entry goes to the
// slave. The two tables never hold the same translation.
//
// Index of the master (INDEX_MODE):
//   IDX_VPN : low bits of the virtual page number.
//   IDX_LS  : a hash of the instruction's base register identifier and
//             offset (hmtlb_index), computed in parallel with the address
//             add (hmtlb_ea), so the master can be read before the virtual
//             address exists.
//
// Interface (one access at a time; req_* are sampled only while req_ready):
//   req_valid, req_reg_id, req_base, req_off : load/store in the MEM stage:
//       base register identifier, base register value, offset field.
//   stall        : high while the access is not finished this cycle.
//   cache_req    : a data cache access is started this cycle at cache_pa.
//   resp_valid   : cache_pa of this cycle is the correct real address.
//                  cache_req without resp_valid is a speculative access with
//                  a master entry that turned out wrong; the cache drops it.
//   walk_req/walk_vpn -> walk_ack/walk_rpn : page table reload, one request
//       held until a one-cycle acknowledge carrying the real page number.
//   ev_master_hit, ev_slave_hit, ev_miss : one pulse per access outcome.
// Latency: master hit 0 stall cycles, slave hit 1, miss 2 + reload latency.
//
// The master/slave organisation, both indexing modes, the parallel cache
// access and the stall behaviour follow the design description. The 32-bit
// addresses, the 13-bit offset, the index hash, the swap between the
// tables, the reload handshake and searching the slave in the stall cycle
// (rather than in the first cycle) in both modes are this design's choices.
module hmtlb_top #(
  parameter int unsigned VA_W           = hmtlb_pkg::VA_W_DEF,
  parameter int unsigned PA_W           = hmtlb_pkg::PA_W_DEF,
  parameter int unsigned PAGE_BITS      = hmtlb_pkg::PAGE_BITS_DEF,
  parameter int unsigned MASTER_ENTRIES = hmtlb_pkg::MASTER_ENTRIES_DEF,
  parameter int unsigned SLAVE_ENTRIES  = hmtlb_pkg::SLAVE_ENTRIES_DEF,
  parameter int unsigned REG_W          = hmtlb_pkg::REG_W_DEF,
  parameter int unsigned OFF_W          = hmtlb_pkg::OFF_W_DEF,
  parameter hmtlb_pkg::index_mode_e INDEX_MODE = hmtlb_pkg::IDX_VPN,
  localparam int unsigned VPN_W         = VA_W - PAGE_BITS,
  localparam int unsigned RPN_W         = PA_W - PAGE_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  // load/store from the pipeline
  input  logic             req_valid,
  input  logic [REG_W-1:0] req_reg_id,
  input  logic [VA_W-1:0]  req_base,
  input  logic [OFF_W-1:0] req_off,
  output logic             req_ready,
  output logic             stall,
  // data cache
  output logic             cache_req,
  output logic [PA_W-1:0]  cache_pa,
  output logic             resp_valid,
  // page table reload
  output logic             walk_req,
  output logic [VPN_W-1:0] walk_vpn,
  input  logic             walk_ack,
  input  logic [RPN_W-1:0] walk_rpn,
  // access outcome events
  output logic             ev_master_hit,
  output logic             ev_slave_hit,
  output logic             ev_miss
);

  import hmtlb_pkg::*;

  localparam int unsigned IDX_W = $clog2(MASTER_ENTRIES);
  localparam int unsigned WAY_W = (SLAVE_ENTRIES > 1) ? $clog2(SLAVE_ENTRIES) : 1;

  // request path
  logic [VA_W-1:0]      va_now;
  logic [IDX_W-1:0]     idx_now;
  logic [VA_W-1:0]      va_q;
  logic [IDX_W-1:0]     idx_q;
  logic [VPN_W-1:0]     cur_vpn;
  logic [PAGE_BITS-1:0] cur_off;
  logic [IDX_W-1:0]     cur_idx;

  // tables
  logic             m_rd_valid, m_hit, m_we;
  logic [VPN_W-1:0] m_rd_vpn;
  logic [RPN_W-1:0] m_rd_rpn, m_wr_rpn;
  logic             s_hit, s_we, s_swap, s_ins_dup, s_wr_valid;
  logic [WAY_W-1:0] s_hit_way, s_ins_way, s_wr_way;
  logic [RPN_W-1:0] s_rpn;

  ctrl_state_e state;
  logic        accept;

  hmtlb_ea #(.VA_W(VA_W), .OFF_W(OFF_W)) u_ea (
    .base (req_base),
    .off  (req_off),
    .va   (va_now)
  );

  hmtlb_index #(
    .MODE(INDEX_MODE), .VPN_W(VPN_W), .IDX_W(IDX_W), .REG_W(REG_W), .OFF_W(OFF_W)
  ) u_index (
    .vpn    (va_now[VA_W-1:PAGE_BITS]),
    .reg_id (req_reg_id),
    .off    (req_off),
    .idx    (idx_now)
  );

  // The request is held here from a master miss until the access ends.
  always_ff @(posedge clk) begin
    if (accept) begin
      va_q  <= va_now;
      idx_q <= idx_now;
    end
  end

  always_comb begin
    if (state == ST_IDLE) begin
      cur_vpn = va_now[VA_W-1:PAGE_BITS];
      cur_off = va_now[PAGE_BITS-1:0];
      cur_idx = idx_now;
    end else begin
      cur_vpn = va_q[VA_W-1:PAGE_BITS];
      cur_off = va_q[PAGE_BITS-1:0];
      cur_idx = idx_q;
    end
  end

  hmtlb_master #(.ENTRIES(MASTER_ENTRIES), .VPN_W(VPN_W), .RPN_W(RPN_W)) u_master (
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_idx   (cur_idx),
    .cmp_vpn  (cur_vpn),
    .rd_valid (m_rd_valid),
    .rd_vpn   (m_rd_vpn),
    .rd_rpn   (m_rd_rpn),
    .hit      (m_hit),
    .wr_en    (m_we),
    .wr_idx   (cur_idx),
    .wr_vpn   (cur_vpn),
    .wr_rpn   (m_wr_rpn)
  );

  hmtlb_slave #(.ENTRIES(SLAVE_ENTRIES), .VPN_W(VPN_W), .RPN_W(RPN_W)) u_slave (
    .clk      (clk),
    .rst_n    (rst_n),
    .lk_vpn   (cur_vpn),
    .lk_hit   (s_hit),
    .lk_way   (s_hit_way),
    .lk_rpn   (s_rpn),
    .ins_vpn  (m_rd_vpn),
    .ins_way  (s_ins_way),
    .ins_dup  (s_ins_dup),
    .wr_en    (s_we),
    .wr_way   (s_wr_way),
    .wr_valid (s_wr_valid),
    .wr_vpn   (m_rd_vpn),
    .wr_rpn   (m_rd_rpn)
  );

  hmtlb_ctrl u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .req_valid     (req_valid),
    .m_hit         (m_hit),
    .m_rd_valid    (m_rd_valid),
    .s_hit         (s_hit),
    .walk_ack      (walk_ack),
    .state         (state),
    .req_ready     (req_ready),
    .accept        (accept),
    .stall         (stall),
    .resp_valid    (resp_valid),
    .m_we          (m_we),
    .s_we          (s_we),
    .s_swap        (s_swap),
    .walk_req      (walk_req),
    .ev_master_hit (ev_master_hit),
    .ev_slave_hit  (ev_slave_hit),
    .ev_miss       (ev_miss)
  );

  // Entry written into the master: the slave's entry on a slave hit, the
  // reloaded one otherwise. The master's old entry goes to the slave, into
  // the vacated way on a swap or the chosen insertion way on a reload. When
  // the master is indexed by instruction fields one page can sit at two
  // master indices; if the displaced page is already in the slave, a swap
  // just empties the vacated way so the slave never holds a page twice.
  always_comb begin
    m_wr_rpn   = (state == ST_SLAVE) ? s_rpn : walk_rpn;
    s_wr_way   = s_swap ? s_hit_way : s_ins_way;
    s_wr_valid = m_rd_valid && !(s_swap && s_ins_dup);
  end

  // Data cache address: the master's real page number at once, the slave's
  // in the stall cycle, the reloaded one when the reload arrives.
  always_comb begin
    unique case (state)
      ST_SLAVE: begin
        cache_req = s_hit;
        cache_pa  = {s_rpn, cur_off};
      end
      ST_WALK: begin
        cache_req = walk_ack;
        cache_pa  = {walk_rpn, cur_off};
      end
      default: begin
        cache_req = req_valid;
        cache_pa  = {m_rd_rpn, cur_off};
      end
    endcase
    walk_vpn = cur_vpn;
  end

endmodule
