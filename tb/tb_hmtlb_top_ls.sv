// tb_hmtlb_top_ls: end-to-end test of the hybrid mapped TLB with the master
// indexed by the load/store instruction's base register identifier and
// offset (INDEX_MODE = IDX_LS), other sizes at their defaults.
//
// Loads/stores are issued through eight base registers whose values are
// changed now and then; a changed base register leaves a stale master
// entry at the same index, which is the case this indexing pays for. Master
// hits, slave hits (with swaps), misses in both, slave insertions and LRU
// evictions all occur. For every access the
// testbench checks, against hmtlb_model and the page table pt_rpn:
//   - the outcome event (master hit / slave hit / miss),
//   - the real address given to the cache when resp_valid rises,
//   - the number of stall cycles: 0 for a master hit, 1 for a slave hit,
//     2 plus the reload latency for a miss,
//   - that the speculative cache access of the first cycle is cancelled
//     (cache_req without resp_valid) exactly when the master misses.
// Each mechanism must have happened at least once.
module tb_hmtlb_top_ls;
  import hmtlb_pkg::*;
  import hmtlb_tb_pkg::*;

  localparam int VA_W = VA_W_DEF, PA_W = PA_W_DEF, PB = PAGE_BITS_DEF;
  localparam int VPN_W = VA_W - PB, RPN_W = PA_W - PB;
  localparam int MN = MASTER_ENTRIES_DEF, SN = SLAVE_ENTRIES_DEF;
  localparam int IDX_W = $clog2(MN);
  localparam int N_ACC = 20000;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0;
  logic [REG_W_DEF-1:0] req_reg_id = '0;
  logic [VA_W-1:0] req_base = '0;
  logic [OFF_W_DEF-1:0] req_off = '0;
  logic req_ready, stall, cache_req, resp_valid, walk_req, walk_ack = 0;
  logic [PA_W-1:0] cache_pa;
  logic [VPN_W-1:0] walk_vpn;
  logic [RPN_W-1:0] walk_rpn = '0;
  logic ev_master_hit, ev_slave_hit, ev_miss;

  int checks = 0, failures = 0;
  int n_mhit = 0, n_shit = 0, n_miss = 0, n_cancel = 0, n_stall = 0;

  always #5 clk = ~clk;

  hmtlb_top #(.INDEX_MODE(IDX_LS)) dut (
    .clk, .rst_n, .req_valid, .req_reg_id, .req_base, .req_off, .req_ready,
    .stall, .cache_req, .cache_pa, .resp_valid, .walk_req, .walk_vpn,
    .walk_ack, .walk_rpn, .ev_master_hit, .ev_slave_hit, .ev_miss
  );

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One access; returns when it completes.
  task automatic do_access(int unsigned rid, longint unsigned base, int unsigned offf,
                           hmtlb_model m);
    longint unsigned vpn, off, va;
    outcome_e exp;
    int cyc, lat, wcnt;
    bit seen_m, seen_s, seen_x;
    va  = (base + longint'(unsigned'(32'(signed'(OFF_W_DEF'(offf)))))) & ((64'd1 << VA_W) - 1);
    vpn = va >> PB;
    off = va & ((64'd1 << PB) - 1);
    exp = m.access(ls_index(rid, offf, REG_W_DEF, OFF_W_DEF, IDX_W), vpn);
    lat = $urandom_range(0, 4);
    wcnt = 0; cyc = 0;
    seen_m = 0; seen_s = 0; seen_x = 0;
    @(negedge clk);
    chk(req_ready, "ready before access");
    req_valid  = 1;
    req_reg_id = REG_W_DEF'(rid);
    req_off    = OFF_W_DEF'(offf);
    req_base   = VA_W'(base);
    forever begin
      if (walk_req) begin
        chk(walk_vpn == VPN_W'(vpn), "walk vpn");
        walk_ack = (wcnt == lat);
        walk_rpn = RPN_W'(pt_rpn(walk_vpn, RPN_W));
        wcnt++;
      end else walk_ack = 0;
      #1;
      seen_m |= ev_master_hit; seen_s |= ev_slave_hit; seen_x |= ev_miss;
      if (cyc == 0) begin
        chk(cache_req, "speculative cache access in first cycle");
        if (!resp_valid) n_cancel++;
        chk(resp_valid == (exp == OUT_MASTER), "master hit decides first cycle");
      end
      chk(stall == !resp_valid, "stall is the inverse of completion");
      if (resp_valid) break;
      n_stall++;
      @(posedge clk); @(negedge clk);
      cyc++;
      if (cyc > 50) begin chk(0, "access never completed"); break; end
    end
    chk(cache_req, "cache access with the good address");
    chk(cache_pa == PA_W'((pt_rpn(vpn, RPN_W) << PB) | off), "real address");
    case (exp)
      OUT_MASTER: begin n_mhit++; chk(seen_m && !seen_s && !seen_x && cyc == 0, "master hit: 0 stall cycles"); end
      OUT_SLAVE:  begin n_shit++; chk(!seen_m && seen_s && !seen_x && cyc == 1, "slave hit: 1 stall cycle"); end
      default:    begin n_miss++; chk(!seen_m && !seen_s && seen_x && cyc == 2 + lat, "miss: 2 + reload latency stall cycles"); end
    endcase
    @(posedge clk);
    #1 walk_ack = 0;
    if ($urandom_range(0, 3) == 0) req_valid = 0;
  endtask

  initial begin
    hmtlb_model m;
    longint unsigned regval[8];
    int unsigned rid, offf;
    m = new(MN, SN);
    for (int r = 0; r < 8; r++) regval[r] = longint'($urandom_range(0, 63)) << PB;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N_ACC; i++) begin
      // base register 8..15 (8 registers), a few offsets per register
      rid  = $urandom_range(0, 7);
      offf = $urandom_range(0, 3) * 16 + ((rid[0]) ? 4096 - 64 : 0);
      if ($urandom_range(0, 24) == 0)
        regval[rid] = (longint'($urandom_range(0, 63)) << PB) + longint'($urandom_range(0, 8191));
      do_access(rid + 8, regval[rid], offf & ((1 << OFF_W_DEF) - 1), m);
    end
    @(negedge clk) req_valid = 0;
    $display("master hits %0d, slave hits %0d, misses %0d, cancelled speculative accesses %0d, stall cycles %0d",
             n_mhit, n_shit, n_miss, n_cancel, n_stall);
    $display("swaps %0d, slave insertions %0d, LRU evictions %0d, displaced pages already in slave %0d",
             m.n_swap, m.n_insert, m.n_evict, m.n_dup);
    $display("MPI-style ratios per access: master miss %0.5f, hybrid miss %0.5f",
             real'(n_shit + n_miss) / N_ACC, real'(n_miss) / N_ACC);
    chk(n_mhit > 0, "master hit happened");
    chk(n_shit > 0, "slave hit (swap) happened");
    chk(n_miss > 0, "miss in both with reload happened");
    chk(n_cancel > 0, "speculative access cancelled");
    chk(m.n_insert > 0, "displaced entry inserted into slave");
    chk(m.n_evict > 0, "LRU eviction from slave happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
