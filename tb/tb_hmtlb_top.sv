// tb_hmtlb_top: end-to-end test of the hybrid mapped TLB at its default
// configuration (128-entry master indexed by the virtual page number,
// 4-entry slave, 8 KB pages, 32-bit addresses).
//
// A stream of loads/stores is issued whose pages cluster on a few master
// indices, so that master hits, slave hits (with swaps), misses in both,
// slave insertions and LRU evictions all occur. For every access the
// testbench checks, against hmtlb_model and the page table pt_rpn:
//   - the outcome event (master hit / slave hit / miss),
//   - the real address given to the cache when resp_valid rises,
//   - the number of stall cycles: 0 for a master hit, 1 for a slave hit,
//     2 plus the reload latency for a miss,
//   - that the speculative cache access of the first cycle is cancelled
//     (cache_req without resp_valid) exactly when the master misses.
// Each mechanism must have happened at least once.
module tb_hmtlb_top;
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

  hmtlb_top dut (
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
  task automatic do_access(longint unsigned va, hmtlb_model m);
    longint unsigned vpn, off;
    outcome_e exp;
    int cyc, lat, wcnt;
    bit seen_m, seen_s, seen_x;
    vpn = va >> PB;
    off = va & ((64'd1 << PB) - 1);
    exp = m.access(int'(vpn % MN), vpn);
    lat = $urandom_range(0, 4);
    wcnt = 0; cyc = 0;
    seen_m = 0; seen_s = 0; seen_x = 0;
    @(negedge clk);
    chk(req_ready, "ready before access");
    req_valid  = 1;
    req_reg_id = REG_W_DEF'($urandom);
    req_off    = OFF_W_DEF'($urandom_range(0, 200));
    req_base   = VA_W'(va - req_off);
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
    longint unsigned vpn, va;
    m = new(MN, SN);
    repeat (3) @(posedge clk);
    rst_n = 1;
    vpn = 0;
    for (int i = 0; i < N_ACC; i++) begin
      // 60 %: same page again; else a page from 16 index groups of 3
      // conflicting pages each, or now and then any page at all.
      if ($urandom_range(0, 9) >= 6) begin
        if ($urandom_range(0, 19) == 0) vpn = {$urandom, $urandom} & ((64'd1 << VPN_W) - 1);
        else vpn = longint'($urandom_range(0, 2)) * MN + $urandom_range(0, 15);
      end
      va = (vpn << PB) | longint'($urandom_range(200, (1 << PB) - 1));
      do_access(va, m);
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
