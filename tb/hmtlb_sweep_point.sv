// hmtlb_sweep_point: one configuration of the hybrid mapped TLB (master
// size MN, page offset bits PB, 4-entry slave, indexing by virtual page
// number) driven by a deterministic synthetic load/store trace.
//
// The trace is the same for every configuration: it is made by a fixed
// xorshift generator, not by $urandom. Each reference is one of
//   - a hot stack region of 24 KB (40 %),
//   - four arrays of 512 KB walked forward 8 bytes per touch (40 %),
//   - a random address in an 8 MB heap (20 %).
// Every translation, outcome, and stall count is checked against
// hmtlb_model as in the end-to-end test. The reload takes 2 cycles.
// Counts of master misses and misses in both come out on the ports when
// done rises.
module hmtlb_sweep_point #(
  parameter int MN    = 128,
  parameter int PB    = 13,
  parameter int N_REF = 20000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   master_misses,
  output int   hybrid_misses
);
  import hmtlb_pkg::*;
  import hmtlb_tb_pkg::*;

  localparam int VA_W = 32, PA_W = 32, VPN_W = VA_W - PB, RPN_W = PA_W - PB;
  localparam int SN = 4, LAT = 2;

  logic req_valid = 0, req_ready, stall, cache_req, resp_valid, walk_req, walk_ack = 0;
  logic [REG_W_DEF-1:0] req_reg_id = '0;
  logic [VA_W-1:0] req_base = '0;
  logic [OFF_W_DEF-1:0] req_off = '0;
  logic [PA_W-1:0] cache_pa;
  logic [VPN_W-1:0] walk_vpn;
  logic [RPN_W-1:0] walk_rpn = '0;
  logic ev_master_hit, ev_slave_hit, ev_miss;

  hmtlb_top #(.PAGE_BITS(PB), .MASTER_ENTRIES(MN), .SLAVE_ENTRIES(SN)) dut (
    .clk, .rst_n, .req_valid, .req_reg_id, .req_base, .req_off, .req_ready,
    .stall, .cache_req, .cache_pa, .resp_valid, .walk_req, .walk_vpn,
    .walk_ack, .walk_rpn, .ev_master_hit, .ev_slave_hit, .ev_miss
  );

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL [MN=%0d PB=%0d] %s at %0t", MN, PB, what, $time);
    end
  endtask

  longint unsigned rng = 64'h2545_f491_4f6c_dd1d;
  function automatic longint unsigned next_rand();
    rng ^= rng << 13;
    rng ^= rng >> 7;
    rng ^= rng << 17;
    return rng;
  endfunction

  initial begin
    hmtlb_model m;
    longint unsigned va, vpn, off, r, arr_pos[4];
    outcome_e exp;
    int cyc, wcnt;
    done = 0; checks = 0; failures = 0; master_misses = 0; hybrid_misses = 0;
    m = new(MN, SN);
    foreach (arr_pos[a]) arr_pos[a] = 0;
    @(posedge rst_n);
    for (int i = 0; i < N_REF; i++) begin
      r = next_rand();
      if (r % 10 < 4) va = 32'h7fff_0000 + (next_rand() % (24 * 1024));
      else if (r % 10 < 8) begin
        int a;
        a = int'((r >> 8) % 4);
        va = 32'h1000_0000 + longint'(a) * 32'h0010_4000 + arr_pos[a];
        arr_pos[a] = (arr_pos[a] + 8) % (512 * 1024);
      end else va = 32'h2000_0000 + (next_rand() % (8 * 1024 * 1024));
      va  = va & ~64'h3;
      vpn = va >> PB;
      off = va & ((64'd1 << PB) - 1);
      exp = m.access(int'(vpn % MN), vpn);
      @(negedge clk);
      req_valid = 1;
      req_reg_id = '0;
      req_off = '0;
      req_base = VA_W'(va);
      cyc = 0; wcnt = 0;
      forever begin
        if (walk_req) begin
          walk_ack = (wcnt == LAT);
          walk_rpn = RPN_W'(pt_rpn(walk_vpn, RPN_W));
          wcnt++;
        end else walk_ack = 0;
        #1;
        if (resp_valid) break;
        @(posedge clk); @(negedge clk);
        cyc++;
        if (cyc > 20) begin chk(0, "access never completed"); break; end
      end
      chk(cache_pa == PA_W'((pt_rpn(vpn, RPN_W) << PB) | off), "real address");
      case (exp)
        OUT_MASTER: chk(ev_master_hit && cyc == 0, "master hit");
        OUT_SLAVE:  begin master_misses++; chk(ev_slave_hit && cyc == 1, "slave hit"); end
        default:    begin master_misses++; hybrid_misses++; chk(cyc == 2 + LAT, "miss"); end
      endcase
      @(posedge clk);
      #1 walk_ack = 0;
      req_valid = 0;
    end
    done = 1;
  end
endmodule
