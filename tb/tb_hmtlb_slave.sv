// tb_hmtlb_slave: drives the 4-entry fully-associative slave TLB with
// random writes (valid and emptying) to random or suggested ways, and
// random lookups and insertion queries, using pages from a small pool so
// that hits and duplicates are frequent. A shadow copy with a recency list
// gives the expected hit, way and real page number, and the expected
// insertion way: the way holding the same page, else the lowest empty way,
// else the least recently used way.
module tb_hmtlb_slave;
  localparam int N = 4, VPN_W = 19, RPN_W = 19, W = 2;
  logic clk = 0, rst_n = 0;
  logic [VPN_W-1:0] lk_vpn = '0, ins_vpn = '0, wr_vpn = '0;
  logic lk_hit, ins_dup, wr_en = 0, wr_valid = 0;
  logic [W-1:0] lk_way, ins_way, wr_way = '0;
  logic [RPN_W-1:0] lk_rpn, wr_rpn = '0;
  bit sval[N];
  logic [VPN_W-1:0] svpn[N];
  logic [RPN_W-1:0] srpn[N];
  int order[$];
  int checks = 0, failures = 0, n_hit = 0, n_dup = 0, n_lru = 0;

  always #5 clk = ~clk;

  hmtlb_slave #(.ENTRIES(N), .VPN_W(VPN_W), .RPN_W(RPN_W)) dut (
    .clk, .rst_n, .lk_vpn, .lk_hit, .lk_way, .lk_rpn, .ins_vpn, .ins_way,
    .ins_dup, .wr_en, .wr_way, .wr_valid, .wr_vpn, .wr_rpn);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [VPN_W-1:0] pool_vpn();
    return VPN_W'($urandom_range(0, 9) * 977);
  endfunction

  initial begin
    int ew, dw;
    bit eh;
    for (int w = N - 1; w >= 0; w--) order.push_back(w);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 6000; it++) begin
      @(negedge clk);
      lk_vpn  = pool_vpn();
      ins_vpn = pool_vpn();
      #1;
      // expected lookup
      eh = 0; ew = 0;
      for (int w = 0; w < N; w++) if (sval[w] && svpn[w] == lk_vpn) begin eh = 1; ew = w; end
      chk(lk_hit == eh, "lookup hit");
      if (eh) begin
        n_hit++;
        chk(int'(lk_way) == ew && lk_rpn == srpn[ew], "lookup way and real page");
      end
      // expected insertion way
      dw = -1;
      for (int w = 0; w < N; w++) if (sval[w] && svpn[w] == ins_vpn) dw = w;
      chk(ins_dup == (dw >= 0), "duplicate flag");
      if (dw >= 0) n_dup++;
      if (dw < 0) for (int w = N - 1; w >= 0; w--) if (!sval[w]) dw = w;
      if (dw < 0) begin dw = order[$]; n_lru++; end
      chk(int'(ins_way) == dw, "insertion way");
      // a write, sometimes to the suggested insertion way
      wr_en    = ($urandom_range(0, 1) == 0);
      wr_way   = ($urandom_range(0, 1) == 0) ? ins_way : W'($urandom);
      wr_valid = ($urandom_range(0, 7) != 0);
      wr_vpn   = ins_vpn;
      wr_rpn   = RPN_W'($urandom);
      // never store a page twice: write it only where it already is, or
      // make the write an emptying one
      for (int w = 0; w < N; w++)
        if (sval[w] && svpn[w] == wr_vpn && w != int'(wr_way)) wr_valid = 0;
      @(posedge clk);
      if (wr_en) begin
        sval[wr_way] = wr_valid; svpn[wr_way] = wr_vpn; srpn[wr_way] = wr_rpn;
        if (wr_valid) begin
          foreach (order[i]) if (order[i] == int'(wr_way)) begin order.delete(i); break; end
          order.push_front(int'(wr_way));
        end
      end
    end
    chk(n_hit > 0 && n_dup > 0 && n_lru > 0, "hits, duplicates and LRU choices all seen");
    $display("hits %0d duplicates %0d lru choices %0d", n_hit, n_dup, n_lru);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
