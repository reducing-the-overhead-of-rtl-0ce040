// tb_hmtlb_master: writes random entries into the direct-mapped master TLB
// and looks up random (index, page) pairs, some matching a stored entry and
// some not, comparing valid, stored page numbers and hit with a shadow
// array. Also checks that reset empties every entry and that a lookup is
// answered in the same cycle (combinational read).
module tb_hmtlb_master;
  localparam int N = 128, VPN_W = 19, RPN_W = 19, IDX_W = 7;
  logic clk = 0, rst_n = 0;
  logic [IDX_W-1:0] rd_idx = '0, wr_idx = '0;
  logic [VPN_W-1:0] cmp_vpn = '0, rd_vpn, wr_vpn = '0;
  logic [RPN_W-1:0] rd_rpn, wr_rpn = '0;
  logic rd_valid, hit, wr_en = 0;
  bit              sval[N];
  logic [VPN_W-1:0] svpn[N];
  logic [RPN_W-1:0] srpn[N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hmtlb_master #(.ENTRIES(N), .VPN_W(VPN_W), .RPN_W(RPN_W)) dut (
    .clk, .rst_n, .rd_idx, .cmp_vpn, .rd_valid, .rd_vpn, .rd_rpn, .hit,
    .wr_en, .wr_idx, .wr_vpn, .wr_rpn);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s idx=%0d at %0t", what, rd_idx, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      rd_idx = IDX_W'(i); #1;
      chk(!rd_valid && !hit, "empty after reset");
    end
    for (int it = 0; it < 5000; it++) begin
      @(negedge clk);
      // write
      wr_en = ($urandom_range(0, 2) == 0);
      wr_idx = IDX_W'($urandom);
      wr_vpn = VPN_W'($urandom);
      wr_rpn = RPN_W'($urandom);
      // lookup, before the write takes effect
      rd_idx = IDX_W'($urandom);
      cmp_vpn = ($urandom_range(0, 1) && sval[rd_idx]) ? svpn[rd_idx] : VPN_W'($urandom);
      #1;
      chk(rd_valid == sval[rd_idx], "valid");
      if (sval[rd_idx]) begin
        chk(rd_vpn == svpn[rd_idx] && rd_rpn == srpn[rd_idx], "stored pair");
        chk(hit == (svpn[rd_idx] == cmp_vpn), "hit compare");
      end else chk(!hit, "no hit on empty entry");
      @(posedge clk);
      if (wr_en) begin sval[wr_idx] = 1; svpn[wr_idx] = wr_vpn; srpn[wr_idx] = wr_rpn; end
    end
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
