// tb_hmtlb_index: checks both master index modes. IDX_VPN must give the low
// index bits of the virtual page number; IDX_LS must give, for bit j, the
// parity of all bits k of {register identifier, offset} with k mod IDX_W == j
// (computed here bit by bit, independently of the chunked fold in the RTL).
module tb_hmtlb_index;
  import hmtlb_pkg::*;
  import hmtlb_tb_pkg::*;
  localparam int VPN_W = 19, IDX_W = 7, REG_W = 5, OFF_W = 13;
  logic [VPN_W-1:0] vpn;
  logic [REG_W-1:0] reg_id;
  logic [OFF_W-1:0] off;
  logic [IDX_W-1:0] idx_vpn, idx_ls;
  int checks = 0, failures = 0;

  hmtlb_index #(.MODE(IDX_VPN)) u_vpn (.vpn, .reg_id, .off, .idx(idx_vpn));
  hmtlb_index #(.MODE(IDX_LS))  u_ls  (.vpn, .reg_id, .off, .idx(idx_ls));

  initial begin
    for (int i = 0; i < 3000; i++) begin
      vpn    = VPN_W'($urandom);
      reg_id = REG_W'($urandom);
      off    = OFF_W'($urandom);
      #1;
      checks += 2;
      if (idx_vpn !== IDX_W'(vpn % (1 << IDX_W))) begin
        failures++;
        $display("FAIL vpn index vpn=%h idx=%h", vpn, idx_vpn);
      end
      if (int'(idx_ls) != ls_index(reg_id, off, REG_W, OFF_W, IDX_W)) begin
        failures++;
        $display("FAIL ls index reg=%0d off=%h idx=%h", reg_id, off, idx_ls);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
