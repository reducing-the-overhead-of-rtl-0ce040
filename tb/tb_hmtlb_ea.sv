// tb_hmtlb_ea: checks the effective address add (base + sign-extended
// offset) on corner cases and random operands against a 64-bit reference.
module tb_hmtlb_ea;
  localparam int VA_W = 32, OFF_W = 13;
  logic [VA_W-1:0] base, va;
  logic [OFF_W-1:0] off;
  int checks = 0, failures = 0;

  hmtlb_ea dut (.base, .off, .va);

  task automatic one(longint unsigned b, int signed o);
    longint signed exp;
    base = VA_W'(b);
    off  = OFF_W'(o);
    #1;
    exp = longint'(b) + longint'(o);
    checks++;
    if (va !== VA_W'(exp)) begin
      failures++;
      $display("FAIL base=%h off=%0d va=%h exp=%h", base, o, va, VA_W'(exp));
    end
  endtask

  initial begin
    one(32'h0000_1000, -1);
    one(32'h0000_0000, -4096);
    one(32'hffff_ffff, 1);
    one(32'h1234_5678, 4095);
    one(32'h8000_0000, -4096);
    for (int i = 0; i < 2000; i++)
      one($urandom, $urandom_range(0, 8191) - 4096);
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
