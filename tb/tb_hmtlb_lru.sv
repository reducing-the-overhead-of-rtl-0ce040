// tb_hmtlb_lru: random touches of the 4-way LRU tracker against a recency
// list (most recent first); lru_way must always be the list's last way.
module tb_hmtlb_lru;
  localparam int N = 4, W = 2;
  logic clk = 0, rst_n = 0, touch_en = 0;
  logic [W-1:0] touch_way = '0, lru_way;
  int order[$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hmtlb_lru #(.N(N)) dut (.clk, .rst_n, .touch_en, .touch_way, .lru_way);

  initial begin
    for (int w = N - 1; w >= 0; w--) order.push_back(w);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      checks++;
      if (int'(lru_way) != order[$]) begin
        failures++;
        $display("FAIL lru=%0d exp=%0d at %0t", lru_way, order[$], $time);
      end
      touch_en  = ($urandom_range(0, 3) != 0);
      touch_way = W'($urandom);
      @(posedge clk);
      if (touch_en) begin
        foreach (order[i]) if (order[i] == int'(touch_way)) begin order.delete(i); break; end
        order.push_front(int'(touch_way));
      end
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
