// tb_hmtlb_ctrl: directed sequences through the access sequencer: a master
// hit (done in the request cycle, no stall), a master miss with slave hit
// (one stall cycle, swap writes), and a miss in both with reload latencies
// of 0..3 cycles, with and without a valid displaced master entry. Every
// output is compared with the value the sequence requires in each cycle.
module tb_hmtlb_ctrl;
  import hmtlb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, m_hit = 0, m_rd_valid = 0, s_hit = 0, walk_ack = 0;
  ctrl_state_e state;
  logic req_ready, accept, stall, resp_valid, m_we, s_we, s_swap, walk_req;
  logic ev_master_hit, ev_slave_hit, ev_miss;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hmtlb_ctrl dut (.*);

  // expected outputs, packed:
  // {req_ready, accept, stall, resp_valid, m_we, s_we, s_swap, walk_req,
  //  ev_master_hit, ev_slave_hit, ev_miss}
  task automatic expect_out(logic [10:0] e, string what);
    logic [10:0] got;
    #1;
    got = {req_ready, accept, stall, resp_valid, m_we, s_we, s_swap, walk_req,
           ev_master_hit, ev_slave_hit, ev_miss};
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: got %b exp %b at %0t", what, got, e, $time);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_out(11'b10000000000, "idle, no request");
    // master hit
    req_valid = 1; m_hit = 1;
    expect_out(11'b10010000100, "master hit completes at once");
    @(negedge clk);
    // master miss, slave hit
    m_hit = 0; m_rd_valid = 1;
    expect_out(11'b11100000000, "master miss: accept and stall");
    @(negedge clk);
    s_hit = 1;
    expect_out(11'b00011110010, "slave hit after one stall cycle: swap");
    @(negedge clk);
    s_hit = 0;
    // misses in both, reload latency L
    for (int L = 0; L < 4; L++) begin
      m_rd_valid = L[0];
      expect_out(11'b11100000000, "master miss");
      @(negedge clk);
      expect_out(11'b00100000001, "slave miss: start reload");
      @(negedge clk);
      for (int c = 0; c < L; c++) begin
        expect_out(11'b00100001000, "waiting for reload");
        @(negedge clk);
      end
      walk_ack = 1;
      expect_out({4'b0001, 1'b1, L[0], 1'b0, 1'b1, 3'b000}, "reload done");
      @(negedge clk);
      walk_ack = 0;
    end
    req_valid = 0;
    expect_out(11'b10000000000, "back to idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
