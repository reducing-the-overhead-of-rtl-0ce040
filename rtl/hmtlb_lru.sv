// hmtlb_lru: least-recently-used tracker for the slave TLB.
//
// Each of N ways carries an age from 0 (most recent) to N-1 (least recent);
// the ages always form a permutation of 0..N-1. Touching a way makes its age
// 0 and ages by one every way that was younger than it. lru_way names the
// way of age N-1. After reset way i has age N-1-i, so way 0 is the first
// victim. One touch per clock; the update takes effect on the next cycle.
//
// LRU replacement of the slave TLB follows the design description; the
// age-counter implementation is this design's choice.
module hmtlb_lru #(
  parameter int unsigned N = hmtlb_pkg::SLAVE_ENTRIES_DEF,
  localparam int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         touch_en,
  input  logic [W-1:0] touch_way,
  output logic [W-1:0] lru_way
);

  logic [W-1:0] age_q [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N; i++) age_q[i] <= W'(N - 1 - i);
    end else if (touch_en) begin
      for (int unsigned i = 0; i < N; i++) begin
        if (W'(i) == touch_way)              age_q[i] <= '0;
        else if (age_q[i] < age_q[touch_way]) age_q[i] <= age_q[i] + 1'b1;
      end
    end
  end

  always_comb begin
    lru_way = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (age_q[i] == W'(N - 1)) lru_way = W'(i);
    end
  end

endmodule
