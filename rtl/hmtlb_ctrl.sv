// hmtlb_ctrl: access sequencer of the hybrid mapped TLB.
//
// One load/store translation at a time, in three states:
//   ST_IDLE  : a request (req_valid) reads the master TLB and starts the
//              data cache access with the master's real page number in the
//              same cycle. On a master hit (m_hit) the access completes
//              with no stall (resp_valid). On a master miss the request is
//              latched (accept) and stall is raised.
//   ST_SLAVE : the one stall cycle of a master miss. On a slave hit (s_hit)
//              the cache access is restarted with the slave's real page
//              number and the access completes; the slave entry moves into
//              the master and the master entry it displaces moves into the
//              slave way just vacated (m_we, s_we with s_swap=1). On a slave
//              miss the page table reload is started.
//   ST_WALK  : walk_req is held high until walk_ack. In the walk_ack cycle
//              the reloaded entry is written into the master, the displaced
//              master entry (if it was valid, m_rd_valid) is inserted into
//              the slave (s_we with s_swap=0), and the access completes.
// stall is high in every cycle of an access except the one that completes
// it, so a master hit costs 0 stall cycles, a slave hit 1 and a miss in both
// 2 plus the reload latency. req_ready is high in ST_IDLE only. The event
// outputs pulse once per access with its outcome.
//
// The zero-cycle master hit, the one-cycle slave hit penalty, the stall and
// the reload on a double miss follow the design description; moving entries
// between the two tables by swapping, and the reload handshake, are this
// design's choices.
module hmtlb_ctrl (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   req_valid,
  input  logic                   m_hit,
  input  logic                   m_rd_valid,
  input  logic                   s_hit,
  input  logic                   walk_ack,
  output hmtlb_pkg::ctrl_state_e state,
  output logic                   req_ready,
  output logic                   accept,
  output logic                   stall,
  output logic                   resp_valid,
  output logic                   m_we,
  output logic                   s_we,
  output logic                   s_swap,
  output logic                   walk_req,
  output logic                   ev_master_hit,
  output logic                   ev_slave_hit,
  output logic                   ev_miss
);

  import hmtlb_pkg::*;

  ctrl_state_e state_q, state_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= ST_IDLE;
    else        state_q <= state_d;
  end

  always_comb begin
    state_d       = state_q;
    req_ready     = 1'b0;
    accept        = 1'b0;
    stall         = 1'b0;
    resp_valid    = 1'b0;
    m_we          = 1'b0;
    s_we          = 1'b0;
    s_swap        = 1'b0;
    walk_req      = 1'b0;
    ev_master_hit = 1'b0;
    ev_slave_hit  = 1'b0;
    ev_miss       = 1'b0;
    unique case (state_q)
      ST_IDLE: begin
        req_ready = 1'b1;
        if (req_valid) begin
          if (m_hit) begin
            resp_valid    = 1'b1;
            ev_master_hit = 1'b1;
          end else begin
            accept  = 1'b1;
            stall   = 1'b1;
            state_d = ST_SLAVE;
          end
        end
      end
      ST_SLAVE: begin
        if (s_hit) begin
          resp_valid   = 1'b1;
          m_we         = 1'b1;
          s_we         = 1'b1;
          s_swap       = 1'b1;
          ev_slave_hit = 1'b1;
          state_d      = ST_IDLE;
        end else begin
          stall   = 1'b1;
          ev_miss = 1'b1;
          state_d = ST_WALK;
        end
      end
      ST_WALK: begin
        walk_req = 1'b1;
        if (walk_ack) begin
          resp_valid = 1'b1;
          m_we       = 1'b1;
          s_we       = m_rd_valid;
          state_d    = ST_IDLE;
        end else begin
          stall = 1'b1;
        end
      end
      default: state_d = ST_IDLE;
    endcase
  end

  assign state = state_q;

endmodule
