// hmtlb_pkg: shared constants and types of the hybrid mapped TLB.
//
// The hybrid mapped TLB pairs a large direct-mapped "master" TLB with a
// small fully-associative "slave" TLB that holds only entries displaced
// from the master. The defaults below are the configuration the design is
// sized for: a 128-entry master, a 4-entry slave and 8 KB pages. The
// 32-bit virtual and real addresses, the 5-bit register identifier and
// the 13-bit load/store offset follow a SPARC-style load/store format and
// are this design's choice.
package hmtlb_pkg;

  // Default sizes.
  localparam int unsigned VA_W_DEF           = 32;   // virtual address bits
  localparam int unsigned PA_W_DEF           = 32;   // real address bits
  localparam int unsigned PAGE_BITS_DEF      = 13;   // 8 KB pages
  localparam int unsigned MASTER_ENTRIES_DEF = 128;  // direct-mapped master TLB
  localparam int unsigned SLAVE_ENTRIES_DEF  = 4;    // fully-associative slave TLB
  localparam int unsigned REG_W_DEF          = 5;    // base register identifier bits
  localparam int unsigned OFF_W_DEF          = 13;   // signed load/store offset bits

  // How the master TLB is indexed.
  //   IDX_VPN : low bits of the virtual page number
  //   IDX_LS  : a hash of the load/store instruction's base register
  //             identifier and offset, available before the address add
  typedef enum logic {
    IDX_VPN = 1'b0,
    IDX_LS  = 1'b1
  } index_mode_e;

  // Access sequencer states.
  //   ST_IDLE  : ready; a new access reads the master TLB this cycle
  //   ST_SLAVE : master missed; the slave TLB is searched (one stall cycle)
  //   ST_WALK  : both missed; waiting for the page table entry reload
  typedef enum logic [1:0] {
    ST_IDLE  = 2'd0,
    ST_SLAVE = 2'd1,
    ST_WALK  = 2'd2
  } ctrl_state_e;

endpackage
