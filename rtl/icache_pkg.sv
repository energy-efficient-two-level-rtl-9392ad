// icache_pkg: constants and types shared by the two-level instruction cache.
//
// The cache moves whole 16-byte lines (128 bits) between the cores, the private
// L1 caches and the shared L1.5 banks, and refills the L1.5 from L2 over a
// 64-bit AXI4 read channel. Addresses are 32-bit byte addresses. The widths
// follow the cluster the design was made for; the AXI encodings are the
// standard AXI4 ones.
package icache_pkg;

  // AXI4 burst type and size encodings
  localparam logic [1:0] AXI_BURST_INCR = 2'b01;
  localparam logic [1:0] AXI_RESP_OKAY  = 2'b00;

  // States of the private cache controller
  typedef enum logic [1:0] {
    PRI_RUN,          // serving hits, one tag check per cycle
    PRI_REFILL_REQ,   // miss: asking the L1.5 for the line
    PRI_REFILL_WAIT   // waiting for the line from the L1.5
  } pri_state_e;

  // States of a pending-refill slot in a shared bank
  typedef enum logic [1:0] {
    MSHR_FREE,        // slot unused
    MSHR_ISSUE,       // refill request not yet accepted by the bus
    MSHR_WAIT,        // collecting read beats from L2
    MSHR_DONE         // line complete, waiting to be written and returned
  } mshr_state_e;

endpackage
