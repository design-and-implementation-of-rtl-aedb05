// Shared constants and types of the LEOPARD time-predictable memory subsystem.
// The core count, cache geometries and the MaxL bus hold time follow the
// processor description; the line-granular bus bundle is this design's own
// simplification of the AMBA AHB transfers (one request, one response beat).
package leopard_pkg;
  localparam int unsigned NCORES    = 4;
  localparam int unsigned AW        = 32;

  // Request a core puts on the shared bus after an L1 miss or a DL1 write.
  typedef struct packed {
    logic          we;     // 1: word write-through, 0: 32-byte read
    logic [AW-1:0] addr;   // physical address
    logic [31:0]   wdata;
    logic [3:0]    wstrb;
  } bus_req_t;

  // Arbitration policy of the shared bus.
  typedef enum logic [0:0] {ARB_RR = 1'b0, ARB_CBA = 1'b1} arb_mode_e;

  // Switches of the time-predictability features. With all of them off the
  // subsystem behaves like the baseline (modulo placement, FIFO TLB refill,
  // early FP termination, round-robin bus, shared L2 ways, DRAM-timed memory).
  typedef struct packed {
    logic              rm_en;         // random modulo placement in IL1/DL1
    logic              tlb_rnd_en;    // random TLB replacement
    logic              no_spec_miss;  // no cache miss under branch speculation
    logic              fpu_wc;        // FDIVD/FSQRTD always at worst latency
    arb_mode_e         arb_mode;      // round-robin or credit-based random permutations
    logic              tc_mode;       // emulate worst-case contenders on the bus
    logic [NCORES-1:0] tc_mask;       // cores emulated as contenders in TC mode
    logic              l2_part_en;    // one L2 way per core
    logic              l2_hrp_en;     // hash-based random placement in the L2
    logic              mem_const_en;  // constant memory latency per request type
  } cfg_t;
endpackage
