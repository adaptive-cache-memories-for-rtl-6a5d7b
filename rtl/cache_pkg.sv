// Shared types and constants of the adaptive load/store domain.
//
// The cache is eight-way set associative and split by MRU position into a
// fast A partition and a slow B partition. Four configurations D0..D3 give
// A = 1, 2, 4 or 8 ways; the L1 DCache and the L2 cache always change
// configuration together, and the load/store clock changes with them.
// The frequencies and the A/B latencies (in load/store cycles) below are
// the published figures of the design. Everything else here (line size,
// address width, counter and cost widths) is a choice of this RTL.
//
// COST(cfg, term) is the time, in picoseconds, that one reference of a given
// accounting class costs under configuration cfg. It is what the controller
// multiplies the accounting counts with:
//   term 0..7    L1 hit at MRU position p : L1 A or B latency x period
//   term 8       L1 miss                  : L1 miss-detect latency x period
//   term 9..16   L2 hit at MRU position p : L2 A or B latency x period
//   term 17      L2 miss                  : L2 miss-detect latency x period
//                                           plus the main-memory latency
// with period_ps = 1_000_000 / f_MHz (integer division). A miss is known
// once the last partition holding ways has been probed, so the
// miss-detect latency is the B latency, or the A latency in D3 where B is
// empty.
package cache_pkg;

  localparam int unsigned WAYS     = 8;
  localparam int unsigned POS_W    = 3;            // bits of an MRU position
  localparam int unsigned NUM_CFG  = 4;            // D0..D3
  localparam int unsigned NTHREADS = 4;
  localparam int unsigned TID_W    = 2;
  localparam int unsigned NTERMS   = 2 * (WAYS + 1);

  localparam int unsigned PADDR_W  = 40;           // physical byte address

  typedef logic [1:0] cfg_t;                       // 0 = D0 ... 3 = D3
  typedef logic [POS_W-1:0] pos_t;

  // A load or store as it leaves the load/store queue: 64-bit word, byte
  // enables, issuing thread.
  typedef struct packed {
    logic               we;
    logic [PADDR_W-1:0] addr;
    logic [63:0]        wdata;
    logic [7:0]         be;
    logic [TID_W-1:0]   tid;
  } mem_req_t;

  // Ways in the A partition for D0..D3 (1/7, 2/6, 4/4, 8/0 split).
  localparam int unsigned A_WAYS   [NUM_CFG] = '{1, 2, 4, 8};
  // Load/store domain frequency in MHz for D0..D3.
  localparam int unsigned FREQ_MHZ [NUM_CFG] = '{1590, 1000, 760, 440};
  // A / B partition access latencies in load/store cycles. D3 has no B
  // partition; its B entry repeats the A latency and is never used for a hit.
  localparam int unsigned L1_LAT_A [NUM_CFG] = '{2, 2, 2, 2};
  localparam int unsigned L1_LAT_B [NUM_CFG] = '{7, 5, 2, 2};
  localparam int unsigned L2_LAT_A [NUM_CFG] = '{12, 12, 12, 12};
  localparam int unsigned L2_LAT_B [NUM_CFG] = '{42, 27, 12, 12};
  // Main memory first-access latency, fixed-frequency domain.
  localparam int unsigned MEM_PS   = 80000;

  // Interval between reconfiguration decisions, committed instructions.
  localparam int unsigned INTERVAL = 15000;

  localparam int unsigned COST_W   = 32;           // one partial product per bit

  function automatic int unsigned period_ps(input int unsigned c);
    return 1000000 / FREQ_MHZ[c];
  endfunction

  function automatic int unsigned miss_lat(input int unsigned lat_a,
                                           input int unsigned lat_b,
                                           input int unsigned c);
    return (A_WAYS[c] == WAYS) ? lat_a : lat_b;
  endfunction

  function automatic int unsigned cost(input int unsigned c, input int unsigned t);
    int unsigned lat;
    if (t < WAYS)
      lat = (t < A_WAYS[c]) ? L1_LAT_A[c] : L1_LAT_B[c];
    else if (t == WAYS)
      lat = miss_lat(L1_LAT_A[c], L1_LAT_B[c], c);
    else if (t < 2 * WAYS + 1)
      lat = ((t - WAYS - 1) < A_WAYS[c]) ? L2_LAT_A[c] : L2_LAT_B[c];
    else
      lat = miss_lat(L2_LAT_A[c], L2_LAT_B[c], c);
    return lat * period_ps(c) + ((t == NTERMS - 1) ? MEM_PS : 0);
  endfunction

endpackage
