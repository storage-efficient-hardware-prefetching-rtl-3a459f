// dcpt_pkg: shared constants and helpers of the Delta Correlating Prediction
// Table (DCPT) prefetcher.
//
// The default sizes are the configuration the prefetcher is built for: a
// 98-entry table, each entry keeping 19 deltas of 12 bits, and a buffer of at
// most 32 prefetches that have been issued but not completed. The widths of a
// load PC and of a cache line address are not fixed by the algorithm; 32 bits
// each is this design's choice. All addresses handled by the prefetcher are
// cache line addresses, so a delta of 1 means "the next line".
package dcpt_pkg;

  parameter int unsigned DCPT_PC_W          = 32;  // load PC width (design choice)
  parameter int unsigned DCPT_ADDR_W        = 32;  // line address width (design choice)
  parameter int unsigned DCPT_DELTA_W       = 12;  // bits per stored delta
  parameter int unsigned DCPT_N_DELTAS      = 19;  // deltas per table entry
  parameter int unsigned DCPT_TABLE_ENTRIES = 98;  // table entries
  parameter int unsigned DCPT_PFQ_ENTRIES   = 32;  // in-flight prefetch buffer

  // Why a candidate leaves the issue stage.
  typedef enum logic [2:0] {
    PF_NONE       = 3'd0,  // no candidate this cycle
    PF_ISSUED     = 3'd1,  // sent to memory
    PF_IN_CACHE   = 3'd2,  // line already cached
    PF_IN_MSHR    = 3'd3,  // demand miss already outstanding
    PF_IN_FLIGHT  = 3'd4,  // same prefetch already outstanding
    PF_QUEUE_FULL = 3'd5,  // in-flight buffer full: dropped
    PF_STALL      = 3'd6   // waiting for the memory side to accept
  } pf_outcome_e;

endpackage
