// ipf_pkg: types and constants shared by the instruction-prefetching front end.
//
// The fetch side modelled here has three prefetch modes: none, the loop-directed
// Next-N-Line hardware prefetcher, and compiler-inserted (WCET-oriented) software
// prefetches carried in a 4-bit field of each instruction. Instructions are 32-bit
// words, so the sequential successor of PC is PC+4. The event record is a set of
// one-cycle pulses a system can count to see which mechanism acted.
package ipf_pkg;

  // Width of instruction words and of instruction addresses (design choice).
  localparam int unsigned INSTR_W     = 32;
  localparam int unsigned INSTR_BYTES = INSTR_W / 8;

  // Which prefetcher feeds the instruction cache.
  typedef enum logic [1:0] {
    PF_OFF  = 2'd0,   // no prefetching (base scheme)
    PF_LOOP = 2'd1,   // loop-directed Next-N-Line hardware prefetcher
    PF_WCET = 2'd2    // software prefetch field decoded from executed instructions
  } pf_mode_e;

  // One-cycle event pulses reported by the instruction cache.
  typedef struct packed {
    logic demand_hit;    // fetch found its line in the cache
    logic demand_miss;   // fetch missed
    logic miss_merge;    // missed fetch waits on a prefetch fill already in flight
    logic fill_bypass;   // fetch served from the line arriving from memory this cycle
    logic pf_fill;       // prefetch started a line fill
    logic pf_drop;       // prefetch discarded: line present or already being fetched
  } icache_ev_t;

  // One-cycle event pulses reported by the whole front end.
  typedef struct packed {
    icache_ev_t cache;
    logic       loop_redirect;  // prefetch run started at a loop header
    logic       seq_trigger;    // prefetch run started at the next sequential line
    logic       sw_prefetch;    // non-zero prefetch field decoded
    logic       sw_overwrite;   // pending software prefetch replaced by a newer one
  } ipf_ev_t;

endpackage
