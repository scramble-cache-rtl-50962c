// Shared constants and types of the Scramble Cache.
//
// The defaults describe the main configuration: a 32 KiB, 8-way L1 data
// cache with a history of 8 seeds and a seed refresh every 8192 accesses
// (all from the design description). The 64-byte line, 32-bit address and
// data words and the 8-bit process identifier are this design's own choices.
package scramble_pkg;

  localparam int unsigned ADDR_W_DEF       = 32;    // byte address width
  localparam int unsigned WORD_W_DEF       = 32;    // CPU data word width
  localparam int unsigned LINE_BYTES_DEF   = 64;    // bytes per cache line
  localparam int unsigned WAYS_DEF         = 8;     // N, lines per set
  localparam int unsigned SET_BITS_DEF     = 6;     // S, 2^S sets (32 KiB / 8 / 64 B)
  localparam int unsigned HIST_DEPTH_DEF   = 8;     // R, generations tracked
  localparam int unsigned REFRESH_DEF      = 8192;  // accesses between seed changes
  localparam int unsigned PID_W_DEF        = 8;     // process identifier width
  localparam int unsigned WBQ_DEPTH_DEF    = 4;     // write-back queue entries
  localparam int unsigned LFSR_W_DEF       = 32;    // PRNG state width

  // Seed width of pi_r: S bits of XOR key r0 plus floor(S/2) swap controls r1.
  function automatic int unsigned seed_width(int unsigned s);
    return s + ((s / 2 > 0) ? s / 2 : 1);
  endfunction

  // One-cycle pulses reporting what the cache did, for counters and tests.
  typedef struct packed {
    logic hit;          // request served from the current-generation location
    logic hist_hit;     // line found with an older seed and moved (Algorithm 1)
    logic hist_inplace; // older-seed location coincided with the new one
    logic miss;         // line fetched from memory
    logic evict_wb;     // dirty victim pushed to the write-back queue
    logic sweep_wb;     // dirty line of the expiring generation written back
    logic rekey;        // seed changed, generation counter advanced
    logic rekey_count;  // ... because the access interval elapsed
    logic rekey_pid;    // ... because the process identifier changed
    logic rekey_ext;    // ... because of an external request
    logic rekey_cycle;  // ... because the cycle interval elapsed
    logic wbq_stall;    // a push waited for a full write-back queue
  } cache_events_t;

endpackage
