// dcache_pkg: constants and types shared by the way-interleaved data cache.
//
// The cache geometry follows the L1 data cache of the Alpha 21364 class
// processor: 64 KB, 2-way set associative, 64-byte lines, a 2-cycle load hit.
// The data array is cut into subarrays by the Cacti-style parameters
// NDWL = 4 (wordline segments, i.e. subarray columns), NDBL = 2 (bitline
// segments) and NSPD = 1 (sets per wordline), giving NDBL/NSPD = 2 rows of
// 4 subarrays. The 8-byte word, the 32-bit address and the 8K-cycle decay
// interval default are also kept here. The address width and the controller
// state encoding are this design's own choices.
package dcache_pkg;

  parameter int unsigned CACHE_BYTES    = 65536;
  parameter int unsigned WAYS           = 2;
  parameter int unsigned LINE_BYTES     = 64;
  parameter int unsigned NDWL           = 4;
  parameter int unsigned NDBL           = 2;
  parameter int unsigned NSPD           = 1;
  parameter int unsigned WORD_BYTES     = 8;
  parameter int unsigned ADDR_W         = 32;
  parameter int unsigned DECAY_INTERVAL = 8192;

  // Tag array organisation (Ntbl x Ntwl tag subarrays).
  parameter int unsigned NTBL = 2;
  parameter int unsigned NTWL = 2;

  // Cache controller states.
  typedef enum logic [2:0] {
    ST_IDLE,    // waiting for a request
    ST_LOOKUP,  // arrays read, tag compare in progress
    ST_WT,      // forwarding a store to the next level (write-through)
    ST_MREQ,    // sending a line read to the next level
    ST_MWAIT    // waiting for the refill line
  } ctrl_state_e;

endpackage
