// dcache_pkg: shared geometry, types and constants of the variation-aware
// L1 data cache.
//
// The default geometry is the one the design targets: 64 KB, 4-way set
// associative, 64-byte lines, hence 256 sets. The second pipe stage of a
// read can be stretched by 0..3 extra cycles, so a latency code is 2 bits
// and the latency table holds 256 x 2 = 512 bits. Lines are reshuffled
// among 2^3 = 8 consecutive sets of the same way (reshuffling degree 3).
// The 32-bit byte address and the 64-bit data word are this design's own
// choice (an Alpha-like core is assumed).
package dcache_pkg;

  parameter int unsigned ADDR_W      = 32;   // byte address width
  parameter int unsigned WORD_W      = 64;   // data word width
  parameter int unsigned LINE_BYTES  = 64;   // cache line size
  parameter int unsigned WAYS        = 4;    // associativity
  parameter int unsigned SETS        = 256;  // 64 KB / (4 ways * 64 B)
  parameter int unsigned LAT_W       = 2;    // latency code width
  parameter int unsigned R_DEG       = 3;    // reshuffling degree r

  parameter int unsigned WORDS_PER_LINE = LINE_BYTES / (WORD_W / 8);  // 8
  parameter int unsigned MAX_EXTRA     = (1 << LAT_W) - 1;            // 3

  // Latency code of one line or set: extra cycles of the second stage.
  typedef logic [LAT_W-1:0] lat_t;

  // Data word.
  typedef logic [WORD_W-1:0] word_t;

  // Request from the load/store unit.
  typedef struct packed {
    logic              we;     // 1 = store, 0 = load
    logic [ADDR_W-1:0] addr;   // byte address (word aligned)
    word_t             wdata;  // store data
  } dc_req_t;

  // Response to the load/store unit.
  typedef struct packed {
    logic  we;       // echo of the request type
    logic  hit;      // the access hit in the cache
    lat_t  lat;      // extra second-stage cycles this access took
    word_t rdata;    // load data
  } dc_resp_t;

endpackage
