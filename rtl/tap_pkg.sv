// tap_pkg: constants and helper functions shared by the thermally protected
// instruction cache.
//
// The cache geometry defaults are the 64 KB, 2-way, 64-byte-line, 2-cycle L1
// instruction cache of a 21364-class core, fetching four 32-bit instructions
// (16 bytes) per cycle. The protection defaults are the ones the design is
// tuned with: a block access threshold of 90,000 accesses per time slice of
// 100,000 cycles, a heavy access threshold Hth of 5 consecutive heavy slices,
// and an aggressiveness factor alpha of 2, giving a cooling time of
// alpha * Hth * Tslice = 1,000,000 cycles.
//
// Subarray mapping (this design's own choice, as the exact partition of the
// arrays is not given): a data subarray (IBA) holds one 16-byte fetch chunk of
// every set of one way, so IBA index = way * CHUNKS + chunk. The tag array of
// each way is cut by bit columns into ITA_PER_WAY tag subarrays (ITA), each
// holding one slice of the tag bits of every set, all read together, so ITA
// index = way * ITA_PER_WAY + slice. With these defaults there are 8 IBAs and
// 4 ITAs, as in the modelled floorplan, and a code loop whose fetches all fall
// on chunk 0 of way 0 heats IBA0 together with ITA0 and ITA1.
package tap_pkg;

  // Cache geometry defaults.
  localparam int unsigned CACHE_BYTES  = 65536;
  localparam int unsigned WAYS         = 2;
  localparam int unsigned LINE_BYTES   = 64;
  localparam int unsigned FETCH_BYTES  = 16;   // 4 instructions x 4 bytes
  localparam int unsigned ADDR_W       = 32;
  localparam int unsigned ITA_PER_WAY  = 2;

  localparam int unsigned SETS         = CACHE_BYTES / (WAYS * LINE_BYTES);   // 512
  localparam int unsigned CHUNKS       = LINE_BYTES / FETCH_BYTES;            // 4
  localparam int unsigned NUM_IBA      = WAYS * CHUNKS;                       // 8
  localparam int unsigned NUM_ITA      = WAYS * ITA_PER_WAY;                  // 4
  localparam int unsigned NUM_BLK      = NUM_IBA + NUM_ITA;                   // 12

  // Protection defaults.
  localparam int unsigned T_SLICE      = 100000;
  localparam int unsigned BLOCK_TH     = 90000;
  localparam int unsigned H_TH         = 5;
  localparam int unsigned ALPHA        = 2;

  // Index of the data subarray that holds chunk `chunk` of way `way`.
  function automatic int unsigned iba_index(int unsigned way, int unsigned chunk,
                                            int unsigned chunks);
    return way * chunks + chunk;
  endfunction

  // Index of the tag subarray that holds tag slice `slice` of way `way`.
  function automatic int unsigned ita_index(int unsigned way, int unsigned slice,
                                            int unsigned ita_per_way);
    return way * ita_per_way + slice;
  endfunction

endpackage
