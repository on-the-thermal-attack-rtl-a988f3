// protected_icache: instruction cache with subarray-level thermal protection.
//
// Code that keeps one cache subarray busy every cycle (for example a loop of
// many small basic blocks, each a nop and a branch, all aligned to the same
// fetch chunk) can overheat that subarray while the back end, where thermal
// sensors usually sit, stays cool. This top joins the subarray-partitioned
// instruction cache (icache) with the protection logic (thermal_guard): every
// enable of a data subarray (IBA) or tag subarray (ITA) is counted, and when
// one subarray has been accessed more than BLOCK_TH times in each of H_TH
// consecutive time slices of T_SLICE cycles, the cache stops accepting fetch
// requests for ALPHA * H_TH time slices, then resumes.
//
// Interface: the fetch request/response and refill ports are those of icache;
// `fetch_stop` shows when fetch is stopped for cooling (req_ready is then
// low), `hot` which subarrays triggered it (IBAs 0..NUM_IBA-1, then ITAs), and
// `heavy_cnt` the heavy access counter of every subarray. `mispredict` and
// `miss` are the cache's event pulses, `slice_end` and `clear_heavy` those of
// the guard. Timing: hits return two cycles after acceptance; a request
// already in the cache when fetch stops is still completed.
//
// The protection technique and its default numbers follow the described
// design; how the cache is cut into subarrays and how it is accessed are this
// design's own choices, explained in tap_pkg and icache.
module protected_icache #(
  parameter int unsigned CACHE_BYTES = tap_pkg::CACHE_BYTES,
  parameter int unsigned WAYS        = tap_pkg::WAYS,
  parameter int unsigned LINE_BYTES  = tap_pkg::LINE_BYTES,
  parameter int unsigned FETCH_BYTES = tap_pkg::FETCH_BYTES,
  parameter int unsigned ADDR_W      = tap_pkg::ADDR_W,
  parameter int unsigned ITA_PER_WAY = tap_pkg::ITA_PER_WAY,
  parameter int unsigned T_SLICE     = tap_pkg::T_SLICE,
  parameter int unsigned BLOCK_TH    = tap_pkg::BLOCK_TH,
  parameter int unsigned H_TH        = tap_pkg::H_TH,
  parameter int unsigned ALPHA       = tap_pkg::ALPHA,
  localparam int unsigned NUM_BLK = WAYS * (LINE_BYTES / FETCH_BYTES) + WAYS * ITA_PER_WAY,
  localparam int unsigned FW      = FETCH_BYTES * 8,
  localparam int unsigned HVY_W   = $clog2(H_TH + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req_valid,
  output logic               req_ready,
  input  logic [ADDR_W-1:0]  req_addr,
  output logic               resp_valid,
  output logic [ADDR_W-1:0]  resp_addr,
  output logic [FW-1:0]      resp_data,
  output logic               refill_req_valid,
  input  logic               refill_req_ready,
  output logic [ADDR_W-1:0]  refill_req_addr,
  input  logic               refill_valid,
  input  logic [FW-1:0]      refill_data,
  output logic               fetch_stop,
  output logic [NUM_BLK-1:0] hot,
  output logic [HVY_W-1:0]   heavy_cnt [NUM_BLK],
  output logic [NUM_BLK-1:0] access,
  output logic               mispredict,
  output logic               miss,
  output logic               slice_end,
  output logic               clear_heavy
);

  icache #(
    .CACHE_BYTES(CACHE_BYTES), .WAYS(WAYS), .LINE_BYTES(LINE_BYTES),
    .FETCH_BYTES(FETCH_BYTES), .ADDR_W(ADDR_W), .ITA_PER_WAY(ITA_PER_WAY)
  ) u_icache (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_addr,
    .fetch_stall (fetch_stop),
    .resp_valid, .resp_addr, .resp_data,
    .refill_req_valid, .refill_req_ready, .refill_req_addr,
    .refill_valid, .refill_data,
    .access, .mispredict, .miss
  );

  thermal_guard #(
    .NUM_BLK(NUM_BLK), .T_SLICE(T_SLICE), .BLOCK_TH(BLOCK_TH),
    .H_TH(H_TH), .ALPHA(ALPHA)
  ) u_guard (
    .clk, .rst_n,
    .access,
    .fetch_stop, .hot, .slice_end, .clear_heavy, .heavy_cnt
  );

endmodule
