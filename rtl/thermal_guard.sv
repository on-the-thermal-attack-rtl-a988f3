// thermal_guard: hardware protection of the instruction cache against
// fine-grain localized hotspots (thermal attacks).
//
// Instead of placing a thermal sensor on every cache subarray, the cache
// controller keeps two counters per data subarray (IBA) and per tag subarray
// (ITA): a block access counter, counting the subarray's accesses in the
// current time slice, and a heavy access counter, counting consecutive slices
// in which the block access counter exceeded BLOCK_TH. When any heavy access
// counter reaches H_TH, fetch is stopped for ALPHA * H_TH time slices so that
// the subarray can cool; then all heavy access counters are cleared and fetch
// resumes.
//
// Structure: one slice_timer, one access_monitor per subarray (NUM_BLK of
// them, IBAs first, then ITAs) and one fetch_throttle. Interface: `access[i]`
// is high in each cycle subarray i is enabled; `fetch_stop` is high while
// fetch must not issue; `hot` marks the subarrays whose heavy access counter
// has reached H_TH; `slice_end` and `clear_heavy` are brought out for
// observation. Timing: see slice_timer, access_monitor and fetch_throttle;
// `fetch_stop` rises in the first cycle of the slice after the H_TH-th
// consecutive heavy slice and lasts ALPHA * H_TH * T_SLICE cycles.
//
// The counters, their thresholds and the cooling rule follow the described
// technique; the default numbers are the design's own. How heavy access
// counters behave while fetch is stopped is this design's choice (they hold).
module thermal_guard #(
  parameter int unsigned NUM_BLK  = tap_pkg::NUM_BLK,
  parameter int unsigned T_SLICE  = tap_pkg::T_SLICE,
  parameter int unsigned BLOCK_TH = tap_pkg::BLOCK_TH,
  parameter int unsigned H_TH     = tap_pkg::H_TH,
  parameter int unsigned ALPHA    = tap_pkg::ALPHA,
  localparam int unsigned BLK_W = $clog2(T_SLICE + 1),
  localparam int unsigned HVY_W = $clog2(H_TH + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NUM_BLK-1:0] access,
  output logic               fetch_stop,
  output logic [NUM_BLK-1:0] hot,
  output logic               slice_end,
  output logic               clear_heavy,
  output logic [HVY_W-1:0]   heavy_cnt [NUM_BLK]
);

  localparam int unsigned SL_W   = (T_SLICE > 1) ? $clog2(T_SLICE) : 1;
  localparam int unsigned COOL_W = $clog2(ALPHA * H_TH + 1);

  logic [SL_W-1:0]   cycle_in_slice;
  logic [BLK_W-1:0]  block_cnt [NUM_BLK];
  logic [COOL_W-1:0] cooling_slices;

  slice_timer #(.T_SLICE(T_SLICE)) u_timer (
    .clk, .rst_n, .slice_end, .cycle_in_slice
  );

  for (genvar i = 0; i < NUM_BLK; i++) begin : g_mon
    access_monitor #(
      .BLOCK_TH(BLOCK_TH), .H_TH(H_TH), .T_SLICE(T_SLICE)
    ) u_mon (
      .clk, .rst_n,
      .access      (access[i]),
      .slice_end,
      .hold        (fetch_stop),
      .clear_heavy,
      .block_cnt   (block_cnt[i]),
      .heavy_cnt   (heavy_cnt[i]),
      .heavy       (hot[i])
    );
  end

  fetch_throttle #(.H_TH(H_TH), .ALPHA(ALPHA)) u_throttle (
    .clk, .rst_n,
    .any_heavy   (|hot),
    .slice_end,
    .fetch_stop,
    .clear_heavy,
    .cooling_slices
  );

endmodule
