// access_monitor: block access counter and heavy access counter of one
// subarray, used as a virtual thermal sensor.
//
// Access frequency and temperature are strongly correlated, so counting the
// accesses to a subarray stands in for a temperature sensor on it. The block
// access counter counts the cycles with `access` high during the current time
// slice. On the last cycle of a slice (`slice_end`) the slice total, which
// includes an access in that same cycle, is compared with BLOCK_TH: if it
// exceeds BLOCK_TH the heavy access counter is incremented, otherwise the heavy
// access counter is reset to zero whatever its value. The block access counter
// is then cleared for the next slice. `heavy` is high once the heavy access
// counter has reached H_TH, that is after H_TH consecutive heavy slices.
//
// While `hold` is high (fetch is stopped for cooling) the heavy access counter
// keeps its value; `clear_heavy` (end of the cooling time) sets it to zero. The
// heavy access counter saturates at H_TH and the block access counter at its
// maximum value. Saturation, the hold input and "exceeds" read as strictly
// greater are this design's choices.
module access_monitor #(
  parameter int unsigned BLOCK_TH = tap_pkg::BLOCK_TH,
  parameter int unsigned H_TH     = tap_pkg::H_TH,
  parameter int unsigned T_SLICE  = tap_pkg::T_SLICE,
  localparam int unsigned BLK_W = $clog2(T_SLICE + 1),
  localparam int unsigned HVY_W = $clog2(H_TH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             access,
  input  logic             slice_end,
  input  logic             hold,
  input  logic             clear_heavy,
  output logic [BLK_W-1:0] block_cnt,
  output logic [HVY_W-1:0] heavy_cnt,
  output logic             heavy
);

  localparam logic [BLK_W-1:0] BLK_MAX = '1;
  localparam logic [HVY_W-1:0] HVY_TH  = HVY_W'(H_TH);

  logic [BLK_W-1:0] slice_total;
  logic             heavy_slice;

  assign slice_total = (access && block_cnt != BLK_MAX) ? block_cnt + 1'b1 : block_cnt;
  assign heavy_slice = (slice_total > BLK_W'(BLOCK_TH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      block_cnt <= '0;
      heavy_cnt <= '0;
    end else begin
      block_cnt <= slice_end ? '0 : slice_total;
      if (clear_heavy) begin
        heavy_cnt <= '0;
      end else if (slice_end && !hold) begin
        if (!heavy_slice)            heavy_cnt <= '0;
        else if (heavy_cnt < HVY_TH) heavy_cnt <= heavy_cnt + 1'b1;
      end
    end
  end

  assign heavy = (heavy_cnt >= HVY_TH);

endmodule
