// slice_timer: time-slice counter of the subarray protection logic.
//
// Time is cut into slices of T_SLICE cycles. The timer counts cycles from 0 to
// T_SLICE-1 after reset and raises `slice_end` for one cycle, in the last cycle
// of every slice. The block access counters are evaluated and cleared on that
// cycle, so each slice boundary falls between the cycle with `slice_end` high
// and the next one. The first slice starts in the first cycle after reset.
//
// The 100,000-cycle default is the design's time slice; the counter
// implementation is the simplest one.
module slice_timer #(
  parameter int unsigned T_SLICE = tap_pkg::T_SLICE,
  localparam int unsigned CNT_W = (T_SLICE > 1) ? $clog2(T_SLICE) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             slice_end,
  output logic [CNT_W-1:0] cycle_in_slice
);

  localparam logic [CNT_W-1:0] LAST = CNT_W'(T_SLICE - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cycle_in_slice <= '0;
    else if (slice_end)  cycle_in_slice <= '0;
    else                 cycle_in_slice <= cycle_in_slice + 1'b1;
  end

  assign slice_end = (cycle_in_slice == LAST);

endmodule
