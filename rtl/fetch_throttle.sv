// fetch_throttle: fetch-stop controller of the subarray protection logic.
//
// When the heavy access counter of any subarray has reached Hth (`any_heavy`),
// instruction fetch is stopped for the cooling time Tc = ALPHA * H_TH * Tslice,
// that is for the next ALPHA * H_TH time slices; ALPHA sets how aggressive the
// protection is. At the end of the cooling time all heavy access counters are
// cleared (`clear_heavy`, one cycle) and fetch resumes.
//
// Timing: the heavy access counters change on a slice boundary, so `any_heavy`
// rises in the first cycle of a slice. `fetch_stop` is high from that cycle to
// the last cycle of the ALPHA * H_TH-th slice, inclusive: exactly
// ALPHA * H_TH * Tslice cycles. `clear_heavy` is high in that last cycle, and
// fetch resumes in the next one. `cooling_slices` counts the finished slices
// of the current cooling time.
module fetch_throttle #(
  parameter int unsigned H_TH  = tap_pkg::H_TH,
  parameter int unsigned ALPHA = tap_pkg::ALPHA,
  localparam int unsigned COOL_SLICES = ALPHA * H_TH,
  localparam int unsigned COOL_W = $clog2(COOL_SLICES + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              any_heavy,
  input  logic              slice_end,
  output logic              fetch_stop,
  output logic              clear_heavy,
  output logic [COOL_W-1:0] cooling_slices
);

  typedef enum logic {RUN, COOL} state_e;
  state_e state;

  localparam logic [COOL_W-1:0] LAST = COOL_W'(COOL_SLICES - 1);

  assign fetch_stop  = (state == COOL) || any_heavy;
  assign clear_heavy = (state == COOL) && slice_end && (cooling_slices == LAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= RUN;
      cooling_slices <= '0;
    end else begin
      unique case (state)
        RUN: begin
          cooling_slices <= '0;
          if (any_heavy) begin
            state <= COOL;
            // A trigger seen on a slice's last cycle already counts that slice.
            if (slice_end) cooling_slices <= COOL_W'(1);
          end
        end
        COOL: begin
          if (clear_heavy) begin
            state          <= RUN;
            cooling_slices <= '0;
          end else if (slice_end) begin
            cooling_slices <= cooling_slices + 1'b1;
          end
        end
        default: state <= RUN;
      endcase
    end
  end

endmodule
