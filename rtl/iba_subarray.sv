// iba_subarray: one instruction-cache data subarray (IBA).
//
// A subarray is an autonomous unit: its bit-cell array and its peripheral
// circuits (postdecoder, column multiplexer, precharge, sense amplifiers and
// output driver) are all switched on whenever it is accessed, and that is what
// makes a subarray that is accessed every cycle heat up. In RTL it is a
// single-port synchronous RAM of ROWS words of WIDTH bits.
//
// Interface: `en` selects the subarray for one cycle; with `we` high the word
// `wdata` is written to `row`, otherwise `row` is read and the word appears on
// `rdata` in the next cycle (one-cycle read latency). `rdata` holds its value
// while the subarray is idle. `access` is high in every cycle the subarray is
// enabled and is the event that the protection logic counts.
//
// The default size (512 rows of 128 bits, 8 KB) follows from a 64 KB 2-way
// cache cut into 8 data subarrays, each holding one 16-byte fetch chunk of
// every set of one way; that cut is this design's own choice.
module iba_subarray #(
  parameter int unsigned ROWS  = 512,
  parameter int unsigned WIDTH = 128,
  localparam int unsigned ROW_W = $clog2(ROWS)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [ROW_W-1:0] row,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata,
  output logic             access
);

  logic [WIDTH-1:0] cells [ROWS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) cells[row] <= wdata;
      else    rdata      <= cells[row];
    end
  end

  assign access = en;

endmodule
