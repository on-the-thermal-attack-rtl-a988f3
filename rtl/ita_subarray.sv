// ita_subarray: one instruction-cache tag subarray (ITA), with its tag match.
//
// A tag subarray is made of the tag bit-cell array, its postdecoder and the
// tag match unit, and is treated as one block. It holds a tag slice and a
// valid bit for each of ROWS sets of one way. Valid bits are cleared by reset; tags are
// not reset.
//
// Interface: `en` selects the subarray for one cycle. With `we` high, `wtag` is
// written to `row` and the row is marked valid. Otherwise the row is read and
// compared with `cmp_tag` (sampled in the same cycle); in the next cycle
// `rvalid` gives the row's valid bit and `hit` is high when the row is valid
// and its tag equals `cmp_tag`. `hit` and `rvalid` hold while idle. `access`
// is high in every cycle the subarray is enabled.
//
// The default size (512 rows of 9-bit tag slices) follows from 512 sets per
// way and a 17-bit tag (32-bit address) cut into two slices per way, read
// together; the cut and the address width are this design's own choices. With
// several slices per way, each slice keeps its own copy of the valid bit.
module ita_subarray #(
  parameter int unsigned ROWS  = 512,
  parameter int unsigned TAG_W = 9,
  localparam int unsigned ROW_W = $clog2(ROWS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             we,
  input  logic [ROW_W-1:0] row,
  input  logic [TAG_W-1:0] wtag,
  input  logic [TAG_W-1:0] cmp_tag,
  output logic             rvalid,
  output logic             hit,
  output logic             access
);

  logic [TAG_W-1:0] tags [ROWS];
  logic [ROWS-1:0]  valid;
  logic [TAG_W-1:0] rtag_q;
  logic [TAG_W-1:0] cmp_q;

  always_ff @(posedge clk) begin
    if (en && we) tags[row] <= wtag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid  <= '0;
      rvalid <= 1'b0;
      rtag_q <= '0;
      cmp_q  <= '0;
    end else if (en) begin
      if (we) begin
        valid[row] <= 1'b1;
      end else begin
        rvalid <= valid[row];
        rtag_q <= tags[row];
        cmp_q  <= cmp_tag;
      end
    end
  end

  // Tag match unit.
  assign hit    = rvalid && (rtag_q == cmp_q);
  assign access = en;

endmodule
