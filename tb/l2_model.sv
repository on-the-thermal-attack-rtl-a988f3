// l2_model: behavioural model of the next cache level seen by the L1
// instruction cache (not synthesizable logic of the design; a stand-in for the
// unified L2 cache in simulation).
//
// It accepts one line request at a time (`req_ready` is high while idle),
// waits LATENCY cycles (12 by default, the L2 hit latency of the modelled
// core) and then returns the line in LINE_BYTES/16 beats of 16 bytes, lowest
// chunk first, one beat per cycle unless GAPS is set, in which case a random
// idle cycle may fall between beats. The contents come from tb_pkg::code_chunk.
// `requests` counts the accepted requests.
module l2_model #(
  parameter int unsigned LATENCY    = 12,
  parameter int unsigned LINE_BYTES = 64,
  parameter bit          GAPS       = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req_valid,
  output logic         req_ready,
  input  logic [31:0]  req_addr,
  output logic         beat_valid,
  output logic [127:0] beat_data,
  output int unsigned  requests
);

  localparam int unsigned BEATS = LINE_BYTES / 16;

  logic        busy;
  logic [31:0] line;
  int unsigned wait_cnt;
  int unsigned beat;
  logic        gap;

  assign req_ready = !busy;

  always_comb begin
    beat_valid = busy && (wait_cnt == 0) && !gap;
    beat_data  = tb_pkg::code_chunk(line + 32'(beat * 16));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      line     <= '0;
      wait_cnt <= 0;
      beat     <= 0;
      gap      <= 1'b0;
      requests <= 0;
    end else begin
      gap <= GAPS && ($urandom_range(0, 3) == 0);
      if (!busy) begin
        if (req_valid) begin
          busy     <= 1'b1;
          line     <= req_addr;
          wait_cnt <= LATENCY;
          beat     <= 0;
          requests <= requests + 1;
        end
      end else if (wait_cnt != 0) begin
        wait_cnt <= wait_cnt - 1;
      end else if (beat_valid) begin
        if (beat == BEATS - 1) busy <= 1'b0;
        beat <= beat + 1;
      end
    end
  end

endmodule
