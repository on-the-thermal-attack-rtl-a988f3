// icache: L1 instruction cache split into data subarrays (IBA) and tag
// subarrays (ITA), with per-subarray access outputs.
//
// The cache is CACHE_BYTES large, WAYS-way set associative with LINE_BYTES
// lines, and returns one FETCH_BYTES fetch block (four instructions by default)
// per request with a latency of two cycles on a hit. Its data array is cut into
// WAYS * CHUNKS IBAs, each holding one fetch chunk of every set of one way, and
// its tag array into WAYS * ITA_PER_WAY ITAs, each holding one slice of the tag
// bits (with a valid bit) of every set of one way (see tap_pkg). A fetch
// enables one IBA and the ITA_PER_WAY ITAs of one way only: the way named by a
// per-set way predictor (the most recently hit way); the way hits when all its
// tag slices match. If that way misses, the next way is tried one cycle later; if all ways
// miss, the line is fetched from the next level in CHUNKS beats, written into
// the victim way (the first invalid way seen, otherwise the way after the most
// recently used one) and the request is replayed. Every cycle in which a
// subarray is enabled, for a read or a refill write, shows on `access`.
//
// Interface:
//   req_valid/req_ready/req_addr  fetch request; accepted when both are high.
//                                 The low log2(FETCH_BYTES) address bits are
//                                 ignored. `fetch_stall` holds req_ready low.
//   resp_valid/resp_addr/resp_data one response per request, in request order,
//                                 two cycles after acceptance on a hit.
//   refill_req_valid/ready/addr   line request to the next level (line-aligned).
//   refill_valid/refill_data      refill beats, chunk 0 first, CHUNKS beats.
//   access                        IBA enables (index way*CHUNKS+chunk), then ITA
//                                 enables (index way*ITA_PER_WAY+tag slice).
//   mispredict, miss              one-cycle event pulses.
// Timing: requests can be accepted back to back, one per cycle, while they hit
// in the predicted way; a request that misses in its predicted way holds
// req_ready low until it is resolved.
//
// The size, associativity, line size and hit latency follow the modelled
// 21364-class core; the subarray partition, the way predictor, the
// refill protocol and the address width are this design's own choices.
module icache #(
  parameter int unsigned CACHE_BYTES = tap_pkg::CACHE_BYTES,
  parameter int unsigned WAYS        = tap_pkg::WAYS,
  parameter int unsigned LINE_BYTES  = tap_pkg::LINE_BYTES,
  parameter int unsigned FETCH_BYTES = tap_pkg::FETCH_BYTES,
  parameter int unsigned ADDR_W      = tap_pkg::ADDR_W,
  parameter int unsigned ITA_PER_WAY = tap_pkg::ITA_PER_WAY,
  localparam int unsigned SETS     = CACHE_BYTES / (WAYS * LINE_BYTES),
  localparam int unsigned CHUNKS   = LINE_BYTES / FETCH_BYTES,
  localparam int unsigned NUM_IBA  = WAYS * CHUNKS,
  localparam int unsigned NUM_ITA  = WAYS * ITA_PER_WAY,
  localparam int unsigned NUM_BLK  = NUM_IBA + NUM_ITA,
  localparam int unsigned FW       = FETCH_BYTES * 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // fetch side
  input  logic               req_valid,
  output logic               req_ready,
  input  logic [ADDR_W-1:0]  req_addr,
  input  logic               fetch_stall,
  output logic               resp_valid,
  output logic [ADDR_W-1:0]  resp_addr,
  output logic [FW-1:0]      resp_data,
  // next level
  output logic               refill_req_valid,
  input  logic               refill_req_ready,
  output logic [ADDR_W-1:0]  refill_req_addr,
  input  logic               refill_valid,
  input  logic [FW-1:0]      refill_data,
  // subarray activity and events
  output logic [NUM_BLK-1:0] access,
  output logic               mispredict,
  output logic               miss
);

  localparam int unsigned FOFF_W   = $clog2(FETCH_BYTES);
  localparam int unsigned CH_W     = (CHUNKS > 1) ? $clog2(CHUNKS) : 1;
  localparam int unsigned OFF_W    = $clog2(LINE_BYTES);
  localparam int unsigned SET_W    = $clog2(SETS);
  localparam int unsigned TAG_W    = ADDR_W - OFF_W - SET_W;
  localparam int unsigned SLICE_W  = (TAG_W + ITA_PER_WAY - 1) / ITA_PER_WAY;
  localparam int unsigned TAGP_W   = SLICE_W * ITA_PER_WAY;
  localparam int unsigned WAY_W    = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned TRY_W    = $clog2(WAYS + 1);

  function automatic logic [SET_W-1:0] set_of(logic [ADDR_W-1:0] a);
    return a[OFF_W +: SET_W];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(logic [ADDR_W-1:0] a);
    return a[ADDR_W-1 -: TAG_W];
  endfunction
  function automatic int unsigned chunk_of(logic [ADDR_W-1:0] a);
    return (CHUNKS > 1) ? int'(a[FOFF_W +: CH_W]) : 0;
  endfunction
  function automatic logic [WAY_W-1:0] next_way(logic [WAY_W-1:0] w);
    return (int'(w) == WAYS - 1) ? '0 : w + 1'b1;
  endfunction

  typedef enum logic [1:0] {RUN, REFILL_REQ, REFILL_DATA, REPLAY} state_e;
  state_e state;

  // Subarray ports.
  logic [NUM_IBA-1:0]  iba_en, iba_we, iba_acc;
  logic [SET_W-1:0]    iba_row;
  logic [FW-1:0]       iba_rdata [NUM_IBA];
  logic [NUM_ITA-1:0]  ita_en, ita_we, ita_acc, ita_rvalid, ita_hit;
  logic [SET_W-1:0]    ita_row;
  logic [TAGP_W-1:0]   ita_tag;   // tag, zero-extended, cut into ITA_PER_WAY slices

  // Lookup stage: the request whose subarrays were read in the previous cycle.
  logic                s1_valid;
  logic [ADDR_W-1:0]   s1_addr;
  logic [WAY_W-1:0]    s1_way;
  logic [TRY_W-1:0]    s1_tries;
  logic                s1_inv_found;
  logic [WAY_W-1:0]    s1_inv_way;

  // Refill bookkeeping.
  logic [WAY_W-1:0]    victim;
  logic [CH_W-1:0]     beat;

  // Way predictor: most recently hit (or filled) way of each set.
  logic [WAY_W-1:0]    pred [SETS];

  // Read issue (combinational).
  logic                rd_issue;
  logic [WAY_W-1:0]    rd_way;
  logic [ADDR_W-1:0]   rd_addr;

  logic                s1_hit, s1_rvalid, s1_miss, accept, last_beat;
  logic                inv_now;
  logic [WAY_W-1:0]    inv_way_now, victim_now;

  // A way hits when every tag slice of that way matches.
  always_comb begin
    s1_hit = s1_valid;
    for (int p = 0; p < ITA_PER_WAY; p++)
      s1_hit = s1_hit && ita_hit[tap_pkg::ita_index(int'(s1_way), p, ITA_PER_WAY)];
  end
  assign s1_rvalid = ita_rvalid[tap_pkg::ita_index(int'(s1_way), 0, ITA_PER_WAY)];
  assign s1_miss   = s1_valid && !s1_hit;
  assign req_ready = (state == RUN) && !fetch_stall && !s1_miss;
  assign accept    = req_valid && req_ready;
  assign last_beat = (state == REFILL_DATA) && refill_valid && (int'(beat) == CHUNKS - 1);

  assign inv_now     = s1_inv_found || !s1_rvalid;
  assign inv_way_now = s1_inv_found ? s1_inv_way : s1_way;
  assign victim_now  = inv_now ? inv_way_now : next_way(pred[set_of(s1_addr)]);

  assign mispredict = (state == RUN) && s1_miss && (int'(s1_tries) < WAYS);
  assign miss       = (state == RUN) && s1_miss && (int'(s1_tries) == WAYS);

  always_comb begin
    rd_issue = 1'b0;
    rd_way   = '0;
    rd_addr  = req_addr;
    if (state == REPLAY) begin
      rd_issue = 1'b1;
      rd_way   = victim;
      rd_addr  = s1_addr;
    end else if (mispredict) begin
      rd_issue = 1'b1;
      rd_way   = next_way(s1_way);
      rd_addr  = s1_addr;
    end else if (accept) begin
      rd_issue = 1'b1;
      rd_way   = pred[set_of(req_addr)];
      rd_addr  = req_addr;
    end
  end

  // Subarray enables: a read enables one IBA and one ITA; a refill beat
  // writes one IBA and the last beat also writes the victim's ITA.
  always_comb begin
    iba_en  = '0;
    iba_we  = '0;
    ita_en  = '0;
    ita_we  = '0;
    iba_row = set_of(rd_addr);
    ita_row = set_of(rd_addr);
    ita_tag = TAGP_W'(tag_of(rd_addr));
    if (state == REFILL_DATA) begin
      iba_row = set_of(s1_addr);
      ita_row = set_of(s1_addr);
      ita_tag = TAGP_W'(tag_of(s1_addr));
      if (refill_valid) begin
        iba_en[tap_pkg::iba_index(int'(victim), int'(beat), CHUNKS)] = 1'b1;
        iba_we[tap_pkg::iba_index(int'(victim), int'(beat), CHUNKS)] = 1'b1;
      end
      if (last_beat) begin
        for (int p = 0; p < ITA_PER_WAY; p++) begin
          ita_en[tap_pkg::ita_index(int'(victim), p, ITA_PER_WAY)] = 1'b1;
          ita_we[tap_pkg::ita_index(int'(victim), p, ITA_PER_WAY)] = 1'b1;
        end
      end
    end else if (rd_issue) begin
      iba_en[tap_pkg::iba_index(int'(rd_way), chunk_of(rd_addr), CHUNKS)] = 1'b1;
      for (int p = 0; p < ITA_PER_WAY; p++)
        ita_en[tap_pkg::ita_index(int'(rd_way), p, ITA_PER_WAY)] = 1'b1;
    end
  end

  for (genvar i = 0; i < NUM_IBA; i++) begin : g_iba
    iba_subarray #(.ROWS(SETS), .WIDTH(FW)) u_iba (
      .clk,
      .en     (iba_en[i]),
      .we     (iba_we[i]),
      .row    (iba_row),
      .wdata  (refill_data),
      .rdata  (iba_rdata[i]),
      .access (iba_acc[i])
    );
  end

  for (genvar j = 0; j < NUM_ITA; j++) begin : g_ita
    ita_subarray #(.ROWS(SETS), .TAG_W(SLICE_W)) u_ita (
      .clk, .rst_n,
      .en      (ita_en[j]),
      .we      (ita_we[j]),
      .row     (ita_row),
      .wtag    (ita_tag[(j % ITA_PER_WAY) * SLICE_W +: SLICE_W]),
      .cmp_tag (ita_tag[(j % ITA_PER_WAY) * SLICE_W +: SLICE_W]),
      .rvalid  (ita_rvalid[j]),
      .hit     (ita_hit[j]),
      .access  (ita_acc[j])
    );
  end

  assign access = {ita_acc, iba_acc};

  assign refill_req_valid = (state == REFILL_REQ);
  assign refill_req_addr  = {s1_addr[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= RUN;
      s1_valid     <= 1'b0;
      s1_addr      <= '0;
      s1_way       <= '0;
      s1_tries     <= '0;
      s1_inv_found <= 1'b0;
      s1_inv_way   <= '0;
      victim       <= '0;
      beat         <= '0;
      resp_valid   <= 1'b0;
      resp_addr    <= '0;
      resp_data    <= '0;
      for (int s = 0; s < SETS; s++) pred[s] <= '0;
    end else begin
      resp_valid <= 1'b0;
      unique case (state)
        RUN: begin
          if (s1_valid && s1_hit) begin
            resp_valid            <= 1'b1;
            resp_addr             <= s1_addr;
            resp_data             <= iba_rdata[tap_pkg::iba_index(int'(s1_way), chunk_of(s1_addr), CHUNKS)];
            pred[set_of(s1_addr)] <= s1_way;
          end
          if (mispredict) begin
            s1_way       <= next_way(s1_way);
            s1_tries     <= s1_tries + 1'b1;
            s1_inv_found <= inv_now;
            s1_inv_way   <= inv_way_now;
          end else if (miss) begin
            victim       <= victim_now;
            state        <= REFILL_REQ;
          end else if (accept) begin
            s1_valid     <= 1'b1;
            s1_addr      <= req_addr;
            s1_way       <= pred[set_of(req_addr)];
            s1_tries     <= TRY_W'(1);
            s1_inv_found <= 1'b0;
          end else begin
            s1_valid     <= 1'b0;
          end
        end
        REFILL_REQ: begin
          beat <= '0;
          if (refill_req_ready) state <= REFILL_DATA;
        end
        REFILL_DATA: begin
          if (refill_valid) begin
            beat <= beat + 1'b1;
            if (last_beat) begin
              pred[set_of(s1_addr)] <= victim;
              state                 <= REPLAY;
            end
          end
        end
        REPLAY: begin
          s1_way       <= victim;
          s1_tries     <= TRY_W'(WAYS);
          s1_inv_found <= 1'b0;
          state        <= RUN;
        end
        default: state <= RUN;
      endcase
    end
  end

  // A request is never accepted while the lookup stage is unresolved.
  a_no_accept_on_miss: assert property (@(posedge clk) disable iff (!rst_n)
    s1_miss |-> !accept);
  // Refill beats only arrive after the refill request was taken.
  a_refill_order: assert property (@(posedge clk) disable iff (!rst_n)
    refill_valid |-> state == REFILL_DATA);

endmodule
