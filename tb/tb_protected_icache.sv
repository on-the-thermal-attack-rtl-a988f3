// tb_protected_icache: end-to-end test of the protected instruction cache with
// the full 64 KB cache and shortened protection timing (slices of 2,000
// cycles, block threshold 1,800, H_TH = 3, ALPHA = 2), refilled by the
// behavioural next-level model. A fetch stream generator plays the core:
//   NORMAL  straight-line code over 4 KB (all four chunks of every line, so
//           each data subarray sees about a quarter of the fetches) mixed with
//           two branch targets sharing one set (way mispredictions);
//   ATTACK  the attack loop: 256 blocks of "nop; br" 64 bytes apart from
//           0x20003100, one fetch per block, all on chunk 0 of way 0.
// Sequence: NORMAL for 4 slices (no stop allowed), ATTACK until IBA0 has had
// H_TH-1 heavy slices, then NORMAL for 2 (the heavy counter of IBA0 must rise and fall back to 0), then
// ATTACK until fetch has been stopped twice. Each stop must start on a slice
// boundary, last ALPHA*H_TH slices (12,000 cycles) with no request accepted,
// flag IBA0, ITA0 and ITA1 (and nothing else) as hot, and the second stop must follow the end of the first by
// exactly H_TH slices. Every response is checked against the code image.
// Counted mechanisms (each must occur): predicted-way hit, way misprediction,
// miss with refill, heavy counter increment, heavy counter reset, fetch stop,
// end of cooling with fetch resumed.
module tb_protected_icache;
  localparam int unsigned T = 2000, TH = 1800, H = 3, A = 2, NB = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid, req_ready, resp_valid;
  logic [31:0] req_addr, resp_addr, refill_req_addr;
  logic [127:0] resp_data, refill_data;
  logic refill_req_valid, refill_req_ready, refill_valid;
  logic fetch_stop, mispredict, miss, slice_end, clear_heavy;
  logic [NB-1:0] hot, access;
  logic [1:0] heavy_cnt [NB];
  int unsigned l2_requests;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0;

  protected_icache #(.T_SLICE(T), .BLOCK_TH(TH), .H_TH(H), .ALPHA(A)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_addr, .resp_valid, .resp_addr, .resp_data,
    .refill_req_valid, .refill_req_ready, .refill_req_addr, .refill_valid, .refill_data,
    .fetch_stop, .hot, .heavy_cnt, .access, .mispredict, .miss, .slice_end, .clear_heavy);

  l2_model u_l2 (.clk, .rst_n, .req_valid(refill_req_valid), .req_ready(refill_req_ready),
    .req_addr(refill_req_addr), .beat_valid(refill_valid), .beat_data(refill_data),
    .requests(l2_requests));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---- fetch stream generator
  typedef enum {NORMAL, ATTACK} mode_e;
  mode_e mode = NORMAL;
  int unsigned pc_n = 0;   // position in the normal stream
  int unsigned pc_a = 0;   // basic block index in the attack loop

  function automatic logic [31:0] next_addr();
    if (mode == ATTACK) return 32'h2000_3100 + 32'(pc_a) * 32'h40;
    // every 8th fetch is a branch to one of two targets in the same set
    if (pc_n % 8 == 7) return ((pc_n / 8) % 2 == 0) ? 32'h0040_7F00 : 32'h0041_7F00;
    return 32'h0001_0000 + 32'((pc_n % 256) * 16);
  endfunction

  always_comb req_addr = next_addr();

  // ---- counters and scoreboard
  int unsigned n_hit = 0, n_mispred = 0, n_miss = 0, n_inc = 0, n_reset = 0;
  int unsigned n_stop = 0, n_resume = 0;
  logic [1:0] heavy0_q = '0;
  logic       stop_q = 1'b0;
  longint unsigned stop_start [2], stop_end [2];
  logic [31:0] inflight [$];
  bit          resp_mis = 0;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (req_valid && req_ready) begin
      inflight.push_back(req_addr);
      if (mode == ATTACK) pc_a <= (pc_a + 1) % 256;
      else                pc_n <= pc_n + 1;
    end
    if (fetch_stop) check(!req_ready, "no request accepted while fetch is stopped");
    if (mispredict) n_mispred++;
    if (miss) n_miss++;
    if (resp_valid) begin
      logic [31:0] a;
      check(inflight.size() > 0, "response with a request outstanding");
      a = inflight.pop_front();
      check(resp_addr == a && resp_data == tb_pkg::code_chunk(a), $sformatf("response for %h", a));
      n_hit++;
    end
    // heavy counter of IBA0
    if (heavy_cnt[0] > heavy0_q) n_inc++;
    if (heavy_cnt[0] == 0 && heavy0_q != 0 && !clear_heavy && !$past(clear_heavy)) n_reset++;
    heavy0_q <= heavy_cnt[0];
    // fetch stop intervals
    if (fetch_stop && !stop_q) begin
      if (n_stop < 2) stop_start[n_stop] = cyc;
      check(cyc % T == 0, $sformatf("stop starts on a slice boundary (cycle %0d)", cyc));
      check(hot[0], "IBA0 flagged hot");
      check(hot == 12'b0011_0000_0001, $sformatf("IBA0, ITA0 and ITA1 hot, nothing else (%b)", hot));
      n_stop++;
    end
    if (!fetch_stop && stop_q) begin
      if (n_resume < 2) stop_end[n_resume] = cyc;
      n_resume++;
    end
    stop_q <= fetch_stop;
  end

  initial begin
    req_valid = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    req_valid = 1;
    mode = NORMAL;
    repeat (4 * T) @(negedge clk);
    check(n_stop == 0, "normal code is never stopped");
    check(heavy_cnt[0] == 0, "normal code leaves IBA0 cool");
    mode = ATTACK;
    while (heavy_cnt[0] != 2'(H - 1)) @(negedge clk);
    mode = NORMAL;
    repeat (2 * T) @(negedge clk);
    check(n_stop == 0, "H_TH-1 heavy slices do not stop fetch");
    check(heavy_cnt[0] == 0, "heavy counter back to zero after a light slice");
    mode = ATTACK;
    while (n_resume < 2) @(negedge clk);
    repeat (20) @(negedge clk);
    req_valid = 0;
    repeat (10) @(negedge clk);
    check(inflight.size() == 0, "all requests answered");
    check(stop_end[0] - stop_start[0] == A * H * T, $sformatf("first cooling %0d cycles", stop_end[0] - stop_start[0]));
    check(stop_end[1] - stop_start[1] == A * H * T, $sformatf("second cooling %0d cycles", stop_end[1] - stop_start[1]));
    check(stop_start[1] - stop_end[0] == H * T, $sformatf("re-trigger after %0d cycles", stop_start[1] - stop_end[0]));
    $display("hits=%0d mispredicts=%0d misses=%0d heavy_inc=%0d heavy_reset=%0d stops=%0d resumes=%0d",
             n_hit, n_mispred, n_miss, n_inc, n_reset, n_stop, n_resume);
    check(n_hit > 0, "hits happened");
    check(n_mispred > 0, "way mispredictions happened");
    check(n_miss > 0 && l2_requests == n_miss, "misses with refills happened");
    check(n_inc > 0, "heavy counter increments happened");
    check(n_reset > 0, "heavy counter resets happened");
    check(n_stop == 2, "fetch stops happened");
    check(n_resume == 2, "cooling ends with fetch resumed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (16 * T + 2 * (A + 1) * H * T + 2 * T) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
