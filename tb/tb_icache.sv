// tb_icache: the 64 KB 2-way instruction cache at its default size, refilled
// by the behavioural next-level model (12-cycle latency, random beat gaps).
// Every response is compared, in order, with the fetch block the address
// holds (tb_pkg::code_chunk). Checked as well:
//   - latency: 2 cycles from acceptance for a hit in the predicted way, 3 for
//     a hit after a way misprediction, more for a miss;
//   - every accepted request enables exactly one data subarray (IBA), the one
//     of the address's 16-byte chunk, and the two tag subarrays (ITA) of the
//     same way; a refill writes the IBAs of one way in chunk order and then
//     its ITAs;
//   - phase M (the attack loop: 256 blocks of "nop; br" 64 bytes apart from
//     0x20003100, run right after reset): after the first pass every fetch is
//     accepted back to back, one per cycle, and only IBA0, ITA0 and ITA1 are
//     ever enabled;
//   - phase 1: 42 lines with at most two per set (one pair alternating in the
//     same set), with random request gaps and fetch stalls: exactly one miss
//     per line and at least one way misprediction;
//   - phase 2: three lines rotating through one set: misses and replacements.
module tb_icache;
  localparam int unsigned NB = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid, req_ready, fetch_stall, resp_valid;
  logic [31:0] req_addr, resp_addr, refill_req_addr;
  logic [127:0] resp_data, refill_data;
  logic refill_req_valid, refill_req_ready, refill_valid;
  logic [NB-1:0] access;
  logic mispredict, miss;
  int unsigned l2_requests;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  int unsigned n_miss = 0, n_mispred = 0, n_resp = 0;

  icache dut (.clk, .rst_n, .req_valid, .req_ready, .req_addr, .fetch_stall,
    .resp_valid, .resp_addr, .resp_data, .refill_req_valid, .refill_req_ready,
    .refill_req_addr, .refill_valid, .refill_data, .access, .mispredict, .miss);

  l2_model #(.GAPS(1'b1)) u_l2 (.clk, .rst_n, .req_valid(refill_req_valid),
    .req_ready(refill_req_ready), .req_addr(refill_req_addr), .beat_valid(refill_valid),
    .beat_data(refill_data), .requests(l2_requests));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  typedef struct { logic [31:0] addr; longint unsigned t; int events; bit missed; } req_t;
  req_t q[$];
  bit   attack_check = 0;   // phase M steady state

  // Monitor, sampled just before each rising edge.
  always @(negedge clk) if (rst_n) begin
    cyc <= cyc + 1;
  end
  int unsigned beat_no = 0;
  always @(posedge clk) if (rst_n) begin
    // subarray enables of an accepted request
    if (req_valid && req_ready) begin
      req_t r;
      int iba, ita, ni, nt;
      ni = 0; nt = 0; iba = -1; ita = -1;
      for (int i = 0; i < 8; i++) if (access[i]) begin ni++; iba = i; end
      for (int j = 0; j < 4; j++) if (access[8 + j]) begin nt++; ita = j; end
      check(ni == 1 && nt == 2, $sformatf("one IBA and two ITAs per fetch (%b)", access));
      check(iba % 4 == int'(req_addr[5:4]), "IBA of the fetch chunk");
      check(access[8 + 2 * (iba / 4)] && access[9 + 2 * (iba / 4)], "both ITAs of the IBA's way");
      r.addr = req_addr; r.t = cyc; r.events = 0; r.missed = 0;
      q.push_back(r);
    end
    if (attack_check) begin
      check((access & ~12'b0011_0000_0001) == 0, $sformatf("attack touches only IBA0/ITA0/ITA1 (%b)", access));
      check(req_ready, "attack fetch accepted every cycle");
    end
    if (mispredict) begin
      n_mispred++;
      check(q.size() > 0, "mispredict with a request in flight");
      if (q.size() > 0) q[$].events++;
    end
    if (miss) begin
      n_miss++;
      if (q.size() > 0) begin q[$].missed = 1; q[$].events++; end
    end
    if (refill_valid) begin
      int w;
      w = -1;
      for (int i = 0; i < 8; i++) if (access[i]) w = i;
      check(w >= 0 && w % 4 == int'(beat_no), $sformatf("refill beat %0d writes its chunk's IBA", beat_no));
      if (beat_no == 3) check(access[11:8] == 4'b0011 << (2 * (w / 4)), "last refill beat writes the way's tags");
      beat_no = (beat_no + 1) % 4;
    end
    if (resp_valid) begin
      n_resp++;
      check(q.size() > 0, "response with a request outstanding");
      if (q.size() > 0) begin
        req_t r;
        longint unsigned lat;
        r = q.pop_front();
        lat = cyc - r.t;
        check(resp_addr == r.addr, $sformatf("in-order response %h vs %h", resp_addr, r.addr));
        check(resp_data == tb_pkg::code_chunk(r.addr), $sformatf("data for %h", r.addr));
        if (r.events == 0)      check(lat == 2, $sformatf("hit latency %0d", lat));
        else if (!r.missed)     check(lat == 3, $sformatf("mispredicted hit latency %0d", lat));
        else                    check(lat > 2 + 12, $sformatf("miss latency %0d", lat));
      end
    end
  end

  // Issue one request and hold it until accepted.
  task automatic fetch(logic [31:0] a, bit gaps);
    @(negedge clk);
    if (gaps) begin
      while ($urandom_range(0, 3) == 0) begin req_valid = 0; fetch_stall = ($urandom_range(0, 3) == 0); @(negedge clk); end
      fetch_stall = ($urandom_range(0, 9) == 0);
    end
    req_valid = 1; req_addr = a;
    #1;
    while (!req_ready) begin
      @(negedge clk);
      if (gaps) fetch_stall = ($urandom_range(0, 9) == 0);
      #1;
    end
  endtask

  task automatic drain();
    @(negedge clk); req_valid = 0; fetch_stall = 0;
    while (q.size() != 0) @(negedge clk);
  endtask

  logic [31:0] lines [42];
  initial begin
    int unsigned m0;
    req_valid = 0; req_addr = '0; fetch_stall = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- phase M: attack loop
    for (int pass = 0; pass < 4; pass++) begin
      for (int b = 0; b < 256; b++) begin
        fetch(32'h2000_3100 + 32'(b) * 32'h40, 1'b0);
        if (pass == 1 && b == 0) attack_check = 1;
      end
    end
    attack_check = 0;
    drain();
    check(n_miss == 256, $sformatf("attack loop misses once per block (%0d)", n_miss));
    check(l2_requests == 256, "one refill per missed line");
    // ---- phase 1
    for (int i = 0; i < 40; i++)
      lines[i] = {17'($urandom()), 9'(i * 12), 6'($urandom_range(0, 3) * 16)};
    lines[40] = {17'h0ABCD, 9'd511, 6'h10};
    lines[41] = {17'h1234A, 9'd511, 6'h30};
    m0 = n_miss;
    for (int n = 0; n < 3000; n++) begin
      int k;
      k = (n % 5 == 0) ? 40 + (n / 5) % 2 : $urandom_range(0, 39);
      fetch(lines[k] ^ 32'($urandom_range(0, 3) * 16), 1'b1);
    end
    drain();
    check(n_miss - m0 == 42, $sformatf("one miss per line (%0d)", n_miss - m0));
    check(n_mispred > 0, "way mispredictions happened");
    // ---- phase 2: thrash one set
    m0 = n_miss;
    for (int n = 0; n < 60; n++)
      fetch({17'(n % 3 + 5), 9'd301, 6'h0}, 1'b1);
    drain();
    check(n_miss - m0 >= 3, "conflict misses in one set");
    check(n_resp == 4 * 256 + 3000 + 60, $sformatf("every request answered (%0d)", n_resp));
    $display("misses=%0d mispredicts=%0d responses=%0d", n_miss, n_mispred, n_resp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
