// tb_protected_icache_full: the protected instruction cache with every
// parameter at its default (64 KB 2-way cache; slices of 100,000 cycles, block
// threshold 90,000, H_TH = 5, ALPHA = 2) runs the attack loop from reset: 256
// blocks of "nop; br" 64 bytes apart from 0x20003100, one fetch per block,
// refilled by the behavioural next-level model on first use.
// The testbench counts the enables of every subarray per slice itself and
// applies the protection rule to them, predicting the cycle at which fetch
// must stop; the design must stop fetch in exactly that cycle, flag IBA0,
// keep fetch stopped for ALPHA*H_TH*T_SLICE = 1,000,000 cycles, and then
// resume and answer correctly. About 1.6 million cycles are simulated.
module tb_protected_icache_full;
  localparam int unsigned T = 100000, TH = 90000, H = 5, A = 2, NB = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid, req_ready, resp_valid;
  logic [31:0] req_addr, resp_addr, refill_req_addr;
  logic [127:0] resp_data, refill_data;
  logic refill_req_valid, refill_req_ready, refill_valid;
  logic fetch_stop, mispredict, miss, slice_end, clear_heavy;
  logic [NB-1:0] hot, access;
  logic [2:0] heavy_cnt [NB];
  int unsigned l2_requests;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0;

  protected_icache dut (
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

  int unsigned pc_a = 0;
  always_comb req_addr = 32'h2000_3100 + 32'(pc_a) * 32'h40;

  // Reference: per-slice access counts and consecutive heavy slices.
  int unsigned cnt [NB];
  int unsigned run [NB];
  longint unsigned predicted = 0;   // cycle at which fetch must stop
  longint unsigned stop_start = 0, stop_end = 0;
  logic stop_q = 1'b0;
  logic [31:0] inflight [$];
  int unsigned n_resp = 0, n_after = 0, bad_accept = 0;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (req_valid && req_ready) begin
      inflight.push_back(req_addr);
      pc_a <= (pc_a + 1) % 256;
    end
    if (resp_valid) begin
      logic [31:0] a;
      a = inflight.pop_front();
      check(resp_addr == a && resp_data == tb_pkg::code_chunk(a), $sformatf("response for %h", a));
      n_resp++;
      if (stop_end != 0) n_after++;
    end
    if (predicted == 0) begin
      for (int b = 0; b < NB; b++) if (access[b]) cnt[b]++;
      if (cyc % T == T - 1) begin
        for (int b = 0; b < NB; b++) begin
          run[b] = (cnt[b] > TH) ? run[b] + 1 : 0;
          cnt[b] = 0;
          if (run[b] == H && predicted == 0) predicted = cyc + 1;
        end
      end
    end
    if (fetch_stop && !stop_q) begin
      stop_start = cyc;
      check(cyc == predicted, $sformatf("fetch stops at cycle %0d, predicted %0d", cyc, predicted));
      check(hot == 12'b0011_0000_0001, $sformatf("IBA0, ITA0 and ITA1 hot (%b)", hot));
      $display("fetch stopped at cycle %0d (misses %0d)", cyc, l2_requests);
    end
    if (!fetch_stop && stop_q) begin
      stop_end = cyc;
      $display("fetch resumed at cycle %0d", cyc);
    end
    if (fetch_stop && req_ready) bad_accept++;
    stop_q <= fetch_stop;
  end

  initial begin
    foreach (cnt[b]) begin cnt[b] = 0; run[b] = 0; end
    req_valid = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    req_valid = 1;
    wait (stop_end != 0);
    repeat (2000) @(negedge clk);
    req_valid = 0;
    repeat (10) @(negedge clk);
    check(predicted != 0 && stop_start != 0, "attack detected");
    check(stop_end - stop_start == A * H * T, $sformatf("cooling lasted %0d cycles", stop_end - stop_start));
    check(l2_requests == 256, "each attack block refilled once");
    check(n_after > 1900, $sformatf("fetch resumed after cooling (%0d responses)", n_after));
    check(inflight.size() == 0, "all requests answered");
    check(bad_accept == 0, $sformatf("no fetch accepted while stopped (%0d)", bad_accept));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
