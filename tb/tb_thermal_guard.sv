// tb_thermal_guard: the protection logic with 12 subarrays, slices of 200
// cycles, a block threshold of 180, H_TH = 3 and ALPHA = 2.
//   A: subarray 3 is accessed in every cycle from reset while the others see
//      random light traffic (at most 50%). Fetch must stop in the first cycle
//      of slice 3 (cycle 600), only subarray 3 may be flagged hot, the stop
//      must last ALPHA*H_TH*200 = 1200 cycles, and all heavy counters must be
//      zero afterwards.
//   B: subarray 7 gets 190, 190, 100, 190, 190 accesses in five slices: its
//      heavy counter must read 1, 2, 0, 1, 2 and fetch must never stop.
//   C: subarrays 0 and 9 are both accessed every cycle: both must be hot when
//      fetch stops.
// No subarray is accessed while fetch is stopped, as in the real system.
module tb_thermal_guard;
  localparam int unsigned N = 12, T = 200, TH = 180, H = 3, A = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] access, hot;
  logic fetch_stop, slice_end, clear_heavy;
  logic [1:0] heavy_cnt [N];
  int checks = 0, failures = 0;
  int unsigned cyc = 0;     // cycles since reset release
  int unsigned stops = 0;

  thermal_guard #(.NUM_BLK(N), .T_SLICE(T), .BLOCK_TH(TH), .H_TH(H), .ALPHA(A)) dut (
    .clk, .rst_n, .access, .fetch_stop, .hot, .slice_end, .clear_heavy, .heavy_cnt);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && fetch_stop && !$past(fetch_stop)) stops++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // Drive one slice; `busy` subarrays get `n` accesses, others light random.
  task automatic slice(logic [N-1:0] busy, int unsigned n);
    for (int unsigned c = 0; c < T; c++) begin
      for (int b = 0; b < N; b++)
        access[b] = fetch_stop ? 1'b0 : busy[b] ? (c < n) : ($urandom_range(0, 1) == 1);
      @(negedge clk);
    end
  endtask

  initial begin
    access = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- A
    for (int s = 0; s < 3; s++) begin
      check(!fetch_stop, "no stop before H_TH heavy slices");
      slice(N'(1) << 3, T);
    end
    #1 check(fetch_stop && cyc == 3 * T, $sformatf("stop at first cycle of slice 3 (cycle %0d)", cyc));
    check(hot == (N'(1) << 3), $sformatf("only subarray 3 hot (hot=%b)", hot));
    begin
      int unsigned len = 0;
      while (fetch_stop) begin
        access = '0;
        len++;
        @(negedge clk); #1;
      end
      check(len == A * H * T, $sformatf("cooling %0d cycles", len));
    end
    check(cyc % T == 0, "fetch resumes at a slice boundary");
    for (int b = 0; b < N; b++) check(heavy_cnt[b] == 0, "heavy counters cleared");
    // ---- B
    begin
      int unsigned pat [5] = '{190, 190, 100, 190, 190};
      int unsigned exp [5] = '{1, 2, 0, 1, 2};
      for (int s = 0; s < 5; s++) begin
        slice(N'(1) << 7, pat[s]);
        #1 check(heavy_cnt[7] == 2'(exp[s]), $sformatf("B slice %0d heavy %0d got %0d", s, exp[s], heavy_cnt[7]));
        check(!fetch_stop, "B never stops");
      end
    end
    // ---- C
    slice('0, 0);   // let subarray 7 fall back to 0
    for (int s = 0; s < 3; s++) slice((N'(1) << 0) | (N'(1) << 9), T);
    #1 check(fetch_stop, "C stops");
    check(hot == ((N'(1) << 0) | (N'(1) << 9)), $sformatf("C hot=%b", hot));
    while (fetch_stop) begin access = '0; @(negedge clk); #1; end
    check(stops == 2, $sformatf("two stop events (%0d)", stops));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * T + 2 * A * H * T) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
