// tb_access_monitor: drives one monitor with slices of 1,000 cycles and a
// block threshold of 900, and a heavy threshold of 3, with a chosen number of
// accesses per slice. Expected heavy counts are worked out per slice from the
// rule: more than BLOCK_TH accesses -> +1 (saturating at H_TH), otherwise 0.
// The sequence covers exactly-at-threshold (900, not heavy), just above
// (901, heavy), a reset in the middle of a run, saturation, hold during
// cooling, and clear_heavy. The block counter is checked at every slice end.
module tb_access_monitor;
  localparam int unsigned T = 1000, TH = 900, H = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic access, slice_end, hold, clear_heavy, heavy;
  logic [$clog2(T+1)-1:0] block_cnt;
  logic [$clog2(H+1)-1:0] heavy_cnt;
  int checks = 0, failures = 0;

  access_monitor #(.BLOCK_TH(TH), .H_TH(H), .T_SLICE(T)) dut (
    .clk, .rst_n, .access, .slice_end, .hold, .clear_heavy, .block_cnt, .heavy_cnt, .heavy);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One slice with n accesses spread randomly over the slice.
  task automatic run_slice(int unsigned n, bit hold_in);
    int unsigned left_acc, left_cyc;
    left_acc = n;
    for (int unsigned c = 0; c < T; c++) begin
      left_cyc = T - c;
      access    = (left_acc == left_cyc) || (left_acc != 0 && $urandom_range(0, left_cyc - 1) < left_acc);
      if (access) left_acc--;
      slice_end = (c == T - 1);
      hold      = hold_in;
      if (slice_end) #1 check(32'(block_cnt) + 32'(access) == n, $sformatf("slice total %0d", n));
      @(negedge clk);
    end
    access = 0; slice_end = 0; hold = 0;
  endtask

  int unsigned exp_h;
  task automatic step(int unsigned n, bit hold_in = 0);
    run_slice(n, hold_in);
    if (!hold_in) exp_h = (n > TH) ? ((exp_h < H) ? exp_h + 1 : H) : 0;
    check(heavy_cnt == exp_h, $sformatf("heavy count %0d after %0d accesses (got %0d)", exp_h, n, heavy_cnt));
    check(heavy == (exp_h >= H), "heavy flag");
    check(block_cnt == 0, "block counter cleared at slice boundary");
  endtask

  initial begin
    access = 0; slice_end = 0; hold = 0; clear_heavy = 0; exp_h = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    step(900);            // at the threshold: not heavy
    step(901);            // 1
    step(1000);           // 2
    step(500);            // reset to 0
    step(950);            // 1
    step(960);            // 2
    step(999);            // 3 -> heavy
    step(1000);           // saturate at 3
    step(100, 1'b1);      // cooling: held
    // clear at the end of cooling
    @(negedge clk); clear_heavy = 1;
    @(negedge clk); clear_heavy = 0;
    exp_h = 0;
    check(heavy_cnt == 0 && !heavy, "cleared by clear_heavy");
    step(901);            // counting again from 0 -> 1
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * T) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
