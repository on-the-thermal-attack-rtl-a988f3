// tb_fetch_throttle: with slices of 50 cycles, H_TH = 5 and ALPHA = 2, a
// heavy flag raised in the first cycle of a slice must stop fetch for exactly
// ALPHA * H_TH * 50 = 500 cycles, with `clear_heavy` high only in the last of
// them. The heavy flag is dropped by the testbench when clear_heavy is seen,
// as the access monitors do. Three trigger events are tested, and fetch must
// stay enabled while no flag is raised.
module tb_fetch_throttle;
  localparam int unsigned T = 50, H = 5, A = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic any_heavy, slice_end, fetch_stop, clear_heavy;
  logic [3:0] cooling_slices;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  fetch_throttle #(.H_TH(H), .ALPHA(A)) dut (
    .clk, .rst_n, .any_heavy, .slice_end, .fetch_stop, .clear_heavy, .cooling_slices);

  always #5 clk = ~clk;

  // slice_end in the last cycle of each T-cycle slice
  always_comb slice_end = (cyc % T) == T - 1;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    any_heavy = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int ev = 0; ev < 3; ev++) begin
      int unsigned stop_cycles, clears;
      int unsigned idle;
      idle = (ev + 1) * T + 7;               // some idle time, then align to a slice start
      for (int unsigned i = 0; i < idle; i++) begin
        #1 check(!fetch_stop && !clear_heavy, "no stop while idle");
        @(negedge clk);
      end
      while ((cyc % T) != 0) @(negedge clk);
      any_heavy = 1;
      stop_cycles = 0; clears = 0;
      forever begin
        #1;
        if (!fetch_stop) break;
        stop_cycles++;
        if (clear_heavy) begin
          clears++;
          check(slice_end, "clear_heavy on a slice's last cycle");
          @(negedge clk);
          any_heavy = 0;
          break;
        end
        @(negedge clk);
      end
      #1;
      check(stop_cycles == A * H * T, $sformatf("cooling lasted %0d cycles, expected %0d", stop_cycles, A * H * T));
      check(clears == 1, "one clear_heavy pulse");
      check(!fetch_stop, "fetch resumes after cooling");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * (A * H * T + 5 * T)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
