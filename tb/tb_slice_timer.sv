// tb_slice_timer: at the default slice length of 100,000 cycles, `slice_end`
// must be high in exactly the cycles T_SLICE*k - 1 (counting the first cycle
// after reset as cycle 0) over three slices, and `cycle_in_slice` must equal
// the cycle number modulo T_SLICE.
module tb_slice_timer;
  localparam int unsigned T_SLICE = 100000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic slice_end;
  logic [16:0] cycle_in_slice;
  int checks = 0, failures = 0;
  int unsigned pulses = 0;

  slice_timer dut (.clk, .rst_n, .slice_end, .cycle_in_slice);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int unsigned c = 0; c < 3 * T_SLICE; c++) begin
      bit exp_end;
      exp_end = ((c % T_SLICE) == T_SLICE - 1);
      if (slice_end != exp_end || cycle_in_slice != 17'(c % T_SLICE)) begin
        failures++;
        if (failures < 10) $display("FAIL: cycle %0d slice_end=%0b count=%0d", c, slice_end, cycle_in_slice);
      end
      checks++;
      if (slice_end) pulses++;
      @(negedge clk);
    end
    checks++;
    if (pulses != 3) begin failures++; $display("FAIL: %0d slice ends", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * T_SLICE + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
