// tb_iba_subarray: checks the data subarray against a reference array.
// Random writes and reads at the default size (512 x 128 bits); every read
// must return the last word written to that row exactly one cycle later, the
// output must hold while the subarray is idle, and `access` must follow `en`.
module tb_iba_subarray;
  localparam int unsigned ROWS = 512, WIDTH = 128;
  logic clk = 1'b0;
  logic en, we, access;
  logic [8:0] row;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] ref_mem [ROWS];
  bit   ref_ok [ROWS];
  int checks = 0, failures = 0;

  iba_subarray dut (.clk, .en, .we, .row, .wdata, .rdata, .access);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [WIDTH-1:0] rnd128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  initial begin
    en = 0; we = 0; row = '0; wdata = '0;
    foreach (ref_ok[i]) ref_ok[i] = 0;
    // fill every row once
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      en = 1; we = 1; row = 9'(r); wdata = rnd128();
      ref_mem[r] = wdata; ref_ok[r] = 1;
      #1 check(access == 1'b1, "access follows en on write");
    end
    @(negedge clk); en = 0; we = 0;
    #1 check(access == 1'b0, "access low when idle");
    // random mix
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      row = 9'($urandom_range(0, ROWS - 1));
      if ($urandom_range(0, 2) == 0) begin
        en = 1; we = 1; wdata = rnd128(); ref_mem[row] = wdata;
      end else if ($urandom_range(0, 3) == 0) begin
        en = 0; we = 0;
      end else begin
        logic [WIDTH-1:0] exp;
        logic [WIDTH-1:0] held;
        en = 1; we = 0; exp = ref_mem[row];
        @(negedge clk);
        check(rdata == exp, $sformatf("read row %0d one cycle later", row));
        en = 0;
        held = rdata;
        @(negedge clk);
        check(rdata == held, "rdata holds while idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
