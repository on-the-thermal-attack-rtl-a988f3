// tb_ita_subarray: checks the tag subarray and its tag match.
// After reset every row reads invalid (no hit even for a matching tag). Rows
// written with a tag read valid and hit only for that tag, one cycle after
// the read; `access` follows `en`. A reference model of tags and valid bits
// is kept in the testbench. A second reset must invalidate rows whose tags
// are still stored.
module tb_ita_subarray;
  localparam int unsigned ROWS = 512, TAG_W = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en, we, rvalid, hit, access;
  logic [8:0] row;
  logic [TAG_W-1:0] wtag, cmp_tag;
  logic [TAG_W-1:0] ref_tag [ROWS];
  bit   ref_v [ROWS];
  int checks = 0, failures = 0;

  ita_subarray dut (.clk, .rst_n, .en, .we, .row, .wtag, .cmp_tag, .rvalid, .hit, .access);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rd(int r, logic [TAG_W-1:0] t);
    @(negedge clk);
    en = 1; we = 0; row = 9'(r); cmp_tag = t;
    #1 check(access, "access on read");
    @(negedge clk);
    en = 0;
    check(rvalid == ref_v[r], $sformatf("rvalid row %0d", r));
    check(hit == (ref_v[r] && ref_tag[r] == t), $sformatf("hit row %0d tag %h", r, t));
  endtask

  initial begin
    en = 0; we = 0; row = '0; wtag = '0; cmp_tag = '0;
    foreach (ref_v[i]) ref_v[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < ROWS; r += 17) rd(r, '0);   // all invalid after reset
    for (int n = 0; n < 3000; n++) begin
      int r;
      r = $urandom_range(0, ROWS - 1);
      if ($urandom_range(0, 2) == 0) begin
        @(negedge clk);
        en = 1; we = 1; row = 9'(r); wtag = TAG_W'($urandom());
        ref_tag[r] = wtag; ref_v[r] = 1;
        #1 check(access, "access on write");
        @(negedge clk); en = 0; we = 0;
      end else begin
        logic [TAG_W-1:0] t;
        t = (ref_v[r] && $urandom_range(0, 1) == 1) ? ref_tag[r] : TAG_W'($urandom());
        rd(r, t);
      end
    end
    @(negedge clk);
    #1 check(!access, "no access when idle");
    // A reset clears the valid bits but not the tags: a stored tag must no
    // longer hit.
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    for (int r = 0; r < ROWS; r++) begin
      logic [TAG_W-1:0] t;
      t = ref_tag[r];
      ref_v[r] = 0;
      rd(r, t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
