// tb_attack_sizes: the attack loop at several sizes N (number of "nop; br"
// blocks, 64 bytes apart from 0x20003100) against the protected instruction
// cache, with the full 64 KB cache and shortened protection timing (slices of
// 2,000 cycles, block threshold 1,800, H_TH = 3, ALPHA = 2). The design is
// reset before each size.
//   N = 256 and N = 512: every block fits in data subarray IBA0 (chunk 0 of
//     way 0 holds 512 lines), so after the refills every fetch hits IBA0;
//     fetch must stop with IBA0 hot, for exactly ALPHA*H_TH slices.
//   N = 600: 88 blocks spill into way 1 (IBA4), so IBA0 sees about 85 % of
//     the fetches, under the 90 % threshold; fetch must not stop in 12 slices.
// Every response is checked against the code image.
module tb_attack_sizes;
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
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  int unsigned n_blocks = 256;
  int unsigned pc = 0;
  logic [31:0] inflight [$];
  always_comb req_addr = 32'h2000_3100 + 32'(pc) * 32'h40;

  always @(posedge clk) begin
    if (!rst_n) begin
      pc <= 0;
    end else begin
      if (req_valid && req_ready) begin
        inflight.push_back(req_addr);
        pc <= (pc + 1) % n_blocks;
      end
      if (resp_valid) begin
        logic [31:0] a;
        a = inflight.pop_front();
        check(resp_addr == a && resp_data == tb_pkg::code_chunk(a), $sformatf("response for %h", a));
      end
    end
  end

  task automatic run(int unsigned n, bit expect_stop);
    int unsigned cycles, len;
    @(negedge clk);
    req_valid = 0; rst_n = 0; n_blocks = n;
    inflight.delete();
    repeat (2) @(negedge clk);
    rst_n = 1; req_valid = 1;
    cycles = 0;
    while (!fetch_stop && cycles < 12 * T) begin @(negedge clk); cycles++; end
    if (expect_stop) begin
      check(fetch_stop, $sformatf("N=%0d: attack detected", n));
      check(hot[0], $sformatf("N=%0d: IBA0 hot", n));
      len = 0;
      while (fetch_stop) begin @(negedge clk); len++; end
      check(len == A * H * T, $sformatf("N=%0d: cooling %0d cycles", n, len));
    end else begin
      check(!fetch_stop, $sformatf("N=%0d: no stop when the loop spills out of IBA0", n));
    end
    check(l2_requests >= n, $sformatf("N=%0d: every block refilled", n));
    $display("N=%0d: %0d refills, %0d cycles watched before a stop or the limit", n, l2_requests, cycles);
  endtask

  initial begin
    req_valid = 0;
    run(256, 1'b1);
    run(512, 1'b1);
    run(600, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * 12 * T + 2 * A * H * T + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
