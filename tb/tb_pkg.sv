// tb_pkg: helpers shared by the testbenches.
//
// `code_word` defines the contents of instruction memory as a function of the
// byte address, so the next-level model and the checkers agree on every fetch
// block without storing an image: word(a) = a XOR 0x5A5A_0000 with the low two
// bits set to 2'b11 (all words are distinct). `code_chunk` packs the four
// words of the 16-byte fetch block holding `a`, lowest address in bits 31:0.
package tb_pkg;

  function automatic logic [31:0] code_word(logic [31:0] a);
    return {a[31:2], 2'b11} ^ 32'h5A5A_0000;
  endfunction

  function automatic logic [127:0] code_chunk(logic [31:0] a);
    logic [31:0] base;
    base = {a[31:4], 4'h0};
    return {code_word(base + 32'd12), code_word(base + 32'd8),
            code_word(base + 32'd4), code_word(base)};
  endfunction

endpackage
