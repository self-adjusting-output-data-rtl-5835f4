// odc_word: output data compressor for a word-oriented RAM (Figure 7 style).
// The RAM of 2**AW words of N bits is seen as a bit-oriented RAM with bit
// addresses (a_w, a_b); the characteristic is the EXOR of (a_w, a_b) over all
// "1" bits, K = AW + L bits wide with L = ceil(log2 N), laid out as
// c = {a_w part, a_b part}.
//
// One word is absorbed per clock: char_parity_tree gives F0..FL, an odc_bit
// instance adds F0 * a_w to the word-address part, and the a_b part is EXORed
// with (FL..F1). Fed with memory words during a loop it computes C_REF or
// C_TEST; fed with a difference word (old xor new) at the written address it
// adjusts the reference after a write.
//
// Interface: `clr` zeroes the characteristic, `en` absorbs (addr, word) at the
// rising edge; `clr` wins. `c` is the registered characteristic. Widths: N >= 2.
module odc_word #(
  parameter int unsigned AW = 20,
  parameter int unsigned N  = 8,
  parameter int unsigned L  = $clog2(N),
  parameter int unsigned K  = AW + L
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  input  logic [AW-1:0] addr,
  input  logic [N-1:0]  word,
  output logic [K-1:0]  c
);
  logic [L:0]    f;
  logic [AW-1:0] cw;
  logic [L-1:0]  cb, cb_next;

  char_parity_tree #(.N(N), .L(L)) u_tree (.word(word), .f(f));

  odc_bit #(.AW(AW)) u_wpart (
    .clk, .rst_n, .clr, .en, .addr, .d(f[0]), .c(cw)
  );

  always_comb begin
    if (clr)     cb_next = '0;
    else if (en) cb_next = cb ^ f[L:1];
    else         cb_next = cb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cb <= '0;
    else        cb <= cb_next;
  end

  assign c = {cw, cb};

  initial begin
    assert (N >= 2 && L == $clog2(N) && K == AW + L)
      else $error("odc_word: need N >= 2, L = clog2(N), K = AW + L");
  end
endmodule
