// char_parity_tree: the EXOR tree of the word-oriented output data compressor.
// For an N-bit word w it computes
//   f[0] = F0 = parity of w                        (word-address part)
//   f[i] = Fi = parity of the bits w[b] whose position b has bit i-1 set,
//               i = 1..L, L = ceil(log2 N)         (bit-position part)
// so that {F0 ? a_w : 0, FL..F1} is the EXOR of the bit addresses (a_w, b) of
// all "1" bits of the word, i.e. its partial characteristic. f[L:1] is the
// binary bit position of the single 1 when the word has exactly one 1.
// Purely combinational; this is the structure the paper describes.
module char_parity_tree #(
  parameter int unsigned N = 8,
  parameter int unsigned L = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0] word,
  output logic [L:0]   f
);
  // mask of bit positions whose index has bit i set
  function automatic logic [N-1:0] pos_mask(input int unsigned i);
    logic [N-1:0] m;
    for (int unsigned b = 0; b < N; b++) m[b] = ((b >> i) & 1) != 0;
    return m;
  endfunction

  always_comb begin
    f[0] = ^word;
    for (int unsigned i = 0; i < L; i++) f[i+1] = ^(word & pos_mask(i));
  end
endmodule
