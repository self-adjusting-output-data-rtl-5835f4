// odc_bit: output data compressor for a bit-oriented RAM (one bit per
// address). The register holds the modulo-2 address characteristic: the
// bitwise EXOR of the addresses of all cells read as "1".
//
//   C <= C xor (d ? addr : 0)      when en
//
// This is the AW flip-flop, AW EXOR, one-AND-gate circuit of the paper. The
// same register also adjusts the reference: feeding it the address of a cell
// whose value changed adds (= removes) that address. In the word-oriented
// compressor (odc_word) it is reused for the word-address part with d = F0,
// the parity of the word.
//
// Interface: `clr` sets the characteristic to zero (start of a loop), `en`
// absorbs (addr, d) at the rising edge; `clr` wins. `c` is the registered
// characteristic.
module odc_bit #(
  parameter int unsigned AW = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  input  logic [AW-1:0] addr,
  input  logic          d,
  output logic [AW-1:0] c
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  c <= '0;
    else if (clr) c <= '0;
    else if (en)  c <= c ^ (addr & {AW{d}});
  end
endmodule
