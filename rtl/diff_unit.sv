// diff_unit: data register and test register of the BIST datapath.
//
// The data register (`dr`) takes the word of a write request (`dr_load`) and
// drives the RAM's write data. The test register (`tr`) takes the word the
// switching matrix selects from the refreshment register (`tr_load`): the old
// contents of the addressed word on a write, the word under test on a BIST or
// initialization read. The compressor is fed with
//   word_out = tr xor (use_dr ? dr : 0)
// i.e. the difference word old xor new after a write, or the plain memory word
// during a loop. Which register is combined with which is the paper's; the
// select input `use_dr` is this design's way of sharing the path.
//
// Timing: both registers load at the rising edge; word_out is combinational.
module diff_unit #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         dr_load,
  input  logic [N-1:0] dr_in,
  input  logic         tr_load,
  input  logic [N-1:0] tr_in,
  input  logic         use_dr,
  output logic [N-1:0] dr,
  output logic [N-1:0] word_out
);
  logic [N-1:0] tr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dr <= '0;
      tr <= '0;
    end else begin
      if (dr_load) dr <= dr_in;
      if (tr_load) tr <= tr_in;
    end
  end

  assign word_out = tr ^ (dr & {N{use_dr}});
endmodule
