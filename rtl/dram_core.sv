// dram_core: row-organized RAM with refreshment register and switching matrix,
// the memory side of the self-testing DRAM. It holds 2**AW words of N bits in
// 2**(AW-CW) rows of 2**CW words.
//
// Access protocol (two cycles, never overlapped):
//   cycle 1, `act`  : the row of `addr` is copied into the refreshment
//                     register, the word (column) index is latched.
//   cycle 2         : `word` = the selected word of the refreshment register
//                     (switching matrix), i.e. the read data or, for a write,
//                     the old contents. With `wr` the new word `wdata`
//                     replaces it in the refreshment register and the whole
//                     row is written back to the array at the rising edge.
// Storage is kept statically: charge leakage and the periodic refresh of a
// real DRAM are not modelled, and the array is not reset. The row copy on every
// access follows the paper's assumed refreshment scheme; the row length and the
// two-cycle protocol are this design's choice.
module dram_core #(
  parameter int unsigned AW = 20,
  parameter int unsigned N  = 8,
  parameter int unsigned CW = 7
) (
  input  logic          clk,
  input  logic          act,
  input  logic [AW-1:0] addr,
  input  logic          wr,
  input  logic [N-1:0]  wdata,
  output logic [N-1:0]  word
);
  localparam int unsigned RW       = AW - CW;
  localparam int unsigned ROWS     = 2 ** RW;
  localparam int unsigned ROW_BITS = N * (2 ** CW);

  logic [ROW_BITS-1:0] mem [ROWS];
  logic [ROW_BITS-1:0] refresh_reg;
  logic [ROW_BITS-1:0] row_new;
  logic [RW-1:0]       row_q;
  logic [CW-1:0]       col_q;

  // switching matrix
  assign word = refresh_reg[col_q*N +: N];

  always_comb begin
    row_new = refresh_reg;
    row_new[col_q*N +: N] = wdata;
  end

  always_ff @(posedge clk) begin
    if (act) begin
      refresh_reg <= mem[addr[AW-1:CW]];
      row_q       <= addr[AW-1:CW];
      col_q       <= addr[CW-1:0];
    end else if (wr) begin
      refresh_reg   <= row_new;
      mem[row_q]    <= row_new;
    end
  end

  initial begin
    assert (CW >= 1 && CW < AW) else $error("dram_core: need 1 <= CW < AW");
  end

  always_ff @(posedge clk) begin
    assert (!(act && wr)) else $error("dram_core: act and wr in the same cycle");
  end
endmodule
