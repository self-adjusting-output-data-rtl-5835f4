// cref_compare: the reference register C_REF and the comparator of the BIST.
//
// `load` copies the compressor's characteristic `c_odc` into C_REF: at the end
// of the initialization loop and after every write adjustment. During the BIST
// loop `load` stays low, so C_REF keeps the reference while the compressor
// computes C_TEST. `check` (end of the BIST loop) registers the comparison:
// `fail` = (C_REF != C_TEST) and `syndrome` = C_REF xor C_TEST. For a single
// faulty cell the syndrome is that cell's bit address (a_w, a_b); for two
// faulty cells it is non-zero. `valid` tells that C_REF has been learned.
// `match` is the unregistered comparator output.
//
// Timing: all outputs except `match` change at the rising edge after
// `load`/`check`. Reset clears everything; the paper does not specify reset.
module cref_compare #(
  parameter int unsigned K = 23
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         check,
  input  logic [K-1:0] c_odc,
  output logic [K-1:0] c_ref,
  output logic         valid,
  output logic         match,
  output logic         fail,
  output logic [K-1:0] syndrome
);
  assign match = (c_ref == c_odc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_ref    <= '0;
      valid    <= 1'b0;
      fail     <= 1'b0;
      syndrome <= '0;
    end else begin
      if (load) begin
        c_ref <= c_odc;
        valid <= 1'b1;
      end
      if (check) begin
        fail     <= !match;
        syndrome <= c_ref ^ c_odc;
      end
    end
  end
endmodule
