// odc_cfg_check: test helper for tb_odc_table1. It builds one word-oriented
// compressor of 2**AW words of N bits, checks that its characteristic has
// FF_EXP flip-flops, and absorbs random words at random addresses, comparing
// after every clock with a bit-by-bit reference EXOR of {a_w, a_b} over the
// ones. Results are returned through `checks`, `failures` and `done`.
module odc_cfg_check #(
  parameter int AW     = 20,
  parameter int N      = 8,
  parameter int FF_EXP = 23,
  parameter int WORDS  = 300
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int L = $clog2(N);
  localparam int K = AW + L;

  logic clr, en;
  logic [AW-1:0] addr;
  logic [N-1:0] word;
  logic [K-1:0] c, exp;

  odc_word #(.AW(AW), .N(N)) dut (.clk, .rst_n, .clr, .en, .addr, .word, .c);

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
    clr = 1'b0; en = 1'b0; addr = '0; word = '0;
    exp = '0;
    wait (rst_n);
    @(negedge clk);
    checks++;
    if ($bits(c) != FF_EXP) begin
      failures++;
      $display("FAIL: 2**%0d x %0d: characteristic has %0d flip-flops, expected %0d", AW, N, $bits(c), FF_EXP);
    end
    for (int i = 0; i < WORDS; i++) begin
      en = 1'b1;
      addr = AW'({$urandom(), $urandom()});
      for (int b = 0; b < N; b++) word[b] = 1'($urandom());
      for (int b = 0; b < N; b++) if (word[b]) exp ^= {addr, L'(b)};
      @(negedge clk);
      checks++;
      if (c != exp) begin
        failures++;
        $display("FAIL: 2**%0d x %0d: characteristic %h expected %h", AW, N, c, exp);
      end
    end
    en = 1'b0;
    done = 1'b1;
  end
endmodule
