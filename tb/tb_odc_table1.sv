// tb_odc_table1: runs the word-oriented compressor in the six RAM
// configurations of the cost table (2**20 and 2**30 words of 8, 16 and 32
// bits). Each must have ceil(log2 m) + ceil(log2 n) flip-flops (23, 24, 25,
// 33, 34, 35) and compute the modulo-2 address characteristic of random words
// at random addresses.
module tb_odc_table1;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int c [6];
  int f [6];
  logic d [6];
  int checks, failures;

  always #5 clk = ~clk;

  odc_cfg_check #(.AW(20), .N(8),  .FF_EXP(23)) u0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .done(d[0]));
  odc_cfg_check #(.AW(20), .N(16), .FF_EXP(24)) u1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .done(d[1]));
  odc_cfg_check #(.AW(20), .N(32), .FF_EXP(25)) u2 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .done(d[2]));
  odc_cfg_check #(.AW(30), .N(8),  .FF_EXP(33)) u3 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .done(d[3]));
  odc_cfg_check #(.AW(30), .N(16), .FF_EXP(34)) u4 (.clk, .rst_n, .checks(c[4]), .failures(f[4]), .done(d[4]));
  odc_cfg_check #(.AW(30), .N(32), .FF_EXP(35)) u5 (.clk, .rst_n, .checks(c[5]), .failures(f[5]), .done(d[5]));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5]);
    @(negedge clk);
    checks = 0;
    failures = 0;
    for (int i = 0; i < 6; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3] + c[4] + c[5],
             f[0] + f[1] + f[2] + f[3] + f[4] + f[5] + 1);
    $finish;
  end
endmodule
