// tb_cref_compare: checks the C_REF register and comparator. C_REF must take
// the compressor value only on `load` (and `valid` rise with the first load),
// `match` must follow equality combinationally, and `check` must register
// fail = (C_REF != C_TEST) and syndrome = C_REF xor C_TEST, holding them until
// the next check.
module tb_cref_compare;
  localparam int K = 23;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load = 1'b0, check_i = 1'b0;
  logic [K-1:0] c_odc = '0;
  logic [K-1:0] c_ref, syndrome;
  logic valid, match, fail;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cref_compare dut (.clk, .rst_n, .load, .check(check_i), .c_odc, .c_ref, .valid,
                    .match, .fail, .syndrome);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [K-1:0] r, t;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!valid && c_ref == '0 && !fail && syndrome == '0, "reset state");
    for (int i = 0; i < 200; i++) begin
      r = K'($urandom());
      c_odc = r; load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      check(valid && c_ref == r, "load");
      check(match, "match after load");
      // C_REF holds while the compressor moves
      t = (i % 3 == 0) ? r : K'($urandom());
      c_odc = t;
      #1;
      check(match == (t == r), "combinational match");
      @(negedge clk);
      check(c_ref == r, "hold without load");
      check_i = 1'b1;
      @(negedge clk);
      check_i = 1'b0;
      check(fail == (t != r), "registered fail");
      check(syndrome == (r ^ t), "registered syndrome");
      c_odc = K'($urandom());
      @(negedge clk);
      check(fail == (t != r) && syndrome == (r ^ t), "result holds until next check");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
