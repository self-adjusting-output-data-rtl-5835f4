// tb_diff_unit: checks the data and test registers. Each register must load
// only when enabled, and word_out must be tr xor dr with use_dr, tr without.
module tb_diff_unit;
  localparam int N = 8;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic dr_load = 1'b0, tr_load = 1'b0, use_dr = 1'b0;
  logic [N-1:0] dr_in = '0, tr_in = '0;
  logic [N-1:0] dr, word_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  diff_unit dut (.clk, .rst_n, .dr_load, .dr_in, .tr_load, .tr_in, .use_dr, .dr, .word_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [N-1:0] exp_dr, exp_tr;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    exp_dr = '0;
    exp_tr = '0;
    for (int i = 0; i < 500; i++) begin
      dr_load = 1'($urandom());
      tr_load = 1'($urandom());
      dr_in = N'($urandom());
      tr_in = N'($urandom());
      @(negedge clk);
      if (dr_load) exp_dr = dr_in;
      if (tr_load) exp_tr = tr_in;
      dr_load = 1'b0;
      tr_load = 1'b0;
      use_dr = 1'($urandom());
      #1;
      check(dr == exp_dr, "data register");
      check(word_out == (use_dr ? (exp_tr ^ exp_dr) : exp_tr),
            $sformatf("word_out %h (use_dr=%0d)", word_out, use_dr));
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
