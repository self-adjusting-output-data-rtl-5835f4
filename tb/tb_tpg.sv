// tb_tpg: checks the test pattern generator. For LFSR widths 3, 8, 12 and 20
// (the default) and a 5-bit counter it loads the generator, steps it 2**AW
// times and checks that every address appears exactly once, that the first
// address is the seed (0...01 for the LFSR, 0 for the counter), that the
// generator is back at the seed after 2**AW steps, and that it holds its value
// without `step`.
module tb_tpg;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load = 1'b0;
  logic step = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [2:0]  a3;
  logic [7:0]  a8;
  logic [11:0] a12;
  logic [19:0] a20;
  logic [4:0]  c5;

  tpg #(.AW(3))                    u3  (.clk, .rst_n, .load, .step, .addr(a3));
  tpg #(.AW(8))                    u8  (.clk, .rst_n, .load, .step, .addr(a8));
  tpg #(.AW(12))                   u12 (.clk, .rst_n, .load, .step, .addr(a12));
  tpg                              u20 (.clk, .rst_n, .load, .step, .addr(a20));
  tpg #(.AW(5), .USE_LFSR(1'b0))   uc5 (.clk, .rst_n, .load, .step, .addr(c5));

  bit seen3 [8];
  bit seen8 [256];
  bit seen12 [4096];
  bit seen20 [1048576];
  bit seenc [32];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(a3 == 3'd1 && a8 == 8'd1 && a12 == 12'd1 && a20 == 20'd1 && c5 == 5'd0, "seed after reset");
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    // hold without step
    @(negedge clk);
    check(a3 == 3'd1 && a20 == 20'd1 && c5 == 5'd0, "hold without step");
    step = 1'b1;
    for (int i = 0; i < (1 << 20); i++) begin
      if (i < 8) begin
        check(!seen3[a3], $sformatf("AW=3 address %0d repeated", a3));
        seen3[a3] = 1'b1;
      end
      if (i < 32) begin
        check(!seenc[c5], $sformatf("counter address %0d repeated", c5));
        check(c5 == 5'(i), "counter order");
        seenc[c5] = 1'b1;
      end
      if (i < 256) begin
        if (seen8[a8]) check(1'b0, $sformatf("AW=8 address %0d repeated", a8));
        seen8[a8] = 1'b1;
      end
      if (i < 4096) begin
        if (seen12[a12]) check(1'b0, $sformatf("AW=12 address %0d repeated", a12));
        seen12[a12] = 1'b1;
      end
      if (seen20[a20]) check(1'b0, $sformatf("AW=20 address %0d repeated", a20));
      seen20[a20] = 1'b1;
      if (i == 7)    check(u3.nxt == 3'd1, "AW=3 back at seed after 8 steps");
      if (i == 31)   check(uc5.nxt == 5'd0, "counter back at 0 after 32 steps");
      if (i == 255)  check(u8.nxt == 8'd1, "AW=8 back at seed after 256 steps");
      if (i == 4095) check(u12.nxt == 12'd1, "AW=12 back at seed after 4096 steps");
      @(negedge clk);
    end
    step = 1'b0;
    check(a20 == 20'd1, "AW=20 back at seed after 2**20 steps");
    begin
      int missing;
      missing = 0;
      foreach (seen3[i])  if (!seen3[i])  missing++;
      foreach (seen8[i])  if (!seen8[i])  missing++;
      foreach (seen12[i]) if (!seen12[i]) missing++;
      foreach (seen20[i]) if (!seen20[i]) missing++;
      foreach (seenc[i])  if (!seenc[i])  missing++;
      check(missing == 0, $sformatf("%0d addresses never generated", missing));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
