// tb_dram_core: checks the row-organized RAM (256 words of 8 bits, rows of 8
// words) against a word-level model. Each access is the two-clock protocol:
// `act`, then in the second clock `word` shows the addressed word (the old
// word on a write) and `wr` stores `wdata`. The array is first filled by
// writes; then random reads and writes follow, and a final full read-back.
// Writes to one row must leave the other words of that row intact.
module tb_dram_core;
  localparam int AW = 8, N = 8, CW = 3;
  localparam int M  = 1 << AW;
  logic clk = 1'b0;
  logic act = 1'b0, wr = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [N-1:0] wdata = '0, word;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dram_core #(.AW(AW), .N(N), .CW(CW)) dut (.clk, .act, .addr, .wr, .wdata, .word);

  logic [N-1:0] model [M];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic access(input int a, input bit we, input logic [N-1:0] d, input bit chk_old);
    act = 1'b1; addr = AW'(a);
    @(negedge clk);
    act = 1'b0;
    if (chk_old) check(word == model[a], $sformatf("word %0d: got %h expected %h", a, word, model[a]));
    wr = we; wdata = d;
    @(negedge clk);
    wr = 1'b0;
    if (we) model[a] = d;
  endtask

  initial begin
    @(negedge clk);
    for (int a = 0; a < M; a++) access(a, 1'b1, N'($urandom()), 1'b0);
    for (int i = 0; i < 3000; i++) access($urandom_range(M - 1), 1'($urandom()), N'($urandom()), 1'b1);
    for (int a = 0; a < M; a++) access(a, 1'b0, '0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
