// tb_odc_word: checks the word-oriented compressor with 64 words of 8 bits
// (and, as a second instance, 7-bit words with a non-power-of-two width).
// A random memory is scanned in random order; the characteristic must equal
// the EXOR of {word address, bit position} over all "1" bits, computed here bit
// by bit. A write is then modelled by absorbing old xor new at the written
// address, and the result must equal the characteristic of the new contents.
// A single flipped bit must be located exactly by C_REF xor C_TEST (bit 0 of
// word 0 excepted, whose address is all zero); a double error must be seen.
module tb_odc_word;
  localparam int AW = 6;
  localparam int M  = 1 << AW;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clr = 1'b0, en = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [7:0] word = '0;
  logic [AW+2:0] c;
  logic [AW+2:0] c7;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  odc_word #(.AW(AW), .N(8)) dut  (.clk, .rst_n, .clr, .en, .addr, .word, .c);
  odc_word #(.AW(AW), .N(7)) dut7 (.clk, .rst_n, .clr, .en, .addr, .word(word[6:0]), .c(c7));

  logic [7:0] mem [M];
  int order [M];

  function automatic logic [AW+2:0] ref_char(input int n);
    logic [AW+2:0] r;
    r = '0;
    for (int a = 0; a < M; a++)
      for (int b = 0; b < n; b++)
        if (mem[a][b]) r ^= {AW'(a), 3'(b)};
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic scan(output logic [AW+2:0] result);
    for (int i = 0; i < M; i++) order[i] = i;
    order.shuffle();
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    check(c == '0, "clear");
    en = 1'b1;
    for (int i = 0; i < M; i++) begin
      addr = AW'(order[i]);
      word = mem[order[i]];
      @(negedge clk);
    end
    en = 1'b0;
    result = c;
  endtask

  initial begin
    logic [AW+2:0] cref, ctest;
    logic [7:0] nw;
    int a1, b1, a2, b2;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(c == '0, "reset value");
    for (int round = 0; round < 20; round++) begin
      foreach (mem[i]) mem[i] = 8'($urandom());
      scan(cref);
      check(cref == ref_char(8), $sformatf("round %0d: characteristic %h expected %h", round, cref, ref_char(8)));
      check(c7 == ref_char(7), $sformatf("round %0d: N=7 characteristic %h expected %h", round, c7, ref_char(7)));
      @(negedge clk);
      check(c == cref, "hold without en");
      // several writes, each adjusting with the difference word
      for (int w = 0; w < 5; w++) begin
        a1 = $urandom_range(M - 1);
        nw = 8'($urandom());
        en = 1'b1; addr = AW'(a1); word = mem[a1] ^ nw;
        mem[a1] = nw;
        @(negedge clk);
        en = 1'b0;
        check(c == ref_char(8), $sformatf("round %0d: adjusted after write to %0d", round, a1));
      end
      cref = c;
      // single error
      do begin
        a1 = $urandom_range(M - 1);
        b1 = $urandom_range(7);
      end while (a1 == 0 && b1 == 0);
      mem[a1][b1] = !mem[a1][b1];
      scan(ctest);
      check((cref ^ ctest) == {AW'(a1), 3'(b1)},
            $sformatf("single error (%0d,%0d) diagnosed as %h", a1, b1, cref ^ ctest));
      mem[a1][b1] = !mem[a1][b1];
      // double error
      a1 = $urandom_range(M - 1); b1 = $urandom_range(7);
      do begin
        a2 = $urandom_range(M - 1); b2 = $urandom_range(7);
      end while (a2 == a1 && b2 == b1);
      mem[a1][b1] = !mem[a1][b1];
      mem[a2][b2] = !mem[a2][b2];
      scan(ctest);
      check((cref ^ ctest) != '0, "double error detected");
    end
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
