// tb_odc_bit: checks the bit-oriented compressor (AW = 6, a 64-cell RAM).
// A random bit memory is scanned in random order; the characteristic must
// equal the EXOR of the addresses of all "1" cells, computed here directly.
// Then a cell is flipped and its address absorbed (write adjustment); the
// result must equal the characteristic recomputed from scratch. A single
// flipped cell must be located by C_REF xor C_TEST, two flipped cells must give
// a non-zero difference. `clr` and holding without `en` are checked too.
//
// Second part: equivalence with serial signature analysis (the theorem behind
// the aliasing claim). For k = 3 and k = 4 every content of a RAM with 2**k - 1
// cells (every 7th content for k = 4) is read in the order of a Fibonacci LFSR with primitive polynomial
// phi (1 + X + X^3, 1 + X + X^4) started at (1, 0, ..., 0); a serial signature
// register with the reciprocal polynomial, started at zero, reads the same
// bits. Its final state must equal the characteristic with its components in
// reversed order. Both LFSRs are modelled here: component i of a state is bit
// i, the new state is (feedback xor data, s0, ..., s(k-2)), and the feedback is
// the EXOR of s(i-1) over the terms X^i of the polynomial.
module tb_odc_bit;
  localparam int AW = 6;
  localparam int M  = 1 << AW;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clr = 1'b0, en = 1'b0, d = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [AW-1:0] c;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  odc_bit #(.AW(AW)) dut (.clk, .rst_n, .clr, .en, .addr, .d, .c);

  logic clr3 = 1'b0, en3 = 1'b0, d3 = 1'b0;
  logic [2:0] addr3 = '0, c3;
  logic [3:0] addr4 = '0, c4;
  odc_bit #(.AW(3)) dut3 (.clk, .rst_n, .clr(clr3), .en(en3), .addr(addr3), .d(d3), .c(c3));
  odc_bit #(.AW(4)) dut4 (.clk, .rst_n, .clr(clr3), .en(en3), .addr(addr4), .d(d3), .c(c4));

  // Fibonacci LFSR step; taps[i] is the coefficient of X^(i+1)
  function automatic logic [3:0] lfsr_step(input logic [3:0] s, input logic [3:0] taps, input int k,
                                           input logic din);
    logic fb;
    fb = din;
    for (int i = 0; i < k; i++) fb ^= taps[i] & s[i];
    return 4'({s[2:0], fb} & ((4'd1 << k) - 4'd1));
  endfunction

  function automatic logic [3:0] reverse(input logic [3:0] v, input int k);
    logic [3:0] r;
    r = '0;
    for (int i = 0; i < k; i++) r[i] = v[k - 1 - i];
    return r;
  endfunction

  // one RAM content (bit t = cell read at step t), k = 3 or 4
  task automatic theorem_case(input int k, input int content);
    logic [3:0] tpg_s, sa_s, taps, rtaps, got;
    int m;
    m = (1 << k) - 1;
    taps  = (k == 3) ? 4'b0101 : 4'b1001;   // 1 + X + X^3 / 1 + X + X^4
    rtaps = (k == 3) ? 4'b0110 : 4'b1100;   // 1 + X^2 + X^3 / 1 + X^3 + X^4
    tpg_s = 4'b0001;
    sa_s  = '0;
    clr3 = 1'b1;
    @(negedge clk);
    clr3 = 1'b0;
    en3 = 1'b1;
    for (int t = 0; t < m; t++) begin
      d3 = 1'((content >> t) & 1);
      addr3 = tpg_s[2:0];
      addr4 = tpg_s;
      sa_s  = lfsr_step(sa_s, rtaps, k, d3);
      tpg_s = lfsr_step(tpg_s, taps, k, 1'b0);
      @(negedge clk);
    end
    en3 = 1'b0;
    got = (k == 3) ? {1'b0, c3} : c4;
    check(reverse(got, k) == sa_s,
          $sformatf("k=%0d content %h: reversed characteristic %h, signature %h", k, content, reverse(got, k), sa_s));
  endtask

  bit mem [M];
  int order [M];

  function automatic logic [AW-1:0] ref_char();
    logic [AW-1:0] r;
    r = '0;
    for (int a = 0; a < M; a++) if (mem[a]) r ^= AW'(a);
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // clear, then absorb all cells in a random order
  task automatic scan(output logic [AW-1:0] result);
    for (int i = 0; i < M; i++) order[i] = i;
    order.shuffle();
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    check(c == '0, "clear");
    en = 1'b1;
    for (int i = 0; i < M; i++) begin
      addr = AW'(order[i]);
      d    = mem[order[i]];
      @(negedge clk);
    end
    en = 1'b0;
    result = c;
  endtask

  initial begin
    logic [AW-1:0] cref, ctest;
    int a1, a2;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(c == '0, "reset value");
    for (int round = 0; round < 20; round++) begin
      foreach (mem[i]) mem[i] = 1'($urandom());
      scan(cref);
      check(cref == ref_char(), $sformatf("round %0d: characteristic %h expected %h", round, cref, ref_char()));
      // hold
      @(negedge clk);
      check(c == cref, "hold without en");
      // write adjustment: flip one cell and absorb its address (d = old xor new = 1)
      a1 = $urandom_range(M - 1);
      mem[a1] = !mem[a1];
      en = 1'b1; addr = AW'(a1); d = 1'b1;
      @(negedge clk);
      en = 1'b0;
      check(c == ref_char(), $sformatf("round %0d: adjusted characteristic", round));
      cref = c;
      // absorbing with d = 0 changes nothing
      en = 1'b1; addr = AW'($urandom()); d = 1'b0;
      @(negedge clk);
      en = 1'b0;
      check(c == cref, "d = 0 leaves the characteristic");
      // single error: syndrome is its address (address 0 is invisible)
      a1 = $urandom_range(M - 1, 1);
      mem[a1] = !mem[a1];
      scan(ctest);
      check((cref ^ ctest) == AW'(a1), $sformatf("single error at %0d diagnosed as %0d", a1, cref ^ ctest));
      mem[a1] = !mem[a1];
      // double error: detected
      a1 = $urandom_range(M - 1);
      do a2 = $urandom_range(M - 1); while (a2 == a1);
      mem[a1] = !mem[a1];
      mem[a2] = !mem[a2];
      scan(ctest);
      check((cref ^ ctest) != '0, "double error detected");
      check((cref ^ ctest) == AW'(a1 ^ a2), "double error syndrome is a1 xor a2");
    end
    for (int content = 0; content < 128; content++) theorem_case(3, content);
    for (int content = 0; content < 32768; content += 7) theorem_case(4, content);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (120000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
