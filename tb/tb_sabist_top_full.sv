// tb_sabist_top_full: the end-to-end test of tb_sabist_top run on the RAM at
// its default size (2**20 words of 8 bits, rows of 128 words), with fewer
// random operations and fault rounds to bound the run time (each loop is
// 2**20 clocks).
//
// The array is preloaded with random data (a model copy is kept here). Then:
// initialization loop -> C_REF must equal the modulo-2 address characteristic
// of the model, computed bit by bit; random reads and writes -> read data must
// match the model and C_REF must track every write; BIST -> pass; one cell
// flipped behind the RAM's back -> BIST fails and the syndrome is that cell's
// {word address, bit position}; two cells flipped -> BIST fails; a new
// initialization learns the changed contents and the next BIST passes.
// Loop lengths (2**AW + 4 clocks from the request pulse) and the one-clock
// read latency are checked. Counted mechanisms, each of which must occur:
// initialization loop, BIST pass, BIST fail with exact diagnosis, double-error
// detection, write adjustment, read, stalled request, loop start held back by
// a write adjustment in flight.
module tb_sabist_top_full;
  localparam int AW = 20, N = 8, CW = 7;   // the top's defaults
  localparam int L  = $clog2(N);
  localparam int K  = AW + L;
  localparam int M  = 1 << AW;
  localparam int RAND_OPS = 200;
  localparam int N_SINGLE = 2;
  localparam int N_DOUBLE = 1;
  localparam int WATCHDOG = 12000000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic init_start = 1'b0, bist_start = 1'b0;
  logic busy, init_done, bist_done, cref_valid, bist_fail, cref_match;
  logic [K-1:0] syndrome, c_ref, c_odc;
  logic sys_req = 1'b0, sys_we = 1'b0;
  logic [AW-1:0] sys_addr = '0;
  logic [N-1:0] sys_wdata = '0;
  logic sys_ready, rvalid;
  logic [N-1:0] rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sabist_top dut (
    .clk, .rst_n, .init_start, .bist_start, .busy, .init_done, .bist_done,
    .cref_valid, .bist_fail, .syndrome, .c_ref, .c_odc, .cref_match,
    .sys_req, .sys_we, .sys_addr, .sys_wdata, .sys_ready, .rvalid, .rdata
  );

  logic [N-1:0] model [M];

  int n_init, n_bist_pass, n_diag, n_double, n_write, n_read, n_stall, n_held;

  // stalled request clocks and loop starts held back by a write adjustment
  always @(posedge clk) if (rst_n) begin
    if (sys_req && !sys_ready) n_stall++;
    if ((dut.u_ctrl.init_pend || dut.u_ctrl.bist_pend) && dut.u_ctrl.state == 0 && !dut.u_ctrl.quiet)
      n_held++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic logic [K-1:0] ref_char();
    logic [K-1:0] r;
    r = '0;
    for (int a = 0; a < M; a++)
      for (int b = 0; b < N; b++)
        if (model[a][b]) r ^= {AW'(a), L'(b)};
    return r;
  endfunction

  // flip one stored bit directly in the array (a fault the system did not make)
  task automatic flip_cell(input int a, input int b);
    dut.u_mem.mem[a >> CW][(a % (1 << CW)) * N + b] = !dut.u_mem.mem[a >> CW][(a % (1 << CW)) * N + b];
  endtask

  task automatic preload();
    for (int r = 0; r < (M >> CW); r++) begin
      logic [N*(1<<CW)-1:0] row;
      for (int c = 0; c < (1 << CW); c++) begin
        model[(r << CW) + c] = N'($urandom());
        row[c*N +: N] = model[(r << CW) + c];
      end
      dut.u_mem.mem[r] = row;
    end
  endtask

  // one system access; waits while the port stalls
  task automatic access(input bit we, input int a, input logic [N-1:0] d);
    sys_req = 1'b1; sys_we = we; sys_addr = AW'(a); sys_wdata = d;
    #1;
    while (!sys_ready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    sys_req = 1'b0;
    if (we) begin
      model[a] = d;
      n_write++;
    end else begin
      check(rvalid && rdata == model[a], $sformatf("read %0d: got %h expected %h", a, rdata, model[a]));
      n_read++;
    end
    @(negedge clk);
  endtask

  // run a loop from a request pulse; returns its length in clocks
  task automatic run_loop(input bit is_bist, output int len);
    if (is_bist) bist_start = 1'b1; else init_start = 1'b1;
    @(negedge clk);
    bist_start = 1'b0; init_start = 1'b0;
    len = 1;
    while (!(is_bist ? bist_done : init_done) && len < M + 100) begin
      @(negedge clk);
      len++;
    end
    @(negedge clk);
  endtask

  initial begin
    int len, a1, b1, a2, b2;
    logic [K-1:0] exp;
    // the array is not reset: fill it once the reset is in force
    repeat (2) @(negedge clk);
    preload();
    rst_n = 1'b1;
    @(negedge clk);
    check(!cref_valid && !busy && sys_ready, "idle after reset");

    // 1. learn C_REF
    run_loop(1'b0, len);
    check(len == M + 4, $sformatf("initialization takes %0d clocks, expected %0d", len, M + 4));
    exp = ref_char();
    check(cref_valid && c_ref == exp, $sformatf("learned C_REF %h expected %h", c_ref, exp));
    if (cref_valid && c_ref == exp) n_init++;

    // 2. system traffic, C_REF tracks the writes
    for (int i = 0; i < RAND_OPS; i++) begin
      access(1'($urandom()), $urandom_range(M - 1), N'($urandom()));
      if (i % 50 == 0) begin
        repeat (2) @(negedge clk);   // adjustment, then C_REF reload
        exp = ref_char();
        check(c_ref == exp, $sformatf("C_REF after op %0d: %h expected %h", i, c_ref, exp));
      end
    end
    repeat (2) @(negedge clk);
    exp = ref_char();
    check(c_ref == exp, "C_REF after traffic");

    // 3. BIST, requested while a write is finishing and a request waits
    sys_req = 1'b1; sys_we = 1'b1; sys_addr = AW'(7); sys_wdata = ~model[7];
    #1;
    check(sys_ready, "write accepted");
    @(negedge clk);
    model[7] = sys_wdata;
    n_write++;
    sys_req = 1'b0;
    bist_start = 1'b1;
    @(negedge clk);
    bist_start = 1'b0;
    sys_req = 1'b1; sys_we = 1'b0; sys_addr = AW'(7);   // stalls behind the loop
    // the loop start waits two clocks: compressor adjustment, then C_REF reload
    len = 2;
    while (!bist_done && len < M + 100) begin @(negedge clk); len++; end
    check(bist_done && !bist_fail && syndrome == '0, "BIST passes on consistent memory");
    check(len == M + 7, $sformatf("BIST behind a write adjustment takes %0d clocks, expected %0d", len, M + 6));
    if (bist_done && !bist_fail) n_bist_pass++;
    @(negedge clk);
    #1;
    while (!sys_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    sys_req = 1'b0;
    check(rvalid && rdata == model[7], "stalled read served after BIST");
    n_read++;
    @(negedge clk);
    check(c_ref == ref_char(), "C_REF unchanged by BIST");

    // 4. single faults: detected and located
    for (int i = 0; i < N_SINGLE; i++) begin
      do begin
        a1 = $urandom_range(M - 1); b1 = $urandom_range(N - 1);
      end while (a1 == 0 && b1 == 0);
      flip_cell(a1, b1);
      run_loop(1'b1, len);
      check(len == M + 4, "BIST length");
      check(bist_fail, $sformatf("single fault at (%0d,%0d) detected", a1, b1));
      check(syndrome == {AW'(a1), L'(b1)}, $sformatf("syndrome %h, expected (%0d,%0d)", syndrome, a1, b1));
      if (bist_fail && syndrome == {AW'(a1), L'(b1)}) n_diag++;
      flip_cell(a1, b1);
      run_loop(1'b1, len);
      check(!bist_fail, "BIST passes after the cell is restored");
      if (!bist_fail) n_bist_pass++;
    end

    // 5. double faults: detected
    for (int i = 0; i < N_DOUBLE; i++) begin
      a1 = $urandom_range(M - 1); b1 = $urandom_range(N - 1);
      do begin
        a2 = $urandom_range(M - 1); b2 = $urandom_range(N - 1);
      end while (a2 == a1 && b2 == b1);
      flip_cell(a1, b1);
      flip_cell(a2, b2);
      model[a1][b1] = !model[a1][b1];
      model[a2][b2] = !model[a2][b2];
      run_loop(1'b1, len);
      check(bist_fail && syndrome == ({AW'(a1), L'(b1)} ^ {AW'(a2), L'(b2)}), "double fault detected");
      if (bist_fail) n_double++;
      // 6. relearn the changed contents, then a BIST passes
      run_loop(1'b0, len);
      check(c_ref == ref_char(), "relearned C_REF");
      if (c_ref == ref_char()) n_init++;
      access(1'b1, a1, N'($urandom()));
      run_loop(1'b1, len);
      check(!bist_fail, "BIST passes after relearning and a write");
      if (!bist_fail) n_bist_pass++;
    end

    $display("mechanisms: init=%0d bist_pass=%0d diagnosed=%0d double=%0d write_adjust=%0d read=%0d stall_clocks=%0d held_start=%0d",
             n_init, n_bist_pass, n_diag, n_double, n_write, n_read, n_stall, n_held);
    check(n_init > 0, "initialization loop exercised");
    check(n_bist_pass > 0, "passing BIST exercised");
    check(n_diag > 0, "single-fault diagnosis exercised");
    check(n_double > 0, "double-fault detection exercised");
    check(n_write > 0, "write adjustment exercised");
    check(n_read > 0, "read exercised");
    check(n_stall > 0, "stall exercised");
    check(n_held > 0, "loop start held by write adjustment exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
