// tb_bist_ctrl: checks the BIST control unit (AW = 4, 16 addresses) clock by
// clock against the intended schedule:
//  * a loop starts with one clock of odc_clr + tpg_load, then 16 clocks of
//    mem_act/tpg_step with mem_addr = TPG address; test register loads and
//    compressor absorbs follow one and two clocks behind, with the same
//    addresses; the loop ends with cref_load + init_done (initialization) or
//    check + bist_done (BIST), 2**AW + 3 clocks after the start clock;
//  * a write: act + dr_load, then mem_wr + tr_load, then odc_en with use_dr at
//    the written address, then cref_load; a read: act, then rvalid only;
//  * system requests stall (sys_ready low) while a loop is pending or running,
//    and a loop waits until a write adjustment has finished.
// The TPG is modelled here as a counter driven by tpg_load / tpg_step.
module tb_bist_ctrl;
  localparam int AW = 4;
  localparam int M  = 1 << AW;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic init_start = 1'b0, bist_start = 1'b0;
  logic busy, init_done, bist_done;
  logic sys_req = 1'b0, sys_we = 1'b0;
  logic [AW-1:0] sys_addr = '0;
  logic sys_ready, rvalid;
  logic [AW-1:0] tpg_addr;
  logic tpg_load, tpg_step, mem_act, mem_wr, dr_load, tr_load, use_dr;
  logic odc_clr, odc_en, cref_load, check_o;
  logic [AW-1:0] mem_addr, odc_addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bist_ctrl #(.AW(AW)) dut (
    .clk, .rst_n, .init_start, .bist_start, .busy, .init_done, .bist_done,
    .sys_req, .sys_we, .sys_addr, .sys_ready, .rvalid,
    .tpg_addr, .tpg_load, .tpg_step, .mem_act, .mem_addr, .mem_wr,
    .dr_load, .tr_load, .use_dr, .odc_clr, .odc_en, .odc_addr, .cref_load, .check(check_o)
  );

  // TPG model: a counter, different from the real generator on purpose
  always_ff @(posedge clk) begin
    if (!rst_n)        tpg_addr <= 4'd5;
    else if (tpg_load) tpg_addr <= 4'd5;
    else if (tpg_step) tpg_addr <= tpg_addr + 4'd3;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // run one loop, started by a pulse; checks the schedule
  task automatic run_loop(input bit is_bist);
    int t;
    logic [AW-1:0] exp_addr;
    logic [AW-1:0] act_addrs [M];
    int n_act, n_tr, n_odc;
    if (is_bist) bist_start = 1'b1; else init_start = 1'b1;
    @(negedge clk);
    bist_start = 1'b0; init_start = 1'b0;
    // wait for the start clock
    t = 0;
    while (!odc_clr && t < 20) begin
      check(!sys_ready && busy, "stall while loop pending");
      @(negedge clk); t++;
    end
    check(odc_clr && tpg_load && !mem_act && !odc_en, "start clock: clear compressor, load TPG");
    @(negedge clk);
    n_act = 0; n_tr = 0; n_odc = 0;
    t = 1;
    while (!(is_bist ? bist_done : init_done) && t < M + 10) begin
      check(!sys_ready && busy, "stall during loop");
      check(!odc_clr && !mem_wr && !use_dr && !rvalid, "no clear, write, difference or read data in loop");
      check(is_bist ? !cref_load : !check_o, "C_REF kept during BIST / no check at init");
      if (mem_act) begin
        check(tpg_step && mem_addr == tpg_addr, "loop address comes from the TPG");
        if (n_act < M) act_addrs[n_act] = mem_addr;
        n_act++;
      end
      if (tr_load) n_tr++;
      if (odc_en) begin
        check(n_odc < M && odc_addr == act_addrs[n_odc], "compressor address follows the access two clocks later");
        n_odc++;
      end
      @(negedge clk); t++;
    end
    check(n_act == M && n_tr == M && n_odc == M, $sformatf("loop of %0d accesses, %0d TR loads, %0d absorbs", n_act, n_tr, n_odc));
    check(t == M + 3, $sformatf("loop ends %0d clocks after start, expected %0d", t, M + 3));
    check(is_bist ? (check_o && !cref_load) : (cref_load && !check_o), "end of loop action");
    @(negedge clk);
    check(!busy && sys_ready, "idle after loop");
  endtask

  task automatic sys_access(input bit we, input logic [AW-1:0] a);
    sys_req = 1'b1; sys_we = we; sys_addr = a;
    #1;
    check(sys_ready, "ready in idle");
    check(mem_act && mem_addr == a && dr_load == we, "access clock 1: activate row");
    @(negedge clk);
    sys_req = 1'b0;
    check(!sys_ready && !mem_act, "access clock 2: no new request");
    check(mem_wr == we && tr_load == we && rvalid == !we, "access clock 2: write back / read data");
    @(negedge clk);
    check(sys_ready, "ready again after two clocks");
    check(odc_en == we && use_dr == we && (!we || odc_addr == a), "clock 3: difference absorbed at write address");
    @(negedge clk);
    check(cref_load == we, "clock 4: C_REF reloaded after write");
  endtask

  initial begin
    int t;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(sys_ready && !busy, "idle after reset");
    run_loop(1'b0);
    for (int i = 0; i < 20; i++) sys_access(1'($urandom()), AW'($urandom()));
    run_loop(1'b1);
    // request a BIST in the clock where a write's adjustment is still running
    sys_req = 1'b1; sys_we = 1'b1; sys_addr = 4'd9;
    @(negedge clk);
    sys_req = 1'b0;
    @(negedge clk);
    bist_start = 1'b1;       // odc_en of the write is active now
    check(odc_en, "write adjustment in flight");
    @(negedge clk);
    bist_start = 1'b0;
    check(!odc_clr && cref_load, "loop waits for the C_REF update");
    t = 0;
    while (!odc_clr && t < 10) begin @(negedge clk); t++; end
    check(odc_clr, "loop started after the update");
    while (!bist_done && t < 40) begin @(negedge clk); t++; end
    check(bist_done && check_o, "BIST done");
    @(negedge clk);
    // a request arriving during a loop waits and is then served
    init_start = 1'b1;
    @(negedge clk);
    init_start = 1'b0;
    sys_req = 1'b1; sys_we = 1'b0; sys_addr = 4'd3;
    #1;
    check(!sys_ready && !mem_act, "no access while a loop request is pending");
    t = 0;
    while (!(mem_act && !tpg_step) && t < 40) begin
      if (mem_act) check(tpg_step, "only loop accesses while busy");
      @(negedge clk); t++;
    end
    check(mem_act && mem_addr == 4'd3 && init_done == 1'b0, "stalled request served after the loop");
    @(negedge clk);
    sys_req = 1'b0;
    check(rvalid, "stalled read returns data");
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
