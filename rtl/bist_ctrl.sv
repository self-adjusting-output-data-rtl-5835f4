// bist_ctrl: BIST control unit of the self-adjusting memory BIST.
//
// Three modes, as the paper lays them out:
//  * initialization loop (ST_INIT_RUN): the compressor is cleared, the TPG
//    runs through all 2**AW word addresses, one per clock, each word flows
//    RAM -> test register -> compressor; at the end C_REF is loaded.
//  * system operation (ST_IDLE / ST_SYS_ACC): a read or write takes two
//    clocks. On a write the first clock opens the row into the refreshment
//    register, the second writes the new word back while the old word goes
//    to the test register; in the following clock the compressor absorbs the
//    difference word old xor new at the written address, and in the clock
//    after that C_REF is reloaded from the compressor. These two trailing
//    steps overlap the next access.
//  * BIST loop (ST_BIST_RUN): as the initialization loop but C_REF is left
//    alone; at the end the comparator result is registered (`check`).
// ST_FLUSH drains the two pipeline stages behind the last loop address.
// A loop counter of AW bits ends each loop after 2**AW addresses.
//
// Requests: `init_start`/`bist_start` are pulses, remembered until the loop
// can begin (at the next idle clock with no write adjustment in flight);
// while one is pending or a loop runs, `sys_ready` is low and system accesses
// stall. A system access is taken when `sys_req && sys_ready`; read data
// appear on the RAM's word output with `rvalid` one clock later.
// The pipeline structure, handshake and priorities are this design's choice;
// the paper gives the modes, the two-clock write and the loop counter.
module bist_ctrl #(
  parameter int unsigned AW = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  // loop requests and status
  input  logic          init_start,
  input  logic          bist_start,
  output logic          busy,
  output logic          init_done,
  output logic          bist_done,
  // system port
  input  logic          sys_req,
  input  logic          sys_we,
  input  logic [AW-1:0] sys_addr,
  output logic          sys_ready,
  output logic          rvalid,
  // test pattern generator
  input  logic [AW-1:0] tpg_addr,
  output logic          tpg_load,
  output logic          tpg_step,
  // RAM
  output logic          mem_act,
  output logic [AW-1:0] mem_addr,
  output logic          mem_wr,
  // data / test register
  output logic          dr_load,
  output logic          tr_load,
  output logic          use_dr,
  // compressor and C_REF
  output logic          odc_clr,
  output logic          odc_en,
  output logic [AW-1:0] odc_addr,
  output logic          cref_load,
  output logic          check
);
  import sabist_pkg::*;

  bist_state_e   state, state_n;
  logic [AW-1:0] cnt;
  logic          init_pend, bist_pend, loop_bist;
  // pipeline stage 1 (word on the switching matrix) and 2 (word in the test register)
  logic          s1_valid, s1_scan, s1_we;
  logic [AW-1:0] s1_addr;
  logic          s2_valid, s2_we;
  logic [AW-1:0] s2_addr;
  logic          upd_q;   // stage 3: compressor adjusted, copy it to C_REF

  logic quiet, start_loop, take_sys, last;

  assign quiet      = !s2_valid && !upd_q;
  assign start_loop = (state == ST_IDLE) && (init_pend || bist_pend) && quiet;
  assign sys_ready  = (state == ST_IDLE) && !init_pend && !bist_pend;
  assign take_sys   = sys_req && sys_ready;
  assign last       = (cnt == '1);
  assign busy       = (state inside {ST_INIT_RUN, ST_BIST_RUN, ST_FLUSH}) || init_pend || bist_pend;

  always_comb begin
    state_n   = state;
    tpg_load  = 1'b0;
    tpg_step  = 1'b0;
    mem_act   = 1'b0;
    mem_addr  = sys_addr;
    odc_clr   = 1'b0;
    dr_load   = 1'b0;
    init_done = 1'b0;
    bist_done = 1'b0;
    check     = 1'b0;
    cref_load = upd_q;
    unique case (state)
      ST_IDLE: begin
        if (start_loop) begin
          odc_clr  = 1'b1;
          tpg_load = 1'b1;
          state_n  = init_pend ? ST_INIT_RUN : ST_BIST_RUN;
        end else if (take_sys) begin
          mem_act = 1'b1;
          dr_load = sys_we;
          state_n = ST_SYS_ACC;
        end
      end
      ST_SYS_ACC: state_n = ST_IDLE;
      ST_INIT_RUN, ST_BIST_RUN: begin
        mem_act  = 1'b1;
        mem_addr = tpg_addr;
        tpg_step = 1'b1;
        if (last) state_n = ST_FLUSH;
      end
      ST_FLUSH: begin
        if (!s1_valid && !s2_valid) begin
          if (loop_bist) begin
            check     = 1'b1;
            bist_done = 1'b1;
          end else begin
            cref_load = 1'b1;
            init_done = 1'b1;
          end
          state_n = ST_IDLE;
        end
      end
      default: state_n = ST_IDLE;
    endcase
  end

  // stage 1 / 2 / 3 controls
  assign mem_wr   = s1_valid && s1_we;
  assign tr_load  = s1_valid && (s1_scan || s1_we);
  assign rvalid   = s1_valid && !s1_scan && !s1_we;
  assign odc_en   = s2_valid;
  assign odc_addr = s2_addr;
  assign use_dr   = s2_we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      cnt       <= '0;
      init_pend <= 1'b0;
      bist_pend <= 1'b0;
      loop_bist <= 1'b0;
      s1_valid  <= 1'b0;
      s1_scan   <= 1'b0;
      s1_we     <= 1'b0;
      s1_addr   <= '0;
      s2_valid  <= 1'b0;
      s2_we     <= 1'b0;
      s2_addr   <= '0;
      upd_q     <= 1'b0;
    end else begin
      state <= state_n;

      // loop requests; a pending initialization goes before a pending BIST
      if (start_loop) begin
        loop_bist <= !init_pend;
        if (init_pend) init_pend <= 1'b0;
        else           bist_pend <= 1'b0;
      end
      if (init_start) init_pend <= 1'b1;
      if (bist_start) bist_pend <= 1'b1;

      if (start_loop)                                   cnt <= '0;
      else if (state inside {ST_INIT_RUN, ST_BIST_RUN}) cnt <= cnt + AW'(1);

      s1_valid <= mem_act;
      s1_scan  <= (state inside {ST_INIT_RUN, ST_BIST_RUN});
      s1_we    <= mem_act && (state == ST_IDLE) && sys_we;
      s1_addr  <= mem_addr;

      s2_valid <= s1_valid && (s1_scan || s1_we);
      s2_we    <= s1_valid && s1_we;
      s2_addr  <= s1_addr;

      upd_q    <= s2_valid && s2_we;
    end
  end

  // a write adjustment must never meet a compressor clear
  always_ff @(posedge clk) begin
    assert (!(odc_clr && odc_en)) else $error("bist_ctrl: clear during absorb");
  end
endmodule
