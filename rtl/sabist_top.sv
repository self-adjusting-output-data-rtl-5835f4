// sabist_top: word-oriented DRAM with self-adjusting BIST (modulo-2 address
// characteristic).
//
// The memory is checked for consistency by comparing a reference
// characteristic C_REF with a test characteristic C_TEST. Both are the EXOR of
// the bit addresses {word address, bit position} of all "1" cells. C_REF is
// learned once by an initialization loop and then kept up to date by every
// write in a single step (the compressor absorbs old xor new at the written
// address), so it never has to be re-learned. A BIST loop recomputes C_TEST
// from the array and compares; C_REF xor C_TEST is the syndrome, which is the
// faulty cell's address when one cell is wrong.
//
// Blocks: bist_ctrl (control unit), tpg (address generator), dram_core (array,
// refreshment register, switching matrix), diff_unit (data and test
// registers), odc_word (compressor, built from char_parity_tree and odc_bit),
// cref_compare (C_REF register and comparator).
//
// Interface: pulse `init_start` to learn C_REF (2**AW + 3 clocks) and
// `bist_start` to run a test (same length); `init_done`/`bist_done` pulse at
// the end, `bist_fail` and `syndrome` hold the last result. The system port
// takes one access per two clocks when `sys_ready` is high; read data come on
// `rdata` with `rvalid`, one clock after the request. The BIST equipment is
// outside the read path: a read costs what the RAM alone costs.
// Defaults: 2**20 words of 8 bits (first configuration of the paper's cost
// table), rows of 128 words (this design's choice), LFSR address generator.
module sabist_top #(
  parameter int unsigned AW       = 20,
  parameter int unsigned N        = 8,
  parameter int unsigned CW       = 7,
  parameter bit          USE_LFSR = 1'b1,
  parameter int unsigned L        = $clog2(N),
  parameter int unsigned K        = AW + L
) (
  input  logic          clk,
  input  logic          rst_n,
  // BIST requests and results
  input  logic          init_start,
  input  logic          bist_start,
  output logic          busy,
  output logic          init_done,
  output logic          bist_done,
  output logic          cref_valid,
  output logic          bist_fail,
  output logic [K-1:0]  syndrome,
  output logic [K-1:0]  c_ref,
  output logic [K-1:0]  c_odc,
  output logic          cref_match,
  // system port
  input  logic          sys_req,
  input  logic          sys_we,
  input  logic [AW-1:0] sys_addr,
  input  logic [N-1:0]  sys_wdata,
  output logic          sys_ready,
  output logic          rvalid,
  output logic [N-1:0]  rdata
);
  logic          tpg_load, tpg_step;
  logic [AW-1:0] tpg_addr;
  logic          mem_act, mem_wr;
  logic [AW-1:0] mem_addr;
  logic [N-1:0]  mem_word;
  logic          dr_load, tr_load, use_dr;
  logic [N-1:0]  dr, odc_word_in;
  logic          odc_clr, odc_en;
  logic [AW-1:0] odc_addr;
  logic          cref_load, check;

  bist_ctrl #(.AW(AW)) u_ctrl (
    .clk, .rst_n,
    .init_start, .bist_start, .busy, .init_done, .bist_done,
    .sys_req, .sys_we, .sys_addr, .sys_ready, .rvalid,
    .tpg_addr, .tpg_load, .tpg_step,
    .mem_act, .mem_addr, .mem_wr,
    .dr_load, .tr_load, .use_dr,
    .odc_clr, .odc_en, .odc_addr, .cref_load, .check
  );

  tpg #(.AW(AW), .USE_LFSR(USE_LFSR)) u_tpg (
    .clk, .rst_n, .load(tpg_load), .step(tpg_step), .addr(tpg_addr)
  );

  dram_core #(.AW(AW), .N(N), .CW(CW)) u_mem (
    .clk, .act(mem_act), .addr(mem_addr), .wr(mem_wr), .wdata(dr), .word(mem_word)
  );

  diff_unit #(.N(N)) u_diff (
    .clk, .rst_n,
    .dr_load, .dr_in(sys_wdata),
    .tr_load, .tr_in(mem_word),
    .use_dr, .dr, .word_out(odc_word_in)
  );

  odc_word #(.AW(AW), .N(N), .L(L), .K(K)) u_odc (
    .clk, .rst_n, .clr(odc_clr), .en(odc_en), .addr(odc_addr), .word(odc_word_in),
    .c(c_odc)
  );

  cref_compare #(.K(K)) u_cref (
    .clk, .rst_n, .load(cref_load), .check, .c_odc,
    .c_ref, .valid(cref_valid), .match(cref_match), .fail(bist_fail), .syndrome
  );

  assign rdata = mem_word;
endmodule
