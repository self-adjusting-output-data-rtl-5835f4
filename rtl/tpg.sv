// tpg: test pattern generator of the memory BIST. It produces every word
// address of the RAM exactly once per loop of 2**AW steps, in an order that
// does not matter to the modulo-2 address characteristic.
//
// USE_LFSR = 1 (default): a Fibonacci LFSR with a primitive feedback polynomial
//   (taps from sabist_pkg::lfsr_taps) and initial state 0...01, as the paper
//   suggests. A plain LFSR skips the all-zero state; this design adds the usual
//   de Bruijn correction (the feedback bit is inverted while all bits below the
//   MSB are zero), so word address 0 is visited too and the period is 2**AW.
// USE_LFSR = 0: a binary up counter starting at 0, the paper's alternative.
//
// Interface: `load` puts the generator into its initial state, `step`
// advances it by one address; `addr` is the current address (registered).
// Both take effect at the rising clock edge; `load` wins over `step`.
module tpg #(
  parameter int unsigned AW       = 20,
  parameter bit          USE_LFSR = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          step,
  output logic [AW-1:0] addr
);
  import sabist_pkg::*;

  localparam logic [31:0]   TAPS32 = lfsr_taps(AW);
  localparam logic [AW-1:0] TAPS   = TAPS32[AW-1:0];
  localparam logic [AW-1:0] SEED   = USE_LFSR ? AW'(1) : '0;

  logic [AW-1:0] nxt;

  always_comb begin
    if (USE_LFSR) begin
      // feedback of the primitive polynomial, plus the zero-state insertion
      nxt = {addr[AW-2:0], (^(addr & TAPS)) ^ (addr[AW-2:0] == '0)};
    end else begin
      nxt = addr + AW'(1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    addr <= SEED;
    else if (load) addr <= SEED;
    else if (step) addr <= nxt;
  end

  initial begin
    assert (AW >= 2 && AW <= 32) else $error("tpg: AW must be 2..32");
  end
endmodule
