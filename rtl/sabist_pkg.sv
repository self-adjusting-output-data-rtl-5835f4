// sabist_pkg: types and helper functions shared by the self-adjusting memory
// BIST (modulo-2 address characteristic) blocks.
//
// - bist_state_e : states of the BIST control unit (bist_ctrl).
// - lfsr_taps()  : feedback taps of a primitive polynomial of degree 2..32,
//                  used by the test pattern generator (tpg). The bit i-1 of the
//                  returned mask is set when X^i is a term of the polynomial
//                  (the X^0 term is implied). The polynomials are standard
//                  maximum-length choices; the table is this design's own, the
//                  paper only asks for "an LFSR with primitive feedback
//                  polynomial".
package sabist_pkg;

  // Control unit states. INIT_RUN/BIST_RUN are the two loops, SYS_ACC is the
  // second cycle of a system access (a write takes SYS_IDLE + SYS_ACC), FLUSH
  // drains the two-stage read pipeline at the end of a loop.
  typedef enum logic [2:0] {
    ST_IDLE     = 3'd0,
    ST_SYS_ACC  = 3'd1,
    ST_INIT_RUN = 3'd2,
    ST_BIST_RUN = 3'd3,
    ST_FLUSH    = 3'd4
  } bist_state_e;

  function automatic logic [31:0] lfsr_taps(input int unsigned width);
    logic [31:0] t;
    t = '0;
    case (width)
      2:  t = (32'd1 << 1) | (32'd1 << 0);
      3:  t = (32'd1 << 2) | (32'd1 << 1);
      4:  t = (32'd1 << 3) | (32'd1 << 2);
      5:  t = (32'd1 << 4) | (32'd1 << 2);
      6:  t = (32'd1 << 5) | (32'd1 << 4);
      7:  t = (32'd1 << 6) | (32'd1 << 5);
      8:  t = (32'd1 << 7) | (32'd1 << 5) | (32'd1 << 4) | (32'd1 << 3);
      9:  t = (32'd1 << 8) | (32'd1 << 4);
      10: t = (32'd1 << 9) | (32'd1 << 6);
      11: t = (32'd1 << 10) | (32'd1 << 8);
      12: t = (32'd1 << 11) | (32'd1 << 5) | (32'd1 << 3) | (32'd1 << 0);
      13: t = (32'd1 << 12) | (32'd1 << 3) | (32'd1 << 2) | (32'd1 << 0);
      14: t = (32'd1 << 13) | (32'd1 << 4) | (32'd1 << 2) | (32'd1 << 0);
      15: t = (32'd1 << 14) | (32'd1 << 13);
      16: t = (32'd1 << 15) | (32'd1 << 14) | (32'd1 << 12) | (32'd1 << 3);
      17: t = (32'd1 << 16) | (32'd1 << 13);
      18: t = (32'd1 << 17) | (32'd1 << 10);
      19: t = (32'd1 << 18) | (32'd1 << 5) | (32'd1 << 1) | (32'd1 << 0);
      20: t = (32'd1 << 19) | (32'd1 << 16);
      21: t = (32'd1 << 20) | (32'd1 << 18);
      22: t = (32'd1 << 21) | (32'd1 << 20);
      23: t = (32'd1 << 22) | (32'd1 << 17);
      24: t = (32'd1 << 23) | (32'd1 << 22) | (32'd1 << 21) | (32'd1 << 16);
      25: t = (32'd1 << 24) | (32'd1 << 21);
      26: t = (32'd1 << 25) | (32'd1 << 5) | (32'd1 << 1) | (32'd1 << 0);
      27: t = (32'd1 << 26) | (32'd1 << 4) | (32'd1 << 1) | (32'd1 << 0);
      28: t = (32'd1 << 27) | (32'd1 << 24);
      29: t = (32'd1 << 28) | (32'd1 << 26);
      30: t = (32'd1 << 29) | (32'd1 << 5) | (32'd1 << 3) | (32'd1 << 0);
      31: t = (32'd1 << 30) | (32'd1 << 27);
      32: t = (32'd1 << 31) | (32'd1 << 21) | (32'd1 << 1) | (32'd1 << 0);
      default: t = '0;
    endcase
    return t;
  endfunction

endpackage
