// tb_char_parity_tree: checks the EXOR tree F0..FL against a bit-by-bit
// reference: F0 = parity of the word, Fi = parity of the bits whose position
// has bit i-1 set. Exhaustive for N = 4, 7 and 8, random for N = 32.
module tb_char_parity_tree;
  int checks = 0, failures = 0;

  logic [3:0]  w4;  logic [2:0] f4;
  logic [6:0]  w7;  logic [3:0] f7;
  logic [7:0]  w8;  logic [3:0] f8;
  logic [31:0] w32; logic [5:0] f32;

  char_parity_tree #(.N(4))  u4  (.word(w4),  .f(f4));
  char_parity_tree #(.N(7))  u7  (.word(w7),  .f(f7));
  char_parity_tree           u8  (.word(w8),  .f(f8));
  char_parity_tree #(.N(32)) u32 (.word(w32), .f(f32));

  // reference: EXOR of the bit positions of the ones, and their count parity
  function automatic logic [5:0] ref_f(input logic [31:0] w, input int n, input int l);
    logic [4:0] pos;
    logic       par;
    pos = '0;
    par = 1'b0;
    for (int b = 0; b < n; b++) if (w[b]) begin
      pos ^= 5'(b);
      par ^= 1'b1;
    end
    return 6'({pos, par} & ((6'd1 << (l + 1)) - 6'd1));
  endfunction

  task automatic check(input logic [5:0] got, input logic [5:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      w4 = 4'(v); #1;
      check(6'(f4), ref_f(32'(v), 4, 2), $sformatf("N=4 word %h", v));
    end
    for (int v = 0; v < 128; v++) begin
      w7 = 7'(v); #1;
      check(6'(f7), ref_f(32'(v), 7, 3), $sformatf("N=7 word %h", v));
    end
    for (int v = 0; v < 256; v++) begin
      w8 = 8'(v); #1;
      check(6'(f8), ref_f(32'(v), 8, 3), $sformatf("N=8 word %h", v));
    end
    for (int v = 0; v < 2000; v++) begin
      w32 = $urandom(); #1;
      check(f32, ref_f(w32, 32, 5), $sformatf("N=32 word %h", w32));
    end
    // one-hot words: F1..FL is the bit position, F0 = 1
    for (int b = 0; b < 32; b++) begin
      w32 = 32'd1 << b; #1;
      check(f32, {5'(b), 1'b1}, $sformatf("N=32 one-hot %0d", b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
