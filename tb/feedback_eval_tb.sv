// Self-checking testbench of feedback_eval.
//
// Drives random and directed (state, linear mask, product mask) triples into
// the 32-bit evaluator and compares its three outputs with values computed here
// from the definition: parity of the selected linear bits, and the integer
// quotient popcount(state & product mask) / popcount(product mask), taken as 0
// for an empty product mask.  Directed cases cover the empty mask, a product
// with all its variables 1, one variable missing, and a full mask.
module feedback_eval_tb;
  import uffng_ref_pkg::*;

  localparam int unsigned NMAX = 32;

  logic [NMAX-1:0] state, lm, nm;
  logic            b_l, b_n, fb;
  int unsigned     checks = 0, failures = 0;

  feedback_eval #(.NMAX(NMAX)) dut (
    .state(state), .lfsr_mask(lm), .nlfsr_mask(nm),
    .b_lfsr(b_l), .b_nlfsr(b_n), .fb_bit(fb)
  );

  task automatic check_one(input logic [NMAX-1:0] s, input logic [NMAX-1:0] l,
                           input logic [NMAX-1:0] n);
    int unsigned el, en, pn;
    state = s; lm = l; nm = n;
    #1;
    el = popcount(64'(s & l)) % 2;
    pn = popcount(64'(n));
    en = (pn == 0) ? 0 : popcount(64'(s & n)) / pn;
    checks++;
    if (b_l !== el[0] || b_n !== en[0] || fb !== (el[0] ^ en[0])) begin
      failures++;
      $display("FAIL s=%h l=%h n=%h got %b%b%b exp %0d%0d", s, l, n, b_l, b_n, fb, el, en);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NMAX-1:0] s, n;
    check_one('0, '0, '0);
    check_one('1, '1, '0);
    check_one('1, 32'h0000_0001, '1);
    check_one(32'h0040_0200, 32'h0, 32'h0040_0200);      // both product bits set
    check_one(32'h0000_0200, 32'h0, 32'h0040_0200);      // one missing
    check_one(32'hFFFF_FFFF, 32'h1234_5678, 32'hFFFF_FFFF);
    check_one(32'h7FFF_FFFF, 32'h1234_5678, 32'hFFFF_FFFF);
    for (int i = 0; i < 3000; i++) begin
      s = $urandom;
      n = $urandom & $urandom & $urandom;   // sparse product masks
      if (i % 3 == 0) s = s | n;            // often make the product true
      check_one(s, $urandom, n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
