// Reference model for the period-tester testbenches.
//
// period_ref runs the period-test algorithm step by step in software, written
// directly from its definition (popcounts and an integer division, not the
// equality compare the hardware uses), and returns the verdict and the number
// of steps after which the test ends.  euler_phi and prim_count give the
// number of primitive polynomials of degree n, phi(2^n - 1) / n, an
// independent count that the linear-only sweeps are checked against.
package uffng_ref_pkg;

  function automatic int unsigned popcount(input longint unsigned v);
    int unsigned c = 0;
    for (int k = 0; k < 64; k++) c += int'(v[k]);
    return c;
  endfunction

  // Returns the step count at which the test ends; maximal set accordingly.
  function automatic longint unsigned period_ref(
      input int unsigned n, input longint unsigned lfsr, input longint unsigned nlfsr,
      output bit maximal);
    longint unsigned mask  = (64'd1 << n) - 1;
    longint unsigned state = 1;
    longint unsigned nl    = nlfsr & mask;
    int unsigned     pn    = popcount(nl);
    maximal = 0;
    for (longint unsigned i = 1; i <= mask; i++) begin
      int unsigned b_l = popcount(state & lfsr) % 2;
      int unsigned b_n = (pn == 0) ? 0 : popcount(state & nl) / pn;
      state = ((state << 1) ^ longint'(b_l ^ b_n)) & mask;
      if (state == 1) begin
        maximal = (i == mask);
        return i;
      end
    end
    return mask;
  endfunction

  function automatic longint unsigned euler_phi(input longint unsigned m);
    longint unsigned r = m, x = m;
    for (longint unsigned p = 2; p * p <= x; p++) begin
      if (x % p == 0) begin
        while (x % p == 0) x /= p;
        r -= r / p;
      end
    end
    if (x > 1) r -= r / x;
    return r;
  endfunction

  function automatic int unsigned prim_count(input int unsigned n);
    return int'(euler_phi((64'd1 << n) - 1) / n);
  endfunction

endpackage
