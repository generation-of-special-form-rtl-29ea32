// Shared types of the feedback-shift-register period tester.
//
// A job is one candidate feedback function: the register order N and two
// bit masks over the N-bit state.  Bit k of a mask selects state bit k.  The
// state shifts towards the MSB and the new feedback bit enters at bit 0, so for
// a function written as f(x_0..x_{N-1}) with x_0 the oldest bit (the one that
// leaves the register), variable x_i sits at state bit N-1-i.
//   lfsr  : variables whose XOR forms the linear part of f
//   nlfsr : variables whose AND forms the single nonlinear (product) term of f
// A result echoes the job and adds the verdict and the number of steps run.
package uffng_pkg;

  // Widest register order the hardware supports (state and mask width).
  localparam int unsigned NMAX_DEF = 32;

  // Width of the order field: holds 0..NMAX_DEF.
  localparam int unsigned ORDER_W = $clog2(NMAX_DEF + 1);

  typedef struct packed {
    logic [ORDER_W-1:0]  order;  // N, 1..NMAX_DEF
    logic [NMAX_DEF-1:0] lfsr;   // linear part mask
    logic [NMAX_DEF-1:0] nlfsr;  // nonlinear part mask
  } job_t;

  typedef struct packed {
    job_t                job;
    logic                maximal;  // 1: period is exactly 2^N - 1
    logic [NMAX_DEF-1:0] steps;    // steps executed before the test ended
  } result_t;

endpackage
