// Feedback-bit evaluator of the period tester (steps 2.1 to 2.3 of the
// period-test algorithm).
//
// The feedback function is given at run time as two masks instead of as
// fixed logic, so one circuit serves every candidate function:
//   b_lfsr  = parity(state & lfsr_mask)                         linear part
//   b_nlfsr = floor(popcount(state & nlfsr_mask) / popcount(nlfsr_mask))
//   fb_bit  = b_lfsr ^ b_nlfsr
// The quotient can only be 0 or 1, because the numerator never exceeds the
// denominator; it is 1 exactly when the two popcounts are equal, i.e. when every
// variable of the product term is 1.  The divider is therefore built as an
// equality compare of the two popcounts.  An all-zero nonlinear mask (a purely
// linear function) gives b_nlfsr = 0; this case is not defined by the
// algorithm and is this design's choice.
//
// Purely combinational; the tester registers its output every cycle.
module feedback_eval #(
  parameter int unsigned NMAX = 32
) (
  input  logic [NMAX-1:0] state,
  input  logic [NMAX-1:0] lfsr_mask,
  input  logic [NMAX-1:0] nlfsr_mask,
  output logic            b_lfsr,
  output logic            b_nlfsr,
  output logic            fb_bit
);

  localparam int unsigned CW = $clog2(NMAX + 1);

  logic [NMAX-1:0] lin_sel, prod_sel;
  logic [CW-1:0]   pc_sel, pc_mask;

  assign lin_sel  = state & lfsr_mask;
  assign prod_sel = state & nlfsr_mask;

  // Population counts of the selected product variables and of the mask.
  always_comb begin
    pc_sel  = '0;
    pc_mask = '0;
    for (int unsigned k = 0; k < NMAX; k++) begin
      pc_sel  = pc_sel  + CW'(prod_sel[k]);
      pc_mask = pc_mask + CW'(nlfsr_mask[k]);
    end
  end

  assign b_lfsr  = ^lin_sel;
  assign b_nlfsr = (pc_mask != '0) && (pc_sel == pc_mask);
  assign fb_bit  = b_lfsr ^ b_nlfsr;

endmodule
