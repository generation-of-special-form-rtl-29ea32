// Period tester: decides whether a feedback shift register with a run-time
// feedback function has the maximal period 2^N - 1.
//
// How it works: the register starts in state 1 and is stepped once per clock,
// state := ((state << 1) | fb_bit) truncated to N bits, with fb_bit from
// feedback_eval.  A step counter runs alongside.  The register is maximal when
// state 1 comes back for the first time exactly at step 2^N - 1; if it comes
// back earlier the test stops at once with "not maximal", which is what makes
// bulk screening fast, since most candidates fall into short cycles.  If the
// register enters a cycle that does not contain state 1 the test runs all
// 2^N - 1 steps and reports "not maximal".  2^N - 1 is the N-bit all-ones
// value, so the same mask both truncates the state and ends the count.
// The order and the masks are data, so a new function needs no new circuit.
//
// Interface: job_valid/job_ready take a job_t; res_valid/res_ready give a
// result_t that echoes the job with the verdict and the number of steps run.
// A result is held until accepted; a new job can be taken in the same cycle.
//
// Timing: job accepted at a clock edge, then k steps take k cycles, and
// res_valid is high in the cycle after the k-th step edge; k is reported in
// res.steps.  Back-to-back jobs lose no cycle when res_ready is high.
//
// The algorithm (start at 1, mask-based linear and product terms, early exit
// on return to 1, verdict at step 2^N - 1) follows the source method.  The
// handshakes, the reported step count and the one-step-per-cycle schedule are
// this design's own choices.
module period_tester
  import uffng_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    job_valid,
  output logic    job_ready,
  input  job_t    job,
  output logic    res_valid,
  input  logic    res_ready,
  output result_t res,
  output logic    busy
);

  localparam int unsigned NMAX = NMAX_DEF;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} fsm_t;

  fsm_t            fsm;
  job_t            job_r;
  logic [NMAX-1:0] st;        // register state
  logic [NMAX-1:0] cnt;       // steps executed
  logic [NMAX-1:0] nbits;     // N-bit all-ones: truncation mask and 2^N - 1
  logic            maximal_r;

  logic [NMAX-1:0] st_next, cnt_next, job_nbits;
  logic            fb_bit;
  logic            take;

  feedback_eval #(.NMAX(NMAX)) u_fb (
    .state      (st),
    .lfsr_mask  (job_r.lfsr),
    .nlfsr_mask (job_r.nlfsr),
    .b_lfsr     (),
    .b_nlfsr    (),
    .fb_bit     (fb_bit)
  );

  assign job_nbits = {NMAX{1'b1}} >> (NMAX - int'(job.order));
  assign st_next   = ({st[NMAX-2:0], 1'b0} | NMAX'(fb_bit)) & nbits;
  assign cnt_next  = cnt + 1'b1;

  assign job_ready = (fsm == S_IDLE) || (fsm == S_DONE && res_ready);
  assign take      = job_valid && job_ready;
  assign res_valid = (fsm == S_DONE);
  assign busy      = (fsm == S_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm       <= S_IDLE;
      job_r     <= '0;
      st        <= '0;
      cnt       <= '0;
      nbits     <= '0;
      maximal_r <= 1'b0;
    end else begin
      unique case (fsm)
        S_RUN: begin
          st  <= st_next;
          cnt <= cnt_next;
          if (st_next == NMAX'(1) || cnt_next == nbits) begin
            maximal_r <= (st_next == NMAX'(1)) && (cnt_next == nbits);
            fsm       <= S_DONE;
          end
        end
        S_IDLE, S_DONE: begin
          if (take) begin
            job_r       <= job;
            job_r.nlfsr <= job.nlfsr & job_nbits;
            nbits       <= job_nbits;
            st          <= NMAX'(1);
            cnt         <= '0;
            maximal_r   <= 1'b0;
            fsm         <= S_RUN;
          end else if (fsm == S_DONE && res_ready) begin
            fsm <= S_IDLE;
          end
        end
        default: fsm <= S_IDLE;
      endcase
    end
  end

  assign res.job     = job_r;
  assign res.maximal = maximal_r;
  assign res.steps   = cnt;

  // The order must be 1..NMAX.
  a_order: assert property (@(posedge clk) disable iff (!rst_n)
    take |-> (job.order >= 1 && job.order <= ORDER_W'(NMAX)));

  // A verdict stays put until it is taken.
  a_res_hold: assert property (@(posedge clk) disable iff (!rst_n)
    res_valid && !res_ready |=> res_valid && $stable(res));

endmodule
