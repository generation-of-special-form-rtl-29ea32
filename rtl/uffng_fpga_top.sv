// FPGA period-test accelerator for feedback shift registers.
//
// A host streams candidate feedback functions (order N, linear mask, product
// mask) into the accelerator and gets back, for each one, whether the register
// it defines runs through all 2^N - 1 nonzero states.  The functions are data,
// not logic, so a screening run of millions of candidates needs no
// resynthesis.  Two stages:
//   job_buffer    : holds functions that arrive while the tester is busy, so
//                   the next one is ready the moment a test ends;
//   period_tester : steps the register once per clock from state 1 and stops
//                   at the first return to state 1 (early exit) or at step
//                   2^N - 1.
// Verdicts leave on out_valid/out_ready in the order the functions came in.
//
// In the source design a soft processor talks to the host and keeps the
// waiting functions in its memory; here that buffering is a hardware queue,
// and the processor and the host link are left outside: the in_* and out_*
// ports are where they connect.  One tester instance; the buffer depth is this
// design's choice.
//
// Timing: a function reaches the tester one cycle after it is written into
// an empty buffer; a test of k steps takes k cycles (see period_tester).
module uffng_fpga_top
  import uffng_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 16
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  output logic                           in_ready,
  input  job_t                           in_job,
  output logic                           out_valid,
  input  logic                           out_ready,
  output result_t                        out_result,
  output logic                           busy,
  output logic [$clog2(BUF_DEPTH+1)-1:0] buf_count
);

  logic buf_valid, buf_ready;
  job_t buf_job;

  job_buffer #(.WIDTH($bits(job_t)), .DEPTH(BUF_DEPTH)) u_buf (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .in_data   (in_job),
    .out_valid (buf_valid),
    .out_ready (buf_ready),
    .out_data  (buf_job),
    .count     (buf_count)
  );

  period_tester u_tester (
    .clk       (clk),
    .rst_n     (rst_n),
    .job_valid (buf_valid),
    .job_ready (buf_ready),
    .job       (buf_job),
    .res_valid (out_valid),
    .res_ready (out_ready),
    .res       (out_result),
    .busy      (busy)
  );

endmodule
