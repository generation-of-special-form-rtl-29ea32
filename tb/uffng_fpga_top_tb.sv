// End-to-end testbench of uffng_fpga_top.
//
// A producer streams candidate feedback functions of orders 2 to 14 into the
// accelerator: primitive linear functions, the nonlinear form g + x_i + x_i x_j
// built on them, random masks and singular functions (no x_0 term), in bursts
// that fill the job buffer and in trickles that leave the tester waiting.
// A consumer takes verdicts with random back-pressure.  Every verdict is
// compared, in order, with the software model (maximal flag, step count, echoed
// masks).  Whenever the next function was already waiting in the buffer when a
// verdict left, the next verdict must follow exactly steps + 1 cycles later,
// plus the cycles it was itself held back by the consumer: the tester loses one
// cycle per function and none on the host link.
//
// Mechanisms counted, each must occur at least once: buffer full (host held
// off), tester starved (idle with an empty buffer), early exit (state 1 came
// back too soon), maximal verdict, maximal verdict of a nonlinear function,
// full-length run without return to state 1, result stall, back-to-back
// hand-over, and at least 8 different orders.
module uffng_fpga_top_tb;
  import uffng_pkg::*;
  import uffng_ref_pkg::*;

  localparam int unsigned BUF_DEPTH = 4;
  localparam int unsigned NJOBS     = 600;

  logic    clk = 0, rst_n = 0;
  logic    in_valid, in_ready, out_valid, out_ready, busy;
  job_t    in_job;
  result_t out_result;
  logic [$clog2(BUF_DEPTH+1)-1:0] buf_count;

  uffng_fpga_top #(.BUF_DEPTH(BUF_DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  int unsigned n_full = 0, n_starved = 0, n_early = 0, n_max = 0, n_nl_max = 0;
  int unsigned n_noreturn = 0, n_stall = 0, n_b2b = 0, n_results = 0, n_timed = 0;
  bit          order_seen[NMAX_DEF+1];
  longint unsigned cycle = 0;

  typedef struct {
    job_t            job;
    bit              maximal;
    longint unsigned steps;
  } exp_t;
  exp_t expq[$];

  task automatic expect_eq(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Primitive trinomials x^n + x^a + 1 (a listed), n = 2..14 where one exists;
  // other orders use known primitive pentanomials.
  function automatic logic [31:0] prim_mask(input int unsigned n);
    // mask bit N-1-i selects x_i; recurrence s_{k+n} = s_k + s_{k+a} (+ ...)
    int unsigned taps[$];
    unique case (n)
      2: taps = '{1};  3: taps = '{1};  4: taps = '{1};  5: taps = '{2};
      6: taps = '{1};  7: taps = '{1};  9: taps = '{4}; 10: taps = '{3};
      11: taps = '{2}; 15: taps = '{1};
      8: taps = '{2, 3, 4};        // x^8 + x^4 + x^3 + x^2 + 1
      12: taps = '{1, 4, 6};       // x^12 + x^6 + x^4 + x + 1
      13: taps = '{1, 3, 4};       // x^13 + x^4 + x^3 + x + 1
      14: taps = '{1, 6, 10};      // x^14 + x^10 + x^6 + x + 1
      default: taps = '{1};
    endcase
    prim_mask = 32'(1) << (n - 1);                          // x_0
    foreach (taps[t]) prim_mask |= 32'(1) << (n - 1 - taps[t]);
  endfunction

  function automatic job_t make_job(input int unsigned kind);
    int unsigned n = $urandom_range(14, 2);
    logic [31:0] nm = (32'(1) << n) - 1;
    int unsigned i = $urandom_range(n - 1, 1), j = $urandom_range(n - 1, 1);
    job_t jb;
    jb.order = ORDER_W'(n);
    unique case (kind % 4)
      0: begin jb.lfsr = prim_mask(n); jb.nlfsr = '0; end
      1: begin                                           // g + x_i + x_i x_j
        jb.lfsr  = prim_mask(n) ^ (32'(1) << (n - 1 - i));
        jb.nlfsr = (32'(1) << (n - 1 - i)) | (32'(1) << (n - 1 - j));
      end
      2: begin jb.lfsr = ($urandom & nm) | (32'(1) << (n - 1)); jb.nlfsr = $urandom & $urandom & nm; end
      default: begin jb.lfsr = $urandom & (nm >> 1); jb.nlfsr = $urandom & $urandom & (nm >> 1); end
    endcase
    return jb;
  endfunction

  // Producer
  initial begin
    in_valid = 0; in_job = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < NJOBS; k++) begin
      exp_t e;
      bit   m;
      e.job   = make_job($urandom);
      e.steps = period_ref(e.job.order, 64'(e.job.lfsr), 64'(e.job.nlfsr), m);
      e.maximal = m;
      expq.push_back(e);
      in_valid = 1;
      in_job   = e.job;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1 in_valid = 0;
      // bursts of back-to-back writes, then pauses that starve the tester
      if ((k / 40) % 2 == 1) begin
        repeat ($urandom_range(300)) @(posedge clk);
        #1;
      end
    end
  end

  // Consumer: random back-pressure in some phases
  always @(negedge clk) out_ready <= (n_results / 100) % 2 == 0 ? 1'b1 : ($urandom_range(3) != 0);

  // Monitor
  longint unsigned last_t = 0;
  bit              next_waiting = 0;
  longint unsigned stall_cyc = 0;    // cycles the current verdict waited
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (in_valid && !in_ready) n_full++;
      if (!busy && !out_valid && buf_count == 0) n_starved++;
      if (out_valid && !out_ready) begin
        n_stall++;
        stall_cyc++;
      end
      if (out_valid && out_ready) begin
        exp_t e;
        longint unsigned full_len;
        if (expq.size() == 0) begin
          failures++;
          $display("FAIL unexpected result");
        end else begin
          e = expq.pop_front();
          full_len = (64'd1 << e.job.order) - 1;
          expect_eq("maximal", 64'(out_result.maximal), 64'(e.maximal));
          expect_eq("steps", 64'(out_result.steps), e.steps);
          expect_eq("lfsr echo", 64'(out_result.job.lfsr), 64'(e.job.lfsr));
          expect_eq("order echo", 64'(out_result.job.order), 64'(e.job.order));
          if (next_waiting) begin
            expect_eq("hand-over timing", cycle - last_t, e.steps + 1 + stall_cyc);
            n_timed++;
          end
          if (e.maximal) n_max++;
          if (e.maximal && e.job.nlfsr != 0) n_nl_max++;
          if (!e.maximal && e.steps < full_len) n_early++;
          if (!e.maximal && e.steps == full_len) n_noreturn++;
          order_seen[e.job.order] = 1;
        end
        n_results++;
        stall_cyc = 0;
        last_t = cycle;
        next_waiting = (buf_count != 0);   // taken by the tester at this edge
        if (next_waiting) n_b2b++;
      end
    end
  end

  initial begin
    int unsigned n_orders;
    wait (n_results == NJOBS);
    repeat (5) @(posedge clk);
    n_orders = 0;
    foreach (order_seen[o]) n_orders += int'(order_seen[o]);
    $display("buffer full %0d, tester starved %0d, early exit %0d, maximal %0d (nonlinear %0d),",
             n_full, n_starved, n_early, n_max, n_nl_max);
    $display("no return %0d, result stall %0d, back-to-back %0d, timed hand-overs %0d, orders %0d",
             n_noreturn, n_stall, n_b2b, n_timed, n_orders);
    expect_eq("buffer full seen", n_full > 0, 1);
    expect_eq("tester starved seen", n_starved > 0, 1);
    expect_eq("early exit seen", n_early > 0, 1);
    expect_eq("maximal seen", n_max > 0, 1);
    expect_eq("nonlinear maximal seen", n_nl_max > 0, 1);
    expect_eq("no-return run seen", n_noreturn > 0, 1);
    expect_eq("result stall seen", n_stall > 0, 1);
    expect_eq("back-to-back seen", n_b2b > 0, 1);
    expect_eq("timed hand-over seen", n_timed > 0, 1);
    expect_eq("orders seen >= 8", n_orders >= 8, 1);
    expect_eq("queue drained", expq.size(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
