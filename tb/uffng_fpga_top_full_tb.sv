// Full-size testbench of uffng_fpga_top: default parameters, full-length runs.
//
// Orders from the benchmark range (23 to 30) are tested to the end, one step
// per clock:
//   1. x^23 + x^5 + 1, a primitive trinomial: must be maximal after exactly
//      2^23 - 1 steps.
//   2. Three nonlinear order-23 functions g + x_i + x_i x_j on that trinomial,
//      compared with the software model (verdict and step count).
//   3. The primitive trinomial x^29 + x^2 + 1, order 29 being the largest of
//      the benchmark orders run on the FPGA: maximal after exactly 2^29 - 1
//      steps (about four minutes of simulation).
//   4. Only with +degree30 on the command line (about 8 more minutes): a degree-30
//      nonlinear function of the square m-sequence form
//        f = x0+x1+x4+x6+x8+x12+x14+x16+x23+x28 + x9 + x9*x22,
//      which generates an m-sequence: maximal after exactly 2^30 - 1 steps.
// Each run's cycle count, from the write into the empty buffer to the verdict,
// must be steps + 2.
module uffng_fpga_top_full_tb;
  import uffng_pkg::*;
  import uffng_ref_pkg::*;

  logic    clk = 0, rst_n = 0;
  logic    in_valid, in_ready, out_valid, out_ready, busy;
  job_t    in_job;
  result_t out_result;
  logic [$clog2(16+1)-1:0] buf_count;

  uffng_fpga_top dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #20_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // x_i of an order-n function sits at state bit n-1-i.
  function automatic logic [31:0] vars(input int unsigned n, input int unsigned idx[]);
    vars = '0;
    foreach (idx[k]) vars |= 32'(1) << (n - 1 - idx[k]);
  endfunction

  task automatic run(input string name, input int unsigned n, input logic [31:0] l,
                     input logic [31:0] nl, input bit exp_max, input longint unsigned exp_steps);
    longint unsigned t0;
    in_valid = 1;
    in_job   = '{order: ORDER_W'(n), lfsr: l, nlfsr: nl};
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    t0 = cycle;
    #1 in_valid = 0;
    @(posedge clk);
    while (!out_valid) @(posedge clk);
    expect_eq({name, " maximal"}, 64'(out_result.maximal), 64'(exp_max));
    expect_eq({name, " steps"}, 64'(out_result.steps), exp_steps);
    expect_eq({name, " cycles"}, cycle - t0, exp_steps + 2);
    $display("%s: order %0d maximal %0d steps %0d", name, n, out_result.maximal, out_result.steps);
    #1;
  endtask

  initial begin
    logic [31:0] g23, l, nl;
    bit m;
    longint unsigned st;
    in_valid = 0; out_ready = 1; in_job = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    g23 = vars(23, '{0, 5});
    run("x^23+x^5+1", 23, g23, '0, 1, (64'd1 << 23) - 1);

    for (int k = 0; k < 3; k++) begin
      int unsigned i, j;
      i  = $urandom_range(22, 1);
      j  = $urandom_range(22, 1);
      l  = g23 ^ vars(23, '{i});
      nl = vars(23, '{i, j});
      st = period_ref(23, 64'(l), 64'(nl), m);
      run($sformatf("order-23 g+x%0d+x%0d*x%0d", i, i, j), 23, l, nl, m, st);
    end

    run("x^29+x^2+1", 29, vars(29, '{0, 2}), '0, 1, (64'd1 << 29) - 1);

    if ($test$plusargs("degree30")) begin
      l  = vars(30, '{0, 1, 4, 6, 8, 12, 14, 16, 23, 28, 9});
      nl = vars(30, '{9, 22});
      run("degree-30 sample", 30, l, nl, 1, (64'd1 << 30) - 1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
