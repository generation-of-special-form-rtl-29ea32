// Self-checking testbench of period_tester.
//
// 1. Linear sweeps: for orders 3 to 9 every linear mask that contains the
//    oldest variable is tested; the number found maximal must equal the number
//    of primitive polynomials, phi(2^n - 1) / n.
// 2. Random functions of orders 1 to 12 with product terms, compared with the
//    software model (verdict and step count).
// 3. Timing: each test must take exactly as many cycles as it reports steps,
//    from the accepting clock edge to the first cycle res_valid is high, and
//    back-to-back jobs must be accepted in the cycle the verdict is taken.
// 4. Result stalls: res_ready is withheld at random; the verdict must hold.
// Orders 23 to 30 are exercised by the full-size testbench of the top.
module period_tester_tb;
  import uffng_pkg::*;
  import uffng_ref_pkg::*;

  logic    clk = 0, rst_n = 0;
  logic    job_valid, job_ready, res_valid, res_ready, busy;
  job_t    job;
  result_t res;

  int unsigned checks = 0, failures = 0;
  longint unsigned cycle = 0;

  period_tester dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #50_000_000;
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

  // Runs one job; stall_max>0 withholds res_ready for a random 1..stall_max
  // cycles after the verdict appears.  Signals are sampled at clock edges, so
  // res_valid, raised by the k-th step edge, is first seen at the edge after it:
  // k + 1 edges after the accepting one.
  task automatic run_job(input int unsigned n, input logic [31:0] l, input logic [31:0] nl,
                         input int unsigned stall_max, output bit maximal);
    longint unsigned t_acc, t_res, exp_steps;
    bit exp_max;
    int unsigned stall;
    result_t held;
    stall = (stall_max == 0) ? 0 : $urandom_range(stall_max, 1);
    job_valid <= 1;
    job       <= '{order: ORDER_W'(n), lfsr: l, nlfsr: nl};
    @(posedge clk);
    while (!job_ready) @(posedge clk);
    t_acc = cycle;
    job_valid <= 0;
    if (stall > 0) res_ready <= 0;
    @(posedge clk);
    while (!res_valid) @(posedge clk);
    t_res = cycle;
    exp_steps = period_ref(n, 64'(l), 64'(nl), exp_max);
    expect_eq("maximal", 64'(res.maximal), 64'(exp_max));
    expect_eq("steps", 64'(res.steps), exp_steps);
    expect_eq("cycles", t_res - t_acc, exp_steps + 1);
    expect_eq("echo lfsr", 64'(res.job.lfsr), 64'(l));
    maximal = res.maximal;
    if (stall > 0) begin
      held = res;
      repeat (stall) @(posedge clk);
      expect_eq("held", 64'(res_valid && res == held), 1);
      res_ready <= 1;
      @(posedge clk);
    end
  endtask

  initial begin
    bit m;
    int unsigned found;
    job_valid = 0; res_ready = 1; job = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);

    // 1. linear sweeps against the primitive-polynomial count
    for (int unsigned n = 3; n <= 9; n++) begin
      found = 0;
      for (int unsigned rest = 0; rest < (1 << (n - 1)); rest++) begin
        run_job(n, 32'((1 << (n - 1)) | rest), 32'h0, 0, m);
        found += int'(m);
      end
      expect_eq($sformatf("primitive count n=%0d", n), found, prim_count(n));
    end

    // 2. random nonlinear functions, with result stalls
    for (int i = 0; i < 400; i++) begin
      int unsigned n = $urandom_range(12, 1);
      logic [31:0] nm = (32'(1) << n) - 1;
      logic [31:0] l = ($urandom & nm) | (32'(1) << (n - 1));
      logic [31:0] nl = $urandom & $urandom & nm;
      if (i % 2 == 0) nl = (32'(1) << $urandom_range(n - 1)) | (32'(1) << $urandom_range(n - 1));
      run_job(n, l, nl, (i % 4 == 0) ? 3 : 0, m);
    end

    // 3. back-to-back: with a job waiting and res_ready high, the next job is
    //    taken in the same cycle as the verdict.
    job_valid <= 1;
    job       <= '{order: 5, lfsr: 32'h12, nlfsr: 0};   // x^5 + x^2 + 1, maximal
    @(posedge clk);
    while (!(res_valid && res_ready)) @(posedge clk);
    @(posedge clk);
    while (!(res_valid && res_ready)) @(posedge clk);
    expect_eq("back-to-back job_ready", 64'(job_ready), 1);
    job_valid <= 0;
    @(posedge clk);
    expect_eq("restart busy", 64'(busy), 1);
    while (!res_valid) @(posedge clk);
    expect_eq("back-to-back verdict", 64'(res.maximal), 1);
    @(posedge clk);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
