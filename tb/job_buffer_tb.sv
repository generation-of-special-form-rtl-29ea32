// Self-checking testbench of job_buffer.
//
// Random writes and reads (each with its own probability, changed in phases
// so the buffer both fills up and drains empty) are mirrored in a queue
// model.  Checked every cycle: out_valid, in_ready and count against the
// model, and the head entry against the model's oldest element.  The test
// counts how often the buffer was full and empty and fails if either never
// happened.
module job_buffer_tb;
  localparam int unsigned WIDTH = 20;
  localparam int unsigned DEPTH = 5;

  logic             clk = 0, rst_n = 0;
  logic             in_valid, in_ready, out_valid, out_ready;
  logic [WIDTH-1:0] in_data, out_data;
  logic [$clog2(DEPTH+1)-1:0] count;

  int unsigned checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [WIDTH-1:0] model[$];

  job_buffer #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int unsigned p_wr, p_rd;
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      unique case ((cyc / 500) % 3)
        0: begin p_wr = 80; p_rd = 30; end   // fills up
        1: begin p_wr = 20; p_rd = 80; end   // drains
        default: begin p_wr = 50; p_rd = 50; end
      endcase
      in_valid  = ($urandom_range(99) < p_wr);
      out_ready = ($urandom_range(99) < p_rd);
      in_data   = WIDTH'($urandom);
      #1;
      expect_eq("count", count, model.size());
      expect_eq("out_valid", out_valid, model.size() != 0);
      expect_eq("in_ready", in_ready, model.size() != DEPTH);
      if (model.size() != 0) expect_eq("head", out_data, model[0]);
      if (model.size() == DEPTH) n_full++;
      if (model.size() == 0) n_empty++;
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
      #1;
    end
    expect_eq("buffer was full", n_full > 0, 1);
    expect_eq("buffer was empty", n_empty > 0, 1);
    $display("full %0d cycles, empty %0d cycles", n_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
