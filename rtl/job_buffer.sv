// Job buffer: first-in first-out queue of candidate feedback functions in
// front of the period tester.
//
// Functions arrive from the host link at their own pace and wait here while the
// tester works; the moment the tester frees up, the oldest waiting function is
// already on out_data, so the tester never idles on the link.  Circular
// buffer of DEPTH entries with read and write pointers and an occupancy
// counter; the output is first-word-fall-through (out_data shows the head
// whenever out_valid is high).  A write and a read may happen in the same
// cycle; in_ready is simply "not full", so a full buffer refuses a write even
// in a cycle where it is also read.
//
// Interface: in_valid/in_ready write, out_valid/out_ready read, count gives
// the number of entries held.  Holding functions while the tester is busy and
// handing one over as soon as it is done is what the source design asks of
// this stage; the queue structure and its depth are this design's choice.
module job_buffer #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [WIDTH-1:0]           in_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [WIDTH-1:0]           out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign in_ready  = (count != ($clog2(DEPTH+1))'(DEPTH));
  assign out_valid = (count != '0);
  assign do_wr     = in_valid && in_ready;
  assign do_rd     = out_valid && out_ready;
  assign out_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= incr(wr_ptr);
      if (do_rd) rd_ptr <= incr(rd_ptr);
      unique case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // Storage has no reset; only entries that were written are ever read.
  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= in_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    count <= ($clog2(DEPTH+1))'(DEPTH));

endmodule
