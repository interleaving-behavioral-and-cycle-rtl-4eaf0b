// pipe_mult: pipelined multiplier resource.
//
// A fully pipelined multiplier (initiation interval 1) with a fixed latency
// of LAT cycles. It is the resource that the scheduler binds multiplication
// operators to; LAT = 6 is the latency the quadratic-solutions example
// declares for its pipe_mult units.
//
// Interface and timing: the operands a and b present in the cycle before
// clock edge e are multiplied and the product appears on q after edge
// e + LAT - 1, so q is valid LAT edges after the operands were sampled. A new
// operand pair may be given every cycle. in_valid travels alongside as
// out_valid; the schedules that use this unit do not need it, it is there for
// checking. The product keeps the low WIDTH bits, which is the same for
// signed and unsigned operands (integer variables keep their width).
//
// The multiply sits in the first stage and the later stages only delay it;
// a synthesis tool with register retiming spreads the multiplier over them.
// How the stages are split is this design's choice.
//
// rst_n is a synchronous, active-low reset that clears every register that
// is read; the reset style is this design's choice.
module pipe_mult #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned LAT   = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             out_valid,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] prod [LAT];
  logic [LAT-1:0]   vld;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld <= '0;
      for (int i = 0; i < int'(LAT); i++) prod[i] <= '0;
    end else begin
      prod[0] <= a * b;
      vld[0]  <= in_valid;
      for (int i = 1; i < int'(LAT); i++) begin
        prod[i] <= prod[i-1];
        vld[i]  <= vld[i-1];
      end
    end
  end

  assign q         = prod[LAT-1];
  assign out_valid = vld[LAT-1];

  initial begin
    assert (LAT >= 1) else $error("pipe_mult: LAT must be at least 1");
  end

endmodule
