// quadratic_solutions: number of real roots of a*x^2 + b*x + c.
//
// The component computes delta = b*b - 4*a*c and outputs 2 when delta > 0,
// 1 when delta == 0 and 0 otherwise. Arithmetic is WIDTH-bit two's complement
// with wrap-around, as for any WIDTH-bit integer variable; 4*a*c is formed
// as the product shifted left by two.
//
// Two statically scheduled pipelines are built, chosen by II (initiation
// interval), following the two schedules the example derives:
//   II = 1: two pipe_mult units, one for b*b and one for a*c. A new (a,b,c)
//           is accepted every cycle. Stage 0 registers the inputs, stages
//           1..LAT are the multipliers, stage LAT+1 registers b*b and
//           (a*c)<<2, stage LAT+2 subtracts, stage LAT+3 decides num_sol.
//   II = 2: one pipe_mult unit shared by the two products (resource
//           sharing): b*b enters it in the cycle after the inputs are taken
//           and a*c one cycle later. b*b is registered when it leaves the
//           multiplier; in the next cycle a*c is shifted and subtracted in a
//           chain without a register between them. The decision is written
//           at the next stage boundary (stages last two cycles), so an input
//           taken at edge k gives num_sol after edge k + 10 for LAT = 6.
// Latency from the edge that takes the inputs to the edge that writes
// num_sol is OUT_LAT = align_up(LAT + 3, II): 9 for II = 1 and 10 for II = 2
// with LAT = 6, as in the example's stage numbering.
//
// Handshake (this design's choice): in_valid/in_ready. With II = 1 in_ready
// is always high; with II = 2 it is low in the cycle after an input was taken.
// out_valid is high for one cycle with each result. There is no back-pressure
// on the output, as in a statically scheduled pipeline. delta is also brought
// out alongside num_sol.
//
// rst_n is a synchronous, active-low reset that clears every register that
// is read; the reset style is this design's choice.
module quadratic_solutions
  import haydn_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned LAT   = 6,
  parameter int unsigned II    = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [WIDTH-1:0] a,
  input  logic signed [WIDTH-1:0] b,
  input  logic signed [WIDTH-1:0] c,
  output logic                    out_valid,
  output num_sol_e                num_sol,
  output logic signed [WIDTH-1:0] delta
);

  localparam int unsigned OUT_LAT = align_up(LAT + 3, II);

  // age[j] is set after edge k + j for an input taken at edge k.
  logic [OUT_LAT:0] age;
  logic             take;

  logic signed [WIDTH-1:0] ra, rb, rc;
  logic signed [WIDTH-1:0] tmp0, tmp2;

  assign in_ready = (II == 1) ? 1'b1 : !age[0];
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      age <= '0;
      ra  <= '0;
      rb  <= '0;
      rc  <= '0;
    end else begin
      age <= {age[OUT_LAT-1:0], take};
      if (take) begin
        ra <= a;
        rb <= b;
        rc <= c;
      end
    end
  end

  if (II == 1) begin : g_ii1
    // Two multipliers, no sharing.
    logic [WIDTH-1:0]        q_bb, q_ac;
    logic                    vbb, vac;
    logic signed [WIDTH-1:0] tmp1;

    pipe_mult #(.WIDTH(WIDTH), .LAT(LAT)) u_mult_bb (
      .clk, .rst_n, .in_valid(age[0]), .a(rb), .b(rb), .out_valid(vbb), .q(q_bb)
    );
    pipe_mult #(.WIDTH(WIDTH), .LAT(LAT)) u_mult_ac (
      .clk, .rst_n, .in_valid(age[0]), .a(ra), .b(rc), .out_valid(vac), .q(q_ac)
    );

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        tmp0 <= '0;
        tmp1 <= '0;
        tmp2 <= '0;
      end else begin
        if (age[LAT]) begin               // stage LAT+1
          tmp0 <= q_bb;
          tmp1 <= q_ac << 2;
        end
        if (age[LAT+1]) tmp2 <= tmp0 - tmp1;  // stage LAT+2
      end
    end

    // The multiplier's own valid must line up with the schedule.
    assert property (@(posedge clk) disable iff (!rst_n) age[LAT] |-> (vbb && vac));
  end else begin : g_ii2
    // One shared multiplier: b*b in the first step, a*c in the second.
    logic [WIDTH-1:0] op_a, op_b, q;
    logic             vq;

    always_comb begin
      if (age[0]) begin
        op_a = rb;
        op_b = rb;
      end else begin
        op_a = ra;
        op_b = rc;
      end
    end

    pipe_mult #(.WIDTH(WIDTH), .LAT(LAT)) u_mult (
      .clk, .rst_n, .in_valid(age[0] || age[1]), .a(op_a), .b(op_b), .out_valid(vq), .q(q)
    );

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        tmp0 <= '0;
        tmp2 <= '0;
      end else begin
        if (age[LAT])   tmp0 <= q;                             // b*b
        if (age[LAT+1]) tmp2 <= tmp0 - signed'(q << 2);        // chained: (a*c)<<2, subtract
      end
    end

    assert property (@(posedge clk) disable iff (!rst_n) (age[LAT] || age[LAT+1]) |-> vq);
    // Two inputs one cycle apart would need the multiplier twice in a cycle.
    assert property (@(posedge clk) disable iff (!rst_n) age[0] |-> !take);
  end

  // Decision stage, written at the stage boundary OUT_LAT.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      num_sol   <= NO_ROOTS;
      delta     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= age[OUT_LAT-1];
      if (age[OUT_LAT-1]) begin
        delta <= tmp2;
        if (tmp2 > 0)       num_sol <= TWO_ROOTS;
        else if (tmp2 == 0) num_sol <= ONE_ROOT;
        else                num_sol <= NO_ROOTS;
      end
    end
  end

  initial begin
    assert (II == 1 || II == 2) else $error("quadratic_solutions: II must be 1 or 2");
    assert (LAT >= 1) else $error("quadratic_solutions: LAT must be at least 1");
  end

endmodule
