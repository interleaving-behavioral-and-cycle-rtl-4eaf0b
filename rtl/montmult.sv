// montmult: pipelined Montgomery modular multiplier.
//
// Computes P = A * B * 2^-N mod M for an odd modulus M and operands A, B < M,
// the product Montgomery's method gives without a division. The radix-2
// algorithm is unrolled into N pipeline stages, one per bit of A:
//     S = 0
//     for j in 0 .. N-1:  t = S + a_j * B;  S = (t + t_0 * M) / 2
//     if S >= M: S = S - M
// Stage j holds S (N+2 bits: S stays below 2M), the bits of A still to be
// used, B and M. Adding M when t is odd makes t even, so the halving is exact.
// A last stage makes the conditional subtraction.
//
// Interface and timing: in_valid with a, b, m starts one multiplication;
// a new one may start every cycle (initiation interval 1). out_valid and p
// appear N clock edges after the edge that samples the inputs, in order (the
// first iteration is done in the cycle the inputs are presented). No
// back-pressure. Inputs that
// break the rules (even M, A or B not below M) give an undefined result and
// are flagged by an assertion.
//
// The operand widths (8 and 32 bits, 32 by default) are those of the two
// Montgomery case-study designs; the algorithm variant (plain radix-2 with
// full-width ripple adders rather than a carry-save form), the full unrolling
// and the handshake are this design's choices.
//
// rst_n is a synchronous, active-low reset that clears every register that
// is read; the reset style is this design's choice.
module montmult #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] m,
  output logic         out_valid,
  output logic [N-1:0] p
);

  typedef struct packed {
    logic         vld;
    logic [N+1:0] s;
    logic [N-1:0] a;   // remaining bits of A, next bit in a[0]
    logic [N-1:0] b;
    logic [N-1:0] m;
  } stage_t;

  stage_t st [N+1];    // st[0] is the input, st[j] after j iterations

  always_comb begin
    st[0].vld = in_valid;
    st[0].s   = '0;
    st[0].a   = a;
    st[0].b   = b;
    st[0].m   = m;
  end

  for (genvar j = 0; j < int'(N); j++) begin : g_stage
    logic [N+2:0] t, u;
    always_comb begin
      t = {1'b0, st[j].s} + (st[j].a[0] ? {3'b000, st[j].b} : '0);
      u = t + (t[0] ? {3'b000, st[j].m} : '0);
    end
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        st[j+1] <= '0;
      end else begin
        st[j+1].vld <= st[j].vld;
        st[j+1].s   <= (N+2)'(u >> 1);
        st[j+1].a   <= st[j].a >> 1;
        st[j+1].b   <= st[j].b;
        st[j+1].m   <= st[j].m;
      end
    end
  end

  // final conditional subtraction
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p         <= '0;
    end else begin
      out_valid <= st[N].vld;
      if (st[N].s >= {2'b00, st[N].m}) p <= N'(st[N].s - {2'b00, st[N].m});
      else                             p <= N'(st[N].s);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid |-> (m[0] && a < m && b < m))
    else $error("montmult: operands must satisfy M odd, A < M, B < M");

endmodule
