// Testbench for quadratic_solutions, both schedules: II = 1 (two
// multipliers, an input every cycle) and II = 2 (one shared multiplier, an
// input every other cycle). Random and hand-picked (a, b, c) with positive,
// zero and negative discriminants are fed; each result is compared with
// delta = b*b - 4*a*c in 32-bit wrap-around arithmetic, and the number of
// edges between taking an input and out_valid is checked: 9 for II = 1 and
// 10 for II = 2 with the 6-cycle multipliers. Throughput is checked by
// counting results over a run with in_valid held high.
module tb_quadratic_solutions;
  import haydn_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct {
    int               a, b, c;
    longint unsigned  t_in;
  } job_t;

  // ---------------- II = 1
  logic            v1, r1, ov1;
  int              a1, b1, c1;
  num_sol_e        ns1;
  logic signed [31:0] d1;
  quadratic_solutions dut1 (.clk, .rst_n, .in_valid(v1), .in_ready(r1), .a(a1), .b(b1), .c(c1),
                            .out_valid(ov1), .num_sol(ns1), .delta(d1));
  // ---------------- II = 2
  logic            v2, r2, ov2;
  int              a2, b2, c2;
  num_sol_e        ns2;
  logic signed [31:0] d2;
  quadratic_solutions #(.WIDTH(32), .LAT(6), .II(2)) dut2 (
    .clk, .rst_n, .in_valid(v2), .in_ready(r2), .a(a2), .b(b2), .c(c2),
    .out_valid(ov2), .num_sol(ns2), .delta(d2));

  job_t q1[$], q2[$];
  int   n_out1 = 0, n_out2 = 0;
  int   n_pos = 0, n_zero = 0, n_neg = 0;

  function automatic int ref_delta(int a, int b, int c);
    int bb, ac;
    bb = b * b;
    ac = a * c;
    return bb - (ac <<< 2);
  endfunction

  function automatic num_sol_e ref_ns(int d);
    if (d > 0) return TWO_ROOTS;
    if (d == 0) return ONE_ROOT;
    return NO_ROOTS;
  endfunction

  task automatic pick(output int a, output int b, output int c, input int i);
    int k;
    case (i % 5)
      0: begin k = $urandom_range(1, 1000); a = k; b = 2 * k; c = k; end     // delta = 0
      1: begin a = $urandom_range(1, 50); b = $urandom_range(100, 200); c = $urandom_range(1, 50); end
      2: begin a = $urandom_range(20, 90); b = $urandom_range(0, 10); c = $urandom_range(20, 90); end
      default: begin a = $urandom(); b = $urandom(); c = $urandom(); end
    endcase
  endtask

  // scoreboards, sampled just after each edge
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      if (ov1) begin
        job_t j;
        n_out1++;
        if (q1.size() == 0) begin
          failures++; $display("FAIL II=1: unexpected output");
        end else begin
          j = q1.pop_front();
          checks++;
          if (d1 !== ref_delta(j.a, j.b, j.c) || ns1 !== ref_ns(ref_delta(j.a, j.b, j.c))) begin
            failures++;
            $display("FAIL II=1: a=%0d b=%0d c=%0d got delta=%0d ns=%0d", j.a, j.b, j.c, d1, ns1);
          end
          checks++;
          if (cyc - 1 - j.t_in != 9) begin
            failures++; $display("FAIL II=1 latency %0d, expected 9", cyc - 1 - j.t_in);
          end
          case (ref_ns(ref_delta(j.a, j.b, j.c)))
            TWO_ROOTS: n_pos++;
            ONE_ROOT:  n_zero++;
            default:   n_neg++;
          endcase
        end
      end
      if (ov2) begin
        job_t j;
        n_out2++;
        if (q2.size() == 0) begin
          failures++; $display("FAIL II=2: unexpected output");
        end else begin
          j = q2.pop_front();
          checks++;
          if (d2 !== ref_delta(j.a, j.b, j.c) || ns2 !== ref_ns(ref_delta(j.a, j.b, j.c))) begin
            failures++;
            $display("FAIL II=2: a=%0d b=%0d c=%0d got delta=%0d ns=%0d", j.a, j.b, j.c, d2, ns2);
          end
          checks++;
          if (cyc - 1 - j.t_in != 10) begin
            failures++; $display("FAIL II=2 latency %0d, expected 10", cyc - 1 - j.t_in);
          end
        end
      end
    end
  end

  // drivers: inputs are set between edges, recorded when taken
  always @(posedge clk) begin
    if (rst_n && v1 && r1) q1.push_back('{a1, b1, c1, cyc});
    if (rst_n && v2 && r2) q2.push_back('{a2, b2, c2, cyc});
  end

  initial begin
    int i1, i2;
    i1 = 0; i2 = 0;
    v1 = 0; v2 = 0; a1 = 0; b1 = 0; c1 = 0; a2 = 0; b2 = 0; c2 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // phase 1: random valid patterns
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      if (!v1 || r1) begin
        v1 = ($urandom_range(0, 3) != 0);
        pick(a1, b1, c1, i1++);
      end
      if (!v2 || r2) begin
        v2 = ($urandom_range(0, 2) != 0);
        pick(a2, b2, c2, i2++);
      end
    end
    @(negedge clk); v1 = 0; v2 = 0;
    repeat (20) @(negedge clk);
    // phase 2: throughput, in_valid held high for 40 cycles
    n_out1 = 0; n_out2 = 0;
    for (int t = 0; t < 40; t++) begin
      v1 = 1; pick(a1, b1, c1, i1++);
      if (!v2 || r2) begin v2 = 1; pick(a2, b2, c2, i2++); end
      @(negedge clk);
    end
    v1 = 0; v2 = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (n_out1 != 40) begin failures++; $display("FAIL II=1 throughput: %0d results for 40 cycles", n_out1); end
    checks++;
    if (n_out2 != 20) begin failures++; $display("FAIL II=2 throughput: %0d results for 40 cycles", n_out2); end
    checks++;
    if (q1.size() != 0 || q2.size() != 0) begin failures++; $display("FAIL results missing"); end
    checks++;
    if (n_pos == 0 || n_zero == 0 || n_neg == 0) begin
      failures++; $display("FAIL not all outcomes seen: %0d %0d %0d", n_pos, n_zero, n_neg);
    end
    $display("II=1 outcomes: two=%0d one=%0d none=%0d", n_pos, n_zero, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
