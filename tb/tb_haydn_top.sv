// End-to-end testbench for haydn_top. Two copies of the top run side by
// side, each driven and checked by haydn_top_driver: one with every
// parameter at its default (two multipliers, II = 1, in the quadratic-roots
// pipeline) and one with QUAD_II = 2 (one shared multiplier). Each runs a
// 100-term Fibonacci series, 200 root counts, 200 Montgomery products and 20
// shaded spans concurrently, and counts that every mechanism occurred.
module tb_haydn_top;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks_a, failures_a, checks_b, failures_b;
  logic fin_a, fin_b;

  haydn_top_bench #(.QUAD_II(1)) u_a (.clk, .rst_n, .checks(checks_a), .failures(failures_a), .finished(fin_a));
  haydn_top_bench #(.QUAD_II(2)) u_b (.clk, .rst_n, .checks(checks_b), .failures(failures_b), .finished(fin_b));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin_a && fin_b);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b + 1);
    $finish;
  end
endmodule
