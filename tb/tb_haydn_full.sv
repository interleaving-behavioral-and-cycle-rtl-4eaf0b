// Full-size testbench: haydn_top with every parameter at its default
// (32-bit quadratic-roots pipeline with two 6-cycle multipliers, 32 x 512
// Fibonacci RAM, 32-bit Montgomery multiplier, 24-bit Gouraud pixels),
// taken through a complete run of all four circuits by haydn_top_driver.
module tb_haydn_full;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int   checks, failures;
  logic fin;

  haydn_top_bench u_bench (.clk, .rst_n, .checks, .failures, .finished(fin));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
