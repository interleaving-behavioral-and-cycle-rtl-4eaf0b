// One haydn_top with its driver/checker, connected by name. With QUAD_II = 1
// the top is instantiated with all parameters at their defaults; with
// QUAD_II = 2 its quadratic-roots pipeline shares one multiplier.
module haydn_top_bench
  import haydn_pkg::*;
#(
  parameter int unsigned QUAD_II = 1
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  logic               quad_in_valid, quad_in_ready, quad_out_valid;
  logic signed [31:0] quad_a, quad_b, quad_c, quad_delta;
  num_sol_e           quad_num_sol;
  logic               fib_start, fib_busy, fib_done, fib_host_en, fib_host_we;
  logic [8:0]         fib_n_iter, fib_host_addr, fib_fwd_count;
  logic [31:0]        fib_host_wdata, fib_host_rdata;
  logic               mm_in_valid, mm_out_valid;
  logic [31:0]        mm_a, mm_b, mm_m, mm_p;
  logic               gs_start, gs_busy, gs_pix_valid, gs_pix_last;
  logic [2:0][7:0]    gs_col0, gs_pixel;
  logic [2:0][15:0]   gs_dcol;
  logic [10:0]        gs_len;

  if (QUAD_II == 1) begin : g_default
    haydn_top dut (.*);
  end else begin : g_shared
    haydn_top #(.QUAD_II(QUAD_II)) dut (.*);
  end

  haydn_top_driver #(.QUAD_II(QUAD_II)) drv (.*);
endmodule
