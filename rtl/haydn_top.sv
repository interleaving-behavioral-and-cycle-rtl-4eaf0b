// haydn_top: the case-study circuits side by side.
//
// Four independent accelerators share only the clock and reset; each keeps
// its own ports, prefixed by its name, for a host to drive:
//   quad_*  quadratic_solutions: number of real roots of a*x^2+b*x+c,
//           pipelined with II = QUAD_II (1: two multipliers, 2: one shared)
//   fib_*   fib_pipe: Fibonacci series in a dual-port RAM, one term per cycle
//   mm_*    montmult: pipelined Montgomery multiplication, MM_N-bit operands
//   gs_*    gshade: Gouraud shading span interpolator, GS_CH 8-bit channels
// The host computer and board that load operands and read results are
// outside this design; their side of each interface is brought out as ports.
// Timing of each group is that of the block it belongs to. The circuits are
// the example and case studies of the same scheduling approach; putting them
// in one top, side by side and unconnected, is this design's choice (each
// was a separate FPGA configuration). Resets are synchronous, active low.
module haydn_top
  import haydn_pkg::*;
#(
  parameter int unsigned QUAD_WIDTH = 32,
  parameter int unsigned QUAD_LAT   = 6,
  parameter int unsigned QUAD_II    = 1,
  parameter int unsigned FIB_WIDTH  = 32,
  parameter int unsigned FIB_DEPTH  = 512,
  parameter int unsigned MM_N       = 32,
  parameter int unsigned GS_CH      = 3,
  parameter int unsigned GS_FRAC    = 8,
  parameter int unsigned GS_LEN_W   = 11,
  localparam int unsigned FIB_AW    = $clog2(FIB_DEPTH)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // quadratic_solutions
  input  logic                          quad_in_valid,
  output logic                          quad_in_ready,
  input  logic signed [QUAD_WIDTH-1:0]  quad_a,
  input  logic signed [QUAD_WIDTH-1:0]  quad_b,
  input  logic signed [QUAD_WIDTH-1:0]  quad_c,
  output logic                          quad_out_valid,
  output num_sol_e                      quad_num_sol,
  output logic signed [QUAD_WIDTH-1:0]  quad_delta,
  // fib_pipe
  input  logic                          fib_start,
  input  logic [FIB_AW-1:0]             fib_n_iter,
  output logic                          fib_busy,
  output logic                          fib_done,
  input  logic                          fib_host_en,
  input  logic                          fib_host_we,
  input  logic [FIB_AW-1:0]             fib_host_addr,
  input  logic [FIB_WIDTH-1:0]          fib_host_wdata,
  output logic [FIB_WIDTH-1:0]          fib_host_rdata,
  output logic [FIB_AW-1:0]             fib_fwd_count,
  // montmult
  input  logic                          mm_in_valid,
  input  logic [MM_N-1:0]               mm_a,
  input  logic [MM_N-1:0]               mm_b,
  input  logic [MM_N-1:0]               mm_m,
  output logic                          mm_out_valid,
  output logic [MM_N-1:0]               mm_p,
  // gshade
  input  logic                          gs_start,
  input  logic [GS_CH-1:0][7:0]         gs_col0,
  input  logic [GS_CH-1:0][8+GS_FRAC-1:0] gs_dcol,
  input  logic [GS_LEN_W-1:0]           gs_len,
  output logic                          gs_busy,
  output logic                          gs_pix_valid,
  output logic                          gs_pix_last,
  output logic [GS_CH-1:0][7:0]         gs_pixel
);

  quadratic_solutions #(.WIDTH(QUAD_WIDTH), .LAT(QUAD_LAT), .II(QUAD_II)) u_quad (
    .clk, .rst_n,
    .in_valid (quad_in_valid),
    .in_ready (quad_in_ready),
    .a        (quad_a),
    .b        (quad_b),
    .c        (quad_c),
    .out_valid(quad_out_valid),
    .num_sol  (quad_num_sol),
    .delta    (quad_delta)
  );

  fib_pipe #(.WIDTH(FIB_WIDTH), .DEPTH(FIB_DEPTH)) u_fib (
    .clk, .rst_n,
    .start     (fib_start),
    .n_iter    (fib_n_iter),
    .busy      (fib_busy),
    .done      (fib_done),
    .host_en   (fib_host_en),
    .host_we   (fib_host_we),
    .host_addr (fib_host_addr),
    .host_wdata(fib_host_wdata),
    .host_rdata(fib_host_rdata),
    .fwd_count (fib_fwd_count)
  );

  montmult #(.N(MM_N)) u_mm (
    .clk, .rst_n,
    .in_valid (mm_in_valid),
    .a        (mm_a),
    .b        (mm_b),
    .m        (mm_m),
    .out_valid(mm_out_valid),
    .p        (mm_p)
  );

  gshade #(.CH(GS_CH), .FRAC(GS_FRAC), .LEN_W(GS_LEN_W)) u_gs (
    .clk, .rst_n,
    .start    (gs_start),
    .col0     (gs_col0),
    .dcol     (gs_dcol),
    .len      (gs_len),
    .busy     (gs_busy),
    .pix_valid(gs_pix_valid),
    .pix_last (gs_pix_last),
    .pixel    (gs_pixel)
  );

endmodule
