// Driver and checker for haydn_top, used by the end-to-end testbenches.
//
// It plays the host: it streams (a, b, c) triples into the quadratic-roots
// pipeline, runs a Fibonacci series in the RAM and reads it back, streams
// Montgomery products and shades spans, all at the same time, and checks
// every result against models computed here. It counts how often each
// mechanism occurred: back-to-back inputs in a pipeline, the input being held
// off while the shared multiplier is busy (QUAD_II = 2), each root count,
// forwarded loads in the Fibonacci pipeline, the final subtraction of the
// Montgomery product, and span ends. A mechanism that never occurred counts
// as a failure. finished rises when all four parts are done.
module haydn_top_driver
  import haydn_pkg::*;
#(
  parameter int unsigned QUAD_II = 1,
  parameter int unsigned FIB_N   = 100,
  parameter int unsigned N_QUAD  = 200,
  parameter int unsigned N_MM    = 200,
  parameter int unsigned N_SPANS = 20
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               quad_in_valid,
  input  logic               quad_in_ready,
  output logic signed [31:0] quad_a, quad_b, quad_c,
  input  logic               quad_out_valid,
  input  num_sol_e           quad_num_sol,
  input  logic signed [31:0] quad_delta,
  output logic               fib_start,
  output logic [8:0]         fib_n_iter,
  input  logic               fib_busy,
  input  logic               fib_done,
  output logic               fib_host_en, fib_host_we,
  output logic [8:0]         fib_host_addr,
  output logic [31:0]        fib_host_wdata,
  input  logic [31:0]        fib_host_rdata,
  input  logic [8:0]         fib_fwd_count,
  output logic               mm_in_valid,
  output logic [31:0]        mm_a, mm_b, mm_m,
  input  logic               mm_out_valid,
  input  logic [31:0]        mm_p,
  output logic               gs_start,
  output logic [2:0][7:0]    gs_col0,
  output logic [2:0][15:0]   gs_dcol,
  output logic [10:0]        gs_len,
  input  logic               gs_busy,
  input  logic               gs_pix_valid,
  input  logic               gs_pix_last,
  input  logic [2:0][7:0]    gs_pixel,
  output int                 checks,
  output int                 failures,
  output logic               finished
);

  localparam int QUAD_LAT = (QUAD_II == 1) ? 9 : 10;

  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    checks = 0;
    failures = 0;
  end

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // ------------------------------------------------------------ quadratic
  typedef struct { int a, b, c; longint unsigned t; } qjob_t;
  qjob_t qq[$];
  int    q_sent = 0, q_got = 0, q_b2b = 0, q_held = 0;
  int    q_two = 0, q_one = 0, q_none = 0;
  logic  q_took_last = 1'b0;
  logic  quad_fin = 1'b0;

  function automatic int ref_delta(int a, int b, int c);
    int bb, ac;
    bb = b * b;
    ac = a * c;
    return bb - (ac <<< 2);
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (quad_in_valid && quad_in_ready) begin
        qq.push_back('{quad_a, quad_b, quad_c, cyc});
        if (q_took_last) q_b2b++;
      end
      if (quad_in_valid && !quad_in_ready) q_held++;
      q_took_last <= quad_in_valid && quad_in_ready;
    end
    #1;
    if (rst_n && quad_out_valid) begin
      qjob_t j;
      int d;
      q_got++;
      if (qq.size() == 0) fail("quadratic: result without input");
      else begin
        j = qq.pop_front();
        d = ref_delta(j.a, j.b, j.c);
        checks++;
        if (quad_delta !== d) fail($sformatf("quadratic delta %0d expected %0d", quad_delta, d));
        checks++;
        if ((d > 0 && quad_num_sol !== TWO_ROOTS) || (d == 0 && quad_num_sol !== ONE_ROOT) ||
            (d < 0 && quad_num_sol !== NO_ROOTS))
          fail($sformatf("quadratic num_sol %0d for delta %0d", quad_num_sol, d));
        checks++;
        if (int'(cyc - 1 - j.t) != QUAD_LAT) fail($sformatf("quadratic latency %0d", cyc - 1 - j.t));
        if (d > 0) q_two++; else if (d == 0) q_one++; else q_none++;
      end
    end
  end

  initial begin
    int k;
    quad_in_valid = 0; quad_a = 0; quad_b = 0; quad_c = 0;
    @(posedge rst_n);
    while (q_sent < int'(N_QUAD)) begin
      @(negedge clk);
      if (!quad_in_valid || quad_in_ready) begin
        if (quad_in_valid) q_sent++;
        if (q_sent < int'(N_QUAD)) begin
          quad_in_valid = $urandom_range(0, 4) != 0;
          case (q_sent % 3)
            0: begin k = $urandom_range(1, 30000); quad_a = k; quad_b = 2 * k; quad_c = k; end
            1: begin quad_a = $urandom_range(1, 100); quad_b = $urandom_range(500, 900);
                     quad_c = $urandom_range(1, 100); end
            default: begin quad_a = $urandom(); quad_b = $urandom(); quad_c = $urandom(); end
          endcase
        end else quad_in_valid = 0;
      end
    end
    repeat (QUAD_LAT + 3) @(negedge clk);
    checks++;
    if (q_got != int'(N_QUAD) || qq.size() != 0) fail($sformatf("quadratic: %0d results", q_got));
    quad_fin = 1'b1;
  end

  // ------------------------------------------------------------ fibonacci
  logic fib_fin = 1'b0;
  int   fib_fwd = 0;
  initial begin
    logic [31:0] x [0:511];
    int cycles;
    fib_start = 0; fib_n_iter = '0; fib_host_en = 0; fib_host_we = 0;
    fib_host_addr = '0; fib_host_wdata = '0;
    @(posedge rst_n);
    x[0] = $urandom_range(0, 50);
    x[1] = $urandom_range(0, 50);
    for (int i = 0; i < int'(FIB_N); i++) x[i+2] = x[i+1] + x[i];
    for (int i = 0; i < 2; i++) begin
      @(negedge clk);
      fib_host_en = 1; fib_host_we = 1; fib_host_addr = 9'(i); fib_host_wdata = x[i];
    end
    @(negedge clk);
    fib_host_en = 0; fib_host_we = 0;
    fib_start = 1; fib_n_iter = 9'(FIB_N);
    @(negedge clk);
    fib_start = 0;
    cycles = 0;
    checks++;
    if (!fib_busy) fail("fib: not busy after start");
    while (!fib_done) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (fib_busy) fail("fib: still busy after done");
    checks++;
    if (cycles != int'(FIB_N) + 2) fail($sformatf("fib: %0d cycles for %0d terms", cycles, FIB_N));
    fib_fwd = int'(fib_fwd_count);
    for (int i = 0; i < int'(FIB_N) + 2; i++) begin
      @(negedge clk);
      fib_host_en = 1; fib_host_addr = 9'(i);
      @(negedge clk);
      fib_host_en = 0;
      checks++;
      if (fib_host_rdata !== x[i]) fail($sformatf("fib x[%0d] = %0d expected %0d", i, fib_host_rdata, x[i]));
    end
    fib_fin = 1'b1;
  end

  // ------------------------------------------------------------ montgomery
  typedef struct { logic [31:0] a, b, m; } mjob_t;
  mjob_t mq[$];
  int    m_got = 0, m_sub = 0, m_b2b = 0;
  logic  m_last = 1'b0;
  logic  mm_fin = 1'b0;

  always @(posedge clk) begin
    if (rst_n && mm_in_valid) begin
      mq.push_back('{mm_a, mm_b, mm_m});
      if (m_last) m_b2b++;
    end
    m_last <= rst_n && mm_in_valid;
    #1;
    if (rst_n && mm_out_valid) begin
      mjob_t j;
      logic [127:0] lhs, rhs, ab;
      j = mq.pop_front();
      m_got++;
      lhs = ({96'd0, mm_p} << 32) % {96'd0, j.m};
      ab  = {96'd0, j.a} * {96'd0, j.b};
      rhs = ab % {96'd0, j.m};
      checks++;
      if (!(mm_p < j.m && lhs == rhs)) fail($sformatf("montmult a=%h b=%h m=%h p=%h", j.a, j.b, j.m, mm_p));
      // Word-level REDC: q = -a*b/m mod 2^32, s = (a*b + q*m) / 2^32; the
      // final subtraction is needed when s >= m.
      begin
        logic [31:0]  inv, qv;
        logic [127:0] sv;
        inv = 32'd1;
        for (int it = 0; it < 5; it++) inv = inv * (32'd2 - j.m * inv);
        qv = (32'd0 - ab[31:0]) * inv;
        sv = (ab + {96'd0, qv} * {96'd0, j.m}) >> 32;
        if (sv >= {96'd0, j.m}) m_sub++;
      end
    end
  end

  initial begin
    mm_in_valid = 0; mm_a = 0; mm_b = 0; mm_m = 1;
    @(posedge rst_n);
    for (int i = 0; i < int'(N_MM); i++) begin
      @(negedge clk);
      mm_in_valid = $urandom_range(0, 3) != 0;
      mm_m = (i % 4 == 0) ? 32'hFFFF_FFFB : ($urandom() | 32'h8000_0001);
      mm_a = (i % 4 == 0) ? mm_m - 1 : $urandom() % mm_m;
      mm_b = (i % 4 == 0) ? mm_m - 2 : $urandom() % mm_m;
    end
    @(negedge clk);
    mm_in_valid = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (mq.size() != 0) fail("montmult: results missing");
    mm_fin = 1'b1;
  end

  // ------------------------------------------------------------ gouraud
  int   gs_spans = 0, gs_lasts = 0, gs_pix = 0;
  logic gs_fin = 1'b0;
  initial begin
    int len, k, a, b2;
    logic [2:0][7:0]  c0;
    logic [2:0][15:0] dc;
    gs_start = 0; gs_col0 = '0; gs_dcol = '0; gs_len = '0;
    @(posedge rst_n);
    for (int s = 0; s < int'(N_SPANS); s++) begin
      len = $urandom_range(1, 64);
      for (int ch = 0; ch < 3; ch++) begin
        a = $urandom_range(0, 255);
        b2 = $urandom_range(0, 255);
        c0[ch] = 8'(a);
        dc[ch] = 16'(((b2 - a) * 256) / len);
      end
      @(negedge clk);
      gs_start = 1; gs_col0 = c0; gs_dcol = dc; gs_len = 11'(len);
      @(negedge clk);
      gs_start = 0;
      for (k = 0; k < len; k++) begin
        checks++;
        if (!gs_pix_valid) fail("gshade: pixel missing");
        for (int ch = 0; ch < 3; ch++) begin
          int e;
          e = ((int'(c0[ch]) * 256 + k * int'(signed'(dc[ch]))) >>> 8) & 255;
          checks++;
          if (int'(gs_pixel[ch]) != e) fail($sformatf("gshade pixel %0d ch %0d = %0d expected %0d", k, ch, gs_pixel[ch], e));
        end
        if (gs_pix_last) gs_lasts++;
        gs_pix++;
        @(negedge clk);
      end
      gs_spans++;
    end
    checks++;
    if (gs_lasts != int'(N_SPANS)) fail("gshade: span ends");
    gs_fin = 1'b1;
  end

  // ------------------------------------------------------------ summary
  assign finished = quad_fin && fib_fin && mm_fin && gs_fin;

  always @(posedge finished) begin
    $display("mechanisms: quad back-to-back=%0d held(shared multiplier)=%0d roots 2/1/0=%0d/%0d/%0d",
             q_b2b, q_held, q_two, q_one, q_none);
    $display("            fib forwarded loads=%0d  montmult back-to-back=%0d final-subtract=%0d",
             fib_fwd, m_b2b, m_sub);
    $display("            gshade spans=%0d pixels=%0d", gs_spans, gs_pix);
    checks++;
    if (QUAD_II == 1 && q_b2b == 0) fail("never two quadratic inputs in consecutive cycles");
    checks++;
    if (QUAD_II == 2 && q_held == 0) fail("shared multiplier never held an input off");
    checks++;
    if (q_two == 0 || q_one == 0 || q_none == 0) fail("not every root count occurred");
    checks++;
    if (fib_fwd != int'(FIB_N) - 1) fail($sformatf("fib: %0d forwarded loads", fib_fwd));
    checks++;
    if (m_b2b == 0 || m_sub == 0) fail("montmult: back-to-back issue or final subtraction never seen");
  end

endmodule
