// Testbench for montmult at 32-bit (default) and 8-bit operands. Random odd
// moduli and operands below them are streamed, one per cycle with random
// gaps. Each result P is checked by the defining property of the Montgomery
// product, P < M and P * 2^N == A * B (mod M), which fixes P uniquely since
// 2^N is invertible modulo an odd M. The latency (N cycles) is checked as
// well. Moduli near 2^N and operands M - 1 make the final subtraction occur.
module tb_montmult;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { logic [31:0] a, b, m; longint unsigned t; } job_t;

  logic        v32, ov32, v8, ov8;
  logic [31:0] a32, b32, m32, p32;
  logic [7:0]  a8, b8, m8, p8;

  montmult dut32 (.clk, .rst_n, .in_valid(v32), .a(a32), .b(b32), .m(m32), .out_valid(ov32), .p(p32));
  montmult #(.N(8)) dut8 (.clk, .rst_n, .in_valid(v8), .a(a8), .b(b8), .m(m8), .out_valid(ov8), .p(p8));

  job_t q32[$], q8[$];
  int   n32 = 0, n8 = 0;

  function automatic bit mont_ok(logic [31:0] a, logic [31:0] b, logic [31:0] m,
                                 logic [31:0] p, int n);
    logic [127:0] lhs, rhs;
    lhs = ({96'd0, p} << n) % {96'd0, m};
    rhs = ({96'd0, a} * {96'd0, b}) % {96'd0, m};
    return (p < m) && (lhs == rhs);
  endfunction

  always @(posedge clk) begin
    if (rst_n && v32) q32.push_back('{a32, b32, m32, cyc});
    if (rst_n && v8)  q8.push_back('{{24'd0, a8}, {24'd0, b8}, {24'd0, m8}, cyc});
    #1;
    if (rst_n && ov32) begin
      job_t j;
      j = q32.pop_front();
      n32++;
      checks++;
      if (!mont_ok(j.a, j.b, j.m, p32, 32)) begin
        failures++; $display("FAIL N=32 a=%h b=%h m=%h p=%h", j.a, j.b, j.m, p32);
      end
      checks++;
      if (cyc - 1 - j.t != 32) begin failures++; $display("FAIL N=32 latency %0d", cyc - 1 - j.t); end
    end
    if (rst_n && ov8) begin
      job_t j;
      j = q8.pop_front();
      n8++;
      checks++;
      if (!mont_ok(j.a, j.b, j.m, {24'd0, p8}, 8)) begin
        failures++; $display("FAIL N=8 a=%h b=%h m=%h p=%h", j.a, j.b, j.m, p8);
      end
      checks++;
      if (cyc - 1 - j.t != 8) begin failures++; $display("FAIL N=8 latency %0d", cyc - 1 - j.t); end
    end
  end


  initial begin
    v32 = 0; v8 = 0; a32 = 0; b32 = 0; m32 = 1; a8 = 0; b8 = 0; m8 = 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      v32 = $urandom_range(0, 4) != 0;
      m32 = $urandom() | 32'h1;
      if (t % 7 == 0) m32 = 32'hFFFF_FFFF;
      a32 = $urandom() % m32;
      b32 = (t % 11 == 0) ? m32 - 1 : $urandom() % m32;
      v8 = $urandom_range(0, 4) != 0;
      m8 = 8'($urandom_range(3, 255)) | 8'h1;
      a8 = 8'($urandom() % m8);
      b8 = 8'($urandom() % m8);
    end
    @(negedge clk);
    v32 = 0; v8 = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (q32.size() != 0 || q8.size() != 0 || n32 < 300 || n8 < 300) begin
      failures++; $display("FAIL results missing: %0d %0d", n32, n8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
