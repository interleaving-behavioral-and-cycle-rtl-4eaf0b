// Testbench for fib_pipe. The host writes x[0] and x[1] through the host
// port, starts a run of n iterations and waits for done, then reads back
// x[0] .. x[n+1] and compares them with the series computed here. Checks
// that a run of n iterations takes n + 2 cycles from start to done (one
// new term per cycle) and that the forwarding path was used for every load
// after the first two. Runs several lengths, including 0, 1 and 2, with
// random seeds, and one long run wrapping at 32 bits.
module tb_fib_pipe;
  localparam int unsigned W = 32, D = 512, AW = 9;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          start, busy, done;
  logic [AW-1:0] n_iter, fwd_count;
  logic          host_en, host_we;
  logic [AW-1:0] host_addr;
  logic [W-1:0]  host_wdata, host_rdata;

  fib_pipe dut (.clk, .rst_n, .start, .n_iter, .busy, .done,
                .host_en, .host_we, .host_addr, .host_wdata, .host_rdata, .fwd_count);

  task automatic host_write(int addr, logic [W-1:0] d);
    @(negedge clk);
    host_en = 1; host_we = 1; host_addr = AW'(addr); host_wdata = d;
    @(negedge clk);
    host_en = 0; host_we = 0;
  endtask

  task automatic host_read(int addr, output logic [W-1:0] d);
    @(negedge clk);
    host_en = 1; host_we = 0; host_addr = AW'(addr);
    @(negedge clk);
    host_en = 0;
    d = host_rdata;
  endtask

  task automatic run(int n, logic [W-1:0] x0, logic [W-1:0] x1);
    logic [W-1:0] x [0:D-1];
    logic [W-1:0] got;
    int cycles;
    x[0] = x0; x[1] = x1;
    for (int i = 0; i < n; i++) x[i+2] = x[i+1] + x[i];
    host_write(0, x0);
    host_write(1, x1);
    @(negedge clk);
    start = 1; n_iter = AW'(n);
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != n + 2) begin
      failures++; $display("FAIL n=%0d: run took %0d cycles, expected %0d", n, cycles, n + 2);
    end
    checks++;
    if (int'(fwd_count) != ((n >= 2) ? n - 1 : 0)) begin
      failures++; $display("FAIL n=%0d: forwarded %0d loads", n, fwd_count);
    end
    for (int i = 0; i < n + 2; i++) begin
      host_read(i, got);
      checks++;
      if (got !== x[i]) begin
        failures++; $display("FAIL n=%0d: x[%0d] = %0d expected %0d", n, i, got, x[i]);
      end
    end
  endtask

  initial begin
    start = 0; n_iter = '0; host_en = 0; host_we = 0; host_addr = '0; host_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(10, 0, 1);
    run(0, 5, 7);
    run(1, 3, 4);
    run(2, 1, 1);
    run(20, W'($urandom_range(0, 1000)), W'($urandom_range(0, 1000)));
    run(D - 2, 0, 1);       // the whole RAM; the series wraps at 32 bits
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
