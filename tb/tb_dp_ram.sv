// Testbench for dp_ram: random reads and writes on both ports against a
// reference array. Checks the one-cycle read latency, read-before-write on
// the writing port, and that a read of the word the other port writes in the
// same cycle returns the old word. Runs a 16-bit x 64-word instance.
module tb_dp_ram;
  localparam int unsigned W = 16, D = 64, AW = 6;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [W-1:0]  a_wdata, b_wdata, a_rdata, b_rdata;

  dp_ram #(.WIDTH(W), .DEPTH(D)) dut (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
                                      .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  logic [W-1:0] model [D];
  logic [W-1:0] exp_a, exp_b;
  logic         chk_a, chk_b;
  int           n_rbw = 0, n_cross = 0;

  initial begin
    a_en = 0; a_we = 0; b_en = 0; b_we = 0;
    a_addr = '0; b_addr = '0; a_wdata = '0; b_wdata = '0;
    chk_a = 0; chk_b = 0;
    // fill the RAM through port A
    for (int i = 0; i < int'(D); i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = AW'(i); a_wdata = W'($urandom()); model[i] = a_wdata;
    end
    @(negedge clk);
    a_en = 0; a_we = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // check the reads issued at the previous edge
      if (chk_a) begin
        checks++;
        if (a_rdata !== exp_a) begin failures++; $display("FAIL port A read %h expected %h", a_rdata, exp_a); end
      end
      if (chk_b) begin
        checks++;
        if (b_rdata !== exp_b) begin failures++; $display("FAIL port B read %h expected %h", b_rdata, exp_b); end
      end
      // new operations
      a_en = $urandom_range(0, 3) != 0;
      b_en = $urandom_range(0, 3) != 0;
      a_we = 1'($urandom_range(0, 1));
      b_we = 1'($urandom_range(0, 1));
      a_addr = AW'($urandom_range(0, 7));      // small range: many collisions
      b_addr = ($urandom_range(0, 1) != 0) ? a_addr : AW'($urandom_range(0, 7));
      if (a_en && a_we && b_en && b_we && a_addr == b_addr) b_we = 0;
      a_wdata = W'($urandom());
      b_wdata = W'($urandom());
      // expected read data: the contents before this edge's writes
      chk_a = a_en; exp_a = model[a_addr];
      chk_b = b_en; exp_b = model[b_addr];
      if (a_en && a_we) n_rbw++;
      if (a_en && a_we && b_en && !b_we && b_addr == a_addr) n_cross++;
      if (a_en && a_we) model[a_addr] = a_wdata;
      if (b_en && b_we) model[b_addr] = b_wdata;
    end
    @(negedge clk);
    checks++;
    if (n_rbw == 0 || n_cross == 0) begin failures++; $display("FAIL collisions not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
