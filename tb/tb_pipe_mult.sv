// Testbench for pipe_mult: streams random operand pairs, one per cycle, and
// checks that every product (low 32 bits) appears exactly LAT edges after its
// operands were sampled, with out_valid marking it. Also checks LAT = 3.
module tb_pipe_mult;
  localparam int unsigned W = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Two instances: the default latency and a shorter one.
  logic         iv;
  logic [W-1:0] a, b;
  logic         ov6, ov3;
  logic [W-1:0] q6, q3;

  pipe_mult dut6 (.clk, .rst_n, .in_valid(iv), .a, .b, .out_valid(ov6), .q(q6));
  pipe_mult #(.WIDTH(W), .LAT(3)) dut3 (.clk, .rst_n, .in_valid(iv), .a, .b,
                                        .out_valid(ov3), .q(q3));

  // history of sampled operands, indexed by edge number
  logic [W-1:0] ha [0:255];
  logic [W-1:0] hb [0:255];
  logic         hv [0:255];
  int edge_no = 0;

  task automatic check_lat(int lat, logic ov, logic [W-1:0] q);
    int e;
    logic [63:0] full;
    e = edge_no - lat;             // edge at which these operands were sampled
    if (e >= 0) begin
      checks++;
      if (ov !== hv[e]) begin
        failures++;
        $display("FAIL lat=%0d edge %0d: out_valid=%0b expected %0b", lat, edge_no, ov, hv[e]);
      end
      if (hv[e]) begin
        full = 64'(ha[e]) * 64'(hb[e]);
        checks++;
        if (q !== full[W-1:0]) begin
          failures++;
          $display("FAIL lat=%0d edge %0d: q=%h expected %h", lat, edge_no, q, full[W-1:0]);
        end
      end
    end
  endtask

  initial begin
    iv = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      // drive operands for the coming edge
      iv = ($urandom_range(0, 3) != 0);
      a  = $urandom();
      b  = (i % 17 == 0) ? 32'hFFFF_FFFF : $urandom();
      @(posedge clk);
      ha[edge_no] = a; hb[edge_no] = b; hv[edge_no] = iv;
      #1;
      edge_no++;
      check_lat(6, ov6, q6);
      check_lat(3, ov3, q3);
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
