// Testbench for gshade with three 8-bit channels (24-bit pixels) and with
// one channel (8-bit pixels). Random spans (start colour, signed per-pixel
// increment chosen so the span stays in range, length 1..40) are shaded;
// every pixel is compared with the linear interpolation
//   c(k) = floor((c0 * 2^FRAC + k * dc) / 2^FRAC)
// computed here with integers, and the span must deliver len pixels on len
// consecutive cycles starting the cycle after start, the last one marked.
module tb_gshade;
  localparam int FRAC = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              start3, busy3, pv3, pl3;
  logic [2:0][7:0]   col3, pix3;
  logic [2:0][15:0]  d3;
  logic [10:0]       len3;
  gshade dut3 (.clk, .rst_n, .start(start3), .col0(col3), .dcol(d3), .len(len3),
               .busy(busy3), .pix_valid(pv3), .pix_last(pl3), .pixel(pix3));

  logic              start1, busy1, pv1, pl1;
  logic [0:0][7:0]   col1, pix1;
  logic [0:0][15:0]  d1;
  logic [10:0]       len1;
  gshade #(.CH(1), .FRAC(FRAC), .LEN_W(11)) dut1 (.clk, .rst_n, .start(start1), .col0(col1),
               .dcol(d1), .len(len1), .busy(busy1), .pix_valid(pv1), .pix_last(pl1), .pixel(pix1));

  function automatic int expect_c(int c0, int dc, int k);
    int v;
    v = c0 * 256 + k * dc;
    return (v >>> FRAC) & 255;
  endfunction

  // Random span for one channel: end colour in range, dc = (c1 - c0) / len
  task automatic rand_chan(int len, output logic [7:0] c0, output logic [15:0] dc);
    int a, b, d;
    a = $urandom_range(0, 255);
    b = $urandom_range(0, 255);
    d = ((b - a) * 256) / len;
    c0 = 8'(a);
    dc = 16'(d);
  endtask

  task automatic span3(int len);
    int k;
    @(negedge clk);
    for (int ch = 0; ch < 3; ch++) rand_chan(len, col3[ch], d3[ch]);
    len3 = 11'(len); start3 = 1;
    @(negedge clk);
    start3 = 0;
    k = 0;
    while (k < len) begin
      checks++;
      if (!pv3) begin failures++; $display("FAIL CH=3 len=%0d: no pixel %0d", len, k); break; end
      for (int ch = 0; ch < 3; ch++) begin
        checks++;
        if (int'(pix3[ch]) != expect_c(int'(col3[ch]), int'(signed'(d3[ch])), k)) begin
          failures++;
          $display("FAIL CH=3 len=%0d pixel %0d ch %0d: %0d expected %0d", len, k, ch,
                   pix3[ch], expect_c(int'(col3[ch]), int'(signed'(d3[ch])), k));
        end
      end
      checks++;
      if (pl3 != (k == len - 1)) begin failures++; $display("FAIL CH=3 last flag at %0d", k); end
      k++;
      @(negedge clk);
    end
    checks++;
    if (pv3) begin failures++; $display("FAIL CH=3 extra pixel after len=%0d", len); end
  endtask

  task automatic span1(int len);
    int k;
    @(negedge clk);
    rand_chan(len, col1[0], d1[0]);
    len1 = 11'(len); start1 = 1;
    @(negedge clk);
    start1 = 0;
    for (k = 0; k < len; k++) begin
      checks++;
      if (!pv1 || int'(pix1[0]) != expect_c(int'(col1[0]), int'(signed'(d1[0])), k)
          || pl1 != (k == len - 1)) begin
        failures++; $display("FAIL CH=1 len=%0d pixel %0d: %0d", len, k, pix1[0]);
      end
      @(negedge clk);
    end
    checks++;
    if (pv1) begin failures++; $display("FAIL CH=1 extra pixel"); end
  endtask

  initial begin
    start3 = 0; start1 = 0; col3 = '0; d3 = '0; len3 = '0; col1 = '0; d1 = '0; len1 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    span3(1);
    span3(2);
    for (int i = 0; i < 30; i++) span3($urandom_range(1, 40));
    span1(1);
    for (int i = 0; i < 30; i++) span1($urandom_range(1, 40));
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
