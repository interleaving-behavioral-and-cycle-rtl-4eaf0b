// dp_ram: dual-port synchronous block RAM, read-before-write.
//
// Two independent ports, A and B, each with enable, write enable, address,
// write data and registered read data. The read data of a port is registered
// at the clock edge; when the port also writes in that cycle it returns the
// word as it was before the write (read-before-write, also called read-first).
// A read on one port of the word the other port writes in the same cycle
// likewise returns the old word: the RAM itself never forwards. A circuit that
// needs the new value must bypass it (see fib_pipe). Both ports writing the
// same word in one cycle is not allowed (an assertion checks it); port B's
// write would win.
//
// Timing: address sampled at edge e, read data valid after edge e, held until
// the port's next enabled cycle. The memory is not reset; contents are
// defined only once written.
//
// The read-before-write configuration of a dual-port block RAM is what the
// Fibonacci case study uses; the word width and depth (32 x 512, one 18-kbit
// block RAM) are this design's choice.
module dp_ram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  // port A
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  // port B
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) a_rdata <= mem[a_addr];
    if (b_en) b_rdata <= mem[b_addr];
    if (a_en && a_we) mem[a_addr] <= a_wdata;
    if (b_en && b_we) mem[b_addr] <= b_wdata;
  end

  assert property (@(posedge clk) !(a_en && a_we && b_en && b_we && a_addr == b_addr))
    else $error("dp_ram: both ports write address %0d in the same cycle", a_addr);

endmodule
