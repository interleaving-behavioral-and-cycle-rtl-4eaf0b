// fib_pipe: fully pipelined Fibonacci series generator on one dual-port RAM.
//
// The loop  for (i = 0; i < n; i++) x[i+2] = x[i+1] + x[i];  runs over an
// array x held in a dual-port, read-before-write block RAM (dp_ram), one
// iteration started per cycle (initiation interval 1) with a latency of two
// cycles per iteration:
//   stage 0  load x[i]  (port B, address i)
//   stage 1  the loaded word enters a one-word shift register
//   stage 2  x[i+2] = x[i+1] + x[i]  is stored (port A, address i+2)
// The two loads of the loop body, x[i] and x[i+1], read the same words one
// iteration apart, so they are merged into one load per cycle: in the cycle
// where iteration i is in stage 2, the word just loaded is x[i+1] (the load of
// iteration i+1) and the shift register holds x[i]. One extra load, of x[n],
// closes the loop.
//
// The store of iteration i and the load of iteration i+2 fall in the same
// cycle and the same address: the loop-carried distance of 2 equals the
// distance between the store stage (2) and the load stage (0). The RAM returns
// the old word in that case, so a forwarding register passes the stored word
// to the loaded-word path in the next cycle instead of the RAM output.
//
// Interface: while idle, the host port owns RAM port A (write x[0] and x[1],
// read results back one cycle after the address). start (one cycle, with
// n_iter) runs n_iter iterations; busy is high meanwhile and host accesses
// are ignored. done pulses in the cycle after the last store, n_iter + 2
// cycles after start was sampled, so a run takes n_iter + 2 cycles.
// Words wrap at WIDTH bits. n_iter must be at most DEPTH - 2.
//
// The schedule (stages, one load, forwarding, II = 1, latency 2, one RAM)
// follows the fully pipelined case study; the word width, depth, host port
// and start/done handshake are this design's choices.
//
// rst_n is a synchronous, active-low reset that clears every register that
// is read; the reset style is this design's choice.
module fib_pipe #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [AW-1:0]    n_iter,
  output logic             busy,
  output logic             done,
  // host access to the RAM while idle
  input  logic             host_en,
  input  logic             host_we,
  input  logic [AW-1:0]    host_addr,
  input  logic [WIDTH-1:0] host_wdata,
  output logic [WIDTH-1:0] host_rdata,
  // number of times the forwarding path supplied the loaded word (for checking)
  output logic [AW-1:0]    fwd_count
);

  // RAM port signals
  logic             a_en, a_we;
  logic [AW-1:0]    a_addr;
  logic [WIDTH-1:0] a_wdata, a_rdata;
  logic             b_en;
  logic [AW-1:0]    b_addr;
  logic [WIDTH-1:0] b_rdata;

  dp_ram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_ram (
    .clk,
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we(1'b0), .b_addr, .b_wdata('0), .b_rdata
  );

  // Stage 0: load issue
  logic [AW-1:0] n_r;        // iterations of this run
  logic [AW-1:0] ld_addr;    // address of the load issued this cycle
  logic          ld_act;     // a load is issued this cycle
  // Stage 1 / 2 valid and iteration index
  logic          s1_iter, s2_iter;
  logic [AW-1:0] s1_idx, s2_idx;
  logic          s1_ld;      // a load was issued last cycle: word arrives now
  // Forwarding
  logic             fwd_sel;
  logic [WIDTH-1:0] fwd_data;
  // Loaded word and shift register
  logic [WIDTH-1:0] ld_word, sh;
  logic [WIDTH-1:0] sum;
  logic             st_act;
  logic [AW-1:0]    st_addr;

  assign ld_word = fwd_sel ? fwd_data : b_rdata;
  assign sum     = ld_word + sh;
  assign st_act  = s2_iter;
  assign st_addr = s2_idx + AW'(2);

  assign b_en   = ld_act;
  assign b_addr = ld_addr;

  always_comb begin
    if (busy) begin
      a_en    = st_act;
      a_we    = st_act;
      a_addr  = st_addr;
      a_wdata = sum;
    end else begin
      a_en    = host_en;
      a_we    = host_we;
      a_addr  = host_addr;
      a_wdata = host_wdata;
    end
  end
  assign host_rdata = a_rdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      n_r       <= '0;
      ld_addr   <= '0;
      ld_act    <= 1'b0;
      s1_iter   <= 1'b0;
      s2_iter   <= 1'b0;
      s1_idx    <= '0;
      s2_idx    <= '0;
      s1_ld     <= 1'b0;
      fwd_sel   <= 1'b0;
      fwd_data  <= '0;
      sh        <= '0;
      fwd_count <= '0;
    end else begin
      done <= 1'b0;
      // stage 0: loads of x[0] .. x[n]
      if (!busy) begin
        if (start) begin
          busy      <= 1'b1;
          n_r       <= n_iter;
          ld_addr   <= '0;
          ld_act    <= 1'b1;
          fwd_count <= '0;
        end
      end else if (ld_act) begin
        if (ld_addr == n_r) ld_act <= 1'b0;
        else                ld_addr <= ld_addr + AW'(1);
      end
      // pipeline registers
      s1_ld   <= ld_act;
      s1_iter <= ld_act && (ld_addr != n_r);
      s1_idx  <= ld_addr;
      s2_iter <= s1_iter;
      s2_idx  <= s1_idx;
      // stage 1: shift register of loaded words
      if (s1_ld) sh <= ld_word;
      // forwarding: a load of the word being stored in this very cycle
      fwd_sel  <= ld_act && st_act && (ld_addr == st_addr);
      fwd_data <= sum;
      if (s1_ld && fwd_sel) fwd_count <= fwd_count + AW'(1);
      // end of run: last store in this cycle
      if (busy && st_act && s2_idx == n_r - AW'(1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
      if (busy && !ld_act && !s1_iter && !s2_iter) begin
        busy <= 1'b0;      // n_iter == 0: nothing to store
        done <= 1'b1;
      end
    end
  end

  // A store never hits a word that a later load has already read from the RAM:
  // the only same-cycle overlap is the forwarded one.
  assert property (@(posedge clk) disable iff (!rst_n) st_act |-> a_addr == st_addr);
  assert property (@(posedge clk) disable iff (!rst_n) (start && !busy) |-> n_iter <= AW'(DEPTH - 2))
    else $error("fib_pipe: n_iter larger than the RAM allows");

endmodule
