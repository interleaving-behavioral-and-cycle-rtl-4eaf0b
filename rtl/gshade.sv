// gshade: Gouraud shading span interpolator.
//
// Gouraud shading colours a polygon by interpolating the colours computed at
// its vertices. Along one horizontal span the colour changes linearly, so
// each channel is produced by an accumulator that adds a constant increment
// per pixel: c(x+1) = c(x) + dc. The accumulator carries FRAC fraction bits;
// the pixel is its integer part. The add feeds back into the next pixel (a
// loop-carried dependency of distance 1), which a single adder per channel
// completes each cycle, so one pixel is produced per cycle.
//
// Interface: start (one cycle) with col0 (start colour, CH channels of 8
// bits), dcol (signed per-pixel increment per channel, 8 integer and FRAC
// fraction bits) and len (number of pixels, at least 1). busy is high while
// the span runs. pix_valid is high for len consecutive cycles, beginning the
// cycle after start; pixel is the colour of the current pixel and pix_last
// marks the last one. start is ignored while busy. The accumulator wraps
// modulo 256 per channel: the caller chooses dcol so the span stays in range.
//
// The pixel sizes (8 bits for one channel, 24 bits for three) are those of
// the two shading case-study designs, CH = 3 (24 bits) being the default
// here; the fixed-point format, span length width and handshake are this
// design's choices.
//
// rst_n is a synchronous, active-low reset that clears every register that
// is read; the reset style is this design's choice.
module gshade #(
  parameter int unsigned CH    = 3,
  parameter int unsigned FRAC  = 8,
  parameter int unsigned LEN_W = 11
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [CH-1:0][7:0]          col0,
  input  logic [CH-1:0][8+FRAC-1:0]   dcol,
  input  logic [LEN_W-1:0]            len,
  output logic                        busy,
  output logic                        pix_valid,
  output logic                        pix_last,
  output logic [CH-1:0][7:0]          pixel
);

  logic [CH-1:0][8+FRAC-1:0] acc;
  logic [CH-1:0][8+FRAC-1:0] inc;
  logic [LEN_W-1:0]          left;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      pix_valid <= 1'b0;
      pix_last  <= 1'b0;
      pixel     <= '0;
      acc       <= '0;
      inc       <= '0;
      left      <= '0;
    end else begin
      if (!busy) begin
        pix_valid <= 1'b0;
        pix_last  <= 1'b0;
        if (start && len != '0) begin
          // first pixel is the start colour itself
          for (int ch = 0; ch < int'(CH); ch++) begin
            acc[ch] <= {col0[ch], FRAC'(0)} + dcol[ch];
            pixel[ch] <= col0[ch];
          end
          inc       <= dcol;
          left      <= len - LEN_W'(1);
          pix_valid <= 1'b1;
          pix_last  <= (len == LEN_W'(1));
          busy      <= (len != LEN_W'(1));
        end
      end else begin
        for (int ch = 0; ch < int'(CH); ch++) begin
          pixel[ch] <= acc[ch][8+FRAC-1:FRAC];
          acc[ch]   <= acc[ch] + inc[ch];
        end
        left      <= left - LEN_W'(1);
        pix_valid <= 1'b1;
        pix_last  <= (left == LEN_W'(1));
        if (left == LEN_W'(1)) busy <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) pix_last |-> pix_valid);

endmodule
