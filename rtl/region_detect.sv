// Region detection: which of the 4 x 4 image regions the current pixel is in.
//
// A column counter i counts valid pixels and wraps at x3-1 (the image width);
// the line counter j counts when the column counter wraps, so (i, j) is the
// position of the current pixel in a raster-scan frame. Sixteen comparator
// blocks test x(c-1) <= i < x(c) and y(r-1) <= j < y(r) against the region
// limits x0..x3 = W/4, W/2, 3W/4, W and y0..y3 = H/4 .. H, each giving one
// bit; a 16-to-4 encoder turns the one-hot vector into the region number
// 4*r + c (row-major, region 0 top left, region 15 bottom right). This is
// the document's structure; the half-open limit convention (so that every
// region is exactly W/4 x H/4 pixels) and the row-major numbering read from
// its region-9 example are this design's reading.
//
// Interface: `clear` puts the counters back to the frame origin; each
// in_valid pixel advances them. out_valid, out_onehot (the comparator
// outputs, used directly by the register-based histogram), out_region and
// out_last (last pixel of the frame) follow one cycle after the pixel, in
// step with rgb2gray.
module region_detect #(
  parameter int W  = 640,
  parameter int H  = 480,
  parameter int XW = $clog2(W),
  parameter int YW = $clog2(H)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     in_valid,
  output logic                     out_valid,
  output logic [lh_pkg::NREG-1:0]  out_onehot,
  output logic [3:0]               out_region,
  output logic                     out_last
);

  logic [XW-1:0] col;   // i
  logic [YW-1:0] line;  // j
  logic          col_wrap, line_wrap;

  // Region limits x0..x3, y0..y3 (x3 = W, y3 = H).
  function automatic int xlim(input int k);
    return ((k + 1) * W) / 4;
  endfunction
  function automatic int ylim(input int k);
    return ((k + 1) * H) / 4;
  endfunction

  assign col_wrap  = (col  == XW'(W - 1));
  assign line_wrap = (line == YW'(H - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col  <= '0;
      line <= '0;
    end else if (clear) begin
      col  <= '0;
      line <= '0;
    end else if (in_valid) begin
      col <= col_wrap ? '0 : col + 1'b1;
      if (col_wrap) line <= line_wrap ? '0 : line + 1'b1;
    end
  end

  // Comparator blocks.
  logic [lh_pkg::NREG-1:0] cmp;
  always_comb begin
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) begin
        cmp[4*r+c] = (32'(col)  >= ((c == 0) ? 0 : xlim(c - 1))) && (32'(col)  < xlim(c)) &&
                     (32'(line) >= ((r == 0) ? 0 : ylim(r - 1))) && (32'(line) < ylim(r));
      end
    end
  end

  // 16-to-4 encoder.
  logic [3:0] enc;
  always_comb begin
    enc = '0;
    for (int k = 0; k < lh_pkg::NREG; k++)
      if (cmp[k]) enc = 4'(k);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_onehot <= '0;
      out_region <= '0;
      out_last   <= 1'b0;
    end else begin
      out_valid  <= in_valid;
      out_onehot <= cmp;
      out_region <= enc;
      out_last   <= in_valid && col_wrap && line_wrap;
    end
  end

  // Exactly one comparator fires for every position inside the frame.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot(cmp))
    else $error("region_detect: comparator outputs not one-hot");

endmodule
