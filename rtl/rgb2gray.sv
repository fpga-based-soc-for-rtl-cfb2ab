// Color conversion and gray-level quantization.
//
// Converts one RGB pixel per cycle to the luma value
//   Y = 0.257 R + 0.504 G + 0.098 B + 16
// and quantizes it uniformly to C levels by keeping the log2(C) most
// significant bits of Y (C = 4 -> Y[7:6], C = 8 -> Y[7:5], C = 256 -> Y).
// The conversion equation and the MSB quantization follow the document. The
// coefficients are taken in 8-bit fixed point, Y = ((66 R + 129 G + 25 B +
// 128) >> 8) + 16, i.e. 0.2578, 0.5039 and 0.0977 with rounding; that
// precision is this design's choice.
//
// Interface: in_valid/in_rgb (R in 23:16, G in 15:8, B in 7:0) in, out_valid,
// out_y and out_q one cycle later (one register stage). No back-pressure:
// one pixel can enter every cycle.
module rgb2gray #(
  parameter int C  = 4,                 // number of quantization levels
  parameter int QB = $clog2(C)          // bits of the quantized level
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [lh_pkg::PIX_W-1:0] in_rgb,
  output logic                    out_valid,
  output logic [7:0]              out_y,
  output logic [QB-1:0]           out_q
);

  logic [7:0]  r, g, b;
  logic [15:0] acc;   // at most 220 * 255 + 128 < 2^16
  logic [7:0]  y;

  assign r = in_rgb[23:16];
  assign g = in_rgb[15:8];
  assign b = in_rgb[7:0];

  always_comb begin
    acc = 16'(66 * r) + 16'(129 * g) + 16'(25 * b) + 16'd128;
    y   = acc[15:8] + 8'd16;          // at most 219 + 16 = 235
  end

  logic unused_frac;
  assign unused_frac = ^acc[7:0];   // fraction dropped by the >> 8

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_y     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= in_valid;
      out_y     <= y;
      out_q     <= y[7 -: QB];
    end
  end

  initial assert (C == 4 || C == 8 || C == 16 || C == 32 || C == 64 || C == 128 || C == 256)
    else $error("rgb2gray: C must be a power of two up to 256");

endmodule
