// Test harness for one lh_core configuration (used by tb_lh_core).
//
// Feeds NF frames of W x H pixels to the core. Frames come in shots of three:
// within a shot every frame is the shot's own colour pattern plus small
// noise; a new shot starts with a different pattern. For each frame the
// harness computes the 4 x 4 local histograms itself (gray level from the
// 8-bit fixed-point form of Y = 0.257R + 0.504G + 0.098B + 16, quantized to
// its log2(C) MSBs), the L1 distance to the previous frame's histograms, and
// the cut decision, and compares them with the core. Frames with an odd
// index are fed with random gaps; the others without gaps, for which the
// done cycle must be exactly W*H + 3 + C*16 cycles (register version) or
// W*H + 4 + C*16 (memory version) after frame_start.
module lh_core_harness
  import lh_pkg::*;
#(
  parameter int       W    = 32,
  parameter int       H    = 16,
  parameter int       C    = 4,
  parameter lh_arch_e ARCH = LH_REG,
  parameter int       NF   = 7,
  parameter int       ALPHA = W * H / 4   // threshold
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   cuts,
  output int   no_cuts,
  output bit   finished
);
  localparam int NB = C * 16;
  localparam int DW = dist_width(W, H);

  logic             frame_start, pix_valid, busy, done, cut;
  logic [PIX_W-1:0] pix_rgb;
  logic [DW-1:0]    alpha, distance;

  lh_core #(.W(W), .H(H), .C(C), .ARCH(ARCH)) dut (
    .clk, .rst_n, .frame_start, .pix_valid, .pix_rgb, .alpha, .busy, .done, .distance, .cut);

  int prev_h [NB];
  int cur_h  [NB];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL (W=%0d H=%0d C=%0d %s): %s", W, H, C, ARCH.name(), what); end
  endtask

  function automatic logic [23:0] pixel(input int f, input int x, input int y);
    int s = f / 3;
    int r, g, b, n;
    r = (s * 97 + (x / 4) * 13) % 256;
    g = (s * 59 + (y / 2) * 29) % 256;
    b = (s * 151 + x * y) % 256;
    n = $urandom_range(6);
    r = (r + n > 255) ? 255 : r + n;
    return {8'(r), 8'(g), 8'(b)};
  endfunction

  function automatic int level(input logic [23:0] p);
    int y = ((66 * int'(p[23:16]) + 129 * int'(p[15:8]) + 25 * int'(p[7:0]) + 128) / 256) + 16;
    return y / (256 / C);
  endfunction

  initial begin
    checks = 0; failures = 0; cuts = 0; no_cuts = 0; finished = 0;
    frame_start = 0; pix_valid = 0; pix_rgb = 0; alpha = DW'(ALPHA);
    foreach (prev_h[k]) prev_h[k] = 0;
    @(posedge rst_n);
    for (int f = 0; f < NF; f++) begin
      int d; longint t0, t1; bit gaps;
      d = 0; gaps = f[0];
      foreach (cur_h[k]) cur_h[k] = 0;
      @(negedge clk);
      frame_start = 1;
      t0 = $time;
      @(negedge clk);
      frame_start = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          logic [23:0] p;
          p = pixel(f, x, y);
          if (gaps) while ($urandom_range(3) == 0) begin pix_valid = 0; @(negedge clk); end
          pix_valid = 1; pix_rgb = p;
          cur_h[(4 * (y / (H / 4)) + x / (W / 4)) * C + level(p)]++;
          @(negedge clk);
        end
      pix_valid = 0;
      while (!done) @(negedge clk);
      t1 = $time;
      for (int k = 0; k < NB; k++) d += (cur_h[k] > prev_h[k]) ? cur_h[k] - prev_h[k] : prev_h[k] - cur_h[k];
      check(int'(distance) == d, $sformatf("frame %0d distance %0d expected %0d", f, distance, d));
      check(cut == (d > int'(alpha)), $sformatf("frame %0d cut %0d", f, cut));
      if (cut) cuts++; else no_cuts++;
      if (!gaps)
        check((t1 - t0) / 10 == longint'(W * H + NB + ((ARCH == LH_REG) ? 3 : 4)),
              $sformatf("frame %0d took %0d cycles", f, (t1 - t0) / 10));
      prev_h = cur_h;
      @(negedge clk);
      check(!busy, "idle after done");
    end
    finished = 1;
  end
endmodule
