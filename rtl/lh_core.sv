// Local-histogram (LH) shot boundary detector.
//
// Takes one RGB pixel per cycle of a raster-scan frame, builds the 4 x 4
// local gray-level histograms of the frame (C quantization levels per
// region) and, at the end of the frame, computes the L1 distance to the
// previous frame's histograms and flags a cut when it exceeds alpha.
//
// Pipeline (the document's global architecture):
//   rgb2gray + region_detect (1 register stage, in parallel)
//   ARCH = LH_REG: hist_counters, enabled by the comparator bits directly
//   ARCH = LH_MEM: addr_calc (1 register stage) -> hist_memory
//   lh_distance: register sets 1/2, one-bin-per-cycle L1 distance, threshold
//   lh_ctrl: WE/EN, Sel, Reset.
// The two ARCH values are the document's two update-block versions; which
// one is built is chosen at elaboration, as the reconfigurable module
// versions are chosen when a partial bitstream is loaded.
//
// Timing: frame_start (one cycle, when !busy) opens a frame; pixels follow
// with pix_valid (gaps allowed; W*H of them). The histogram is complete 2
// (LH_REG) or 3 (LH_MEM) cycles after the last pixel; the distance then
// takes 1 + C*16 cycles, after which done pulses with distance and cut valid.
// A frame of W*H pixels at one pixel per cycle thus takes about W*H cycles.
module lh_core
  import lh_pkg::*;
#(
  parameter int       W    = 640,
  parameter int       H    = 480,
  parameter int       C    = 4,
  parameter lh_arch_e ARCH = LH_REG,
  parameter int       QB   = $clog2(C),
  parameter int       NB   = C * NREG,
  parameter int       ABW  = $clog2(NB),
  parameter int       BW   = bin_width(W, H),
  parameter int       DW   = dist_width(W, H)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             frame_start,
  input  logic             pix_valid,
  input  logic [PIX_W-1:0] pix_rgb,
  input  logic [DW-1:0]    alpha,
  output logic             busy,
  output logic             done,
  output logic [DW-1:0]    distance,
  output logic             cut
);

  logic            clear_pos, en, sel, cnt_reset, dist_start, dist_done;
  logic            hist_valid, hist_last;

  // Stage 1: colour conversion and region detection.
  logic            v1, last1;
  logic [7:0]      y1;
  logic [QB-1:0]   q1;
  logic [NREG-1:0] oh1;
  logic [3:0]      reg1;
  logic            v1_rd;

  rgb2gray #(.C(C)) u_gray (
    .clk, .rst_n, .in_valid(pix_valid), .in_rgb(pix_rgb),
    .out_valid(v1), .out_y(y1), .out_q(q1)
  );

  region_detect #(.W(W), .H(H)) u_region (
    .clk, .rst_n, .clear(clear_pos), .in_valid(pix_valid),
    .out_valid(v1_rd), .out_onehot(oh1), .out_region(reg1), .out_last(last1)
  );

  // Distance block inputs, driven by whichever histogram is built.
  logic [NB-1:0][BW-1:0] hist_vec;
  logic [BW-1:0]         bin_rd;
  logic [ABW-1:0]        addr_in;
  logic                  clr_we;

  if (ARCH == LH_REG) begin : g_reg
    assign hist_valid = v1;
    assign hist_last  = last1;
    assign bin_rd     = '0;

    hist_counters #(.C(C), .BW(BW)) u_hist (
      .clk, .rst_n, .reset(cnt_reset), .en, .region_onehot(oh1), .q(q1),
      .bin_cnt(hist_vec)
    );
  end else begin : g_mem
    logic           v2, last2;
    logic [ABW-1:0] addr2;

    addr_calc #(.C(C)) u_addr (
      .clk, .rst_n, .in_valid(v1), .in_region(reg1), .in_q(q1),
      .out_valid(v2), .out_addr(addr2)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) last2 <= 1'b0;
      else        last2 <= last1;
    end

    assign hist_valid = v2;
    assign hist_last  = last2;
    assign hist_vec   = '0;

    hist_memory #(.C(C), .BW(BW)) u_hist (
      .clk, .sel, .we(en), .addr(addr2), .clr_we, .addr_in, .rdata(bin_rd)
    );
  end

  lh_distance #(.C(C), .BW(BW), .DW(DW), .PARALLEL(ARCH == LH_REG)) u_dist (
    .clk, .rst_n, .start(dist_start), .hist_vec, .bin_in(bin_rd),
    .addr_in, .clr_we, .alpha, .busy(), .done(dist_done), .distance, .cut
  );

  lh_ctrl u_ctrl (
    .clk, .rst_n, .frame_start, .hist_valid, .hist_last, .dist_done,
    .clear_pos, .en, .sel, .cnt_reset, .dist_start, .busy, .done
  );

  // The gray value itself is only needed for its quantized MSBs.
  logic unused;
  assign unused = ^{y1, v1_rd};

endmodule
