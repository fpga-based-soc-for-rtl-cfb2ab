// Video summarization engine around the local-histogram (LH) shot detector.
//
// The custom hardware of the summarization system-on-chip: it works on
// frames held in an external frame memory, organised in four areas of W*H
// pixel words:
//   area 0, area 1 - acquisition ping-pong: the video input fills one while
//                    the other (the frame just stored) is analysed;
//   area 2         - key frame of the current shot;
//   area 3         - frame shown by the display controller.
// When the video input reports a stored frame (frame_ready), the engine
//   1. streams it through the LH core (lh_pixel_reader -> lh_core), which
//      computes the distance between its local histograms and those of the
//      previous frame and flags a cut when the distance exceeds alpha;
//   2. if the previous frame ended with a cut, copies this frame, the first
//      of the new shot, into area 2 (key_frame_updater);
//   3. once the key frame copy is finished, composes current frame + key
//      frame into area 3 (multidisplay_manager).
// The three masters share one memory port through mem_access_ctrl; the
// port stands for a native port of the multiport DDR memory controller,
// which, with the processor, the display controller and the video input,
// lies outside this module. A frame_ready that arrives while the previous
// frame is still being processed is dropped (frame_dropped pulses, and the
// video input is pointed at the same area again).
//
// The dataflow, the four memory areas and the key-frame rule follow the
// document; the default configuration (register-based histogram, C = 4,
// 640 x 480) is the one of its static system implementation. Frame
// sequencing, the drop rule and the port protocol are this design's own.
//
// Memory port: mem_req/mem_we/mem_addr/mem_wdata are taken when mem_ready is
// high; read data returns on mem_rvalid/mem_rdata, in order, any number of
// cycles later.
module lh_soc_top
  import lh_pkg::*;
#(
  parameter int       W    = 640,
  parameter int       H    = 480,
  parameter int       C    = 4,
  parameter lh_arch_e ARCH = LH_REG,
  parameter int       DW   = dist_width(W, H)
) (
  input  logic              clk,
  input  logic              rst_n,
  // video input side
  input  logic              frame_ready,   // a frame is stored in acq_area
  output logic              acq_area,      // area (0/1) to fill next
  output logic              frame_dropped,
  // detector
  input  logic [DW-1:0]     alpha,
  output logic              dist_valid,    // one cycle per analysed frame
  output logic [DW-1:0]     distance,
  output logic              cut,           // with dist_valid: shot change
  output logic              key_valid,     // area 2 holds a key frame
  output logic              busy,
  // display controller side
  output logic [MEM_AW-1:0] disp_base,
  output logic              disp_done,     // area 3 updated
  // shared memory port
  output logic              mem_req,
  output logic              mem_we,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [PIX_W-1:0]  mem_wdata,
  input  logic              mem_ready,
  input  logic              mem_rvalid,
  input  logic [PIX_W-1:0]  mem_rdata
);

  localparam int NPIX = W * H;

  function automatic logic [MEM_AW-1:0] area_base(input int k);
    return MEM_AW'(k * NPIX);
  endfunction

  mem_req_t mreq [3];
  mem_rsp_t mrsp [3];

  logic              accept;
  logic [MEM_AW-1:0] cur_base;
  logic              lh_run, mdm_pending;
  logic              pix_valid;
  logic [PIX_W-1:0]  pix_rgb;
  logic              lh_done, lh_cut;
  logic              kfu_busy, mdm_busy, mdm_start;

  assign busy          = lh_run || mdm_pending || mdm_busy || kfu_busy;
  assign accept        = frame_ready && !busy;
  assign frame_dropped = frame_ready && busy;
  assign cur_base      = acq_area ? area_base(1) : area_base(0);
  assign disp_base     = area_base(3);
  assign mdm_start     = mdm_pending && !kfu_busy;

  logic [MEM_AW-1:0] mdm_cur;   // area of the frame being shown

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acq_area    <= 1'b0;
      lh_run      <= 1'b0;
      mdm_pending <= 1'b0;
      mdm_cur     <= '0;
    end else begin
      if (accept) begin
        acq_area    <= !acq_area;
        lh_run      <= 1'b1;
        mdm_pending <= 1'b1;
        mdm_cur     <= cur_base;
      end
      if (lh_done)   lh_run      <= 1'b0;
      if (mdm_start) mdm_pending <= 1'b0;
    end
  end

  lh_pixel_reader #(.W(W), .H(H)) u_reader (
    .clk, .rst_n, .start(accept), .base(cur_base),
    .mreq(mreq[0]), .mrsp(mrsp[0]),
    .pix_valid, .pix_rgb, .busy(), .done()
  );

  lh_core #(.W(W), .H(H), .C(C), .ARCH(ARCH), .DW(DW)) u_lh (
    .clk, .rst_n, .frame_start(accept), .pix_valid, .pix_rgb, .alpha,
    .busy(), .done(lh_done), .distance, .cut(lh_cut)
  );

  assign dist_valid = lh_done;
  assign cut        = lh_done && lh_cut;

  key_frame_updater #(.W(W), .H(H)) u_kfu (
    .clk, .rst_n, .cut_en(cut), .frame_start(accept), .src_base(cur_base),
    .dst_base(area_base(2)), .mreq(mreq[1]), .mrsp(mrsp[1]),
    .armed(), .busy(kfu_busy), .done(), .key_valid
  );

  multidisplay_manager #(.W(W), .H(H)) u_mdm (
    .clk, .rst_n, .start(mdm_start), .cur_base(mdm_cur), .key_base(area_base(2)),
    .disp_base(area_base(3)), .key_valid, .mreq(mreq[2]), .mrsp(mrsp[2]),
    .busy(mdm_busy), .done(disp_done)
  );

  mem_access_ctrl #(.N(3)) u_mac (
    .clk, .rst_n, .mreq, .mrsp,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ready, .mem_rvalid, .mem_rdata
  );

endmodule
