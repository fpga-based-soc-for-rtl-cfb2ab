// Pixel reader of the LH module: an address counter over a stored frame.
//
// On start it issues W*H word reads, base, base+1, ..., one per cycle while
// the memory port grants them, and streams the returned words to the LH
// core as pixels (pix_valid/pix_rgb). Reads are pipelined: any number may be
// outstanding, since the LH pipeline takes a pixel in every cycle and needs
// no back-pressure. Responses must come back in request order. The address
// counter follows the document ("an address counter is used for pixel
// reading"); the request/grant port is this design's choice.
//
// Interface: start (when !busy) with base; busy stays high until the last
// pixel has been delivered; done pulses in that cycle.
module lh_pixel_reader
  import lh_pkg::*;
#(
  parameter int W = 640,
  parameter int H = 480,
  parameter int NPIX = W * H,
  parameter int CW   = $clog2(NPIX + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [MEM_AW-1:0] base,
  output mem_req_t          mreq,
  input  mem_rsp_t          mrsp,
  output logic              pix_valid,
  output logic [PIX_W-1:0]  pix_rgb,
  output logic              busy,
  output logic              done
);

  logic [CW-1:0]     n_req, n_rsp;   // reads issued / pixels delivered
  logic [MEM_AW-1:0] addr;

  assign mreq.req   = busy && (n_req != CW'(NPIX));
  assign mreq.we    = 1'b0;
  assign mreq.addr  = addr;
  assign mreq.wdata = '0;

  assign pix_valid = busy && mrsp.rvalid;
  assign pix_rgb   = mrsp.rdata;
  assign done      = pix_valid && (n_rsp == CW'(NPIX - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      n_req <= '0;
      n_rsp <= '0;
      addr  <= '0;
    end else if (start && !busy) begin
      busy  <= 1'b1;
      n_req <= '0;
      n_rsp <= '0;
      addr  <= base;
    end else if (busy) begin
      if (mreq.req && mrsp.gnt) begin
        n_req <= n_req + 1'b1;
        addr  <= addr + 1'b1;
      end
      if (pix_valid) n_rsp <= n_rsp + 1'b1;
      if (done)      busy  <= 1'b0;
    end
  end

endmodule
