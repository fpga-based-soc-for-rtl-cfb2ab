// Shared types and helper functions of the local-histogram (LH) shot detector.
//
// The frame memory is addressed in pixel words: one 24-bit RGB pixel
// (R in bits 23:16, G in 15:8, B in 7:0) per word, with a 32-bit word
// address as on the 32-bit native port of the memory controller. The word
// layout is this design's choice; the document does not give a pixel format.
//
// The sizing functions follow the document's formulas: a histogram bin must
// count every pixel of one region (W/4 x H/4), the bin address selects one of
// C x 16 bins (16 regions of C quantization levels each).
package lh_pkg;

  localparam int PIX_W  = 24;   // RGB 8:8:8 pixel word
  localparam int MEM_AW = 32;   // word address width of the memory port
  localparam int NREG   = 16;   // 4 x 4 image regions

  // Histogram architecture of the LH module (the reconfigurable versions).
  typedef enum logic {
    LH_REG = 1'b0,              // C x 16 register counters
    LH_MEM = 1'b1               // C x 16 words of dual-port memory
  } lh_arch_e;

  // One request of a master on the shared memory port.
  typedef struct packed {
    logic              req;     // request valid
    logic              we;      // 1 write, 0 read
    logic [MEM_AW-1:0] addr;    // word address
    logic [PIX_W-1:0]  wdata;   // write data
  } mem_req_t;

  // Response to a master: grant in the request cycle, read data later.
  typedef struct packed {
    logic              gnt;     // request accepted this cycle
    logic              rvalid;  // read data valid
    logic [PIX_W-1:0]  rdata;   // read data
  } mem_rsp_t;

  // Width n of a histogram bin: it has to hold the pixel count of a region,
  // (W/4)*(H/4), itself.
  function automatic int bin_width(input int w, input int h);
    return $clog2((w / 4) * (h / 4) + 1);
  endfunction

  // Width of the frame distance: the L1 distance of two histograms of the
  // same frame size is at most 2*W*H.
  function automatic int dist_width(input int w, input int h);
    return $clog2(2 * w * h + 1);
  endfunction

endpackage
