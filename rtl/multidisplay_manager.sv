// Multidisplay manager: builds the displayed frame from the current frame
// and the key frame.
//
// The output frame (W x H, written to the display area read by the TFT
// controller) is the current frame with the key frame of the current shot
// shown as a picture-in-picture inset in the top-right corner: the inset is
// W/4 x H/4 pixels and shows the key frame decimated by 4 in each direction
// (every fourth pixel of every fourth line). Until a key frame exists the
// whole output is the current frame. The document only says that a combined
// frame (current frame + key frame) is produced; the inset layout and the
// decimation are this design's choice.
//
// The pixels are produced in raster order, one at a time: read the source
// word, wait for it, write it to the display area (about three cycles per
// pixel on an uncontended port).
//
// Interface: start (when !busy) with the three area bases and key_valid;
// busy until the whole frame is written; done pulses at the end.
module multidisplay_manager
  import lh_pkg::*;
#(
  parameter int W  = 640,
  parameter int H  = 480,
  parameter int XW = $clog2(W),
  parameter int YW = $clog2(H)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [MEM_AW-1:0] cur_base,
  input  logic [MEM_AW-1:0] key_base,
  input  logic [MEM_AW-1:0] disp_base,
  input  logic              key_valid,
  output mem_req_t          mreq,
  input  mem_rsp_t          mrsp,
  output logic              busy,
  output logic              done
);

  localparam int XI = W - W / 4;   // first column of the inset
  localparam int YI = H / 4;       // first line below the inset

  typedef enum logic [1:0] {IDLE, RD, WAIT, WR} state_e;
  state_e state;

  logic [XW-1:0]     x;
  logic [YW-1:0]     y;
  logic [MEM_AW-1:0] pix;       // y*W + x
  logic [MEM_AW-1:0] key_row;   // key_base + 4*y*W
  logic [MEM_AW-1:0] cur_b, disp_b;
  logic              show_key;
  logic              inset;
  logic [MEM_AW-1:0] src_addr;
  logic [PIX_W-1:0]  data;
  logic              last;

  assign busy     = (state != IDLE);
  assign inset    = show_key && (32'(x) >= XI) && (32'(y) < YI);
  assign src_addr = inset ? key_row + MEM_AW'(4 * (32'(x) - XI)) : cur_b + pix;
  assign last     = (x == XW'(W - 1)) && (y == YW'(H - 1));

  always_comb begin
    mreq = '0;
    unique case (state)
      RD: begin mreq.req = 1'b1; mreq.addr = src_addr; end
      WR: begin mreq.req = 1'b1; mreq.we = 1'b1; mreq.addr = disp_b + pix; mreq.wdata = data; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      x        <= '0;
      y        <= '0;
      pix      <= '0;
      key_row  <= '0;
      cur_b    <= '0;
      disp_b   <= '0;
      show_key <= 1'b0;
      data     <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          state    <= RD;
          x        <= '0;
          y        <= '0;
          pix      <= '0;
          key_row  <= key_base;
          cur_b    <= cur_base;
          disp_b   <= disp_base;
          show_key <= key_valid;
        end
        RD:   if (mrsp.gnt) state <= WAIT;
        WAIT: if (mrsp.rvalid) begin
          data  <= mrsp.rdata;
          state <= WR;
        end
        WR:   if (mrsp.gnt) begin
          pix <= pix + 1'b1;
          if (last) begin
            state <= IDLE;
            done  <= 1'b1;
          end else begin
            state <= RD;
            if (x == XW'(W - 1)) begin
              x       <= '0;
              y       <= y + 1'b1;
              key_row <= key_row + MEM_AW'(4 * W);
            end else begin
              x <= x + 1'b1;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
