// Key frame updater.
//
// When the shot detector reports a cut between frames i-1 and i (cut_en, the
// EN input of the document), the updater is armed; at the start of the next
// frame (frame i+1, the "coming frame") it copies that frame, word by word,
// from its acquisition area into the key frame area, then disarms. The
// document gives this function; the copy engine is this design's own: it
// reads one word, waits for the data, writes it, and moves on (one word in
// flight, about three cycles per pixel on an uncontended port).
//
// Interface: cut_en (one cycle) arms; frame_start with src_base starts a
// copy if armed (otherwise nothing happens); busy covers the copy, done
// pulses at its end and key_valid stays high once a key frame has been
// stored. dst_base is the key frame area.
module key_frame_updater
  import lh_pkg::*;
#(
  parameter int W = 640,
  parameter int H = 480,
  parameter int NPIX = W * H,
  parameter int CW   = $clog2(NPIX + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cut_en,
  input  logic              frame_start,
  input  logic [MEM_AW-1:0] src_base,
  input  logic [MEM_AW-1:0] dst_base,
  output mem_req_t          mreq,
  input  mem_rsp_t          mrsp,
  output logic              armed,
  output logic              busy,
  output logic              done,
  output logic              key_valid
);

  typedef enum logic [1:0] {IDLE, RD, WAIT, WR} state_e;
  state_e state;

  logic [CW-1:0]     idx;
  logic [MEM_AW-1:0] src, dst;
  logic [PIX_W-1:0]  data;

  assign busy = (state != IDLE);

  always_comb begin
    mreq = '0;
    unique case (state)
      RD: begin mreq.req = 1'b1; mreq.addr = src + MEM_AW'(idx); end
      WR: begin mreq.req = 1'b1; mreq.we = 1'b1; mreq.addr = dst + MEM_AW'(idx); mreq.wdata = data; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      armed     <= 1'b0;
      idx       <= '0;
      src       <= '0;
      dst       <= '0;
      data      <= '0;
      done      <= 1'b0;
      key_valid <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (frame_start && armed) begin
          armed <= 1'b0;
          state <= RD;
          idx   <= '0;
          src   <= src_base;
          dst   <= dst_base;
        end
        RD:   if (mrsp.gnt) state <= WAIT;
        WAIT: if (mrsp.rvalid) begin
          data  <= mrsp.rdata;
          state <= WR;
        end
        WR:   if (mrsp.gnt) begin
          if (idx == CW'(NPIX - 1)) begin
            state     <= IDLE;
            done      <= 1'b1;
            key_valid <= 1'b1;
          end else begin
            idx   <= idx + 1'b1;
            state <= RD;
          end
        end
        default: state <= IDLE;
      endcase
      if (cut_en) armed <= 1'b1;   // a new cut re-arms, even in a start cycle
    end
  end

endmodule
