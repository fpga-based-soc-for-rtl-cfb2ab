// Memory-based local histogram: C x 16 bins in a dual-port memory.
//
// In accumulation mode (sel = 0) MUX-2 passes the bin address from the
// address calculation block; the bin is read, incremented and written back
// in the same cycle (read on one port, written on the other at the clock
// edge), so a pixel can enter every cycle even when consecutive pixels hit
// the same bin. In distance mode (sel = 1) MUX-2 passes addr_in from the
// inter-histogram distance block: the bin is read out on rdata and, through
// MUX-1, zero is written in its place, leaving the memory cleared for the
// next frame. This follows the document's memory-based update block. The
// read port is asynchronous (distributed-RAM style) so that the read and
// the write fall in one cycle as the document requires; the memory starts
// all zero (initial contents), after which every distance pass clears it.
//
// Interface: we (WE) with addr in accumulation mode; clr_we with addr_in in
// distance mode; rdata is the bin at the selected address, combinationally.
module hist_memory #(
  parameter int C   = 4,
  parameter int BW  = 15,
  parameter int ABW = $clog2(C * lh_pkg::NREG),
  parameter int NB  = C * lh_pkg::NREG
) (
  input  logic           clk,
  input  logic           sel,       // 0 accumulate, 1 distance (read + clear)
  input  logic           we,        // accumulation write enable (WE)
  input  logic [ABW-1:0] addr,      // from the address calculation block
  input  logic           clr_we,    // distance-mode read strobe: write zero
  input  logic [ABW-1:0] addr_in,   // from the distance block
  output logic [BW-1:0]  rdata
);

  logic [BW-1:0]  mem [NB];
  logic [ABW-1:0] a;       // MUX-2
  logic [BW-1:0]  wdata;   // MUX-1
  logic           wen;

  initial for (int k = 0; k < NB; k++) mem[k] = '0;

  assign a     = sel ? addr_in : addr;
  assign rdata = mem[a];
  assign wdata = sel ? '0 : rdata + 1'b1;
  assign wen   = sel ? clr_we : we;

  always_ff @(posedge clk) begin
    if (wen) mem[a] <= wdata;
  end

endmodule
