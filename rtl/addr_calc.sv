// Histogram bin address calculation: Address = Rn * C + cq.
//
// One multiplier and one adder, as the document describes, followed by one
// register stage (this design's choice, to keep the multiplier off the memory
// read-increment-write path). Bins of one region are C consecutive words, so
// the C x 16 bin memory needs Abw = log2(C*16) address bits (6, 7 and 12 bits
// for C = 4, 8 and 256).
//
// Interface: in_valid/in_region/in_q in, out_valid/out_addr one cycle later.
module addr_calc #(
  parameter int C   = 4,
  parameter int QB  = $clog2(C),
  parameter int ABW = $clog2(C * lh_pkg::NREG)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [3:0]     in_region,
  input  logic [QB-1:0]  in_q,
  output logic           out_valid,
  output logic [ABW-1:0] out_addr
);

  logic [ABW-1:0] prod;
  logic [ABW-1:0] sum;

  always_comb begin
    prod = ABW'(in_region * C);   // multiplier (a shift for a power-of-two C)
    sum  = prod + ABW'(in_q);     // adder
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_addr  <= '0;
    end else begin
      out_valid <= in_valid;
      out_addr  <= sum;
    end
  end

endmodule
