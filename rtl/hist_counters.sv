// Register-based local histogram: C x 16 bin counters.
//
// Counter k = Rn * C + q counts the pixels of region Rn whose quantized gray
// level is q. Each counter has its own enable: the comparator bit of its
// region (no 16-to-4 encoder is needed) ANDed with the decoded gray level
// and the global EN, so exactly one counter increments per valid pixel. The
// counter outputs are asynchronous (plain register outputs), so the whole
// histogram can be copied in one cycle; `reset` clears every counter in one
// cycle for the next frame. This is the document's register-based update
// block; the bin width n is chosen so that a bin can hold the pixel count of
// a whole region.
//
// Interface: en, region_onehot, q in the cycle of the pixel; the count is
// visible one cycle later on bin_cnt[]. reset has priority over en.
module hist_counters #(
  parameter int C  = 4,
  parameter int BW = 15,                 // bin width n (15 for 640 x 480)
  parameter int QB = $clog2(C),
  parameter int NB = C * lh_pkg::NREG
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    reset,
  input  logic                    en,
  input  logic [lh_pkg::NREG-1:0] region_onehot,
  input  logic [QB-1:0]           q,
  output logic [NB-1:0][BW-1:0]   bin_cnt
);

  logic [C-1:0]  level_dec;
  logic [NB-1:0] inc;

  always_comb begin
    level_dec = '0;
    level_dec[q] = 1'b1;
    for (int r = 0; r < lh_pkg::NREG; r++)
      for (int l = 0; l < C; l++)
        inc[r*C+l] = en && region_onehot[r] && level_dec[l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin_cnt <= '0;
    end else begin
      for (int k = 0; k < NB; k++) begin
        if (reset)       bin_cnt[k] <= '0;
        else if (inc[k]) bin_cnt[k] <= bin_cnt[k] + 1'b1;
      end
    end
  end

endmodule
