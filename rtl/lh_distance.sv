// Inter-histogram distance and cut decision.
//
// Computes FDM(Fi, Fi-1) = sum over the C x 16 bins of |h_i(k) - h_i-1(k)|,
// one bin per cycle with one subtractor (absolute difference), one adder and
// one accumulator register, then compares the result with the threshold:
// cut = (distance > alpha). Register set 2 holds the histogram of the
// previous frame.
//
// PARALLEL = 1 (register-based histogram, as in the document's SOC): in the
// start cycle the whole counter vector is copied into register set 1 (the
// one-cycle vector transfer); the next NB cycles compute the distance
// (65 cycles in all for C = 4); in the last of them set 1 is copied into
// set 2 for the next frame.
// PARALLEL = 0 (memory-based histogram): the block drives addr_in = 0..NB-1
// with clr_we, reads each bin combinationally on bin_in while the histogram
// memory clears it, and writes it into set 2 as it goes; set 1 is not needed.
//
// The cycle schedule follows the document; the streaming set-2 update of the
// memory-based version is this design's choice. Set 2 is all zero after
// reset, so the first frame is compared against an empty histogram.
//
// Interface: start (one cycle, only when !busy); done pulses, with distance and
// cut valid and held, NB+1 cycles after start.
module lh_distance #(
  parameter int  C        = 4,
  parameter int  BW       = 15,
  parameter int  DW       = 20,
  parameter bit  PARALLEL = 1'b1,
  parameter int  NB       = C * lh_pkg::NREG,
  parameter int  ABW      = $clog2(NB)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [NB-1:0][BW-1:0] hist_vec,   // PARALLEL = 1
  input  logic [BW-1:0]         bin_in,     // PARALLEL = 0
  output logic [ABW-1:0]        addr_in,
  output logic                  clr_we,
  input  logic [DW-1:0]         alpha,
  output logic                  busy,
  output logic                  done,
  output logic [DW-1:0]         distance,
  output logic                  cut
);

  logic [ABW-1:0] k;
  logic [DW-1:0]  acc;
  logic [BW-1:0]  cur, prev, diff;
  logic [DW-1:0]  acc_next;
  logic           last;

  logic [BW-1:0]  set2 [NB];   // histogram of frame i-1

  assign addr_in = k;
  assign clr_we  = busy && !PARALLEL;
  assign last    = (k == ABW'(NB - 1));

  always_comb begin
    prev     = set2[k];
    diff     = (cur >= prev) ? cur - prev : prev - cur;  // subtractor
    acc_next = acc + DW'(diff);                          // adder
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      k    <= '0;
      acc  <= '0;
      done <= 1'b0;
      distance <= '0;
      cut  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        k    <= '0;
        acc  <= '0;
      end else if (busy) begin
        acc <= acc_next;
        k   <= k + 1'b1;
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
          distance <= acc_next;
          cut  <= acc_next > alpha;
        end
      end
    end
  end

  if (PARALLEL) begin : g_par
    logic [BW-1:0] set1 [NB];    // histogram of frame i

    assign cur = set1[k];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int b = 0; b < NB; b++) begin
          set1[b] <= '0;
          set2[b] <= '0;
        end
      end else if (start && !busy) begin
        for (int b = 0; b < NB; b++) set1[b] <= hist_vec[b];   // vector transfer
      end else if (busy && last) begin
        for (int b = 0; b < NB; b++) set2[b] <= set1[b];       // set 1 -> set 2
      end
    end
  end else begin : g_ser
    assign cur = bin_in;

    // Set 2 as a memory, written one bin per cycle; cleared once at start-up
    // like the histogram memory.
    initial for (int b = 0; b < NB; b++) set2[b] = '0;

    always_ff @(posedge clk) begin
      if (busy) set2[k] <= bin_in;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("lh_distance: start while busy");

endmodule
