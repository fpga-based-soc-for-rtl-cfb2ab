// Full-size end-to-end testbench of lh_soc_top: the top with its default
// parameters (register-based LH, C = 4, 640 x 480 frames) processes five
// frames, a shot change at the fourth, through a memory that is ready
// in 90% of the cycles and answers reads after 1 or 2 cycles. What is
// checked is described in soc_test_body.svh.
module tb_lh_soc_top_full;
  import lh_pkg::*;
  localparam int       W         = 640;
  localparam int       H         = 480;
  localparam int       C         = 4;
  localparam lh_arch_e ARCH      = LH_REG;
  localparam int       NF        = 5;
  localparam int       READY_PCT = 90;
  localparam int       MAX_LAT   = 2;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge, so asynchronous resets fire
  always #5 clk = ~clk;

  `include "soc_test_body.svh"

  lh_soc_top dut (
    .clk, .rst_n, .frame_ready, .acq_area, .frame_dropped, .alpha, .dist_valid, .distance, .cut,
    .key_valid, .busy, .disp_base, .disp_done, .mem_req, .mem_we, .mem_addr, .mem_wdata,
    .mem_ready, .mem_rvalid, .mem_rdata);

  initial begin
    wait (test_done);
    summarize();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    summarize();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
