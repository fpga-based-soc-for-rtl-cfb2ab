// End-to-end testbench of lh_soc_top at reduced size (32 x 16 frames) with
// the default LH module version (register-based histogram, C = 4): seven
// frames with two shot changes, through a slow memory (ready in 60% of the
// cycles, reads answered after 1 to 4 cycles). What is checked is described
// in soc_test_body.svh.
module tb_lh_soc_top;
  import lh_pkg::*;
  localparam int       W         = 32;
  localparam int       H         = 16;
  localparam int       C         = 4;
  localparam lh_arch_e ARCH      = LH_REG;
  localparam int       NF        = 7;
  localparam int       READY_PCT = 60;
  localparam int       MAX_LAT   = 4;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge, so asynchronous resets fire
  always #5 clk = ~clk;

  `include "soc_test_body.svh"

  lh_soc_top #(.W(W), .H(H), .C(C), .ARCH(ARCH)) dut (
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    summarize();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
