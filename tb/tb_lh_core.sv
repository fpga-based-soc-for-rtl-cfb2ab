// Self-checking testbench for lh_core, through lh_core_harness, in four
// configurations: register version C = 4 and memory versions C = 8 and
// C = 256 on small frames, and the default configuration (register version,
// C = 4, 640 x 480) on three full frames. Each harness checks the distance,
// the cut decision and the cycle count of every frame; the run also checks
// that cuts and non-cuts both occurred.
module tb_lh_core;
  import lh_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge, so asynchronous resets fire
  always #5 clk = ~clk;

  int c [4], f [4], nc [4], nn [4];
  bit fin [4];

  lh_core_harness #(.W(32),  .H(16),  .C(4),   .ARCH(LH_REG), .NF(9)) h0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .cuts(nc[0]), .no_cuts(nn[0]), .finished(fin[0]));
  lh_core_harness #(.W(32),  .H(16),  .C(8),   .ARCH(LH_MEM), .NF(9)) h1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .cuts(nc[1]), .no_cuts(nn[1]), .finished(fin[1]));
  lh_core_harness #(.W(16),  .H(8),   .C(256), .ARCH(LH_MEM), .NF(7), .ALPHA(16 * 8)) h2 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .cuts(nc[2]), .no_cuts(nn[2]), .finished(fin[2]));
  lh_core_harness #(.W(640), .H(480), .C(4),   .ARCH(LH_REG), .NF(4)) h3 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .cuts(nc[3]), .no_cuts(nn[3]), .finished(fin[3]));

  task automatic report(input int extra_fail);
    int checks = 0, failures = extra_fail;
    for (int i = 0; i < 4; i++) begin checks += c[i]; failures += f[i]; end
    for (int i = 0; i < 4; i++) begin
      checks += 2;
      if (nc[i] == 0) begin failures++; $display("FAIL: harness %0d saw no cut", i); end
      if (nn[i] == 0) begin failures++; $display("FAIL: harness %0d saw no frame without cut", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    report(0);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    $display("watchdog expired");
    report(1);
    $finish;
  end
endmodule
