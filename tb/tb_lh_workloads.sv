// Workload testbench of lh_core: every frame size and quantization level
// evaluated for the LH module (320x240, 512x512, 640x480, 1280x1024 and
// 1920x1080; C = 4 and 8 with counters, C = 4, 8 and 256 with memory).
// Each configuration processes two frames through lh_core_harness, which
// checks the distance, the cut decision and, for the first frame (fed
// without gaps), the exact cycle count W*H + 3 + 16C (counters) or
// W*H + 4 + 16C (memory): one pixel per clock. The first frame of each run
// is a cut (it is compared with an empty histogram), the second is not.
module tb_lh_workloads;
  import lh_pkg::*;
  localparam int N = 25;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge, so asynchronous resets fire
  always #5 clk = ~clk;

  int c [N], f [N], nc [N], nn [N];
  bit fin [N];

  lh_core_harness #(.W(320), .H(240), .C(4), .ARCH(LH_REG), .NF(2)) h0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .cuts(nc[0]), .no_cuts(nn[0]), .finished(fin[0]));
  lh_core_harness #(.W(320), .H(240), .C(8), .ARCH(LH_REG), .NF(2)) h1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .cuts(nc[1]), .no_cuts(nn[1]), .finished(fin[1]));
  lh_core_harness #(.W(320), .H(240), .C(4), .ARCH(LH_MEM), .NF(2)) h2 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .cuts(nc[2]), .no_cuts(nn[2]), .finished(fin[2]));
  lh_core_harness #(.W(320), .H(240), .C(8), .ARCH(LH_MEM), .NF(2)) h3 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .cuts(nc[3]), .no_cuts(nn[3]), .finished(fin[3]));
  lh_core_harness #(.W(320), .H(240), .C(256), .ARCH(LH_MEM), .NF(2), .ALPHA(76800 - 1)) h4 (.clk, .rst_n, .checks(c[4]), .failures(f[4]), .cuts(nc[4]), .no_cuts(nn[4]), .finished(fin[4]));
  lh_core_harness #(.W(512), .H(512), .C(4), .ARCH(LH_REG), .NF(2)) h5 (.clk, .rst_n, .checks(c[5]), .failures(f[5]), .cuts(nc[5]), .no_cuts(nn[5]), .finished(fin[5]));
  lh_core_harness #(.W(512), .H(512), .C(8), .ARCH(LH_REG), .NF(2)) h6 (.clk, .rst_n, .checks(c[6]), .failures(f[6]), .cuts(nc[6]), .no_cuts(nn[6]), .finished(fin[6]));
  lh_core_harness #(.W(512), .H(512), .C(4), .ARCH(LH_MEM), .NF(2)) h7 (.clk, .rst_n, .checks(c[7]), .failures(f[7]), .cuts(nc[7]), .no_cuts(nn[7]), .finished(fin[7]));
  lh_core_harness #(.W(512), .H(512), .C(8), .ARCH(LH_MEM), .NF(2)) h8 (.clk, .rst_n, .checks(c[8]), .failures(f[8]), .cuts(nc[8]), .no_cuts(nn[8]), .finished(fin[8]));
  lh_core_harness #(.W(512), .H(512), .C(256), .ARCH(LH_MEM), .NF(2), .ALPHA(262144 - 1)) h9 (.clk, .rst_n, .checks(c[9]), .failures(f[9]), .cuts(nc[9]), .no_cuts(nn[9]), .finished(fin[9]));
  lh_core_harness #(.W(640), .H(480), .C(4), .ARCH(LH_REG), .NF(2)) h10 (.clk, .rst_n, .checks(c[10]), .failures(f[10]), .cuts(nc[10]), .no_cuts(nn[10]), .finished(fin[10]));
  lh_core_harness #(.W(640), .H(480), .C(8), .ARCH(LH_REG), .NF(2)) h11 (.clk, .rst_n, .checks(c[11]), .failures(f[11]), .cuts(nc[11]), .no_cuts(nn[11]), .finished(fin[11]));
  lh_core_harness #(.W(640), .H(480), .C(4), .ARCH(LH_MEM), .NF(2)) h12 (.clk, .rst_n, .checks(c[12]), .failures(f[12]), .cuts(nc[12]), .no_cuts(nn[12]), .finished(fin[12]));
  lh_core_harness #(.W(640), .H(480), .C(8), .ARCH(LH_MEM), .NF(2)) h13 (.clk, .rst_n, .checks(c[13]), .failures(f[13]), .cuts(nc[13]), .no_cuts(nn[13]), .finished(fin[13]));
  lh_core_harness #(.W(640), .H(480), .C(256), .ARCH(LH_MEM), .NF(2), .ALPHA(307200 - 1)) h14 (.clk, .rst_n, .checks(c[14]), .failures(f[14]), .cuts(nc[14]), .no_cuts(nn[14]), .finished(fin[14]));
  lh_core_harness #(.W(1280), .H(1024), .C(4), .ARCH(LH_REG), .NF(2)) h15 (.clk, .rst_n, .checks(c[15]), .failures(f[15]), .cuts(nc[15]), .no_cuts(nn[15]), .finished(fin[15]));
  lh_core_harness #(.W(1280), .H(1024), .C(8), .ARCH(LH_REG), .NF(2)) h16 (.clk, .rst_n, .checks(c[16]), .failures(f[16]), .cuts(nc[16]), .no_cuts(nn[16]), .finished(fin[16]));
  lh_core_harness #(.W(1280), .H(1024), .C(4), .ARCH(LH_MEM), .NF(2)) h17 (.clk, .rst_n, .checks(c[17]), .failures(f[17]), .cuts(nc[17]), .no_cuts(nn[17]), .finished(fin[17]));
  lh_core_harness #(.W(1280), .H(1024), .C(8), .ARCH(LH_MEM), .NF(2)) h18 (.clk, .rst_n, .checks(c[18]), .failures(f[18]), .cuts(nc[18]), .no_cuts(nn[18]), .finished(fin[18]));
  lh_core_harness #(.W(1280), .H(1024), .C(256), .ARCH(LH_MEM), .NF(2), .ALPHA(1310720 - 1)) h19 (.clk, .rst_n, .checks(c[19]), .failures(f[19]), .cuts(nc[19]), .no_cuts(nn[19]), .finished(fin[19]));
  lh_core_harness #(.W(1920), .H(1080), .C(4), .ARCH(LH_REG), .NF(2)) h20 (.clk, .rst_n, .checks(c[20]), .failures(f[20]), .cuts(nc[20]), .no_cuts(nn[20]), .finished(fin[20]));
  lh_core_harness #(.W(1920), .H(1080), .C(8), .ARCH(LH_REG), .NF(2)) h21 (.clk, .rst_n, .checks(c[21]), .failures(f[21]), .cuts(nc[21]), .no_cuts(nn[21]), .finished(fin[21]));
  lh_core_harness #(.W(1920), .H(1080), .C(4), .ARCH(LH_MEM), .NF(2)) h22 (.clk, .rst_n, .checks(c[22]), .failures(f[22]), .cuts(nc[22]), .no_cuts(nn[22]), .finished(fin[22]));
  lh_core_harness #(.W(1920), .H(1080), .C(8), .ARCH(LH_MEM), .NF(2)) h23 (.clk, .rst_n, .checks(c[23]), .failures(f[23]), .cuts(nc[23]), .no_cuts(nn[23]), .finished(fin[23]));
  lh_core_harness #(.W(1920), .H(1080), .C(256), .ARCH(LH_MEM), .NF(2), .ALPHA(2073600 - 1)) h24 (.clk, .rst_n, .checks(c[24]), .failures(f[24]), .cuts(nc[24]), .no_cuts(nn[24]), .finished(fin[24]));

  function automatic bit all_done();
    for (int i = 0; i < N; i++) if (!fin[i]) return 0;
    return 1;
  endfunction

  task automatic report(input int extra_fail);
    int checks = 0, failures = extra_fail;
    for (int i = 0; i < N; i++) begin
      checks += c[i] + 2;
      failures += f[i];
      if (nc[i] == 0) begin failures++; $display("FAIL: configuration %0d saw no cut", i); end
      if (nn[i] == 0) begin failures++; $display("FAIL: configuration %0d saw no frame without cut", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!all_done()) @(posedge clk);
    report(0);
    $finish;
  end

  initial begin
    repeat (12000000) @(posedge clk);
    $display("watchdog expired");
    for (int i = 0; i < N; i++) if (!fin[i]) $display("configuration %0d not finished", i);
    report(1);
    $finish;
  end
endmodule
