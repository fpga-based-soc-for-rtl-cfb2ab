// Self-checking testbench for region_detect.
// Runs a full 640 x 480 frame without gaps and two frames of a 24 x 16 image
// with random gaps in the pixel stream, and checks for every pixel the
// region number (4 * (line / (H/4)) + column / (W/4)), the one-hot
// comparator vector, the end-of-frame flag and the one-cycle latency. It
// also checks that `clear` restarts the count mid-frame.
module tb_region_detect;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge, so asynchronous resets fire
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // full size
  logic        clr_a, v_a, ov_a, last_a;
  logic [15:0] oh_a;
  logic [3:0]  rg_a;
  region_detect #(.W(640), .H(480)) dut_a (.clk, .rst_n, .clear(clr_a), .in_valid(v_a),
    .out_valid(ov_a), .out_onehot(oh_a), .out_region(rg_a), .out_last(last_a));
  // is_small
  logic        clr_b, v_b, ov_b, last_b;
  logic [15:0] oh_b;
  logic [3:0]  rg_b;
  region_detect #(.W(24), .H(16)) dut_b (.clk, .rst_n, .clear(clr_b), .in_valid(v_b),
    .out_valid(ov_b), .out_onehot(oh_b), .out_region(rg_b), .out_last(last_b));

  task automatic run_frame(input int w, input int h, input bit gaps, input bit is_small);
    for (int j = 0; j < h; j++)
      for (int i = 0; i < w; i++) begin
        int exp_r;
        if (gaps) while ($urandom_range(2) == 0) begin
          @(negedge clk);
          if (is_small) v_b = 0; else v_a = 0;
          @(posedge clk); #1;
          check((is_small ? ov_b : ov_a) == 0, "no valid during gap");
        end
        @(negedge clk);
        if (is_small) v_b = 1; else v_a = 1;
        @(posedge clk); #1;
        exp_r = 4 * (j / (h / 4)) + i / (w / 4);
        if (is_small) begin
          check(ov_b && rg_b == 4'(exp_r) && oh_b == 16'(1 << exp_r), $sformatf("is_small i=%0d j=%0d got %0d exp %0d", i, j, rg_b, exp_r));
          check(last_b == (i == w - 1 && j == h - 1), "is_small last");
        end else begin
          check(ov_a && rg_a == 4'(exp_r) && oh_a == 16'(1 << exp_r), $sformatf("full i=%0d j=%0d got %0d exp %0d", i, j, rg_a, exp_r));
          check(last_a == (i == w - 1 && j == h - 1), "full last");
        end
      end
    @(negedge clk); v_a = 0; v_b = 0;
  endtask

  initial begin
    clr_a = 0; clr_b = 0; v_a = 0; v_b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(640, 480, 0, 0);
    run_frame(24, 16, 1, 1);
    run_frame(24, 16, 1, 1);
    // clear in the middle of a frame
    for (int n = 0; n < 100; n++) begin @(negedge clk); v_b = 1; end
    @(negedge clk); v_b = 0; clr_b = 1;
    @(negedge clk); clr_b = 0;
    run_frame(24, 16, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
