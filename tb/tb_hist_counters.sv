// Self-checking testbench for hist_counters (C = 4 and C = 8, 15-bit bins).
// Random pixels (region, level, enable) are counted against a reference
// histogram; all bins are compared after every cycle. The one-cycle reset
// must clear every bin and win over a simultaneous enable. A long run of one
// bin checks that a bin counts up to the full region size of 640 x 480
// (19200) without overflow.
module tb_hist_counters;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge, so asynchronous resets fire
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        reset, en;
  logic [15:0] oh;
  logic [2:0]  q;
  logic [63:0][14:0]  b4;
  logic [127:0][14:0] b8;
  int ref4 [64];
  int ref8 [128];

  hist_counters #(.C(4), .BW(15)) d4 (.clk, .rst_n, .reset, .en, .region_onehot(oh), .q(q[1:0]), .bin_cnt(b4));
  hist_counters #(.C(8), .BW(15)) d8 (.clk, .rst_n, .reset, .en, .region_onehot(oh), .q(q),      .bin_cnt(b8));

  task automatic compare(input string tag);
    bit ok = 1;
    for (int k = 0; k < 64; k++)  if (int'(b4[k]) != ref4[k]) ok = 0;
    for (int k = 0; k < 128; k++) if (int'(b8[k]) != ref8[k]) ok = 0;
    check(ok, tag);
  endtask

  task automatic step(input bit r, input bit e, input int region, input int lvl);
    @(negedge clk);
    reset = r; en = e; oh = 16'(1 << region); q = 3'(lvl);
    @(posedge clk); #1;
    if (r) begin
      foreach (ref4[k]) ref4[k] = 0;
      foreach (ref8[k]) ref8[k] = 0;
    end else if (e) begin
      ref4[region * 4 + (lvl % 4)]++;
      ref8[region * 8 + lvl]++;
    end
  endtask

  initial begin
    reset = 0; en = 0; oh = 0; q = 0;
    foreach (ref4[k]) ref4[k] = 0;
    foreach (ref8[k]) ref8[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    compare("after reset");
    for (int n = 0; n < 4000; n++) begin
      step(0, ($urandom_range(4) != 0), $urandom_range(15), $urandom_range(7));
      compare($sformatf("random step %0d", n));
    end
    step(1, 1, 3, 3);            // reset wins over enable
    compare("reset clears");
    // counter 3 = level 3 of region 0, counter 63 = level 3 of region 15
    step(0, 1, 0, 3);
    check(b4[3] == 15'd1, "counter 3 <- region 0 level 3");
    step(0, 1, 15, 3);
    check(b4[63] == 15'd1, "counter 63 <- region 15 level 3");
    for (int n = 0; n < 19198; n++) step(0, 1, 9, 2);
    compare("full region count");
    check(b4[9 * 4 + 2] == 15'd19198, "bin count 19198");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
