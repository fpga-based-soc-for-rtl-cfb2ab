// Self-checking testbench for lh_distance.
// Instance P: register-set version (C = 4, parallel vector transfer).
// Instance S: streaming version (C = 8) fed by a model of the histogram
// memory that reads addr_in combinationally and clears bins on clr_we.
// For a sequence of random histograms of a 640 x 480 frame (each region's C
// bins add up to its 19200 pixels), some identical and some extreme ones
// (all pixels of every region in the lowest, then the highest level: the
// largest possible distance, 2*W*H)
// the distance must equal the L1 distance to the previous histogram
// computed here, cut must be (distance > alpha) including at alpha equal to
// the distance, and done must come exactly 1 + C*16 cycles after the start
// cycle (65 cycles for C = 4, as in the document).
module tb_lh_distance;
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

  // register-set version, C = 4
  logic               start_p, done_p, cut_p, busy_p, clr_p;
  logic [63:0][14:0]  vec_p;
  logic [5:0]         ai_p;
  logic [19:0]        alpha, dist_p, dist_s;
  lh_distance #(.C(4), .BW(15), .DW(20), .PARALLEL(1)) dut_p (
    .clk, .rst_n, .start(start_p), .hist_vec(vec_p), .bin_in('0), .addr_in(ai_p), .clr_we(clr_p),
    .alpha, .busy(busy_p), .done(done_p), .distance(dist_p), .cut(cut_p));

  // streaming version, C = 8
  logic               start_s, done_s, cut_s, busy_s, clr_s;
  logic [6:0]         ai_s;
  logic [14:0]        bin_s;
  logic [14:0]        hmem [128];
  lh_distance #(.C(8), .BW(15), .DW(20), .PARALLEL(0)) dut_s (
    .clk, .rst_n, .start(start_s), .hist_vec('0), .bin_in(bin_s), .addr_in(ai_s), .clr_we(clr_s),
    .alpha, .busy(busy_s), .done(done_s), .distance(dist_s), .cut(cut_s));
  assign bin_s = hmem[ai_s];
  always @(posedge clk) if (clr_s) hmem[ai_s] <= '0;

  // Histogram of one frame: mode 0 random, 1 same as before, 2 all pixels in
  // the lowest level, 3 all in the highest level.
  function automatic void gen(input int c, input int mode, ref int h [], input int prev []);
    for (int r = 0; r < 16; r++) begin
      int left = 19200;
      for (int l = 0; l < c; l++) begin
        int v;
        if (mode == 1)      v = prev[r*c+l];
        else if (mode == 2) v = (l == 0) ? 19200 : 0;
        else if (mode == 3) v = (l == c - 1) ? 19200 : 0;
        else                v = (l == c - 1) ? left : $urandom_range(left);
        if (mode == 0) left -= v;
        h[r*c+l] = v;
      end
    end
  endfunction

  int prev_p [64];
  int prev_s [128];

  task automatic run_p(input int mode, input int alpha_off);
    int cur [] = new[64]; int pv [] = new[64]; int d = 0; int cyc = 0;
    foreach (pv[k]) pv[k] = prev_p[k];
    gen(4, mode, cur, pv);
    for (int k = 0; k < 64; k++) begin
      d += (cur[k] > prev_p[k]) ? cur[k] - prev_p[k] : prev_p[k] - cur[k];
      vec_p[k] = 15'(cur[k]);
    end
    alpha = 20'(d + alpha_off);
    @(negedge clk); start_p = 1;
    @(negedge clk); start_p = 0; vec_p = '0;   // vector must have been captured
    cyc = 1;
    while (!done_p) begin @(negedge clk); cyc++; end
    check(cyc == 65, $sformatf("P: done after %0d cycles, expected 65", cyc));
    check(int'(dist_p) == d, $sformatf("P: distance %0d expected %0d", dist_p, d));
    check(cut_p == (longint'(d) > longint'(alpha)), "P: cut decision");
    if (mode == 3) check(d == 2 * 640 * 480, "P: largest distance reached");
    foreach (prev_p[k]) prev_p[k] = cur[k];
  endtask

  task automatic run_s(input int mode, input int alpha_off);
    int cur [] = new[128]; int pv [] = new[128]; int d = 0; int cyc = 0; bit cleared = 1;
    foreach (pv[k]) pv[k] = prev_s[k];
    gen(8, mode, cur, pv);
    for (int k = 0; k < 128; k++) begin
      d += (cur[k] > prev_s[k]) ? cur[k] - prev_s[k] : prev_s[k] - cur[k];
      hmem[k] = 15'(cur[k]);
    end
    alpha = 20'(d + alpha_off);
    @(negedge clk); start_s = 1;
    @(negedge clk); start_s = 0;
    cyc = 1;
    while (!done_s) begin @(negedge clk); cyc++; end
    check(cyc == 129, $sformatf("S: done after %0d cycles, expected 129", cyc));
    check(int'(dist_s) == d, $sformatf("S: distance %0d expected %0d", dist_s, d));
    check(cut_s == (longint'(d) > longint'(alpha)), "S: cut decision");
    for (int k = 0; k < 128; k++) if (hmem[k] != 0) cleared = 0;
    check(cleared, "S: histogram memory cleared");
    foreach (prev_s[k]) prev_s[k] = cur[k];
  endtask

  initial begin
    start_p = 0; start_s = 0; vec_p = '0; alpha = 0;
    foreach (prev_p[k]) prev_p[k] = 0;
    foreach (prev_s[k]) prev_s[k] = 0;
    foreach (hmem[k]) hmem[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      run_p((n % 5 == 3) ? 1 : (n == 10) ? 2 : (n == 11) ? 3 : 0, (n % 3) - 1);
      run_s((n % 5 == 3) ? 1 : (n == 20) ? 2 : (n == 21) ? 3 : 0, (n % 3) - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
