// Self-checking testbench for hist_memory (C = 4 and C = 256).
// Accumulation mode: random bin addresses, including long runs of the same
// bin in consecutive cycles (read-increment-write in one cycle), are counted
// against a reference. Distance mode: every bin is read through addr_in and
// must show the reference count, and must read zero afterwards (cleared by
// the zero input of MUX-1). A second frame then accumulates from zero.
module tb_hist_memory;
  logic clk = 0;
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

  logic        sel, we, clr_we;
  logic [11:0] addr, addr_in;
  logic [14:0] rd4;
  logic [16:0] rd256;
  int ref4 [64];
  int ref256 [4096];

  hist_memory #(.C(4),   .BW(15)) d4   (.clk, .sel, .we, .addr(addr[5:0]), .clr_we, .addr_in(addr_in[5:0]), .rdata(rd4));
  hist_memory #(.C(256), .BW(17)) d256 (.clk, .sel, .we, .addr(addr),      .clr_we, .addr_in(addr_in),      .rdata(rd256));

  task automatic accumulate(input int n);
    int a = 0;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      if ($urandom_range(3) != 0) a = $urandom_range(4095);   // else: same bin again
      sel = 0; we = ($urandom_range(7) != 0); addr = 12'(a);
      @(posedge clk);
      if (we) begin ref4[a % 64]++; ref256[a]++; end
    end
    @(negedge clk); we = 0;
  endtask

  task automatic read_clear();
    bit ok4, ok256;
    @(negedge clk); sel = 1;
    for (int k = 0; k < 4096; k++) begin
      addr_in = 12'(k); clr_we = 1;
      #1;
      if (k < 64) check(int'(rd4) == ref4[k], $sformatf("C=4 bin %0d read %0d expected %0d", k, rd4, ref4[k]));
      check(int'(rd256) == ref256[k], $sformatf("C=256 bin %0d read %0d expected %0d", k, rd256, ref256[k]));
      @(negedge clk);
    end
    clr_we = 0;
    ok4 = 1; ok256 = 1;
    for (int k = 0; k < 4096; k++) begin
      addr_in = 12'(k); #1;
      if (k < 64 && rd4 != 0) ok4 = 0;
      if (rd256 != 0) ok256 = 0;
    end
    check(ok4 && ok256, "bins cleared after distance pass");
    foreach (ref4[k]) ref4[k] = 0;
    foreach (ref256[k]) ref256[k] = 0;
    @(negedge clk); sel = 0;
  endtask

  initial begin
    sel = 0; we = 0; clr_we = 0; addr = 0; addr_in = 0;
    foreach (ref4[k]) ref4[k] = 0;
    foreach (ref256[k]) ref256[k] = 0;
    repeat (3) @(posedge clk);
    accumulate(20000);
    read_clear();
    accumulate(20000);
    read_clear();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
