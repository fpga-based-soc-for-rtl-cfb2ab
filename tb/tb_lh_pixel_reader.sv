// Self-checking testbench for lh_pixel_reader.
// The reader streams frames of 40 x 20 words from a frame memory model that
// is ready in 60% of the cycles and answers reads in order after 1 to 4
// cycles. Every delivered pixel must be the next word of the frame, exactly
// W*H pixels must come, done must pulse with the last one, and the reads
// must be pipelined (more than one read outstanding at some point). A second
// frame from another base address checks the restart. With an always-ready,
// one-cycle memory one pixel must arrive per cycle.
module tb_lh_pixel_reader;
  import lh_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge, so asynchronous resets fire
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int W = 40, H = 20;

  // slow memory
  logic start, pv, busy, done;
  logic [31:0] base;
  logic [23:0] prgb;
  mem_req_t q;
  mem_rsp_t r;
  logic ready, rvalid;
  logic [23:0] rdata;
  lh_pixel_reader #(.W(W), .H(H)) dut (.clk, .rst_n, .start, .base, .mreq(q), .mrsp(r),
    .pix_valid(pv), .pix_rgb(prgb), .busy, .done);
  frame_mem_model #(.DEPTH(4096), .READY_PCT(60), .MIN_LAT(1), .MAX_LAT(4)) m (
    .clk, .rst_n, .mem_req(q.req), .mem_we(q.we), .mem_addr(q.addr), .mem_wdata(q.wdata),
    .mem_ready(ready), .mem_rvalid(rvalid), .mem_rdata(rdata));
  assign r.gnt = q.req && ready;
  assign r.rvalid = rvalid;
  assign r.rdata = rdata;

  // fast memory
  logic start2, pv2, busy2, done2;
  logic [23:0] prgb2;
  mem_req_t q2;
  mem_rsp_t r2;
  logic ready2, rvalid2;
  logic [23:0] rdata2;
  lh_pixel_reader #(.W(W), .H(H)) dut2 (.clk, .rst_n, .start(start2), .base(32'd0), .mreq(q2), .mrsp(r2),
    .pix_valid(pv2), .pix_rgb(prgb2), .busy(busy2), .done(done2));
  frame_mem_model #(.DEPTH(4096)) m2 (
    .clk, .rst_n, .mem_req(q2.req), .mem_we(q2.we), .mem_addr(q2.addr), .mem_wdata(q2.wdata),
    .mem_ready(ready2), .mem_rvalid(rvalid2), .mem_rdata(rdata2));
  assign r2.gnt = q2.req && ready2;
  assign r2.rvalid = rvalid2;
  assign r2.rdata = rdata2;

  int max_out = 0, outstanding = 0;
  always @(posedge clk) begin
    outstanding = outstanding + int'(r.gnt) - int'(pv);
    if (outstanding > max_out) max_out = outstanding;
  end

  task automatic frame(input int b);
    int n; bit ok;
    n = 0; ok = 1;
    @(negedge clk); start = 1; base = 32'(b);
    @(negedge clk); start = 0;
    while (busy) begin
      if (pv) begin
        if (prgb != 24'(b + n + 7)) ok = 0;
        n++;
        check(done == (n == W * H), "done with last pixel");
      end
      @(negedge clk);
    end
    check(ok, $sformatf("pixel data from base %0d", b));
    check(n == W * H, $sformatf("pixel count %0d", n));
  endtask

  initial begin
    int n, cyc;
    start = 0; start2 = 0; base = 0;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 4096; i++) begin m.mem[i] = 24'(i + 7); m2.mem[i] = 24'(i + 7); end
    rst_n = 1;
    frame(0);
    frame(1000);
    check(max_out > 1, "reads are pipelined");
    // fast memory: one pixel per cycle
    @(negedge clk); start2 = 1;
    @(negedge clk); start2 = 0;
    n = 0; cyc = 0;
    while (busy2) begin
      if (pv2) n++;
      cyc++;
      @(negedge clk);
    end
    check(n == W * H && cyc == W * H + 1, $sformatf("fast: %0d pixels in %0d cycles", n, cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
