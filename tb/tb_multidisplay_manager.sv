// Self-checking testbench for multidisplay_manager (32 x 16 frames).
// Memory model: ready 75% of the cycles, reads answered after 1 to 3 cycles.
// The display area is compared word by word with a composite worked out
// here: the current frame everywhere, except, once a key frame exists, the
// top-right W/4 x H/4 corner, which shows every fourth pixel of every fourth
// line of the key frame. Also checks that nothing outside the display area
// is written.
module tb_multidisplay_manager;
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
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int W = 32, H = 16, NP = W * H;

  logic start, key_valid, busy, done;
  logic [31:0] cur_base;
  mem_req_t q;
  mem_rsp_t r;
  logic ready, rvalid;
  logic [23:0] rdata;
  multidisplay_manager #(.W(W), .H(H)) dut (.clk, .rst_n, .start, .cur_base,
    .key_base(32'(2 * NP)), .disp_base(32'(3 * NP)), .key_valid, .mreq(q), .mrsp(r), .busy, .done);
  frame_mem_model #(.DEPTH(4 * NP + 4), .READY_PCT(75), .MIN_LAT(1), .MAX_LAT(3)) m (
    .clk, .rst_n, .mem_req(q.req), .mem_we(q.we), .mem_addr(q.addr), .mem_wdata(q.wdata),
    .mem_ready(ready), .mem_rvalid(rvalid), .mem_rdata(rdata));
  assign r.gnt = q.req && ready;
  assign r.rvalid = rvalid;
  assign r.rdata = rdata;

  task automatic compose(input int area, input bit kv);
    int bad = 0, inset_px = 0; bit saw_done = 0;
    @(negedge clk); start = 1; cur_base = 32'(area * NP); key_valid = kv;
    @(negedge clk); start = 0; key_valid = 0;
    while (busy) begin if (done) saw_done = 1; @(negedge clk); end
    if (done) saw_done = 1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        logic [23:0] e;
        if (kv && x >= W - W / 4 && y < H / 4) begin
          e = m.mem[2 * NP + (4 * y) * W + 4 * (x - (W - W / 4))];
          inset_px++;
        end else e = m.mem[area * NP + y * W + x];
        if (m.mem[3 * NP + y * W + x] != e) bad++;
      end
    check(bad == 0, $sformatf("area %0d key %0d: %0d wrong display pixels", area, kv, bad));
    check(inset_px == (kv ? NP / 16 : 0), "inset size");
    check(saw_done, "done pulse");
    check(m.mem[4 * NP] == 24'hABCDEF, "no write past the display area");
  endtask

  initial begin
    start = 0; key_valid = 0; cur_base = 0;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 3 * NP; i++) m.mem[i] = 24'((i * 2654435761) >> 8);
    m.mem[4 * NP] = 24'hABCDEF;
    rst_n = 1;
    compose(0, 0);
    compose(1, 1);
    compose(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
