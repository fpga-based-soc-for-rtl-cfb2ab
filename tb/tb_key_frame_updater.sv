// Self-checking testbench for key_frame_updater (24 x 12 frames).
// Memory model: ready 70% of the cycles, reads answered after 1 to 3 cycles.
// Checks: a frame_start without a preceding cut copies nothing; after a cut
// the next frame_start copies the whole source area into the key area word
// for word (and nothing outside it), sets key_valid and disarms; a cut that
// arrives in the same cycle as a frame_start arms for the following frame.
module tb_key_frame_updater;
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

  localparam int W = 24, H = 12, NP = W * H;
  localparam int KEY = 3 * NP;

  logic cut_en, frame_start, armed, busy, done, key_valid;
  logic [31:0] src_base;
  mem_req_t q;
  mem_rsp_t r;
  logic ready, rvalid;
  logic [23:0] rdata;
  key_frame_updater #(.W(W), .H(H)) dut (.clk, .rst_n, .cut_en, .frame_start, .src_base,
    .dst_base(32'(KEY)), .mreq(q), .mrsp(r), .armed, .busy, .done, .key_valid);
  frame_mem_model #(.DEPTH(4 * NP + 16), .READY_PCT(70), .MIN_LAT(1), .MAX_LAT(3)) m (
    .clk, .rst_n, .mem_req(q.req), .mem_we(q.we), .mem_addr(q.addr), .mem_wdata(q.wdata),
    .mem_ready(ready), .mem_rvalid(rvalid), .mem_rdata(rdata));
  assign r.gnt = q.req && ready;
  assign r.rvalid = rvalid;
  assign r.rdata = rdata;

  task automatic fill(input int area, input int seed);
    for (int i = 0; i < NP; i++) m.mem[area * NP + i] = 24'((seed * 7919 + i * 31) & 24'hFFFFFF);
  endtask

  task automatic pulse_start(input int area, input bit with_cut);
    @(negedge clk); frame_start = 1; src_base = 32'(area * NP); cut_en = with_cut;
    @(negedge clk); frame_start = 0; cut_en = 0;
  endtask

  task automatic wait_idle();
    repeat (2) @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  function automatic bit key_is(input int area);
    for (int i = 0; i < NP; i++) if (m.mem[KEY + i] != m.mem[area * NP + i]) return 0;
    return (m.mem[KEY + NP] == 24'h5A5A5A) && (m.mem[KEY - 1] == m.mem[3 * NP - 1]);
  endfunction

  initial begin
    cut_en = 0; frame_start = 0; src_base = 0;
    repeat (3) @(posedge clk);
    fill(0, 1); fill(1, 2); fill(2, 3);
    m.mem[KEY + NP] = 24'h5A5A5A;
    rst_n = 1;
    // no cut: nothing copied
    pulse_start(0, 0);
    wait_idle();
    check(!key_valid && !armed, "no copy without a cut");
    check(m.mem[KEY] == 0, "key area untouched");
    // cut, then the coming frame (area 1) is copied
    @(negedge clk); cut_en = 1; @(negedge clk); cut_en = 0;
    check(armed, "armed by cut");
    pulse_start(1, 0);
    #1 check(busy, "copy running");
    wait_idle();
    check(key_valid && !armed, "key valid, disarmed");
    check(key_is(1), "key area holds frame of area 1");
    // next frame without cut leaves the key frame alone
    pulse_start(0, 0);
    wait_idle();
    check(key_is(1), "key frame kept");
    // cut in the same cycle as a frame start arms for the next one
    pulse_start(2, 1);
    wait_idle();
    check(key_is(1) && armed, "cut with frame start: armed, no copy yet");
    pulse_start(2, 0);
    wait_idle();
    check(key_is(2), "key area holds frame of area 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
