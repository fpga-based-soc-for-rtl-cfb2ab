// Self-checking testbench for rgb2gray at C = 4, 8 and 256.
// Each output is compared with the conversion equation evaluated in real
// arithmetic (within one gray level of rounding) and with the exact 8-bit
// fixed-point result; the quantized level must equal the MSBs of the
// expected gray value, and the output must follow the input by one cycle.
module tb_rgb2gray;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge, so asynchronous resets fire
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        in_valid;
  logic [23:0] in_rgb;
  logic        v4, v8, v256;
  logic [7:0]  y4, y8, y256;
  logic [1:0]  q4;
  logic [2:0]  q8;
  logic [7:0]  q256;

  rgb2gray #(.C(4))   d4   (.clk, .rst_n, .in_valid, .in_rgb, .out_valid(v4),   .out_y(y4),   .out_q(q4));
  rgb2gray #(.C(8))   d8   (.clk, .rst_n, .in_valid, .in_rgb, .out_valid(v8),   .out_y(y8),   .out_q(q8));
  rgb2gray #(.C(256)) d256 (.clk, .rst_n, .in_valid, .in_rgb, .out_valid(v256), .out_y(y256), .out_q(q256));

  function automatic int exact_y(input logic [23:0] p);
    return ((66 * int'(p[23:16]) + 129 * int'(p[15:8]) + 25 * int'(p[7:0]) + 128) / 256) + 16;
  endfunction
  function automatic real real_y(input logic [23:0] p);
    return 0.257 * p[23:16] + 0.504 * p[15:8] + 0.098 * p[7:0] + 16.0;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [23:0] prev_rgb;
  logic        prev_v;
  initial begin
    in_valid = 0; in_rgb = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      prev_rgb = in_rgb; prev_v = in_valid;
      case (n)
        0: in_rgb = 24'h000000;
        1: in_rgb = 24'hFFFFFF;
        2: in_rgb = 24'hFF0000;
        3: in_rgb = 24'h00FF00;
        default: in_rgb = 24'($urandom);
      endcase
      in_valid = ($urandom_range(3) != 0);
      @(posedge clk); #1;
      // outputs now reflect the input of this cycle (one register stage)
      begin
        int e; real r;
        e = exact_y(in_rgb);
        r = real_y(in_rgb);
        check(v4 == in_valid && v8 == in_valid && v256 == in_valid, "valid latency");
        check(int'(y256) == e, $sformatf("exact y rgb=%h got %0d exp %0d", in_rgb, y256, e));
        check((real'(y256) - r) <= 1.0 && (r - real'(y256)) <= 1.0, $sformatf("real y rgb=%h got %0d exp %f", in_rgb, y256, r));
        check(int'(q4) == e / 64, $sformatf("q4 rgb=%h got %0d", in_rgb, q4));
        check(int'(q8) == e / 32, $sformatf("q8 rgb=%h got %0d", in_rgb, q8));
        check(int'(q256) == e, "q256");
      end
    end
    // black and white extremes of the luma range
    @(negedge clk); in_rgb = 24'h000000; in_valid = 1;
    @(posedge clk); #1; check(y4 == 8'd16, "black -> 16");
    @(negedge clk); in_rgb = 24'hFFFFFF;
    @(posedge clk); #1; check(y4 == 8'd235 && q4 == 2'd3 && q8 == 3'd7, "white -> 235");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
