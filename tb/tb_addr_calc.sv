// Self-checking testbench for addr_calc at C = 4, 8 and 256: the bin address
// must be region * C + level, one cycle after the inputs, over random and
// corner-case inputs; the address widths must be 6, 7 and 12 bits.
module tb_addr_calc;
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

  logic       iv;
  logic [3:0] rg;
  logic [7:0] q;
  logic       v4, v8, v256;
  logic [5:0] a4;
  logic [6:0] a8;
  logic [11:0] a256;
  addr_calc #(.C(4))   d4   (.clk, .rst_n, .in_valid(iv), .in_region(rg), .in_q(q[1:0]), .out_valid(v4),   .out_addr(a4));
  addr_calc #(.C(8))   d8   (.clk, .rst_n, .in_valid(iv), .in_region(rg), .in_q(q[2:0]), .out_valid(v8),   .out_addr(a8));
  addr_calc #(.C(256)) d256 (.clk, .rst_n, .in_valid(iv), .in_region(rg), .in_q(q),      .out_valid(v256), .out_addr(a256));

  initial begin
    iv = 0; rg = 0; q = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check($bits(a4) == 6 && $bits(a8) == 7 && $bits(a256) == 12, "address widths");
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      iv = 1'($urandom);
      if (n < 16) begin rg = 4'(n); q = 8'hFF; end
      else begin rg = 4'($urandom); q = 8'($urandom); end
      @(posedge clk); #1;
      check(v4 == iv && v8 == iv && v256 == iv, "valid");
      check(int'(a4) == int'(rg) * 4 + int'(q[1:0]), $sformatf("C4 r=%0d q=%0d a=%0d", rg, q[1:0], a4));
      check(int'(a8) == int'(rg) * 8 + int'(q[2:0]), $sformatf("C8 r=%0d q=%0d a=%0d", rg, q[2:0], a8));
      check(int'(a256) == int'(rg) * 256 + int'(q), $sformatf("C256 r=%0d q=%0d a=%0d", rg, q, a256));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
