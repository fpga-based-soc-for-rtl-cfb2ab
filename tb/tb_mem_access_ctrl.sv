// Self-checking testbench for mem_access_ctrl with three masters.
// Each master issues random reads and writes to its own address range, keeps
// its request until granted, and may have several reads outstanding (master
// 0 pipelines reads like the pixel reader; masters 1 and 2 keep one access
// in flight like the key frame updater and the display manager). The memory
// model is ready in 50% of the cycles and answers after 1 to 5 cycles. Every
// read must return, to the master that issued it and in its order, the last
// value written there; all masters must be granted (no starvation) and
// simultaneous requests must have caused stalls.
module tb_mem_access_ctrl;
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

  mem_req_t mreq [3];
  mem_rsp_t mrsp [3];
  logic mem_req, mem_we, mem_ready, mem_rvalid;
  logic [31:0] mem_addr;
  logic [23:0] mem_wdata, mem_rdata;

  mem_access_ctrl #(.N(3), .DEPTH(4)) dut (.clk, .rst_n, .mreq, .mrsp,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ready, .mem_rvalid, .mem_rdata);
  frame_mem_model #(.DEPTH(3072), .READY_PCT(50), .MIN_LAT(1), .MAX_LAT(5)) m (
    .clk, .rst_n, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ready, .mem_rvalid, .mem_rdata);

  logic [23:0] shadow [3072];
  int grants [3], reads_ok [3], stalls [3];
  logic [23:0] expq [3][$];
  int inflight [3];
  int bad = 0;

  // masters: drive requests at negedge, observe grant at posedge
  for (genvar g = 0; g < 3; g++) begin : g_m
    initial begin
      mreq[g] = '0;
      inflight[g] = 0;
      @(posedge rst_n);
      for (int n = 0; n < 600; n++) begin
        @(negedge clk);
        while ((g != 0 && inflight[g] != 0) || $urandom_range(3) == 0) begin
          mreq[g] = '0;
          @(negedge clk);
        end
        mreq[g].req   = 1'b1;
        mreq[g].we    = ($urandom_range(2) == 0);
        mreq[g].addr  = 32'(g * 1024 + $urandom_range(63));
        mreq[g].wdata = 24'($urandom);
        @(posedge clk);
        while (!mrsp[g].gnt) begin stalls[g]++; @(posedge clk); end
        grants[g]++;
        if (mreq[g].we) shadow[mreq[g].addr] = mreq[g].wdata;
        else begin expq[g].push_back(shadow[mreq[g].addr]); inflight[g]++; end
      end
      @(negedge clk);
      mreq[g] = '0;
    end

    always @(posedge clk) begin
      if (mrsp[g].rvalid) begin
        if (expq[g].size() == 0) bad++;
        else begin
          if (mrsp[g].rdata != expq[g].pop_front()) bad++;
          else reads_ok[g]++;
        end
        inflight[g]--;
      end
    end
  end

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    foreach (grants[i]) begin grants[i] = 0; reads_ok[i] = 0; stalls[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (grants[0] == 600 && grants[1] == 600 && grants[2] == 600);
    repeat (20) @(posedge clk);
    for (int g = 0; g < 3; g++) begin
      check(expq[g].size() == 0, $sformatf("master %0d: all reads answered", g));
      check(reads_ok[g] > 100, $sformatf("master %0d: %0d reads checked", g, reads_ok[g]));
      check(stalls[g] > 0, $sformatf("master %0d stalled %0d times", g, stalls[g]));
    end
    check(bad == 0, $sformatf("%0d wrong or misrouted read data", bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
