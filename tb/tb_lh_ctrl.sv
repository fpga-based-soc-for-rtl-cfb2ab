// Self-checking testbench for lh_ctrl.
// Drives frames of random length with random pixel gaps and checks, cycle by
// cycle against a reference of the expected phase: EN follows the pixel
// valid only during accumulation, Sel is 0 while accumulating and 1 from the
// cycle after the last pixel until the distance block is done, Reset and
// the distance start are one-cycle pulses in the first Sel cycle, and done
// pulses with the distance block's done. frame_start is ignored while busy.
module tb_lh_ctrl;
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

  logic frame_start, hv, hl, dd;
  logic clear_pos, en, sel, cnt_reset, dist_start, busy, done;
  lh_ctrl dut (.clk, .rst_n, .frame_start, .hist_valid(hv), .hist_last(hl), .dist_done(dd),
               .clear_pos, .en, .sel, .cnt_reset, .dist_start, .busy, .done);

  initial begin
    frame_start = 0; hv = 0; hl = 0; dd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 50; f++) begin
      int npix;
      npix = 1 + $urandom_range(40);
      @(negedge clk); #1;
      check(!busy && !sel && !en, "idle outputs");
      frame_start = 1; #1;
      check(clear_pos, "clear_pos with frame_start");
      @(negedge clk); frame_start = 0;
      for (int p = 0; p < npix; p++) begin
        while ($urandom_range(2) == 0) begin
          hv = 0; #1; check(!en && !sel && busy, "gap: no EN, Sel 0");
          frame_start = 1; #1; check(!clear_pos, "frame_start ignored while busy");
          frame_start = 0;
          @(negedge clk);
        end
        hv = 1; hl = (p == npix - 1); #1;
        check(en && !sel, "EN with a pixel, Sel 0");
        @(negedge clk);
      end
      hv = 0; hl = 0; #1;
      check(sel && cnt_reset && dist_start && !en, "transfer cycle: Sel, Reset, start");
      @(negedge clk);
      for (int w = 0; w < 5 + $urandom_range(10); w++) begin
        #1; check(sel && !cnt_reset && !dist_start && !done && busy, "distance phase");
        @(negedge clk);
      end
      dd = 1; #1;
      check(done && sel, "done with distance done");
      @(negedge clk); dd = 0; #1;
      check(!sel && !busy, "Sel back to 0 after distance");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
