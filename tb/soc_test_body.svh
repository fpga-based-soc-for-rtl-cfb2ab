// Shared body of the end-to-end testbenches of lh_soc_top.
//
// The including module defines W, H, C, ARCH, NF, READY_PCT and MAX_LAT,
// declares clk/rst_n and instantiates the top as `dut`, wired to the signals
// below. When the run is over, test_done is set and summarize() adds the
// mechanism checks; the including module prints the result and finishes.
//
// A video-input model writes each frame into the acquisition area the top
// points at (while the previous frame is still being processed, as in the
// ping-pong scheme) and reports it with frame_ready. Frames come in shots of
// three: inside a shot only small noise changes, each new shot has a new
// pattern. For every frame the test checks against its own reference:
//   - the distance (L1 distance of the 4 x 4 local histograms to the
//     previous frame) and the cut decision (distance > alpha);
//   - that after a cut the next frame lands in the key frame area (area 2);
//   - the display area (area 3): current frame with the key frame, decimated
//     by 4, in the top-right W/4 x H/4 corner once a key frame exists;
//   - the ping-pong toggling of the acquisition area.
// Once, a frame_ready is sent while the engine is busy: it must be dropped
// and the acquisition area must stay. Each mechanism (cut, no cut, key frame
// update, inset display, frame drop, memory not-ready stall, arbitration
// stall between masters) is counted and must occur at least once.

  localparam int NP = W * H;
  localparam int DW = lh_pkg::dist_width(W, H);
  localparam int NB = C * 16;

  logic              frame_ready, acq_area, frame_dropped;
  logic [DW-1:0]     alpha, distance;
  logic              dist_valid, cut, key_valid, busy, disp_done;
  logic [31:0]       disp_base;
  logic              mem_req, mem_we, mem_ready, mem_rvalid;
  logic [31:0]       mem_addr;
  logic [23:0]       mem_wdata, mem_rdata;

  frame_mem_model #(.DEPTH(4 * NP), .READY_PCT(READY_PCT), .MIN_LAT(1), .MAX_LAT(MAX_LAT)) m (
    .clk, .rst_n, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ready, .mem_rvalid, .mem_rdata);

  int checks = 0, failures = 0;
  int n_cut = 0, n_nocut = 0, n_key = 0, n_inset = 0, n_drop = 0, n_arb_stall = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  bit test_done = 0;

  task automatic summarize();
    $display("mechanisms: cut=%0d no_cut=%0d key_update=%0d inset=%0d drop=%0d mem_stall=%0d arb_stall=%0d",
             n_cut, n_nocut, n_key, n_inset, n_drop, m.stalls, n_arb_stall);
    checks += 7;
    if (n_cut == 0)       begin failures++; $display("FAIL: no cut detected"); end
    if (n_nocut == 0)     begin failures++; $display("FAIL: no frame without cut"); end
    if (n_key == 0)       begin failures++; $display("FAIL: no key frame update"); end
    if (n_inset == 0)     begin failures++; $display("FAIL: no display with key frame"); end
    if (n_drop == 0)      begin failures++; $display("FAIL: no dropped frame"); end
    if (m.stalls == 0)    begin failures++; $display("FAIL: no memory stall"); end
    if (n_arb_stall == 0) begin failures++; $display("FAIL: no arbitration stall"); end
  endtask

  // Arbitration stalls: a master waits although the port is ready.
  always @(posedge clk)
    if (rst_n && mem_ready)
      for (int i = 0; i < 3; i++)
        if (dut.mreq[i].req && !dut.mrsp[i].gnt) n_arb_stall++;

  // Pattern of shot f/3 on a 16 x 16 grid of the frame (so that it looks the
  // same at every frame size), plus noise of up to 6 on red.
  function automatic logic [23:0] pixel(input int f, input int x, input int y);
    int s = f / 3;
    int xn, yn, r, g, b, n;
    xn = x * 16 / W;
    yn = y * 16 / H;
    r = (s * 97 + xn * 13) % 256;
    g = (s * 131 + yn * 29) % 256;
    b = (s * 151 + xn * yn * 7) % 256;
    n = $urandom_range(6);
    r = (r + n > 255) ? 255 : r + n;
    return {8'(r), 8'(g), 8'(b)};
  endfunction

  function automatic int level(input logic [23:0] p);
    int y = ((66 * int'(p[23:16]) + 129 * int'(p[15:8]) + 25 * int'(p[7:0]) + 128) / 256) + 16;
    return y / (256 / C);
  endfunction

  logic [23:0] frames [2][NP];   // frames held in areas 0 and 1 (tb copy)
  logic [23:0] key_ref [NP];
  int          prev_h [NB];
  int          cur_h [NB];

  // Video input: store frame f in the acquisition area.
  task automatic store_frame(input int f);
    int a;
    a = int'(acq_area);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        logic [23:0] p;
        p = pixel(f, x, y);
        frames[a][y * W + x] = p;
        m.mem[a * NP + y * W + x] = p;
      end
  endtask

  initial begin
    bit key_exists, key_pending;
    frame_ready = 0;
    alpha = DW'(NP / 4);
    key_exists = 0; key_pending = 0;
    foreach (prev_h[k]) prev_h[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    store_frame(0);
    for (int f = 0; f < NF; f++) begin
      int a, d, bad;
      bit got_dist, this_cut;
      a = int'(acq_area);
      // histogram reference of frame f
      foreach (cur_h[k]) cur_h[k] = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          cur_h[(4 * (y / (H / 4)) + x / (W / 4)) * C + level(frames[a][y * W + x])]++;
      d = 0;
      for (int k = 0; k < NB; k++) d += (cur_h[k] > prev_h[k]) ? cur_h[k] - prev_h[k] : prev_h[k] - cur_h[k];
      prev_h = cur_h;
      // report the frame
      @(negedge clk);
      check(!busy && !frame_dropped, "engine idle before frame_ready");
      frame_ready = 1;
      @(negedge clk);
      frame_ready = 0;
      check(int'(acq_area) == 1 - a, $sformatf("frame %0d: acquisition area toggled", f));
      // next frame is acquired into the other area meanwhile
      if (f + 1 < NF) store_frame(f + 1);
      // one frame_ready while busy must be dropped
      if (f == 1) begin
        @(negedge clk);
        frame_ready = 1; #1;
        check(frame_dropped && busy, "frame_ready while busy is dropped");
        if (frame_dropped) n_drop++;
        @(negedge clk);
        frame_ready = 0;
        check(int'(acq_area) == 1 - a, "dropped frame leaves the acquisition area");
      end
      got_dist = 0; this_cut = 0;
      while (busy) begin
        if (dist_valid) begin
          got_dist = 1;
          this_cut = cut;
          check(int'(distance) == d, $sformatf("frame %0d: distance %0d expected %0d", f, distance, d));
          check(cut == (d > int'(alpha)), $sformatf("frame %0d: cut decision", f));
        end
        @(negedge clk);
      end
      check(got_dist, $sformatf("frame %0d: distance reported", f));
      if (this_cut) n_cut++; else n_nocut++;
      // key frame: the frame after a cut
      if (key_pending) begin
        for (int i = 0; i < NP; i++) key_ref[i] = frames[a][i];
        key_exists = 1;
        n_key++;
      end
      key_pending = this_cut;
      check(key_valid == key_exists, $sformatf("frame %0d: key_valid", f));
      if (key_exists) begin
        bad = 0;
        for (int i = 0; i < NP; i++) if (m.mem[2 * NP + i] != key_ref[i]) bad++;
        check(bad == 0, $sformatf("frame %0d: %0d wrong key frame words", f, bad));
      end
      // display area
      bad = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          logic [23:0] e;
          if (key_exists && x >= W - W / 4 && y < H / 4) e = key_ref[(4 * y) * W + 4 * (x - (W - W / 4))];
          else e = frames[a][y * W + x];
          if (m.mem[3 * NP + y * W + x] != e) bad++;
        end
      check(bad == 0, $sformatf("frame %0d: %0d wrong display words", f, bad));
      check(disp_base == 32'(3 * NP), "display base");
      if (key_exists) n_inset++;
    end
    test_done = 1;
  end
