// Memory access controller: shares one memory port among the custom masters.
//
// N masters (here the LH pixel reader, the key frame updater and the
// multidisplay manager) each present a request (mem_req_t). A round-robin
// arbiter grants one per cycle when the memory port is ready (mem_ready);
// the granted request goes out on the port in the same cycle. Reads may take
// any number of cycles but must return in order; the controller remembers
// the master of each outstanding read in a small FIFO (DEPTH entries) and
// routes mem_rvalid/mem_rdata back to it. No read is granted while that FIFO
// is full. A master whose request is not granted keeps it and waits: that is
// the stall the port sharing causes.
// The document names this block but not its insides; arbitration policy,
// FIFO depth and port protocol are this design's choices. The port stands
// for one native port of the multiport memory controller.
//
// Interface: per master, gnt in the request cycle, rvalid/rdata later.
module mem_access_ctrl
  import lh_pkg::*;
#(
  parameter int N     = 3,
  parameter int DEPTH = 8,
  parameter int IW    = (N > 1) ? $clog2(N) : 1,
  parameter int PW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mem_req_t          mreq [N],
  output mem_rsp_t          mrsp [N],
  // shared memory port
  output logic              mem_req,
  output logic              mem_we,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [PIX_W-1:0]  mem_wdata,
  input  logic              mem_ready,
  input  logic              mem_rvalid,
  input  logic [PIX_W-1:0]  mem_rdata
);

  logic [IW-1:0] last_gnt;       // last master granted
  logic [IW-1:0] sel;
  logic          any;
  logic          fifo_full;
  logic [IW-1:0] fifo [DEPTH];
  logic [PW-1:0] wp, rp;
  logic [PW:0]   cnt;

  assign fifo_full = (cnt == (PW+1)'(DEPTH));

  // Round-robin choice: first requester after the last one granted.
  always_comb begin
    any = 1'b0;
    sel = '0;
    for (int o = 1; o <= N; o++) begin
      int m;
      m = (int'(last_gnt) + o) % N;
      if (!any && mreq[m].req && !(fifo_full && !mreq[m].we)) begin
        any = 1'b1;
        sel = IW'(m);
      end
    end
  end

  logic fire;
  assign fire      = any && mem_ready;
  assign mem_req   = any;
  assign mem_we    = mreq[sel].we;
  assign mem_addr  = mreq[sel].addr;
  assign mem_wdata = mreq[sel].wdata;

  always_comb begin
    for (int m = 0; m < N; m++) begin
      mrsp[m].gnt    = fire && (sel == IW'(m));
      mrsp[m].rvalid = mem_rvalid && (cnt != '0) && (fifo[rp] == IW'(m));
      mrsp[m].rdata  = mem_rdata;
    end
  end

  logic push, pop;
  assign push = fire && !mem_we;
  assign pop  = mem_rvalid && (cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_gnt <= IW'(N - 1);
      wp       <= '0;
      rp       <= '0;
      cnt      <= '0;
    end else begin
      if (fire) last_gnt <= sel;
      if (push) wp <= (wp == PW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == PW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) fifo[wp] <= sel;
  end

  assert property (@(posedge clk) disable iff (!rst_n) mem_rvalid |-> cnt != '0)
    else $error("mem_access_ctrl: read data with no read outstanding");

endmodule
