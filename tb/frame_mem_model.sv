// Behavioural model of the external frame memory behind the shared port
// (stands in for the multiport memory controller and its DDR SDRAM).
//
// Accepts a request in a cycle where mem_ready is high. mem_ready is high
// always (READY_PCT = 100) or at random in READY_PCT percent of the cycles.
// Reads return in order, MIN_LAT..MAX_LAT cycles after acceptance. Writes
// take effect at acceptance. Testbenches load and inspect `mem` directly.
// Words not written read as zero.
module frame_mem_model #(
  parameter int DEPTH     = 4096,
  parameter int READY_PCT = 100,
  parameter int MIN_LAT   = 1,
  parameter int MAX_LAT   = 1
) (
  input  logic        clk,
  input  logic        rst_n,      // requests are ignored during reset
  input  logic        mem_req,
  input  logic        mem_we,
  input  logic [31:0] mem_addr,
  input  logic [23:0] mem_wdata,
  output logic        mem_ready,
  output logic        mem_rvalid,
  output logic [23:0] mem_rdata
);
  logic [23:0] mem [DEPTH];
  longint      now = 0;
  longint      due_q [$];
  logic [23:0] dat_q [$];
  int          stalls = 0;     // cycles a request waited for mem_ready
  longint      last_due = 0;

  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;

  initial begin
    mem_ready  = 1'b1;
    mem_rvalid = 1'b0;
    mem_rdata  = '0;
  end

  always @(posedge clk) begin
    longint due;
    now <= now + 1;
    // accept
    if (!rst_n) begin
      // nothing
    end else if (mem_req && mem_ready) begin
      if (mem_addr >= DEPTH) $error("frame_mem_model: address %0d out of range", mem_addr);
      else if (mem_we) mem[mem_addr] <= mem_wdata;
      else begin
        due = now + MIN_LAT + ((MAX_LAT > MIN_LAT) ? longint'($urandom_range(MAX_LAT - MIN_LAT)) : 0);
        if (due < last_due) due = last_due;   // keep order
        last_due = due;
        due_q.push_back(due);
        dat_q.push_back(mem[mem_addr]);
      end
    end else if (mem_req) stalls++;
    // respond
    if (due_q.size() != 0 && due_q[0] <= now + 1) begin
      mem_rvalid <= 1'b1;
      mem_rdata  <= dat_q[0];
      void'(due_q.pop_front());
      void'(dat_q.pop_front());
    end else begin
      mem_rvalid <= 1'b0;
    end
    mem_ready <= (READY_PCT >= 100) ? 1'b1 : ($urandom_range(99) < READY_PCT);
  end
endmodule
